// instr_sequencer: RCU instruction memory and sequencer.
//
// Configuration for the ALTROs and Board Controllers is written into the
// instruction memory (from the DCS or over the DDL). When started, the
// sequencer fetches instructions from address 0 and executes each either as
// one ALTRO bus instruction (micro instruction) or as a sequence of them
// (macro instruction), until OP_END:
//   OP_WR    addr | data word          write one register
//   OP_BCAST addr | data word          broadcast write, on both branches
//   OP_RD    addr                      read; {err, 11'b0, data} goes to the
//                                      result memory
//   OP_BLKWR daddr | paddr | {N,start} | N data words
//            macro: for i < N write the pointer register paddr with start+i,
//            then write data word i to the data register daddr, e.g. to load
//            an ALTRO pedestal memory
//   OP_BLKVF same layout; reads daddr instead and compares with data word i,
//            writing the expected word back where they differ (check and
//            correct); the number of mismatches goes to the result memory
//   OP_TRG   macro: one software trigger, then wait until that event has
//            been read out (trg_done)
//   OP_WAIT  wait [19:0] clocks
// Instruction word layout: [31:28] opcode, [19:0] ALTRO bus field (card
// address bit [16] selects the branch). Micro and macro instructions, the
// pedestal write/verify macros and the trigger-sequence macro follow the RCU
// description; the encoding, memory sizes and result format are this
// design's choices.
//
// Periodic check and correction: when auto_period is non-zero the sequencer
// also starts the program by itself auto_period clocks after it last went
// idle. During such an automatic run it starts bus cycles only while gate is
// high (the top drives gate with the LHC orbit gap), so a verify-and-correct
// program (OP_BLKVF) scrubs the front-end configuration without disturbing
// data taking; n_auto counts automatic runs. Checking and correcting the
// configuration in the orbit gap, repeated with a period of seconds, follows
// the RCU description; the timer and the gating are this design's choices.
//
// Interface: start (pulse) while idle runs the program; busy is high until
// OP_END, err is set by a bus timeout, a verify mismatch or an unknown opcode.
// The memories are read synchronously (one clock) on their bus ports.
module instr_sequencer
  import rcu_pkg::*;
#(
  parameter int unsigned IMEM_DEPTH = 1024,
  parameter int unsigned RMEM_DEPTH = 256
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // memory access from the register map
  input  logic                          im_we,
  input  logic [$clog2(IMEM_DEPTH)-1:0] im_addr,
  input  logic [31:0]                   im_wdata,
  output logic [31:0]                   im_rdata,
  input  logic [$clog2(RMEM_DEPTH)-1:0] rm_addr,
  output logic [31:0]                   rm_rdata,
  // run control
  input  logic                          start,
  input  logic [31:0]                   auto_period,
  input  logic                          gate,
  output logic [15:0]                   n_auto,
  output logic                          busy,
  output logic                          err,
  output logic [$clog2(RMEM_DEPTH):0]   n_results,
  // ALTRO bus request
  output logic                          bq_valid,
  input  logic                          bq_ready,
  output logic                          bq_branch,
  output bus_op_e                       bq_op,
  output logic [19:0]                   bq_addr,
  output logic [19:0]                   bq_data,
  input  logic                          bq_done,
  input  logic [19:0]                   bq_rdata,
  input  logic                          bq_err,
  // trigger macro
  output logic                          sw_trg,
  input  logic                          trg_done
);

  localparam int unsigned IAW = $clog2(IMEM_DEPTH);
  localparam int unsigned RAW = $clog2(RMEM_DEPTH);

  logic [31:0] imem [IMEM_DEPTH];
  logic [31:0] rmem [RMEM_DEPTH];
  logic [31:0] imem_q;
  logic        rm_we;
  logic [31:0] rm_wdata;

  logic [IAW-1:0] pc;
  logic [RAW:0]   rp;

  always_ff @(posedge clk) begin
    if (im_we) imem[im_addr] <= im_wdata;
    im_rdata <= imem[im_addr];
    imem_q   <= imem[pc];
    if (rm_we) rmem[rp[RAW-1:0]] <= rm_wdata;
    rm_rdata <= rmem[rm_addr];
  end

  typedef enum logic [4:0] {
    S_IDLE, S_LD, S_DEC, S_ARG1, S_ARG2, S_BLKD, S_BLK2, S_BLKCMP, S_BLK3,
    S_BLKEND, S_BC2, S_RDRES, S_NEXT, S_BUS, S_BUSW, S_TRG, S_WAIT
  } state_e;

  state_e      st, ret, bret;
  logic [31:0] ir;
  logic [19:0] preg;
  logic [15:0] n, ptr, i, mism;
  logic [31:0] dword;
  logic [19:0] rdat;
  logic        rerr;
  logic [19:0] wcnt;

  seq_op_e op;
  assign op = seq_op_e'(ir[31:28]);
  assign busy      = (st != S_IDLE);
  assign n_results = rp;

  // issue a bus request and continue in state `after` when it is done
  task automatic bus(input bus_op_e o, input logic b, input logic [19:0] a,
                     input logic [19:0] d, input state_e after);
    bq_op     <= o;
    bq_branch <= b;
    bq_addr   <= a;
    bq_data   <= d;
    bret      <= after;
    st        <= S_BUS;
  endtask

  logic        auto_run;
  logic [31:0] tmr;

  assign bq_valid = (st == S_BUS) && (!auto_run || gate);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st        <= S_IDLE;
      ret       <= S_IDLE;
      bret      <= S_IDLE;
      pc        <= '0;
      rp        <= '0;
      ir        <= '0;
      preg      <= '0;
      n         <= '0;
      ptr       <= '0;
      i         <= '0;
      mism      <= '0;
      dword     <= '0;
      rdat      <= '0;
      rerr      <= 1'b0;
      wcnt      <= '0;
      err       <= 1'b0;
      auto_run  <= 1'b0;
      tmr       <= '0;
      n_auto    <= '0;
      bq_op     <= BOP_WR;
      bq_branch <= 1'b0;
      bq_addr   <= '0;
      bq_data   <= '0;
      sw_trg    <= 1'b0;
      rm_we     <= 1'b0;
      rm_wdata  <= '0;
    end else begin
      sw_trg <= 1'b0;
      rm_we  <= 1'b0;
      if (rm_we) rp <= rp + 1'b1;
      case (st)
        S_IDLE: begin
          tmr <= (auto_period == 0) ? '0 : tmr + 1'b1;
          if (start || (auto_period != 0 && tmr >= auto_period - 1)) begin
            pc       <= '0;
            rp       <= '0;
            err      <= 1'b0;
            ret      <= S_DEC;
            st       <= S_LD;
            tmr      <= '0;
            auto_run <= !start;
            if (!start) n_auto <= n_auto + 1'b1;
          end
        end
        S_LD: st <= ret;
        S_DEC: begin
          ir <= imem_q;
          pc <= pc + 1'b1;
          case (seq_op_e'(imem_q[31:28]))
            OP_END: st <= S_IDLE;
            OP_WR, OP_BCAST, OP_BLKWR, OP_BLKVF: begin
              ret <= S_ARG1;
              st  <= S_LD;
            end
            OP_RD:   bus(BOP_RD, imem_q[16], imem_q[19:0], 20'h0, S_RDRES);
            OP_TRG: begin
              sw_trg <= 1'b1;
              st     <= S_TRG;
            end
            OP_WAIT: begin
              wcnt <= imem_q[19:0];
              st   <= S_WAIT;
            end
            default: begin
              err <= 1'b1;
              st  <= S_IDLE;
            end
          endcase
        end
        S_ARG1: begin
          pc <= pc + 1'b1;
          case (op)
            OP_WR:    bus(BOP_WR, ir[16], ir[19:0], imem_q[19:0], S_NEXT);
            OP_BCAST: begin
              dword <= imem_q;
              bus(BOP_BCAST, 1'b0, ir[19:0], imem_q[19:0], S_BC2);
            end
            default: begin          // block macros: pointer register address
              preg <= imem_q[19:0];
              ret  <= S_ARG2;
              st   <= S_LD;
            end
          endcase
        end
        S_BC2: bus(BOP_BCAST, 1'b1, ir[19:0], dword[19:0], S_NEXT);
        S_ARG2: begin
          pc   <= pc + 1'b1;
          n    <= imem_q[31:16];
          ptr  <= imem_q[15:0];
          i    <= '0;
          mism <= '0;
          if (imem_q[31:16] == 16'h0) st <= S_BLKEND;
          else begin
            ret <= S_BLKD;
            st  <= S_LD;
          end
        end
        S_BLKD: begin
          dword <= imem_q;
          pc    <= pc + 1'b1;
          bus(BOP_WR, preg[16], preg, 20'(ptr + i), S_BLK2);
        end
        S_BLK2:
          if (op == OP_BLKWR) bus(BOP_WR, ir[16], ir[19:0], dword[19:0], S_BLK3);
          else                bus(BOP_RD, ir[16], ir[19:0], 20'h0, S_BLKCMP);
        S_BLKCMP:
          if (rerr || rdat != dword[19:0]) begin
            // correct the word: the pointer register still addresses it
            mism <= mism + 1'b1;
            bus(BOP_WR, ir[16], ir[19:0], dword[19:0], S_BLK3);
          end else begin
            st <= S_BLK3;
          end
        S_BLK3: begin
          i <= i + 1'b1;
          if (i + 1'b1 == n) st <= S_BLKEND;
          else begin
            ret <= S_BLKD;
            st  <= S_LD;
          end
        end
        S_BLKEND: begin
          if (op == OP_BLKVF) begin
            rm_we    <= 1'b1;
            rm_wdata <= {16'h0, mism};
            if (mism != 0) err <= 1'b1;
          end
          st <= S_NEXT;
        end
        S_RDRES: begin
          rm_we    <= 1'b1;
          rm_wdata <= {rerr, 11'h0, rdat};
          st       <= S_NEXT;
        end
        S_NEXT: begin
          ret <= S_DEC;
          st  <= S_LD;
        end
        S_BUS: if (bq_valid && bq_ready) st <= S_BUSW;
        S_BUSW: if (bq_done) begin
          rdat <= bq_rdata;
          rerr <= bq_err;
          if (bq_err) err <= 1'b1;
          st <= bret;
        end
        S_TRG: if (trg_done) st <= S_NEXT;
        S_WAIT: begin
          if (wcnt == 0) st <= S_NEXT;
          else wcnt <= wcnt - 1'b1;
        end
        default: st <= S_IDLE;
      endcase
    end
  end

endmodule
