// msm: Monitoring and Safety Module of the RCU.
//
// The Board Controller (BC) on each FEC watches the card's temperature,
// voltages and currents against limits loaded by the RCU, and pulls the
// interrupt line of its branch when one goes out of range. This module
//   * runs single FCB transactions ordered by the DCS (cmd_*), used for
//     example to load the limits at power-up and to read the monitored values;
//   * keeps the power state of the 32 card slots (pwr, bit {branch, card});
//     this is also the Active Front-End Card list used by the readout;
//   * when the interrupt of a branch is low, reads the error register ERR_REG
//     of every powered card of that branch, and switches off at once a card
//     whose error value has a bit of HARD_MASK set (temperature or current
//     over limit, voltage under limit, regulator error). Every non-zero error
//     value is reported through last_fec/last_err, hard errors are counted.
// One FCB engine (fcb_master) serves both branches: the branch being
// addressed gets scl/sda_in, the other branch's lines stay idle high. A DCS
// command waiting is served before the next poll round starts.
// Interrupt-driven polling, the error classes and the power-off follow the
// RCU description; the error register address and bit layout, the card
// address byte {2'b00, branch, card} and the reset state (all cards off) are
// this design's choices.
//
// Timing: each register access is one FCB transaction (306 clocks at the
// default CLK_DIV = 8); polling the 13 cards of a full branch takes about
// 13 x 7.7 us = 100 us.
module msm #(
  parameter int unsigned CLK_DIV   = 8,
  parameter logic [7:0]  ERR_REG   = 8'h12,
  parameter logic [15:0] HARD_MASK = 16'h003F
) (
  input  logic         clk,
  input  logic         rst_n,
  // DCS-ordered transaction
  input  logic         cmd_valid,
  input  logic         cmd_rw,
  input  logic [4:0]   cmd_fec,
  input  logic [7:0]   cmd_reg,
  input  logic [15:0]  cmd_wdata,
  output logic         cmd_busy,
  output logic         cmd_done,
  output logic [15:0]  cmd_rdata,
  output logic         cmd_nack,
  // power state / active card list
  input  logic         pwr_we,
  input  logic [31:0]  pwr_wdata,
  output logic [31:0]  pwr,
  // FCB lines, one set per branch
  input  logic [1:0]   intr_n,
  output logic [1:0]   scl,
  output logic [1:0]   sda_in,
  input  logic [1:0]   sda_out,
  // report
  output logic [15:0]  err_cnt,
  output logic [4:0]   last_fec,
  output logic [15:0]  last_err,
  output logic [15:0]  poll_cnt
);

  typedef enum logic [2:0] {S_IDLE, S_CMD, S_PSCAN, S_PREAD, S_PWAIT} state_e;
  state_e st;

  logic        f_start, f_rw, f_busy, f_done, f_nack, f_scl, f_sda;
  logic [6:0]  f_addr;
  logic [7:0]  f_reg;
  logic [15:0] f_wdata, f_rdata;
  logic        br;              // branch in use
  logic [3:0]  card;
  logic        rr;              // branch to look at first for interrupts

  // pending DCS command
  logic        c_pend, c_rw;
  logic [4:0]  c_fec;
  logic [7:0]  c_reg;
  logic [15:0] c_wdata;

  fcb_master #(.CLK_DIV(CLK_DIV)) u_fcb (
    .clk, .rst_n,
    .start(f_start), .rw(f_rw), .fec_addr(f_addr), .reg_addr(f_reg), .wdata(f_wdata),
    .busy(f_busy), .done(f_done), .rdata(f_rdata), .nack(f_nack),
    .scl(f_scl), .sda_in(f_sda), .sda_out(sda_out[br])
  );

  always_comb begin
    scl    = 2'b11;
    sda_in = 2'b11;
    scl[br]    = f_scl;
    sda_in[br] = f_sda;
  end

  assign cmd_busy = c_pend;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st        <= S_IDLE;
      f_start   <= 1'b0;
      f_rw      <= 1'b0;
      f_addr    <= '0;
      f_reg     <= '0;
      f_wdata   <= '0;
      br        <= 1'b0;
      card      <= '0;
      rr        <= 1'b0;
      c_pend    <= 1'b0;
      c_rw      <= 1'b0;
      c_fec     <= '0;
      c_reg     <= '0;
      c_wdata   <= '0;
      cmd_done  <= 1'b0;
      cmd_rdata <= '0;
      cmd_nack  <= 1'b0;
      pwr       <= '0;
      err_cnt   <= '0;
      last_fec  <= '0;
      last_err  <= '0;
      poll_cnt  <= '0;
    end else begin
      f_start  <= 1'b0;
      cmd_done <= 1'b0;
      if (cmd_valid && !c_pend) begin
        c_pend  <= 1'b1;
        c_rw    <= cmd_rw;
        c_fec   <= cmd_fec;
        c_reg   <= cmd_reg;
        c_wdata <= cmd_wdata;
      end
      if (pwr_we) pwr <= pwr_wdata;

      case (st)
        S_IDLE: begin
          if (c_pend) begin
            br      <= c_fec[4];
            f_addr  <= {2'b00, c_fec};
            f_rw    <= c_rw;
            f_reg   <= c_reg;
            f_wdata <= c_wdata;
            f_start <= 1'b1;
            st      <= S_CMD;
          end else if (!intr_n[rr] || !intr_n[!rr]) begin
            br   <= !intr_n[rr] ? rr : !rr;
            rr   <= !rr;
            card <= '0;
            st   <= S_PSCAN;
          end
        end
        S_CMD: if (f_done) begin
          cmd_done  <= 1'b1;
          cmd_rdata <= f_rdata;
          cmd_nack  <= f_nack;
          c_pend    <= 1'b0;
          st        <= S_IDLE;
        end
        S_PSCAN: begin
          if (pwr[{br, card}]) begin
            f_addr  <= {2'b00, br, card};
            f_rw    <= 1'b1;
            f_reg   <= ERR_REG;
            f_wdata <= '0;
            f_start <= 1'b1;
            st      <= S_PWAIT;
          end else if (card == 4'hF) begin
            poll_cnt <= poll_cnt + 1'b1;
            st       <= S_IDLE;
          end else begin
            card <= card + 1'b1;
          end
        end
        S_PWAIT: if (f_done) begin
          if (!f_nack && f_rdata != 16'h0) begin
            last_fec <= {br, card};
            last_err <= f_rdata;
          end
          if (!f_nack && (f_rdata & HARD_MASK) != 16'h0) begin
            pwr[{br, card}] <= 1'b0;
            err_cnt         <= err_cnt + 1'b1;
          end
          st <= S_PREAD;
        end
        S_PREAD: begin
          if (card == 4'hF) begin
            poll_cnt <= poll_cnt + 1'b1;
            st       <= S_IDLE;
          end else begin
            card <= card + 1'b1;
            st   <= S_PSCAN;
          end
        end
        default: st <= S_IDLE;
      endcase
    end
  end

endmodule
