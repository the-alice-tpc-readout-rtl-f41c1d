// altro_bus_master: RCU side of one ALTRO bus branch.
//
// The ALTRO bus is a multi-drop, single-master bus with 40 bidirectional
// data/address lines (BD) and active-low control lines. This block runs the
// four kinds of bus cycle the RCU needs:
//   * write:      BD[39:20] = instruction field, BD[19:0] = data, WRITE low,
//                 CSTB low until the addressed ALTRO pulls ACK low, then CSTB
//                 high and wait for ACK to return high;
//   * read:       as write with WRITE high, the RCU drives only BD[39:20] and
//                 samples BD[19:0] when ACK goes low;
//   * broadcast:  a write that all chips take at once; nobody acknowledges, so
//                 CSTB is held low for BCAST_CYCLES clocks;
//   * readout:    a write of the channel-readout command, after which the
//                 ALTRO takes the bus, pulls TRSF low and presents one 40-bit
//                 word per clock marked by DSTB low; TRSF high ends the block.
// The handshake and the synchronous block transfer follow the RCU description;
// the setup cycle before CSTB, the broadcast hold time and the timeouts
// (ACK_TIMEOUT, TRSF_TIMEOUT, reported through rsp_err) are this design's
// choices. All bus inputs are taken as synchronous to clk (RCLK, 40 MHz).
//
// Interface: one request at a time (req_valid/req_ready), finished by a
// one-cycle done pulse that returns req_tag as done_tag. Readout words appear
// on rdo_valid/rdo_data in the cycle after DSTB, rdo_end pulses once the
// block is over. The bus is split into bd_out, bd_oe (bit 1 for BD[39:20],
// bit 0 for BD[19:0]) and bd_in; the GTL transceivers join them.
module altro_bus_master
  import rcu_pkg::*;
#(
  parameter int unsigned ACK_TIMEOUT  = 64,
  parameter int unsigned BCAST_CYCLES = 4,
  parameter int unsigned TRSF_TIMEOUT = 1024
) (
  input  logic             clk,
  input  logic             rst_n,
  // request
  input  logic             req_valid,
  output logic             req_ready,
  input  bus_op_e          req_op,
  input  logic             req_tag,
  input  logic [19:0]      req_addr,
  input  logic [19:0]      req_data,
  // response
  output logic             done,
  output logic             done_tag,
  output logic [19:0]      rsp_data,
  output logic             rsp_err,
  // readout stream
  output logic             rdo_valid,
  output logic [BD_W-1:0]  rdo_data,
  output logic             rdo_end,
  // bus
  output logic [BD_W-1:0]  bd_out,
  output logic [1:0]       bd_oe,
  input  logic [BD_W-1:0]  bd_in,
  output logic             cstb_n,
  output logic             write_n,
  input  logic             ack_n,
  input  logic             dstb_n,
  input  logic             trsf_n
);

  typedef enum logic [2:0] {S_IDLE, S_SETUP, S_STROBE, S_RELEASE, S_BCAST,
                            S_WTRSF, S_XFER, S_DONE} state_e;
  state_e      st;
  bus_op_e     op;
  logic        tag, err;
  logic [19:0] addr, data;
  logic [15:0] tmr;

  assign req_ready = (st == S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st        <= S_IDLE;
      op        <= BOP_WR;
      tag       <= 1'b0;
      err       <= 1'b0;
      addr      <= '0;
      data      <= '0;
      tmr       <= '0;
      done      <= 1'b0;
      done_tag  <= 1'b0;
      rsp_data  <= '0;
      rsp_err   <= 1'b0;
      rdo_valid <= 1'b0;
      rdo_data  <= '0;
      rdo_end   <= 1'b0;
    end else begin
      done      <= 1'b0;
      rdo_valid <= 1'b0;
      rdo_end   <= 1'b0;
      case (st)
        S_IDLE: if (req_valid) begin
          op   <= req_op;
          tag  <= req_tag;
          addr <= req_addr;
          data <= req_data;
          err  <= 1'b0;
          tmr  <= '0;
          st   <= S_SETUP;
        end
        S_SETUP: st <= (op == BOP_BCAST) ? S_BCAST : S_STROBE;
        S_STROBE: begin
          tmr <= tmr + 1'b1;
          if (!ack_n) begin
            if (op == BOP_RD) rsp_data <= bd_in[19:0];
            tmr <= '0;
            st  <= S_RELEASE;
          end else if (tmr == 16'(ACK_TIMEOUT - 1)) begin
            err <= 1'b1;
            st  <= S_DONE;
          end
        end
        S_RELEASE: begin
          tmr <= tmr + 1'b1;
          if (ack_n) begin
            tmr <= '0;
            st  <= (op == BOP_RDO) ? S_WTRSF : S_DONE;
          end else if (tmr == 16'(ACK_TIMEOUT - 1)) begin
            err <= 1'b1;
            st  <= S_DONE;
          end
        end
        S_BCAST: begin
          tmr <= tmr + 1'b1;
          if (tmr == 16'(BCAST_CYCLES - 1)) st <= S_DONE;
        end
        S_WTRSF: begin
          tmr <= tmr + 1'b1;
          if (!trsf_n) st <= S_XFER;
          else if (tmr == 16'(TRSF_TIMEOUT - 1)) begin
            err     <= 1'b1;
            rdo_end <= 1'b1;
            st      <= S_DONE;
          end
        end
        S_XFER: begin
          if (!trsf_n && !dstb_n) begin
            rdo_valid <= 1'b1;
            rdo_data  <= bd_in;
          end
          if (trsf_n) begin
            rdo_end <= 1'b1;
            st      <= S_DONE;
          end
        end
        S_DONE: begin
          done     <= 1'b1;
          done_tag <= tag;
          rsp_err  <= err;
          st       <= S_IDLE;
        end
        default: st <= S_IDLE;
      endcase
    end
  end

  // Bus drive: the instruction field and data are held from the setup cycle
  // to the end of the strobe; a read leaves BD[19:0] to the ALTRO.
  always_comb begin
    bd_out  = {addr, data};
    bd_oe   = 2'b00;
    cstb_n  = 1'b1;
    write_n = 1'b1;
    if (st == S_SETUP || st == S_STROBE || st == S_BCAST) begin
      bd_oe   = (op == BOP_RD) ? 2'b10 : 2'b11;
      write_n = (op == BOP_RD);
      cstb_n  = (st == S_SETUP);
    end
  end

  // CSTB may only be released once ACK was seen low (or on timeout/broadcast).
  property p_release_after_ack;
    @(posedge clk) disable iff (!rst_n)
      (st == S_STROBE && ack_n && tmr != 16'(ACK_TIMEOUT - 1)) |=> !cstb_n;
  endproperty
  a_release_after_ack: assert property (p_release_after_ack);

endmodule
