// ddl_formatter: event framing for the DDL (the RCU's Data Link Interface).
//
// Each event leaves the RCU as one block of 32-bit words:
//   7 header words | ALTRO channel data repacked to 32 bits | 1 trailer word.
// The header is built from the event descriptor (trigger words, bunch
// crossing, event number, mode; layout in rcu_pkg::ddl_header). The 40-bit
// ALTRO words coming out of the channel data memories are packed end to end,
// least significant bit first, so four ALTRO words fill exactly five DDL
// words; the last word of an event is padded with zeros. The trailer carries
// the number of 32-bit payload words (rcu_pkg::ddl_trailer).
// Seven headers, one trailer and the 40-to-32-bit repacking follow the RCU
// description; the content of header and trailer and the packing order are
// this design's choices.
//
// Interface: hdr_valid/hdr_ready starts an event; ev_last (pulse) says that
// no more channels will be written for it; the event ends once the data
// memories are empty (dmem_busy low) and every bit has been sent. The output
// d_valid/d_ready/d_data is a plain stream (d_ready low = SIU busy). The
// packer moves one 32-bit word per clock when d_ready is high, i.e. it keeps
// up with 40 MHz x 40 bit only as far as the 32-bit link allows.
module ddl_formatter
  import rcu_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  input  logic         hdr_valid,
  output logic         hdr_ready,
  input  ev_info_t     hdr_info,
  input  logic         ev_last,
  input  logic         r_valid,
  output logic         r_ready,
  input  logic [39:0]  r_data,
  input  logic         dmem_busy,
  output logic         d_valid,
  input  logic         d_ready,
  output logic [31:0]  d_data,
  output logic         fmt_done
);

  typedef enum logic [2:0] {S_IDLE, S_HDR, S_DATA, S_PAD, S_TRL} state_e;
  state_e      st;
  ev_info_t    info;
  logic [2:0]  hcnt;
  logic [71:0] acc;
  logic [6:0]  cnt;          // valid bits in acc
  logic        last_seen;
  logic [23:0] nwords;

  logic        out_fire, in_fire;
  logic [6:0]  cnt_after;    // bits left once this cycle's output is taken
  logic [71:0] acc_after;

  always_comb begin
    d_valid = 1'b0;
    d_data  = acc[31:0];
    case (st)
      S_HDR: begin
        d_valid = 1'b1;
        d_data  = ddl_header(info, 32'(hcnt));
      end
      S_DATA:  d_valid = (cnt >= 7'd32);
      S_PAD:   d_valid = 1'b1;
      S_TRL: begin
        d_valid = 1'b1;
        d_data  = ddl_trailer(nwords);
      end
      default: ;
    endcase
  end

  assign out_fire  = (st == S_DATA) && d_valid && d_ready;
  assign cnt_after = out_fire ? cnt - 7'd32 : cnt;
  assign acc_after = out_fire ? (acc >> 32) : acc;
  assign r_ready   = (st == S_DATA) && (cnt_after <= 7'd32);
  assign in_fire   = r_ready && r_valid;
  assign hdr_ready = (st == S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st        <= S_IDLE;
      info      <= '0;
      hcnt      <= '0;
      acc       <= '0;
      cnt       <= '0;
      last_seen <= 1'b0;
      nwords    <= '0;
      fmt_done  <= 1'b0;
    end else begin
      fmt_done <= 1'b0;
      if (ev_last) last_seen <= 1'b1;
      case (st)
        S_IDLE: if (hdr_valid) begin
          info      <= hdr_info;
          hcnt      <= '0;
          acc       <= '0;
          cnt       <= '0;
          nwords    <= '0;
          last_seen <= ev_last;
          st        <= S_HDR;
        end
        S_HDR: if (d_ready) begin
          hcnt <= hcnt + 1'b1;
          if (hcnt == 3'(N_HDR - 1)) st <= S_DATA;
        end
        S_DATA: begin
          if (in_fire)
            acc <= acc_after | (72'(r_data) << cnt_after);
          else
            acc <= acc_after;
          cnt <= cnt_after + (in_fire ? 7'd40 : 7'd0);
          if (out_fire) nwords <= nwords + 1'b1;
          if (last_seen && !dmem_busy && !r_valid && !in_fire && cnt_after < 7'd32)
            st <= (cnt_after != 0) ? S_PAD : S_TRL;
        end
        S_PAD: if (d_ready) begin
          nwords <= nwords + 1'b1;
          cnt    <= '0;
          st     <= S_TRL;
        end
        S_TRL: if (d_ready) begin
          fmt_done  <= 1'b1;
          last_seen <= 1'b0;
          st        <= S_IDLE;
        end
        default: st <= S_IDLE;
      endcase
    end
  end

endmodule
