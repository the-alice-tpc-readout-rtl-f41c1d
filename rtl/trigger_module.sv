// trigger_module: trigger handling of the RCU.
//
// The TTC system delivers the LHC clock, a fixed-latency Level-1 pulse on the
// TTCrx A-channel and messages (the L1 trigger word, Level-2 accept/reject
// with the bunch-crossing number and further bytes) on the B-channel. This
// block:
//   * forwards each accepted L1 to the FECs (l1_out) and latches the local
//     bunch-crossing counter and the time of the L1 in a pending queue;
//   * in L1+L2 mode, answers each L2 message for the oldest pending L1: an L2
//     accept whose bunch-crossing number equals the latched one gives l2a_out
//     and an event for the readout, a mismatch or an L2 reject gives l2r_out;
//   * in L1-only mode and in software mode (L1 made by sw_trg), generates the
//     L2 accept itself l2_delay clocks after the L1, i.e. after the ALTRO
//     acquisition window;
//   * counts the events held in the FEC multi-event buffers (accepted L1s not
//     yet rejected or read out). With MEB_DEPTH of them held the FECs cannot
//     take another acquisition: busy is raised and further L1s are dropped
//     and counted. This is the only source of dead time.
// The three modes, the bunch-crossing comparison, the self-generated L2 and
// dead time only when the FEC buffers are full follow the RCU description;
// the B-channel word format (rcu_pkg BCH_*), the decision to turn a
// bunch-crossing mismatch into a reject and the queue handling are this
// design's choices. The local bunch counter counts clk (the 40 MHz LHC clock)
// from 0 to BC_PER_ORBIT-1 and restarts on bc_rst; its last GAP_BC values,
// the bunch slots left empty at the end of each LHC orbit, are flagged as
// orbit_gap for the periodic configuration check. The gap length is this
// design's choice.
//
// Timing: l1_out follows l1_a (or sw_trg) by one clock; an event appears on
// ev_valid one clock after its L2 accept, and stays until ev_ready.
module trigger_module
  import rcu_pkg::*;
#(
  parameter int unsigned MEB_DEPTH    = 8,
  parameter int unsigned BC_PER_ORBIT = 3564,
  parameter int unsigned GAP_BC       = 119
) (
  input  logic         clk,
  input  logic         rst_n,
  input  trg_mode_e    mode,
  input  logic [15:0]  l2_delay,
  input  logic         sw_trg,
  input  logic         l1_a,
  input  logic         bch_valid,
  input  logic [15:0]  bch_data,
  input  logic         bc_rst,
  output logic         l1_out,
  output logic         l2a_out,
  output logic         l2r_out,
  output logic         ev_valid,
  input  logic         ev_ready,
  output ev_info_t     ev_info,
  input  logic         ev_read,
  output logic         busy,
  output trg_cnt_t     cnt,
  output logic [23:0]  evcnt,
  output logic         orbit_gap
);

  localparam int unsigned PW = $clog2(MEB_DEPTH);

  typedef struct packed {
    logic [11:0] bcid;
    logic [9:0]  l1_word;
    logic [31:0] ts;
  } pend_t;

  pend_t       pq [MEB_DEPTH];
  logic [PW-1:0] pq_wr, pq_rd;
  logic [PW:0]   pq_n;
  ev_info_t    eq [MEB_DEPTH];
  logic [PW-1:0] eq_wr, eq_rd;
  logic [PW:0]   eq_n;
  logic [PW:0]   held;

  logic [11:0] bc;
  logic [31:0] now;

  // L2 accept message being assembled
  logic [1:0]  l2_words;    // payload words still expected
  logic [11:0] l2_bcid;
  logic [15:0] l2_p0;

  logic l1_in, l1_take, self_l2, msg_l2a_done, msg_l2r, l2_decide, l2_accept;
  pend_t head;

  assign head    = pq[pq_rd];
  assign busy    = (held >= (PW+1)'(MEB_DEPTH));
  assign l1_in   = (mode == TRG_SW) ? sw_trg : l1_a;
  assign l1_take = l1_in && !busy;

  assign self_l2      = (mode != TRG_L1L2) && (pq_n != 0) && ((now - head.ts) >= 32'(l2_delay));
  assign msg_l2a_done = (mode == TRG_L1L2) && bch_valid && (l2_words == 2'd1) && (pq_n != 0);
  assign msg_l2r      = (mode == TRG_L1L2) && bch_valid && (l2_words == 2'd0) &&
                        (bch_data[15:12] == BCH_L2R) && (pq_n != 0);
  assign l2_decide    = self_l2 || msg_l2a_done || msg_l2r;
  assign l2_accept    = self_l2 || (msg_l2a_done && (l2_bcid == head.bcid));

  assign ev_valid  = (eq_n != 0);
  assign orbit_gap = (bc >= 12'(BC_PER_ORBIT - GAP_BC));
  assign ev_info  = eq[eq_rd];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bc       <= '0;
      now      <= '0;
      pq_wr    <= '0;
      pq_rd    <= '0;
      pq_n     <= '0;
      eq_wr    <= '0;
      eq_rd    <= '0;
      eq_n     <= '0;
      held     <= '0;
      l2_words <= '0;
      l2_bcid  <= '0;
      l2_p0    <= '0;
      l1_out   <= 1'b0;
      l2a_out  <= 1'b0;
      l2r_out  <= 1'b0;
      cnt      <= '0;
      evcnt    <= '0;
    end else begin
      logic [PW:0] held_n, pq_n_n, eq_n_n;
      held_n = held;
      pq_n_n = pq_n;
      eq_n_n = eq_n;

      now     <= now + 1'b1;
      bc      <= (bc_rst || bc == 12'(BC_PER_ORBIT - 1)) ? 12'd0 : bc + 1'b1;
      l1_out  <= 1'b0;
      l2a_out <= 1'b0;
      l2r_out <= 1'b0;

      // ---- L1
      if (l1_in && busy) cnt.dropped <= cnt.dropped + 1'b1;
      if (l1_take) begin
        pq[pq_wr] <= '{bcid: bc, l1_word: '0, ts: now};
        pq_wr     <= pq_wr + 1'b1;
        pq_n_n    = pq_n_n + 1'b1;
        held_n    = held_n + 1'b1;
        l1_out    <= 1'b1;
        cnt.l1    <= cnt.l1 + 1'b1;
      end

      // ---- B-channel messages
      if (bch_valid && mode == TRG_L1L2) begin
        if (l2_words != 0) begin
          if (l2_words == 2'd2) l2_p0 <= bch_data;
          l2_words <= l2_words - 1'b1;
        end else begin
          case (bch_data[15:12])
            BCH_L1:  if (pq_n != 0) pq[pq_wr - 1'b1].l1_word <= bch_data[9:0];
            BCH_L2A: begin
              l2_bcid  <= bch_data[11:0];
              l2_words <= 2'd2;
            end
            default: ;
          endcase
        end
      end

      // ---- L2 decision for the oldest pending L1
      if (l2_decide) begin
        pq_rd  <= pq_rd + 1'b1;
        pq_n_n = pq_n_n - 1'b1;
        if (l2_accept) begin
          eq[eq_wr] <= '{evcnt:      evcnt,
                         l1_word:    head.l1_word,
                         bcid:       head.bcid,
                         l2_payload: self_l2 ? 32'h0 : {l2_p0, bch_data},
                         mode:       mode};
          eq_wr     <= eq_wr + 1'b1;
          eq_n_n    = eq_n_n + 1'b1;
          evcnt     <= evcnt + 1'b1;
          l2a_out   <= 1'b1;
          cnt.l2a   <= cnt.l2a + 1'b1;
        end else begin
          held_n  = held_n - 1'b1;
          l2r_out <= 1'b1;
          cnt.l2r <= cnt.l2r + 1'b1;
          if (msg_l2a_done) cnt.bc_mismatch <= cnt.bc_mismatch + 1'b1;
        end
      end

      // ---- readout side
      if (ev_valid && ev_ready) begin
        eq_rd  <= eq_rd + 1'b1;
        eq_n_n = eq_n_n - 1'b1;
      end
      if (ev_read && held_n != 0) held_n = held_n - 1'b1;

      held <= held_n;
      pq_n <= pq_n_n;
      eq_n <= eq_n_n;
    end
  end

  a_held_bound: assert property (@(posedge clk) disable iff (!rst_n)
                                 held <= (PW+1)'(MEB_DEPTH));

endmodule
