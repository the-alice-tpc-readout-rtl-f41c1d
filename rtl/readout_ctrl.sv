// readout_ctrl: per-event readout sequencing over the ALTRO bus.
//
// For every event accepted by the trigger module this block
//   1. hands the event descriptor to the DDL formatter (header),
//   2. walks the Active Channel List (ACL) of each branch and issues one
//      channel-readout instruction for every channel that is marked active and
//      lies on a card present in the Active Front-End Card list (afl),
//   3. tells the formatter that no more channels follow (ev_last), waits for
//      the trailer to be sent (fmt_done) and releases the event (ev_read),
//      which frees one multi-event buffer slot in the trigger module.
// The two branches are read concurrently: each has its own walker over its
// half of the ACL (cards 0-15, chips 0-7, channels 0-15 in that order), with
// at most one channel in flight per branch. Before a walker issues a channel
// it must be granted one of the two channel data memories (alloc/alloc_br to
// chan_dmem, only while w_free); when both walkers wait, the grant
// alternates. The DDL therefore carries channels in grant order, which
// interleaves the two branches; within a branch the order is the ACL order,
// or, when topo is set, the order given by the chip-order table: entry
// {branch, position} names the {card, chip} read at that position, so the
// chips of a branch can be read in the order of their place on the detector.
// Channels within a chip stay in ascending order.
//
// The ACL is kept as one 16-bit channel mask per ALTRO chip, indexed by
// {branch, card[3:0], chip[2:0]} (256 entries, no reset: it must be written
// after power-up); cards whose afl bit is clear are skipped whole, and chips
// with an all-zero mask cost one clock. Selecting channels through an ACL and
// cards through an active card list, concurrent readout of the two
// branches and an optional readout order following the detector topology
// follow the RCU description; the table layouts, the chip granularity of the
// order table, the walk order and the memory grant are this design's
// choices. The order table has no reset either and must be written before
// topo is set; it should name every chip once (a chip named twice is read
// twice).
//
// Interface: rq_valid/rq_ready/rq_addr per branch, rq_done per branch when
// the readout instruction and its data block are finished. The ACL is written
// through acl_we/acl_addr/acl_wdata and read back through acl_raddr/acl_rdata;
// the order table is written through ord_we/ord_addr/ord_wdata.
module readout_ctrl
  import rcu_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  // events
  input  logic         ev_valid,
  output logic         ev_ready,
  input  ev_info_t     ev_info,
  output logic         ev_read,
  output logic         busy,
  // tables
  input  logic         acl_we,
  input  logic [7:0]   acl_addr,
  input  logic [15:0]  acl_wdata,
  input  logic [7:0]   acl_raddr,
  output logic [15:0]  acl_rdata,
  input  logic [31:0]  afl,
  // chip readout order
  input  logic         ord_we,
  input  logic [7:0]   ord_addr,
  input  logic [6:0]   ord_wdata,
  input  logic         topo,
  // ALTRO bus masters
  output logic [1:0]   rq_valid,
  input  logic [1:0]   rq_ready,
  output logic [1:0][19:0] rq_addr,
  input  logic [1:0]   rq_done,
  // data memories
  input  logic         w_free,
  output logic         alloc,
  output logic         alloc_br,
  // formatter
  output logic         hdr_valid,
  input  logic         hdr_ready,
  output ev_info_t     hdr_info,
  output logic         ev_last,
  input  logic         fmt_done,
  output logic [15:0]  n_chan      // channels read in the last event
);

  logic [15:0] acl [256];

  always_ff @(posedge clk) begin
    if (acl_we) acl[acl_addr] <= acl_wdata;
  end
  assign acl_rdata = acl[acl_raddr];

  logic [6:0] ord [256];

  always_ff @(posedge clk) begin
    if (ord_we) ord[ord_addr] <= ord_wdata;
  end

  typedef enum logic [2:0] {S_IDLE, S_HDR, S_RUN, S_LAST, S_FMT} state_e;
  typedef enum logic [2:0] {W_CHIP, W_CHAN, W_ISSUE, W_WAIT, W_DONE} walk_e;
  state_e           st;
  walk_e            wst [2];
  logic [1:0][6:0]  idx;        // walk position per branch
  logic [1:0][6:0]  chip;       // {card, chip} read at that position
  logic [1:0][15:0] rem;        // channels of this chip still to read
  logic [1:0][3:0]  chan;
  logic [1:0][3:0]  first;      // lowest set bit of rem
  logic [1:0][15:0] chip_mask;
  logic [1:0]       want, gnt;
  logic             last_gnt;

  always_comb begin
    for (int b = 0; b < 2; b++) begin
      first[b] = '0;
      for (int i = 15; i >= 0; i--) if (rem[b][i]) first[b] = 4'(i);
      chip[b]      = topo ? ord[{1'(b), idx[b]}] : idx[b];
      chip_mask[b] = afl[{1'(b), chip[b][6:3]}] ? acl[{1'(b), chip[b]}] : 16'h0;
      rq_addr[b]   = mk_baddr(1'b0, 1'b0, {1'(b), chip[b][6:3]}, chip[b][2:0], chan[b], CMD_CHRDO);
      rq_valid[b]  = (st == S_RUN) && (wst[b] == W_ISSUE);
      want[b]      = (st == S_RUN) && (wst[b] == W_CHAN) && (rem[b] != 16'h0) && w_free;
    end
    gnt = want;
    if (&want) gnt = last_gnt ? 2'b01 : 2'b10;
  end

  assign alloc    = |gnt;
  assign alloc_br = gnt[1];
  assign busy     = (st != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st        <= S_IDLE;
      wst[0]    <= W_DONE;
      wst[1]    <= W_DONE;
      idx       <= '0;
      rem       <= '0;
      chan      <= '0;
      last_gnt  <= 1'b1;
      hdr_valid <= 1'b0;
      hdr_info  <= '0;
      ev_ready  <= 1'b0;
      ev_last   <= 1'b0;
      ev_read   <= 1'b0;
      n_chan    <= '0;
    end else begin
      logic [15:0] nc;
      nc       = n_chan;
      ev_ready <= 1'b0;
      ev_last  <= 1'b0;
      ev_read  <= 1'b0;
      case (st)
        S_IDLE: if (ev_valid && !ev_ready) begin
          hdr_info  <= ev_info;
          ev_ready  <= 1'b1;
          hdr_valid <= 1'b1;
          nc        = '0;
          st        <= S_HDR;
        end
        S_HDR: if (hdr_ready) begin
          hdr_valid <= 1'b0;
          idx       <= '0;
          wst[0]    <= W_CHIP;
          wst[1]    <= W_CHIP;
          st        <= S_RUN;
        end
        S_RUN: begin
          for (int b = 0; b < 2; b++) begin
            case (wst[b])
              W_CHIP:
                if (chip_mask[b] != 16'h0) begin
                  rem[b] <= chip_mask[b];
                  wst[b] <= W_CHAN;
                end else if (idx[b] == 7'h7F) wst[b] <= W_DONE;
                else idx[b] <= idx[b] + 1'b1;
              W_CHAN:
                if (rem[b] == 16'h0) begin
                  if (idx[b] == 7'h7F) wst[b] <= W_DONE;
                  else begin
                    idx[b] <= idx[b] + 1'b1;
                    wst[b] <= W_CHIP;
                  end
                end else if (gnt[b]) begin
                  chan[b]  <= first[b];
                  last_gnt <= 1'(b);
                  wst[b]   <= W_ISSUE;
                end
              W_ISSUE: if (rq_ready[b]) wst[b] <= W_WAIT;
              W_WAIT: if (rq_done[b]) begin
                rem[b][chan[b]] <= 1'b0;
                nc = nc + 1'b1;
                wst[b] <= W_CHAN;
              end
              default: ;
            endcase
          end
          if (wst[0] == W_DONE && wst[1] == W_DONE) st <= S_LAST;
        end
        S_LAST: begin
          ev_last <= 1'b1;
          st      <= S_FMT;
        end
        S_FMT: if (fmt_done) begin
          ev_read <= 1'b1;
          st      <= S_IDLE;
        end
        default: st <= S_IDLE;
      endcase
      n_chan <= nc;
    end
  end

  // a channel is only issued on a memory granted to it
  for (genvar b = 0; b < 2; b++) begin : g_chk
    a_issue_granted: assert property (@(posedge clk) disable iff (!rst_n)
                                      (wst[b] == W_CHAN && st == S_RUN && rem[b] != 0 && !w_free)
                                      |=> wst[b] != W_ISSUE);
  end

endmodule
