// readout_ctrl_tb: self-checking test of the per-event readout sequencing.
// The readout controller drives two ALTRO bus masters, each with a
// behavioural ALTRO branch, into the channel memories; a slow reader drains
// the memories. The channel list marks channels on present and absent
// cards, and the active card list excludes one present card. Checks that
// exactly the active channels of active cards are read, in list order within
// each branch, each with its full data, that the two branches transferred at
// the same time, that the event is handed to the formatter and released
// afterwards, and that the controller waited for a free memory (stall).
// A third event is read with the chip-order table loaded with a random
// permutation of each branch's chips and topo set: the channels must then
// come in that order.
module readout_ctrl_tb;
  import rcu_pkg::*;
  import tb_pkg::*;
  logic clk = 1'b0, rst_n = 1'b1;
  always #5 clk = ~clk;
  initial #1 rst_n = 1'b0;

  int checks = 0, failures = 0;
  task automatic check(input bit c, input string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", msg); end
  endtask

  localparam int MAXL = 12;

  logic        ev_valid = 0, ev_ready, ev_read, busy, acl_we = 0, hdr_valid, hdr_ready = 1, ev_last, fmt_done = 0;
  ev_info_t    ev_info = '0, hdr_info;
  logic [7:0]  acl_addr = '0;
  logic [15:0] acl_wdata = '0, acl_rdata, n_chan;
  logic [31:0] afl = '0;
  logic        ord_we = 0, topo = 0;
  logic [7:0]  ord_addr = '0;
  logic [6:0]  ord_wdata = '0;
  logic [6:0]  perm [2][128];
  logic [1:0]  rq_valid, rq_ready, rq_done;
  logic [1:0][19:0] rq_addr;
  logic        w_free, alloc, alloc_br;

  readout_ctrl dut (.*, .acl_raddr(acl_addr));

  // two branches
  logic [1:0]       m_done, m_done_tag, m_err, m_rdo_valid, m_rdo_end;
  logic [1:0][19:0] m_rdata;
  logic [1:0][39:0] m_rdo_data, bd_out, bd_in;
  logic [1:0][1:0]  bd_oe;
  logic [1:0]       cstb_n, write_n, ack_n, dstb_n, trsf_n;
  for (genvar b = 0; b < 2; b++) begin : g
    altro_bus_master u (
      .clk, .rst_n, .req_valid(rq_valid[b]), .req_ready(rq_ready[b]), .req_op(BOP_RDO),
      .req_tag(1'b0), .req_addr(rq_addr[b]), .req_data(20'h0),
      .done(m_done[b]), .done_tag(m_done_tag[b]), .rsp_data(m_rdata[b]), .rsp_err(m_err[b]),
      .rdo_valid(m_rdo_valid[b]), .rdo_data(m_rdo_data[b]), .rdo_end(m_rdo_end[b]),
      .bd_out(bd_out[b]), .bd_oe(bd_oe[b]), .bd_in(bd_in[b]), .cstb_n(cstb_n[b]), .write_n(write_n[b]),
      .ack_n(ack_n[b]), .dstb_n(dstb_n[b]), .trsf_n(trsf_n[b]));
    altro_model #(.BRANCH(1'(b)), .PRESENT(b == 0 ? 16'h0003 : 16'h0004), .MAX_LEN(MAXL)) mdl (
      .clk, .bd_rcu(bd_out[b]), .bd_oe(bd_oe[b]), .bd_in(bd_in[b]), .cstb_n(cstb_n[b]),
      .write_n(write_n[b]), .ack_n(ack_n[b]), .dstb_n(dstb_n[b]), .trsf_n(trsf_n[b]));
  end
  assign rq_done = m_done;

  logic        r_valid, r_ready, r_last, dbusy;
  logic [39:0] r_data;
  logic [15:0] ovf;
  chan_dmem #(.DEPTH(64)) mem (
    .clk, .rst_n, .alloc, .alloc_br, .w_valid(m_rdo_valid), .w_data(m_rdo_data),
    .w_end(m_rdo_end), .w_free, .r_valid, .r_ready, .r_data, .r_last, .busy(dbusy), .overflow(ovf));

  // slow reader; checks words against the expected channel order
  logic [11:0] exp_ch [2][$];
  logic [11:0] cur;
  int k = 0, n_ch = 0, stalls = 0, both = 0;
  bit last_seen = 0;
  always @(negedge clk) begin
    r_ready = ($urandom_range(0, 3) == 0);
    if (rst_n && r_valid && r_ready) begin
      if (k == 0) cur = r_data[39:28];
      if (exp_ch[cur[11]].size() == 0 || exp_ch[cur[11]][0] != cur)
        check(0, $sformatf("word of an unexpected channel %h", cur));
      else begin
        check(r_data == chan_word(cur, k), $sformatf("channel %h word %0d", cur, k));
        k++;
        if (r_last) begin
          check(k == int'(chan_len(cur, MAXL)), $sformatf("channel %h length %0d", cur, k));
          void'(exp_ch[cur[11]].pop_front());
          k = 0;
          n_ch++;
        end
      end
    end
    if (dut.st == dut.S_RUN && !w_free && (dut.wst[0] == dut.W_CHAN || dut.wst[1] == dut.W_CHAN)) stalls++;
    if (!trsf_n[0] && !trsf_n[1]) both++;
    if (ev_last) last_seen = 1;
    fmt_done = last_seen && !dbusy && !r_valid;
    if (fmt_done) last_seen = 0;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic ord_write(input logic [7:0] a, input logic [6:0] c);
    @(negedge clk);
    ord_we = 1; ord_addr = a; ord_wdata = c;
    @(negedge clk);
    ord_we = 0;
  endtask

  task automatic acl_write(input logic [7:0] a, input logic [15:0] m);
    @(negedge clk);
    acl_we = 1; acl_addr = a; acl_wdata = m;
    @(negedge clk);
    acl_we = 0;
  endtask

  initial begin
    logic [15:0] masks [256];
    int n_exp;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 256; i++) masks[i] = 16'h0;
    masks[{1'b0, 4'd0, 3'd0}] = 16'h8005;   // A card 0 chip 0: ch 0, 2, 15
    masks[{1'b0, 4'd0, 3'd5}] = 16'h0010;   // A card 0 chip 5: ch 4
    masks[{1'b0, 4'd1, 3'd2}] = 16'h0300;   // A card 1: excluded by the card list
    masks[{1'b1, 4'd2, 3'd7}] = 16'h0041;   // B card 2 chip 7: ch 0, 6
    masks[{1'b0, 4'd0, 3'd1}] = 16'h00F0;   // A card 0 chip 1: ch 4-7
    masks[{1'b1, 4'd2, 3'd0}] = 16'h0C00;   // B card 2 chip 0: ch 10, 11
    for (int i = 0; i < 256; i++) acl_write(8'(i), masks[i]);
    afl = 32'h0004_0001;                    // A0 and B2 active, A1 not
    @(negedge clk);
    acl_addr = 8'h05;
    #1 check(acl_rdata == 16'h0010, "channel list read back");
    // expected order
    for (int i = 0; i < 256; i++)
      if (afl[i >> 3])
        for (int c = 0; c < 16; c++)
          if (masks[i][c]) exp_ch[i >> 7].push_back({8'(i), 4'(c)});
    n_exp = exp_ch[0].size() + exp_ch[1].size();

    // random chip order per branch (Fisher-Yates), used from event 2 on
    for (int b = 0; b < 2; b++) begin
      for (int p = 0; p < 128; p++) perm[b][p] = 7'(p);
      for (int p = 127; p > 0; p--) begin
        int j;
        logic [6:0] t;
        j = $urandom_range(0, p);
        t = perm[b][p]; perm[b][p] = perm[b][j]; perm[b][j] = t;
      end
      for (int p = 0; p < 128; p++) ord_write({1'(b), 7'(p)}, perm[b][p]);
    end

    for (int ev = 0; ev < 3; ev++) begin
      @(negedge clk);
      ev_valid = 1; ev_info.evcnt = 24'(ev);
      @(negedge clk);
      #1;
      while (!ev_ready) begin @(negedge clk); #1; end
      @(negedge clk);
      ev_valid = 0;
      while (!ev_read) @(negedge clk);
      check(hdr_info.evcnt == 24'(ev), "header of this event");
      check(exp_ch[0].size() + exp_ch[1].size() == 0, $sformatf("event %0d: all channels read", ev));
      check(n_chan == 16'(n_exp), $sformatf("channel count %0d", n_chan));
      if (ev == 1) begin
        // next event in the table's order
        topo = 1;
        for (int b = 0; b < 2; b++)
          for (int p = 0; p < 128; p++) begin
            int i;
            i = {b[0], perm[b][p]};
            if (afl[i >> 3])
              for (int c = 0; c < 16; c++)
                if (masks[i][c]) exp_ch[b].push_back({8'(i), 4'(c)});
          end
      end else begin
        for (int i = 0; i < 256; i++)
          if (afl[i >> 3])
            for (int c = 0; c < 16; c++)
              if (masks[i][c]) exp_ch[i >> 7].push_back({8'(i), 4'(c)});
      end
    end
    check(both > 0, $sformatf("both branches transferred at once (%0d clocks)", both));
    check(n_ch == 3 * n_exp, "channel blocks delivered");
    check(stalls > 0, $sformatf("readout waited for a free memory (%0d)", stalls));
    check(g[0].mdl.n_rdo + g[1].mdl.n_rdo == 3 * n_exp, "no readout of inactive channels");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
