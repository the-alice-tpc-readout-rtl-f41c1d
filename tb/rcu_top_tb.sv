// rcu_top_tb: end-to-end test of the RCU logic at its full, default size.
//
// Around rcu_top (no parameter overrides) sit behavioural models of the two
// ALTRO bus branches (tb/altro_model: branch A cards 0 and 1, branch B card
// 0), of the Board Controllers on the two FCB branches (tb/bc_model), a DCS
// bus master, a TTC source, and a DDL SIU that collects the event stream and
// can hold it off. The test
//   * configures the RCU over the DCS bus (card power / active card list,
//     the whole active channel list, which has no reset value, including a
//     card that is not powered), reads back;
//   * reads out a software-triggered event and compares every DDL word with
//     the expected 7 headers, 40-to-32-bit packed channel data and trailer
//     (the two branches are read at once, so their channels may interleave;
//     within a branch the channel-list order must hold);
//   * loads and runs a sequencer program (write, read, broadcast, block write
//     and block verify of a pedestal memory, trigger macro) and checks the
//     cards and the result memory;
//   * switches to L1+L2 mode with configuration words sent over the DDL,
//     sends an L2 accept with the right bunch crossing, one with a wrong one
//     and an L2 reject;
//   * in L1 mode with the SIU stalled, fires more L1s than the FEC buffers
//     hold, sees busy, dropped triggers and the readout waiting for a free
//     channel memory, then drains and checks the eight events;
//   * runs an FCB read, then raises a hard error on a card: the interrupt
//     makes the RCU read the card's error register and switch it off, and
//     the next event no longer contains that card's channels;
//   * loads a chip-order table that reverses each branch and checks that the
//     next event's channels follow it;
//   * loads a verify-only program and lets the sequencer re-run it by itself:
//     an upset planted in a card's pedestal memory is corrected, and the
//     automatic run starts bus cycles only inside the LHC orbit gap.
// Each mechanism is counted; a mechanism that never happened is a failure.
module rcu_top_tb;
  import rcu_pkg::*;
  import tb_pkg::*;
  logic clk = 1'b0, rst_n = 1'b1;
  always #12.5 clk = ~clk;            // 40 MHz
  initial #1 rst_n = 1'b0;

  int checks = 0, failures = 0;
  task automatic check(input bit c, input string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // ---------------------------------------------------------------- DUT
  logic [1:0][39:0] bd_out, bd_in;
  logic [1:0][1:0]  bd_oe;
  logic [1:0]       cstb_n, write_n, ack_n, dstb_n, trsf_n;
  logic             altro_l1, altro_l2a, altro_l2r;
  logic [1:0]       fcb_scl, fcb_sda_in, fcb_sda_out, fcb_intr_n;
  logic             ttc_l1a = 0, ttc_bch_valid = 0, ttc_bc_rst = 0;
  logic [15:0]      ttc_bch_data = '0;
  logic             siu_dvalid, siu_dready = 0, siu_din_valid = 0, siu_din_busy;
  logic [31:0]      siu_data, siu_din = '0;
  logic             dcs_req = 0, dcs_we = 0, dcs_ack;
  logic [15:0]      dcs_addr = '0;
  logic [31:0]      dcs_wdata = '0, dcs_rdata;
  logic             busy;

  rcu_top dut (.*);

  altro_model #(.BRANCH(1'b0), .PRESENT(16'h0003)) alt_a (
    .clk, .bd_rcu(bd_out[0]), .bd_oe(bd_oe[0]), .bd_in(bd_in[0]), .cstb_n(cstb_n[0]),
    .write_n(write_n[0]), .ack_n(ack_n[0]), .dstb_n(dstb_n[0]), .trsf_n(trsf_n[0]));
  altro_model #(.BRANCH(1'b1), .PRESENT(16'h0001)) alt_b (
    .clk, .bd_rcu(bd_out[1]), .bd_oe(bd_oe[1]), .bd_in(bd_in[1]), .cstb_n(cstb_n[1]),
    .write_n(write_n[1]), .ack_n(ack_n[1]), .dstb_n(dstb_n[1]), .trsf_n(trsf_n[1]));
  bc_model #(.BRANCH(1'b0), .PRESENT(16'h0003)) bc_a (
    .clk, .scl(fcb_scl[0]), .sda_in(fcb_sda_in[0]), .sda_out(fcb_sda_out[0]), .intr_n(fcb_intr_n[0]));
  bc_model #(.BRANCH(1'b1), .PRESENT(16'h0001)) bc_b (
    .clk, .scl(fcb_scl[1]), .sda_in(fcb_sda_in[1]), .sda_out(fcb_sda_out[1]), .intr_n(fcb_intr_n[1]));

  // ---------------------------------------------------------------- mechanisms
  int m_sw_event = 0, m_l1l2_event = 0, m_l1_event = 0, m_bc_reject = 0, m_l2_reject = 0;
  int m_busy = 0, m_dropped = 0, m_mem_stall = 0, m_bcast = 0, m_verify = 0, m_trg_macro = 0;
  int m_concurrent = 0, m_scrub = 0, m_topo = 0, scrub_outside = 0, m_fcb_read = 0, m_pwr_off = 0, m_card_skipped = 0, m_ddl_config = 0, m_acl_skip = 0;
  int n_l1 = 0, n_l2a = 0, n_l2r = 0;
  always @(negedge clk) begin
    if (busy) m_busy++;
    if (dut.ro_busy && !dut.w_free) m_mem_stall++;
    if (!trsf_n[0] && !trsf_n[1]) m_concurrent++;
    if (dut.u_seq.auto_run && dut.u_seq.bq_valid && dut.u_seq.bq_ready && !dut.orbit_gap) scrub_outside++;
    if (altro_l1) n_l1++;
    if (altro_l2a) n_l2a++;
    if (altro_l2r) n_l2r++;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------------- DDL SIU
  typedef logic [31:0] wq_t [$];
  wq_t  events [$];
  logic [31:0] cur [$];
  bit   siu_stall = 0;
  always @(negedge clk) begin
    siu_dready = !siu_stall && ($urandom_range(0, 3) != 0);
    if (siu_dvalid && siu_dready) begin
      cur.push_back(siu_data);
      // the trailer carries the payload length
      if (cur.size() > 7 && siu_data[31:24] == 8'hA0 && 32'(siu_data[23:0]) == cur.size() - 8) begin
        events.push_back(cur);
        cur.delete();
      end
    end
  end

  // ---------------------------------------------------------------- bus tasks
  task automatic dcs_wr(input logic [15:0] a, input logic [31:0] d);
    @(negedge clk);
    dcs_req = 1; dcs_we = 1; dcs_addr = a; dcs_wdata = d;
    @(negedge clk);
    while (!dcs_ack) @(negedge clk);
    dcs_req = 0; dcs_we = 0;
  endtask

  task automatic dcs_rd(input logic [15:0] a, output logic [31:0] d);
    @(negedge clk);
    dcs_req = 1; dcs_we = 0; dcs_addr = a;
    @(negedge clk);
    while (!dcs_ack) @(negedge clk);
    d = dcs_rdata;
    dcs_req = 0;
  endtask

  task automatic ddl_send(input logic [31:0] w);
    @(negedge clk);
    while (siu_din_busy) @(negedge clk);
    siu_din_valid = 1; siu_din = w;
    @(negedge clk);
    siu_din_valid = 0;
  endtask

  task automatic bword(input logic [15:0] w);
    @(negedge clk);
    ttc_bch_valid = 1; ttc_bch_data = w;
    @(negedge clk);
    ttc_bch_valid = 0;
  endtask

  task automatic l1_pulse(output logic [11:0] bc);
    @(negedge clk);
    bc = dut.u_trg.bc;
    ttc_l1a = 1;
    @(negedge clk);
    ttc_l1a = 0;
  endtask

  // ---------------------------------------------------------------- expectation
  logic [15:0] acl_tb [256];
  logic [31:0] pwr_tb;
  logic [6:0]  ord_tb [256];
  bit          topo_tb = 0;

  function automatic wq_t expected(input ev_info_t e);
    wq_t q;
    logic [71:0] acc = '0;
    int          cnt = 0, n = 0;
    for (int i = 0; i < N_HDR; i++) q.push_back(ddl_header(e, i));
    for (int idx = 0; idx < 256; idx++)
      if (pwr_tb[idx >> 3])
        for (int c = 0; c < 16; c++)
          if (acl_tb[idx][c]) begin
            logic [11:0] hw;
            hw = {8'(idx), 4'(c)};
            for (int k = 0; k < int'(chan_len(hw, 20)); k++) begin
              acc = acc | (72'(chan_word(hw, k)) << cnt);
              cnt += 40;
              while (cnt >= 32) begin
                q.push_back(acc[31:0]);
                acc = acc >> 32;
                cnt -= 32;
                n++;
              end
            end
          end
    if (cnt > 0) begin q.push_back(acc[31:0]); n++; end
    q.push_back(ddl_trailer(24'(n)));
    return q;
  endfunction

  function automatic int n_active();
    int n = 0;
    for (int idx = 0; idx < 256; idx++)
      if (pwr_tb[idx >> 3]) n += $countones(acl_tb[idx]);
    return n;
  endfunction

  task automatic wait_event(output wq_t got);
    int t = 0;
    while (events.size() == 0 && t < 20000) begin @(negedge clk); t++; end
    if (events.size() == 0) begin check(0, "event did not arrive"); got = {}; end
    else got = events.pop_front();
  endtask

  // An event matches when its headers, length and trailer are as expected and
  // its payload, unpacked to 40-bit words, is the expected set of channels,
  // each whole and in channel-list order within its branch (the two branches
  // are read concurrently, so they may interleave); with the order table on,
  // the chips of a branch come in the table's order.
  function automatic bit same_event(input wq_t a, input ev_info_t e, input string what);
    wq_t b;
    logic [11:0] q [2][$];
    logic [39:0] w [$];
    logic [71:0] acc = '0;
    int cnt = 0, nw = 0, p = 0;
    b = expected(e);
    if (a.size() != b.size()) begin
      $display("%s: %0d words, expected %0d", what, a.size(), b.size());
      return 0;
    end
    for (int i = 0; i < N_HDR; i++)
      if (a[i] != b[i]) begin $display("%s: header %0d is %h, expected %h", what, i, a[i], b[i]); return 0; end
    if (a[a.size() - 1] != b[b.size() - 1]) begin $display("%s: trailer %h", what, a[a.size() - 1]); return 0; end
    for (int pos = 0; pos < 256; pos++) begin
      int idx;
      idx = topo_tb ? {pos[7], ord_tb[pos]} : pos;
      if (pwr_tb[idx >> 3])
        for (int c = 0; c < 16; c++)
          if (acl_tb[idx][c]) begin
            q[idx >> 7].push_back({8'(idx), 4'(c)});
            nw += int'(chan_len({8'(idx), 4'(c)}, 20));
          end
    end
    for (int i = N_HDR; i < a.size() - 1; i++) begin
      acc = acc | (72'(a[i]) << cnt);
      cnt += 32;
      while (cnt >= 40 && w.size() < nw) begin
        w.push_back(acc[39:0]);
        acc = acc >> 40;
        cnt -= 40;
      end
    end
    while (p < w.size()) begin
      logic [11:0] hw;
      hw = w[p][39:28];
      if (q[hw[11]].size() == 0 || q[hw[11]][0] != hw) begin
        $display("%s: channel %h out of order", what, hw);
        return 0;
      end
      void'(q[hw[11]].pop_front());
      for (int k = 0; k < int'(chan_len(hw, 20)); k++)
        if (p + k >= w.size() || w[p + k] != chan_word(hw, k)) begin
          $display("%s: channel %h word %0d wrong", what, hw, k);
          return 0;
        end
      p += int'(chan_len(hw, 20));
    end
    if (q[0].size() + q[1].size() != 0) begin $display("%s: channels missing", what); return 0; end
    return 1;
  endfunction


  // ---------------------------------------------------------------- the test
  initial begin
    logic [31:0] d;
    logic [11:0] bc, bcs [$];
    wq_t got;
    ev_info_t e;
    int evno = 0, rdo0;
    logic [19:0] wa, ba, pa, da, rb;
    logic [19:0] ped [4] = '{20'h00011, 20'h0F0F0, 20'h00ABC, 20'h00300};
    logic [31:0] prog [$];

    foreach (acl_tb[i]) acl_tb[i] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    ttc_bc_rst = 1; @(negedge clk); ttc_bc_rst = 0;

    // ---- configuration over the DCS bus
    pwr_tb = 32'h0001_0003;                 // A0, A1, B0 powered
    dcs_wr(A_PWR, pwr_tb);
    acl_tb[8'h00] = 16'h0005;               // A card 0 chip 0: channels 0, 2
    acl_tb[8'h0B] = 16'h8001;               // A card 1 chip 3: channels 0, 15
    acl_tb[8'h81] = 16'h0010;               // B card 0 chip 1: channel 4
    acl_tb[8'h80] = 16'h0300;               // B card 0 chip 0: channels 8, 9
    acl_tb[8'h10] = 16'hFFFF;               // A card 2: not powered
    foreach (acl_tb[i]) dcs_wr(A_ACL + 16'(i), {16'h0, acl_tb[i]});
    dcs_rd(A_ACL + 16'h0B, d);
    check(d == 32'h8001, "active channel list read back");
    dcs_rd(A_PWR, d);
    check(d == pwr_tb, "power register read back");
    dcs_rd(A_TRG_MODE, d);
    check(d == 32'(TRG_SW), "software trigger mode after reset");

    // ---- software-triggered event
    dcs_wr(A_CMD, 32'h2);
    wait_event(got);
    e = '{evcnt: 24'(evno), l1_word: '0, bcid: got.size() > 1 ? got[1][11:0] : '0,
          l2_payload: '0, mode: TRG_SW};
    if (same_event(got, e, "software event")) m_sw_event++;
    evno++;
    check(alt_a.n_rdo + alt_b.n_rdo == 32'(n_active()), "only active channels of powered cards read");
    if (alt_a.n_rdo + alt_b.n_rdo == 32'(n_active())) m_acl_skip++;

    // ---- sequencer program
    wa = mk_baddr(0, 0, 5'd0, 3'd1, 4'd0, 5'd3);
    ba = mk_baddr(1, 0, 5'd0, 3'd4, 4'd0, 5'd4);
    pa = mk_baddr(0, 0, 5'd0, 3'd2, 4'd0, 5'h06);
    da = mk_baddr(0, 0, 5'd0, 3'd2, 4'd0, 5'h07);
    rb = mk_baddr(0, 0, 5'd16, 3'd0, 4'd0, 5'd9);
    prog.push_back({OP_WR, 8'h0, wa});    prog.push_back(32'h12345);
    prog.push_back({OP_RD, 8'h0, wa});
    prog.push_back({OP_BCAST, 8'h0, ba}); prog.push_back(32'h00777);
    prog.push_back({OP_BLKWR, 8'h0, da}); prog.push_back({12'h0, pa}); prog.push_back({16'd4, 16'h20});
    foreach (ped[i]) prog.push_back({12'h0, ped[i]});
    prog.push_back({OP_BLKVF, 8'h0, da}); prog.push_back({12'h0, pa}); prog.push_back({16'd4, 16'h20});
    foreach (ped[i]) prog.push_back({12'h0, ped[i]});
    prog.push_back({OP_RD, 8'h0, rb});
    prog.push_back({OP_TRG, 28'h0});
    prog.push_back({OP_END, 28'h0});
    foreach (prog[i]) dcs_wr(A_IMEM + 16'(i), prog[i]);
    dcs_rd(A_IMEM + 16'd3, d);
    check(d == prog[3], "instruction memory read back");
    dcs_wr(A_CMD, 32'h1);
    do dcs_rd(A_STATUS, d); while (d[31]);
    check(!d[30], "sequencer finished without error");
    check(alt_a.regs[int'(wa[17:0])] == 20'h12345, "sequencer write reached the card");
    if (alt_a.n_bcast > 0 && alt_b.n_bcast > 0) m_bcast++;
    for (int i = 0; i < 4; i++)
      check(alt_a.pmem[int'(pa[17:0]) * 1024 + 32 + i] == ped[i], "pedestal memory loaded");
    dcs_rd(A_RMEM + 16'd0, d);
    check(d == 32'h12345, $sformatf("read result %h", d));
    dcs_rd(A_RMEM + 16'd1, d);
    check(d == 32'h0, "block verify without mismatch");
    if (d == 32'h0) m_verify++;
    dcs_rd(A_RMEM + 16'd2, d);
    check(d == {12'h0, reg_init(rb)}, "read on branch B");
    wait_event(got);
    e = '{evcnt: 24'(evno), l1_word: '0, bcid: got.size() > 1 ? got[1][11:0] : '0,
          l2_payload: '0, mode: TRG_SW};
    if (same_event(got, e, "trigger macro event")) m_trg_macro++;
    evno++;

    // ---- L1+L2 mode, configured over the DDL
    ddl_send({16'h0, A_L2_DELAY}); ddl_send(32'd40);
    ddl_send({16'h0, A_TRG_MODE}); ddl_send(32'(TRG_L1L2));
    repeat (4) @(negedge clk);
    dcs_rd(A_TRG_MODE, d);
    check(d == 32'(TRG_L1L2), "trigger mode set over the DDL");
    if (d == 32'(TRG_L1L2)) m_ddl_config++;
    dcs_rd(A_L2_DELAY, d);
    check(d == 32'd40, "L2 delay set over the DDL");

    l1_pulse(bc);
    bword({BCH_L1, 2'b00, 10'h2C3});
    repeat (20) @(negedge clk);
    bword({BCH_L2A, bc});
    bword(16'hBEEF);
    bword(16'h1234);
    wait_event(got);
    e = '{evcnt: 24'(evno), l1_word: 10'h2C3, bcid: bc, l2_payload: 32'hBEEF1234, mode: TRG_L1L2};
    if (same_event(got, e, "L1+L2 event")) m_l1l2_event++;
    evno++;

    l1_pulse(bc);
    bword({BCH_L2A, bc + 12'd5});
    bword(16'h1111);
    bword(16'h2222);
    l1_pulse(bc);
    bword({BCH_L2R, bc});
    repeat (200) @(negedge clk);
    check(events.size() == 0, "no event for rejected triggers");
    dcs_rd(A_CNT_L1 + 16'd3, d);
    if (d == 32'd1) m_bc_reject++;
    dcs_rd(A_CNT_L1 + 16'd2, d);
    check(d == 32'd2, $sformatf("two L2 rejects counted (%0d)", d));
    if (d == 32'd2 && n_l2r == 2) m_l2_reject++;

    // ---- L1 mode, FEC buffers filled while the SIU is busy
    dcs_wr(A_TRG_MODE, 32'(TRG_L1));
    dcs_wr(A_L2_DELAY, 32'd20);
    siu_stall = 1;
    for (int i = 0; i < 11; i++) begin
      l1_pulse(bc);
      bcs.push_back(bc);
      repeat (3) @(negedge clk);
    end
    repeat (300) @(negedge clk);
    check(busy, "busy with the FEC buffers full");
    dcs_rd(A_CNT_L1 + 16'd4, d);
    check(d == 32'd3, $sformatf("three L1 dropped (%0d)", d));
    if (d == 32'd3) m_dropped++;
    dcs_rd(A_STATUS, d);
    check(d[28] && d[29], "status shows busy and readout running");
    siu_stall = 0;
    for (int i = 0; i < 8; i++) begin
      wait_event(got);
      e = '{evcnt: 24'(evno), l1_word: '0, bcid: bcs[i], l2_payload: '0, mode: TRG_L1};
      if (same_event(got, e, $sformatf("L1 event %0d", i))) m_l1_event++;
      evno++;
    end
    repeat (50) @(negedge clk);
    check(!busy, "busy released after readout");
    dcs_rd(A_CNT_L1, d);
    check(d == 32'(n_l1) && n_l1 == 2 + 3 + 8, $sformatf("L1 count %0d / %0d", d, n_l1));
    dcs_rd(A_CNT_L1 + 16'd1, d);
    check(d == 32'(n_l2a) && n_l2a == 11, $sformatf("L2a count %0d / %0d", d, n_l2a));
    dcs_rd(A_STATUS, d);
    check(d[15:0] == 16'(evno), "event counter in the status word");

    // ---- FCB read ordered by the DCS
    dcs_wr(A_FCB_CMD, {2'b00, 1'b1, 5'd1, 8'h05, 16'h0});
    do dcs_rd(A_FCB_RES, d); while (d[31]);
    check(d == 32'h0000_0105, $sformatf("FCB read result %h", d));
    if (d == 32'h0000_0105) m_fcb_read++;

    // ---- hard error on card A1: interrupt, error register read, power off
    bc_a.regs[1][8'h12] = 16'h0004;
    begin
      int t = 0;
      do begin dcs_rd(A_PWR, d); t++; end while (d[1] && t < 2000);
    end
    check(d == 32'h0001_0001, $sformatf("card A1 switched off (%h)", d));
    if (d == 32'h0001_0001) m_pwr_off++;
    check(bc_a.n_err_reads > 0 && fcb_intr_n[0], "error register read, interrupt cleared");
    dcs_rd(A_MSM_STAT, d);
    check(d[28:24] == 5'd1 && d[23:16] == 8'd1 && d[15:0] == 16'h0004,
          $sformatf("monitoring status %h", d));
    pwr_tb = 32'h0001_0001;

    // ---- next event without the card that was switched off
    dcs_wr(A_TRG_MODE, 32'(TRG_SW));
    rdo0 = alt_a.n_rdo + alt_b.n_rdo;
    dcs_wr(A_CMD, 32'h2);
    wait_event(got);
    e = '{evcnt: 24'(evno), l1_word: '0, bcid: got.size() > 1 ? got[1][11:0] : '0,
          l2_payload: '0, mode: TRG_SW};
    if (same_event(got, e, "event after power-off") &&
        alt_a.n_rdo + alt_b.n_rdo - rdo0 == 32'(n_active())) m_card_skipped++;
    evno++;
    repeat (50) @(negedge clk);
    check(events.size() == 0 && cur.size() == 0, "no stray DDL words");

    // ---- readout order from the order table: each branch's chips reversed
    for (int i = 0; i < 256; i++) begin
      ord_tb[i] = 7'(127 - (i % 128));
      dcs_wr(A_ORD + 16'(i), 32'(ord_tb[i]));
    end
    dcs_wr(A_RO_ORDER, 32'h1);
    topo_tb = 1;
    dcs_wr(A_CMD, 32'h2);
    wait_event(got);
    e = '{evcnt: 24'(evno), l1_word: '0, bcid: got.size() > 1 ? got[1][11:0] : '0,
          l2_payload: '0, mode: TRG_SW};
    if (same_event(got, e, "event in table order")) m_topo++;
    evno++;
    dcs_wr(A_RO_ORDER, 32'h0);
    topo_tb = 0;

    // ---- periodic verify and correct in the orbit gap
    prog.delete();
    prog.push_back({OP_BLKVF, 8'h0, da}); prog.push_back({12'h0, pa}); prog.push_back({16'd4, 16'h20});
    foreach (ped[i]) prog.push_back({12'h0, ped[i]});
    prog.push_back({OP_END, 28'h0});
    foreach (prog[i]) dcs_wr(A_IMEM + 16'(i), prog[i]);
    alt_a.pmem[int'(pa[17:0]) * 1024 + 32 + 2] = 20'h00055;
    dcs_wr(A_VERIFY, 32'd5000);
    dcs_rd(A_VERIFY, d);
    check(d == 32'd5000, "verify period read back");
    do dcs_rd(A_STATUS, d); while (d[26:24] == 3'd0);
    do dcs_rd(A_STATUS, d); while (d[31]);
    dcs_wr(A_VERIFY, 32'd0);
    dcs_rd(A_RMEM, d);
    check(d == 32'd1, $sformatf("automatic verify found the upset (%0d)", d));
    check(alt_a.pmem[int'(pa[17:0]) * 1024 + 32 + 2] == ped[2], "upset corrected");
    check(scrub_outside == 0, "automatic run used the bus only in the orbit gap");
    if (d == 32'd1 && alt_a.pmem[int'(pa[17:0]) * 1024 + 32 + 2] == ped[2] && scrub_outside == 0) m_scrub++;

    // ---- every mechanism seen
    check(m_sw_event > 0,     "mechanism: software trigger readout");
    check(m_acl_skip > 0,     "mechanism: channel / card selection");
    check(m_bcast > 0,        "mechanism: broadcast on both branches");
    check(m_verify > 0,       "mechanism: block verify macro");
    check(m_trg_macro > 0,    "mechanism: trigger macro");
    check(m_ddl_config > 0,   "mechanism: configuration over the DDL");
    check(m_l1l2_event > 0,   "mechanism: L1+L2 readout");
    check(m_bc_reject > 0,    "mechanism: bunch-crossing mismatch reject");
    check(m_l2_reject > 0,    "mechanism: L2 reject");
    check(m_concurrent > 0,   "mechanism: both branches transferring at once");
    check(m_topo > 0,         "mechanism: readout in table order");
    check(m_scrub > 0,        "mechanism: verify and correct in the orbit gap");
    check(m_busy > 0,         "mechanism: busy / dead time");
    check(m_dropped > 0,      "mechanism: dropped L1 while busy");
    check(m_mem_stall > 0,    "mechanism: readout waits for a free channel memory");
    check(m_l1_event == 8,    "mechanism: L1-only readout of eight buffered events");
    check(m_fcb_read > 0,     "mechanism: FCB transaction");
    check(m_pwr_off > 0,      "mechanism: interrupt-driven power-off");
    check(m_card_skipped > 0, "mechanism: powered-off card left out of the readout");
    $display("mechanisms: sw=%0d sel=%0d bcast=%0d verify=%0d trg_macro=%0d ddl_cfg=%0d l1l2=%0d",
             m_sw_event, m_acl_skip, m_bcast, m_verify, m_trg_macro, m_ddl_config, m_l1l2_event);
    $display("  concurrent=%0d scrub=%0d topo=%0d", m_concurrent, m_scrub, m_topo);
    $display("  bc_reject=%0d l2_reject=%0d busy=%0d dropped=%0d mem_stall=%0d l1=%0d fcb=%0d pwr_off=%0d skip=%0d",
             m_bc_reject, m_l2_reject, m_busy, m_dropped, m_mem_stall, m_l1_event, m_fcb_read,
             m_pwr_off, m_card_skipped);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
