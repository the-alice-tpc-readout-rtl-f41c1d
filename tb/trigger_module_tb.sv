// trigger_module_tb: self-checking test of the trigger module in its three
// modes. Software mode and L1 mode: the L2 accept must follow the L1 after
// the programmed window, with the bunch crossing of the L1. L1+L2 mode: an
// L2 accept message with the right bunch crossing gives an event carrying
// the L1 word and L2 payload, a wrong bunch crossing or an L2 reject gives
// l2r. Then 10 L1s without readout: 8 are held (the FEC buffer depth), busy
// rises and 2 are dropped; reading events out clears busy.
module trigger_module_tb;
  import rcu_pkg::*;
  logic clk = 1'b0, rst_n = 1'b1;
  always #5 clk = ~clk;
  initial #1 rst_n = 1'b0;

  int checks = 0, failures = 0;
  task automatic check(input bit c, input string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", msg); end
  endtask

  trg_mode_e   mode = TRG_SW;
  logic [15:0] l2_delay = 16'd10, bch_data = '0;
  logic        sw_trg = 0, l1_a = 0, bch_valid = 0, bc_rst = 0, ev_ready = 0, ev_read = 0;
  logic        l1_out, l2a_out, l2r_out, ev_valid, busy;
  ev_info_t    ev_info;
  trg_cnt_t    cnt;
  logic [23:0] evcnt;

  trigger_module dut (.*);

  // reference bunch counter
  int bc_ref = 0, gap_err = 0, gap_n = 0;
  bit gap_on = 0;
  logic orbit_gap;
  always @(negedge clk) if (rst_n) bc_ref = bc_rst ? 0 : (bc_ref == 3563 ? 0 : bc_ref + 1);
  // the orbit gap: the last 119 bunch slots of the orbit
  always @(negedge clk) if (gap_on) begin
    if (orbit_gap != (bc_ref >= 3445)) gap_err++;
    if (orbit_gap) gap_n++;
  end

  int n_l1 = 0, n_l2a = 0, n_l2r = 0, t_l1 = 0, t_l2a = 0;
  always @(negedge clk) begin
    if (l1_out)  begin n_l1++;  t_l1 = $time; end
    if (l2a_out) begin n_l2a++; t_l2a = $time; end
    if (l2r_out) n_l2r++;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic pulse_l1(output int bc_at);
    @(negedge clk);
    bc_at = bc_ref;
    if (mode == TRG_SW) sw_trg = 1; else l1_a = 1;
    @(negedge clk);
    sw_trg = 0; l1_a = 0;
  endtask

  task automatic bword(input logic [15:0] w);
    @(negedge clk);
    bch_valid = 1; bch_data = w;
    @(negedge clk);
    bch_valid = 0;
  endtask

  task automatic pop(output ev_info_t e);
    while (!ev_valid) @(negedge clk);
    e = ev_info;
    ev_ready = 1;
    @(negedge clk);
    ev_ready = 0;
  endtask

  initial begin
    int bc0;
    ev_info_t e;
    repeat (3) @(negedge clk);
    rst_n = 1;
    bc_rst = 1;
    @(negedge clk);
    bc_rst = 0;
    gap_on = 1;
    repeat (7) @(negedge clk);

    // software trigger
    pulse_l1(bc0);
    repeat (20) @(negedge clk);
    check(n_l1 == 1 && n_l2a == 1, "software trigger gives L1 and L2a");
    check((t_l2a - t_l1) / 10 >= 10 && (t_l2a - t_l1) / 10 <= 12,
          $sformatf("L2 after the window (%0d clocks)", (t_l2a - t_l1) / 10));
    pop(e);
    check(e.bcid == 12'(bc0), $sformatf("bunch crossing %0d expected %0d", e.bcid, bc0));
    check(e.evcnt == 0 && e.mode == TRG_SW, "event number and mode");
    ev_read = 1; @(negedge clk); ev_read = 0;

    // TTC L1 in software mode is ignored
    @(negedge clk); l1_a = 1; @(negedge clk); l1_a = 0;
    repeat (3) @(negedge clk);
    check(n_l1 == 1, "TTC L1 ignored in software mode");

    // L1 + L2 mode
    mode = TRG_L1L2;
    pulse_l1(bc0);
    bword({BCH_L1, 2'b00, 10'h3A5});
    repeat (5) @(negedge clk);
    bword({BCH_L2A, 12'(bc0)});
    bword(16'hAAAA);
    bword(16'h5555);
    pop(e);
    check(e.l1_word == 10'h3A5 && e.l2_payload == 32'hAAAA5555 && e.bcid == 12'(bc0),
          "L2 accept event content");
    check(n_l2a == 2, "L2a issued");
    ev_read = 1; @(negedge clk); ev_read = 0;

    // wrong bunch crossing
    pulse_l1(bc0);
    bword({BCH_L2A, 12'(bc0 + 7)});
    bword(16'h1111);
    bword(16'h2222);
    repeat (3) @(negedge clk);
    check(n_l2r == 1 && cnt.bc_mismatch == 1 && !ev_valid, "mismatch turned into L2 reject");

    // explicit reject
    pulse_l1(bc0);
    bword({BCH_L2R, 12'(bc0)});
    repeat (3) @(negedge clk);
    check(n_l2r == 2 && !ev_valid, "L2 reject");

    // fill the FEC buffers in L1 mode
    mode = TRG_L1;
    l2_delay = 16'd3;
    for (int i = 0; i < 10; i++) begin
      pulse_l1(bc0);
      @(negedge clk);
    end
    repeat (10) @(negedge clk);
    check(busy, "busy with 8 events held");
    check(cnt.dropped == 2, $sformatf("two L1 dropped (%0d)", cnt.dropped));
    check(n_l2a == 10, $sformatf("8 more events accepted (%0d)", n_l2a));
    for (int i = 0; i < 8; i++) begin
      pop(e);
      ev_read = 1; @(negedge clk); ev_read = 0;
    end
    @(negedge clk);
    check(!busy && !ev_valid, "buffers free after readout");
    check(evcnt == 10, "event counter");
    while (gap_n < 200) @(negedge clk);
    check(gap_err == 0 && gap_n >= 200, $sformatf("orbit gap flag (%0d wrong)", gap_err));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
