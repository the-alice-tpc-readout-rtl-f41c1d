// altro_bus_master_tb: self-checking test of one ALTRO bus branch master
// against the behavioural ALTRO model (cards 0 and 2 present).
// Checks write, read-back, read of an untouched register, a read of a missing
// card (ACK timeout), a broadcast write (no ACK, all cards updated), the
// channel readout block (every word and the word count, with DSTB pauses),
// the CSTB/ACK order and that a read leaves BD[19:0] to the ALTRO.
module altro_bus_master_tb;
  import rcu_pkg::*;
  import tb_pkg::*;

  logic clk = 1'b0, rst_n = 1'b1;
  initial #1 rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit c, input string msg);
    checks++;
    if (!c) begin
      failures++;
      $display("FAIL: %s", msg);
    end
  endtask

  logic        req_valid = 1'b0, req_ready, req_tag = 1'b0;
  bus_op_e     req_op = BOP_WR;
  logic [19:0] req_addr = '0, req_data = '0, rsp_data;
  logic        done, done_tag, rsp_err, rdo_valid, rdo_end;
  logic [39:0] rdo_data, bd_out, bd_in;
  logic [1:0]  bd_oe;
  logic        cstb_n, write_n, ack_n, dstb_n, trsf_n;

  altro_bus_master #(.ACK_TIMEOUT(32), .TRSF_TIMEOUT(64)) dut (.*);
  altro_model #(.BRANCH(1'b0), .PRESENT(16'h0005), .ACK_DLY(2), .MAX_LEN(20), .GAP(3)) m (
    .clk, .bd_rcu(bd_out), .bd_oe, .bd_in, .cstb_n, .write_n, .ack_n, .dstb_n, .trsf_n);

  // protocol monitors
  int bad_oe = 0, early_release = 0;
  logic cstb_q = 1'b1, acked = 1'b0;
  always @(negedge clk) begin
    cstb_q <= cstb_n;
    if (!cstb_n && !write_n) ; else if (!cstb_n && bd_oe[0]) bad_oe++;
    if (!ack_n) acked <= 1'b1;
    if (cstb_n && !cstb_q && !(acked || !ack_n) && !rsp_err_pending) early_release++;
    if (cstb_n && cstb_q && ack_n) acked <= 1'b0;
  end
  logic rsp_err_pending = 1'b0;   // set while a timeout or broadcast is expected

  // readout capture
  logic [39:0] got [$];
  int ends = 0;
  always @(posedge clk) begin
    if (rdo_valid) got.push_back(rdo_data);
    if (rdo_end) ends++;
  end

  task automatic op(input bus_op_e o, input logic [19:0] a, input logic [19:0] d,
                    output logic [19:0] r, output logic e, output int cyc);
    int t0;
    @(posedge clk);
    req_valid <= 1'b1; req_op <= o; req_addr <= a; req_data <= d; req_tag <= 1'b1;
    do @(posedge clk); while (!req_ready);
    req_valid <= 1'b0;
    t0 = $time;
    do @(posedge clk); while (!done);
    r = rsp_data; e = rsp_err; cyc = ($time - t0) / 10;
    check(done_tag == 1'b1, "tag returned");
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [19:0] r, a;
    logic e;
    int cyc, len;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    repeat (2) @(posedge clk);

    // write then read back, card 0 chip 1 register 3
    a = mk_baddr(1'b0, 1'b0, 5'd0, 3'd1, 4'd0, 5'd3);
    op(BOP_WR, a, 20'hABCDE, r, e, cyc);
    check(!e, "write acknowledged");
    check(m.regs.exists(int'(a[17:0])) && m.regs[int'(a[17:0])] == 20'hABCDE, "model holds written value");
    check(cyc <= 12, $sformatf("write cycle short (%0d clocks)", cyc));
    op(BOP_RD, a, 20'h0, r, e, cyc);
    check(!e && r == 20'hABCDE, $sformatf("read back %h", r));

    // untouched register
    a = mk_baddr(1'b0, 1'b0, 5'd2, 3'd4, 4'd0, 5'd9);
    op(BOP_RD, a, 20'h0, r, e, cyc);
    check(!e && r == reg_init(a), "read of default register");

    // missing card: timeout
    rsp_err_pending = 1'b1;
    a = mk_baddr(1'b0, 1'b0, 5'd1, 3'd0, 4'd0, 5'd3);
    op(BOP_WR, a, 20'h1, r, e, cyc);
    check(e, "missing card gives an error");
    check(cyc >= 32, "error only after the timeout");

    // broadcast: no ACK expected, both present cards take it
    a = mk_baddr(1'b1, 1'b0, 5'd0, 3'd2, 4'd0, 5'd4);
    op(BOP_BCAST, a, 20'h5A5A5, r, e, cyc);
    check(!e, "broadcast ends without error");
    check(m.n_bcast == 1, $sformatf("broadcast seen once (%0d)", m.n_bcast));
    check(m.regs.exists(int'({2'b0, 4'd2, 3'd2, 4'd0, 5'd4})) &&
          m.regs[int'({2'b0, 4'd2, 3'd2, 4'd0, 5'd4})] == 20'h5A5A5, "card 2 took broadcast");
    rsp_err_pending = 1'b0;

    // channel readout, card 2 chip 3 channel 5
    a = mk_baddr(1'b0, 1'b0, 5'd2, 3'd3, 4'd5, CMD_CHRDO);
    got.delete();
    op(BOP_RDO, a, 20'h0, r, e, cyc);
    len = int'(chan_len(a[16:5], 20));
    check(!e, "readout without error");
    check(got.size() == len, $sformatf("readout length %0d expected %0d", got.size(), len));
    for (int k = 0; k < len && k < got.size(); k++)
      check(got[k] == chan_word(a[16:5], k), $sformatf("readout word %0d", k));
    check(ends == 1, $sformatf("one end of block (%0d)", ends));

    // readout of a missing card: TRSF timeout
    rsp_err_pending = 1'b1;
    a = mk_baddr(1'b0, 1'b0, 5'd3, 3'd0, 4'd0, CMD_CHRDO);
    op(BOP_RDO, a, 20'h0, r, e, cyc);
    check(e, "readout of missing card gives error");
    rsp_err_pending = 1'b0;

    check(bad_oe == 0, "read leaves BD[19:0] undriven");
    check(early_release == 0, "CSTB released only after ACK");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
