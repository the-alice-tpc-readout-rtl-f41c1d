// ddl_formatter_tb: self-checking test of the DDL event framing.
// Sends three events (5, 4 and 0 ALTRO words, the last three words of the
// first arriving after ev_last is already known) with random SIU busy, and
// checks every output word: the 7 header words, the 40-bit words repacked
// LSB-first into 32-bit words with a zero-padded tail, and the trailer with
// the payload word count.
module ddl_formatter_tb;
  import rcu_pkg::*;
  logic clk = 1'b0, rst_n = 1'b1;
  always #5 clk = ~clk;
  initial #1 rst_n = 1'b0;

  int checks = 0, failures = 0;
  task automatic check(input bit c, input string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", msg); end
  endtask

  logic        hdr_valid = 0, hdr_ready, ev_last = 0, r_valid = 0, r_ready, dmem_busy = 0;
  logic        d_valid, d_ready = 0, fmt_done;
  logic [39:0] r_data = '0;
  logic [31:0] d_data;
  ev_info_t    hdr_info = '0;

  ddl_formatter dut (.*);

  logic [31:0] exp_q [$];
  int n_out = 0, n_done = 0;

  always @(negedge clk) begin
    d_ready = ($urandom_range(0, 3) != 0);
    if (rst_n && d_valid && d_ready) begin
      n_out++;
      if (exp_q.size() == 0) check(0, "unexpected output word");
      else begin
        logic [31:0] e;
        e = exp_q.pop_front();
        check(d_data == e, $sformatf("word %0d: %h expected %h", n_out, d_data, e));
      end
    end
    if (fmt_done) n_done++;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic event_run(input int nw, input int seed);
    ev_info_t    e;
    logic [39:0] w [];
    logic [1023:0] bits;
    int nbits, n32;
    e.evcnt = 24'(seed); e.l1_word = 10'(seed * 3); e.bcid = 12'(seed * 17);
    e.l2_payload = 32'(seed) * 32'h01010101; e.mode = TRG_L1L2;
    w = new[nw];
    bits = '0;
    for (int i = 0; i < nw; i++) begin
      w[i] = {8'(seed), 32'($urandom)};
      bits[i * 40 +: 40] = w[i];
    end
    nbits = nw * 40;
    n32 = (nbits + 31) / 32;
    // expected block
    exp_q.push_back(32'hFFFF_FFFF);
    exp_q.push_back({8'h01, e.l1_word, 2'b00, e.bcid});
    exp_q.push_back({8'h00, e.evcnt});
    exp_q.push_back({30'h0, 2'(e.mode)});
    exp_q.push_back(e.l2_payload);
    exp_q.push_back(32'h0);
    exp_q.push_back(32'h0);
    for (int i = 0; i < n32; i++) exp_q.push_back(bits[i * 32 +: 32]);
    exp_q.push_back({8'hA0, 24'(n32)});
    // drive
    @(negedge clk);
    hdr_valid = 1; hdr_info = e;
    dmem_busy = (nw != 0);
    while (!hdr_ready) @(negedge clk);
    @(negedge clk);
    hdr_valid = 0;
    for (int i = 0; i < nw; i++) begin
      r_valid = 1; r_data = w[i];
      if (i == 2) ev_last = 1;
      forever begin                      // taken at the next posedge if r_ready
        #1;
        if (r_ready) begin
          @(negedge clk);
          break;
        end
        @(negedge clk);
        ev_last = 0;
      end
      ev_last = 0;
      if (i == nw - 1) dmem_busy = 0;
    end
    r_valid = 0;
    if (nw < 3) begin ev_last = 1; @(negedge clk); ev_last = 0; end
    while (n_done == 0) @(negedge clk);
    n_done = 0;
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    event_run(5, 1);
    check(exp_q.size() == 0, "event 1 complete");
    event_run(4, 2);
    check(exp_q.size() == 0, "event 2 complete");
    event_run(0, 3);
    check(exp_q.size() == 0, "event 3 complete");
    check(n_out == (7 + 7 + 1) + (7 + 5 + 1) + (7 + 0 + 1), $sformatf("word count %0d", n_out));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
