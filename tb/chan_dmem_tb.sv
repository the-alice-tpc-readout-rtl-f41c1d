// chan_dmem_tb: self-checking test of the two interleaved channel memories.
// Channels of various lengths (including an empty one and one longer than
// DEPTH) are allocated to the two branches and written by one process per
// branch with random gaps, so that both branches often write at the same
// time, while a reader with a random ready pattern drains the memories.
// Checks that every channel comes out whole, in allocation order, with
// r_last on its final word, that no third channel is allocated (w_free low)
// while both memories are in use, that both branches were writing in the
// same clock at least once, and that the overflow is counted.
module chan_dmem_tb;
  logic clk = 1'b0, rst_n = 1'b1;
  always #5 clk = ~clk;
  initial #1 rst_n = 1'b0;

  int checks = 0, failures = 0;
  task automatic check(input bit c, input string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", msg); end
  endtask

  localparam int DEPTH = 16;
  logic             alloc = 0, alloc_br = 0, w_free, r_valid, r_ready = 0, r_last, busy;
  logic [1:0]       w_valid = '0, w_end = '0;
  logic [1:0][39:0] w_data = '0;
  logic [39:0]      r_data;
  logic [15:0]      overflow;

  chan_dmem #(.DEPTH(DEPTH)) dut (.*);

  // expected stream: channel c, word k = {c, k}
  logic [39:0] exp_q [$];
  logic        exp_last [$];
  int          n_read = 0, n_last = 0, n_both = 0;
  bit          reading = 0;
  bit [1:0]    br_busy = '0;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reader
  always @(negedge clk) begin
    r_ready = reading && ($urandom_range(0, 3) != 0);
    if (rst_n && r_valid && r_ready) begin
      n_read++;
      if (exp_q.size() == 0) check(0, "unexpected word");
      else begin
        logic [39:0] e; logic l;
        e = exp_q.pop_front(); l = exp_last.pop_front();
        check(r_data == e, $sformatf("word %h expected %h", r_data, e));
        check(r_last == l, "r_last position");
        if (r_last) n_last++;
      end
    end
  end

  always @(posedge clk) if (&w_valid) n_both++;

  task automatic write_chan(input int b, input int c, input int len);
    for (int k = 0; k < len; k++) begin
      w_valid[b] = 1; w_data[b] = {8'(c), 32'(k)};
      @(negedge clk);
      w_valid[b] = 0;
      if ($urandom_range(0, 2) == 0) @(negedge clk);
    end
    w_end[b] = 1;
    @(negedge clk);
    w_end[b] = 0;
    br_busy[b] = 0;
  endtask

  // allocate the next memory to branch b, then let that branch write
  task automatic start_chan(input int b, input int c, input int len);
    while (!w_free || br_busy[b]) @(negedge clk);
    alloc = 1; alloc_br = 1'(b);
    br_busy[b] = 1;
    for (int k = 0; k < len && k < DEPTH; k++) begin
      exp_q.push_back({8'(c), 32'(k)});
      exp_last.push_back(k == ((len < DEPTH ? len : DEPTH) - 1));
    end
    @(negedge clk);
    alloc = 0;
    fork
      write_chan(b, c, len);
    join_none
  endtask

  initial begin
    int lens [10] = '{5, 3, 0, 16, 20, 1, 7, 12, 9, 4};
    int brs  [10] = '{0, 1, 0, 1, 1, 0, 1, 0, 0, 1};
    int nonempty;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(w_free && !busy, "free after reset");
    // fill both memories without reading, one channel per branch at once
    start_chan(0, 0, 4);
    start_chan(1, 1, 6);
    @(negedge clk);
    check(!w_free, "both memories in use: no allocation");
    while (br_busy != 0) @(negedge clk);
    repeat (2) @(negedge clk);
    check(!w_free && busy, "both memories full and held");
    reading = 1;
    // stream the rest while reading
    for (int c = 0; c < 10; c++) start_chan(brs[c], c + 2, lens[c]);
    while (br_busy != 0) @(negedge clk);
    repeat (200) @(negedge clk);
    nonempty = 2;
    foreach (lens[i]) if (lens[i] != 0) nonempty++;
    check(exp_q.size() == 0, $sformatf("all words read (%0d left)", exp_q.size()));
    check(n_last == nonempty, $sformatf("one r_last per channel (%0d)", n_last));
    check(overflow == 1, $sformatf("one overflowing channel (%0d)", overflow));
    check(n_both > 0, $sformatf("both branches wrote in the same clock (%0d)", n_both));
    check(!busy && w_free, "idle at the end");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
