// ddl_rx_tb: self-checking test of the DDL receive path.
// Sends 20 (address, data) pairs, sometimes back to back, while the register
// side acknowledges after a random delay, and checks that exactly these
// writes come out, in order, and that din_busy holds the sender while a
// write is waiting.
module ddl_rx_tb;
  logic clk = 1'b0, rst_n = 1'b1;
  always #5 clk = ~clk;
  initial #1 rst_n = 1'b0;

  int checks = 0, failures = 0;
  task automatic check(input bit c, input string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", msg); end
  endtask

  logic        din_valid = 0, din_busy, wr_req, wr_ack = 0;
  logic [31:0] din = '0, wr_data;
  logic [15:0] wr_addr, n_writes;

  ddl_rx dut (.*);

  logic [47:0] exp_q [$];
  int n_seen = 0, busy_seen = 0;

  // register side: acknowledge after 0-3 clocks
  int wait_n = -1;
  always @(negedge clk) begin
    wr_ack = 0;
    if (rst_n && wr_req) begin
      if (wait_n < 0) wait_n = $urandom_range(0, 3);
      if (wait_n == 0) begin
        wr_ack = 1;
        n_seen++;
        if (exp_q.size() == 0) check(0, "unexpected write");
        else begin
          logic [47:0] e;
          e = exp_q.pop_front();
          check({wr_addr, wr_data} == e, $sformatf("write %h:%h expected %h", wr_addr, wr_data, e));
        end
        wait_n = -1;
      end else wait_n--;
    end
    if (din_busy) busy_seen++;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic send(input logic [31:0] w);
    @(negedge clk);
    #1;
    while (din_busy) begin @(negedge clk); #1; end
    din_valid = 1; din = w;
    @(negedge clk);
    din_valid = 0;
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 20; i++) begin
      logic [15:0] a;
      logic [31:0] d;
      a = 16'($urandom); d = $urandom;
      exp_q.push_back({a, d});
      send({16'h0, a});
      send(d);
      if ($urandom_range(0, 1) == 0) repeat ($urandom_range(1, 4)) @(negedge clk);
    end
    repeat (20) @(negedge clk);
    check(exp_q.size() == 0 && n_seen == 20, $sformatf("all 20 writes seen (%0d)", n_seen));
    check(n_writes == 20, "write counter");
    check(busy_seen > 0, "busy was used");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
