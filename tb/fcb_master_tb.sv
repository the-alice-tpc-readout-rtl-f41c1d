// fcb_master_tb: self-checking test of the Front-end Control Bus master
// against the behavioural Board Controller model (cards 3 and 9 of branch 0).
// Checks a write (value stored by the card), a read back, a read of another
// register, a transaction to an absent card (nack), and that one transaction
// takes 38 bit periods of CLK_DIV clocks (7.6 us at 40 MHz with the default).
module fcb_master_tb;
  logic clk = 1'b0, rst_n = 1'b1;
  always #12.5 clk = ~clk;          // 40 MHz
  initial #1 rst_n = 1'b0;

  int checks = 0, failures = 0;
  task automatic check(input bit c, input string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", msg); end
  endtask

  logic        start = 0, rw = 0, busy, done, nack, scl, sda_in, sda_out, intr_n;
  logic [6:0]  fec_addr = '0;
  logic [7:0]  reg_addr = '0;
  logic [15:0] wdata = '0, rdata;

  fcb_master dut (.*);
  bc_model #(.BRANCH(1'b0), .PRESENT(16'h0208)) bc (.clk, .scl, .sda_in, .sda_out, .intr_n);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic xfer(input logic r, input logic [3:0] card, input logic [7:0] ra,
                      input logic [15:0] d, output int cyc);
    int n;
    @(negedge clk);
    start = 1; rw = r; fec_addr = {2'b00, 1'b0, card}; reg_addr = ra; wdata = d;
    @(negedge clk);
    start = 0;
    n = 1;
    while (!done) begin @(negedge clk); n++; end
    cyc = n;
  endtask

  initial begin
    int cyc;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check(scl && sda_in, "lines idle high");

    xfer(1'b0, 4'd3, 8'h20, 16'hBEEF, cyc);
    check(!nack, "write acknowledged");
    check(bc.regs[3][8'h20] == 16'hBEEF, "card stored the value");
    check(cyc == 38 * 8 + 1, $sformatf("transaction length %0d clocks", cyc));
    check(bc.n_frames == 1, "one frame seen by the card");

    xfer(1'b1, 4'd3, 8'h20, 16'h0, cyc);
    check(!nack && rdata == 16'hBEEF, $sformatf("read back %h", rdata));

    xfer(1'b1, 4'd9, 8'h41, 16'h0, cyc);
    check(!nack && rdata == 16'(9 * 256 + 8'h41), $sformatf("read register %h", rdata));

    xfer(1'b1, 4'd5, 8'h41, 16'h0, cyc);
    check(nack, "absent card not acknowledged");
    check(bc.n_frames == 3, "absent card frame ignored");
    check(scl && sda_in && !busy, "idle again");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
