// msm_tb: self-checking test of the Monitoring and Safety Module with two
// behavioural Board Controller branches (branch A cards 0-2, branch B card 4).
// Checks DCS-ordered FCB write and read, then raises a hard error on card A2
// and a soft error on card A1: the module must poll branch A on its
// interrupt, switch off card A2 only, report the error, count it, and leave
// branch B's lines idle during the poll.
module msm_tb;
  logic clk = 1'b0, rst_n = 1'b1;
  always #12.5 clk = ~clk;
  initial #1 rst_n = 1'b0;

  int checks = 0, failures = 0;
  task automatic check(input bit c, input string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", msg); end
  endtask

  logic        cmd_valid = 0, cmd_rw = 0, cmd_busy, cmd_done, cmd_nack, pwr_we = 0;
  logic [4:0]  cmd_fec = '0, last_fec;
  logic [7:0]  cmd_reg = '0;
  logic [15:0] cmd_wdata = '0, cmd_rdata, err_cnt, last_err, poll_cnt;
  logic [31:0] pwr_wdata = '0, pwr;
  logic [1:0]  intr_n, scl, sda_in, sda_out;

  msm dut (.*);
  bc_model #(.BRANCH(1'b0), .PRESENT(16'h0007)) bc0 (.clk, .scl(scl[0]), .sda_in(sda_in[0]), .sda_out(sda_out[0]), .intr_n(intr_n[0]));
  bc_model #(.BRANCH(1'b1), .PRESENT(16'h0010)) bc1 (.clk, .scl(scl[1]), .sda_in(sda_in[1]), .sda_out(sda_out[1]), .intr_n(intr_n[1]));

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int b1_activity = 0;
  bit watch_b1 = 0;
  always @(negedge clk) if (watch_b1 && (!scl[1] || !sda_in[1])) b1_activity++;

  task automatic cmd(input logic r, input logic [4:0] f, input logic [7:0] ra, input logic [15:0] d);
    @(negedge clk);
    cmd_valid = 1; cmd_rw = r; cmd_fec = f; cmd_reg = ra; cmd_wdata = d;
    @(negedge clk);
    cmd_valid = 0;
    while (!cmd_done) @(negedge clk);
  endtask

  initial begin
    int t0, t1;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check(pwr == 32'h0, "all cards off after reset");
    pwr_we = 1; pwr_wdata = 32'h0010_0007;
    @(negedge clk);
    pwr_we = 0;
    check(pwr == 32'h0010_0007, "power state written");

    cmd(1'b0, 5'd1, 8'h30, 16'h1234);
    check(!cmd_nack && bc0.regs[1][8'h30] == 16'h1234, "FCB write reached card A1");
    cmd(1'b1, 5'd20, 8'h05, 16'h0);
    check(!cmd_nack && cmd_rdata == 16'(4 * 256 + 5), $sformatf("FCB read from card B4: %h", cmd_rdata));
    check(bc0.n_frames == 1, "branch A saw only its own frame");

    // errors on branch A
    watch_b1 = 1;
    bc0.regs[2][8'h12] = 16'h0001;   // temperature over limit: hard
    bc0.regs[1][8'h12] = 16'h0100;   // soft
    t0 = $time;
    while (poll_cnt == 0) @(negedge clk);
    t1 = $time;
    repeat (5) @(negedge clk);
    check(pwr == 32'h0010_0003, $sformatf("card A2 switched off, others kept: %h", pwr));
    check(err_cnt == 1, "one hard error counted");
    check(bc0.n_err_reads == 3, $sformatf("all three powered cards polled (%0d)", bc0.n_err_reads));
    check(intr_n == 2'b11, "interrupt released");
    check(b1_activity == 0, "branch B undisturbed during the poll");
    check((t1 - t0) / 25 < 3 * 320 + 40, $sformatf("poll time %0d clocks", (t1 - t0) / 25));
    check(last_fec == 5'd2 || last_fec == 5'd1, "an error source reported");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
