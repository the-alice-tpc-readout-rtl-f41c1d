// ecn_if_tb: self-checking test of the RCU register map.
// Uses small memory stand-ins for the instruction/result memories and the
// channel list. Checks DCS writes and reads of each region and register,
// the command pulses, the FCB command fields, DDL writes, and that a DCS and
// a DDL request in the same cycle are both served, DCS first.
module ecn_if_tb;
  import rcu_pkg::*;
  logic clk = 1'b0, rst_n = 1'b1;
  always #5 clk = ~clk;
  initial #1 rst_n = 1'b0;

  int checks = 0, failures = 0;
  task automatic check(input bit c, input string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", msg); end
  endtask

  logic        dcs_req = 0, dcs_we = 0, dcs_ack, ddl_req = 0, ddl_ack;
  logic [15:0] dcs_addr = '0, ddl_addr = '0;
  logic [31:0] dcs_wdata = '0, ddl_wdata = '0, dcs_rdata;
  logic        im_we, acl_we, pwr_we, fcb_valid, fcb_rw, seq_start, sw_trg;
  logic [9:0]  im_addr;
  logic [31:0] im_wdata, im_rdata, rm_rdata, pwr_wdata, msm_stat, status;
  logic [7:0]  rm_addr, acl_addr, fcb_reg;
  logic [15:0] acl_wdata, acl_rdata, l2_delay, fcb_wdata, fcb_rdata;
  logic [4:0]  fcb_fec;
  trg_mode_e   trg_mode;
  logic [31:0] pwr = '0, auto_period;
  logic        ord_we, topo;
  logic [7:0]  ord_addr;
  logic [6:0]  ord_wdata;
  logic [6:0]  ord [256];
  int          n_ord = 0;
  logic        fcb_busy = 0, fcb_nack = 0;
  trg_cnt_t    trg_cnt;

  ecn_if dut (.*);

  // stand-ins
  logic [31:0] imem [1024];
  logic [15:0] acl [256];
  always @(posedge clk) begin
    if (im_we) imem[im_addr] <= im_wdata;
    im_rdata <= imem[im_addr];
    rm_rdata <= {24'hC0FFEE, rm_addr};
    if (acl_we) acl[acl_addr] <= acl_wdata;
    if (pwr_we) pwr <= pwr_wdata;
    if (ord_we) begin ord[ord_addr] <= ord_wdata; n_ord++; end
  end
  assign acl_rdata = acl[acl_addr];
  assign fcb_rdata = 16'h4321;
  assign msm_stat  = 32'h1357_9BDF;
  assign status    = 32'h2468_ACE0;
  assign trg_cnt   = '{l1: 16'd11, l2a: 16'd12, l2r: 16'd13, bc_mismatch: 16'd14, dropped: 16'd15};

  int n_start = 0, n_swtrg = 0, n_fcb = 0;
  logic [31:0] fcb_seen;
  always @(negedge clk) begin
    if (seq_start) n_start++;
    if (sw_trg) n_swtrg++;
    if (fcb_valid) begin n_fcb++; fcb_seen = {2'b00, fcb_rw, fcb_fec, fcb_reg, fcb_wdata}; end
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic dcs(input logic w, input logic [15:0] a, input logic [31:0] d, output logic [31:0] r);
    @(negedge clk);
    dcs_req = 1; dcs_we = w; dcs_addr = a; dcs_wdata = d;
    @(negedge clk);
    while (!dcs_ack) @(negedge clk);
    r = dcs_rdata;
    dcs_req = 0;
  endtask

  initial begin
    logic [31:0] r;
    repeat (3) @(negedge clk);
    rst_n = 1;
    dcs(1, 16'h0005, 32'hDEAD_BEEF, r);
    dcs(0, 16'h0005, 0, r);
    check(r == 32'hDEAD_BEEF, "instruction memory write/read");
    dcs(0, 16'h0407, 0, r);
    check(r == 32'hC0FF_EE07, "result memory read");
    dcs(1, 16'h0812, 32'h0000_F00F, r);
    dcs(0, 16'h0812, 0, r);
    check(r == 32'h0000_F00F && acl[8'h12] == 16'hF00F, "channel list write/read");
    dcs(1, A_TRG_MODE, 32'h2, r);
    check(trg_mode == TRG_L1L2, "trigger mode set");
    dcs(1, A_L2_DELAY, 32'h1234, r);
    dcs(0, A_L2_DELAY, 0, r);
    check(r == 32'h1234 && l2_delay == 16'h1234, "L2 delay");
    check(auto_period == 0, "automatic re-run off after reset");
    dcs(1, A_VERIFY, 32'd200_000_000, r);
    dcs(0, A_VERIFY, 0, r);
    check(r == 32'd200_000_000 && auto_period == 32'd200_000_000, "re-run period");
    dcs(1, A_ORD + 16'h0085, 32'h0000_0053, r);
    check(n_ord == 1 && ord[8'h85] == 7'h53, "order table write");
    check(!topo, "table order off after reset");
    dcs(1, A_RO_ORDER, 32'h1, r);
    dcs(0, A_RO_ORDER, 0, r);
    check(r == 32'h1 && topo, "table order on");
    dcs(1, A_PWR, 32'h0003_0001, r);
    dcs(0, A_PWR, 0, r);
    check(r == 32'h0003_0001, "power state");
    dcs(1, A_FCB_CMD, 32'h2A12_5678, r);
    check(n_fcb == 1 && fcb_seen == 32'h2A12_5678, $sformatf("FCB command fields %h", fcb_seen));
    dcs(0, A_FCB_RES, 0, r);
    check(r == 32'h0000_4321, "FCB result");
    dcs(0, A_MSM_STAT, 0, r);
    check(r == 32'h1357_9BDF, "monitor status");
    dcs(0, A_STATUS, 0, r);
    check(r == 32'h2468_ACE0, "status");
    dcs(0, A_CNT_L1 + 16'd4, 0, r);
    check(r == 32'd15, "dropped counter");
    dcs(1, A_CMD, 32'h1, r);
    dcs(1, A_CMD, 32'h2, r);
    check(n_start == 1 && n_swtrg == 1, "command pulses");

    // DDL and DCS together
    @(negedge clk);
    ddl_req = 1; ddl_addr = 16'h0009; ddl_wdata = 32'h0BAD_CAFE;
    dcs_req = 1; dcs_we = 1; dcs_addr = 16'h000A; dcs_wdata = 32'h1111_2222;
    @(negedge clk);
    check(dcs_ack && !ddl_ack, "DCS served first");
    dcs_req = 0;
    repeat (2) @(negedge clk);
    check(ddl_ack, "DDL served next");
    ddl_req = 0;
    @(negedge clk);
    check(imem[9] == 32'h0BAD_CAFE && imem[10] == 32'h1111_2222, "both writes done");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
