// instr_sequencer_tb: self-checking test of the instruction memory and
// sequencer, driving two ALTRO bus masters with behavioural ALTRO branches.
// The program uses every instruction: write, read, broadcast, block write of
// a pedestal-like memory through a pointer and a data register, block verify
// (once matching, once with one wrong value, which is then corrected), a read
// of a missing card, the trigger macro and a wait. Checks the bus effects in the models, the result
// memory, the error flag and that the trigger macro waits for trg_done.
// Then a verify-only program is left to run by itself every auto_period
// clocks with the bus gated to a window (standing in for the orbit gap): a
// word corrupted in the card is found and corrected by the first automatic
// run, the second finds nothing, and no bus cycle starts outside the window.
module instr_sequencer_tb;
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

  logic        im_we = 0, start = 0, busy, err, bq_valid, bq_ready, bq_branch, bq_done, bq_err;
  logic        sw_trg, trg_done = 0, gate = 1;
  logic [31:0] auto_period = '0;
  logic [15:0] n_auto;
  logic [9:0]  im_addr = '0;
  logic [31:0] im_wdata = '0, im_rdata, rm_rdata;
  logic [7:0]  rm_addr = '0;
  logic [8:0]  n_results;
  bus_op_e     bq_op;
  logic [19:0] bq_addr, bq_data, bq_rdata;

  instr_sequencer dut (.*);

  logic [1:0]       m_valid, m_ready, m_done, m_done_tag, m_err, m_rdo_valid, m_rdo_end;
  logic [1:0][19:0] m_rdata;
  logic [1:0][39:0] m_rdo_data, bd_out, bd_in;
  logic [1:0][1:0]  bd_oe;
  logic [1:0]       cstb_n, write_n, ack_n, dstb_n, trsf_n;
  for (genvar b = 0; b < 2; b++) begin : g
    assign m_valid[b] = bq_valid && bq_branch == 1'(b);
    altro_bus_master #(.ACK_TIMEOUT(16)) u (
      .clk, .rst_n, .req_valid(m_valid[b]), .req_ready(m_ready[b]), .req_op(bq_op),
      .req_tag(1'b1), .req_addr(bq_addr), .req_data(bq_data),
      .done(m_done[b]), .done_tag(m_done_tag[b]), .rsp_data(m_rdata[b]), .rsp_err(m_err[b]),
      .rdo_valid(m_rdo_valid[b]), .rdo_data(m_rdo_data[b]), .rdo_end(m_rdo_end[b]),
      .bd_out(bd_out[b]), .bd_oe(bd_oe[b]), .bd_in(bd_in[b]), .cstb_n(cstb_n[b]), .write_n(write_n[b]),
      .ack_n(ack_n[b]), .dstb_n(dstb_n[b]), .trsf_n(trsf_n[b]));
    altro_model #(.BRANCH(1'(b)), .PRESENT(16'h0001)) mdl (
      .clk, .bd_rcu(bd_out[b]), .bd_oe(bd_oe[b]), .bd_in(bd_in[b]), .cstb_n(cstb_n[b]),
      .write_n(write_n[b]), .ack_n(ack_n[b]), .dstb_n(dstb_n[b]), .trsf_n(trsf_n[b]));
  end
  assign bq_ready = m_ready[bq_branch];
  assign bq_done  = m_done[bq_branch];
  assign bq_rdata = m_rdata[bq_branch];
  assign bq_err   = m_err[bq_branch];

  // trigger side: answer a software trigger after 30 clocks
  int n_trg = 0, trg_wait = 0;
  always @(negedge clk) begin
    trg_done = 0;
    if (sw_trg) begin n_trg++; trg_wait = 30; end
    else if (trg_wait > 0) begin
      trg_wait--;
      if (trg_wait == 0) trg_done = 1;
      else check(busy, "sequencer waits for the trigger sequence");
    end
  end

  // bus cycles may only start inside the gate window
  int cyc = 0, outside = 0;
  logic [1:0] cstb_q = '1;
  logic gate_q = 1;
  always @(negedge clk) begin
    cyc++;
    for (int b = 0; b < 2; b++)
      if (!cstb_n[b] && cstb_q[b] && !gate_q && !gate) outside++;
    cstb_q = cstb_n;
    gate_q = gate;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [31:0] prog [$];
  function automatic logic [31:0] ins(input seq_op_e o, input logic [19:0] f);
    return {o, 8'h00, f};
  endfunction

  initial begin
    logic [19:0] ra, pa, da, ba, rb, rm;
    logic [19:0] ped [5] = '{20'h00100, 20'h00155, 20'h003FF, 20'h00002, 20'h00200};
    repeat (3) @(negedge clk);
    rst_n = 1;
    ra = mk_baddr(0, 0, 5'd0, 3'd1, 4'd0, 5'd3);
    pa = mk_baddr(0, 0, 5'd0, 3'd2, 4'd0, 5'h06);
    da = mk_baddr(0, 0, 5'd0, 3'd2, 4'd0, 5'h07);
    ba = mk_baddr(1, 0, 5'd0, 3'd4, 4'd0, 5'd4);
    rb = mk_baddr(0, 0, 5'd16, 3'd0, 4'd0, 5'd9);
    rm = mk_baddr(0, 0, 5'd3, 3'd0, 4'd0, 5'd9);
    prog.push_back(ins(OP_WR, ra));    prog.push_back(32'h11111);
    prog.push_back(ins(OP_RD, ra));
    prog.push_back(ins(OP_BCAST, ba)); prog.push_back(32'h22222);
    prog.push_back(ins(OP_BLKWR, da)); prog.push_back({12'h0, pa}); prog.push_back({16'd5, 16'd10});
    foreach (ped[i]) prog.push_back({12'h0, ped[i]});
    prog.push_back(ins(OP_BLKVF, da)); prog.push_back({12'h0, pa}); prog.push_back({16'd5, 16'd10});
    foreach (ped[i]) prog.push_back({12'h0, ped[i]});
    prog.push_back(ins(OP_BLKVF, da)); prog.push_back({12'h0, pa}); prog.push_back({16'd2, 16'd11});
    prog.push_back({12'h0, ped[1]});   prog.push_back(32'h00000);
    prog.push_back(ins(OP_RD, rb));
    prog.push_back(ins(OP_RD, rm));
    prog.push_back(ins(OP_TRG, 20'h0));
    prog.push_back(ins(OP_WAIT, 20'd20));
    prog.push_back(ins(OP_END, 20'h0));
    foreach (prog[i]) begin
      @(negedge clk);
      im_we = 1; im_addr = 10'(i); im_wdata = prog[i];
    end
    @(negedge clk);
    im_we = 0; im_addr = 10'd5;
    @(negedge clk);
    check(im_rdata == prog[5], "instruction memory read back");
    start = 1;
    @(negedge clk);
    start = 0;
    @(negedge clk);
    check(busy, "running");
    while (busy) @(negedge clk);

    check(g[0].mdl.regs[int'(ra[17:0])] == 20'h11111, "write executed");
    check(g[0].mdl.regs.exists(int'({2'b0, 4'd0, 3'd4, 4'd0, 5'd4})) &&
          g[1].mdl.regs.exists(int'({2'b0, 4'd0, 3'd4, 4'd0, 5'd4})), "broadcast on both branches");
    for (int i = 0; i < 5; i++)
      check(g[0].mdl.pmem[int'(pa[17:0]) * 1024 + 10 + i] == (i == 2 ? 20'h0 : ped[i]),
            $sformatf("pedestal word %0d", i));
    check(n_results == 5, $sformatf("five results (%0d)", n_results));
    rm_addr = 0; @(negedge clk); @(negedge clk);
    check(rm_rdata == 32'h00011111, $sformatf("read result %h", rm_rdata));
    rm_addr = 1; @(negedge clk); @(negedge clk);
    check(rm_rdata == 32'd0, "verify of good data: no mismatch");
    rm_addr = 2; @(negedge clk); @(negedge clk);
    check(rm_rdata == 32'd1, $sformatf("verify with one wrong value: %0d mismatch", rm_rdata));
    check(g[0].mdl.pmem[int'(pa[17:0]) * 1024 + 12] == 20'h0, "mismatching word corrected");
    check(g[0].mdl.pmem[int'(pa[17:0]) * 1024 + 11] == ped[1], "matching word left alone");
    rm_addr = 3; @(negedge clk); @(negedge clk);
    check(rm_rdata == {12'h0, reg_init(rb)}, "read on branch B");
    rm_addr = 4; @(negedge clk); @(negedge clk);
    check(rm_rdata[31], "read of missing card flagged");
    check(err, "error flag set");
    check(n_trg == 1, "one software trigger");

    // automatic verify-and-correct runs inside a gate window
    prog.delete();
    prog.push_back(ins(OP_BLKVF, da)); prog.push_back({12'h0, pa}); prog.push_back({16'd2, 16'd10});
    prog.push_back({12'h0, ped[0]});   prog.push_back({12'h0, ped[1]});
    prog.push_back(ins(OP_END, 20'h0));
    foreach (prog[i]) begin
      @(negedge clk);
      im_we = 1; im_addr = 10'(i); im_wdata = prog[i];
    end
    @(negedge clk);
    im_we = 0;
    g[0].mdl.pmem[int'(pa[17:0]) * 1024 + 10] = 20'h00099;
    fork
      forever begin @(negedge clk); gate = (cyc % 100) < 15; end
    join_none
    auto_period = 300;
    while (n_auto == 0) @(negedge clk);
    while (busy) @(negedge clk);
    rm_addr = 0; @(negedge clk); @(negedge clk);
    check(rm_rdata == 32'd1 && err, $sformatf("first automatic run finds the upset (%0d)", rm_rdata));
    check(g[0].mdl.pmem[int'(pa[17:0]) * 1024 + 10] == ped[0], "upset corrected");
    while (n_auto == 1) @(negedge clk);
    while (busy) @(negedge clk);
    @(negedge clk); @(negedge clk);
    check(rm_rdata == 32'd0 && !err, "second automatic run finds nothing");
    check(outside == 0, $sformatf("bus cycles only inside the window (%0d outside)", outside));
    check(n_trg == 1, "no trigger from the automatic runs");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
