// rcu_top: logic of the Readout Control Unit FPGA.
//
// One RCU steers a readout partition of up to 25 Front End Cards on two
// ALTRO bus branches. It takes triggers from the TTC (through the DCS board),
// passes them to the cards, reads the accepted events out of the cards'
// multi-event buffers channel by channel and ships them, framed, to the DAQ
// over the DDL; in between it configures the cards from an instruction
// memory and watches their health over the Front-end Control Bus.
//
//   TTC ──> trigger_module ──L1/L2a/L2r──> FECs
//                 │ events
//                 v
//           readout_ctrl ──readout instr──> altro_bus_master x2 <──> ALTRO bus A/B
//                 │                                │ 40-bit words
//                 │                                v
//                 │                            chan_dmem (2 channel memories)
//                 v                                v
//           ddl_formatter (7 headers, 40->32 bit, trailer) ──> SIU (DDL)
//
//   DCS bus ─┐
//   DDL rx ──┴─> ecn_if register map ─> instr_sequencer ──instr──> altro_bus_master x2
//                                    ─> msm (FCB master, interrupts, power) <──> FCB A/B
//
// The two branches are read concurrently, each into the channel memory the
// readout controller granted it. Per branch the bus master serves the
// readout controller first and the sequencer otherwise; a tag carried
// through the master returns each completion to the block that asked.
// The block split follows the RCU description (ALTRO bus controller with two
// data memories, trigger module, data link interface, control interface,
// monitoring and safety module); the arbitration and the status word layout
// are this design's choices. The sampling-clock PLL and the GTL/PECL line
// drivers are outside this logic: each branch bus leaves as bd_out/bd_oe/bd_in.
//
// Status word (A_STATUS): [31] sequencer busy, [30] sequencer error,
// [29] readout busy, [28] trigger busy (FEC buffers full), [27] data
// memories busy, [26:24] automatic sequencer runs (low bits), [23:16] channel
// overflows, [15:0] event count.
module rcu_top
  import rcu_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  // ALTRO bus, branch A = 0, branch B = 1
  output logic [1:0][39:0]   bd_out,
  output logic [1:0][1:0]    bd_oe,
  input  logic [1:0][39:0]   bd_in,
  output logic [1:0]         cstb_n,
  output logic [1:0]         write_n,
  input  logic [1:0]         ack_n,
  input  logic [1:0]         dstb_n,
  input  logic [1:0]         trsf_n,
  output logic               altro_l1,
  output logic               altro_l2a,
  output logic               altro_l2r,
  // Front-end Control Bus
  output logic [1:0]         fcb_scl,
  output logic [1:0]         fcb_sda_in,
  input  logic [1:0]         fcb_sda_out,
  input  logic [1:0]         fcb_intr_n,
  // TTC (via the DCS board)
  input  logic               ttc_l1a,
  input  logic               ttc_bch_valid,
  input  logic [15:0]        ttc_bch_data,
  input  logic               ttc_bc_rst,
  // DDL SIU
  output logic               siu_dvalid,
  input  logic               siu_dready,
  output logic [31:0]        siu_data,
  input  logic               siu_din_valid,
  input  logic [31:0]        siu_din,
  output logic               siu_din_busy,
  // DCS bus
  input  logic               dcs_req,
  input  logic               dcs_we,
  input  logic [15:0]        dcs_addr,
  input  logic [31:0]        dcs_wdata,
  output logic               dcs_ack,
  output logic [31:0]        dcs_rdata,
  output logic               busy
);

  // ---------------------------------------------------------------- wires
  ev_info_t    ev_info, hdr_info;
  logic        ev_valid, ev_ready, ev_read, ro_busy;
  trg_cnt_t    trg_cnt;
  logic [23:0] evcnt;
  trg_mode_e   trg_mode;
  logic [15:0] l2_delay, n_auto;
  logic [31:0] auto_period;
  logic        orbit_gap;
  logic        sw_trg_reg, sw_trg_seq;

  logic        acl_we;
  logic [7:0]  acl_addr;
  logic [15:0] acl_wdata, acl_rdata;
  logic        ord_we, topo;
  logic [7:0]  ord_addr;
  logic [6:0]  ord_wdata;
  logic [31:0] pwr;
  logic [1:0]  ro_rq_valid, ro_rq_ready, ro_rq_done;
  logic [1:0][19:0] ro_rq_addr;
  logic        alloc, alloc_br;
  logic        hdr_valid, hdr_ready, ev_last, fmt_done;
  logic [15:0] n_chan;

  logic        w_free, r_valid, r_ready, r_last, dmem_busy;
  logic [39:0] r_data;
  logic [15:0] overflow;

  logic        im_we;
  logic [9:0]  im_addr;
  logic [31:0] im_wdata, im_rdata, rm_rdata;
  logic [7:0]  rm_addr;
  logic        seq_start, seq_busy, seq_err;
  logic [8:0]  n_results;
  logic        bq_valid, bq_ready, bq_branch, bq_done, bq_err;
  bus_op_e     bq_op;
  logic [19:0] bq_addr, bq_data, bq_rdata;

  logic        pwr_we, fcb_valid, fcb_rw, fcb_busy, fcb_done, fcb_nack;
  logic [31:0] pwr_wdata;
  logic [4:0]  fcb_fec, last_fec;
  logic [7:0]  fcb_reg;
  logic [15:0] fcb_wdata, fcb_rdata, err_cnt, last_err, poll_cnt;

  logic        rx_req, rx_ack;
  logic [15:0] rx_addr, rx_nwr;
  logic [31:0] rx_data;

  logic [1:0]        m_valid, m_ready, m_tag, m_done, m_done_tag, m_err;
  logic [1:0]        m_rdo_valid, m_rdo_end;
  bus_op_e [1:0]     m_op;
  logic [1:0][19:0]  m_addr, m_data, m_rdata;
  logic [1:0][39:0]  m_rdo_data;

  // ---------------------------------------------------------------- trigger
  trigger_module u_trg (
    .clk, .rst_n,
    .mode(trg_mode), .l2_delay, .sw_trg(sw_trg_reg || sw_trg_seq),
    .l1_a(ttc_l1a), .bch_valid(ttc_bch_valid), .bch_data(ttc_bch_data), .bc_rst(ttc_bc_rst),
    .l1_out(altro_l1), .l2a_out(altro_l2a), .l2r_out(altro_l2r),
    .ev_valid, .ev_ready, .ev_info, .ev_read, .busy, .cnt(trg_cnt), .evcnt, .orbit_gap
  );

  // ---------------------------------------------------------------- readout
  readout_ctrl u_ro (
    .clk, .rst_n,
    .ev_valid, .ev_ready, .ev_info, .ev_read, .busy(ro_busy),
    .acl_we, .acl_addr, .acl_wdata, .acl_raddr(acl_addr), .acl_rdata,
    .afl(pwr), .ord_we, .ord_addr, .ord_wdata, .topo,
    .rq_valid(ro_rq_valid), .rq_ready(ro_rq_ready), .rq_addr(ro_rq_addr), .rq_done(ro_rq_done),
    .w_free, .alloc, .alloc_br,
    .hdr_valid, .hdr_ready, .hdr_info, .ev_last, .fmt_done, .n_chan
  );

  // per-branch request mux: readout first, then the sequencer
  always_comb begin
    bq_ready = 1'b0;
    for (int b = 0; b < 2; b++) begin
      logic seq_here;
      seq_here       = bq_valid && (bq_branch == 1'(b));
      m_valid[b]     = ro_rq_valid[b] || seq_here;
      m_tag[b]       = !ro_rq_valid[b];
      m_op[b]        = ro_rq_valid[b] ? BOP_RDO : bq_op;
      m_addr[b]      = ro_rq_valid[b] ? ro_rq_addr[b] : bq_addr;
      m_data[b]      = ro_rq_valid[b] ? 20'h0 : bq_data;
      ro_rq_ready[b] = m_ready[b] && ro_rq_valid[b];
      ro_rq_done[b]  = m_done[b] && !m_done_tag[b];
      if (seq_here && !ro_rq_valid[b] && m_ready[b]) bq_ready = 1'b1;
    end
    bq_done  = m_done[bq_branch] && m_done_tag[bq_branch];
    bq_rdata = m_rdata[bq_branch];
    bq_err   = m_err[bq_branch];
  end

  for (genvar b = 0; b < 2; b++) begin : g_branch
    altro_bus_master u_abm (
      .clk, .rst_n,
      .req_valid(m_valid[b]), .req_ready(m_ready[b]), .req_op(m_op[b]), .req_tag(m_tag[b]),
      .req_addr(m_addr[b]), .req_data(m_data[b]),
      .done(m_done[b]), .done_tag(m_done_tag[b]), .rsp_data(m_rdata[b]), .rsp_err(m_err[b]),
      .rdo_valid(m_rdo_valid[b]), .rdo_data(m_rdo_data[b]), .rdo_end(m_rdo_end[b]),
      .bd_out(bd_out[b]), .bd_oe(bd_oe[b]), .bd_in(bd_in[b]),
      .cstb_n(cstb_n[b]), .write_n(write_n[b]), .ack_n(ack_n[b]),
      .dstb_n(dstb_n[b]), .trsf_n(trsf_n[b])
    );
  end

  chan_dmem u_dmem (
    .clk, .rst_n,
    .alloc, .alloc_br,
    .w_valid(m_rdo_valid), .w_data(m_rdo_data), .w_end(m_rdo_end), .w_free,
    .r_valid, .r_ready, .r_data, .r_last,
    .busy(dmem_busy), .overflow
  );

  ddl_formatter u_fmt (
    .clk, .rst_n,
    .hdr_valid, .hdr_ready, .hdr_info, .ev_last,
    .r_valid, .r_ready, .r_data, .dmem_busy,
    .d_valid(siu_dvalid), .d_ready(siu_dready), .d_data(siu_data), .fmt_done
  );

  // ---------------------------------------------------------------- control
  ddl_rx u_rx (
    .clk, .rst_n,
    .din_valid(siu_din_valid), .din(siu_din), .din_busy(siu_din_busy),
    .wr_req(rx_req), .wr_ack(rx_ack), .wr_addr(rx_addr), .wr_data(rx_data), .n_writes(rx_nwr)
  );

  ecn_if u_ecn (
    .clk, .rst_n,
    .dcs_req, .dcs_we, .dcs_addr, .dcs_wdata, .dcs_ack, .dcs_rdata,
    .ddl_req(rx_req), .ddl_addr(rx_addr), .ddl_wdata(rx_data), .ddl_ack(rx_ack),
    .im_we, .im_addr, .im_wdata, .im_rdata, .rm_addr, .rm_rdata,
    .acl_we, .acl_addr, .acl_wdata, .acl_rdata,
    .ord_we, .ord_addr, .ord_wdata, .topo,
    .trg_mode, .l2_delay, .auto_period,
    .pwr_we, .pwr_wdata, .pwr,
    .fcb_valid, .fcb_rw, .fcb_fec, .fcb_reg, .fcb_wdata,
    .fcb_busy, .fcb_nack, .fcb_rdata,
    .msm_stat({3'b000, last_fec, err_cnt[7:0], last_err}),
    .status({seq_busy, seq_err, ro_busy, busy, dmem_busy, n_auto[2:0], overflow[7:0], evcnt[15:0]}),
    .trg_cnt,
    .seq_start, .sw_trg(sw_trg_reg)
  );

  instr_sequencer u_seq (
    .clk, .rst_n,
    .im_we, .im_addr, .im_wdata, .im_rdata, .rm_addr, .rm_rdata,
    .start(seq_start), .auto_period, .gate(orbit_gap), .n_auto, .busy(seq_busy), .err(seq_err), .n_results,
    .bq_valid, .bq_ready, .bq_branch, .bq_op, .bq_addr, .bq_data,
    .bq_done, .bq_rdata, .bq_err,
    .sw_trg(sw_trg_seq), .trg_done(ev_read)
  );

  msm u_msm (
    .clk, .rst_n,
    .cmd_valid(fcb_valid), .cmd_rw(fcb_rw), .cmd_fec(fcb_fec), .cmd_reg(fcb_reg),
    .cmd_wdata(fcb_wdata), .cmd_busy(fcb_busy), .cmd_done(fcb_done),
    .cmd_rdata(fcb_rdata), .cmd_nack(fcb_nack),
    .pwr_we, .pwr_wdata, .pwr,
    .intr_n(fcb_intr_n), .scl(fcb_scl), .sda_in(fcb_sda_in), .sda_out(fcb_sda_out),
    .err_cnt, .last_fec, .last_err, .poll_cnt
  );

endmodule
