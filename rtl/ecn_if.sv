// ecn_if: register map of the RCU, reached from the DCS board and the DDL.
//
// The DCS board talks to the RCU over a synchronous bus with a 16-bit
// address and 32-bit data; configuration may also arrive over the DDL
// (through ddl_rx, writes only). This block arbitrates the two (DCS first),
// decodes the address and connects it to the instruction and result memories
// of the sequencer, the Active Channel List, the chip readout-order table
// (write only) and its enable, the trigger configuration, the
// FEC power state, the period of the sequencer's automatic re-run, the FCB
// command register of the monitoring module, the
// status and counter registers, and the command register (run sequencer,
// software trigger). The address map is listed in rcu_pkg (A_*).
// A 32-bit data / 16-bit address synchronous interface to the DCS follows the
// RCU description; the request/acknowledge strobes, the map and the priority
// are this design's choices.
//
// Timing: a request (xxx_req with address, write flag and data, held until
// acknowledged) is taken in the cycle it is seen while no access is under
// way; writes take effect in that cycle; xxx_ack is high for one cycle one
// clock later, with dcs_rdata valid in that cycle for reads.
module ecn_if
  import rcu_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  // DCS bus
  input  logic         dcs_req,
  input  logic         dcs_we,
  input  logic [15:0]  dcs_addr,
  input  logic [31:0]  dcs_wdata,
  output logic         dcs_ack,
  output logic [31:0]  dcs_rdata,
  // DDL receive path (writes)
  input  logic         ddl_req,
  input  logic [15:0]  ddl_addr,
  input  logic [31:0]  ddl_wdata,
  output logic         ddl_ack,
  // sequencer memories
  output logic         im_we,
  output logic [9:0]   im_addr,
  output logic [31:0]  im_wdata,
  input  logic [31:0]  im_rdata,
  output logic [7:0]   rm_addr,
  input  logic [31:0]  rm_rdata,
  // active channel list
  output logic         acl_we,
  output logic [7:0]   acl_addr,
  output logic [15:0]  acl_wdata,
  input  logic [15:0]  acl_rdata,
  // chip readout order
  output logic         ord_we,
  output logic [7:0]   ord_addr,
  output logic [6:0]   ord_wdata,
  output logic         topo,
  // trigger configuration
  output trg_mode_e    trg_mode,
  output logic [15:0]  l2_delay,
  // sequencer automatic re-run period
  output logic [31:0]  auto_period,
  // power state
  output logic         pwr_we,
  output logic [31:0]  pwr_wdata,
  input  logic [31:0]  pwr,
  // FCB command
  output logic         fcb_valid,
  output logic         fcb_rw,
  output logic [4:0]   fcb_fec,
  output logic [7:0]   fcb_reg,
  output logic [15:0]  fcb_wdata,
  input  logic         fcb_busy,
  input  logic         fcb_nack,
  input  logic [15:0]  fcb_rdata,
  input  logic [31:0]  msm_stat,
  // status
  input  logic [31:0]  status,
  input  trg_cnt_t     trg_cnt,
  // commands
  output logic         seq_start,
  output logic         sw_trg
);

  logic        take, sel_dcs, pend, pend_dcs;
  logic        we;
  logic [15:0] a, ra;
  logic [31:0] wd;

  assign take    = !pend && (dcs_req || ddl_req);
  assign sel_dcs = dcs_req;
  assign we      = sel_dcs ? dcs_we : 1'b1;
  assign a       = sel_dcs ? dcs_addr : ddl_addr;
  assign wd      = sel_dcs ? dcs_wdata : ddl_wdata;

  logic in_imem, in_acl;
  assign in_imem = (a[15:10] == A_IMEM[15:10]);
  assign in_acl  = (a[15:8]  == A_ACL[15:8]);

  logic wr;
  assign wr = take && we;

  always_comb begin
    im_we     = wr && in_imem;
    im_addr   = a[9:0];
    im_wdata  = wd;
    rm_addr   = a[7:0];
    acl_we    = wr && in_acl;
    acl_addr  = pend ? ra[7:0] : a[7:0];
    acl_wdata = wd[15:0];
    ord_we    = wr && (a[15:8] == A_ORD[15:8]);
    ord_addr  = a[7:0];
    ord_wdata = wd[6:0];
    pwr_we    = wr && (a == A_PWR);
    pwr_wdata = wd;
    fcb_valid = wr && (a == A_FCB_CMD);
    fcb_rw    = wd[29];
    fcb_fec   = wd[28:24];
    fcb_reg   = wd[23:16];
    fcb_wdata = wd[15:0];
    seq_start = wr && (a == A_CMD) && wd[0];
    sw_trg    = wr && (a == A_CMD) && wd[1];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pend     <= 1'b0;
      pend_dcs <= 1'b0;
      ra       <= '0;
      trg_mode <= TRG_SW;
      l2_delay <= 16'd100;
      auto_period <= '0;
      topo     <= 1'b0;
    end else begin
      pend <= take;
      if (take) begin
        pend_dcs <= sel_dcs;
        ra       <= a;
        if (we && a == A_TRG_MODE) trg_mode <= trg_mode_e'(wd[1:0]);
        if (we && a == A_L2_DELAY) l2_delay <= wd[15:0];
        if (we && a == A_VERIFY)   auto_period <= wd;
        if (we && a == A_RO_ORDER) topo <= wd[0];
      end
    end
  end

  assign dcs_ack = pend && pend_dcs;
  assign ddl_ack = pend && !pend_dcs;

  always_comb begin
    dcs_rdata = 32'h0;
    if (ra[15:10] == A_IMEM[15:10])     dcs_rdata = im_rdata;
    else if (ra[15:8] == A_RMEM[15:8])  dcs_rdata = rm_rdata;
    else if (ra[15:8] == A_ACL[15:8])   dcs_rdata = {16'h0, acl_rdata};
    else case (ra)
      A_TRG_MODE: dcs_rdata = {30'h0, trg_mode};
      A_L2_DELAY: dcs_rdata = {16'h0, l2_delay};
      A_PWR:      dcs_rdata = pwr;
      A_FCB_RES:  dcs_rdata = {fcb_busy, fcb_nack, 14'h0, fcb_rdata};
      A_MSM_STAT: dcs_rdata = msm_stat;
      A_STATUS:   dcs_rdata = status;
      A_VERIFY:   dcs_rdata = auto_period;
      A_RO_ORDER: dcs_rdata = {31'h0, topo};
      A_CNT_L1:          dcs_rdata = {16'h0, trg_cnt.l1};
      A_CNT_L1 + 16'd1:  dcs_rdata = {16'h0, trg_cnt.l2a};
      A_CNT_L1 + 16'd2:  dcs_rdata = {16'h0, trg_cnt.l2r};
      A_CNT_L1 + 16'd3:  dcs_rdata = {16'h0, trg_cnt.bc_mismatch};
      A_CNT_L1 + 16'd4:  dcs_rdata = {16'h0, trg_cnt.dropped};
      default:    dcs_rdata = 32'h0;
    endcase
  end

endmodule
