// chan_dmem: the two interleaved channel data memories of the readout path.
//
// Each memory holds the data of one ALTRO channel. The two ALTRO bus branches
// are read concurrently, so each branch has its own write stream. Before a
// channel readout is issued on a branch, the readout controller allocates
// the next memory to that branch (alloc, alloc_br); memories are allocated
// alternately 0, 1, 0, ... The branch's words then go into the memory it
// owns; at the end of the channel (w_end) the memory is marked full with its
// word count. The read side drains the memories in allocation order as a
// valid/ready stream with r_last on each channel's final word, so the DDL
// sees channels in the order they were issued. While one channel is pushed
// towards the DDL the other memory can receive the next one, from either
// branch; with both memories receiving, both branches transfer at once. Two
// memories working in interleaved mode, one channel each, and concurrent
// readout of the two branches follow the RCU description; the allocation
// scheme and DEPTH are this design's choices (1024 words cover the largest
// ALTRO channel block of 1000 samples plus its framing).
//
// Interface: w_free is high while the next memory to allocate is neither
// full nor allocated; alloc must only be given then. Words beyond DEPTH are
// dropped and counted in overflow. A channel with no words is released
// without being read. The memory is read synchronously: a word fetched in one
// clock is held in the output register (r_valid, r_data) until taken.
module chan_dmem #(
  parameter int unsigned DEPTH = 1024,
  parameter int unsigned W     = 40
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               alloc,
  input  logic               alloc_br,
  input  logic [1:0]         w_valid,
  input  logic [1:0][W-1:0]  w_data,
  input  logic [1:0]         w_end,
  output logic               w_free,
  output logic               r_valid,
  input  logic               r_ready,
  output logic [W-1:0]       r_data,
  output logic               r_last,
  output logic               busy,
  output logic [15:0]        overflow
);

  localparam int unsigned AW = $clog2(DEPTH);

  logic [W-1:0] mem0 [DEPTH];
  logic [W-1:0] mem1 [DEPTH];

  logic [1:0]    full;          // memory holds a complete channel
  logic [1:0]    resv;          // memory allocated to a branch, being filled
  logic [1:0]    owner;         // branch of each allocated memory
  logic [AW:0]   len  [2];
  logic [AW:0]   wcnt [2];
  logic [1:0]    ovf;
  logic          aptr, rsel;
  logic [AW:0]   rcnt;          // next word to fetch

  assign w_free = !full[aptr] && !resv[aptr];
  assign busy   = |full || |resv;

  // which memory each branch writes, and which branch each memory takes
  logic [1:0] br_has;
  logic [1:0] m_we, m_end;
  logic [1:0][W-1:0] m_data;
  always_comb begin
    for (int b = 0; b < 2; b++) begin
      br_has[b] = (resv[0] && owner[0] == 1'(b)) || (resv[1] && owner[1] == 1'(b));
    end
    for (int m = 0; m < 2; m++) begin
      m_we[m]   = resv[m] && w_valid[owner[m]];
      m_end[m]  = resv[m] && w_end[owner[m]];
      m_data[m] = w_data[owner[m]];
    end
  end

  // ---------------------------------------------------------------- storage
  always_ff @(posedge clk) begin
    if (m_we[0] && !wcnt[0][AW]) mem0[wcnt[0][AW-1:0]] <= m_data[0];
    if (m_we[1] && !wcnt[1][AW]) mem1[wcnt[1][AW-1:0]] <= m_data[1];
  end

  // ---------------------------------------------------------------- control
  // A word fetched from memory sits in the output register (r_valid); the
  // next fetch happens when the register is empty or being consumed.
  logic fetch;
  logic out_last;
  assign fetch = full[rsel] && (rcnt != len[rsel]) && (!r_valid || r_ready);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      full     <= '0;
      resv     <= '0;
      owner    <= '0;
      len[0]   <= '0;
      len[1]   <= '0;
      wcnt[0]  <= '0;
      wcnt[1]  <= '0;
      ovf      <= '0;
      aptr     <= 1'b0;
      rsel     <= 1'b0;
      rcnt     <= '0;
      overflow <= '0;
      r_valid  <= 1'b0;
      r_data   <= '0;
      out_last <= 1'b0;
    end else begin
      logic [15:0] ovf_n;
      ovf_n = overflow;
      if (alloc && w_free) begin
        resv[aptr]  <= 1'b1;
        owner[aptr] <= alloc_br;
        wcnt[aptr]  <= '0;
        ovf[aptr]   <= 1'b0;
        aptr        <= !aptr;
      end
      for (int m = 0; m < 2; m++) begin
        if (m_we[m]) begin
          if (!wcnt[m][AW]) wcnt[m] <= wcnt[m] + 1'b1;
          else              ovf[m]  <= 1'b1;
        end
        if (m_end[m]) begin
          full[m] <= 1'b1;
          resv[m] <= 1'b0;
          len[m]  <= (m_we[m] && !wcnt[m][AW]) ? wcnt[m] + 1'b1 : wcnt[m];
          if (ovf[m] || (m_we[m] && wcnt[m][AW])) ovf_n = ovf_n + 1'b1;
        end
      end
      overflow <= ovf_n;

      // read side
      if (r_valid && r_ready) r_valid <= 1'b0;
      if (full[rsel] && len[rsel] == '0) begin
        // empty channel: release it at once
        full[rsel] <= 1'b0;
        rsel       <= !rsel;
      end else if (fetch) begin
        r_data   <= rsel ? mem1[rcnt[AW-1:0]] : mem0[rcnt[AW-1:0]];
        r_valid  <= 1'b1;
        out_last <= (rcnt + 1'b1 == len[rsel]);
        if (rcnt + 1'b1 == len[rsel]) begin
          full[rsel] <= 1'b0;
          rsel       <= !rsel;
          rcnt       <= '0;
        end else begin
          rcnt <= rcnt + 1'b1;
        end
      end
    end
  end

  assign r_last = out_last;

  // A branch writes only into a memory allocated to it, and one branch owns
  // at most one memory at a time.
  for (genvar b = 0; b < 2; b++) begin : g_chk
    a_write_owned: assert property (@(posedge clk) disable iff (!rst_n)
                                    w_valid[b] |-> br_has[b]);
    a_one_owned: assert property (@(posedge clk) disable iff (!rst_n)
                                  (alloc && w_free && alloc_br == 1'(b)) |-> !br_has[b]);
  end
  a_alloc_free: assert property (@(posedge clk) disable iff (!rst_n) alloc |-> w_free);

endmodule
