// altro_model: behavioural model of the ALTRO chips on one ALTRO bus branch.
//
// Not synthesizable design; used by the testbenches only. Cards listed in
// PRESENT answer instructions addressed to them on this branch:
//   * write: store the 20-bit data at the instruction field (register file per
//     chip, indexed by the full field without the broadcast bit), pull ACK low
//     ACK_DLY clocks after CSTB, release ACK when CSTB returns high;
//   * read: drive the stored value (or tb_pkg::reg_init) on BD[19:0] with ACK;
//   * broadcast: every present card stores the data, nobody acknowledges;
//   * channel readout (command 5'h1A): after the handshake, pull TRSF low and
//     send tb_pkg::chan_len words, one per clock with DSTB low, with a one
//     clock pause after every GAP words (GAP = 0: no pause), then raise TRSF.
// Register 5'h06 is a pointer and register 5'h07 a data port into a per-chip
// memory (pointer auto-held), as used by block write / verify macros.
module altro_model
  import tb_pkg::*;
#(
  parameter logic        BRANCH  = 1'b0,
  parameter logic [15:0] PRESENT = 16'hFFFF,
  parameter int unsigned ACK_DLY = 2,
  parameter int unsigned MAX_LEN = 20,
  parameter int unsigned GAP     = 3
) (
  input  logic        clk,
  input  logic [39:0] bd_rcu,
  input  logic [1:0]  bd_oe,
  output logic [39:0] bd_in,
  input  logic        cstb_n,
  input  logic        write_n,
  output logic        ack_n,
  output logic        dstb_n,
  output logic        trsf_n
);

  logic [19:0] regs [int];
  logic [19:0] pmem [int];
  int unsigned n_wr = 0, n_rd = 0, n_bcast = 0, n_rdo = 0;
  int unsigned corrupt_after = 0;     // when non-zero, corrupt pmem data read back

  initial begin
    bd_in  = '0;
    ack_n  = 1'b1;
    dstb_n = 1'b1;
    trsf_n = 1'b1;
  end

  function automatic int key(input logic [19:0] f);
    return int'({2'b00, f[17:0]});
  endfunction

  initial begin
    forever begin
      @(negedge clk);
      if (!cstb_n) begin
        logic [19:0] f, d;
        logic [3:0]  card;
        f    = bd_rcu[39:20];
        d    = bd_rcu[19:0];
        card = f[15:12];
        if (f[18]) begin
          // broadcast write: all chips, no acknowledge
          for (int c = 0; c < 16; c++)
            if (PRESENT[c]) regs[key({f[19:16], 4'(c), f[11:0]})] = d;
          n_bcast++;
          while (!cstb_n) @(negedge clk);
        end else if (f[16] == BRANCH && PRESENT[card]) begin
          repeat (ACK_DLY) @(negedge clk);
          if (!write_n) begin
            if (f[4:0] == 5'h1A && !f[17]) begin
              ack_n <= 1'b0;
              while (!cstb_n) @(negedge clk);
              ack_n <= 1'b1;
              n_rdo++;
              send_channel(f[16:5]);
            end else begin
              regs[key(f)] = d;
              if (f[4:0] == 5'h07) pmem[key({f[19:5], 5'h06}) * 1024 + int'(regs[key({f[19:5], 5'h06})])] = d;
              n_wr++;
              ack_n <= 1'b0;
              while (!cstb_n) @(negedge clk);
              ack_n <= 1'b1;
            end
          end else begin
            logic [19:0] v;
            if (f[4:0] == 5'h07) begin
              int k;
              k = key({f[19:5], 5'h06}) * 1024 + (regs.exists(key({f[19:5], 5'h06})) ? int'(regs[key({f[19:5], 5'h06})]) : 0);
              v = pmem.exists(k) ? pmem[k] : 20'h0;
              if (corrupt_after != 0 && n_rd >= corrupt_after) v = v ^ 20'h1;
            end else begin
              v = regs.exists(key(f)) ? regs[key(f)] : reg_init(f);
            end
            n_rd++;
            bd_in[19:0] <= v;
            ack_n       <= 1'b0;
            while (!cstb_n) @(negedge clk);
            ack_n <= 1'b1;
          end
        end else begin
          while (!cstb_n) @(negedge clk);
        end
      end
    end
  end

  task automatic send_channel(input logic [11:0] hw);
    int unsigned len;
    len = chan_len(hw, MAX_LEN);
    repeat (2) @(negedge clk);
    trsf_n <= 1'b0;
    @(negedge clk);
    for (int unsigned k = 0; k < len; k++) begin
      bd_in  <= chan_word(hw, k);
      dstb_n <= 1'b0;
      @(negedge clk);
      if (GAP != 0 && (k % GAP) == GAP - 1) begin
        dstb_n <= 1'b1;
        @(negedge clk);
      end
    end
    dstb_n <= 1'b1;
    @(negedge clk);
    trsf_n <= 1'b1;
  endtask

endmodule
