// bc_model: behavioural model of the Board Controllers of one FCB branch.
//
// Not synthesizable design; used by the testbenches only. Watches scl/sda_in
// of one branch, recognises start and stop conditions, and for a frame whose
// address byte names a card of this branch present in PRESENT ({2'b00,
// BRANCH, card} in the upper seven bits, R/W in bit 0):
//   * acknowledges (sda_out low) the bytes sent by the RCU,
//   * in a read, sends regs[card][reg] MSB first on sda_out,
//   * in a write, stores the 16-bit value at the stop condition.
// Reading ERR_REG clears it. intr_n is low while any present card has a
// non-zero error register. Every change of sda_out follows a falling scl.
module bc_model #(
  parameter logic        BRANCH  = 1'b0,
  parameter logic [15:0] PRESENT = 16'hFFFF,
  parameter logic [7:0]  ERR_REG = 8'h12
) (
  input  logic clk,
  input  logic scl,
  input  logic sda_in,
  output logic sda_out,
  output logic intr_n
);

  logic [15:0] regs [16][256];
  int unsigned n_frames = 0, n_err_reads = 0;

  logic        scl_q = 1'b1, sda_q = 1'b1;
  logic        active = 1'b0;
  int          bitn;
  logic [7:0]  b0, b1;
  logic [15:0] data, rdv;
  logic        mine;

  initial begin
    sda_out = 1'b1;
    for (int c = 0; c < 16; c++)
      for (int r = 0; r < 256; r++) regs[c][r] = 16'(c * 256 + r);
    for (int c = 0; c < 16; c++) regs[c][ERR_REG] = 16'h0;
  end

  always_comb begin
    intr_n = 1'b1;
    for (int c = 0; c < 16; c++) if (PRESENT[c] && regs[c][ERR_REG] != 0) intr_n = 1'b0;
  end

  always @(posedge clk) begin
    scl_q <= scl;
    sda_q <= sda_in;
    if (scl_q && scl && sda_q && !sda_in) begin          // start
      active  <= 1'b1;
      bitn    <= -1;
      b0      <= '0;
      b1      <= '0;
      data    <= '0;
      mine    <= 1'b0;
      sda_out <= 1'b1;
    end else if (scl_q && scl && !sda_q && sda_in && active) begin   // stop
      active  <= 1'b0;
      sda_out <= 1'b1;
      if (mine) begin
        n_frames++;
        if (!b0[0]) regs[b0[4:1]][b1] = data;
        else if (b1 == ERR_REG) begin
          regs[b0[4:1]][b1] = 16'h0;
          n_err_reads++;
        end
      end
    end else if (active && !scl_q && scl) begin          // rising: sample
      int byte_i, pos;
      byte_i = bitn / 9;
      pos    = bitn % 9;
      if (pos < 8) begin
        if (byte_i == 0) b0 <= {b0[6:0], sda_in};
        if (byte_i == 1) b1 <= {b1[6:0], sda_in};
        if (byte_i >= 2 && byte_i < 4 && !(mine && b0[0])) data <= {data[14:0], sda_in};
      end
    end else if (active && scl_q && !scl) begin          // falling: next bit
      int nb, byte_i, pos;
      logic m;
      nb     = bitn + 1;
      byte_i = nb / 9;
      pos    = nb % 9;
      m      = mine;
      if (nb == 8) begin
        m    = (b0[7:6] == 2'b00) && (b0[5] == BRANCH) && PRESENT[b0[4:1]];
        mine <= m;
      end
      if (nb == 18 && m && b0[0]) rdv = regs[b0[4:1]][b1];
      if (pos == 8) begin
        sda_out <= !(m && (byte_i < 2 || !b0[0]));
      end else if (m && b0[0] && byte_i >= 2 && byte_i < 4) begin
        sda_out <= rdv[15 - ((byte_i - 2) * 8 + pos)];
      end else begin
        sda_out <= 1'b1;
      end
      bitn <= nb;
    end
  end

endmodule
