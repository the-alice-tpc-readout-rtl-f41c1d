// ddl_rx: receive direction of the DDL interface.
//
// Besides carrying event data to the DAQ, the DDL can bring configuration
// data to the RCU. This block turns the words arriving from the SIU into
// writes on the RCU register map: words come in pairs, first an address word
// ([15:0] = register or memory address), then the data word. Each pair
// becomes one wr_req, held until wr_ack. While a write is pending, din_busy
// asks the SIU to hold further words; one word arriving in the same cycle as
// busy rises is still taken. That the DDL can deliver front-end configuration
// follows the RCU description; the pair framing and the busy rule are this
// design's choices.
module ddl_rx (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         din_valid,
  input  logic [31:0]  din,
  output logic         din_busy,
  output logic         wr_req,
  input  logic         wr_ack,
  output logic [15:0]  wr_addr,
  output logic [31:0]  wr_data,
  output logic [15:0]  n_writes
);

  logic        have_addr;
  logic        skid_v;       // word received while a write was pending
  logic [31:0] skid;

  assign din_busy = wr_req || skid_v;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      have_addr <= 1'b0;
      skid_v    <= 1'b0;
      skid      <= '0;
      wr_req    <= 1'b0;
      wr_addr   <= '0;
      wr_data   <= '0;
      n_writes  <= '0;
    end else begin
      logic        in_v;
      logic [31:0] in_w;
      in_v = 1'b0;
      in_w = din;
      if (wr_req && wr_ack) begin
        wr_req   <= 1'b0;
        n_writes <= n_writes + 1'b1;
      end
      // pick the next word: the skid word first, then the input
      if (skid_v && !(wr_req && !wr_ack)) begin
        in_v   = 1'b1;
        in_w   = skid;
        skid_v <= 1'b0;
        if (din_valid) begin
          skid_v <= 1'b1;
          skid   <= din;
        end
      end else if (din_valid) begin
        if (wr_req && !wr_ack) begin
          skid_v <= 1'b1;
          skid   <= din;
        end else begin
          in_v = 1'b1;
        end
      end
      if (in_v) begin
        if (!have_addr) begin
          wr_addr   <= in_w[15:0];
          have_addr <= 1'b1;
        end else begin
          wr_data   <= in_w;
          wr_req    <= 1'b1;
          have_addr <= 1'b0;
        end
      end
    end
  end

endmodule
