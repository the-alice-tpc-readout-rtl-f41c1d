// fcb_master: master of the Front-end Control Bus (FCB).
//
// The FCB is an I2C-like serial bus from the RCU to the Board Controllers of
// the FECs, with the I2C data line split into two one-way lines: sda_in
// (RCU to cards) and sda_out (cards to RCU). One transaction is:
//   start | FEC address (7 bits) + R/W | ack | register address | ack |
//   data[15:8] | ack | data[7:0] | ack | stop
// i.e. 1 + 4 x 9 + 1 = 38 bit periods. Data bits are sent MSB first, change
// while scl is low and are sampled at the rising edge of scl. The start
// condition is sda_in falling while scl is high, the stop condition sda_in
// rising while scl is high. In a write, and for the two address bytes, the
// card acknowledges on sda_out; in a read the card sends the data bytes on
// sda_out and the RCU acknowledges them on sda_in. An acknowledge is a low
// level; a high acknowledge from the card sets nack but the frame is still
// completed. The frame, the split lines and the acknowledge placement follow
// the FCB description and its timing diagram; the bit order, ack polarity and
// the error handling are this design's choices.
//
// Timing: one bit period is CLK_DIV clocks; with the 40 MHz clock and the
// default of 8 the bus runs at 5 MHz and a transaction takes 38 x 8 = 304
// clocks (7.6 us) plus one clock to latch the request and one for done.
// scl and sda_in are registered; idle level is high on both.
module fcb_master #(
  parameter int unsigned CLK_DIV = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic         rw,          // 1 = read
  input  logic [6:0]   fec_addr,
  input  logic [7:0]   reg_addr,
  input  logic [15:0]  wdata,
  output logic         busy,
  output logic         done,
  output logic [15:0]  rdata,
  output logic         nack,
  output logic         scl,
  output logic         sda_in,
  input  logic         sda_out
);

  localparam int unsigned NBITS = 38;
  localparam int unsigned PHW   = $clog2(CLK_DIV);
  localparam logic [PHW-1:0] HALF    = PHW'(CLK_DIV / 2);
  localparam logic [PHW-1:0] THREEQ  = PHW'((3 * CLK_DIV) / 4);

  logic           run;
  logic [PHW-1:0] ph;
  logic [5:0]     bitno;       // 0 = start, 1..36 = bytes, 37 = stop
  logic [31:0]    tx;
  logic           rd;

  // position of the current bit inside the frame
  logic [5:0] rel;
  logic [1:0] byte_i;
  logic [3:0] pos;             // 0..7 data, 8 acknowledge
  always_comb begin
    rel    = bitno - 6'd1;
    byte_i = 2'(rel / 9);
    pos    = 4'(rel % 9);
  end

  logic slave_data;            // card drives the data bits of this byte
  assign slave_data = rd && (byte_i >= 2'd2);

  logic scl_n, sda_n;
  always_comb begin
    scl_n = 1'b1;
    sda_n = 1'b1;
    if (run) begin
      if (bitno == 6'd0) begin
        sda_n = (ph < HALF);
      end else if (bitno == 6'(NBITS - 1)) begin
        scl_n = (ph >= HALF);
        sda_n = (ph >= THREEQ);
      end else begin
        scl_n = (ph >= HALF);
        if (pos == 4'd8)      sda_n = slave_data ? 1'b0 : 1'b1;   // RCU acks read data
        else if (!slave_data) sda_n = tx[5'(31 - (32'(byte_i) * 8 + 32'(pos)))];
        else                  sda_n = 1'b1;
      end
    end
  end

  assign busy = run;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run    <= 1'b0;
      ph     <= '0;
      bitno  <= '0;
      tx     <= '0;
      rd     <= 1'b0;
      rdata  <= '0;
      nack   <= 1'b0;
      done   <= 1'b0;
      scl    <= 1'b1;
      sda_in <= 1'b1;
    end else begin
      done   <= 1'b0;
      scl    <= scl_n;
      sda_in <= sda_n;
      if (!run) begin
        if (start) begin
          run   <= 1'b1;
          ph    <= '0;
          bitno <= '0;
          tx    <= {fec_addr, rw, reg_addr, wdata};
          rd    <= rw;
          nack  <= 1'b0;
        end
      end else begin
        // sample the card at the rising edge of scl (as seen on the wire)
        if (ph == HALF && bitno != 6'd0 && bitno != 6'(NBITS - 1)) begin
          if (pos == 4'd8 && !slave_data && sda_out) nack <= 1'b1;
          if (pos != 4'd8 && slave_data) rdata <= {rdata[14:0], sda_out};
        end
        if (ph == PHW'(CLK_DIV - 1)) begin
          ph <= '0;
          if (bitno == 6'(NBITS - 1)) begin
            run  <= 1'b0;
            done <= 1'b1;
          end else begin
            bitno <= bitno + 1'b1;
          end
        end else begin
          ph <= ph + 1'b1;
        end
      end
    end
  end

endmodule
