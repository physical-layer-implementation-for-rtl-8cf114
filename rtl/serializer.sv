// serializer -- ten-to-one parallel-to-serial converter of the transmit path.
//
// A ten-bit shift register runs on the bit clock. Every tenth bit clock it
// loads the code word present on word_in; in between it shifts towards the
// most significant end, so serial_out sends bit 9 ('a') first and bit 0 ('j')
// last, the transmission order of 8b/10b.
//
// Clocking: clk_bit runs at ten times the symbol clock and is phase locked to
// it (in a real PHY both come from the transmit PLL). word_in must be stable
// at every tenth rising edge of clk_bit; the code word from the encoder is
// stable for a whole symbol period, and the load point is at a fixed phase to
// it after reset. The line coding follows the 8b/10b order; the converter's
// structure is this design's own.
//
// Interface: clk_bit, reset_n (asynchronous, active low) and word_in in;
// serial_out out. Latency: the first bit of a loaded word appears right after
// the load edge.
module serializer
  import usb3_8b10b_pkg::*;
(
  input  logic  clk_bit,
  input  logic  reset_n,
  input  code_t word_in,
  output logic  serial_out
);
  code_t      shreg;
  logic [3:0] cnt;   // bit position within the symbol, 0..9

  always_ff @(posedge clk_bit or negedge reset_n) begin
    if (!reset_n) begin
      shreg <= '0;
      cnt   <= '0;
    end else begin
      if (cnt == 4'd0) shreg <= word_in;
      else             shreg <= {shreg[8:0], 1'b0};
      cnt <= (cnt == 4'd9) ? 4'd0 : cnt + 4'd1;
    end
  end

  assign serial_out = shreg[9];
endmodule
