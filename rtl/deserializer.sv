// deserializer -- serial-to-parallel converter with comma alignment, receive
// path.
//
// Incoming bits shift into a ten-bit window on the bit clock; the oldest bit
// ends up in bit 9, so a complete symbol in the window reads abcdeifghj like
// every other code word in this design. The symbol boundary is not known from
// the line, so the block watches the window for the comma symbol K28.5 (in
// either disparity form), whose bit pattern cannot appear across the boundary
// of two valid symbols. When a comma fills the window the bit counter is set
// so that a word is taken every ten bits from then on, starting with the
// comma itself; a comma seen at another position later moves the boundary
// again (realign). Before the first comma no word is delivered and aligned is
// low.
//
// Clocking: clk_bit is the recovered bit clock. word_out changes right after a
// rising clk_bit edge and then holds for ten bit periods, so the symbol-rate
// decoder can sample it once per symbol at a fixed phase.
// The comma alignment is this design's choice of the usual 8b/10b receiver
// technique.
//
// Interface: clk_bit, reset_n (asynchronous, active low), serial_in in;
// word_out (aligned word) and aligned out. realign pulses for one bit clock
// when a comma arrives at a new boundary.
module deserializer
  import usb3_8b10b_pkg::*;
(
  input  logic  clk_bit,
  input  logic  reset_n,
  input  logic  serial_in,
  output code_t word_out,
  output logic  aligned,
  output logic  realign
);
  logic [8:0] history;      // the last nine bits received
  code_t      window_next;
  logic [3:0] cnt;   // bits since the last word boundary, 0..9
  logic       comma;

  always_comb begin
    window_next = {history, serial_in};
    comma       = (window_next == COMMA_RDN) || (window_next == COMMA_RDP);
  end

  always_ff @(posedge clk_bit or negedge reset_n) begin
    if (!reset_n) begin
      history  <= '0;
      cnt      <= '0;
      word_out <= '0;
      aligned  <= 1'b0;
      realign  <= 1'b0;
    end else begin
      history <= window_next[8:0];
      realign <= 1'b0;
      if (comma) begin
        // A comma completes here: this is a boundary.
        realign  <= aligned && (cnt != 4'd9);
        aligned  <= 1'b1;
        cnt      <= 4'd0;
        word_out <= window_next;
      end else if (aligned) begin
        if (cnt == 4'd9) begin
          cnt      <= 4'd0;
          word_out <= window_next;
        end else begin
          cnt <= cnt + 4'd1;
        end
      end
    end
  end
endmodule
