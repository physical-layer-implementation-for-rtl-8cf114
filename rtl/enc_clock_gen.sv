// enc_clock_gen -- clock generator of the encoder.
//
// Decides for every input symbol whether it may be encoded and, only then,
// lets a clock pulse through to the code memory's output register. With k = 0
// every one of the 256 bytes is valid data; with k = 1 the byte is a command
// and only the twelve command bytes (K28.0-K28.7, K23.7, K27.7, K29.7, K30.7)
// are valid. An invalid symbol produces no clock pulse, so nothing downstream
// switches and the previous output word stays on the line. The enable is thus
// made inside the encoder instead of arriving on an extra input pin.
//
// The block also looks up the ten-bit command word (negative-disparity form)
// of a command byte; the encoder's mux uses it when k = 1.
//
// Interface: clock, k, data_in8b in; gclk (gated clock) and code_rdn out.
// Timing: combinational check, gated through clock_gate, so the decision
// applies to the rising clock edge at which the symbol is sampled.
module enc_clock_gen
  import usb3_8b10b_pkg::*;
(
  input  logic  clock,
  input  logic  k,
  input  byte_t data_in8b,
  output logic  gclk,
  output code_t code_rdn
);
  logic valid;

  always_comb begin
    valid    = !k || is_k_byte(data_in8b);
    code_rdn = encode_k_rdn(data_in8b);
  end

  clock_gate u_gate (.clk(clock), .en(valid), .gclk(gclk));
endmodule
