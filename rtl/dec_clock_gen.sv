// dec_clock_gen -- clock generator of the decoder.
//
// Checks the validity of each received ten-bit word and only for a valid word
// lets a clock pulse through to the decoder's output register. A word is
// valid when the decode memory marks it as a data code (data_valid) or when it
// is one of the 24 command words (twelve command symbols, two disparity forms
// each). For a command word the block raises k_det and supplies the command
// byte on code_out ("code-out"), which the decoder's mux selects.
// An invalid word gives no clock pulse, so the decoder keeps its previous
// output and needs no error pin.
//
// Interface: clock, data_in10b ('a' in bit 9), data_valid in; gclk, k_det,
// code_out out. Timing: combinational check ahead of the latch-based gate.
module dec_clock_gen
  import usb3_8b10b_pkg::*;
(
  input  logic  clock,
  input  code_t data_in10b,
  input  logic  data_valid,
  output logic  gclk,
  output logic  k_det,
  output byte_t code_out
);
  // The twelve command bytes, in the order of the lookup below.
  localparam byte_t K_BYTES [12] = '{8'h1C, 8'h3C, 8'h5C, 8'h7C, 8'h9C, 8'hBC,
                                     8'hDC, 8'hFC, 8'hF7, 8'hFB, 8'hFD, 8'hFE};

  always_comb begin
    k_det    = 1'b0;
    code_out = '0;
    for (int i = 0; i < 12; i++) begin
      if (data_in10b == encode_k_rdn(K_BYTES[i]) || data_in10b == ~encode_k_rdn(K_BYTES[i])) begin
        k_det    = 1'b1;
        code_out = K_BYTES[i];
      end
    end
  end

  clock_gate u_gate (.clk(clock), .en(data_valid | k_det), .gclk(gclk));
endmodule
