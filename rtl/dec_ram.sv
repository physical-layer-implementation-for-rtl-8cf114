// dec_ram -- decode memory of the decoder.
//
// One word for each of the 1024 possible ten-bit inputs: a valid flag and the
// byte the input decodes to. The flag is set exactly for the ten-bit words the
// encoder emits for data bytes, in either disparity form; command words are
// recognised by the clock generator, not here. The memory is filled once at
// time zero by running every byte through the 8b/10b tables of
// usb3_8b10b_pkg for both running disparities, like a ROM initialisation file.
// 440 of the 1024 addresses hold a data code; the 256 bytes have 512 forms but
// many bytes use the same word for both disparities.
//
// Interface: addr (received word, 'a' in bit 9) in; valid, data out.
// Asynchronous read; the decoder registers the result.
module dec_ram
  import usb3_8b10b_pkg::*;
(
  input  code_t addr,
  output logic  valid,
  output byte_t data
);
  localparam int unsigned DEPTH = 1024;

  dec_word_t mem [DEPTH];

  initial begin
    for (int unsigned i = 0; i < DEPTH; i++) mem[i] = '0;
    for (int unsigned b = 0; b < 256; b++) begin
      mem[encode_data(byte_t'(b), 1'b0)] = '{valid: 1'b1, data: byte_t'(b)};
      mem[encode_data(byte_t'(b), 1'b1)] = '{valid: 1'b1, data: byte_t'(b)};
    end
  end

  always_comb begin
    valid = mem[addr].valid;
    data  = mem[addr].data;
  end
endmodule
