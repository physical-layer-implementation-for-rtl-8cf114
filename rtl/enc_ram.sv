// enc_ram -- code memory of the encoder.
//
// One word per input byte, 256 words: for every byte the ten-bit data code for
// negative and for positive running disparity. Instead of computing the code
// with logic, the encoder addresses this memory with the byte and takes the
// word it finds. The contents are the standard 8b/10b data codes; they are
// written once at time zero from the tables in usb3_8b10b_pkg, in the way a
// memory initialisation file would fill a ROM.
//
// Storing both disparity forms (20 bits a word) is this design's choice: the
// positive form is not always the complement of the negative one (the D.x.A7
// alternates), so one ten-bit word per byte would need extra logic.
//
// Interface: addr (the byte) in; code_rdn, code_rdp out. Asynchronous read;
// the encoder registers the selected word.
module enc_ram
  import usb3_8b10b_pkg::*;
(
  input  byte_t addr,
  output code_t code_rdn,
  output code_t code_rdp
);
  localparam int unsigned DEPTH = 256;

  enc_word_t mem [DEPTH];

  initial begin
    for (int unsigned i = 0; i < DEPTH; i++) begin
      mem[i].rdn = encode_data(byte_t'(i), 1'b0);
      mem[i].rdp = encode_data(byte_t'(i), 1'b1);
    end
  end

  always_comb begin
    code_rdn = mem[addr].rdn;
    code_rdp = mem[addr].rdp;
  end
endmodule
