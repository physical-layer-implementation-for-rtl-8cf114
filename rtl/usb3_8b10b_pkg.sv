// usb3_8b10b_pkg -- code tables and helpers of the 8b/10b line code used on
// the SuperSpeed USB link.
//
// A byte HGFEDCBA (A = bit 0) is split into the five-bit part x = EDCBA and the
// three-bit part y = HGF. x is mapped to the six bits abcdei and y to the four
// bits fghj; the ten-bit word is sent a first. In every code_t of this design
// bit 9 holds 'a' and bit 0 holds 'j', so a word printed in binary reads
// abcdeifghj. Each sub-block has a form for negative and one for positive
// running disparity (RD); unbalanced forms are complements of each other.
//
// The functions below are the standard 8b/10b tables. They are evaluated only
// while the code memories of the encoder and decoder are filled (elaboration /
// time zero); the datapath itself only looks words up, which is the point of
// the memory-based encoder and decoder. Command (K) symbols: the twelve
// control characters K28.0..K28.7, K23.7, K27.7, K29.7 and K30.7.
package usb3_8b10b_pkg;

  typedef logic [9:0] code_t;   // abcdeifghj, 'a' in bit 9
  typedef logic [7:0] byte_t;   // HGFEDCBA, 'A' in bit 0

  // Encoder memory word: the code for negative and for positive RD.
  typedef struct packed {
    code_t rdn;
    code_t rdp;
  } enc_word_t;

  // Decoder memory word: is the address a data code, and which byte.
  typedef struct packed {
    logic  valid;
    byte_t data;
  } dec_word_t;

  // 5b/6b table, negative-RD column.
  function automatic logic [5:0] tab6_rdn(input logic [4:0] x);
    logic [5:0] t;
    unique case (x)
      5'd0:  t = 6'b100111;  5'd1:  t = 6'b011101;  5'd2:  t = 6'b101101;  5'd3:  t = 6'b110001;
      5'd4:  t = 6'b110101;  5'd5:  t = 6'b101001;  5'd6:  t = 6'b011001;  5'd7:  t = 6'b111000;
      5'd8:  t = 6'b111001;  5'd9:  t = 6'b100101;  5'd10: t = 6'b010101;  5'd11: t = 6'b110100;
      5'd12: t = 6'b001101;  5'd13: t = 6'b101100;  5'd14: t = 6'b011100;  5'd15: t = 6'b010111;
      5'd16: t = 6'b011011;  5'd17: t = 6'b100011;  5'd18: t = 6'b010011;  5'd19: t = 6'b110010;
      5'd20: t = 6'b001011;  5'd21: t = 6'b101010;  5'd22: t = 6'b011010;  5'd23: t = 6'b111010;
      5'd24: t = 6'b110011;  5'd25: t = 6'b100110;  5'd26: t = 6'b010110;  5'd27: t = 6'b110110;
      5'd28: t = 6'b001110;  5'd29: t = 6'b101110;  5'd30: t = 6'b011110;  default: t = 6'b101011;
    endcase
    return t;
  endfunction

  // 3b/4b table, negative-RD column (primary D.x.P7 for y = 7).
  function automatic logic [3:0] tab4_rdn(input logic [2:0] y);
    logic [3:0] t;
    unique case (y)
      3'd0: t = 4'b1011;  3'd1: t = 4'b1001;  3'd2: t = 4'b0101;  3'd3: t = 4'b1100;
      3'd4: t = 4'b1101;  3'd5: t = 4'b1010;  3'd6: t = 4'b0110;  default: t = 4'b1110;
    endcase
    return t;
  endfunction

  function automatic int unsigned ones(input code_t c);
    int unsigned n = 0;
    for (int i = 0; i < 10; i++) n += int'(c[i]);
    return n;
  endfunction

  // Running disparity after a word: 1 = positive. A balanced word keeps it.
  function automatic logic rd_after(input code_t c, input logic rd);
    int unsigned n = ones(c);
    return (n == 5) ? rd : (n > 5);
  endfunction

  // Ten-bit code of data byte b sent with running disparity rd (1 = positive).
  function automatic code_t encode_data(input byte_t b, input logic rd);
    logic [4:0] x = b[4:0];
    logic [2:0] y = b[7:5];
    logic [5:0] s6 = tab6_rdn(x);
    logic [3:0] s4;
    logic       rd6;
    int unsigned n6;
    // Six-bit block: complement for positive RD when unbalanced, and D.7.
    n6 = 0;
    for (int i = 0; i < 6; i++) n6 += int'(s6[i]);
    if (rd && (n6 != 3 || x == 5'd7)) s6 = ~s6;
    n6 = 0;
    for (int i = 0; i < 6; i++) n6 += int'(s6[i]);
    rd6 = (n6 == 3) ? rd : (n6 > 3);
    // Four-bit block: alternate A7 avoids a run of five in a row.
    if (y == 3'd7 && ((!rd6 && (x == 5'd17 || x == 5'd18 || x == 5'd20)) ||
                      ( rd6 && (x == 5'd11 || x == 5'd13 || x == 5'd14))))
      s4 = rd6 ? 4'b1000 : 4'b0111;
    else begin
      s4 = tab4_rdn(y);
      if (rd6 && (s4 != 4'b1001 && s4 != 4'b0101 && s4 != 4'b1010 && s4 != 4'b0110))
        s4 = ~s4;
    end
    return {s6, s4};
  endfunction

  // Is b one of the twelve command bytes?
  function automatic logic is_k_byte(input byte_t b);
    return (b[4:0] == 5'd28) || b == 8'hF7 || b == 8'hFB || b == 8'hFD || b == 8'hFE;
  endfunction

  // Negative-RD code of a command byte (the positive-RD code is its complement).
  // Returns 0 for a byte that is no command.
  function automatic code_t encode_k_rdn(input byte_t b);
    code_t c;
    unique case (b)
      8'h1C: c = 10'b001111_0100;  8'h3C: c = 10'b001111_1001;
      8'h5C: c = 10'b001111_0101;  8'h7C: c = 10'b001111_0011;
      8'h9C: c = 10'b001111_0010;  8'hBC: c = 10'b001111_1010;
      8'hDC: c = 10'b001111_0110;  8'hFC: c = 10'b001111_1000;
      8'hF7: c = 10'b111010_1000;  8'hFB: c = 10'b110110_1000;
      8'hFD: c = 10'b101110_1000;  8'hFE: c = 10'b011110_1000;
      default: c = '0;
    endcase
    return c;
  endfunction

  // Comma symbol K28.5 used for symbol alignment, both disparities.
  localparam code_t COMMA_RDN = 10'b001111_1010;
  localparam code_t COMMA_RDP = 10'b110000_0101;

endpackage
