// ref_8b10b_pkg -- reference model of the 8b/10b code for the testbenches.
//
// Written independently of the design's tables: both disparity columns of the
// 5b/6b and 3b/4b tables are spelled out, and the twelve command words are
// listed in both forms, instead of deriving one form from the other.
// ref_encode returns the word for a symbol at a given running disparity, or
// 0 when the symbol does not exist (a command flag on a non-command byte).
// Words are abcdeifghj with 'a' in bit 9; running disparity 1 = positive.
package ref_8b10b_pkg;

  localparam logic [5:0] T6N [32] = '{
    6'b100111, 6'b011101, 6'b101101, 6'b110001, 6'b110101, 6'b101001, 6'b011001, 6'b111000,
    6'b111001, 6'b100101, 6'b010101, 6'b110100, 6'b001101, 6'b101100, 6'b011100, 6'b010111,
    6'b011011, 6'b100011, 6'b010011, 6'b110010, 6'b001011, 6'b101010, 6'b011010, 6'b111010,
    6'b110011, 6'b100110, 6'b010110, 6'b110110, 6'b001110, 6'b101110, 6'b011110, 6'b101011};
  localparam logic [5:0] T6P [32] = '{
    6'b011000, 6'b100010, 6'b010010, 6'b110001, 6'b001010, 6'b101001, 6'b011001, 6'b000111,
    6'b000110, 6'b100101, 6'b010101, 6'b110100, 6'b001101, 6'b101100, 6'b011100, 6'b101000,
    6'b100100, 6'b100011, 6'b010011, 6'b110010, 6'b001011, 6'b101010, 6'b011010, 6'b000101,
    6'b001100, 6'b100110, 6'b010110, 6'b001001, 6'b001110, 6'b010001, 6'b100001, 6'b010100};
  localparam logic [3:0] T4N [8] = '{4'b1011, 4'b1001, 4'b0101, 4'b1100, 4'b1101, 4'b1010, 4'b0110, 4'b1110};
  localparam logic [3:0] T4P [8] = '{4'b0100, 4'b1001, 4'b0101, 4'b0011, 4'b0010, 4'b1010, 4'b0110, 4'b0001};

  localparam logic [7:0] KB [12] = '{8'h1C, 8'h3C, 8'h5C, 8'h7C, 8'h9C, 8'hBC, 8'hDC, 8'hFC,
                                     8'hF7, 8'hFB, 8'hFD, 8'hFE};
  localparam logic [9:0] KN [12] = '{
    10'b0011110100, 10'b0011111001, 10'b0011110101, 10'b0011110011, 10'b0011110010, 10'b0011111010,
    10'b0011110110, 10'b0011111000, 10'b1110101000, 10'b1101101000, 10'b1011101000, 10'b0111101000};
  localparam logic [9:0] KP [12] = '{
    10'b1100001011, 10'b1100000110, 10'b1100001010, 10'b1100001100, 10'b1100001101, 10'b1100000101,
    10'b1100001001, 10'b1100000111, 10'b0001010111, 10'b0010010111, 10'b0100010111, 10'b1000010111};

  function automatic int popcount10(input logic [9:0] w);
    int n = 0;
    foreach (w[i]) if (w[i]) n++;
    return n;
  endfunction

  function automatic int k_index(input logic [7:0] b);
    for (int i = 0; i < 12; i++) if (KB[i] == b) return i;
    return -1;
  endfunction

  function automatic logic [9:0] ref_encode(input logic k, input logic [7:0] b, input logic rd);
    logic [5:0] s6;
    logic [3:0] s4;
    int         n6;
    logic       rd6;
    logic [4:0] x = b[4:0];
    if (k) begin
      int i = k_index(b);
      if (i < 0) return '0;
      return rd ? KP[i] : KN[i];
    end
    s6 = rd ? T6P[x] : T6N[x];
    n6 = 0;
    foreach (s6[i]) if (s6[i]) n6++;
    rd6 = (n6 == 3) ? rd : (n6 == 4);
    if (b[7:5] == 3'd7 && !rd6 && (x == 17 || x == 18 || x == 20)) s4 = 4'b0111;
    else if (b[7:5] == 3'd7 && rd6 && (x == 11 || x == 13 || x == 14)) s4 = 4'b1000;
    else s4 = rd6 ? T4P[b[7:5]] : T4N[b[7:5]];
    return {s6, s4};
  endfunction

  function automatic logic ref_rd_next(input logic [9:0] w, input logic rd);
    int n = popcount10(w);
    return (n == 5) ? rd : (n == 6);
  endfunction

endpackage
