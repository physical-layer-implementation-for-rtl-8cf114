// encoder_8b10b -- memory-based 8b/10b encoder with internal clock gating.
//
// The input byte goes to the clock generator, which checks whether it is a
// valid symbol (any byte with k = 0, one of the twelve commands with k = 1).
// The byte also addresses the 256-word code memory, which returns the data
// code in both disparity forms. A mux picks the command word from the clock
// generator when k = 1 and the memory word otherwise, and the running
// disparity picks the form (the positive form of a command word is the
// complement of its negative form). The output register and the running
// disparity register are clocked only by the gated clock: an invalid symbol
// causes no clock pulse, so the output keeps the previous word and the
// disparity is left as it was. No enable input and no error output exist;
// invalid symbols are simply never sent.
//
// Interface: clock, reset_n (asynchronous, active low; output 0, disparity
// negative), k, data_in8b in; data_out10b out (abcdeifghj, a in bit 9).
// Timing: the symbol present at a rising clock edge appears on data_out10b
// right after that edge, one cycle of latency; one symbol per clock.
module encoder_8b10b
  import usb3_8b10b_pkg::*;
(
  input  logic  clock,
  input  logic  reset_n,
  input  logic  k,
  input  byte_t data_in8b,
  output code_t data_out10b
);
  logic  gclk;
  code_t k_rdn, d_rdn, d_rdp, word;
  logic  rd;   // running disparity, 1 = positive

  enc_clock_gen u_clock_gen (
    .clock(clock), .k(k), .data_in8b(data_in8b), .gclk(gclk), .code_rdn(k_rdn)
  );

  enc_ram u_ram (.addr(data_in8b), .code_rdn(d_rdn), .code_rdp(d_rdp));

  always_comb begin
    if (k) word = rd ? ~k_rdn : k_rdn;
    else   word = rd ? d_rdp  : d_rdn;
  end

  always_ff @(posedge gclk or negedge reset_n) begin
    if (!reset_n) begin
      data_out10b <= '0;
      rd          <= 1'b0;
    end else begin
      data_out10b <= word;
      rd          <= rd_after(word, rd);
    end
  end
endmodule
