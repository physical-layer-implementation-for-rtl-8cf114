// decoder_10b8b -- memory-based 10b/8b decoder with internal clock gating.
//
// The received word addresses the 1024-word decode memory, which says whether
// it is a data code and which byte it carries. In parallel the clock generator
// recognises the 24 command words and produces the command byte ("code-out")
// and the command flag. A mux chooses the command byte when the word is a
// command and the memory's byte otherwise. The output register is clocked by
// the clock generator's gated clock, so for any of the invalid words no clock
// pulse occurs and data_out8b / k_out keep their previous values. Disparity
// errors are not checked: every word the encoder can emit is accepted,
// whatever the running disparity, and no error output exists.
//
// Interface: clock, reset_n (asynchronous, active low; outputs 0),
// data_in10b ('a' in bit 9) in; data_out8b, k_out out.
// Timing: one cycle of latency, one word per clock.
module decoder_10b8b
  import usb3_8b10b_pkg::*;
(
  input  logic  clock,
  input  logic  reset_n,
  input  code_t data_in10b,
  output byte_t data_out8b,
  output logic  k_out
);
  logic  gclk, data_valid, k_det;
  byte_t mem_data, code_out;

  dec_ram u_ram (.addr(data_in10b), .valid(data_valid), .data(mem_data));

  dec_clock_gen u_clock_gen (
    .clock(clock), .data_in10b(data_in10b), .data_valid(data_valid),
    .gclk(gclk), .k_det(k_det), .code_out(code_out)
  );

  always_ff @(posedge gclk or negedge reset_n) begin
    if (!reset_n) begin
      data_out8b <= '0;
      k_out      <= 1'b0;
    end else begin
      data_out8b <= k_det ? code_out : mem_data;
      k_out      <= k_det;
    end
  end
endmodule
