// tb_dec_clock_gen -- self-checking testbench of dec_clock_gen.
//
// Applies every ten-bit word with the memory's data_valid flag both low and
// high. The 24 command words (from the reference model's list) must raise
// k_det with the right byte on code_out; the gated clock must pulse once when
// the word is a command or data_valid is high, and not at all otherwise.
module tb_dec_clock_gen;
  import ref_8b10b_pkg::*;

  logic       clock = 1'b0, data_valid = 1'b0;
  logic [9:0] data_in10b = '0;
  logic       gclk, k_det;
  logic [7:0] code_out;
  int checks = 0, failures = 0;
  int pulses = 0, n_k = 0;

  dec_clock_gen dut (.*);

  always #2 clock = ~clock;
  always @(posedge gclk) pulses++;

  initial begin
    repeat (5000) @(posedge clock);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  function automatic int k_of_word(input logic [9:0] w);
    for (int i = 0; i < 12; i++) if (KN[i] == w || KP[i] == w) return i;
    return -1;
  endfunction

  initial begin
    for (int dv = 0; dv < 2; dv++)
      for (int w = 0; w < 1024; w++) begin
        int prev, ki;
        @(negedge clock);
        data_in10b = 10'(w);
        data_valid = dv[0];
        #1;
        ki = k_of_word(10'(w));
        if (ki >= 0) begin
          n_k++;
          check(k_det && code_out == KB[ki], $sformatf("command word %b", data_in10b));
        end else check(!k_det, $sformatf("word %b is no command", data_in10b));
        prev = pulses;
        @(posedge clock);
        #0.5;
        check((pulses - prev) == ((dv == 1 || ki >= 0) ? 1 : 0),
              $sformatf("pulses for word %b data_valid %0d", data_in10b, dv));
      end
    check(n_k == 48, "24 command words seen in each pass");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
