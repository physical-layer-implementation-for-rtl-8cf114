// tb_enc_clock_gen -- self-checking testbench of enc_clock_gen.
//
// For every byte with k = 0 and k = 1 (and random changes of the inputs in
// the low clock phase) counts the pulses on the gated clock: one pulse per
// clock for a valid symbol, none for a command flag on a non-command byte.
// Also compares the command word of each of the twelve command bytes with
// the reference model.
module tb_enc_clock_gen;
  import ref_8b10b_pkg::*;

  logic       clock = 1'b0, k = 1'b0;
  logic [7:0] data_in8b = '0;
  logic       gclk;
  logic [9:0] code_rdn;
  int checks = 0, failures = 0;
  int pulses = 0, n_gated = 0;

  enc_clock_gen dut (.*);

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

  task automatic apply(input logic kk, input logic [7:0] b);
    int prev;
    bit ok;
    @(negedge clock);
    k = kk;
    data_in8b = b;
    #1;
    // A glitch of the inputs during the low phase must not matter.
    data_in8b = ~b;
    #0.5;
    data_in8b = b;
    prev = pulses;
    @(posedge clock);
    #1;
    ok = !kk || k_index(b) >= 0;
    if (!ok) n_gated++;
    check((pulses - prev) == (ok ? 1 : 0), $sformatf("k=%0d byte %02h: %0d pulses", kk, b, pulses - prev));
    if (kk && ok) check(code_rdn == KN[k_index(b)], $sformatf("command word of %02h", b));
  endtask

  initial begin
    for (int b = 0; b < 256; b++) apply(0, 8'(b));
    for (int b = 0; b < 256; b++) apply(1, 8'(b));
    for (int i = 0; i < 500; i++) apply(1'($urandom), 8'($urandom));
    check(n_gated >= 244, "all 244 non-command bytes with k = 1 were gated");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
