// tb_decoder_10b8b -- self-checking testbench of decoder_10b8b.
//
// The expected result of each of the 1024 ten-bit words is worked out from
// the independent reference encoder: data words (both disparities) give their
// byte with k_out = 0, the 24 command words give the command byte with
// k_out = 1, and every other word must leave data_out8b and k_out as they
// were. Stimulus: the words of the published example, all 1024 words in order, then
// a random mix of a reference-encoded symbol stream and arbitrary words.
// The result of a word applied before a rising edge must appear right after
// that edge (one cycle of latency) and not earlier.
module tb_decoder_10b8b;
  import ref_8b10b_pkg::*;

  logic       clock = 1'b0, reset_n = 1'b1;
  logic [9:0] data_in10b = '0;
  logic [7:0] data_out8b;
  logic       k_out;
  int checks = 0, failures = 0;
  int n_data = 0, n_cmd = 0, n_invalid = 0, n_valid_words = 0;
  int exp_val [1024];   // -1 invalid, else {k, byte}

  decoder_10b8b dut (.*);

  always #2 clock = ~clock;

  initial begin
    repeat (20000) @(posedge clock);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s (t=%0t)", what, $time);
    end
  endtask

  logic [8:0] expected = '0;   // {k_out, data_out8b}

  // Called right after a falling edge; returns at the next falling edge.
  task automatic apply(input logic [9:0] w);
    data_in10b = w;
    #0.5 check({k_out, data_out8b} == expected, "output changed before the clock edge");
    @(posedge clock);
    #1;
    if (exp_val[w] < 0) n_invalid++;
    else begin
      expected = 9'(exp_val[w]);
      if (expected[8]) n_cmd++; else n_data++;
    end
    check({k_out, data_out8b} == expected,
          $sformatf("word %b: got k=%0d %02h want k=%0d %02h", w, k_out, data_out8b, expected[8], expected[7:0]));
    @(negedge clock);
  endtask

  initial begin
    logic rd;
    #1 reset_n = 1'b0;   // an edge, so the asynchronous reset acts
    foreach (exp_val[i]) exp_val[i] = -1;
    for (int b = 0; b < 256; b++)
      for (int r = 0; r < 2; r++) exp_val[ref_encode(0, 8'(b), r[0])] = b;
    for (int i = 0; i < 12; i++) begin
      exp_val[KN[i]] = 256 + int'(KB[i]);
      exp_val[KP[i]] = 256 + int'(KB[i]);
    end
    foreach (exp_val[i]) if (exp_val[i] >= 0) n_valid_words++;
    check(n_valid_words == 464, $sformatf("reference has %0d valid words", n_valid_words));
    repeat (2) @(negedge clock);
    check({k_out, data_out8b} == 9'h000, "reset value");
    reset_n = 1'b1;
    // Words of the published decoder example: D0.0, K28.5 (positive form),
    // then a word that is no code (output must hold).
    apply(10'b1001110100);
    check(data_out8b == 8'h00 && !k_out, "D0.0");
    apply(10'b1100000101);
    check(data_out8b == 8'hBC && k_out, "K28.5");
    apply(10'b0000001000);
    check(data_out8b == 8'hBC && k_out, "invalid word holds K28.5");
    for (int w = 0; w < 1024; w++) apply(10'(w));
    rd = 1'b0;
    for (int i = 0; i < 4000; i++) begin
      automatic int r = $urandom_range(0, 9);
      automatic logic [9:0] w;
      if (r < 7)      w = ref_encode(0, 8'($urandom), rd);
      else if (r < 8) w = ref_encode(1, KB[$urandom_range(0, 11)], rd);
      else            w = 10'($urandom);
      if (exp_val[w] >= 0) rd = ref_rd_next(w, rd);
      apply(w);
    end
    check(n_invalid >= 560 && n_cmd >= 24 && n_data >= 440, "all kinds of words exercised");
    $display("data=%0d commands=%0d invalid=%0d", n_data, n_cmd, n_invalid);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
