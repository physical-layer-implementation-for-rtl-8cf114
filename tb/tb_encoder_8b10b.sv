// tb_encoder_8b10b -- self-checking testbench of encoder_8b10b.
//
// Drives symbols at the falling clock edge and, after each rising edge,
// compares the output word with ref_8b10b_pkg's independent model, which also
// tracks the running disparity. An invalid symbol (k = 1 with a byte that is
// no command) must leave the output and the disparity unchanged. Also checks:
// the first words of the line code against hand-written values, the one-clock
// latency, the balance (4, 5 or 6 ones) of every word and that the emitted
// bit stream never has a run of more than five equal bits. Stimulus: a fixed
// opening sequence following the published example (a valid command, then
// an invalid one), all 256 data bytes, all 12 commands, then random symbols.
module tb_encoder_8b10b;
  import ref_8b10b_pkg::*;

  logic       clock = 1'b0, reset_n = 1'b1, k = 1'b0;
  logic [7:0] data_in8b = '0;
  logic [9:0] data_out10b;
  int checks = 0, failures = 0;
  int n_valid = 0, n_invalid = 0, n_rd_flip = 0;

  encoder_8b10b dut (.*);

  always #2 clock = ~clock;   // 4 time units: 250 MHz with 1 unit = 1 ns

  initial begin
    repeat (20000) @(posedge clock);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [9:0] expected = '0;
  logic       rd = 1'b0;
  int         run_len = 0;
  logic       last_bit = 1'b0;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s (t=%0t)", what, $time);
    end
  endtask

  // Present one symbol (called right after a falling edge), wait for the
  // rising edge, check right after it, return at the next falling edge.
  task automatic send(input logic kk, input logic [7:0] b);
    logic [9:0] w;
    k = kk;
    data_in8b = b;
    w = ref_encode(kk, b, rd);
    // Before the edge the previous word must still be there (latency 1).
    check(data_out10b == expected, "output changed before the clock edge");
    @(posedge clock);
    #1;
    if (kk && k_index(b) < 0) begin
      n_invalid++;
      check(data_out10b == expected, $sformatf("invalid K %02h must hold output", b));
    end else begin
      n_valid++;
      if (ref_rd_next(w, rd) != rd) n_rd_flip++;
      rd = ref_rd_next(w, rd);
      expected = w;
      check(data_out10b == w, $sformatf("k=%0d byte %02h: got %b want %b", kk, b, data_out10b, w));
      check(popcount10(data_out10b) inside {4, 5, 6}, "word balance");
      for (int i = 9; i >= 0; i--) begin
        if (data_out10b[i] == last_bit) run_len++; else run_len = 1;
        last_bit = data_out10b[i];
        if (run_len > 5) begin
          failures++;
          $display("FAIL run of %0d equal bits", run_len);
        end
      end
      checks++;
    end
    @(negedge clock);
  endtask

  initial begin
    // Hand-written words: the model itself must agree with the standard.
    check(ref_encode(0, 8'h00, 0) == 10'b1001110100, "ref D0.0-");
    check(ref_encode(0, 8'h00, 1) == 10'b0110001011, "ref D0.0+");
    check(ref_encode(1, 8'hBC, 0) == 10'b0011111010, "ref K28.5-");
    check(ref_encode(0, 8'hF1, 0) == 10'b1000110111, "ref D17.7- (A7)");
    check(ref_encode(0, 8'hEB, 1) == 10'b1101001000, "ref D11.7+ (A7)");
    check(ref_encode(0, 8'h63, 0) == 10'b1100011100, "ref D3.3-");
    #1 reset_n = 1'b0;   // an edge, so the asynchronous reset acts
    repeat (3) @(posedge clock);
    check(data_out10b == 10'b0, "reset value");
    @(negedge clock) reset_n = 1'b1;
    // Opening sequence of the published example: D0.0, valid command
    // K28.5, then an invalid command byte 0xFA which must be ignored.
    send(0, 8'h00);
    check(data_out10b == 10'b1001110100, "D0.0 at negative disparity");
    send(1, 8'hBC);
    check(data_out10b == 10'b0011111010, "K28.5 at negative disparity");
    send(1, 8'hFA);
    check(data_out10b == 10'b0011111010, "invalid command holds K28.5");
    send(1, 8'hBC);
    check(data_out10b == 10'b1100000101, "K28.5 at positive disparity");
    for (int b = 0; b < 256; b++) send(0, 8'(b));
    for (int i = 0; i < 12; i++) send(1, KB[i]);
    for (int i = 0; i < 4000; i++) begin
      automatic int r = $urandom_range(0, 9);
      if (r < 7)       send(0, 8'($urandom));
      else if (r < 9)  send(1, KB[$urandom_range(0, 11)]);
      else             send(1, 8'($urandom));
    end
    // Reset in the middle returns the disparity to negative.
    @(negedge clock) reset_n = 1'b0;
    #1 check(data_out10b == 10'b0, "asynchronous reset");
    @(negedge clock) reset_n = 1'b1;
    run_len = 0;
    rd = 1'b0; expected = '0;
    send(0, 8'h00);
    check(data_out10b == 10'b1001110100, "negative disparity after reset");
    check(n_invalid > 0 && n_rd_flip > 0, "invalid symbols and disparity changes exercised");
    $display("valid=%0d invalid=%0d disparity flips=%0d", n_valid, n_invalid, n_rd_flip);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
