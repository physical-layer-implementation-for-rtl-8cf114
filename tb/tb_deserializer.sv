// tb_deserializer -- self-checking testbench of deserializer.
//
// Sends a bit stream that starts with idle zero bits (a random number, so
// the symbol boundary is at an arbitrary bit), then a K28.5 comma and a
// stream of symbols from the reference encoder. The deserializer must stay
// unaligned until the comma, then deliver every following symbol right
// after the rising edge that shifts in its last bit. Later the stream slips
// by a few bits and a new comma follows: the block must report a realignment
// and deliver the symbols at the new boundary. K28.7 is left out of the
// stream because it can form a comma across symbol boundaries.
module tb_deserializer;
  import ref_8b10b_pkg::*;

  logic       clk_bit = 1'b0, reset_n = 1'b1, serial_in = 1'b0;
  logic [9:0] word_out;
  logic       aligned, realign;
  int checks = 0, failures = 0;
  int n_realign = 0, n_words = 0;
  logic rd = 1'b0;

  deserializer dut (.*);

  always #1 clk_bit = ~clk_bit;
  always @(posedge clk_bit) if (realign) n_realign++;

  initial begin
    repeat (60000) @(posedge clk_bit);
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

  // Shift one bit in: set at the falling edge, sampled at the rising edge.
  task automatic send_bit(input logic b);
    @(negedge clk_bit);
    serial_in = b;
    @(posedge clk_bit);
    #0.2;
  endtask

  // Send a symbol; if the receiver should be aligned to it, check it.
  task automatic send_symbol(input logic k, input logic [7:0] b, input bit expect_word,
                             input bit expect_realign);
    logic [9:0] w = ref_encode(k, b, rd);
    rd = ref_rd_next(w, rd);
    for (int i = 9; i >= 0; i--) send_bit(w[i]);
    if (expect_word) begin
      n_words++;
      check(aligned, "aligned");
      check(word_out == w, $sformatf("word %b want %b", word_out, w));
      check(realign == expect_realign, $sformatf("realign flag %0d", realign));
    end
  endtask

  task automatic random_symbols(input int n);
    for (int i = 0; i < n; i++) begin
      automatic int r = $urandom_range(0, 9);
      if (r == 0) send_symbol(1, KB[$urandom_range(0, 6)], 1, 0);   // K28.0..K28.6
      else        send_symbol(0, 8'($urandom), 1, 0);
    end
  endtask

  initial begin
    #0.5 reset_n = 1'b0;
    #2 reset_n = 1'b1;
    repeat ($urandom_range(3, 29)) send_bit(1'b0);
    check(!aligned, "not aligned before the first comma");
    send_symbol(1, 8'hBC, 1, 0);
    random_symbols(300);
    // Slip: three stray bits move the boundary; the next comma must realign.
    send_bit(1'b0); send_bit(1'b1); send_bit(1'b0);
    repeat (2) send_symbol(0, 8'h4A, 0, 0);   // D10.2: 0101010101, no comma
    send_symbol(1, 8'hBC, 1, 1);
    random_symbols(300);
    check(n_realign == 1, $sformatf("one realignment (%0d)", n_realign));
    $display("words=%0d realignments=%0d", n_words, n_realign);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
