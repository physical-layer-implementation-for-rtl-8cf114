// tb_serializer -- self-checking testbench of serializer.
//
// Presents random ten-bit words, one per ten bit clocks, and reads serial_out
// after each rising edge: the bits of a word must appear 'a' (bit 9) first,
// starting right at the edge that loads it, with exactly ten bit periods per
// word.
module tb_serializer;
  logic       clk_bit = 1'b0, reset_n = 1'b1;
  logic [9:0] word_in = '0;
  logic       serial_out;
  int checks = 0, failures = 0;

  serializer dut (.*);

  always #1 clk_bit = ~clk_bit;

  initial begin
    repeat (10000) @(posedge clk_bit);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [9:0] w;
    #0.5 reset_n = 1'b0;
    @(negedge clk_bit);
    checks++;
    if (serial_out !== 1'b0) begin failures++; $display("FAIL reset value"); end
    reset_n = 1'b1;
    // The first rising edge after reset loads the first word.
    for (int n = 0; n < 500; n++) begin
      w = (n == 0) ? 10'b0011111010 : 10'($urandom);
      word_in = w;
      for (int i = 9; i >= 0; i--) begin
        @(posedge clk_bit);
        #0.2;
        if (i == 4) word_in = ~w;   // the input may change between loads
        checks++;
        if (serial_out !== w[i]) begin
          failures++;
          $display("FAIL word %0d bit %0d: got %0d want %0d", n, i, serial_out, w[i]);
        end
      end
      @(negedge clk_bit);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
