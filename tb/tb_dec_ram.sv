// tb_dec_ram -- self-checking testbench of dec_ram.
//
// Builds the expected decode map from the independent reference encoder
// (every byte at both disparities) and reads all 1024 addresses: a data word
// must be flagged valid with its byte, every other word invalid. Also checks
// that exactly 440 addresses hold a data word.
module tb_dec_ram;
  import ref_8b10b_pkg::*;

  logic [9:0] addr = '0;
  logic       valid;
  logic [7:0] data;
  int checks = 0, failures = 0;
  int n_valid = 0;
  int exp_byte [1024];

  dec_ram dut (.*);

  initial begin
    #100000;
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

  initial begin
    foreach (exp_byte[i]) exp_byte[i] = -1;
    for (int b = 0; b < 256; b++)
      for (int rd = 0; rd < 2; rd++) exp_byte[ref_encode(0, 8'(b), rd[0])] = b;
    for (int a = 0; a < 1024; a++) begin
      addr = 10'(a);
      #1;
      if (valid) n_valid++;
      if (exp_byte[a] < 0) check(!valid, $sformatf("word %b must be invalid", addr));
      else check(valid && data == 8'(exp_byte[a]),
                 $sformatf("word %b: valid=%0d data=%02h want %02h", addr, valid, data, exp_byte[a]));
    end
    check(n_valid == 440, $sformatf("number of data words %0d", n_valid));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
