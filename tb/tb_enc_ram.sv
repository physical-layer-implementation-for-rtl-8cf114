// tb_enc_ram -- self-checking testbench of enc_ram.
//
// Reads all 256 addresses and compares both stored forms with the
// independent reference model; also checks a few words by hand.
module tb_enc_ram;
  import ref_8b10b_pkg::*;

  logic [7:0] addr = '0;
  logic [9:0] code_rdn, code_rdp;
  int checks = 0, failures = 0;

  enc_ram dut (.*);

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
    for (int a = 0; a < 256; a++) begin
      addr = 8'(a);
      #1;
      check(code_rdn == ref_encode(0, 8'(a), 0), $sformatf("byte %02h negative form %b", a, code_rdn));
      check(code_rdp == ref_encode(0, 8'(a), 1), $sformatf("byte %02h positive form %b", a, code_rdp));
    end
    addr = 8'h00; #1;
    check(code_rdn == 10'b1001110100 && code_rdp == 10'b0110001011, "D0.0 by hand");
    addr = 8'h4A; #1;
    check(code_rdn == 10'b0101010101 && code_rdp == 10'b0101010101, "D10.2 by hand");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
