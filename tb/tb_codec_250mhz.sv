// tb_codec_250mhz -- workload testbench: encoder feeding decoder directly at
// a 250 MHz symbol clock (4 ns period), the operating point at which the
// codec's power was evaluated.
//
// 10000 symbols are sent: random data bytes, command symbols and, in one
// clock out of eight, an illegal command byte. The decoder's output must
// reproduce every legal symbol two clocks after it was presented (one clock
// in each codec) and, after an illegal one, repeat the previous symbol. The
// activity of both gated clocks is counted against the free-running clock:
// each must pulse exactly once per legal symbol, which is where the design
// saves switching power.
module tb_codec_250mhz;
  import ref_8b10b_pkg::*;

  localparam int NSYM = 10000;

  logic       clock = 1'b0, reset_n = 1'b1, k = 1'b0;
  logic [7:0] data_in8b = '0, data_out8b;
  logic [9:0] link;
  logic       k_out;
  int checks = 0, failures = 0;
  int n_clk = 0, n_enc_pulse = 0, n_dec_pulse = 0, n_legal = 0;

  encoder_8b10b u_enc (.clock, .reset_n, .k, .data_in8b, .data_out10b(link));
  decoder_10b8b u_dec (.clock, .reset_n, .data_in10b(link), .data_out8b, .k_out);

  always #2 clock = ~clock;
  always @(posedge clock) n_clk++;
  always @(posedge u_enc.gclk) n_enc_pulse++;
  always @(posedge u_dec.gclk) n_dec_pulse++;

  initial begin
    repeat (NSYM + 100) @(posedge clock);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [8:0] eff [NSYM];

  initial begin
    static logic [8:0] last = '0;
    int c0, e0, d0, e1;
    #1 reset_n = 1'b0;
    @(negedge clock) reset_n = 1'b1;
    c0 = n_clk; e0 = n_enc_pulse; d0 = n_dec_pulse;
    for (int n = 0; n < NSYM; n++) begin
      automatic int r = (n == 0) ? 1 : $urandom_range(0, 7);
      if (r == 1 && n == 0) begin
        k = 1'b1; data_in8b = 8'hBC;      // start with a comma
      end else if (r == 0) begin
        k = 1'b1;
        do data_in8b = 8'($urandom); while (k_index(data_in8b) >= 0);
      end else if (r == 1) begin
        k = 1'b1; data_in8b = KB[$urandom_range(0, 11)];
      end else begin
        k = 1'b0; data_in8b = 8'($urandom);
      end
      if (!(k && k_index(data_in8b) < 0)) begin
        last = {k, data_in8b};
        n_legal++;
      end
      eff[n] = last;
      @(posedge clock);
      #1;
      if (n >= 2) begin
        checks++;
        if ({k_out, data_out8b} != eff[n-1]) begin
          failures++;
          $display("FAIL symbol %0d: got %h want %h", n, {k_out, data_out8b}, eff[n-1]);
        end
      end
      @(negedge clock);
    end
    e1 = n_enc_pulse;
    checks++;
    if (e1 - e0 != n_legal) begin
      failures++;
      $display("FAIL encoder clock pulses %0d, legal symbols %0d", e1 - e0, n_legal);
    end
    checks++;
    // The decoder sees each legal word once plus the held word after each
    // illegal symbol, which is legal too: it pulses in every clock except
    // the first, where it still sees the encoder's reset word (no code).
    if (n_dec_pulse - d0 != n_clk - c0 - 1) begin
      failures++;
      $display("FAIL decoder clock pulses %0d of %0d clocks", n_dec_pulse - d0, n_clk - c0);
    end
    $display("clocks=%0d encoder pulses=%0d (%0d%%) decoder pulses=%0d",
             n_clk - c0, e1 - e0, 100 * (e1 - e0) / (n_clk - c0), n_dec_pulse - d0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
