// tb_usb3_phy -- end-to-end testbench of usb3_phy.
//
// The serial output is looped back to the serial input through a delay line
// of selectable length, which stands in for the channel. Bytes and command
// symbols enter the transmit side once per symbol clock; the bytes coming out
// of the receive side must be the same stream, delayed by a fixed number of
// symbol clocks. The clocks follow the PHY's convention: clk_bit is ten
// times clk_word and clk_word changes at falling edges of clk_bit.
//
// Mechanisms driven and counted (each must occur at least once):
//   comma alignment      the receiver locks on the first K28.5;
//   command symbols      K symbols are sent and come back with rx_k = 1;
//   disparity changes    unbalanced words flip the running disparity;
//   invalid tx symbols   k = 1 with a non-command byte: the encoder keeps its
//                        previous word, so that word is sent again;
//   invalid rx words     the channel is forced to zeros for 20 bits; the
//                        decoder sees a non-code word and holds its output
//                        while the sent symbols change;
//   realignment          the channel delay grows by three bits; the next
//                        comma moves the receiver's symbol boundary.
// An invalid command is only sent after a balanced word: after an unbalanced
// one, the repeated word breaks the disparity rule on the line and can form a
// false comma across the symbol boundary.
// Commas are sent every 32 symbols, as a link sends them in its ordered sets.
module tb_usb3_phy;
  import ref_8b10b_pkg::*;

  localparam int NSYM   = 3000;
  localparam int ERR_AT = 1200;   // symbol index of the channel error
  localparam int SLIP_AT = 2000;  // symbol index of the delay change

  logic       clk_word = 1'b0, clk_bit = 1'b0, reset_n = 1'b1;
  logic [7:0] tx_data = '0;
  logic       tx_k = 1'b0;
  logic [9:0] tx_symbol;
  logic       tx_serial, rx_serial;
  logic [7:0] rx_data;
  logic       rx_k, rx_aligned, rx_realign;

  usb3_phy dut (.*);

  int checks = 0, failures = 0;
  int n_align = 0, n_k = 0, n_rdflip = 0, n_tx_invalid = 0, n_rx_invalid = 0, n_realign = 0;

  // Clocks: clk_bit period 2, clk_word period 20, word edges on bit falls.
  always #1 clk_bit = ~clk_bit;
  always #10 clk_word = ~clk_word;

  // Channel: delay line with a force-to-zero switch.
  logic [15:0] line = '0;
  int          delay = 1;
  logic        force_zero = 1'b0;
  always @(posedge clk_bit) line <= {line[14:0], tx_serial};
  assign rx_serial = force_zero ? 1'b0 : line[delay-1];

  initial begin
    repeat (NSYM + 200) @(posedge clk_word);
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

  // Per symbol clock: what the transmitter effectively sent, what came back.
  logic [8:0] eff [NSYM + 20];
  logic [8:0] obs [NSYM + 20];
  logic       obs_aligned [NSYM + 20];

  always @(posedge clk_bit) if (rx_realign) n_realign++;

  // Find the latency of a stretch of symbols: the L for which every
  // observed symbol equals the one sent L clocks earlier.
  function automatic int find_latency(input int from, input int to);
    for (int l = 1; l <= 8; l++) begin
      bit ok = 1;
      for (int n = from; n < to; n++) if (obs[n] !== eff[n - l]) ok = 0;
      if (ok) return l;
    end
    return -1;
  endfunction

  initial begin
    static logic [8:0] last = 9'h000;
    static logic       rd = 1'b0;
    static logic [9:0] last_word = '0;
    int         lat_a, lat_b;
    #0.5 reset_n = 1'b0;
    #25 reset_n = 1'b1;
    for (int n = 0; n < NSYM + 20; n++) begin
      logic kk;
      logic [7:0] b;
      @(negedge clk_word);
      // Choose the symbol for clock n.
      if (n % 32 == 0)                  begin kk = 1; b = 8'hBC; end
      else if (popcount10(last_word) == 5 && $urandom_range(0, 9) == 0) begin
        // Invalid command byte, only after a balanced word: the encoder then
        // repeats that word, which keeps the line's disparity legal.
        do b = 8'($urandom); while (k_index(b) >= 0);
        kk = 1;
      end
      else if ($urandom_range(0, 9) == 0)  begin kk = 1; b = KB[$urandom_range(0, 6)]; end
      else                                 begin kk = 0; b = 8'($urandom); end
      tx_k = kk;
      tx_data = b;
      if (kk && k_index(b) < 0) n_tx_invalid++;
      else begin
        automatic logic [9:0] w = ref_encode(kk, b, rd);
        if (ref_rd_next(w, rd) != rd) n_rdflip++;
        rd = ref_rd_next(w, rd);
        last = {kk, b};
        last_word = w;
        if (kk) n_k++;
      end
      eff[n] = last;
      // Channel events.
      if (n == ERR_AT)     force_zero = 1'b1;
      if (n == ERR_AT + 2) force_zero = 1'b0;
      if (n == SLIP_AT)    delay = 4;
      @(posedge clk_word);
      #0.5;
      // Transmit side: the encoder word follows the reference one clock on.
      check(tx_symbol == last_word, $sformatf("tx word %b want %b", tx_symbol, last_word));
      obs[n] = {rx_k, rx_data};
      obs_aligned[n] = rx_aligned;
    end
    for (int n = 0; n < NSYM + 20; n++) if (obs_aligned[n]) begin n_align++; break; end
    // Stretch before the error, between error and slip, after the slip.
    lat_a = find_latency(64, ERR_AT);
    check(lat_a inside {2, 3}, "received stream matches before the channel error, 2-3 clocks late");
    // The zeroed stretch must make the receiver hold its output: the sent
    // symbols change but the received ones do not.
    for (int n = ERR_AT; n < ERR_AT + 6; n++)
      if (obs[n] == obs[n-1] && eff[n-lat_a] != eff[n-1-lat_a]) n_rx_invalid++;
    check(find_latency(ERR_AT + 10, SLIP_AT) == lat_a, "stream resumes after the channel error");
    lat_b = find_latency(SLIP_AT + 40, NSYM + 20);
    check(lat_b > 0, "stream matches after realignment");
    for (int n = 64; n < ERR_AT; n++) check(obs[n] == eff[n - lat_a], "symbol");
    $display("latency %0d symbol clocks, after the slip %0d", lat_a, lat_b);
    $display("align=%0d k=%0d rdflip=%0d tx_invalid=%0d rx_invalid=%0d realign=%0d",
             n_align, n_k, n_rdflip, n_tx_invalid, n_rx_invalid, n_realign);
    check(n_align > 0, "alignment happened");
    check(n_k > 0, "command symbols sent");
    check(n_rdflip > 0, "disparity changed");
    check(n_tx_invalid > 0, "invalid transmit symbols");
    check(n_rx_invalid > 0, "invalid received words");
    check(n_realign == 1, "exactly one realignment, after the delay change");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
