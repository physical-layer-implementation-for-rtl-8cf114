// usb3_phy -- SuperSpeed USB physical-layer datapath with the memory-based,
// clock-gated 8b/10b encoder and 10b/8b decoder.
//
// Transmit path: a byte and its command flag from the link side enter the
// encoder_8b10b once per symbol clock. The ten-bit code word goes to the
// serializer, which sends it bit by bit at ten times the symbol rate
// (5 Gb/s on a SuperSpeed lane) towards the differential line driver.
// Receive path: bits from the differential receiver enter the deserializer,
// which finds the symbol boundary on the K28.5 comma and hands aligned words
// to decoder_10b8b, which returns byte and command flag.
// Symbols the encoder rejects (a command flag with a byte that is no command)
// are never sent: the encoder keeps its previous word, so the serializer
// sends that word again. Words the decoder rejects leave rx_data / rx_k
// unchanged. Caution: repeating an unbalanced word breaks the disparity rule
// on the line, and some such pairs form a false K28.5 comma across the
// symbol boundary, which makes the receiver realign. The link layer should
// therefore only present valid symbols.
//
// The encoder and decoder follow the described low-power design (memory
// lookup, validity check that gates the clock, no enable or error pins).
// The serial converters, the comma alignment and the clocking scheme are
// this design's own, since only a transmit/receive pair at 5 Gb/s is named.
//
// Not in this module: the analog line driver and receiver, the PLL and the
// clock/data recovery (clk_word and clk_bit come from outside, with
// clk_bit = 10 x clk_word, phase locked, and clk_word edges at falling edges
// of clk_bit), the USB 2.0 PHY and the PIPE bus framing; the byte ports stand
// in for the PIPE data bus.
//
// Interface: see the port list. Latency, transmit: one symbol clock to
// tx_symbol, then ten bit clocks on tx_serial. Receive: one symbol clock from
// a word leaving the deserializer to rx_data.
module usb3_phy
  import usb3_8b10b_pkg::*;
(
  input  logic  clk_word,
  input  logic  clk_bit,
  input  logic  reset_n,
  // transmit, link side
  input  byte_t tx_data,
  input  logic  tx_k,
  output code_t tx_symbol,
  // transmit, line side
  output logic  tx_serial,
  // receive, line side
  input  logic  rx_serial,
  // receive, link side
  output byte_t rx_data,
  output logic  rx_k,
  output logic  rx_aligned,
  output logic  rx_realign
);
  code_t rx_word;

  encoder_8b10b u_encoder (
    .clock(clk_word), .reset_n(reset_n), .k(tx_k), .data_in8b(tx_data),
    .data_out10b(tx_symbol)
  );

  serializer u_serializer (
    .clk_bit(clk_bit), .reset_n(reset_n), .word_in(tx_symbol), .serial_out(tx_serial)
  );

  deserializer u_deserializer (
    .clk_bit(clk_bit), .reset_n(reset_n), .serial_in(rx_serial),
    .word_out(rx_word), .aligned(rx_aligned), .realign(rx_realign)
  );

  decoder_10b8b u_decoder (
    .clock(clk_word), .reset_n(reset_n), .data_in10b(rx_word),
    .data_out8b(rx_data), .k_out(rx_k)
  );
endmodule
