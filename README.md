# SuperSpeed USB PHY datapath with a table-lookup, clock-gated 8b/10b codec

A SuperSpeed USB lane sends 8b/10b-coded symbols. Each byte, or each of
twelve control ("command", K) symbols, becomes a 10-bit word with a bounded
DC balance and enough transitions for clock recovery. This design implements
that code in a low-power style with three parts:

* **Lookup instead of logic.** The encoder reads the 10-bit word from a
  256-word code memory addressed by the byte. The decoder reads the byte from
  a 1024-word memory addressed by the received word.
* **The enable is made inside.** A small "clock generator" in front of each
  memory decides whether the input is a legal symbol. Only for a legal symbol
  does it let a clock pulse through to the output register. An illegal input
  causes no switching at all: the output simply keeps its previous value.
* **No extra pins.** There is no enable input and no error output. An illegal
  symbol is never coded or decoded.

Around the codec sits a minimal PHY datapath. A serializer and a
comma-aligning deserializer connect it to a 1-bit line. This gives a complete
loop from transmit byte to receive byte.

```
 tx_data,tx_k ──► encoder_8b10b ──tx_symbol──► serializer ──► tx_serial
                  ├ enc_clock_gen  (valid? gate clock; K words)
                  └ enc_ram        (256 × {code at RD-, code at RD+})

 rx_data,rx_k ◄── decoder_10b8b ◄──word────── deserializer ◄── rx_serial
                  ├ dec_ram        (1024 × {valid, byte})        (K28.5 alignment)
                  └ dec_clock_gen  (valid? gate clock; K words → code_out)
```

## Code conventions

* Byte `HGFEDCBA`, with `A` in bit 0. The five-bit part `x = EDCBA` becomes
  the six bits `abcdei`, and the three-bit part `y = HGF` becomes `fghj`.
* A 10-bit word is `logic [9:0]` with `a` in bit 9. A word printed in binary
  therefore reads `abcdeifghj`, which is also the order on the line (`a`
  first). For example, D0.0 at negative disparity is `1001110100`, and K28.5
  is `0011111010` (negative) / `1100000101` (positive).
* Running disparity (RD) is 1 for positive. It is negative after reset.
* The twelve command bytes are K28.0–K28.7 (`1C 3C 5C 7C 9C BC DC FC`), K23.7
  (`F7`), K27.7 (`FB`), K29.7 (`FD`) and K30.7 (`FE`). With `k = 1`, every
  other byte is illegal.

`rtl/usb3_8b10b_pkg.sv` holds the standard 5b/6b and 3b/4b tables as
functions. They only fill the memories at time zero, the way an
initialisation file fills a ROM. The datapath itself never computes a code.

## The encoder (`encoder_8b10b`)

In every clock:

1. `enc_clock_gen` checks the symbol. With `k = 0`, any byte is legal. With
   `k = 1`, only the twelve command bytes are legal. The result is the enable
   of a latch-based clock gate (`clock_gate`: a latch that is transparent
   while the clock is low, then an AND gate). The same block also supplies
   the negative-RD word of a command byte.
2. `enc_ram` returns both disparity forms of the byte's data code. Both forms
   are stored (20 bits per word) because the positive form is not always the
   complement of the negative one: the D.x.A7 alternates differ.
3. A mux takes the command word when `k = 1` and the data word otherwise.
   The current RD then picks the form. For command words, the positive form
   is the complement of the negative form.
4. The output register and the RD register run on the gated clock. A legal
   symbol appears on `data_out10b` right after the rising edge that sampled
   it, and RD moves on. For an illegal symbol nothing is clocked, so the
   output word and RD stay as they were.

Latency is one clock, with one symbol per clock.

## The decoder (`decoder_10b8b`)

* `dec_ram` has one entry per possible 10-bit word. Each entry is a valid
  flag and the data byte. Its valid flag marks the 440 distinct data words,
  which covers both disparity forms of every byte (many bytes use one word
  for both).
* `dec_clock_gen` matches the 24 command words (12 symbols × 2 forms). For a
  command word it outputs the command byte (`code_out`) and a K flag. Its
  clock gate opens when the word is a command or when the memory flags it as
  data.
* A mux selects the command byte when the word is a command, and the
  memory's byte otherwise. The gated output register latches the result and
  `k_out`.

464 of the 1024 words are accepted. The other 560 produce no clock pulse, so
`data_out8b` and `k_out` keep their previous values. Disparity is not
checked: a data word of the wrong disparity still decodes to its byte. There
is no error output.

Latency is one clock, with one word per clock.

## Clock gating and simulation

Each gated register is clocked by `clk & en_latched`. Every input the clock
generators check comes from outside the codec or from registers in another
clock domain. No register on the ungated clock feeds a gated register in the
same instant, so no event-ordering race occurs between the raw clock and the
gated clock. In the PHY, the encoder's inputs come from the link side. The
decoder's input is the deserializer's word register, which changes on
bit-clock edges that never coincide with symbol-clock edges (see below).

`clock_gate` contains the design's only latch. It is intended: the
standard-cell equivalent is an integrated clock-gating cell.

## The serial side (`serializer`, `deserializer`, `usb3_phy`)

* **Clocks.** `clk_bit` runs at 10 × `clk_word`, is phase locked to it, and
  comes from outside (PLL and clock recovery are not part of the RTL). The
  design requires `clk_word` edges to fall on falling edges of `clk_bit`. The
  testbenches generate the clocks this way.
* **Serializer.** A free-running bit counter, started by reset, loads
  `tx_symbol` every tenth bit clock. It then shifts the word out with `a`
  first. `tx_symbol` is stable for a whole symbol period, so the load point
  only needs a fixed phase.
* **Deserializer.** Shifts bits into a 10-bit window. When the window holds
  K28.5 (either form), that position becomes the symbol boundary and
  `aligned` rises. From then on a word is taken every ten bits. A comma at a
  different position moves the boundary and pulses `realign`. Before the
  first comma, no word is delivered.
* **Latency.** From a symbol at the transmit input to the byte at the
  receive output, in loopback, latency is 2–3 symbol clocks. The value
  depends on the channel delay and the counter phase. The end-to-end test
  measures 2, and 3 after it lengthens the channel by 3 bits.

**Hazard from holding the output.** When the link presents an illegal
symbol, the encoder's held word is serialized a second time. If that word is
unbalanced, the line breaks the disparity rule. Some such pairs contain the
K28.5 pattern across the symbol boundary. An example is
`1110100011 1110100011` (D23.3 sent twice), which contains `0011111010`. The
receiver then realigns to a false boundary. Held balanced words are
harmless. The link layer should present only legal symbols, or the
serializer should send something else (for example an idle symbol) in place
of a repeated word. The latter is a change to this design.

## Where this design departs from, or adds to, what it was built from

* **Encoder and decoder:** built as described (memory lookup, internal
  validity check gating the clock, no enable or error pins), plus these
  additions:
  * running-disparity tracking in the encoder;
  * both forms stored per byte;
  * the choice of the twelve standard command symbols;
  * reset values: output 0, RD negative.
* **Mux polarity.** The original description's sentence about the decoder's mux can be
  read with the selection inverted. This design selects the command byte
  when `k_out = 1`.
* **Valid-word count.** The original description quotes 536 valid decoder inputs out of
  1024, which counts two forms for each of the 268 symbols. The number of
  distinct valid words is 464, and exactly those are accepted.
* **Memory type.** The memories are called RAM, but no write path is
  described. Here they are arrays with fixed contents and no write port.
* **This design's own:** the serializer, the deserializer with comma
  alignment, the two-clock scheme and the byte-wide link ports. The original description
  only names the PIPE interface between PHY and link layer, so the
  `tx_data/tx_k/rx_data/rx_k` ports stand in for it.
* **Not built:**
  * the analog differential driver and receiver;
  * the PLL and clock/data recovery;
  * the USB 2.0 PHY that sits beside the SuperSpeed path;
  * PIPE signalling beyond data and K flag;
  * power measurement.

The original description reports on-chip power reductions of 25 % (encoder) and 31.96 %
(decoder) at 250 MHz on an FPGA. These figures are not reproduced here.

## Files

| file | contents |
|---|---|
| `rtl/usb3_8b10b_pkg.sv` | types, 8b/10b tables as functions, comma words |
| `rtl/clock_gate.sv` | latch-based clock gate |
| `rtl/enc_clock_gen.sv`, `rtl/enc_ram.sv`, `rtl/encoder_8b10b.sv` | encoder |
| `rtl/dec_clock_gen.sv`, `rtl/dec_ram.sv`, `rtl/decoder_10b8b.sv` | decoder |
| `rtl/serializer.sv`, `rtl/deserializer.sv` | serial conversion and alignment |
| `rtl/usb3_phy.sv` | top: the two paths wired together |
| `tb/ref_8b10b_pkg.sv` | independent reference code model (both table columns spelled out) |
| `tb/tb_<module>.sv` | one self-checking testbench per module |
| `tb/tb_codec_250mhz.sv` | workload test: encoder into decoder at 250 MHz, clock-gating activity |

## Verification

Every testbench prints `TB_RESULT checks=N failures=M` and has a watchdog.

* `tb_encoder_8b10b`: all 256 bytes, all 12 commands, and 4000 random
  symbols (10 % illegal), compared with the reference model. It checks the
  one-clock latency, that an illegal symbol holds the output, word balance,
  that no run exceeds five equal bits, and asynchronous reset.
* `tb_decoder_10b8b`: all 1024 words plus a random stream. It checks the
  hold-on-invalid behaviour and the one-clock latency.
* `tb_enc_ram`, `tb_dec_ram`, `tb_enc_clock_gen`, `tb_dec_clock_gen`:
  exhaustive over their address or input spaces. The clock-generator
  testbenches count gated-clock pulses.
* `tb_serializer`, `tb_deserializer`: bit order and timing, alignment from an
  arbitrary bit offset, and realignment after a bit slip.
* `tb_usb3_phy`: a full-size loopback of 3000 symbols through a channel
  model, with periodic commas. Each mechanism is counted and required:
  * comma alignment;
  * command symbols;
  * disparity changes;
  * illegal transmit symbols (held word);
  * a 20-bit zero burst, so the decoder holds;
  * a 3-bit channel slip that forces one realignment.

  It also checks that the received stream equals the sent one at constant
  latency, before and after each event.

* `tb_codec_250mhz`: the encoder drives the decoder directly with a 4 ns
  (250 MHz) clock. It sends 10000 symbols, one in eight of them an illegal
  command. It checks the round trip at two clocks of latency, and that the
  encoder's gated clock pulses exactly once per legal symbol (about 87 % of
  clocks in this mix). This is the switching the clock gating removes.

To run one with Verilator 5 from the project root:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -Itb -y rtl -y tb \
    rtl/usb3_8b10b_pkg.sv tb/ref_8b10b_pkg.sv tb/tb_usb3_phy.sv --top-module tb_usb3_phy
./obj_dir/Vtb_usb3_phy
```

Replace `tb_usb3_phy` with any other testbench name. The testbenches use
delays of fractions of a time unit and assume a 1 ns unit. The files carry no
timescale of their own, so pass `--timescale 1ns/1ps`. Every run finishes in
well under a second.
