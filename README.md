# Reconfigurable-modulation cognitive-radio link with Hamming SECDED coding

A cognitive radio has to keep working as the channel changes. It does not
build a separate modulator for every scheme it might use. This design has
one modulation block that acts as a BPSK, QPSK or 16-QAM modulator,
depending on a 2-bit select. A small selector (the "glitter") sets that
select from the noise level of the word being sent. The modulated byte
becomes an 11-bit message (three zero MSBs added) and is protected by an
extended Hamming (16,11) code. This code corrects any single bit error and
detects any double one. The line is upsampled by zero insertion. The
receiver undoes each step: it downsamples, decodes and corrects, then
demodulates under the same select.

The RTL is a clean, synthesizable SystemVerilog version of the RMS-HE
(reconfigurable modulation scheme + Hamming encoder) link described in
"FPGA Implementation of Reconfigurable Modulation Scheme and Hamming
Encoder for Cognitive Radio". The source gives the block structure, the
widths, the selection thresholds and worked examples for the register,
selector, BPSK modulator, encoder, decoder and demodulator. Several blocks
are described only by what they do. Those parts were filled in here and are
marked as this design's choices below.

## The link at a glance

```
             +-----------+  8   +---------+ 2 (select)
 data ---+-->| register  |----->| glitter |---------------+
         |   +-----------+      +---------+               v
         |   +-------------------------+  I/Q   +------------------+
         +-->| serial-to-parallel (I/Q)|------->|  RMS modulator   |
             +-------------------------+        | BPSK|QPSK|16-QAM |
                                                +------------------+
                                                      | 8
                                       {3'b000, .} -> 11
                                                      v
                                           +--------------------+ 16
                                           | Hamming (16,11) enc|----> upsampler
                                           +--------------------+      (word, 0, word, 0 ...)
                                                                          |
        line (16) + slot_mark + link_mod_ctrl (2)   <---------------------+
                       |
                       v
  downsampler -> Hamming (16,11) dec -> low 8 bits -> RMS demodulator -> register -> reciever_out
                 (fix 1 error, flag 2)                 (select = MOD control)
```

Everything runs on a single clock (50 MHz in the source's test set-up).
`ctrl_unit` produces a load strobe every `UPSAMPLE` cycles (default 2)
while `reg_control` is high. So the link carries one byte per two clocks.

Pipeline, counted in clock edges after the edge that loads `data`:

| edge | stage | value becomes visible on |
|---|---|---|
| 0 | input register, I/Q split | `register_tran_out`, `mod_ctrl_out` (combinational select) |
| 1 | RMS modulator | `modulated_out`, `bpsk_out`, `qpsk_out`, `qam_out` |
| 2 | Hamming encoder | `hamming_out` |
| 3 | upsampler | `transmitter_out` (codeword slot, `slot_mark` high) |
| 4 | downsampler | `downsampled_out` |
| 5 | Hamming decoder | `hamming_de_msg`, `hamming_de_out` |
| 6 | demodulator | `demodulated_out` |
| 7 | output register | `reciever_out`, `receiver_valid`, `single_err`, `double_err` |

The latency is 7 cycles from load to output at a throughput of one word
every `UPSAMPLE` cycles. The testbenches check both. The name
`reciever_out` keeps the spelling of the source's signal list.

## Choosing the scheme (glitter)

The registered input word is read as an 8-bit noise level:

| level | select | scheme |
|---|---|---|
| 86 ... 173 (`7'b1010110` ... `8'b10101101`) | `00` | BPSK |
| above 173 | `01` | QPSK |
| below 86 | `10` | 16-QAM |

Both bounds belong to the BPSK band. Code `11` never comes from the
selector; the modulator and demodulator treat it as BPSK. The select
travels with its word through the transmitter pipeline. It is sent beside
the codeword (`link_mod_ctrl`) to the receiver, where it is the
demodulator's "MOD control". The source draws that control input at the
receiver but does not say where it comes from. Sending it with the data is
this design's choice.

## The modulators as bit-level models

Nothing in the link is analog. The modulators work on bits, and a carrier
is a sequence of signs, one per symbol slot. Multiplying a symbol by a
negative carrier sample gives the opposite symbol. This design's carrier
runs at half the symbol rate and is negative on the even slots
(0, 2, 4, ...), so:

* **BPSK**: 8 one-bit symbols. Bit *n* is inverted when *n* is even. The
  source's example follows from this: 10101010 becomes 11111111.
* **QPSK**: 4 dibit symbols `{I, Q} = word[2k+1:2k]`. These are the four
  phases 45/135/225/315 degrees. On even symbols the point turns by 180
  degrees, so both bits are inverted. In the source's QPSK diagram I
  rides a sine and Q a cosine carrier. With one carrier sample per symbol
  the 90-degree offset between the two cannot be expressed. Here both
  channels see the same carrier sign, and the quadrature lives in the
  separate I and Q bit positions.
* **16-QAM**: 2 nibble symbols. I = `word[4k+3:4k+2]`, Q = `word[4k+1:4k]`.
  Each Gray-coded pair selects an amplitude (00 -> -3, 01 -> -1, 11 -> +1,
  10 -> +3). It is sent as the amplitude index 0..3 (offset binary). On
  even symbols the amplitude is negated, which inverts the index.

The three mappings are computed side by side from the I/Q split (odd bits
I, even bits Q). A multiplexer picks the one the select asks for. All
three results are also brought out, as in the source's waveform. Each
mapping is a bijection on 8 bits. The demodulator applies the inverse
under the received select, so every word under every scheme comes back
unchanged; `tb_rms_demodulator` checks all 1024 cases.

The source gives the BPSK example, the QPSK phase set and the QAM
equation. It does not give the QPSK bit layout, the QAM order or the QAM
mapping. Those (16-QAM, Gray levels, offset-binary index, the carrier-sign
rule) are this design's own. Change `rms_pkg` to use other conventions.

## The Hamming (16,11) code

The 11-bit message is `{3'b000, modulated}`. Bit *n* of the codeword
holds Hamming position *n+1*:

```
bit:      15  14 13 12 11 10  9  8   7   6  5  4   3   2   1   0
position: P   15 14 13 12 11 10  9   8   7  6  5   4   3   2   1
content:  all m10 ...            m4  p8  m3 m2 m1  p4  m0  p2  p1
```

Parity bit *p_b* (b = 1, 2, 4, 8) is the XOR of every other position
whose index has bit *b* set. Bit 15 is the XOR of bits 0..14. This layout
reproduces the source's encoder example exactly:
`00011111111 -> 0000111101110111`.

The decoder computes the 4-bit syndrome (the XOR of the indices of all set
positions) and the overall parity:

| syndrome | overall parity | result |
|---|---|---|
| 0 | even | clean word |
| s | odd | single error at position s, flipped back; `single_err` (s = 0: the parity bit itself) |
| s != 0 | even | double error; `double_err`, message passed on uncorrected |

The source also draws the encoder as a chain of outer encoder, data and
parity interleavers, combiner and inner encoder. It describes a decoder
that splits 48 bits into four 12-bit sets around an (8,4) outer code.
Neither structure is specified far enough to build, and neither fits the
16-bit codeword or the worked example. The single extended Hamming code
does both, so that is what is built.

## Upsampling and the line

Each codeword is on the line for one cycle, marked by `slot_mark`. All-zero
words fill the other `UPSAMPLE-1` cycles of the symbol period. The
downsampler keeps only the marked word (with its select) and holds it for
the decoder. The factor 2 matches the source's waveform, where the line
alternates between codeword and zeros at twice the word rate. An
assertion in `upsampler` checks that codewords never come closer together
than `UPSAMPLE` cycles.

The top wires the transmitter to the receiver through an ideal channel.
`chan_err` is XORed onto the line in the codeword slot only, so a test
can put one or two bit errors on the air. Tie it to zero for a clean link.

## Top-level interface (`rms_he_fpga`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst` | in | 1 | clock; synchronous active-high reset of every register |
| `reg_control` | in | 1 | link enable; loads stop while low |
| `data` | in | 8 | word to send, sampled at the edge where `sym_strobe` is high |
| `chan_err` | in | 16 | channel bit errors on the codeword slot (test input) |
| `sym_strobe` | out | 1 | `data` is taken at this edge |
| `mod_ctrl_out` | out | 2 | select chosen for the registered word |
| `register_tran_out`, `modulated_out`, `bpsk_out`, `qpsk_out`, `qam_out` | out | 8 | transmitter internals |
| `hamming_out`, `transmitter_out`, `downsampled_out` | out | 16 | codeword, line, kept codeword |
| `hamming_de_msg` | out | 11 | decoded message |
| `hamming_de_out`, `demodulated_out` | out | 8 | decoded byte, demodulated byte |
| `reciever_out` | out | 8 | received word |
| `receiver_valid` | out | 1 | `reciever_out` has just taken a new word |
| `single_err`, `double_err` | out | 1 | error status of that word |

Parameter: `UPSAMPLE` (default 2), the upsampling factor and symbol period
in cycles. Shared sizes sit in `rms_pkg`; the selector thresholds are parameters of `glitter`.

## How far to trust it, and where it departs from the source

* Every value the source prints for the modules checks out in the
  testbenches: register 10101010; select 00; BPSK 11111111; message
  00011111111; codeword 0000111101110111; decoded 00011111111 / 11111111;
  demodulated 10101010.
* The source's overall waveform shows the modulated word, the three
  scheme outputs and the codeword changing every cycle while the input
  stays 10101010. It also shows a 21-bit counter (`de_count`) in the
  demodulator. That behaviour is not explained and conflicts with the
  per-module examples, so it is not reproduced. Its codeword
  `1000010010110111` is, however, the code above applied to the byte
  01000111.
* QPSK/QAM bit mappings, the I/Q split, the slot strobe, `slot_mark`,
  `link_mod_ctrl`, the error flags and `chan_err` are this design's own.
* The source reports 37-47 flip-flops per device. This RTL registers each
  stage and all three scheme outputs, and uses about 150 flip-flop bits. The
  pipeline registers can be removed without changing the function.
* The interleaved/concatenated encoder and decoder structure, the board's
  switches, LEDs and pin constraints are not built.

## Files

| file | contents |
|---|---|
| `rtl/rms_pkg.sv` | sizes, select enum, I/Q struct, modulation and Hamming functions |
| `rtl/ctrl_unit.sv` | slot counter and load strobe |
| `rtl/data_register.sv` | 8-bit register with write enable (input and output register) |
| `rtl/glitter.sv` | scheme selector |
| `rtl/s2p_conv.sv` | I/Q split register |
| `rtl/rms_modulator.sv`, `rtl/rms_demodulator.sv` | reconfigurable modulator / demodulator |
| `rtl/hamming_encoder.sv`, `rtl/hamming_decoder.sv` | extended Hamming (16,11) |
| `rtl/upsampler.sv`, `rtl/downsampler.sv` | zero insertion and removal |
| `rtl/cr_transmitter.sv`, `rtl/cr_receiver.sv` | the two halves of the link |
| `rtl/rms_he_fpga.sv` | top: transmitter, channel, receiver |
| `tb/tb_ref_pkg.sv` | independent reference models (integer constellations, parity-check matrix) |
| `tb/tb_<module>.sv` | one self-checking testbench per module |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops. With
Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
  rtl/rms_pkg.sv tb/tb_ref_pkg.sv tb/tb_rms_he_fpga.sv \
  --top-module tb_rms_he_fpga -o sim && ./obj_dir/sim
```

Replace `tb_rms_he_fpga` with any other testbench. `tb_rms_he_fpga` runs
the whole link at default parameters. It sends the worked example and
then a stream of 1200 random words with random channel errors, a pause and
a mid-stream reset. It checks every word, the 7-cycle latency and the
2-cycle throughput. It also counts that each mechanism occurred: each
scheme, scheme changes, zero slots, corrected and flagged words, pause,
reset. The unit testbenches are exhaustive where the input space allows
it: all 256 noise levels, all 256 x 4 modulator and demodulator cases, all
2048 messages with all 16 single errors.

## Changing it

* Other thresholds: the `NOISE_LOW` / `NOISE_HIGH` parameters of
  `glitter` (defaults 86 and 173).
* Other constellations or carrier rules: `bpsk_mod`, `qpsk_mod` and
  `qam_mod` and their inverses in `rms_pkg`, and the matching reference
  in `tb/tb_ref_pkg.sv`.
* Another upsampling factor: the `UPSAMPLE` parameter of `rms_he_fpga`.
  The throughput becomes one word per `UPSAMPLE` cycles; the latency stays
  7 cycles.
