# A (24,14) burst-correcting cyclic codec for an FSK data link

Noise on a frequency-shift-keyed radio link often corrupts several neighbouring
bits at once, not just isolated ones. This codec protects 24-bit words against
that kind of damage. Each word carries 14 message bits and 10 parity bits.
The decoder repairs any *burst* of up to 5 bits: any damaged stretch no more
than 5 bits long, whose first and last bits are wrong and whose bits in
between may or may not be. It needs only a few shift registers and about
twenty XOR gates, because the code is cyclic: encoding and checking are both
polynomial division, and one serial circuit can correct every bit position.

The design follows the burst-correcting codec of the 1973 report *Coding for
Frequency-Shift-Keyed (FSK) Communication System* (J. J. Komo), which was
built there from TTL parts. This RTL keeps that circuit's structure, taps
and gate count. It adds a bit-strobe interface, continuous word timing and a
bench error injector. Each of these is listed below, under
"Where this RTL departs from the original".

## The code

Bits are coefficients of polynomials over GF(2). Bit *i* of a word is the
coefficient of X^i. Words are sent with the highest order bit, X^23, first.

* Generator polynomial: g(X) = 1 + X^3 + X^4 + X^5 + X^7 + X^8 + X^10.
  This is a computer-found burst-5 code of natural length 27, with 17
  message bits. It is shortened here to 24 bits by leaving out 3 message bits.
  g(X) has period 341: X^341 = 1 mod g(X). Strictly, then, the code is the
  length-341 cyclic code shortened by 317 bits.
* Encoding is systematic: v(X) = X^10 m(X) + (X^10 m(X) mod g(X)). The
  message occupies X^23..X^10 and the parity X^9..X^0.
* Its 10 x 24 parity check matrix is H = [I | P], where column *c* is X^c mod g(X).
  The testbenches use H as a reference that does not depend on the circuits.
* Ten parity bits are the minimum for burst length 5 (n - k >= 2l), so
  the code is optimal in that sense.

`rtl/code_pkg.sv` holds these constants, with the polynomials as bit vectors.
The X^10 term of g is implied.

## Encoder (`cyclic_encoder`)

The encoder is a 10-stage division register with a gate (G1) on its feedback
and a two-way output switch:

* **Bits 0-13 (switch at A, G1 on):** each message bit goes straight to the
  output. It is also added to the top stage and fed back into stage 0 and
  in front of stages 3, 4, 5, 7 and 8. That makes six XOR gates, as in the
  built encoder.
* **Bits 14-23 (switch at B, G1 off):** the register just shifts, and its
  top stage, the parity p9..p0, goes to the output.

After 24 bit times the register is empty and the next word starts at once.
`msg_take` tells the source when a message bit is consumed. The encoder
therefore takes 14 message bits in every 24 bit times.

## Error-trapping decoder (`burst_trap_decoder`)

This part is the one that needs explaining. The decoder has a 24-stage buffer
and a 10-stage syndrome register that divides by g(X). It works in two steps
of 24 bit times each.

**Step 1, receive (`phase = PH_RECEIVE`).** The received bits go into the
buffer. They also go into the syndrome register, but not at its top as in a
plain divider. They enter at the stages given by the *connection polynomial*

    C(X) = X^(10+317) mod g(X) = 1 + X + X^2 + X^5 + X^7 + X^9

At the end of the step the register holds C(X) r(X) mod g(X). C multiplies
the word by X^10 and also by X^317, the number of positions the code was
shortened by. As a result, an error in bit X^23 has the syndrome X^9, a one
in the top stage only. More generally, a burst that covers bits X^19..X^23
appears unchanged in the top five stages S5..S9, and the low stages are zero.
That is what lets the decoder correct the bit that leaves the buffer first.

**Step 2, correct (`phase = PH_CORRECT`).** The input is cut off (gate G2).
The buffer shifts out, X^23 first, and the syndrome register keeps shifting.
Each shift multiplies the syndrome by X. A burst lower in the word therefore
climbs towards the top one position per shift, and it reaches S5..S9 exactly
when its highest bit is at the buffer output. A 6-input NOR watches S0..S4
and the inverted S9. Its output `corr` is high when the five low stages are
zero and S9 is one. `corr` then does two things:

* It inverts the bit leaving the buffer.
* It cancels the feedback from S9 through G1. The corrected error therefore
  leaves the register instead of being divided back in.

The rest of the burst follows on the next shifts. A zero inside the burst
(pattern 11011, for example) simply gives no correction in that bit time.
Once the burst is out the register is zero and nothing else changes. For a
correctable word the register always ends at zero.

The shortened code corrects every burst of length 5 or less and never traps
the wrong pattern. The testbench checks this for all 335 such bursts. That
count is 24 single errors, 23 bursts of length 2, 2·22 of length 3, 4·21 of
length 4 and 8·20 of length 5.

Counting gates as built: 11 XORs in the syndrome register, 1 for the output
correction and 1 for the feedback cut make thirteen. With the 6-input NOR,
this matches the original board.

The module is generic in N, K, L, g and C. With L = 1 it is the single-error
trapping decoder, because the NOR then tests all stages but the top one.

**Timing.** A word comes out 24 bit times after its first bit entered. A
single decoder cannot receive while it corrects, so alone it needs 48 bit
times per word. `word_first` must be high in the first bit time of each step.
At the start of step 1 it clears the syndrome register.

## Real-time operation with two decoders (`realtime_decoder`)

To keep up with a continuous stream, two decoders work in turn. An input
switch sends the incoming word to one decoder (step 1). An output switch takes
the corrected previous word from the other (step 2). Both switches change
position after every word (`sel`).

The output is exactly one word behind the input. During the first word after
reset nothing is valid (`out_valid` is low). After that, bit *j* of word
time *i+1* is bit *j* of received word *i*, corrected.

## Bench error simulator and displays

* `error_simulator` inverts the bits of a 5-bit `err_pattern` placed with its
  lowest bit at X^`err_pos`. Bits that would fall above X^23 are dropped. The
  controls are sampled at the first bit of each word and held for that word.
  It exists to show the codec working without a radio.
* `word_display` collects a serial word and holds it for LEDs. The top has one
  for the encoded word and one for the corrected word.

## Top level (`fsk_burst_codec`)

```
msg_bit -> cyclic_encoder -> tx_bit ----------------------> (FSK modulator)
                          \-> error_simulator --\
rx_ext_bit (FSK detector) ----------------------+- rx_sel -> realtime_decoder -> dec_bit
```

| port | dir | meaning |
|---|---|---|
| `clk`, `rst_n` | in | clock; synchronous active-low reset |
| `bit_en` | in | one bit time elapses on this clock edge; hold low to pause |
| `msg_bit` / `msg_take` | in / out | message bit, consumed when `msg_take` is high (14 of every 24 bit times) |
| `tx_bit` | out | code bit for the modulator |
| `rx_ext_bit`, `rx_sel` | in | received bit from a detector; `rx_sel`=1 decodes it, 0 decodes the simulator output |
| `err_en`, `err_pattern[4:0]`, `err_pos[4:0]` | in | simulator burst for the current word |
| `dec_bit`, `dec_valid`, `dec_first` | out | corrected code word stream, one word behind; message = first 14 bits |
| `dec_corr`, `dec_sel` | out | bit being corrected; which decoder is receiving |
| `tx_word[23:0]`, `dec_word[23:0]` | out | last encoded / last corrected word, bit *i* = X^i |

All blocks count the same `bit_en` strobes from reset, so their word
boundaries line up without any framing signal. Outputs marked
combinational in the module headers belong to the bit time being clocked.
Sample them before the edge that has `bit_en` high.

## Where this RTL departs from the original

* **Continuous words.** The original counters counted 14 or 24 pulses and
  then held until a clear button was pressed. Here all counters wrap, so words
  follow each other without gaps.
* **Syndrome clear per word.** The decoder clears its syndrome register at the
  start of every receive step. A word with an uncorrectable error then cannot
  disturb the next one. The original relied on the manual clear.
* **Bit strobe and flags.** `bit_en`, `msg_take`, `out_valid`/`dec_valid` and
  the first/last flags are this design's interface. The original had a raw
  clock input.
* **Switch control.** The encoder's monostable and JK flip-flop became a
  synchronous compare of the bit counter with 14.
* **Error simulator.** Only the purpose of the original simulator boards is
  known. The XOR burst injector here is this design's own.
* **Not built:**
  * the analog coherent FSK modulator and detector, whose serial signals are
    ports here;
  * the LEDs.
* **Alternatives of the original study that are not built:**
  * the (24,14) double-random-error decoder with its covering-polynomial test;
  * the parallel ("noncyclic block") encoder and decoder for the same code,
    which use a 10-to-1024 line syndrome decoder. They are faster but much
    larger, and the serial cyclic form was preferred.

## Other codes

`cyclic_encoder` and `burst_trap_decoder` take N, K, L, G and C as
parameters. To get C for a code shortened from natural length *e*, compute
X^(N-K + e-N) mod g(X). Three other settings from the same study run in
the decoder testbench:

* the (48,40) burst-3 code: g = 1+X+X^2+X^5+X^8 (`G = 8'b0010_0111`) and
  C = X^2+X^5+X^6+X^7 (`C = 8'b1110_0100`);
* the same code built on the reciprocal generator, g = 1+X^3+X^6+X^7+X^8
  (`G = 8'b1100_1001`) with C = 1+X^3+X^5 (`C = 8'b0010_1001`) and L = 3.
  The original circuit diagram of the (48,40) burst decoder is drawn this
  way, while its text gives the polynomial above. Both versions correct
  every burst of 3 bits or less;
* the (48,40) single-error code: the same g and C as the reciprocal version,
  with L = 1.

## Verification

Each testbench checks against values it computes itself, prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | what it checks |
|---|---|
| `tb_code_pkg` | g reproduces every column of H; the period of g is 341; C = X^327 mod g |
| `tb_bit_counter` | count/first/last against a software counter, random strobes, reset |
| `tb_cyclic_encoder` | 230 words against the H-matrix encoding; 14 message bits per 24 code bits; pauses in `bit_en` |
| `tb_burst_trap_decoder` | every burst up to 5 bits at every position for (24,14), plus the three (48,40) settings; correction count equals burst weight; syndrome ends at zero; recovery after a noise word |
| `tb_realtime_decoder` | 300 back-to-back words with random bursts; exactly one word of latency; both decoders correct |
| `tb_error_simulator` | every output bit, including bursts clipped at the top of the word |
| `tb_word_display` | shown word and hold behaviour |
| `tb_fsk_burst_codec` | whole codec at its real size, 300 words, through the simulator and through the external receive port. Counts corrections of each burst length 1-5, clean words and the use of both decoders |

`tb/code_ref_pkg.sv` holds the H-matrix reference model, and `tb/dec_harness.sv`
holds the decoder driver. To run a testbench with Verilator 5, from the
directory holding `rtl/` and `tb/`:

```
verilator --binary --timing -Irtl -Itb -y rtl -y tb +libext+.sv \
  rtl/code_pkg.sv tb/code_ref_pkg.sv tb/tb_fsk_burst_codec.sv \
  --top-module tb_fsk_burst_codec -o sim
./obj_dir/sim
```

Every testbench finishes in well under a second.
