# ACA1: a binary arithmetic coder that codes two symbols per window

This is synthesizable SystemVerilog for an encoder and a decoder of the
ACA1 binary arithmetic coder. The coder targets bilevel images such as fax
pages. It belongs to the Q-coder family: an adaptive coder with a 10-symbol
context, a table of LPS probability estimates, and a code register that is
written out a byte at a time. Compared with the Q-coder it does less
arithmetic, for a small loss in compression, through two changes:

* **The code register moves only on the LPS path.** A decision is coded as

      A = A - Q
      if (LPS) { C = C + A; A = Q }
      if (A < 0x1000) renormalise

  Most decisions are MPS (more probable symbol), and they cost a single
  subtraction. The decoder mirrors this step:
  `A = A - Q; if (D >= A) { LPS; D = D - A; A = Q }`.
* **Symbols are taken in non-overlapping pairs, and a pair of two MPS is
  coded as one MPS.** The second MPS is simply dropped. With the roughly
  90 % MPS content of typical pages, about half of all decisions
  disappear.

## Windows and flag decisions

Dropping the second MPS makes the decoded decision stream ambiguous. Take a
decoded `MPS` followed by `LPS`. It could come from a window "MPS LPS", or
from a dropped pair "MPS MPS" followed by a window that starts with an LPS.
The encoder adds a **flag decision** in exactly those two situations, so the
decoder can tell them apart:

| window (sym1 sym2)           | previous window dropped? | decisions coded                   |
|------------------------------|--------------------------|-----------------------------------|
| MPS MPS                      | any                      | sym1 only (sym2 dropped)          |
| MPS LPS                      | any                      | sym1, sym2, flag = LPS            |
| LPS x                        | no                       | sym1, sym2                        |
| LPS x                        | yes                      | sym1, flag = MPS, sym2            |

The flag decisions use their own one-bit context, so they do not disturb
the statistics of the image contexts. In this design the flag context is
the sense of the previous flag decision. A regular symbol is shifted into
the 10-bit context register only when it is actually coded. A dropped MPS
never enters the context. Because of this, the decoder can look up the
second symbol of a pair in the same context whether or not the pair turns
out to have been dropped.

The decoder keeps two state bits, `mps_flag` and `lps_flag`, and a
two-symbol buffer `buf`. A decoded MPS with `mps_flag = 0` only fills
`buf` with "MPS, MPS of the context that now includes this MPS" and sets
`mps_flag`. The pair is released by the next decision:

* another MPS outputs `buf` and refills it;
* an LPS makes the decoder decode a flag:
  * flag MPS: output `buf[0] buf[1] LPS` and set `lps_flag`, because the
    LPS opens a new window;
  * flag LPS: output `buf[0] LPS`; the LPS was the second symbol of the
    window.

An LPS with neither flag pending toggles `lps_flag` and outputs LPS. An MPS
with `lps_flag = 1` outputs MPS and clears `lps_flag`; that MPS was the
second symbol of a window that began with an LPS.

So one decision yields 0 to 3 output symbols. `aca_dec_coder.sv` lists the
rules in the order in which they are checked.

**End of stream.** Suppose the last window was dropped. A buffered pair
would then have no later decision to release it. In that case the encoder
codes one extra MPS decision in the current context, and the normal
"MPS with `mps_flag = 1`" rule releases the pair. The decoder is told how
many windows to produce (`dec_n_windows`) and ignores anything after them.

## Code register, byte output and bit stuffing

This is the hardest part of the datapath. The encoder keeps:

* **A**: 13 bits, normalised to `[0x1000, 0x1FFF]`. Renormalisation starts
  when its top bit is 0.
* **Q**: 12 bits.
* **C**: 25 bits.
  * Bits 12..0 line up with A.
  * Bits 15..13 are spacer bits that soak up carries.
  * Bits 23..16 form the next byte.
  * Bit 24 is a carry into the byte held in B.
* **B**: 8 bits, the byte waiting for possible carries.
* **bufout**: 8 bits, the byte offered to the receiver.

`C = C + A` takes two cycles. First the 13-bit adder adds A to C[12:0].
Then the 12-bit incrementer adds the adder's carry out to C[24:13].

A 4-bit counter CT counts renormalisation shifts until the next byte is
due: 12 for the first byte, then 8 after each byte. When it reaches zero:

* If B is 0xFF, a carry can no longer be added to it. B goes out as it is,
  the new B takes only **7** bits from C (C[24:17]), and CT is set to 7. Bit
  24 of C then lands in the top bit of the new byte. This is the bit
  stuffing: the free top bit after 0xFF holds any later carry.
* Otherwise B plus the carry C[24] goes out, and the new B is C[23:16]. If
  `B + 1` turned into 0xFF, the rule above applies to it on the next byte.

At the end of the stream, C is shifted out in three more byte steps and the
last B is written. The code therefore ends with the exact lower bound of
the final interval. The decoder reads zeros past the end.

The decoder's code register D is 29 bits. Bits 28..16 line up with A, and
bits 15..0 are code read ahead. A new byte is added at bits 7..0, or at
bits 8..1 after a 0xFF byte. In the second case its top bit overlaps the
last bit of the 0xFF byte and carries the stuffed carry into it. Start-up
takes 20 shifts with byte loads and does not touch A.

**Renormalisation** first loads the number of leading zeros of A into a
5-bit shift counter. It then shifts A and C (or D) left one bit per cycle,
and the ALU's decrementer and all-zeros detector end the loop.

## Probability estimation

* **Context memory.** It holds 1026 words of 6 bits: the MPS sense plus a
  5-bit index into the Q table.
  * Words 0 to 1023 serve the image contexts (10 previous symbols).
  * Words 1024 and 1025 serve the flag contexts.
  * After reset the memory clears itself, one word per cycle, over 1026
    cycles, and `ready` goes high.
  * Reads are synchronous: the value is available one cycle after `rd_en`.
* **Q table.** It has 30 entries of 12 bits, computed at elaboration time:

      Q[0] = 0xAC0,   Q[i] = max(1, (25*Q[i-1] + 16) / 32)

  The values run from 0xAC0 (an LPS probability of about 0.45 for A
  near 0x1800) down to 0x002.
* **Adaptation.** A context adapts only when a renormalisation follows one
  of its decisions, as in the Q-coder.
  * After an MPS, its index goes up by one (towards smaller Q), saturating
    at 29.
  * After an LPS, its index goes down by one. At index 0 the MPS sense
    flips instead.

The published design takes its Q values and its index-update logic from
the Q-coder literature, without printing them. The table and the rules
above are this design's own simple stand-ins. Compression depends on them,
so expect code sizes that differ from a tuned Q-coder table. On the
synthetic test page the coder reaches about 0.38 bits per pixel. The
table comes from the constant function `make_qtab` in `aca_lut.sv`, and
the update rules sit in the update block of the same file. Keep `NQ` and
`QIDX_W` in `aca_pkg.sv` consistent with them.

## Arithmetic work

The end-to-end testbenches count the adder operations the encoder
actually performs: one subtraction per coded decision and one addition
per LPS. They compare that count with the classic Q-coder step, which
spends two operations on every MPS and none on an LPS.

* On the full-size synthetic page (1728 x 2376 pixels plus a white
  margin) the encoder needs 0.72 operations per symbol. That is 61.5 %
  fewer than the Q-coder step would need on the same symbols.
* On the small, mostly white page of `tb_aca_codec` it needs 0.59 per
  symbol, 69 % fewer.

The reduction grows with the share of MPS pairs. The synthetic page is
busier than a typical typed fax page: 0.38 bits per symbol.

## Modules

| file | contents |
|------|----------|
| `aca_pkg.sv` | widths and constants (A 13, Q 12, C 25, context 10, 30 Q values), context-state struct |
| `aca_alu.sv` | 13-bit adder/subtractor with carry out, 12-bit incrementer, 5-bit decrementer, all-zeros detector |
| `aca_context.sv` | 10-bit shift register of coded symbols (newest in bit 0) |
| `aca_lut.sv` | context memory, Q table, index update, clear after reset |
| `aca_coder.sv` | encoder registers A, B, C, Q, bufout, the ALU and the controlling state machine |
| `aca_encoder.sv` | look-up tables + coder + context: a complete encoder |
| `aca_dec_coder.sv` | decoder registers, ALU, decoding rules and state machine |
| `aca_decoder.sv` | look-up tables + decoder core + context: a complete decoder |
| `aca_codec.sv` | top level: encoder and decoder side by side, ports brought out separately |

### Top-level interface (`aca_codec`)

* `clk` is the clock. `rst_n` is an asynchronous active-low reset.
* **Encoder input:** `enc_in_valid` / `enc_in_ready` transfer one window
  each: `enc_sym1` (first symbol), `enc_sym2` and `enc_in_last`.
* **Encoder output:** a two-signal handshake.
  * `enc_buf_full` is high while `enc_code` holds a byte.
  * The receiver pulses `enc_ack` for one cycle when it has taken the byte.
  * While the coder has a byte to write and the buffer is still full, it
    stalls.
  * After the last window has been coded and flushed, `enc_done` pulses for
    one cycle. The encoder then starts a new code stream, and its context
    memory keeps its learned state.
* **Decoder control:** raise `dec_start` with `dec_n_windows`. It is
  taken on the first clock edge at which the decoder is idle and its
  context memory is ready. `dec_done` pulses when all
  `2 * dec_n_windows` symbols have been delivered.
* **Decoder data:** code bytes come in on `dec_code_valid` /
  `dec_code_ready` / `dec_code_byte`. Symbols go out on `dec_out_valid` /
  `dec_out_ready` / `dec_out_sym`, one per transfer, in their original
  order.

**Timing.** The encoder and the decoder are multi-cycle state machines.
Each decision takes a look-up-table read cycle, a subtract cycle, a test
cycle, and one cycle per renormalisation shift. An LPS adds the two-cycle
`C + A`. A dropped pair costs one decision. Neither side starts work before
its context memory has cleared (1026 cycles after reset). Until then
`enc_in_ready` stays low, and the decoder takes `dec_start` only once it is ready.

## Where this design departs from the published architecture

* **C width.** The published coder has a 32-bit C and uses its bit 31 as
  the "byte ready" mark. Here C is 25 bits, which is all the layout above
  needs, and a 4-bit counter marks a full byte instead.
* **Controller.** The published encoder controller has 58 states that are
  not listed. This one has 18 states plus a 3-bit register saying which
  decision of the window is being coded: sym1, MPS flag, sym2, LPS flag or
  the terminating MPS. The controller lives inside `aca_coder`.
* **Shared hardware.** The published block diagram serves both the encoder
  and the decoder. Here they are two separate datapaths with separate
  memories, so that both can run at once.
* **Q table and update rules.** These are this design's own (see above).
* **Stream termination and flush.** These are not part of the published
  description: the terminating MPS, the three-byte flush, and the decoder's
  window count are this design's own.
* The ACA2 variant, which sends the flag bits in a header instead of coding
  them, is not implemented.

## Simulation

Each testbench checks itself and ends with a line
`TB_RESULT checks=<n> failures=<n>`. With plain Verilator 5, from the
directory that holds `rtl/` and `tb/`:

    verilator --binary --timing -Wno-fatal -y rtl -y tb \
        rtl/aca_pkg.sv tb/aca_ref_pkg.sv tb/tb_aca_codec.sv \
        --top-module tb_aca_codec -o sim
    ./obj_dir/sim

| testbench | what it checks |
|-----------|----------------|
| `tb_aca_alu` | 3000 random operand sets (with the incrementer's all-ones carry case forced often) against integer arithmetic |
| `tb_aca_context` | shift register against a model |
| `tb_aca_lut` | clear time after reset, Q table against the formula, adaptation sequences against a model |
| `tb_aca_coder` | a six-window example with a one-bit context and fixed Q values (0x800 for symbols, 0x850 for flags): the A value after each window, dropped windows, flags and the code bytes `39 00`; then 150 random streams compared byte for byte with a reference encoder that uses a wide C register |
| `tb_aca_encoder` | encoded streams decoded by a behavioural reference decoder; mechanism counts |
| `tb_aca_decoder` | the six-window example decoded from `39 00` by the decoder core with the fixed Q values; then encoder output decoded by the RTL decoder, 34 streams with varied statistics |
| `tb_aca_codec` | top level, small page: concurrent encode and decode, a slow receiver, decoder starvation and back-pressure; 17 mechanisms each counted and required |
| `tb_aca_codec_full` | top level at default parameters on a synthetic 1728 x 2376 page (the size of the standard fax test pages) plus a white margin: about 4.1 million symbols and 28 million cycles, about 20 s in Verilator; reports the operation count |

`aca_codec_harness.sv` generates the synthetic pages and counts the
mechanisms. These include:

* dropped pairs, both kinds of flag, renormalisation;
* carries into the held byte, stuffing after 0xFF, output stalls;
* MPS switches, Q-index saturation;
* each decoder rule.

`aca_ref_pkg.sv` holds the behavioural reference models: a wide-register
encoder and a decoder.

The RTL carries concurrent assertions: no overflow of C, `ack` only while
`buf_full`, and the decoder's D below A.
