# A 100 Gbit/s data link layer from ten 10 Gbit/s lanes

This RTL is the data link layer for a 100 Gbit/s wireless link. It makes an
error-prone radio channel look like a reliable pipe. One FPGA datapath cannot
handle 100 Gbit/s, so the stream is carried on ten independent lanes of
10 Gbit/s each. Every lane is protected in four ways:

* **Forward error correction.** Each frame's payload is Reed-Solomon coded
  with 8-bit symbols. The code can be set anywhere from RS(255,253) (t = 1
  correctable symbol per codeword) to RS(255,237) (t = 9).
* **Byte interleaving.** Eight RS coders run side by side on every 64-bit
  word, one per byte. A burst of errors is split over eight codewords.
* **Retransmission (ARQ).** A frame the decoders cannot repair is resent by
  a go-back-N ARQ. FEC plus ARQ together form a hybrid ARQ.
* **Triple header.** The header is sent three times. It is decoded in one
  clock by three CRC checks plus a CRC check of the bitwise majority of the
  three copies.

The receiver also adapts the code strength. It asks the far transmitter for
a weaker code on a clean link and a stronger one on a noisy link. The
request travels back in the headers.

The parts follow a published FPGA demonstrator:

* ten lanes: four that went to a software processor over 10G Ethernet, six
  fed by internal frame generators;
* two clocks per lane: 156.25 MHz for the interfaces, 200 MHz for the coders;
* eight RS instances per lane;
* the nine RS codes;
* padding at the end of the RS blocks;
* the triple-redundancy header decoder;
* adaptive HARQ.

Anything that description leaves open is this design's own choice, for
example the frame format, the ARQ protocol and the adaptation rule. These
choices are marked below and in each file's opening comment.

## Structure

```
dll_top                     N_LANES = 10 lanes, one board
 └─ per lane:
    prbs_gen / prbs_chk     internal frame generator and checker (gen_en)
    dll_lane                one lane, two clock domains
     ├─ async_fifo x4       user TX, line TX, line RX, user RX (dual clock)
     ├─ lane_tx             framer, go-back-N sender, 8 x rs_encoder
     └─ lane_rx             parser, hdr_tmr_decoder, 8 x rs_decoder,
                            ARQ receiver, code_adapt
rs_pkg                      GF(2^8), generator polynomials, header, CRCs
```

Each lane has two clock domains:

* **Interface clock, 156.25 MHz.** The user port and the line port run
  here. One 64-bit word per clock is 10 Gbit/s, the rate of a 10GBASE-R
  lane.
* **Coder clock, 200 MHz.** `lane_tx` and `lane_rx` run here. Eight coders
  × 8 bit × 200 MHz gives a 12.8 Gbit/s peak. The extra speed pays for the
  header, parity and padding cycles and for the decoder's gaps, so the line
  can stay busy.

## The frame on a lane

Line words are 64 bits wide. A sideband bit `sof` marks the first word of
each frame; it stands for the control code a physical layer would use.

| words | content |
|---|---|
| 0, 1, 2 | the same header word three times (`sof` on word 0) |
| 3 .. 257 | data frames only: 255 payload words |

The header is 48 bits of fields followed by a CRC-16/CCITT (polynomial
0x1021, initial value 0xFFFF). It is defined as `rs_pkg::hdr_t`:

| field | bits | meaning |
|---|---|---|
| `data` | 1 | a payload follows (0: header-only idle frame) |
| `seq` | 8 | sequence number of this data frame |
| `ack` | 8 | next sequence number the sender's receiver expects (cumulative ack) |
| `nack` | 1 | the sender's receiver asks for a go-back |
| `t` | 4 | t of this frame's payload code |
| `req_t` | 4 | t the sender's receiver wants to receive with |
| `len` | 8 | user words in the payload |
| `rsvd` | 14 | zero |

The payload is eight interleaved codewords. Byte *i* of every payload word
belongs to codeword *i*. Words 0 .. k−1 of the payload hold the data part of
the codewords, where k = 255 − 2t:

1. `len` user words, at most k − 1;
2. one word holding the CRC-32 of those user words;
3. zero padding up to word k − 1.

The last 2t words hold the parity.

A frame is started in either case:

* a full frame of user words is waiting;
* some user words have waited `FLUSH` clocks. The frame is then short and
  mostly padding.

When there is no data to send, header-only frames go out. This keeps the
acknowledgements and code requests flowing in both directions.

## Reed-Solomon coding (`rs_encoder`, `rs_decoder`)

Both coders take t per codeword (1 .. 9) and process one symbol per clock.
The field polynomial is x⁸+x⁴+x³+x²+1 (0x11D). The generator polynomial is
g(x) = Π(x + αⁱ) for i = 1 .. 2t. `rs_pkg` computes all nine generator
polynomials when the design is elaborated, so the design reads no tables.

**Encoder.** The encoder is a systematic LFSR divider. The data symbols pass
straight through. Then the 2t remainder symbols are shifted out, and
`in_ready` is low during those clocks. The nine codes share one 18-stage
register: a code with 2t parity symbols uses the top 2t stages.

**Decoder.** The decoder has two stages that work on two codeword buffers
in turn (ping-pong).

* **Stage A** stores the received symbols and accumulates the 18
  syndromes Sⱼ = r(αʲ) by Horner's rule.
* **Stage B** decodes the previous codeword while stage A fills the other
  buffer. It does four things:
  1. Runs the inversion-free Berlekamp-Massey algorithm, one iteration per
     clock for 2t clocks, to get the error locator Λ(x). Each iteration
     computes λ ← γλ + δ·xB. If δ ≠ 0 and k ≥ 0, then B ← λ, γ ← δ and
     k ← −k−1. Otherwise B ← xB and k ← k+1.
  2. Forms the evaluator Ω(x) = S(x)Λ(x) mod x²ᵗ in one clock. The
     truncation to degree < 2t matters.
  3. Walks all 255 positions in a Chien search, one position per clock. At
     position p the search point is x = α^(p+1).
  4. Where Λ(x) = 0, adds the Forney value e = x·Ω(x)/Λ_odd(x) to the
     stored symbol.

The decoder emits the k corrected data symbols. It then reports:

* `ok`: the locator degree is at most t and equals the number of roots
  found;
* `n_err`: the number of corrected symbols.

A codeword occupies stage B for 2t + 257 clocks. The decoder therefore
needs an idle gap of 2t + 2 clocks after each 255-symbol codeword. The
200 MHz clock absorbs this gap (255/275 at t = 9, still above 10 Gbit/s).
Latency from the last received symbol to the first output is 2t + 2 clocks.

**The CRC-32 in every frame.** A decoder working at t = 1 that meets two or
more errors usually "corrects" the codeword into a different valid
codeword. `ok` cannot see that. Adaptation makes small t common on good
links, so each frame carries a CRC-32 (polynomial 0x04C11DB7, MSB first,
initial value all ones) over its user words. A frame counts as good only if
all eight codewords decoded and the CRC matches. This frame check is an
addition of this design.

## Header decoding (`hdr_tmr_decoder`)

The decoder checks four branches in parallel:

* the CRC of each of the three copies;
* the CRC of their bitwise 2-of-3 majority vote.

If any branch passes, the header is accepted. When several pass, the voted
header is preferred, then copy 0, 1 and 2. The vote repairs headers in
which every copy has a few flipped bits in different places. A single
intact copy is enough when the other two are destroyed. The result is
registered one clock after the third copy arrives. No RS decoding delay
stalls the frame parser.

## ARQ and adaptive code (`lane_tx`, `lane_rx`, `code_adapt`)

**ARQ.** The ARQ is go-back-N with cumulative acknowledgements:

* Up to `WIN` = 4 data frames may be unacknowledged. Their user words stay
  in a retransmission buffer of `WIN` × 256 words.
* The receiver delivers only the frame with the next expected sequence
  number.
* It requests a nack once per expected number in either case:
  * a frame could not be decoded;
  * a frame arrives ahead of the expected number, because one was lost.
* The transmitter rewinds to the oldest unacknowledged frame in either case:
  * it sees a nack;
  * the acknowledgements make no progress for `TIMEOUT` clocks. This covers
    lost headers and lost nacks.

  Resent frames keep their original code.
* The receiver drops duplicates of frames it already delivered.
* A frame's user words enter the user RX FIFO tentatively. They are
  committed only when the whole frame decoded, so the user never sees a
  partial or bad frame.
* The receiver never stalls the line. A frame that finds the user RX FIFO
  full is dropped, and the ARQ resends it.

**Adaptation rule.** This rule is the design's own. For each decoded frame
it looks at `ok` and at the largest `n_err` of its eight codewords:

* An undecodable frame jumps the request to t = 9.
* A frame that needed all of its t steps one code stronger.
* `DOWN_FRAMES` = 8 frames in a row that would still keep a spare symbol
  with one parity pair less step one code weaker.

After reset the request starts at t = 9. The request reaches the far
transmitter in the `req_t` header field. It applies to the next new frame.

## Clock-domain crossing (`async_fifo`)

Each of the four FIFOs in a lane is a dual-clock FIFO. Its pointers cross
the clock domains in Gray code through two-flop synchronisers, and it reads
out first-word-fall-through.

The user RX FIFO also supports commit and discard of the words written
since the last commit. It publishes its write pointer to the read side one
step at a time, so the Gray code stays valid.

The line RX FIFO cannot stall the physical layer. A word that arrives while
it is full is dropped and reported on `ev_rx_overflow`. At the default
clocks this does not happen: the receiver consumes words faster than they
arrive.

## Top level (`dll_top`) and frame generators

`dll_top` has `N_LANES` = 10 lanes. They share the coder clock and reset.
Each lane has its own interface clock and reset, because each is tied to
its own transceiver. Per lane, `gen_en` selects the data source:

* **User port** (`utx_*` / `urx_*`, valid/ready, 64 bits). In the
  demonstrator this is a 10G Ethernet MAC towards the software processor.
* **Internal generator.** A PRBS-31 word generator (x³¹ + x²⁸ + 1, 64 bits
  per word) feeds the lane. A matching checker counts the received words
  (`chk_words`) and mismatches (`chk_errors`).

The `line_*` ports go to the physical layer. Status outputs per lane:

* `ev_fec`: event pulses, bit order `rs_pkg::lane_ev_e`;
* `cur_tx_t`: the code the transmitter uses;
* `cur_req_t`: the code the receiver asks for;
* `corr_syms`: symbols corrected in the last frame.

**Not included.** The 10GBASE-R Ethernet MAC/PCS, the serial transceivers,
the clock generation, the software processor and the radio front end are
not part of this RTL. They connect at the `utx_*`/`urx_*` ports, the
`line_*` ports and the clock inputs.

## Throughput

User data rate per lane = 10 Gbit/s × (k − 1)/258:

| code | per lane | ten lanes |
|---|---|---|
| t = 1 | 9.77 Gbit/s | 97.7 Gbit/s |
| t = 9 | 9.15 Gbit/s | 91.5 Gbit/s |

The demonstrator carried 97 Gbit/s of continuous user data over ten lanes.
This design reaches that on a link clean enough for the weakest codes. The
throughput was not measured in simulation.

## Where this design departs from or adds to the demonstrator

* **Frame format, header fields, CRC choices, ARQ protocol, window, timeout
  and flush time.** These are not specified there and were chosen here.
* **Payload CRC-32.** Added, because without a payload check a miscorrected
  frame would be delivered. Simulation at t = 1 with random symbol errors
  showed such wrong words until the check was added.
* **Adaptation algorithm.** Only its behaviour is known (weaker codes on
  good links, stronger on bad, between RS(255,253) and RS(255,237)). The
  rule here is a simple threshold scheme.
* **RS decoder.** This is an own Berlekamp-Massey/Chien/Forney design, not
  a vendor core. Its per-codeword gap is 2t + 2 clocks, not the long,
  t-dependent delays of the vendor decoder the demonstrator used.
* **Clock inputs.** Every lane has its own interface clock input, which
  gives eleven clock domains for ten lanes. The demonstrator had two domains
  per lane but only six in its whole FPGA, so lanes there shared clocks.
  Driving several `clk_if` bits from one clock gives the same arrangement.
* **Lanes per FPGA.** The demonstrator notes that one development board's
  ports carry about 40 Gbit/s, so a full 100 Gbit/s system would be split
  over several FPGAs. `N_LANES` sets the lanes in one instance, and the
  lanes are independent, so the design splits the same way.
* **The 220 MHz timing limit** of the original FPGA implementation is not
  modelled.
* **Lint warnings that remain:**
  * unused FIFO fill counts and unused handshake bits of lanes 1..7 of the
    lock-step coders;
  * the reset net also appearing in the assertions' disable condition.

  The flops themselves all reset asynchronously.

## Verification

Every block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M`.

| testbench | what it checks |
|---|---|
| `tb_rs_encoder` | codewords against an independent table-based reference encoder (`tb_rs_ref_pkg`) for all t, with random stalls |
| `tb_rs_decoder` | 0 .. t random errors are corrected exactly; t+1 errors are flagged (t ≥ 5); the 2t + 257 clock codeword period |
| `tb_hdr_tmr_decoder` | recovery through the vote alone and through a single copy; rejection of garbage |
| `tb_async_fifo` | unrelated clocks, commit/discard, full/empty |
| `tb_code_adapt` | step up, step down, the jump to t = 9 |
| `tb_prbs` | generator against an independent PRBS model; checker detects a corrupted word |
| `tb_dll_lane` | two lanes back to back through a damaging channel; every user word must arrive once, in order and intact, and every event must occur |
| `tb_dll_top` | two full ten-lane boards at default parameters, four user lanes and six generator lanes, every mechanism counted (about 2 minutes) |

The channel in the last two testbenches goes through these phases:

1. clean, so the code steps down;
2. random symbol errors;
3. destroyed codewords (nack);
4. single damaged header copies (vote or single copy);
5. all three copies destroyed;
6. lost acknowledgements (timeout);
7. a stalled user sink (back-pressure).

To simulate, compile `rtl/rs_pkg.sv` first, then the other RTL files, the
testbench and, for the RS testbenches, `tb/tb_rs_ref_pkg.sv`:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_dll_top \
  rtl/rs_pkg.sv rtl/rs_encoder.sv rtl/rs_decoder.sv rtl/hdr_tmr_decoder.sv \
  rtl/code_adapt.sv rtl/async_fifo.sv rtl/lane_tx.sv rtl/lane_rx.sv \
  rtl/dll_lane.sv rtl/prbs_gen.sv rtl/prbs_chk.sv rtl/dll_top.sv tb/tb_dll_top.sv
./obj_dir/Vtb_dll_top
```

Testbenches drive inputs on the falling clock edge, which avoids races with
the design's sampling edge. The time unit is 1 ps.
