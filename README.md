# Parallel CRC-15 for a CAN controller

A CAN frame carries a 15-bit cyclic redundancy check over its start-of-frame,
arbitration, control and data fields. The generator polynomial is

    P(x) = x^15 + x^14 + x^10 + x^8 + x^7 + x^4 + x^3 + 1      (0x4599 without the x^15 term)

The usual hardware for it is a bit-serial linear feedback shift register (LFSR)
that takes one bit per clock. This RTL speeds that up the way the source paper
("Using DSP Algorithms for CRC in a CAN Controller") proposes. First it
**pipelines** the feedback loop by look-ahead, so that each loop holds four
delays. Then it **retimes** the input and output logic out of the loop. Finally
it **unfolds** the result by three, so that three bits go in per clock. The CRC unit has an
encoder that appends the CRC to a frame and a decoder that checks a received
frame by its remainder. The RTL also contains the serial register the parallel
unit is derived from, and the paper's small CRC-5 serial encoder/decoder example.

All of it is synthesizable SystemVerilog (IEEE 1800-2017) with one module per file.

## Blocks

| module | what it is |
|---|---|
| `crc_pkg` | polynomials and widths |
| `crc15_serial` | bit-serial CRC-15 LFSR, 15 flip-flops, one bit per clock |
| `crc15_parallel` | CRC-15 engine: 4-level look-ahead pipelined loop, unfolded to J=3 bits per clock, retimed |
| `crc15_encoder` | frame in → frame + 15 CRC bits out, 3 bits per clock, valid/ready input |
| `crc15_decoder` | received frame + CRC → syndrome and error flag |
| `crc5_encoder` | serial CRC-5 (x^5+x^4+x^2+1) encoder: 12-bit word → 17-bit code word |
| `crc5_decoder` | serial CRC-5 decoder: 17-bit word → data, CRC field, syndrome |
| `can_crc_top` | all of the above, wired side by side, with loop-back error-injection channels |

## The serial register

`crc15_serial` is a Galois LFSR. Flip-flops are numbered 0 to 14. An XOR sits in
front of flip-flops 0, 3, 4, 7, 8, 10 and 14, one for each lower term of P(x). All
of these XORs are driven by the same feedback signal: the output of flip-flop 14
XORed with the incoming message bit. The register starts at zero. After the last
message bit it holds the remainder of M(x)·x^15 divided by P(x), which is the CAN
CRC, sent bit 14 first. The loop runs from flip-flop 14 through two XORs back into
the register, so the clock period cannot be shorter than two XOR delays, and only
one bit goes in per clock.

## The parallel engine (`crc15_parallel`): pipeline, retime, unfold

The paper's recipe is to pipeline the serial loop first (four levels), then
retime, then unfold by three. The engine applies these steps in that order.

**Look-ahead pipelining (M = 4).** In the serial register, the top bit feeds
straight back into the XOR in front of flip-flop 14, so the loop has a single
delay. Suppose the register instead computes modulo a multiple G(x) = P(x)·Q(x).
If Q is chosen so that G has no terms just below its leading one, every
feedback tap ends up at least M flip-flops below the top, and every loop then
holds at least M delays. Q is solved one coefficient at a time at elaboration.
For M = 4:

    Q(x) = x^3 + x^2 + x + 1
    G(x) = x^18 + x^14 + x^13 + x^12 + x^10 + x^2 + x + 1      (0x47407)

The register is 18 bits wide. Message bits are XORed in at bit 15, which leaves
`R = M(x)·x^15 mod G` after a frame. P divides G, so `R mod P` is exactly the
CAN CRC.

**Unfolding (J = 3).** The step is linear, so n steps at once are

    R(k+1) = x^n·R(k) mod G  ⊕  g(u_0 … u_{n-1}),     n = in_cnt = 1..J

Here `g` is what the word's bits alone would leave in a cleared register. With
J ≤ M, the n feedback bits used within one clock are simply the top n bits of R
as registered. No feedback bit is computed from another inside a clock, and
that is what the pipelining buys. After flattening, every next-state bit is the
XOR of at most four state bits and one bit of `g`.

**Retiming.** `g` depends only on the input word. It is computed ahead of the
loop and held in `PIPE` register stages (default 1). The final reduction
`R mod P` is computed behind the loop, into the output register. Neither adds
logic to the loop. Both are feed-forward cutsets, so they change latency but no
result.

`M = 1, J = 1` is the plain serial register. `J = 1, M = 4` is the pipelined
serial register. Testbenches run `M = 1`, `4` and `7` with `J = 3`, and
`J = 1, M = 4`, and all of them agree with the reference.

A frame may be any number of bits long. Every word carries `in_cnt` (1..J valid
bits, counted from `in_bits[J-1]`, the earliest bit). `in_first` restarts the
CRC with that word, and `in_last` marks the last word. Both travel down the
pipeline with their word, so frames can follow each other with no gap.

Timing: one word per clock, with no stalls. A word taken on clock edge t shows
in `crc` from edge t+PIPE+1, when `out_valid` pulses (and `out_last`, if the word
ended a frame). A frame of N bits needs ceil(N/3) input clocks. The serial
register needs N: for example, 28 instead of 83 for the longest standard-format
CAN frame without stuff bits.

**Where this departs from the paper.** The paper draws its final architecture as
one particular netlist of 30 named adder nodes (ten per phase) and delays, and tabulates clock counts
(15 serial, 4 for the final architecture) and iteration bounds. The text does not
say which message length or delay model those numbers refer to. This engine does
not reproduce that netlist. It applies the same three transformations with its
own choices: the look-ahead polynomial, the input injection point and the
placement of the stages. It does not claim the tabulated figures. It computes the
same CRC, and its latency is ceil(N/3) + PIPE + 1 clocks.

## Encoder and decoder

`crc15_encoder` passes each message word to its output one clock after taking
it, and feeds the word to an engine. After the frame's last word, it drops
`in_ready` and waits for the engine. It then sends the CRC most significant bit
first, as ceil(15/J) words (five 3-bit words), and raises `in_ready` again.
A frame of W words therefore keeps the input busy for W + PIPE + 2 + 5 clocks.
The output stream is valid-only (no back-pressure). `out_first` and `out_last`
frame the code word, and `crc_out` keeps the last CRC.

`crc15_decoder` runs its own engine over the received message and CRC words as a
single frame. A correct code word is a multiple of P(x), so the remainder at the
end, the **syndrome**, is zero. `done` pulses, and `syndrome`/`error` are updated, PIPE+2 clocks after the
last word. P(x) has the
factor (x+1), so every odd number of flipped bits is detected, as is every burst
of up to 15 bits. The syndrome reported is the remainder of the received word
times x^15, because the engine is the same Galois register as the encoder's.

## CRC-5 example codec

This is the paper's small worked example: a 12-bit word, generator x^5+x^4+x^2+1,
and the code word `data_trans = {data_in, crc}`. The port names and widths are the
paper's.

* `crc5_encoder`: while `crc_en` is high, it loads `data_in` when idle. It then
  shifts the word, MSB first, into a 5-bit LFSR, one bit per clock. Twelve clocks
  later it updates `data_trans`/`crc_out` and pulses `done`, then loads again. One
  word takes 13 clocks. Pulling `crc_en` low pauses it.
* `crc5_decoder`: it has no enable. It samples `data_trans`, divides all 17 bits
  by the generator in a long-division register, and updates `data_decod` (upper 12
  bits), `crc_out` (lower 5 bits) and `error` (the remainder, i.e. the syndrome).
  It then samples again. One word takes 18 clocks. Here the syndrome is the plain
  remainder of the received word, so a single flipped bit in the CRC field shows
  up as exactly that bit.

For the data word 0xaf5 this polynomial gives the CRC 0x0A and the code word
0x15EAA, which the testbenches check. The waveforms printed in the paper show
0x15 and 0x11 for the same word. Neither value follows from the stated
polynomial with any of the usual bit-order or start-value conventions, so the RTL
follows the polynomial.

## Top level (`can_crc_top`)

Three independent groups of ports share `clk` and a synchronous, active-high `rst`:

* `tx_*`: message words into `crc15_encoder`. `cw_*`: the code word stream it
  sends. The same stream, XORed with `rx_err_mask`, feeds `crc15_decoder`, whose
  results come out on `rx_done`, `rx_syndrome` and `rx_error`. The mask stands
  in for the bus and allows errors to be injected.
* `ser_*`: the serial CRC-15 register.
* `c5_*`: the CRC-5 encoder. Its `data_trans`, XORed with `c5_err_mask`, feeds
  the CRC-5 decoder.

Parameters: `J` (bits per clock, default 3), `M` (pipelining levels of the
loop, default 4) and `PIPE` (input pipeline stages, default 1, at least 1).
The encoder accepts any `J` from 1 to 15. The testbenches run the engine at J = 1
and 3, and the encoder at 3. For `J` values that do not divide 15, the encoder
sends a short last CRC word.

The rest of a CAN controller is not included: bit timing, bit stuffing and
destuffing, the frame state machine, registers and bus-off handling. The CRC
blocks take whatever bits they are given, from start-of-frame to the end of the
data field. Whether stuff bits are removed first is up to the surrounding
controller.

## Verification

Each module has a self-checking testbench in `tb/`. Each one ends by printing
`TB_RESULT checks=N failures=M`, and each has a watchdog. The reference values
come from `tb/crc_ref_pkg.sv`, which does plain GF(2) long division on bit lists.
That is a different formulation from the LFSRs under test.

* `crc15_serial_tb`: 200 random frames with idle cycles in between. It also
  checks the one-bit message "1" (whose CRC is 0x4599) and clear. A one-bit-wide,
  4-level pipelined engine runs on the same bits.
* `crc15_parallel_tb`: 300 frames of 1–150 bits, with short last words, gaps and
  back-to-back frames. It checks that each word has a latency of exactly
  PIPE+1, and that a 12-bit word takes 4 input clocks. It also checks the
  look-ahead polynomials and that engines with M = 1, 4 and 7 agree.
* `crc15_encoder_tb`: rebuilds every code word from the output stream. It checks
  the one-clock forwarding and the exact length of the stall.
* `crc15_decoder_tb`: clean frames, single-bit errors, bursts of up to 15 bits,
  and 3/5/7-bit errors. It checks the exact syndrome and the latency.
* `crc5_encoder_tb`, `crc5_decoder_tb`: all 4096 data words, the 0xaf5 example,
  every single-bit error, the word periods of 13 and 18 clocks, and the
  `crc_en` pause.
* `can_crc_top_tb`: end to end at the default parameters. It runs 150 frames
  through encoder → channel → decoder, with every third frame corrupted. It
  feeds the same frames to the serial register and compares the CRCs and clock
  counts, and it runs the CRC-5 codec alongside. It counts each mechanism
  (input stall, short word, detected error, clean frame, `crc_en` pause, CRC-5
  error) and fails if any of them never happens.
* `can_frame_workload_tb`: real CAN frame layouts, standard (19 + 8n bits) and
  extended (39 + 8n bits) identifiers with 0–8 data bytes. Each frame goes
  through the parallel encoder and decoder and through the serial register.
  It checks the CRC, a clean decode, and the input clock counts: ceil(N/3)
  against N.

To run one with Verilator (from the directory that holds `rtl/` and `tb/`):

    verilator --binary --timing --assert -Irtl -Itb -y rtl \
        rtl/crc_pkg.sv tb/crc_ref_pkg.sv tb/can_crc_top_tb.sv --top-module can_crc_top_tb
    ./obj_dir/Vcan_crc_top_tb

Every testbench finishes in well under a second.

## How far to trust it

* The serial register, the CRC-5 codec interfaces, the unfolding factor (3),
  the pipelining depth (4) and the pipeline → retime → unfold order follow the
  paper. The framing signals, handshakes, reset values (zero), bit
  order (earliest bit in the MSB) and `done` pulses are this design's choices.
* The CRC values are checked exhaustively (CRC-5) or on many random frames
  (CRC-15) against an independent reference. They have not been checked against
  a captured CAN bus trace.
* The parallel engine matches the paper's function, not its exact pipelined
  netlist or its tabulated cycle counts (see above). Timing has not been
  measured on any technology.
