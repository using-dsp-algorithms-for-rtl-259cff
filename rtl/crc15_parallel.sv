// crc15_parallel - CRC-15 (CAN) engine: look-ahead pipelined feedback loop,
// unfolded to J message bits per clock, input and output networks retimed
// into their own register stages.
//
// Pipelining.  A serial Galois register for P(x) (x^15+x^14+...) feeds its top
// bit straight back into the XOR in front of flip-flop 14, so its loop has one
// delay.  Here the register instead works modulo G(x) = P(x)*Q(x), with Q(x) of
// degree M-1 chosen so that G has no x^(14+M-1) ... x^15 terms (for M=4,
// Q = x^3+x^2+x+1 and G = x^18+x^14+x^13+x^12+x^10+x^2+x+1).  Every feedback
// tap then sits at least M flip-flops below the top bit, so each loop holds at
// least M delays: an M-level pipelined loop.  Message bits are XORed in at bit
// 15, so that after a frame the register R holds M(x)*x^15 mod G; since P
// divides G, R mod P is the CAN CRC.
//
// Unfolding.  One clock applies up to J steps: R' = x^n*R mod G  XOR  g(u),
// n = in_cnt (1..J).  With J <= M the n feedback bits are the n top bits of R
// as they stand, so no feedback bit depends on another within a clock.
//
// Retiming.  g(u), the part that depends only on the input word, is computed
// ahead of the loop and held in PIPE register stages; the final reduction
// R mod P is computed after the loop into the output register.  Neither adds
// logic to the loop.
//
// The three-way unfolding (J=3), the four-level pipelining (M=4) and the
// pipeline-then-retime-then-unfold order follow the source paper; the choice
// of Q(x), where the input enters, the stage split and the framing signals
// are this design's own.  M=1, J=1 is the plain serial register.
//
// Interface: a word is taken when in_valid is high.  in_bits[J-1] is the
// earliest bit; in_cnt (1..J) bits are valid, counted from the top, so frames
// of any length can be fed.  in_first restarts the CRC with that word; in_last
// marks the frame's final word.  Back-to-back frames need no gap.
// Timing: a word taken at clock edge t is in crc from edge t+PIPE+1, when
// out_valid pulses with it (out_last too for a frame's final word, crc then
// being the frame CRC).  Throughput is one word, J bits, per clock.
module crc15_parallel
  import crc_pkg::*;
#(
  parameter int unsigned J    = 3,
  parameter int unsigned M    = 4,
  parameter int unsigned PIPE = 1,
  localparam int unsigned CW  = $clog2(J + 1),
  localparam int unsigned RW  = CRC15_W + M - 1      // width of the look-ahead register
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               in_valid,
  input  logic               in_first,
  input  logic               in_last,
  input  logic [J-1:0]       in_bits,
  input  logic [CW-1:0]      in_cnt,
  output logic               out_valid,
  output logic               out_last,
  output logic [CRC15_W-1:0] crc
);

  localparam logic [CRC15_W:0] P_FULL = {1'b1, CRC15_POLY};

  // G(x) = P(x)*Q(x), Q monic of degree M-1, with the M-1 coefficients below
  // the leading one zero.  Q is found one coefficient at a time from the top.
  function automatic logic [RW:0] lookahead_poly();
    logic [M-1:0] q;
    logic [RW:0]  g;
    logic         c;
    q = '0;
    q[M-1] = 1'b1;
    for (int k = 1; k < int'(M); k++) begin
      c = 1'b0;
      for (int j = M - k; j < int'(M); j++)
        if (int'(RW) - k - j >= 0) c ^= q[j] & P_FULL[int'(RW)-k-j];
      q[M-1-k] = c;
    end
    g = '0;
    for (int j = 0; j < int'(M); j++)
      if (q[j]) g ^= (RW+1)'(P_FULL) << j;
    return g;
  endfunction

  localparam logic [RW:0] G_FULL = lookahead_poly();

  // One step of the look-ahead register with message bit b entering at x^15.
  function automatic logic [RW-1:0] step(input logic [RW-1:0] r, input logic b);
    logic [RW:0] e;
    e = {r, 1'b0} ^ ((RW+1)'(b) << CRC15_W);
    if (e[RW]) e ^= G_FULL;
    return e[RW-1:0];
  endfunction

  // Input term: the word's valid bits run through a cleared register.
  function automatic logic [RW-1:0] input_term(input logic [J-1:0] bits,
                                               input logic [CW-1:0] cnt);
    logic [RW-1:0] r;
    r = '0;
    for (int i = 0; i < int'(J); i++)
      if (i < int'(cnt)) r = step(r, bits[J-1-i]);
    return r;
  endfunction

  // x^n * s mod G for n = 1..J (zero input).
  function automatic logic [RW-1:0] advance(input logic [RW-1:0] s,
                                            input logic [CW-1:0] n);
    logic [RW-1:0] r, res;
    r   = s;
    res = s;
    for (int i = 1; i <= int'(J); i++) begin
      r = step(r, 1'b0);
      if (i == int'(n)) res = r;
    end
    return res;
  endfunction

  // r mod P.
  function automatic logic [CRC15_W-1:0] reduce(input logic [RW-1:0] r);
    logic [RW-1:0] t;
    t = r;
    for (int i = RW - 1; i >= int'(CRC15_W); i--)
      if (t[i]) t ^= (RW'(CRC15_POLY) << (i - CRC15_W)) ^ (RW'(1) << i);
    return t[CRC15_W-1:0];
  endfunction

  typedef struct packed {
    logic          valid;
    logic          first;
    logic          last;
    logic [CW-1:0] cnt;
    logic [RW-1:0] g;
  } stage_t;

  stage_t        pipe [PIPE];
  stage_t        head;
  logic [RW-1:0] state;
  logic          loop_valid, loop_last;

  // Input network, retimed into PIPE stages ahead of the loop.
  always_ff @(posedge clk) begin
    if (rst) begin
      for (int s = 0; s < int'(PIPE); s++) pipe[s] <= '0;
    end else begin
      pipe[0] <= '{valid: in_valid, first: in_first, last: in_last,
                   cnt: in_cnt, g: input_term(in_bits, in_cnt)};
      for (int s = 1; s < int'(PIPE); s++) pipe[s] <= pipe[s-1];
    end
  end

  assign head = pipe[PIPE-1];

  // Feedback loop: the look-ahead register.
  always_ff @(posedge clk) begin
    if (rst) begin
      state      <= '0;
      loop_valid <= 1'b0;
      loop_last  <= 1'b0;
    end else begin
      loop_valid <= head.valid;
      loop_last  <= head.valid & head.last;
      if (head.valid)
        state <= (head.first ? '0 : advance(state, head.cnt)) ^ head.g;
    end
  end

  // Output network: final reduction mod P, retimed behind the loop.
  always_ff @(posedge clk) begin
    if (rst) begin
      crc       <= '0;
      out_valid <= 1'b0;
      out_last  <= 1'b0;
    end else begin
      crc       <= reduce(state);
      out_valid <= loop_valid;
      out_last  <= loop_last;
    end
  end

  // A word carries 1..J bits.
  a_cnt_range: assert property (@(posedge clk) disable iff (rst)
    in_valid |-> (in_cnt >= CW'(1) && in_cnt <= CW'(J)))
    else $error("crc15_parallel: in_cnt out of range");

  initial begin
    assert (J >= 1 && M >= 1 && PIPE >= 1)
      else $fatal(1, "crc15_parallel: J, M and PIPE must be at least 1");
  end

endmodule
