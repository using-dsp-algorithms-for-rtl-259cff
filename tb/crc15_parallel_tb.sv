// crc15_parallel_tb - self-checking test of the unfolded CRC-15 engine.
//
// Feeds frames of random length (1..150 bits, so the last word holds 1..3
// bits) as 3-bit words, with random idle cycles and also back to back, and
// compares the CRC at each out_last with the long-division reference.  Checks
// that every word is in crc exactly PIPE+1 clocks after it is taken, that
// crc holds while no word arrives, and that a 12-bit message, the example word
// 0xaf5, needs 4 clocks of input.  Engines with M=1 (no look-ahead) and M=7
// run on the same input and must give the same results.
module crc15_parallel_tb;
  import crc_ref_pkg::*;

  localparam int unsigned J = 3;
  localparam int unsigned PIPE = 1;

  logic clk = 0, rst = 1;
  logic in_valid = 0, in_first = 0, in_last = 0;
  logic [J-1:0] in_bits = '0;
  logic [1:0]   in_cnt = '0;
  logic out_valid, out_last;
  logic [14:0] crc;
  int checks = 0, failures = 0;
  int cycle = 0;
  int partial_words = 0, back_to_back = 0;

  crc15_parallel #(.J(J), .PIPE(PIPE)) dut (.*);

  // the same engine without look-ahead (M=1) and with a deeper one (M=7)
  logic        ov1, ol1, ov7, ol7;
  logic [14:0] crc1, crc7;
  crc15_parallel #(.J(J), .M(1), .PIPE(PIPE)) dut_m1 (
    .clk, .rst, .in_valid, .in_first, .in_last, .in_bits, .in_cnt,
    .out_valid(ov1), .out_last(ol1), .crc(crc1));
  crc15_parallel #(.J(J), .M(7), .PIPE(PIPE)) dut_m7 (
    .clk, .rst, .in_valid, .in_first, .in_last, .in_bits, .in_cnt,
    .out_valid(ov7), .out_last(ol7), .crc(crc7));

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0d: %s", cycle, what);
    end
  endtask

  // expected results, in frame order
  logic [14:0] exp_q[$];
  int          take_q[$];     // cycle of every word taken
  int          last_take_q[$];

  // monitor: every word comes out PIPE clocks after it is taken
  logic [14:0] prev_crc;
  always @(posedge clk) begin
    if (!rst) begin
      if (in_valid) begin
        take_q.push_back(cycle);
      end
      if (out_valid) begin
        int t;
        check(ov1 && ov7 && ol1 == out_last && ol7 == out_last && crc1 == crc && crc7 == crc,
              "M=1 and M=7 engines agree with M=4");
        t = take_q.pop_front();
        check(cycle - t == PIPE + 2, $sformatf("word latency %0d", cycle - t - 1));
      end else begin
        check(crc == prev_crc, "crc holds without a word");
      end
      if (out_valid && out_last) begin
        logic [14:0] e;
        e = exp_q.pop_front();
        check(crc == e, $sformatf("frame crc %h expected %h", crc, e));
      end
    end
    prev_crc <= crc;
  end

  task automatic send_frame(input bitq_t bits, input bit gaps);
    int nw, i;
    nw = (bits.size() + J - 1) / J;
    exp_q.push_back(15'(crc_of(bits, 15, P15_FULL)));
    for (int w = 0; w < nw; w++) begin
      if (gaps) begin
        while ($urandom_range(0, 2) == 0) begin
          in_valid = 0; in_bits = 3'($urandom); @(negedge clk);
        end
      end
      in_valid = 1;
      in_first = (w == 0);
      in_last  = (w == nw - 1);
      in_bits  = 3'($urandom);              // bits beyond the count are don't-care
      in_cnt   = 2'(J);
      for (int k = 0; k < J; k++) begin
        i = w * J + k;
        if (i < bits.size()) in_bits[J-1-k] = bits[i];
      end
      if (w == nw - 1 && bits.size() % J != 0) begin
        in_cnt = 2'(bits.size() % J);
        partial_words++;
      end
      @(negedge clk);
    end
    if (!gaps) back_to_back++;
  endtask

  initial begin
    bitq_t b;
    int t0;
    // look-ahead polynomials: P(x)*(x^3+x^2+x+1) for M=4; for M=7 the six
    // coefficients below the leading one are zero
    check(dut.G_FULL == 19'h47407, $sformatf("M=4 look-ahead polynomial %h", dut.G_FULL));
    check(dut_m7.G_FULL[21] && dut_m7.G_FULL[20:15] == '0 && dut_m7.G_FULL[0],
          "M=7 look-ahead polynomial has no taps in its top 6 places");
    check(dut_m1.G_FULL == 16'hc599, "M=1 polynomial is P(x)");
    repeat (3) @(negedge clk);
    rst = 0;
    @(negedge clk);
    // example word 0xaf5: 12 bits in 4 words
    b = {};
    for (int k = 11; k >= 0; k--) b.push_back(bit'((32'haf5 >> k) & 1));
    t0 = cycle;
    send_frame(b, 0);
    check(cycle - t0 == 4, "12-bit message takes 4 input clocks");
    for (int f = 0; f < 300; f++) begin
      b = rand_bits($urandom_range(1, 150));
      send_frame(b, f % 3 == 0);
      if (f % 7 == 0) begin
        in_valid = 0;
        @(negedge clk);
      end
    end
    in_valid = 0;
    repeat (PIPE + 3) @(negedge clk);
    check(exp_q.size() == 0, "every frame produced a result");
    check(partial_words > 0 && back_to_back > 0, "partial words and back-to-back frames seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
