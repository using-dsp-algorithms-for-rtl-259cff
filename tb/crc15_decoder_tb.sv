// crc15_decoder_tb - self-checking test of the parallel CRC-15 checker.
//
// Builds code words (random message of 1..150 bits followed by its CRC from
// the long-division reference), optionally corrupts them with one flipped
// bit, a burst of up to 15 bits or a random odd number of flips, and feeds
// them as 3-bit words.  For every frame the syndrome must equal the reference
// remainder of (received word * x^15), be zero for an intact word and non-zero
// for every corruption used here; done must come PIPE+2 clocks after the
// frame's last word.
module crc15_decoder_tb;
  import crc_ref_pkg::*;

  localparam int unsigned J = 3;
  localparam int unsigned PIPE = 1;

  logic clk = 0, rst = 1;
  logic in_valid = 0, in_first = 0, in_last = 0;
  logic [J-1:0] in_bits = '0;
  logic [1:0]   in_cnt = '0;
  logic         done, error;
  logic [14:0]  syndrome;
  int checks = 0, failures = 0, cycle = 0;
  int n_clean = 0, n_single = 0, n_burst = 0, n_odd = 0;

  crc15_decoder #(.J(J), .PIPE(PIPE)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0d: %s", cycle, what);
    end
  endtask

  task automatic send_frame(input bitq_t bits);
    int nw, i;
    nw = (bits.size() + J - 1) / J;
    for (int w = 0; w < nw; w++) begin
      in_valid = 1;
      in_first = (w == 0);
      in_last  = (w == nw - 1);
      in_bits  = 3'($urandom);
      in_cnt   = 2'(J);
      for (int k = 0; k < J; k++) begin
        i = w * J + k;
        if (i < bits.size()) in_bits[J-1-k] = bits[i];
      end
      if (w == nw - 1 && bits.size() % J != 0) in_cnt = 2'(bits.size() % J);
      @(negedge clk);
    end
    in_valid = 0;
  endtask

  initial begin
    bitq_t m, c;
    logic [14:0] crc, exp;
    int kind, p, len, t0, nflip;
    repeat (3) @(negedge clk);
    rst = 0;
    @(negedge clk);
    for (int f = 0; f < 400; f++) begin
      m = rand_bits($urandom_range(1, 150));
      crc = 15'(crc_of(m, 15, P15_FULL));
      c = m;
      for (int k = 14; k >= 0; k--) c.push_back(crc[k]);
      kind = f % 4;
      case (kind)
        1: begin
          p = $urandom_range(0, c.size() - 1);
          c[p] = ~c[p];
          n_single++;
        end
        2: begin
          len = $urandom_range(2, 15);
          if (len > c.size()) len = c.size();
          p = $urandom_range(0, c.size() - len);
          c[p] = ~c[p];
          c[p+len-1] = ~c[p+len-1];
          for (int k = p + 1; k < p + len - 1; k++) if ($urandom_range(0, 1) != 0) c[k] = ~c[k];
          n_burst++;
        end
        3: begin
          nflip = 2 * $urandom_range(1, 3) + 1;   // 3, 5 or 7 distinct positions
          for (int k = 0; k < nflip; k++) begin
            p = (k * c.size()) / nflip + $urandom_range(0, c.size() / nflip - 1);
            c[p] = ~c[p];
          end
          n_odd++;
        end
        default: n_clean++;
      endcase
      exp = 15'(crc_of(c, 15, P15_FULL));
      send_frame(c);
      t0 = cycle;
      while (!done) @(negedge clk);
      check(cycle - t0 == PIPE + 2, $sformatf("done after %0d clocks", cycle - t0));
      check(syndrome == exp, $sformatf("syndrome %h expected %h", syndrome, exp));
      check(error == (exp != 0), "error flag");
      if (kind == 0) check(syndrome == 0 && !error, "intact code word passes");
      else           check(error, "corrupted code word detected");
      if ($urandom_range(0, 1) != 0) @(negedge clk);
    end
    check(n_clean > 0 && n_single > 0 && n_burst > 0 && n_odd > 0, "all error kinds used");
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
