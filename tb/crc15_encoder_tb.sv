// crc15_encoder_tb - self-checking test of the parallel CRC-15 encoder.
//
// Sends frames of random length (1..150 bits) through the valid/ready input,
// with random idle cycles, and rebuilds each frame from the output stream.
// The stream must be the message bits followed by the 15 CRC bits, most
// significant first, with the CRC equal to the long-division reference and
// equal to crc_out.  Also checks that a message word leaves one clock after it
// is taken and that the input is held off for exactly PIPE+2+5 clocks after a
// frame's last word (the stall while the CRC is computed and sent).
module crc15_encoder_tb;
  import crc_ref_pkg::*;

  localparam int unsigned J = 3;
  localparam int unsigned PIPE = 1;
  localparam int unsigned STALL = PIPE + 2 + (15 + J - 1) / J;

  logic clk = 0, rst = 1;
  logic in_valid = 0, in_ready, in_first = 0, in_last = 0;
  logic [J-1:0] in_bits = '0;
  logic [1:0]   in_cnt = '0;
  logic out_valid, out_first, out_last;
  logic [J-1:0] out_bits;
  logic [1:0]   out_cnt;
  logic [14:0]  crc_out;
  int checks = 0, failures = 0, cycle = 0, stalls = 0;

  crc15_encoder #(.J(J), .PIPE(PIPE)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0d: %s", cycle, what);
    end
  endtask

  bitq_t       exp_frames[$];   // message + CRC bits of each frame sent
  logic [14:0] exp_crc[$];
  bitq_t       got;
  logic [J-1:0] taken_bits;
  bit          taken_msg = 0;
  int          low_run = 0;

  always @(posedge clk) begin
    if (!rst) begin
      // a message word taken last clock must be on the output now
      if (taken_msg) begin
        check(out_valid && out_bits == taken_bits, "message word forwarded after one clock");
      end
      taken_msg  <= in_valid && in_ready;
      taken_bits <= in_bits;
      // length of every in_ready-low stretch
      if (!in_ready) low_run <= low_run + 1;
      else if (low_run != 0) begin
        check(low_run == STALL, $sformatf("stall of %0d clocks, expected %0d", low_run, STALL));
        stalls++;
        low_run <= 0;
      end
      if (out_valid) begin
        if (out_first) got = {};
        for (int k = 0; k < int'(out_cnt); k++) got.push_back(out_bits[J-1-k]);
        if (out_last) begin
          bitq_t e;
          logic [14:0] ec;
          e  = exp_frames.pop_front();
          ec = exp_crc.pop_front();
          check(got == e, $sformatf("code word stream of %0d bits", e.size()));
          check(crc_out == ec, $sformatf("crc_out %h expected %h", crc_out, ec));
        end
      end
    end
  end

  task automatic send_frame(input bitq_t bits, input bit gaps);
    int nw, i;
    bitq_t e;
    logic [14:0] c;
    nw = (bits.size() + J - 1) / J;
    c = 15'(crc_of(bits, 15, P15_FULL));
    e = bits;
    for (int k = 14; k >= 0; k--) e.push_back(c[k]);
    exp_frames.push_back(e);
    exp_crc.push_back(c);
    for (int w = 0; w < nw; w++) begin
      if (gaps) begin
        while ($urandom_range(0, 2) == 0) begin
          in_valid = 0; @(negedge clk);
        end
      end
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
      @(posedge clk);
      while (!in_ready) @(posedge clk);
      @(negedge clk);
    end
    in_valid = 0;
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    @(negedge clk);
    for (int f = 0; f < 200; f++) send_frame(rand_bits($urandom_range(1, 150)), f % 2 == 0);
    repeat (STALL + 4) @(negedge clk);
    check(exp_frames.size() == 0, "every frame came out");
    check(stalls >= 199, "input stalled after every frame");
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
