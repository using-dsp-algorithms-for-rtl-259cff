// crc5_decoder_tb - self-checking test of the serial CRC-5 decoder.
//
// Checks the intact example code word 0x15eaa (data 0xaf5, syndrome 0),
// every valid code word of the 4096 data words, and every single-bit error in
// a set of words: the syndrome must equal the long-division remainder of the
// received word, be non-zero for every single-bit error, and equal the flipped
// bit itself for an error in the CRC field.  data_decod and crc_out must be
// the two fields of the received word, and a word must take DATA_W+CRC_W+1 =
// 18 clocks.
module crc5_decoder_tb;
  import crc_ref_pkg::*;

  logic        clk = 0, rst = 1;
  logic [16:0] data_trans = '0;
  logic [11:0] data_decod;
  logic [4:0]  error, crc_out;
  logic        done;
  int checks = 0, failures = 0, cycle = 0;

  crc5_decoder dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0d: %s", cycle, what);
    end
  endtask

  function automatic logic [4:0] ref_rem(input logic [16:0] c);
    bitq_t b;
    for (int k = 16; k >= 0; k--) b.push_back(c[k]);
    return 5'(poly_mod(b, 5, P5_FULL));
  endfunction

  function automatic logic [4:0] ref_crc(input logic [11:0] d);
    bitq_t b;
    for (int k = 11; k >= 0; k--) b.push_back(d[k]);
    return 5'(crc_of(b, 5, P5_FULL));
  endfunction

  int t_prev = 0;
  bit first_done = 1;

  // Present a word just before the decoder samples it, wait for its result.
  task automatic decode(input logic [16:0] c);
    data_trans = c;
    @(negedge clk);                     // sampled at this edge
    data_trans = 17'($urandom);
    while (!done) @(negedge clk);
    if (!first_done) check(cycle - t_prev == 18, $sformatf("word period %0d", cycle - t_prev));
    first_done = 0;
    t_prev = cycle;
    check(data_decod == c[16:5], "data field");
    check(crc_out == c[4:0], "crc field");
    check(error == ref_rem(c), $sformatf("syndrome of %h: %h expected %h", c, error, ref_rem(c)));
  endtask

  initial begin
    logic [16:0] c;
    data_trans = 17'h15eaa;
    repeat (2) @(negedge clk);
    rst = 0;                            // first sample at the next edge
    decode(17'h15eaa);
    check(error == 0 && data_decod == 12'haf5, "example code word is clean");
    for (int w = 0; w < 4096; w++) begin
      c = {12'(w), ref_crc(12'(w))};
      decode(c);
      check(error == 0, "valid code word has zero syndrome");
    end
    for (int w = 0; w < 40; w++) begin
      logic [11:0] d;
      d = 12'($urandom);
      for (int p = 0; p < 17; p++) begin
        c = {d, ref_crc(d)} ^ (17'd1 << p);
        decode(c);
        check(error != 0, $sformatf("single-bit error at %0d detected", p));
        if (p < 5) check(error == 5'(1 << p), "error in the crc field gives that bit");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
