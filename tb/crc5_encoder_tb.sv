// crc5_encoder_tb - self-checking test of the serial CRC-5 encoder.
//
// Checks the example word 0xaf5 (remainder of 0xaf5 * x^5 by x^5+x^4+x^2+1 is
// 0x0a, code word 0x15eaa), all 4096 data words against the long-division
// reference with crc_en held high, the word period of DATA_W+1 = 13 clocks,
// a pause while crc_en is low, and that rst clears the outputs.
module crc5_encoder_tb;
  import crc_ref_pkg::*;

  logic        clk = 0, rst = 1, crc_en = 0;
  logic [11:0] data_in = '0;
  logic [16:0] data_trans;
  logic [4:0]  crc_out;
  logic        done;
  int checks = 0, failures = 0, cycle = 0;

  crc5_encoder dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0d: %s", cycle, what);
    end
  endtask

  function automatic logic [4:0] ref_crc(input logic [11:0] d);
    bitq_t b;
    for (int k = 11; k >= 0; k--) b.push_back(d[k]);
    return 5'(crc_of(b, 5, P5_FULL));
  endfunction

  initial begin
    int t_prev;
    logic [11:0] d;
    repeat (2) @(negedge clk);
    rst = 0;
    check(data_trans == 0 && crc_out == 0 && !done, "outputs cleared by reset");
    // example word
    data_in = 12'haf5;
    crc_en  = 1;
    @(negedge clk);                     // loaded
    data_in = 12'h000;                  // later changes do not disturb the word
    while (!done) @(negedge clk);
    check(crc_out == 5'h0a, $sformatf("crc of af5 = %h", crc_out));
    check(data_trans == 17'h15eaa, $sformatf("code word of af5 = %h", data_trans));
    // all words back to back: word d is loaded on the clock after the previous done
    t_prev = cycle;
    for (int w = 0; w < 4096; w++) begin
      d = 12'(w ^ 12'h5a3);
      data_in = d;
      @(negedge clk);                   // load edge
      data_in = 12'($urandom);
      while (!done) @(negedge clk);
      check(crc_out == ref_crc(d), $sformatf("crc of %h", d));
      check(data_trans == {d, ref_crc(d)}, $sformatf("code word of %h", d));
      if (w > 0) check(cycle - t_prev == 13, $sformatf("word period %0d", cycle - t_prev));
      t_prev = cycle;
    end
    // pause in the middle of a word
    data_in = 12'h123;
    @(negedge clk);
    repeat (4) @(negedge clk);
    crc_en = 0;
    repeat (20) begin
      @(negedge clk);
      check(!done, "no progress while crc_en is low");
    end
    crc_en = 1;
    while (!done) @(negedge clk);
    check(data_trans == {12'h123, ref_crc(12'h123)}, "word finished after the pause");
    rst = 1;
    @(negedge clk);
    rst = 0;
    check(data_trans == 0 && crc_out == 0, "reset clears the outputs");
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
