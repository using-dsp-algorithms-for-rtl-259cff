// crc15_serial_tb - self-checking test of the bit-serial CRC-15 register.
//
// Clocks frames of random length (1..120 bits, random idle cycles between
// bits) into crc15_serial and compares the register with the CRC obtained by
// long division.  Also checks the single-bit message "1" (CRC = the generator
// taps, 0x4599), that clear restarts a frame, and that bit_en low holds the
// register.  One bit per clock is checked by counting cycles.  A 4-level
// look-ahead pipelined engine one bit wide runs on the same bits and must reach
// the same CRC two clocks later.
module crc15_serial_tb;
  import crc_ref_pkg::*;

  logic        clk = 0, rst = 1, clear = 0, bit_en = 0, bit_in = 0;
  logic [14:0] crc;
  int checks = 0, failures = 0;

  crc15_serial dut (.*);

  // one-bit-wide, 4-level pipelined engine on the same bits
  logic        pv, pl;
  logic [14:0] pcrc;
  logic        p_first = 0;
  crc15_parallel #(.J(1), .M(4), .PIPE(1)) piped (
    .clk, .rst, .in_valid(bit_en), .in_first(p_first), .in_last(1'b0),
    .in_bits(bit_in), .in_cnt(1'b1), .out_valid(pv), .out_last(pl), .crc(pcrc));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic run_frame(input bitq_t bits, input bit gaps);
    logic [14:0] exp;
    logic [14:0] hold;
    int t0;
    @(negedge clk) clear = 1;
    @(negedge clk) clear = 0;
    check(crc == 0, "clear zeroes the register");
    t0 = 0;
    foreach (bits[i]) begin
      if (gaps && $urandom_range(0, 3) == 0) begin
        hold = crc;
        bit_en = 0; bit_in = bit'($urandom_range(0, 1));
        @(negedge clk);
        check(crc == hold, "bit_en low holds the register");
      end
      bit_en = 1; bit_in = bits[i]; p_first = (i == 0);
      @(negedge clk);
      t0++;
    end
    bit_en = 0;
    p_first = 0;
    exp = 15'(crc_of(bits, 15, P15_FULL));
    repeat (2) @(negedge clk);
    check(pcrc == exp, $sformatf("pipelined serial crc %h expected %h", pcrc, exp));
    check(crc == exp, $sformatf("frame of %0d bits: crc %h expected %h", bits.size(), crc, exp));
    check(t0 == bits.size(), "one bit per clock");
  endtask

  initial begin
    bitq_t b;
    repeat (2) @(negedge clk);
    rst = 0;
    b = {1'b1};
    run_frame(b, 0);
    check(crc == 15'h4599, "message '1' gives the generator taps");
    for (int f = 0; f < 200; f++) begin
      b = rand_bits($urandom_range(1, 120));
      run_frame(b, f[0]);
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
