// can_crc_top_tb - end-to-end test of the CAN CRC unit at its default sizes.
//
// Parallel CRC-15 path: frames of 1..150 random bits go into the encoder over
// valid/ready; the code word stream must be message + CRC (long-division
// reference).  The channel mask corrupts some frames; the decoder's syndrome
// must equal the reference remainder of what was actually received, zero for
// the clean frames.  Serial path: the same frames are clocked bit by bit into
// the serial CRC-15 register, which must reach the same CRC, taking three
// times the clocks of the 3-bit-wide input.  CRC-5 example: the encoder runs
// with crc_en held high (paused now and then), every code word is checked, and
// the decoder's result is checked against the word it sampled, with the error
// mask set now and then.  Each mechanism (input stall, short last word,
// detected CRC-15 error, clean CRC-15 frame, serial match, CRC-5 error,
// crc_en pause) must happen at least once.
module can_crc_top_tb;
  import crc_ref_pkg::*;

  localparam int unsigned J = 3;
  localparam int NFRAMES = 150;

  logic clk = 0, rst = 1;
  logic tx_valid = 0, tx_ready, tx_first = 0, tx_last = 0;
  logic [2:0]  tx_bits = '0;
  logic [1:0]  tx_cnt = '0;
  logic [14:0] tx_crc;
  logic        cw_valid, cw_first, cw_last;
  logic [2:0]  cw_bits;
  logic [1:0]  cw_cnt;
  logic [2:0]  rx_err_mask = '0;
  logic        rx_done, rx_error;
  logic [14:0] rx_syndrome;
  logic        ser_clear = 0, ser_bit_en = 0, ser_bit = 0;
  logic [14:0] ser_crc;
  logic        c5_crc_en = 0;
  logic [11:0] c5_data_in = '0;
  logic [16:0] c5_data_trans;
  logic [4:0]  c5_crc_out;
  logic        c5_enc_done;
  logic [16:0] c5_err_mask = '0;
  logic [11:0] c5_data_decod;
  logic [4:0]  c5_error, c5_rx_crc;
  logic        c5_dec_done;

  can_crc_top dut (.*);

  int checks = 0, failures = 0, cycle = 0;
  int n_stall = 0, n_short = 0, n_rx_err = 0, n_rx_clean = 0, n_serial = 0;
  int n_c5_enc = 0, n_c5_clean = 0, n_c5_err = 0, n_c5_pause = 0;
  bit tx_finished = 0, ser_finished = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0d: %s", cycle, what);
    end
  endtask

  // ---------------- parallel CRC-15 path ----------------
  bitq_t       sent_q[$];       // message + CRC, per frame
  logic [14:0] crc_q[$];
  bitq_t       ser_q[$];        // messages for the serial path
  logic [14:0] ser_exp_q[$];
  int          par_cycles_q[$];
  bitq_t       got, rcv;
  bitq_t       rcv_q[$];
  bit          corrupt_now = 0;

  always @(posedge clk) begin
    if (!rst) begin
      if (tx_valid && !tx_ready) n_stall++;
      if (cw_valid) begin
        if (cw_first) begin
          got = {};
          rcv = {};
        end
        for (int k = 0; k < int'(cw_cnt); k++) begin
          got.push_back(cw_bits[J-1-k]);
          rcv.push_back(cw_bits[J-1-k] ^ rx_err_mask[J-1-k]);
        end
        if (cw_last) begin
          bitq_t e;
          logic [14:0] c;
          e = sent_q.pop_front();
          c = crc_q.pop_front();
          check(got == e, "code word stream = message + CRC");
          check(tx_crc == c, "tx_crc");
          rcv_q.push_back(rcv);
        end
      end
      if (rx_done) begin
        bitq_t r;
        logic [14:0] s;
        r = rcv_q.pop_front();
        s = 15'(crc_of(r, 15, P15_FULL));
        check(rx_syndrome == s, $sformatf("syndrome %h expected %h", rx_syndrome, s));
        check(rx_error == (s != 0), "rx_error flag");
        if (s != 0) n_rx_err++; else n_rx_clean++;
      end
    end
  end

  // channel mask: corrupt the words of some frames at random
  always @(negedge clk) begin
    rx_err_mask <= (corrupt_now && $urandom_range(0, 5) == 0) ? 3'($urandom) : 3'b000;
  end

  task automatic send_frame(input bitq_t bits);
    int nw, i, t0;
    logic [14:0] c;
    nw = (bits.size() + J - 1) / J;
    c = 15'(crc_of(bits, 15, P15_FULL));
    begin
      bitq_t e;
      e = bits;
      for (int k = 14; k >= 0; k--) e.push_back(c[k]);
      sent_q.push_back(e);
    end
    crc_q.push_back(c);
    ser_q.push_back(bits);
    ser_exp_q.push_back(c);
    t0 = cycle;
    for (int w = 0; w < nw; w++) begin
      tx_valid = 1;
      tx_first = (w == 0);
      tx_last  = (w == nw - 1);
      tx_bits  = 3'($urandom);
      tx_cnt   = 2'(J);
      for (int k = 0; k < J; k++) begin
        i = w * J + k;
        if (i < bits.size()) tx_bits[J-1-k] = bits[i];
      end
      if (w == nw - 1 && bits.size() % J != 0) begin
        tx_cnt = 2'(bits.size() % J);
        n_short++;
      end
      @(posedge clk);
      while (!tx_ready) @(posedge clk);
      @(negedge clk);
    end
    par_cycles_q.push_back(nw);
    tx_valid = 0;
  endtask

  initial begin : tx_proc
    repeat (3) @(negedge clk);
    rst = 0;
    @(negedge clk);
    for (int f = 0; f < NFRAMES; f++) begin
      corrupt_now = (f % 3 == 2);
      send_frame(rand_bits($urandom_range(1, 150)));
    end
    corrupt_now = 0;
    repeat (20) @(negedge clk);
    check(sent_q.size() == 0 && rcv_q.size() == 0, "every frame sent and checked");
    tx_finished = 1;
  end

  // ---------------- serial CRC-15 path ----------------
  initial begin : ser_proc
    bitq_t b;
    logic [14:0] e;
    int t0, pc;
    wait (rst == 0);
    for (int f = 0; f < NFRAMES; f++) begin
      while (ser_q.size() == 0) @(negedge clk);
      b  = ser_q.pop_front();
      e  = ser_exp_q.pop_front();
      while (par_cycles_q.size() == 0) @(negedge clk);
      pc = par_cycles_q.pop_front();
      @(negedge clk) ser_clear = 1;
      @(negedge clk) ser_clear = 0;
      t0 = cycle;
      foreach (b[i]) begin
        ser_bit_en = 1; ser_bit = b[i];
        @(negedge clk);
      end
      ser_bit_en = 0;
      check(ser_crc == e, $sformatf("serial crc %h expected %h", ser_crc, e));
      check(cycle - t0 == b.size() && pc == (b.size() + 2) / 3,
            "serial takes one clock per bit, parallel one per 3 bits");
      n_serial++;
    end
    ser_finished = 1;
  end

  // ---------------- CRC-5 example ----------------
  function automatic logic [4:0] c5_ref_crc(input logic [11:0] d);
    bitq_t b;
    for (int k = 11; k >= 0; k--) b.push_back(d[k]);
    return 5'(crc_of(b, 5, P5_FULL));
  endfunction

  function automatic logic [4:0] c5_ref_rem(input logic [16:0] c);
    bitq_t b;
    for (int k = 16; k >= 0; k--) b.push_back(c[k]);
    return 5'(poly_mod(b, 5, P5_FULL));
  endfunction

  logic [11:0] c5_loaded;
  bit          c5_enc_idle = 1;
  logic [16:0] c5_sampled;
  bit          c5_dec_idle = 1;

  // Track what each half of the codec took in, from their documented timing:
  // the encoder loads when idle and crc_en is high, the decoder samples on the
  // edge that shows its done (and on the first clock after reset).
  always @(posedge clk) begin
    if (rst) begin
      c5_enc_idle <= 1;
      c5_dec_idle <= 1;
    end else begin
      if (c5_enc_idle && c5_crc_en) begin
        c5_loaded   <= c5_data_in;
        c5_enc_idle <= 0;
      end
      if (c5_enc_done) begin
        check(c5_data_trans == {c5_loaded, c5_ref_crc(c5_loaded)}, "CRC-5 code word");
        check(c5_crc_out == c5_ref_crc(c5_loaded), "CRC-5 crc_out");
        n_c5_enc++;
        c5_enc_idle <= 1;
        if (c5_crc_en) begin          // loads again on this same edge
          c5_loaded   <= c5_data_in;
          c5_enc_idle <= 0;
        end
      end
      if (c5_dec_idle) begin
        c5_sampled  <= c5_data_trans ^ c5_err_mask;
        c5_dec_idle <= 0;
      end
      if (c5_dec_done) begin
        check(c5_data_decod == c5_sampled[16:5] && c5_rx_crc == c5_sampled[4:0], "CRC-5 fields");
        check(c5_error == c5_ref_rem(c5_sampled), "CRC-5 syndrome");
        if (c5_error != 0) n_c5_err++; else n_c5_clean++;
        c5_sampled <= c5_data_trans ^ c5_err_mask;   // samples again on this edge
      end
    end
  end

  initial begin : c5_proc
    wait (rst == 0);
    @(negedge clk);
    c5_crc_en = 1;
    while (!(tx_finished && ser_finished) || n_c5_enc < 60) begin
      @(negedge clk);
      if (c5_enc_done) c5_data_in = 12'($urandom);
      if ($urandom_range(0, 199) == 0) begin
        c5_crc_en = 0;
        n_c5_pause++;
        repeat ($urandom_range(1, 10)) @(negedge clk);
        c5_crc_en = 1;
      end
      if ($urandom_range(0, 59) == 0)
        c5_err_mask = ($urandom_range(0, 1) != 0) ? 17'd1 << $urandom_range(0, 16) : 17'd0;
    end
    if (n_c5_pause == 0) begin          // make sure the pause happened once
      c5_crc_en = 0; n_c5_pause++;
      repeat (5) @(negedge clk);
      c5_crc_en = 1;
      repeat (40) @(negedge clk);
    end
    repeat (40) @(negedge clk);

    check(n_stall > 0,    $sformatf("encoder input stall seen %0d times", n_stall));
    check(n_short > 0,    $sformatf("short last word seen %0d times", n_short));
    check(n_rx_err > 0,   $sformatf("CRC-15 error detected %0d times", n_rx_err));
    check(n_rx_clean > 0, $sformatf("clean CRC-15 frame %0d times", n_rx_clean));
    check(n_serial == NFRAMES, $sformatf("serial frames %0d", n_serial));
    check(n_c5_enc > 0 && n_c5_clean > 0 && n_c5_err > 0,
          $sformatf("CRC-5 words %0d, clean %0d, with error %0d", n_c5_enc, n_c5_clean, n_c5_err));
    check(n_c5_pause > 0, "crc_en pause");
    $display("mechanisms: stall=%0d short_word=%0d rx_error=%0d rx_clean=%0d serial=%0d c5_words=%0d c5_clean=%0d c5_error=%0d c5_pause=%0d",
             n_stall, n_short, n_rx_err, n_rx_clean, n_serial, n_c5_enc, n_c5_clean, n_c5_err, n_c5_pause);
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
