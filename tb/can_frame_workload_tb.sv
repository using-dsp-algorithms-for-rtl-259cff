// can_frame_workload_tb - CAN data frames through the CRC unit.
//
// Builds the bit fields a CAN CRC covers, from start-of-frame to the end of the
// data field, for standard (11-bit identifier, 19+8n bits) and extended
// (29-bit identifier, 39+8n bits) data frames with 0..8 data bytes:
//   standard: SOF, ID[10:0], RTR, IDE, r0, DLC[3:0], data bytes MSB first
//   extended: SOF, ID[28:18], SRR, IDE, ID[17:0], RTR, r1, r0, DLC[3:0], data
// Each frame goes through the parallel encoder and decoder of can_crc_top and,
// bit by bit, through the serial register.  Checks: the encoder's CRC and the
// serial CRC equal the long-division reference, the decoder finds the clean
// code word error-free, the parallel input takes ceil(N/3) clocks and the
// serial one N clocks (28 against 83 for the longest standard frame).
module can_frame_workload_tb;
  import crc_ref_pkg::*;

  localparam int unsigned J = 3;

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

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0d: %s", cycle, what);
    end
  endtask

  function automatic void push_field(ref bitq_t b, input logic [31:0] v, input int n);
    for (int k = n - 1; k >= 0; k--) b.push_back(v[k]);
  endfunction

  function automatic bitq_t can_frame(input bit ext, input logic [28:0] id, input int dlc);
    bitq_t b;
    b = {};
    push_field(b, 0, 1);                         // SOF (dominant)
    if (!ext) begin
      push_field(b, 32'(id[10:0]), 11);
      push_field(b, 0, 1);                       // RTR: data frame
      push_field(b, 0, 1);                       // IDE: standard
      push_field(b, 0, 1);                       // r0
    end else begin
      push_field(b, 32'(id[28:18]), 11);
      push_field(b, 1, 1);                       // SRR
      push_field(b, 1, 1);                       // IDE: extended
      push_field(b, 32'(id[17:0]), 18);
      push_field(b, 0, 1);                       // RTR
      push_field(b, 0, 2);                       // r1, r0
    end
    push_field(b, 32'(dlc), 4);
    for (int i = 0; i < dlc; i++) push_field(b, 32'($urandom_range(0, 255)), 8);
    return b;
  endfunction

  initial begin
    bitq_t b;
    logic [14:0] e;
    int nw, t0, i, nframes;
    nframes = 0;
    repeat (3) @(negedge clk);
    rst = 0;
    @(negedge clk);
    for (int ext = 0; ext < 2; ext++) begin
      for (int dlc = 0; dlc <= 8; dlc++) begin
        for (int rep = 0; rep < 4; rep++) begin
          b = can_frame(ext[0], 29'($urandom), dlc);
          check(b.size() == (ext != 0 ? 39 : 19) + 8 * dlc, "frame length");
          e = 15'(crc_of(b, 15, P15_FULL));
          // parallel path
          nw = (b.size() + J - 1) / J;
          t0 = cycle;
          for (int w = 0; w < nw; w++) begin
            tx_valid = 1;
            tx_first = (w == 0);
            tx_last  = (w == nw - 1);
            tx_bits  = '0;
            tx_cnt   = 2'(J);
            for (int k = 0; k < J; k++) begin
              i = w * J + k;
              if (i < b.size()) tx_bits[J-1-k] = b[i];
            end
            if (w == nw - 1 && b.size() % J != 0) tx_cnt = 2'(b.size() % J);
            @(posedge clk);
            while (!tx_ready) @(posedge clk);
            @(negedge clk);
          end
          tx_valid = 0;
          check(cycle - t0 == nw, $sformatf("parallel input took %0d clocks for %0d bits", cycle - t0, b.size()));
          while (!rx_done) @(negedge clk);
          check(tx_crc == e, $sformatf("encoder crc %h expected %h", tx_crc, e));
          check(!rx_error && rx_syndrome == 0, "decoder accepts the clean frame");
          // serial path
          @(negedge clk) ser_clear = 1;
          @(negedge clk) ser_clear = 0;
          t0 = cycle;
          foreach (b[k]) begin
            ser_bit_en = 1; ser_bit = b[k];
            @(negedge clk);
          end
          ser_bit_en = 0;
          check(cycle - t0 == b.size(), "serial input takes one clock per bit");
          check(ser_crc == e, $sformatf("serial crc %h expected %h", ser_crc, e));
          nframes++;
        end
      end
    end
    $display("CAN frames: %0d (standard and extended, 0..8 data bytes)", nframes);
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
