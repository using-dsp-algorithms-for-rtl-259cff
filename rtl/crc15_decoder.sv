// crc15_decoder - parallel CRC-15 checker for a received CAN code word.
//
// The received message words and the CRC words that follow them are run
// through a crc15_parallel engine as one frame.  A code word made by
// crc15_encoder is a multiple of the generator polynomial, so the remainder
// left at the end of the frame, the syndrome, is zero when no error occurred;
// any single burst of up to 15 flipped bits, and every odd number of flipped
// bits, leaves it non-zero.  Checking by a zero remainder follows the
// source paper's decoder; the stream format is this design's.
//
// Interface: in_valid/in_first/in_last/in_bits/in_cnt as for crc15_parallel,
// the frame spanning message and CRC words.  done pulses once per frame with
// syndrome and error (syndrome != 0) updated; they hold until the next frame.
// Timing: done comes PIPE+2 clocks after the frame's last word is taken.
// J, M and PIPE are passed to the engine (see crc15_parallel).
module crc15_decoder
  import crc_pkg::*;
#(
  parameter int unsigned J    = 3,
  parameter int unsigned M    = 4,
  parameter int unsigned PIPE = 1,
  localparam int unsigned CW  = $clog2(J + 1)
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               in_valid,
  input  logic               in_first,
  input  logic               in_last,
  input  logic [J-1:0]       in_bits,
  input  logic [CW-1:0]      in_cnt,
  output logic               done,
  output logic [CRC15_W-1:0] syndrome,
  output logic               error
);

  logic               eng_valid, eng_last;
  logic [CRC15_W-1:0] eng_crc;

  crc15_parallel #(.J(J), .M(M), .PIPE(PIPE)) u_engine (
    .clk, .rst,
    .in_valid, .in_first, .in_last, .in_bits, .in_cnt,
    .out_valid(eng_valid),
    .out_last (eng_last),
    .crc      (eng_crc)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      done     <= 1'b0;
      syndrome <= '0;
      error    <= 1'b0;
    end else begin
      done <= eng_valid & eng_last;
      if (eng_valid && eng_last) begin
        syndrome <= eng_crc;
        error    <= |eng_crc;
      end
    end
  end

endmodule
