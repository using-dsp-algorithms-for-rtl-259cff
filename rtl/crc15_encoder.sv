// crc15_encoder - parallel CRC-15 encoder for a CAN frame: message words in,
// message words followed by the 15-bit CRC out, J bits per clock.
//
// The message words of a frame pass straight to the output (one register
// stage) and into a crc15_parallel engine.  After the frame's last word the
// input is held off (in_ready low) until the engine has folded that word in;
// the CRC is then captured and sent after the message, most significant bit
// first, as ceil(15/J) further words (five 3-bit words for J=3).  in_ready
// rises again once the last CRC word is out.  That the CRC unit encodes with
// the unfolded engine follows the source paper; framing, handshake and stream format
// are this design's choices.
//
// Interface: input words use valid/ready, with in_first/in_last/in_cnt as for
// crc15_parallel.  The output is valid-only: out_first marks a frame's first
// word, out_last its last CRC word.  crc_out holds the CRC of the latest frame.
// Timing: a message word appears at the output one clock after it is taken;
// the first CRC word follows PIPE+2 clocks after the last message word, and a
// frame of W words occupies the input for W + PIPE + 2 + ceil(15/J) clocks.
// J, M and PIPE are passed to the engine (see crc15_parallel).
module crc15_encoder
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
  output logic               in_ready,
  input  logic               in_first,
  input  logic               in_last,
  input  logic [J-1:0]       in_bits,
  input  logic [CW-1:0]      in_cnt,
  output logic               out_valid,
  output logic               out_first,
  output logic               out_last,
  output logic [J-1:0]       out_bits,
  output logic [CW-1:0]      out_cnt,
  output logic [CRC15_W-1:0] crc_out
);

  typedef enum logic [1:0] {S_MSG, S_WAIT, S_SEND} state_t;

  localparam int unsigned SHW = CRC15_W + J;   // shift register with room for a short last word

  state_t             st;
  logic               take;
  logic               eng_valid, eng_last;
  logic [CRC15_W-1:0] eng_crc;
  logic [SHW-1:0]     sh;      // CRC bits still to send, MSB-aligned
  logic [4:0]         rem;     // CRC bits still to send

  assign in_ready = (st == S_MSG);
  assign take     = in_valid & in_ready;

  crc15_parallel #(.J(J), .M(M), .PIPE(PIPE)) u_engine (
    .clk, .rst,
    .in_valid (take),
    .in_first (in_first),
    .in_last  (in_last),
    .in_bits  (in_bits),
    .in_cnt   (in_cnt),
    .out_valid(eng_valid),
    .out_last (eng_last),
    .crc      (eng_crc)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      st        <= S_MSG;
      sh        <= '0;
      rem       <= '0;
      crc_out   <= '0;
      out_valid <= 1'b0;
      out_first <= 1'b0;
      out_last  <= 1'b0;
      out_bits  <= '0;
      out_cnt   <= '0;
    end else begin
      out_valid <= 1'b0;
      out_first <= 1'b0;
      out_last  <= 1'b0;
      unique case (st)
        S_MSG: begin
          if (take) begin
            out_valid <= 1'b1;
            out_first <= in_first;
            out_bits  <= in_bits;
            out_cnt   <= in_cnt;
            if (in_last) st <= S_WAIT;
          end
        end
        S_WAIT: begin
          if (eng_valid && eng_last) begin
            crc_out <= eng_crc;
            sh      <= {eng_crc, {J{1'b0}}};
            rem     <= 5'(CRC15_W);
            st      <= S_SEND;
          end
        end
        S_SEND: begin
          out_valid <= 1'b1;
          out_bits  <= sh[SHW-1 -: J];
          sh        <= sh << J;
          if (rem <= 5'(J)) begin
            out_cnt  <= CW'(rem);
            out_last <= 1'b1;
            rem      <= '0;
            st       <= S_MSG;
          end else begin
            out_cnt  <= CW'(J);
            rem      <= rem - 5'(J);
          end
        end
        default: st <= S_MSG;
      endcase
    end
  end

  // Framing rule: the word that opens a frame carries in_first, and no other
  // word does.
  logic in_frame;
  always_ff @(posedge clk) begin
    if (rst)       in_frame <= 1'b0;
    else if (take) in_frame <= ~in_last;
  end

  a_frame_start: assert property (@(posedge clk) disable iff (rst)
    take |-> (in_first == !in_frame))
    else $error("crc15_encoder: in_first does not match the frame boundaries");

  initial begin
    assert (J >= 1 && J <= CRC15_W) else $fatal(1, "crc15_encoder: J must be 1..15");
  end

endmodule
