// crc15_serial - bit-serial CRC-15 register of the CAN frame check sequence.
//
// Fifteen flip-flops numbered 0..14 form a Galois LFSR for
// x^15+x^14+x^10+x^8+x^7+x^4+x^3+1.  An XOR sits in front of flip-flops
// 0,3,4,7,8,10 and 14, one per non-leading term of the polynomial, and all of
// them are fed back from the output of flip-flop 14 (CRC OUT).  That taps
// layout follows the source paper; that the message bit is XORed with CRC OUT to form
// the feedback, the zero start value and the clear/enable inputs are this
// design's choices (they follow the CAN specification).
//
// Interface: bit_in is taken on a rising clk edge when bit_en is high, earliest
// bit of the frame first.  clear (or rst) zeroes the register at the next edge
// and has priority over bit_en.  crc is the register itself: after the last
// message bit has been clocked in it holds the 15-bit CRC, bit 14 first on the
// wire.  One bit per clock; result valid one clock after the last bit.
// The critical loop is flip-flop 14 -> feedback XOR -> tap XOR -> flip-flop 14:
// two XOR delays per clock.
module crc15_serial
  import crc_pkg::*;
(
  input  logic               clk,
  input  logic               rst,
  input  logic               clear,
  input  logic               bit_en,
  input  logic               bit_in,
  output logic [CRC15_W-1:0] crc
);

  logic [CRC15_W-1:0] q;
  logic               fb;     // CRC OUT XOR message bit, drives every tap XOR

  assign fb = bit_in ^ q[14];

  always_ff @(posedge clk) begin
    if (rst || clear) begin
      q <= '0;
    end else if (bit_en) begin
      // flip-flops with a tap XOR in front: 0,3,4,7,8,10,14
      q[0]  <= fb;
      q[1]  <= q[0];
      q[2]  <= q[1];
      q[3]  <= q[2]  ^ fb;
      q[4]  <= q[3]  ^ fb;
      q[5]  <= q[4];
      q[6]  <= q[5];
      q[7]  <= q[6]  ^ fb;
      q[8]  <= q[7]  ^ fb;
      q[9]  <= q[8];
      q[10] <= q[9]  ^ fb;
      q[11] <= q[10];
      q[12] <= q[11];
      q[13] <= q[12];
      q[14] <= q[13] ^ fb;
    end
  end

  assign crc = q;

endmodule
