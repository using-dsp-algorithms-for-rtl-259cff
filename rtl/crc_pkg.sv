// crc_pkg - constants shared by the CRC blocks.
//
// Holds the widths and generator polynomials of the design.  A polynomial is
// stored without its leading x^n term: bit i of the constant is the
// coefficient of x^i.
//   CRC15_POLY : x^15+x^14+x^10+x^8+x^7+x^4+x^3+1, the CAN frame check sequence.
//   CRC5_POLY  : x^5+x^4+x^2+1, the small worked example of the serial codec.
// Both are used MSB first with a zero start value, so a CRC is the remainder
// of message * x^n divided by the polynomial.
package crc_pkg;

  localparam int unsigned CRC15_W = 15;
  localparam logic [CRC15_W-1:0] CRC15_POLY = 15'h4599;

  localparam int unsigned CRC5_W = 5;
  localparam logic [CRC5_W-1:0] CRC5_POLY = 5'h15;

endpackage
