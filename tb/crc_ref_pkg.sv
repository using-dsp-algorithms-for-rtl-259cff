// crc_ref_pkg - reference arithmetic for the CRC testbenches.
//
// Works by plain polynomial long division over GF(2) on a list of bits, a
// different formulation from the LFSRs in the design: poly_mod() returns the
// remainder of the bit string (earliest bit = highest power) divided by the
// full generator (leading term included).  crc_of() appends n zero bits first,
// which gives the CRC of a message.
package crc_ref_pkg;

  typedef bit bitq_t[$];

  localparam logic [31:0] P15_FULL = 32'h0000_C599;  // x^15+x^14+x^10+x^8+x^7+x^4+x^3+1
  localparam logic [31:0] P5_FULL  = 32'h0000_0035;  // x^5+x^4+x^2+1

  function automatic logic [31:0] poly_mod(input bitq_t bits, input int n,
                                           input logic [31:0] pfull);
    logic [31:0] r;
    r = '0;
    foreach (bits[i]) begin
      r = (r << 1) | 32'(bits[i]);
      if (r[n]) r = r ^ pfull;
    end
    return r;
  endfunction

  function automatic logic [31:0] crc_of(input bitq_t bits, input int n,
                                         input logic [31:0] pfull);
    bitq_t b;
    b = bits;
    for (int i = 0; i < n; i++) b.push_back(1'b0);
    return poly_mod(b, n, pfull);
  endfunction

  function automatic bitq_t rand_bits(input int len);
    bitq_t b;
    for (int i = 0; i < len; i++) b.push_back(bit'($urandom_range(0, 1)));
    return b;
  endfunction

endpackage
