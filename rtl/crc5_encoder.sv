// crc5_encoder - serial CRC encoder of the small worked example: a 12-bit word
// in, the 17-bit code word {data, CRC-5} out, generator x^5+x^4+x^2+1.
//
// The word is loaded into a shift register and its bits, most significant
// first, are clocked one per cycle into a CRC_W-bit Galois LFSR starting from
// zero.  After DATA_W shifts the LFSR holds the remainder of data * x^CRC_W
// divided by the generator; it is published on crc_out and appended to the
// data on data_trans.  The port names, widths and polynomial follow the
// source paper; the load/shift sequencing and the done pulse are this design's.
//
// Interface: crc_en high enables the encoder: when idle it loads data_in, then
// shifts while crc_en stays high (a low crc_en pauses it).  rst is synchronous
// and clears everything.  Timing: data_in is sampled at the load edge; DATA_W
// edges later data_trans/crc_out change and done pulses for one clock, so one
// word takes DATA_W+1 clocks (13 by default) while crc_en is held high.
module crc5_encoder #(
  parameter int unsigned DATA_W = 12,
  parameter int unsigned CRC_W  = crc_pkg::CRC5_W,
  parameter logic [CRC_W-1:0] POLY = crc_pkg::CRC5_POLY
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    crc_en,
  input  logic [DATA_W-1:0]       data_in,
  output logic [DATA_W+CRC_W-1:0] data_trans,
  output logic [CRC_W-1:0]        crc_out,
  output logic                    done
);

  localparam int unsigned CNTW = $clog2(DATA_W + 1);

  logic              busy;
  logic [DATA_W-1:0] data_q;     // word being encoded
  logic [DATA_W-1:0] sh;         // bits not yet shifted in, MSB next
  logic [CRC_W-1:0]  lfsr;
  logic [CNTW-1:0]   left;       // shifts still to do
  logic [CRC_W-1:0]  lfsr_nx;

  // One Galois LFSR step with the next message bit.
  always_comb begin
    logic fb;
    fb      = sh[DATA_W-1] ^ lfsr[CRC_W-1];
    lfsr_nx = {lfsr[CRC_W-2:0], 1'b0} ^ (fb ? POLY : '0);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      busy       <= 1'b0;
      data_q     <= '0;
      sh         <= '0;
      lfsr       <= '0;
      left       <= '0;
      data_trans <= '0;
      crc_out    <= '0;
      done       <= 1'b0;
    end else begin
      done <= 1'b0;
      if (crc_en) begin
        if (!busy) begin
          busy   <= 1'b1;
          data_q <= data_in;
          sh     <= data_in;
          lfsr   <= '0;
          left   <= CNTW'(DATA_W);
        end else begin
          lfsr <= lfsr_nx;
          sh   <= sh << 1;
          left <= left - 1'b1;
          if (left == CNTW'(1)) begin
            busy       <= 1'b0;
            crc_out    <= lfsr_nx;
            data_trans <= {data_q, lfsr_nx};
            done       <= 1'b1;
          end
        end
      end
    end
  end

endmodule
