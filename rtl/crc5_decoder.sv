// crc5_decoder - serial CRC decoder of the small worked example: checks a
// 17-bit code word {data, CRC-5} and splits it into data, CRC and syndrome.
//
// The received word is sampled into a shift register and its bits, most
// significant first, are divided by the generator x^5+x^4+x^2+1 in a CRC_W-bit
// long-division register (bit shifted in at the bottom, generator subtracted
// when the bit falling out of the top is 1).  After all DATA_W+CRC_W bits the
// register holds the remainder of the code word, the syndrome: zero for a
// valid code word, and for a single flipped bit in the CRC field exactly that
// bit.  The port names, widths and syndrome output follow the source paper; the
// sequencing and the done pulse are this design's.
//
// Interface: the decoder has no enable: it samples data_trans, takes
// DATA_W+CRC_W clocks to divide it, updates data_decod (the data field),
// crc_out (the received CRC field) and error (the syndrome) with a one-clock
// done pulse, and samples again on the next edge.  A word thus takes
// DATA_W+CRC_W+1 clocks (18 by default).  rst is synchronous.
module crc5_decoder #(
  parameter int unsigned DATA_W = 12,
  parameter int unsigned CRC_W  = crc_pkg::CRC5_W,
  parameter logic [CRC_W-1:0] POLY = crc_pkg::CRC5_POLY
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic [DATA_W+CRC_W-1:0] data_trans,
  output logic [DATA_W-1:0]       data_decod,
  output logic [CRC_W-1:0]        error,
  output logic [CRC_W-1:0]        crc_out,
  output logic                    done
);

  localparam int unsigned N    = DATA_W + CRC_W;
  localparam int unsigned CNTW = $clog2(N + 1);

  logic             busy;
  logic [N-1:0]     word_q;    // code word being checked
  logic [N-1:0]     sh;        // bits not yet divided, MSB next
  logic [CRC_W-1:0] rem;
  logic [CNTW-1:0]  left;
  logic [CRC_W-1:0] rem_nx;

  // One long-division step: shift the next bit in, subtract on a carry out.
  always_comb begin
    logic top;
    top    = rem[CRC_W-1];
    rem_nx = {rem[CRC_W-2:0], sh[N-1]} ^ (top ? POLY : '0);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      busy       <= 1'b0;
      word_q     <= '0;
      sh         <= '0;
      rem        <= '0;
      left       <= '0;
      data_decod <= '0;
      error      <= '0;
      crc_out    <= '0;
      done       <= 1'b0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        busy   <= 1'b1;
        word_q <= data_trans;
        sh     <= data_trans;
        rem    <= '0;
        left   <= CNTW'(N);
      end else begin
        rem  <= rem_nx;
        sh   <= sh << 1;
        left <= left - 1'b1;
        if (left == CNTW'(1)) begin
          busy       <= 1'b0;
          data_decod <= word_q[N-1:CRC_W];
          crc_out    <= word_q[CRC_W-1:0];
          error      <= rem_nx;
          done       <= 1'b1;
        end
      end
    end
  end

endmodule
