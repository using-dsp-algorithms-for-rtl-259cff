// can_crc_top - CRC unit of a CAN controller: parallel CRC-15 encoder and
// decoder, the serial CRC-15 register, and the serial CRC-5 codec example.
//
// Three parts stand side by side, each with its own ports:
//  * Parallel CRC-15 path.  Message words of a frame (J=3 bits per clock) enter
//    crc15_encoder, which forwards them and appends the 15-bit CRC.  The code
//    word stream is brought out (cw_*) and also looped back to crc15_decoder
//    through a channel that XORs rx_err_mask into each word's bits, so that
//    transmission errors can be injected; the decoder reports the syndrome and
//    an error flag per frame.
//  * Serial CRC-15 path.  crc15_serial, one bit per clock, the architecture the
//    parallel path unfolds.
//  * CRC-5 example.  crc5_encoder turns a 12-bit word into a 17-bit code word;
//    the code word, XORed with c5_err_mask, feeds crc5_decoder.
// The encoder/decoder pairing follows the source paper; the loop-back channels with
// error masks stand in for the CAN bus and are this design's choice.
//
// Parameters: J bits per clock (3), M-level pipelined CRC loop (4), PIPE input
// stages (1), all passed to the CRC-15 engines.  Timing: see the sub-blocks.
// All logic is on clk; rst is synchronous, active high.
module can_crc_top
  import crc_pkg::*;
#(
  parameter int unsigned J    = 3,
  parameter int unsigned M    = 4,
  parameter int unsigned PIPE = 1,
  localparam int unsigned CW  = $clog2(J + 1)
) (
  input  logic               clk,
  input  logic               rst,
  // parallel CRC-15: message input
  input  logic               tx_valid,
  output logic               tx_ready,
  input  logic               tx_first,
  input  logic               tx_last,
  input  logic [J-1:0]       tx_bits,
  input  logic [CW-1:0]      tx_cnt,
  output logic [CRC15_W-1:0] tx_crc,
  // parallel CRC-15: code word stream as sent
  output logic               cw_valid,
  output logic               cw_first,
  output logic               cw_last,
  output logic [J-1:0]       cw_bits,
  output logic [CW-1:0]      cw_cnt,
  // parallel CRC-15: channel error mask and checker result
  input  logic [J-1:0]       rx_err_mask,
  output logic               rx_done,
  output logic [CRC15_W-1:0] rx_syndrome,
  output logic               rx_error,
  // serial CRC-15
  input  logic               ser_clear,
  input  logic               ser_bit_en,
  input  logic               ser_bit,
  output logic [CRC15_W-1:0] ser_crc,
  // CRC-5 example codec
  input  logic               c5_crc_en,
  input  logic [11:0]        c5_data_in,
  output logic [16:0]        c5_data_trans,
  output logic [4:0]         c5_crc_out,
  output logic               c5_enc_done,
  input  logic [16:0]        c5_err_mask,
  output logic [11:0]        c5_data_decod,
  output logic [4:0]         c5_error,
  output logic [4:0]         c5_rx_crc,
  output logic               c5_dec_done
);

  crc15_encoder #(.J(J), .M(M), .PIPE(PIPE)) u_tx (
    .clk, .rst,
    .in_valid (tx_valid),
    .in_ready (tx_ready),
    .in_first (tx_first),
    .in_last  (tx_last),
    .in_bits  (tx_bits),
    .in_cnt   (tx_cnt),
    .out_valid(cw_valid),
    .out_first(cw_first),
    .out_last (cw_last),
    .out_bits (cw_bits),
    .out_cnt  (cw_cnt),
    .crc_out  (tx_crc)
  );

  crc15_decoder #(.J(J), .M(M), .PIPE(PIPE)) u_rx (
    .clk, .rst,
    .in_valid (cw_valid),
    .in_first (cw_first),
    .in_last  (cw_last),
    .in_bits  (cw_bits ^ rx_err_mask),
    .in_cnt   (cw_cnt),
    .done     (rx_done),
    .syndrome (rx_syndrome),
    .error    (rx_error)
  );

  crc15_serial u_serial (
    .clk, .rst,
    .clear  (ser_clear),
    .bit_en (ser_bit_en),
    .bit_in (ser_bit),
    .crc    (ser_crc)
  );

  crc5_encoder u_c5_enc (
    .clk, .rst,
    .crc_en    (c5_crc_en),
    .data_in   (c5_data_in),
    .data_trans(c5_data_trans),
    .crc_out   (c5_crc_out),
    .done      (c5_enc_done)
  );

  crc5_decoder u_c5_dec (
    .clk, .rst,
    .data_trans(c5_data_trans ^ c5_err_mask),
    .data_decod(c5_data_decod),
    .error     (c5_error),
    .crc_out   (c5_rx_crc),
    .done      (c5_dec_done)
  );

endmodule
