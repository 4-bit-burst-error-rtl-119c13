// dec_burst_top: the two memory protection codecs side by side.
//   * DEC codec: 32 data bits + 19 check bits (51-bit code word), corrects any one or two
//     bit errors; encoder dec32_enc, decoder dec32_dec.
//   * Burst codec: 32 data bits + 16 check bits (48-bit code word), four-way interleaved SEC
//     code, corrects any burst of up to 4 adjacent bits; encoder burst_enc, decoder burst_dec.
// The memory that stores the code words sits outside: *_cw_out is written to it, *_cw_in is
// read back from it. Everything is combinational (no clock, no reset), so the decoders'
// outputs follow their inputs in the same cycle. Both codes are systematic: the data field of
// each code word output is the data input itself. Structure follows the document; putting
// both codecs in one top with separate ports is this design's packaging.
module dec_burst_top
  import ecc_pkg::*;
(
  // DEC codec
  input  dec_data_t   dec_data_in,
  output dec_cw_t     dec_cw_out,
  input  dec_cw_t     dec_cw_in,
  output dec_data_t   dec_data_out,
  output logic        dec_ded_a,
  output logic        dec_ded_b,
  output logic        dec_err,
  // burst codec
  input  logic [31:0] bst_data_in,
  output logic [47:0] bst_cw_out,
  input  logic [47:0] bst_cw_in,
  output logic [31:0] bst_data_out,
  output logic [3:0]  bst_err
);

  dec32_enc u_dec_enc (.data(dec_data_in), .cw(dec_cw_out));
  dec32_dec u_dec_dec (
    .cw(dec_cw_in), .data(dec_data_out), .ded_a(dec_ded_a), .ded_b(dec_ded_b), .err(dec_err)
  );

  burst_enc #(.DATA_W(32), .WAYS(4), .R(4)) u_bst_enc (.data(bst_data_in), .cw(bst_cw_out));
  burst_dec #(.DATA_W(32), .WAYS(4), .R(4)) u_bst_dec (
    .cw(bst_cw_in), .data(bst_data_out), .err(bst_err)
  );

endmodule
