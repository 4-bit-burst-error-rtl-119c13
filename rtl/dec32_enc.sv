// dec32_enc: encoder of the double error correction (DEC) code for 32-bit words.
// The word is cut into block 1 (d1..d11), block 2 (d12..d22) and block 3 (d23..d32).
// Blocks 1 and 2 each go through a SEC-DED encoder (check bits s1a..s5a, s1b..s5b); the XOR
// of the three blocks, block 3 padded with a zero, goes through the (20,11) DS encoder
// (s1d..s9d). The result is a 51-bit code word with 19 check bits, laid out as
// ecc_pkg::dec_cw_t. This structure follows the document; the bit order of the code word is
// this design's choice. Purely combinational.
module dec32_enc
  import ecc_pkg::*;
(
  input  dec_data_t data,
  output dec_cw_t   cw
);

  logic [BLK_W-1:0] blk_a, blk_b, blk_c, blk_x;

  assign blk_a = data[BLK_W-1:0];
  assign blk_b = data[2*BLK_W-1:BLK_W];
  assign blk_c = {1'b0, data[DEC_DATA_W-1:2*BLK_W]};
  assign blk_x = blk_a ^ blk_b ^ blk_c;

  assign cw.data = data;

  secded_enc u_enc_a (.data(blk_a), .parity(cw.pa));
  secded_enc u_enc_b (.data(blk_b), .parity(cw.pb));
  ds_enc     u_enc_d (.data(blk_x), .parity(cw.pd));

endmodule
