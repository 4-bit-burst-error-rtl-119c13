// dec32_dec: decoder of the 32-bit DEC code; corrects any one or two bit errors in the
// 51-bit code word (data or check bits).
// Blocks 1 and 2 each have a SEC-DED decoder; the XOR of the three received blocks and the
// DS check bits go to the majority-logic DS decoder. Selection, per block:
//   * block 1 (2): without DED the block holds at most one error and its SEC correction
//     signal is used; with DED both errors are in the block, and the DS correction signal,
//     which then equals the block's error pattern, is used.
//   * block 3: with either DED active it holds no error. Otherwise the DS correction is the
//     XOR of the three blocks' error patterns, so block 3's pattern is the DS correction XOR
//     the SEC corrections of blocks 1 and 2.
// The rule for blocks 1 and 2 follows the document; the block-3 rule is this design's
// derivation. err flags any non-zero syndrome. Purely combinational.
module dec32_dec
  import ecc_pkg::*;
(
  input  dec_cw_t   cw,
  output dec_data_t data,
  output logic      ded_a,  // double error in block 1: DS correction used there
  output logic      ded_b,  // double error in block 2
  output logic      err     // some error was seen
);

  logic [BLK_W-1:0] blk_a, blk_b, blk_c, blk_x;
  logic [BLK_W-1:0] corr_a, corr_b, corr_d;
  logic [BLK_W-1:0] fix_a, fix_b, corr_c;
  logic [BLK3_W-1:0] fix_c;
  logic             sec_a, sec_b, ds_nz;

  assign blk_a = cw.data[BLK_W-1:0];
  assign blk_b = cw.data[2*BLK_W-1:BLK_W];
  assign blk_c = {1'b0, cw.data[DEC_DATA_W-1:2*BLK_W]};
  assign blk_x = blk_a ^ blk_b ^ blk_c;

  secded_dec u_dec_a (.data(blk_a), .parity(cw.pa), .corr(corr_a), .sec(sec_a), .ded(ded_a));
  secded_dec u_dec_b (.data(blk_b), .parity(cw.pb), .corr(corr_b), .sec(sec_b), .ded(ded_b));
  ds_dec     u_dec_d (.data(blk_x), .parity(cw.pd), .corr(corr_d), .syn_nz(ds_nz));

  always_comb begin
    fix_a = ded_a ? corr_d : corr_a;
    fix_b = ded_b ? corr_d : corr_b;
    corr_c = corr_d ^ corr_a ^ corr_b;  // bit 10 is the zero padding of block 3
    fix_c  = (ded_a || ded_b) ? '0 : corr_c[BLK3_W-1:0];
    data   = cw.data ^ {fix_c, fix_b, fix_a};
    err   = sec_a || ded_a || sec_b || ded_b || ds_nz;
  end

endmodule
