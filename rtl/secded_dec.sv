// secded_dec: (16,11) Hsiao SEC-DED syndrome decoder for one 11-bit block.
// The syndrome is the received check bits XOR the check bits recomputed from the received
// data. An odd-weight syndrome is a single error: the data bit whose column equals the
// syndrome gets its bit of the correction vector set (a check-bit error sets none). A
// non-zero even-weight syndrome raises ded, the double error signal that makes the DEC
// decoder use the DS correction for this block instead. Purely combinational; the data are
// not corrected here, only the correction signal is produced, as in the document's decoder.
module secded_dec
  import ecc_pkg::*;
(
  input  logic [BLK_W-1:0]    data,
  input  logic [SECDED_R-1:0] parity,
  output logic [BLK_W-1:0]    corr,  // SEC correction signal
  output logic                sec,   // single error: syndrome of odd weight
  output logic                ded    // double error: syndrome of even, non-zero weight
);

  logic [SECDED_R-1:0] syn;

  always_comb begin
    syn = parity;
    for (int unsigned i = 0; i < BLK_W; i++)
      if (data[i]) syn ^= HSIAO_COLS[i];
    sec = ^syn;
    ded = (syn != '0) && !sec;
    for (int unsigned i = 0; i < BLK_W; i++)
      corr[i] = (syn == HSIAO_COLS[i]);
  end

endmodule
