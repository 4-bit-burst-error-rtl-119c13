// secded_enc: (16,11) Hsiao SEC-DED encoder for one 11-bit block of the 32-bit DEC code.
// Check bit k is the XOR of the data bits whose Hsiao column (ecc_pkg::hsiao_col) has bit k
// set. Purely combinational, no clock. The document asks for a SEC-DED code with 5 check
// bits per 11-bit block; the choice of a Hsiao matrix is this design's.
module secded_enc
  import ecc_pkg::*;
(
  input  logic [BLK_W-1:0]    data,
  output logic [SECDED_R-1:0] parity
);

  always_comb begin
    parity = '0;
    for (int unsigned i = 0; i < BLK_W; i++)
      if (data[i]) parity ^= HSIAO_COLS[i];
  end

endmodule
