// ds_enc: (20,11) Difference Set encoder. It divides x^10*d(x) by the generator polynomial
// ecc_pkg::DS_GEN of the cyclic (21,11) DS code (a bit-serial division unrolled into XOR
// logic) and keeps remainder bits 1..9 as the 9 check bits s1d..s9d; remainder bit 0 is the
// parity position removed to shorten the code from 21 to 20 bits. Purely combinational.
// The (21,11) code and the removal of one check bit follow the document; which check bit is
// removed is this design's choice.
module ds_enc
  import ecc_pkg::*;
(
  input  logic [DS_K-1:0] data,    // XOR of the three data blocks
  output logic [DS_R-1:0] parity   // s9d..s1d
);

  logic [DS_N-DS_K-1:0] rem;
  logic                 fb;

  always_comb begin
    rem = '0;
    for (int i = DS_K - 1; i >= 0; i--) begin
      fb  = data[i] ^ rem[DS_N-DS_K-1];
      rem = {rem[DS_N-DS_K-2:0], 1'b0} ^ (fb ? DS_GEN[DS_N-DS_K-1:0] : '0);
    end
    parity = rem[DS_N-DS_K-1:1];
  end

endmodule
