// sec_enc: single error correction (SEC) encoder, a shortened Hamming code with K data and
// R check bits; one is used per interleaved block of the 4-bit burst codec. Check bit k is
// the XOR of the data bits whose column (ecc_pkg::hamming_col) has bit k set. Purely
// combinational. The document only asks for a SEC code per block; the Hamming matrix is
// this design's choice. R must satisfy 2^R >= K + R + 1.
module sec_enc
  import ecc_pkg::*;
#(
  parameter int unsigned K = 8,
  parameter int unsigned R = 4
) (
  input  logic [K-1:0] data,
  output logic [R-1:0] parity
);

  typedef logic [R-1:0] cols_t [K];
  function automatic cols_t make_cols();
    cols_t t;
    for (int unsigned i = 0; i < K; i++) t[i] = R'(hamming_col(i));
    return t;
  endfunction
  localparam cols_t COLS = make_cols();

  always_comb begin
    parity = '0;
    for (int unsigned i = 0; i < K; i++)
      if (data[i]) parity ^= COLS[i];
  end

endmodule
