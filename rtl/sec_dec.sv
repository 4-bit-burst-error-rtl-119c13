// sec_dec: SEC decoder for the shortened Hamming code of sec_enc. The syndrome (received
// check bits XOR recomputed ones) equals the column of the bit in error; the data bit with
// that column is inverted. A syndrome equal to a unit vector points at a check bit and
// leaves the data alone. err is high for any non-zero syndrome. Purely combinational.
module sec_dec
  import ecc_pkg::*;
#(
  parameter int unsigned K = 8,
  parameter int unsigned R = 4
) (
  input  logic [K-1:0] data,
  input  logic [R-1:0] parity,
  output logic [K-1:0] data_out,
  output logic         err
);

  logic [R-1:0] syn;

  typedef logic [R-1:0] cols_t [K];
  function automatic cols_t make_cols();
    cols_t t;
    for (int unsigned i = 0; i < K; i++) t[i] = R'(hamming_col(i));
    return t;
  endfunction
  localparam cols_t COLS = make_cols();

  always_comb begin
    syn = parity;
    for (int unsigned i = 0; i < K; i++)
      if (data[i]) syn ^= COLS[i];
    err = (syn != '0);
    for (int unsigned i = 0; i < K; i++)
      data_out[i] = data[i] ^ (syn == COLS[i]);
  end

endmodule
