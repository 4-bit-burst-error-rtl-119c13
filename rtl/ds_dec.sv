// ds_dec: one-step majority-logic (OS-MLD) decoder of the (20,11) DS code.
// The received word is placed at DS positions 0..20 (position 0, the removed check bit,
// reads as zero). Each of the 21 lines of the difference set gives a check sum; the lines
// through position 0 are not used (ecc_pkg::DS_CHECKS). For data position p the 4 remaining
// lines through p (ecc_pkg::DS_VOTES) meet only in p, so with at most two errors an
// erroneous bit fails at least 3 of them and a correct bit at most 2: the bit is flagged
// when 3 or more fail. The output is the correction signal, not corrected data. Purely
// combinational. syn_nz reports any failing check sum. Majority-logic decoding follows the
// document; the threshold follows from the 4 orthogonal check sums of the shortened code.
module ds_dec
  import ecc_pkg::*;
(
  input  logic [DS_K-1:0] data,
  input  logic [DS_R-1:0] parity,
  output logic [DS_K-1:0] corr,    // DS correction signal
  output logic            syn_nz   // some usable check sum fails
);

  logic [DS_N-1:0] r;
  logic [DS_N-1:0] chk;

  always_comb begin
    r = {data, parity, 1'b0};
    for (int unsigned s = 0; s < DS_N; s++)
      chk[s] = ^(r & DS_CHECKS[s]);
    syn_nz = |chk;
    for (int unsigned i = 0; i < DS_K; i++)
      corr[i] = ($countones(chk & DS_VOTES[i]) >= DS_THRESH);
  end

endmodule
