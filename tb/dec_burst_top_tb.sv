// dec_burst_top_tb: end-to-end test of both codecs at their default sizes. Each cycle a
// random word is written through an encoder, an error pattern is XORed onto the stored code
// word (standing in for the memory), and the word read back through the decoder must equal
// the one written. Error patterns are drawn so that every decoding path occurs:
//   DEC codec: no error; one error in the data of block 1, 2, 3 (SEC path, and the DS path
//   for block 3); one check-bit error; two errors in block 1 or block 2 (DED raised, DS
//   correction used); two errors in different blocks; two errors in block 3; random pairs.
//   Both codecs are also given 16-bit values (upper half zero), the input width used in
//   some of the original simulations.
//   Burst codec: bursts of length 1, 2, 3 and 4, including bursts across the data/check-bit
//   boundary, and a burst that touches all four interleaved blocks.
// Each path is counted, and a path that never occurred counts as a failure. The codecs are
// combinational: results are checked in the cycle the code word is applied.
module dec_burst_top_tb;
  import ecc_pkg::*;
  import ecc_ref_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  dec_data_t   dec_data_in, dec_data_out;
  dec_cw_t     dec_cw_out, dec_cw_in;
  logic        dec_ded_a, dec_ded_b, dec_err;
  logic [31:0] bst_data_in, bst_data_out;
  logic [47:0] bst_cw_out, bst_cw_in;
  logic [3:0]  bst_err;
  int checks = 0, failures = 0;

  typedef enum int {M_NONE, M_SEC_A, M_SEC_B, M_DS_C1, M_CHK1, M_DED_A, M_DED_B, M_CROSS,
                    M_DS_C2, M_RAND2, M_B1, M_B2, M_B3, M_B4, M_BEDGE, M_BALL, M_W16, M_COUNT}
    mech_t;
  int hits [M_COUNT];
  bit w16;  // drive 16-bit values (upper half zero)

  dec_burst_top dut (.*);

  // random distinct code-word bit positions in [lo, hi]
  function automatic int pick(input int lo, input int hi);
    return lo + int'($urandom_range(hi - lo));
  endfunction

  task automatic dec_case(input mech_t m, input int i, input int j);
    logic [50:0] e;
    e = '0;
    if (i >= 0) e[i] = 1'b1;
    if (j >= 0) e[j] = 1'b1;
    @(posedge clk);
    dec_data_in = w16 ? {16'h0, 16'($urandom)} : $urandom;
    if (w16) hits[M_W16]++;
    #1;
    checks++;
    if (dec_cw_out !== ref_dec32(dec_data_in)) begin
      failures++;
      $display("DEC encoder mismatch for %h", dec_data_in);
    end
    dec_cw_in = dec_cw_out ^ e;
    #1;
    checks++;
    if (dec_data_out !== dec_data_in || dec_err !== (e != '0)) begin
      failures++;
      if (failures < 10) $display("DEC %s errors %0d,%0d: read %h wrote %h", m.name(), i, j,
                                  dec_data_out, dec_data_in);
    end
    if (m == M_DED_A || m == M_DED_B) begin
      checks++;
      if (dec_ded_a !== (m == M_DED_A) || dec_ded_b !== (m == M_DED_B)) begin
        failures++;
        $display("DEC %s: ded_a %b ded_b %b", m.name(), dec_ded_a, dec_ded_b);
      end
    end
    hits[m]++;
  endtask

  task automatic bst_case(input int start, input int len);
    logic [47:0] e;
    mech_t       m;
    e = '0;
    for (int k = 0; k < len; k++) e[start + k] = (k == 0 || k == len - 1) ? 1'b1 : 1'($urandom);
    @(posedge clk);
    bst_data_in = w16 ? {16'h0, 16'($urandom)} : $urandom;
    if (w16) hits[M_W16]++;
    #1;
    checks++;
    if (bst_cw_out !== ref_burst(bst_data_in)) begin
      failures++;
      $display("burst encoder mismatch for %h", bst_data_in);
    end
    bst_cw_in = bst_cw_out ^ e;
    #1;
    checks++;
    if (bst_data_out !== bst_data_in) begin
      failures++;
      if (failures < 10) $display("burst %h: read %h wrote %h", e, bst_data_out, bst_data_in);
    end
    m = mech_t'(int'(M_B1) + len - 1);
    hits[m]++;
    if (start < 32 && start + len > 32) hits[M_BEDGE]++;
    if (bst_err == 4'hf) hits[M_BALL]++;
  endtask

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int i, j;
    w16 = 1'b0;
    foreach (hits[k]) hits[k] = 0;
    dec_data_in = '0;
    dec_cw_in   = '0;
    bst_data_in = '0;
    bst_cw_in   = '0;
    for (int n = 0; n < 400; n++) begin
      w16 = (n % 4 == 3);
      dec_case(M_NONE, -1, -1);
      dec_case(M_SEC_A, pick(0, 10), -1);
      dec_case(M_SEC_B, pick(11, 21), -1);
      dec_case(M_DS_C1, pick(22, 31), -1);
      dec_case(M_CHK1, pick(32, 50), -1);
      i = pick(0, 10);  j = (n % 2 == 1) ? pick(32, 36) : (i + 1 + pick(0, 9)) % 11;
      if (i != j) dec_case(M_DED_A, i, j);
      i = pick(11, 21); j = (n % 2 == 1) ? pick(37, 41) : 11 + (i - 11 + 1 + pick(0, 9)) % 11;
      if (i != j) dec_case(M_DED_B, i, j);
      dec_case(M_CROSS, pick(0, 10), pick(11, 31));
      i = pick(22, 31); j = 22 + (i - 22 + 1 + pick(0, 8)) % 10;
      dec_case(M_DS_C2, i, j);
      i = pick(0, 50);  j = pick(0, 50);
      if (i != j) dec_case(M_RAND2, i, j);
      for (int len = 1; len <= 4; len++) bst_case(pick(0, 48 - len), len);
      bst_case(29 + pick(0, 2), 4);
    end
    foreach (hits[k]) begin
      checks++;
      if (hits[k] == 0) begin
        failures++;
        $display("case %s never occurred", mech_t'(k));
      end
    end
    $display("paths: none=%0d secA=%0d secB=%0d blk3=%0d chk=%0d dedA=%0d dedB=%0d cross=%0d blk3x2=%0d rand=%0d",
             hits[M_NONE], hits[M_SEC_A], hits[M_SEC_B], hits[M_DS_C1], hits[M_CHK1],
             hits[M_DED_A], hits[M_DED_B], hits[M_CROSS], hits[M_DS_C2], hits[M_RAND2]);
    $display("bursts: len1=%0d len2=%0d len3=%0d len4=%0d boundary=%0d all-blocks=%0d",
             hits[M_B1], hits[M_B2], hits[M_B3], hits[M_B4], hits[M_BEDGE], hits[M_BALL]);
    $display("16-bit words: %0d", hits[M_W16]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
