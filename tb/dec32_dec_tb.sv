// dec32_dec_tb: encodes random 32-bit words with the reference DEC encoder and applies
// every error pattern of weight 0, 1 and 2 over the 51 code bits (1327 patterns per word),
// one per clock cycle. The corrected data must equal the written word; ded_a (ded_b) must be
// high exactly when both errors are in block 1's (block 2's) data and check bits; err must be
// high whenever an error was injected. It also applies random patterns of two errors
// confined to block 3 and to the DS check bits.
module dec32_dec_tb;
  import ecc_pkg::*;
  import ecc_ref_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  dec_cw_t     cw;
  dec_data_t   data, wdata;
  logic        ded_a, ded_b, err;
  logic [50:0] good;
  int checks = 0, failures = 0;

  dec32_dec dut (.cw(cw), .data(data), .ded_a(ded_a), .ded_b(ded_b), .err(err));

  // code-word bits belonging to block 1 (data 0..10, checks 32..36) and block 2
  function automatic bit in_a(input int p);
    return (p < 11) || (p >= 32 && p < 37);
  endfunction
  function automatic bit in_b(input int p);
    return (p >= 11 && p < 22) || (p >= 37 && p < 42);
  endfunction

  task automatic apply(input int i, input int j);  // -1 = no error at that slot
    logic [50:0] e;
    bit xa, xb;
    e = '0;
    if (i >= 0) e[i] = 1'b1;
    if (j >= 0) e[j] = 1'b1;
    xa = (i >= 0) && (j >= 0) && in_a(i) && in_a(j);
    xb = (i >= 0) && (j >= 0) && in_b(i) && in_b(j);
    @(posedge clk);
    cw = good ^ e;
    #1;
    checks++;
    if (data !== wdata || ded_a !== xa || ded_b !== xb || err !== (e != '0)) begin
      failures++;
      if (failures < 10)
        $display("errors at %0d,%0d: data %h expected %h ded %b%b/%b%b err %b", i, j, data,
                 wdata, ded_a, ded_b, xa, xb, err);
    end
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int w = 0; w < 6; w++) begin
      wdata = (w == 0) ? '0 : (w == 1) ? '1 : $urandom;
      good  = ref_dec32(wdata);
      apply(-1, -1);
      for (int i = 0; i < 51; i++) begin
        apply(i, -1);
        for (int j = i + 1; j < 51; j++) apply(i, j);
      end
    end
    for (int n = 0; n < 1000; n++) begin
      int i, j;
      wdata = $urandom;
      good  = ref_dec32(wdata);
      i = 22 + int'($urandom_range(9));
      j = (n % 2 == 0) ? 22 + int'($urandom_range(9)) : 42 + int'($urandom_range(8));
      if (i != j) apply(i, j);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
