// dec32_enc_tb: drives the 32-bit DEC encoder with corner words (all zeros, all ones,
// every single-bit word) and random words, one per clock cycle, and compares the 51-bit code
// word with the reference in ecc_ref_pkg: data unchanged, Hsiao check bits of blocks 1 and
// 2, DS check bits of the XOR of the three blocks.
module dec32_enc_tb;
  import ecc_pkg::*;
  import ecc_ref_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  dec_data_t   data;
  dec_cw_t     cw;
  logic [50:0] exp_cw;
  int checks = 0, failures = 0;

  dec32_enc dut (.data(data), .cw(cw));

  task automatic apply(input logic [31:0] d);
    @(posedge clk);
    data = d;
    #1;
    exp_cw = ref_dec32(d);
    checks++;
    if (cw !== exp_cw) begin
      failures++;
      if (failures < 10) $display("data %h: cw %h expected %h", d, cw, exp_cw);
    end
  endtask

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    apply('0);
    apply('1);
    for (int i = 0; i < 32; i++) apply(32'(1) << i);
    for (int n = 0; n < 4000; n++) apply($urandom);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
