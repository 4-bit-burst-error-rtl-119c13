// burst_enc_tb: drives the interleaved burst encoder with corner and random words, one per
// clock cycle, and compares the 48-bit code word with ecc_ref_pkg::ref_burst (four-way
// interleaving of d1..d32, Hamming check bits of block b at positions 32 + 4p + b).
module burst_enc_tb;
  import ecc_ref_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [31:0] data;
  logic [47:0] cw, exp_cw;
  int checks = 0, failures = 0;

  burst_enc #(.DATA_W(32), .WAYS(4), .R(4)) dut (.data(data), .cw(cw));

  task automatic apply(input logic [31:0] d);
    @(posedge clk);
    data = d;
    #1;
    exp_cw = ref_burst(d);
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
    for (int n = 0; n < 3000; n++) apply($urandom);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
