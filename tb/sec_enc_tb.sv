// sec_enc_tb: applies all 256 data words to the (12,8) Hamming SEC encoder, one per clock
// cycle, and compares the check bits with a reference from the literal column list
// 3, 5, 6, 7, 9, 10, 11, 12 (ecc_ref_pkg::HAM).
module sec_enc_tb;
  import ecc_ref_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [7:0] data;
  logic [3:0] parity, exp_p;
  int checks = 0, failures = 0;

  sec_enc #(.K(8), .R(4)) dut (.data(data), .parity(parity));

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    data = '0;
    for (int v = 0; v < 256; v++) begin
      @(posedge clk);
      data = 8'(v);
      #1;
      exp_p = '0;
      for (int i = 0; i < 8; i++) if (data[i]) exp_p ^= HAM[i];
      checks++;
      if (parity !== exp_p) begin
        failures++;
        if (failures < 10) $display("data %h: parity %h expected %h", data, parity, exp_p);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
