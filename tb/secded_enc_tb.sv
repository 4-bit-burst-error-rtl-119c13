// secded_enc_tb: applies all 2048 data words, one per clock cycle, to the Hsiao (16,11)
// encoder and compares its 5 check bits with a reference written from the literal column
// list of the code's data part (7, 11, 13, 14, 19, 21, 22, 25, 26, 28, 31). It also checks
// that every data bit changes an odd number of check bits (at least 3), the property the
// double error detection relies on. Combinational block: outputs are checked in the cycle
// their input is applied.
module secded_enc_tb;
  localparam logic [4:0] COLS [11] = '{5'd7, 5'd11, 5'd13, 5'd14, 5'd19, 5'd21, 5'd22,
                                       5'd25, 5'd26, 5'd28, 5'd31};
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [10:0] data;
  logic [4:0]  parity, expect_p;
  int checks = 0, failures = 0;

  secded_enc dut (.data(data), .parity(parity));

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    data = '0;
    for (int v = 0; v < 2048; v++) begin
      @(posedge clk);
      data = 11'(v);
      #1;
      expect_p = '0;
      for (int i = 0; i < 11; i++) if (data[i]) expect_p ^= COLS[i];
      checks++;
      if (parity !== expect_p) begin
        failures++;
        if (failures < 10) $display("data %h: parity %h expected %h", data, parity, expect_p);
      end
      if ($countones(data) == 1) begin
        checks++;
        if ($countones(parity) < 3 || $countones(parity) % 2 == 0) begin
          failures++;
          $display("column of data %h has weight %0d", data, $countones(parity));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
