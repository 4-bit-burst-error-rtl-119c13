// ds_enc_tb: applies all 2048 inputs to the (20,11) DS encoder, one per clock cycle, and
// checks the check bits two ways: against a table of the check bits produced by each data
// bit alone (the remainder of x^(10+i) modulo g(x) = 1+x^3+x^4+x^6+x^8+x^10, bits 1..9),
// and by checking that the 20-bit code word satisfies all 16 difference-set check sums
// (lines of {0,2,7,8,11} mod 21) that do not pass through the removed position 0.
module ds_enc_tb;
  // check-bit contribution of data bit i, listed from i=10 down to i=0
  localparam logic [8:0] COL [10:0] = '{9'h156, 9'h0ab, 9'h055, 9'h17c, 9'h1e8, 9'h0f4,
                                        9'h07a, 9'h03d, 9'h01e, 9'h159, 9'h0ac};
  localparam logic [20:0] LINES [16] = '{21'h00130a, 21'h002614, 21'h004c28, 21'h009850,
      21'h0130a0, 21'h026140, 21'h04c280, 21'h098500, 21'h130a00, 21'h0c2802, 21'h185004,
      21'h028026, 21'h05004c, 21'h0a0098, 21'h140130, 21'h1004c2};
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [10:0] data;
  logic [8:0]  parity, exp_p;
  logic [20:0] word;
  int checks = 0, failures = 0;

  ds_enc dut (.data(data), .parity(parity));

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
      exp_p = '0;
      for (int i = 0; i < 11; i++) if (data[i]) exp_p ^= COL[i];
      checks++;
      if (parity !== exp_p) begin
        failures++;
        if (failures < 10) $display("data %h: parity %h expected %h", data, parity, exp_p);
      end
      word = {data, parity, 1'b0};
      for (int l = 0; l < 16; l++) begin
        checks++;
        if (^(word & LINES[l])) begin
          failures++;
          if (failures < 10) $display("data %h fails check sum %0d", data, l);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
