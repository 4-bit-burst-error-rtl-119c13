// sec_dec_tb: for every 8-bit data word, encodes it with the reference Hamming columns and
// applies no error and each of the 12 single-bit errors, one per clock cycle. The decoder
// must return the original data, with err high exactly when an error was injected.
module sec_dec_tb;
  import ecc_ref_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [7:0]  data, data_out;
  logic [3:0]  parity, p;
  logic        err;
  logic [11:0] cw;
  int checks = 0, failures = 0;

  sec_dec #(.K(8), .R(4)) dut (.data(data), .parity(parity), .data_out(data_out), .err(err));

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 256; v++) begin
      p = '0;
      for (int i = 0; i < 8; i++) if (v[i]) p ^= HAM[i];
      for (int k = -1; k < 12; k++) begin
        cw = {p, 8'(v)};
        if (k >= 0) cw[k] = ~cw[k];
        @(posedge clk);
        {parity, data} = cw;
        #1;
        checks++;
        if (data_out !== 8'(v) || err !== (k >= 0)) begin
          failures++;
          if (failures < 10) $display("data %h error %0d: out %h err %b", v, k, data_out, err);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
