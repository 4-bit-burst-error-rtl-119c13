// burst_dec_tb: encodes random words with the reference burst encoder and applies every
// burst of length 1 to 4 at every start position of the 48-bit code word (each burst has
// its first and last bits in error and random bits between), one per clock cycle. The
// decoder must return the written word, and err must flag exactly the blocks hit.
module burst_dec_tb;
  import ecc_ref_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [47:0] cw, good, e;
  logic [31:0] data, wdata;
  logic [3:0]  err, exp_err;
  int checks = 0, failures = 0;

  burst_dec #(.DATA_W(32), .WAYS(4), .R(4)) dut (.cw(cw), .data(data), .err(err));

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int w = 0; w < 40; w++) begin
      wdata = $urandom;
      good  = ref_burst(wdata);
      for (int len = 0; len <= 4; len++) begin
        for (int s = 0; s + len <= 48; s++) begin
          e = '0;
          exp_err = '0;
          for (int k = 0; k < len; k++) begin
            e[s + k] = (k == 0 || k == len - 1) ? 1'b1 : 1'($urandom);
            if (e[s + k]) exp_err[(s + k) % 4] = 1'b1;
          end
          @(posedge clk);
          cw = good ^ e;
          #1;
          checks++;
          if (data !== wdata || err !== exp_err) begin
            failures++;
            if (failures < 10) $display("burst %h: data %h expected %h err %b/%b", e, data,
                                        wdata, err, exp_err);
          end
          if (len == 0) break;
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
