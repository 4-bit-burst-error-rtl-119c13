// secded_dec_tb: encodes random 11-bit words with a reference Hsiao (16,11) encoder (literal
// column list), then applies every error pattern of weight 0, 1 and 2 over the 16 code
// bits, one per clock cycle. Expected: no error -> corr=0, sec=0, ded=0; one data error ->
// corr has exactly that bit, sec=1; one check-bit error -> corr=0, sec=1; two errors ->
// ded=1, sec=0, corr=0.
module secded_dec_tb;
  localparam logic [4:0] COLS [11] = '{5'd7, 5'd11, 5'd13, 5'd14, 5'd19, 5'd21, 5'd22,
                                       5'd25, 5'd26, 5'd28, 5'd31};
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [10:0] data, corr, exp_corr;
  logic [4:0]  parity;
  logic        sec, ded, exp_sec, exp_ded;
  logic [15:0] cw, ev;
  int checks = 0, failures = 0;

  secded_dec dut (.data(data), .parity(parity), .corr(corr), .sec(sec), .ded(ded));

  function automatic logic [15:0] encode(input logic [10:0] d);
    logic [4:0] p;
    p = '0;
    for (int i = 0; i < 11; i++) if (d[i]) p ^= COLS[i];
    return {p, d};
  endfunction

  task automatic apply(input logic [15:0] e);
    @(posedge clk);
    {parity, data} = cw ^ e;
    #1;
    exp_corr = e[10:0];
    exp_sec  = ($countones(e) == 1);
    exp_ded  = ($countones(e) == 2);
    if (exp_ded) exp_corr = '0;
    checks++;
    if (corr !== exp_corr || sec !== exp_sec || ded !== exp_ded) begin
      failures++;
      if (failures < 10)
        $display("e=%h: corr %h/%h sec %b/%b ded %b/%b", e, corr, exp_corr, sec, exp_sec,
                 ded, exp_ded);
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
    for (int w = 0; w < 8; w++) begin
      cw = encode(11'($urandom));
      apply('0);
      for (int i = 0; i < 16; i++) begin
        apply(16'(1) << i);
        for (int j = i + 1; j < 16; j++) apply((16'(1) << i) | (16'(1) << j));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
