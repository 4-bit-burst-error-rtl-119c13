// ds_dec_tb: encodes random words with a table-based reference (20,11) DS encoder and
// applies every error pattern of weight 0, 1 and 2 over the 20 code bits, one per clock
// cycle. The correction signal must equal the data part of the error pattern (check-bit
// errors need no correction), and syn_nz must be high exactly when an error was injected.
module ds_dec_tb;
  localparam logic [8:0] COL [10:0] = '{9'h156, 9'h0ab, 9'h055, 9'h17c, 9'h1e8, 9'h0f4,
                                        9'h07a, 9'h03d, 9'h01e, 9'h159, 9'h0ac};
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [10:0] data, corr;
  logic [8:0]  parity;
  logic        syn_nz;
  logic [19:0] cw;
  int checks = 0, failures = 0;

  ds_dec dut (.data(data), .parity(parity), .corr(corr), .syn_nz(syn_nz));

  function automatic logic [19:0] encode(input logic [10:0] d);
    logic [8:0] p;
    p = '0;
    for (int i = 0; i < 11; i++) if (d[i]) p ^= COL[i];
    return {d, p};
  endfunction

  task automatic apply(input logic [19:0] e);
    @(posedge clk);
    {data, parity} = cw ^ e;
    #1;
    checks++;
    if (corr !== e[19:9] || syn_nz !== (e != '0)) begin
      failures++;
      if (failures < 10) $display("e=%h: corr %h expected %h syn_nz %b", e, corr, e[19:9], syn_nz);
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
      cw = encode(11'($urandom));
      apply('0);
      for (int i = 0; i < 20; i++) begin
        apply(20'(1) << i);
        for (int j = i + 1; j < 20; j++) apply((20'(1) << i) | (20'(1) << j));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
