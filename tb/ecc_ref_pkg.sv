// ecc_ref_pkg: reference models used by the testbenches, written from literal code tables
// rather than from the RTL's construction functions.
//   * Hsiao (16,11): data columns 7, 11, 13, 14, 19, 21, 22, 25, 26, 28, 31.
//   * (20,11) DS: check bits produced by each data bit alone (remainder of x^(10+i) modulo
//     g(x) = 1+x^3+x^4+x^6+x^8+x^10, bits 1..9).
//   * Hamming SEC for the burst code: data columns 3, 5, 6, 7, 9, 10, 11, 12.
//   * DEC code word: {s9d..s1d, s5b..s1b, s5a..s1a, d32..d1}.
//   * Burst code word: data bit j at j, check bit p of block b at 32 + 4p + b.
package ecc_ref_pkg;
  localparam logic [4:0] HSIAO [11] = '{5'd7, 5'd11, 5'd13, 5'd14, 5'd19, 5'd21, 5'd22,
                                        5'd25, 5'd26, 5'd28, 5'd31};
  localparam logic [8:0] DSCOL [10:0] = '{9'h156, 9'h0ab, 9'h055, 9'h17c, 9'h1e8, 9'h0f4,
                                          9'h07a, 9'h03d, 9'h01e, 9'h159, 9'h0ac};
  localparam logic [3:0] HAM [8] = '{4'd3, 4'd5, 4'd6, 4'd7, 4'd9, 4'd10, 4'd11, 4'd12};

  function automatic logic [4:0] ref_hsiao(input logic [10:0] d);
    logic [4:0] p;
    p = '0;
    for (int i = 0; i < 11; i++) if (d[i]) p ^= HSIAO[i];
    return p;
  endfunction

  function automatic logic [8:0] ref_ds(input logic [10:0] d);
    logic [8:0] p;
    p = '0;
    for (int i = 0; i < 11; i++) if (d[i]) p ^= DSCOL[i];
    return p;
  endfunction

  function automatic logic [50:0] ref_dec32(input logic [31:0] d);
    logic [10:0] a, b, c;
    a = d[10:0];
    b = d[21:11];
    c = {1'b0, d[31:22]};
    return {ref_ds(a ^ b ^ c), ref_hsiao(b), ref_hsiao(a), d};
  endfunction

  function automatic logic [47:0] ref_burst(input logic [31:0] d);
    logic [47:0] cw;
    logic [3:0]  p;
    cw = '0;
    cw[31:0] = d;
    for (int b = 0; b < 4; b++) begin
      p = '0;
      for (int i = 0; i < 8; i++) if (d[4*i + b]) p ^= HAM[i];
      for (int k = 0; k < 4; k++) cw[32 + 4*k + b] = p[k];
    end
    return cw;
  endfunction
endpackage
