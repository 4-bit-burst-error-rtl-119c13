// burst_enc: encoder of the 4-bit burst error correcting code built by interleaving.
// Data bit j goes to block j mod WAYS (block 0 holds d1, d5, d9, ...; block 1 d2, d6, ...);
// each block of K = DATA_W/WAYS bits gets R check bits from its own SEC encoder. In the
// code word every bit of block b sits at a position congruent to b mod WAYS: data bit j
// stays at position j and check bit p of block b goes to DATA_W + WAYS*p + b. A burst of up
// to WAYS adjacent bits therefore hits each block at most once. The interleaving follows the
// document; the exact placement and the Hamming code are this design's. Combinational.
module burst_enc #(
  parameter int unsigned DATA_W = 32,
  parameter int unsigned WAYS   = 4,
  parameter int unsigned R      = 4,
  localparam int unsigned K     = DATA_W / WAYS,
  localparam int unsigned CW_W  = DATA_W + WAYS * R
) (
  input  logic [DATA_W-1:0] data,
  output logic [CW_W-1:0]   cw
);

  logic [K-1:0] blk_data [WAYS];
  logic [R-1:0] blk_par  [WAYS];

  for (genvar b = 0; b < WAYS; b++) begin : g_way
    for (genvar i = 0; i < K; i++) begin : g_bit
      assign blk_data[b][i] = data[WAYS*i + b];
    end
    sec_enc #(.K(K), .R(R)) u_sec (.data(blk_data[b]), .parity(blk_par[b]));
    for (genvar p = 0; p < R; p++) begin : g_par
      assign cw[DATA_W + WAYS*p + b] = blk_par[b][p];
    end
  end

  assign cw[DATA_W-1:0] = data;

endmodule
