// burst_dec: decoder of the interleaved 4-bit burst code of burst_enc. It gathers the
// bits of each block back from the code word (position congruent to the block number mod
// WAYS), corrects each block with its own SEC decoder, all WAYS in parallel, and puts the
// corrected data bits back in order. Any error burst no longer than WAYS bits is corrected.
// err has one bit per block, high when that block's syndrome is non-zero. Combinational.
module burst_dec #(
  parameter int unsigned DATA_W = 32,
  parameter int unsigned WAYS   = 4,
  parameter int unsigned R      = 4,
  localparam int unsigned K     = DATA_W / WAYS,
  localparam int unsigned CW_W  = DATA_W + WAYS * R
) (
  input  logic [CW_W-1:0]   cw,
  output logic [DATA_W-1:0] data,
  output logic [WAYS-1:0]   err
);

  logic [K-1:0] blk_data [WAYS];
  logic [R-1:0] blk_par  [WAYS];
  logic [K-1:0] blk_out  [WAYS];

  for (genvar b = 0; b < WAYS; b++) begin : g_way
    for (genvar i = 0; i < K; i++) begin : g_bit
      assign blk_data[b][i]   = cw[WAYS*i + b];
      assign data[WAYS*i + b] = blk_out[b][i];
    end
    for (genvar p = 0; p < R; p++) begin : g_par
      assign blk_par[b][p] = cw[DATA_W + WAYS*p + b];
    end
    sec_dec #(.K(K), .R(R)) u_sec (
      .data(blk_data[b]), .parity(blk_par[b]), .data_out(blk_out[b]), .err(err[b])
    );
  end

endmodule
