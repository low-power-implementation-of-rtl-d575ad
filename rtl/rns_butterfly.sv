// rns_butterfly: radix-2 decimation-in-frequency butterfly in one residue
// channel (modulus M), purely combinational.
//
//   ya = < (a + b) * CA >_M
//   yb = < (a - b) * CB >_M
//
// CA and CB are residues of (scaled) IDFT coefficients. As in the source
// design, each butterfly holds two look-up tables that do the constant
// multiplications; here they are filled at elaboration with <r * C>_M for
// every residue r. Using a table on the sum output too (identity except in the
// first IDFT stage) keeps every path through the IDFT at one common scale;
// that is this design's choice.
module rns_butterfly
  import qrns_pkg::*;
#(
  parameter int unsigned M  = 61,
  parameter int unsigned CA = 1,
  parameter int unsigned CB = 1
) (
  input  res_t a,
  input  res_t b,
  output res_t ya,
  output res_t yb
);

  res_t lut_a [2**RES_W];
  res_t lut_b [2**RES_W];
  for (genvar r = 0; r < 2**RES_W; r++) begin : g_lut
    assign lut_a[r] = res_t'((r * CA) % M);
    assign lut_b[r] = res_t'((r * CB) % M);
  end

  logic [RES_W:0] s, d;
  always_comb begin
    s = {1'b0, a} + {1'b0, b};
    if (s >= (RES_W+1)'(M)) s = s - (RES_W+1)'(M);
    d = {1'b0, a} + (RES_W+1)'(M) - {1'b0, b};
    if (d >= (RES_W+1)'(M)) d = d - (RES_W+1)'(M);
  end

  assign ya = lut_a[s[RES_W-1:0]];
  assign yb = lut_b[d[RES_W-1:0]];

endmodule
