// rns_path: one RNS path of the QRNS filter bank ("RNS path mod m").
//
// For one modulus M and one QRNS structure (QS = +1: X, QS = -1: X^) this
// holds the NCH = 8 polyphase FIR sub-filters E_0..E_7 (rns_fir) and the
// 8-point IDFT (rns_idft8) that combines their outputs into the 8 channel
// residues, as in the source design. A frame x[0..7] accepted with `en`
// (branch p gets x[p]) appears at y[0..7] with out_valid 6 clocks later
// (3 in the FIRs, 3 in the IDFT). The coefficient write port is shared:
// coef_val/coef_addr go to every branch and coef_we selects the branch.
module rns_path
  import qrns_pkg::*;
#(
  parameter int unsigned M    = 61,
  parameter int          QS   = 1,
  parameter int unsigned TAPS = 46
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    en,
  input  res_t                    x [8],
  input  logic                    coef_clr,
  input  logic [7:0]              coef_we,
  input  logic [$clog2(TAPS)-1:0] coef_addr,
  input  res_t                    coef_val,
  output logic                    out_valid,
  output res_t                    y [8]
);

  res_t fy [8];
  logic [7:0] fv;

  for (genvar p = 0; p < 8; p++) begin : g_fir
    rns_fir #(.M(M), .TAPS(TAPS)) u_fir (
      .clk, .rst_n, .en, .x(x[p]),
      .coef_clr, .coef_we(coef_we[p]), .coef_addr, .coef_val,
      .y_valid(fv[p]), .y(fy[p]));
  end

  rns_idft8 #(.M(M), .QS(QS)) u_idft (
    .clk, .rst_n, .in_valid(fv[0]), .x(fy), .out_valid, .y);

endmodule
