// rns_idft8: 8-point inverse DFT in one residue channel of one QRNS structure.
//
// Computes Y_k = sum_p x_p * w^(p k), w = e^{+j 2 pi / 8}, with the
// decimation-in-frequency algorithm of the source design: 12 butterflies in
// 3 stages (rns_butterfly), one register stage after each butterfly stage, so
// y/out_valid follow in_valid by 3 clocks. Stage registers load only on valid.
//
// A complex constant c = c_R + j c_I becomes the residue <c_R + QS*q*c_I>_M,
// QS = +1 in the X structure and -1 in the X^ structure. The first-stage
// twiddles w^1 and w^3 are irrational; they are quantised to 10-bit signed
// numbers with 8 fraction bits (181 = round(256/sqrt 2)) and, so that every
// output carries the same factor, all first-stage outputs are multiplied by a
// quantised twiddle (the sum outputs by 256). Stages 2 and 3 use the exact
// twiddles 1 and j. The result is therefore 256 * IDFT with w^1, w^3
// approximated; there is no 1/8 normalisation. The quantisation format and
// scale are this design's choice (the source gives 10-bit IDFT coefficients).
//
// Outputs are in natural order: y[k] is channel k.
module rns_idft8
  import qrns_pkg::*;
#(
  parameter int unsigned M  = 61,
  parameter int          QS = 1
) (
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  input  res_t x [8],
  output logic out_valid,
  output res_t y [8]
);

  localparam int unsigned C_S = qrns_const(TW_SCALE, 0, QS, M);  // 256
  localparam int unsigned C_J = qrns_const(0, 1, QS, M);         // j

  // stage 1: a[n] = S (x_n + x_{n+4}), b[n] = W_n (x_n - x_{n+4})
  res_t s1a_d [4], s1b_d [4], s1a [4], s1b [4];
  for (genvar n = 0; n < 4; n++) begin : g_st1
    rns_butterfly #(.M(M), .CA(C_S), .CB(qrns_const(tw_re(n), tw_im(n), QS, M))) u_bf (
      .a(x[n]), .b(x[n+4]), .ya(s1a_d[n]), .yb(s1b_d[n]));
  end

  // stage 2: on each half, c_n = u_n + u_{n+2}, d_n = (u_n - u_{n+2}) j^n
  res_t s2_d [8], s2 [8];  // [c0 c1 d0 d1] of half a, then of half b
  rns_butterfly #(.M(M), .CA(1), .CB(1))   u_a0 (.a(s1a[0]), .b(s1a[2]), .ya(s2_d[0]), .yb(s2_d[2]));
  rns_butterfly #(.M(M), .CA(1), .CB(C_J)) u_a1 (.a(s1a[1]), .b(s1a[3]), .ya(s2_d[1]), .yb(s2_d[3]));
  rns_butterfly #(.M(M), .CA(1), .CB(1))   u_b0 (.a(s1b[0]), .b(s1b[2]), .ya(s2_d[4]), .yb(s2_d[6]));
  rns_butterfly #(.M(M), .CA(1), .CB(C_J)) u_b1 (.a(s1b[1]), .b(s1b[3]), .ya(s2_d[5]), .yb(s2_d[7]));

  // stage 3: final 2-point butterflies, wired to natural output order
  res_t y_d [8];
  rns_butterfly #(.M(M), .CA(1), .CB(1)) u_o0 (.a(s2[0]), .b(s2[1]), .ya(y_d[0]), .yb(y_d[4]));
  rns_butterfly #(.M(M), .CA(1), .CB(1)) u_o1 (.a(s2[2]), .b(s2[3]), .ya(y_d[2]), .yb(y_d[6]));
  rns_butterfly #(.M(M), .CA(1), .CB(1)) u_o2 (.a(s2[4]), .b(s2[5]), .ya(y_d[1]), .yb(y_d[5]));
  rns_butterfly #(.M(M), .CA(1), .CB(1)) u_o3 (.a(s2[6]), .b(s2[7]), .ya(y_d[3]), .yb(y_d[7]));

  logic v1, v2;
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      {v1, v2, out_valid} <= '0;
      for (int i = 0; i < 4; i++) begin
        s1a[i] <= '0;
        s1b[i] <= '0;
      end
      for (int i = 0; i < 8; i++) begin
        s2[i] <= '0;
        y[i]  <= '0;
      end
    end else begin
      v1        <= in_valid;
      v2        <= v1;
      out_valid <= v2;
      if (in_valid) begin
        s1a <= s1a_d;
        s1b <= s1b_d;
      end
      if (v1) s2 <= s2_d;
      if (v2) y <= y_d;
    end
  end

endmodule
