// qrns_bin2qrns: binary-to-QRNS input converter.
//
// Takes one complex two's-complement sample (in_re + j in_im) and produces,
// for every modulus m_i of the parameter list, the QRNS pair
//   x[i]  = <in_re + q_i * in_im>_{m_i}
//   xh[i] = <in_re - q_i * in_im>_{m_i}
// where q_i is a root of q^2 + 1 = 0 modulo m_i. The mapping is the one of the
// QRNS definition; how the residues are formed inside is this design's own,
// simplest choice: each component is reduced by a constant-modulus remainder
// (the sign is handled by adding a multiple of m that makes it positive), then
// one modular multiply-add per output. One register stage: out_valid and the
// residues follow in_valid by one clock. Registers load only on in_valid.
module qrns_bin2qrns
  import qrns_pkg::*;
#(
  parameter int unsigned NM = 7,
  parameter int unsigned MODS [NM] = '{13, 17, 29, 37, 41, 53, 61},
  parameter int unsigned W  = 12
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic signed [W-1:0] in_re,
  input  logic signed [W-1:0] in_im,
  output logic                out_valid,
  output res_t                x  [NM],
  output res_t                xh [NM]
);

  // positive offset: a multiple of every modulus that exceeds 2^(W-1)
  function automatic int unsigned pos_res(logic signed [W-1:0] v, int unsigned m);
    int unsigned off = m * ((1 << (W - 1)) / m + 1);
    return unsigned'(int'(v) + int'(off)) % m;
  endfunction

  res_t x_d [NM];
  res_t xh_d [NM];

  for (genvar i = 0; i < NM; i++) begin : g_mod
    localparam int unsigned M = MODS[i];
    localparam int unsigned Q = qroot(M);
    always_comb begin
      int unsigned rr, ri, qi;
      rr = pos_res(in_re, M);
      ri = pos_res(in_im, M);
      qi = (Q * ri) % M;
      x_d[i]  = res_t'((rr + qi) % M);
      xh_d[i] = res_t'((rr + M - qi) % M);
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      for (int i = 0; i < NM; i++) begin
        x[i]  <= '0;
        xh[i] <= '0;
      end
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        x  <= x_d;
        xh <= xh_d;
      end
    end
  end

endmodule
