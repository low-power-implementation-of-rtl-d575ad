// qrns2bin: QRNS-to-binary output converter.
//
// Input: the QRNS pairs (x[i], xh[i]) of one complex number for every modulus
// m_i of the parameter list. Per modulus the inverse QRNS map of the source
// design gives the residues of the real and imaginary parts,
//   r_i = < 2^-1 (x_i + xh_i) >_{m_i},   s_i = < 2^-1 q_i^-1 (x_i - xh_i) >_{m_i}.
// Each part is then rebuilt by the Chinese remainder theorem,
//   X = < sum_i < r_i T_i >_{m_i} * (M / m_i) >_M,  T_i = (M/m_i)^-1 mod m_i,
// with one table per modulus holding the bracketed term for every residue.
// The sum of NM terms is below NM*M and is reduced by selecting the largest
// k with sum >= k*M. Values above (M-1)/2 are returned as negative
// numbers (X - M), so re/im are OUT_W-bit two's complement. The CRT method
// and the tables are this design's choice; the source refers the converter's
// internals elsewhere.
//
// Timing: two register stages (terms, then the reduced result); re/im and
// out_valid follow in_valid by 2 clocks. A new input may arrive every clock.
module qrns2bin
  import qrns_pkg::*;
#(
  parameter int unsigned NM = 7,
  parameter int unsigned MODS [NM] = '{13, 17, 29, 37, 41, 53, 61}
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         in_valid,
  input  res_t                         x  [NM],
  input  res_t                         xh [NM],
  output logic                         out_valid,
  output logic signed [out_w()-1:0]    re,
  output logic signed [out_w()-1:0]    im
);

  function automatic longint unsigned mprod();
    longint unsigned p = 1;
    for (int i = 0; i < NM; i++) p = p * MODS[i];
    return p;
  endfunction
  function automatic int out_w();
    return $clog2(mprod());
  endfunction
  // CRT term <r * T_i>_{m_i} * M_i
  function automatic longint unsigned crt_term(int i, int unsigned r);
    longint unsigned mi = mprod() / MODS[i];
    int unsigned ti = inv_mod(unsigned'(32'(mi % MODS[i])), MODS[i]);
    return longint'((r * ti) % MODS[i]) * mi;
  endfunction

  localparam longint unsigned MP = mprod();
  localparam int OW = out_w();
  localparam int SW = $clog2(NM * MP);

  typedef logic [SW-1:0] term_t;
  term_t crt_tab [NM][2**RES_W];
  term_t tre_d [NM], tim_d [NM], tre [NM], tim [NM];

  for (genvar i = 0; i < NM; i++) begin : g_mod
    localparam int unsigned M    = MODS[i];
    localparam int unsigned INV2 = inv_mod(2, M);
    localparam int unsigned INVQ = (INV2 * inv_mod(qroot(M), M)) % M;
    for (genvar r = 0; r < 2**RES_W; r++) begin : g_tab
      assign crt_tab[i][r] = term_t'((r < M) ? crt_term(i, r) : 0);
    end
    always_comb begin
      int unsigned sr, sd, rr, ri;
      sr = (int'(x[i]) + int'(xh[i])) % M;
      sd = (int'(x[i]) + M - int'(xh[i])) % M;
      rr = (sr * INV2) % M;
      ri = (sd * INVQ) % M;
      tre_d[i] = crt_tab[i][rr[RES_W-1:0]];
      tim_d[i] = crt_tab[i][ri[RES_W-1:0]];
    end
  end

  function automatic logic signed [OW-1:0] reduce(term_t t [NM]);
    term_t s = '0;
    for (int i = 0; i < NM; i++) s = s + t[i];
    for (int k = NM - 1; k >= 1; k--) begin
      if (s >= term_t'(k * MP)) begin
        s = s - term_t'(k * MP);
        break;
      end
    end
    if (s > term_t'((MP - 1) / 2)) s = s - term_t'(MP);
    return OW'(s);
  endfunction

  logic v1;
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      v1        <= 1'b0;
      out_valid <= 1'b0;
      re        <= '0;
      im        <= '0;
      for (int i = 0; i < NM; i++) begin
        tre[i] <= '0;
        tim[i] <= '0;
      end
    end else begin
      v1        <= in_valid;
      out_valid <= v1;
      if (in_valid) begin
        tre <= tre_d;
        tim <= tim_d;
      end
      if (v1) begin
        re <= reduce(tre);
        im <= reduce(tim);
      end
    end
  end

endmodule
