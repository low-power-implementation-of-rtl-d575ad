// rns_fir: direct-form FIR sub-filter E_p(z) in one residue channel (modulus M).
//
// y(n) = < sum_t c[t] * x(n-t) >_M  for t = 0..TAPS-1.
//
// The modular products use the index (discrete-logarithm) isomorphism of the
// source design: with g a primitive root of M, every nonzero residue a is
// a = g^i(a), so a*b = g^<i(a)+i(b)>_{M-1}. Samples are converted to
// (zero flag, index) once on entry and travel down the delay line in that
// form; coefficients are stored in the same form. Each tap then needs only a
// modular index adder and an exponent table; a zero operand forces the
// product to 0. The tap products are summed (the synthesis tool chooses the
// adder tree) and the sum is reduced modulo M once.
//
// Coefficients are programmable: coef_we writes residue coef_val at tap
// coef_addr (converted to index form on the way in); coef_clr sets every tap
// to zero. Timing: three register stages. A sample accepted with `en` is in
// the delay line one cycle later, the tap products after two, and y/y_valid
// after three. Registers only load when their stage is valid. The index
// isomorphism and the direct form are the source design's; the zero flag,
// the pipeline split and the coefficient write port are this design's own.
module rns_fir
  import qrns_pkg::*;
#(
  parameter int unsigned M    = 61,
  parameter int unsigned TAPS = 46
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        en,
  input  res_t                        x,
  input  logic                        coef_clr,
  input  logic                        coef_we,
  input  logic [$clog2(TAPS)-1:0]     coef_addr,
  input  res_t                        coef_val,
  output logic                        y_valid,
  output res_t                        y
);

  localparam int unsigned G     = prim_root(M);
  localparam int unsigned SUM_W = $clog2(TAPS * (M - 1) + 1);

  typedef struct packed {
    logic zero;
    res_t idx;
  } ient_t;

  // residue -> index and index -> residue tables
  // (sized to the full residue word; entries past the modulus are unused)
  res_t log_tab [2**RES_W];
  res_t exp_tab [2**RES_W];
  for (genvar a = 0; a < 2**RES_W; a++) begin : g_tab
    assign log_tab[a] = res_t'((a == 0 || a >= M) ? 0 : log_mod(a, M));
    assign exp_tab[a] = res_t'((a >= M - 1) ? 0 : pow_mod(G, a, M));
  end

  function automatic ient_t to_index(res_t a);
    ient_t r;
    r.zero = (a == '0);
    r.idx  = log_tab[a];
    return r;
  endfunction

  ient_t dline [TAPS];
  ient_t coef  [TAPS];
  res_t  prod  [TAPS];
  logic  v1, v2;

  // delay line and coefficient registers
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int t = 0; t < TAPS; t++) begin
        dline[t] <= '{zero: 1'b1, idx: '0};
        coef[t]  <= '{zero: 1'b1, idx: '0};
      end
      v1 <= 1'b0;
    end else begin
      v1 <= en;
      if (en) begin
        dline[0] <= to_index(x);
        for (int t = 1; t < TAPS; t++) dline[t] <= dline[t-1];
      end
      if (coef_clr) begin
        for (int t = 0; t < TAPS; t++) coef[t] <= '{zero: 1'b1, idx: '0};
      end else if (coef_we) begin
        coef[coef_addr] <= to_index(coef_val);
      end
    end
  end

  // tap products by index addition
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      v2 <= 1'b0;
      for (int t = 0; t < TAPS; t++) prod[t] <= '0;
    end else begin
      v2 <= v1;
      if (v1) begin
        for (int t = 0; t < TAPS; t++) begin
          logic [RES_W:0] s;
          s = {1'b0, dline[t].idx} + {1'b0, coef[t].idx};
          if (s >= (RES_W+1)'(M - 1)) s = s - (RES_W+1)'(M - 1);
          prod[t] <= (dline[t].zero || coef[t].zero) ? '0 : exp_tab[s[RES_W-1:0]];
        end
      end
    end
  end

  // sum of products, one modular reduction
  logic [SUM_W-1:0] acc;
  always_comb begin
    acc = '0;
    for (int t = 0; t < TAPS; t++) acc = acc + SUM_W'(prod[t]);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      y_valid <= 1'b0;
      y       <= '0;
    end else begin
      y_valid <= v2;
      if (v2) y <= res_t'(acc % SUM_W'(M));
    end
  end

endmodule
