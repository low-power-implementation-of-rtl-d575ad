// qrns_trunc_requant: intermediate conversion with truncation, for one
// polyphase branch of the truncated filter bank.
//
// Residues cannot be truncated directly, so, as in the source design, the
// sub-filter output of one branch is converted QRNS -> binary (moduli set
// MODS_A), truncated, and converted binary -> QRNS again (moduli set MODS_B)
// before the IDFT. The truncation keeps TW = 15 bits: the converter's signed
// result (clog2 of the MODS_A product bits, 24 for {13,17,29,37,41}) is
// shifted right arithmetically by the remaining bits (rounding toward minus
// infinity), so the 15-bit result can never overflow. Which bits are kept and
// the rounding are this design's choices; the 15-bit width is the source's.
//
// Timing: 4 register stages (2 in qrns2bin, 1 truncation register, 1 in
// qrns_bin2qrns); out_valid follows in_valid by 4 clocks.
module qrns_trunc_requant
  import qrns_pkg::*;
#(
  parameter int unsigned NA = 5,
  parameter int unsigned MODS_A [NA] = '{13, 17, 29, 37, 41},
  parameter int unsigned NB = 6,
  parameter int unsigned MODS_B [NB] = '{13, 17, 29, 37, 41, 53},
  parameter int unsigned TW = 15
) (
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  input  res_t x   [NA],
  input  res_t xh  [NA],
  output logic out_valid,
  output res_t yx  [NB],
  output res_t yxh [NB]
);

  function automatic int conv_w();
    longint unsigned p = 1;
    for (int i = 0; i < NA; i++) p = p * MODS_A[i];
    return $clog2(p);
  endfunction
  localparam int CW   = conv_w();
  localparam int DROP = CW - TW;

  logic c_valid;
  logic signed [CW-1:0] c_re, c_im;

  qrns2bin #(.NM(NA), .MODS(MODS_A)) u_to_bin (
    .clk, .rst_n, .in_valid, .x, .xh, .out_valid(c_valid), .re(c_re), .im(c_im));

  // truncation register
  logic t_valid;
  logic signed [TW-1:0] t_re, t_im;
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      t_valid <= 1'b0;
      t_re    <= '0;
      t_im    <= '0;
    end else begin
      t_valid <= c_valid;
      if (c_valid) begin
        t_re <= TW'(c_re >>> DROP);
        t_im <= TW'(c_im >>> DROP);
      end
    end
  end

  qrns_bin2qrns #(.NM(NB), .MODS(MODS_B), .W(TW)) u_to_qrns (
    .clk, .rst_n, .in_valid(t_valid), .in_re(t_re), .in_im(t_im),
    .out_valid, .x(yx), .xh(yxh));

  initial assert (DROP >= 0) else $error("TW wider than the converter output");

endmodule
