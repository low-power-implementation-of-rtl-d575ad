// qrns_fb_errfree: programmable, error-free 8-channel polyphase filter
// bank in the Quadratic Residue Number System.
//
// A complex input stream x(n) at f_c is split into 8 uniformly spaced
// channels y0..y7 at f_c/8 (a uniform DFT filter bank with a 367-tap complex
// prototype h). Everything between the input and output converters is done in
// QRNS: the binary sample is mapped to the pairs (X_i, X^_i) for the seven
// moduli {13,17,29,37,41,53,61} (product ~2^34.9), and each of the 2 x 7
// residue channels ("RNS paths") runs its own 8 polyphase FIR sub-filters and
// 8-point IDFT with no carries between channels. The IDFT outputs of a frame
// are converted back to binary by one converter that handles one channel per
// clock.
//
//   x(n) -> qrns_bin2qrns -> qrns_commutator (/8) -> 14 x rns_path
//        -> qrns_out_serializer (mux, qrns2bin, demux) -> y0..y7
//
// Output: y_k(n) = 256 * sum_l h[l] x[8n-l] e^{+j 2 pi l k / 8}, exact except
// that e^{+-j pi/4} in the IDFT is quantised to 181/256 per component, and
// wrapped into the signed range of the moduli product M (35-bit outputs).
//
// Coefficient loading: a one-cycle `load` makes the next 367 valid input
// samples become h[0..366] (qrns_coef_loader); `loading` is high meanwhile and
// those samples are not filtered. All coefficients are zero after reset.
//
// Timing: one sample per clock (in_valid may also have gaps). A frame is the
// 8 valid samples after reset or after a load; out_valid pulses 18 clocks
// after the frame's last sample is presented, and y_re/y_im then hold until
// the next frame. Channel 0 passes 11 register stages (input converter,
// commutator, 3 FIR, 3 IDFT, 2 output converter, output register); the other
// channels also wait up to 7 clocks for the shared output converter.
// Structure, moduli, sizes and the single time-shared output converter follow
// the source design; the handshake, reset, port widths and the exact pipeline
// split are this design's choices.
module qrns_fb_errfree
  import qrns_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic signed [11:0]  in_re,
  input  logic signed [11:0]  in_im,
  input  logic                load,
  output logic                loading,
  output logic                out_valid,
  output logic signed [34:0]  y_re [8],
  output logic signed [34:0]  y_im [8]
);

  localparam int unsigned TPB = TAPS_PER_BRANCH;
  localparam int unsigned TW  = $clog2(TPB);

  // coefficient-load control
  logic          coef_now, ld_done;
  logic [2:0]    ld_branch;
  logic [TW-1:0] ld_tap;

  qrns_coef_loader #(.NTAPS(NTAPS), .NCH(NCH)) u_loader (
    .clk, .rst_n, .load, .in_valid, .coef_now, .branch(ld_branch), .tap(ld_tap),
    .busy(loading), .done(ld_done));

  // input conversion; the load tag is registered alongside
  logic bq_valid;
  res_t bq_x [NMOD], bq_xh [NMOD];

  qrns_bin2qrns #(.NM(NMOD), .MODS(MODULI), .W(IN_W)) u_in (
    .clk, .rst_n, .in_valid, .in_re, .in_im,
    .out_valid(bq_valid), .x(bq_x), .xh(bq_xh));

  logic          coef1, load1;
  logic [2:0]    branch1;
  logic [TW-1:0] tap1;
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      coef1   <= 1'b0;
      load1   <= 1'b0;
      branch1 <= '0;
      tap1    <= '0;
    end else begin
      coef1   <= coef_now;
      load1   <= load;
      branch1 <= ld_branch;
      tap1    <= ld_tap;
    end
  end

  // commutator: one packed word per sample = all residues of both structures
  localparam int unsigned CW = 2 * NMOD * RES_W;
  logic [CW-1:0] cm_in;
  logic [CW-1:0] frame [NCH];
  logic          frame_valid;

  always_comb begin
    for (int i = 0; i < NMOD; i++) begin
      cm_in[i*RES_W +: RES_W]           = bq_x[i];
      cm_in[(NMOD+i)*RES_W +: RES_W]    = bq_xh[i];
    end
  end

  qrns_commutator #(.NCH(NCH), .W(CW)) u_comm (
    .clk, .rst_n, .sync(load1), .in_valid(bq_valid && !coef1), .din(cm_in),
    .frame_valid, .frame);

  logic [7:0] coef_we;
  always_comb begin
    for (int p = 0; p < 8; p++) coef_we[p] = coef1 && (branch1 == 3'(p));
  end

  // 2 structures x NMOD RNS paths
  res_t pv_x  [NMOD][8], pv_xh [NMOD][8];
  logic [NMOD-1:0] p_valid, ph_valid;

  for (genvar i = 0; i < NMOD; i++) begin : g_mod
    res_t fx [8], fxh [8];
    for (genvar p = 0; p < 8; p++) begin : g_br
      assign fx[p]  = frame[p][i*RES_W +: RES_W];
      assign fxh[p] = frame[p][(NMOD+i)*RES_W +: RES_W];
    end

    rns_path #(.M(MODULI[i]), .QS(1), .TAPS(TPB)) u_path_x (
      .clk, .rst_n, .en(frame_valid), .x(fx),
      .coef_clr(load1), .coef_we, .coef_addr(tap1), .coef_val(bq_x[i]),
      .out_valid(p_valid[i]), .y(pv_x[i]));

    rns_path #(.M(MODULI[i]), .QS(-1), .TAPS(TPB)) u_path_xh (
      .clk, .rst_n, .en(frame_valid), .x(fxh),
      .coef_clr(load1), .coef_we, .coef_addr(tap1), .coef_val(bq_xh[i]),
      .out_valid(ph_valid[i]), .y(pv_xh[i]));
  end

  // regroup channel-major for the output converter
  res_t ch_x [8][NMOD], ch_xh [8][NMOD];
  always_comb begin
    for (int c = 0; c < 8; c++)
      for (int i = 0; i < NMOD; i++) begin
        ch_x[c][i]  = pv_x[i][c];
        ch_xh[c][i] = pv_xh[i][c];
      end
  end

  qrns_out_serializer #(.NM(NMOD), .MODS(MODULI), .OW(35)) u_out (
    .clk, .rst_n, .in_valid(p_valid[0]), .x(ch_x), .xh(ch_xh),
    .out_valid, .y_re, .y_im);

  // all paths run in lock step
  always_ff @(posedge clk) begin
    if (rst_n) begin
      assert (p_valid == {NMOD{p_valid[0]}} && ph_valid == p_valid)
        else $error("RNS paths out of step");
    end
  end

endmodule
