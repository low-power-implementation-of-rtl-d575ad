// qrns_fb_truncated: programmable 8-channel QRNS polyphase filter bank with a
// truncated dynamic range.
//
// Same function and interface as qrns_fb_errfree, but the sub-filter outputs
// are truncated to 15 bits before the IDFT, which lets both halves use fewer
// moduli:
//
//   x(n) -> qrns_bin2qrns (5 moduli) -> qrns_commutator (/8)
//        -> 2 x 5 x 8 rns_fir            ("filter banks", moduli {13,17,29,37,41})
//        -> 8 x qrns_trunc_requant       (QRNS->binary, keep 15 bits, binary->QRNS)
//        -> 2 x 6 rns_idft8              (moduli {13,17,29,37,41,53})
//        -> qrns_out_serializer          (one QRNS->binary converter, mux/demux)
//
// The two moduli sets, the 15-bit truncation point and the order of the
// stages follow the source design. The sub-filter results are exact modulo
// the 5-moduli product (~2^23.2); a sub-filter output outside its signed
// range wraps. The 15 kept bits are the top bits of the 24-bit converted
// value (a right shift by 9, rounding toward minus infinity), so the IDFT
// input is floor(v / 512) and the IDFT (x256 twiddle scale, 8 points) never
// exceeds the 6-moduli range (~2^28.9); outputs are 29-bit signed.
//
// Timing: as qrns_fb_errfree plus the 4 register stages of the intermediate
// conversion: out_valid pulses 22 clocks after the frame's last sample.
// Coefficient loading is identical (load, then 367 samples).
module qrns_fb_truncated
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
  output logic signed [28:0]  y_re [8],
  output logic signed [28:0]  y_im [8]
);

  localparam int unsigned NF = 5;                               // filter moduli
  localparam int unsigned NI = 6;                               // IDFT moduli
  localparam int unsigned MODS_F [NF] = '{13, 17, 29, 37, 41};
  localparam int unsigned MODS_I [NI] = '{13, 17, 29, 37, 41, 53};
  localparam int unsigned TPB = TAPS_PER_BRANCH;
  localparam int unsigned TW  = $clog2(TPB);

  // coefficient-load control
  logic          coef_now, ld_done;
  logic [2:0]    ld_branch;
  logic [TW-1:0] ld_tap;

  qrns_coef_loader #(.NTAPS(NTAPS), .NCH(NCH)) u_loader (
    .clk, .rst_n, .load, .in_valid, .coef_now, .branch(ld_branch), .tap(ld_tap),
    .busy(loading), .done(ld_done));

  // input conversion
  logic bq_valid;
  res_t bq_x [NF], bq_xh [NF];

  qrns_bin2qrns #(.NM(NF), .MODS(MODS_F), .W(IN_W)) u_in (
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

  // commutator
  localparam int unsigned CW = 2 * NF * RES_W;
  logic [CW-1:0] cm_in;
  logic [CW-1:0] frame [NCH];
  logic          frame_valid;

  always_comb begin
    for (int i = 0; i < NF; i++) begin
      cm_in[i*RES_W +: RES_W]        = bq_x[i];
      cm_in[(NF+i)*RES_W +: RES_W]   = bq_xh[i];
    end
  end

  qrns_commutator #(.NCH(NCH), .W(CW)) u_comm (
    .clk, .rst_n, .sync(load1), .in_valid(bq_valid && !coef1), .din(cm_in),
    .frame_valid, .frame);

  // filter banks: branch p, modulus i, both structures
  res_t fo_x [8][NF], fo_xh [8][NF];
  logic [NF-1:0] f_valid [8];

  for (genvar p = 0; p < 8; p++) begin : g_br
    for (genvar i = 0; i < NF; i++) begin : g_mod
      logic [1:0] fv;
      rns_fir #(.M(MODS_F[i]), .TAPS(TPB)) u_fir_x (
        .clk, .rst_n, .en(frame_valid), .x(frame[p][i*RES_W +: RES_W]),
        .coef_clr(load1), .coef_we(coef1 && branch1 == 3'(p)), .coef_addr(tap1),
        .coef_val(bq_x[i]), .y_valid(fv[0]), .y(fo_x[p][i]));
      rns_fir #(.M(MODS_F[i]), .TAPS(TPB)) u_fir_xh (
        .clk, .rst_n, .en(frame_valid), .x(frame[p][(NF+i)*RES_W +: RES_W]),
        .coef_clr(load1), .coef_we(coef1 && branch1 == 3'(p)), .coef_addr(tap1),
        .coef_val(bq_xh[i]), .y_valid(fv[1]), .y(fo_xh[p][i]));
      assign f_valid[p][i] = fv[0] & fv[1];
    end
  end

  // intermediate conversion and truncation, one per branch
  res_t rq_x [8][NI], rq_xh [8][NI];
  logic [7:0] rq_valid;

  for (genvar p = 0; p < 8; p++) begin : g_rq
    qrns_trunc_requant #(.NA(NF), .MODS_A(MODS_F), .NB(NI), .MODS_B(MODS_I), .TW(15)) u_rq (
      .clk, .rst_n, .in_valid(f_valid[p][0]), .x(fo_x[p]), .xh(fo_xh[p]),
      .out_valid(rq_valid[p]), .yx(rq_x[p]), .yxh(rq_xh[p]));
  end

  // IDFTs
  res_t id_in_x [NI][8], id_in_xh [NI][8];
  res_t id_x [NI][8], id_xh [NI][8];
  logic [NI-1:0] id_valid, idh_valid;

  always_comb begin
    for (int i = 0; i < NI; i++)
      for (int p = 0; p < 8; p++) begin
        id_in_x[i][p]  = rq_x[p][i];
        id_in_xh[i][p] = rq_xh[p][i];
      end
  end

  for (genvar i = 0; i < NI; i++) begin : g_idft
    rns_idft8 #(.M(MODS_I[i]), .QS(1)) u_idft_x (
      .clk, .rst_n, .in_valid(rq_valid[0]), .x(id_in_x[i]), .out_valid(id_valid[i]), .y(id_x[i]));
    rns_idft8 #(.M(MODS_I[i]), .QS(-1)) u_idft_xh (
      .clk, .rst_n, .in_valid(rq_valid[0]), .x(id_in_xh[i]), .out_valid(idh_valid[i]), .y(id_xh[i]));
  end

  res_t ch_x [8][NI], ch_xh [8][NI];
  always_comb begin
    for (int c = 0; c < 8; c++)
      for (int i = 0; i < NI; i++) begin
        ch_x[c][i]  = id_x[i][c];
        ch_xh[c][i] = id_xh[i][c];
      end
  end

  qrns_out_serializer #(.NM(NI), .MODS(MODS_I), .OW(29)) u_out (
    .clk, .rst_n, .in_valid(id_valid[0]), .x(ch_x), .xh(ch_xh),
    .out_valid, .y_re, .y_im);

  // all residue channels run in lock step
  always_ff @(posedge clk) begin
    if (rst_n) begin
      assert (rq_valid == {8{rq_valid[0]}} && id_valid == {NI{id_valid[0]}} && idh_valid == id_valid)
        else $error("residue channels out of step");
    end
  end

endmodule
