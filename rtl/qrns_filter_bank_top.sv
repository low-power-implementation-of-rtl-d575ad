// qrns_filter_bank_top: the two QRNS polyphase filter banks side by side.
//
// Both are 8-channel uniform DFT filter banks with a 367-tap complex
// prototype loaded through the input port, built in the Quadratic Residue
// Number System:
//   ef_*  qrns_fb_errfree   - error-free: 7 moduli end to end, 35-bit outputs
//   tr_*  qrns_fb_truncated - sub-filter outputs truncated to 15 bits before
//                             the IDFT; 5 moduli in the filters, 6 in the
//                             IDFT, 29-bit outputs
// They are independent alternatives (the second trades exactness for
// fewer moduli); each has its own ports and they share only clock and reset.
// See the two modules for function and timing.
module qrns_filter_bank_top (
  input  logic                clk,
  input  logic                rst_n,
  // error-free filter bank
  input  logic                ef_in_valid,
  input  logic signed [11:0]  ef_in_re,
  input  logic signed [11:0]  ef_in_im,
  input  logic                ef_load,
  output logic                ef_loading,
  output logic                ef_out_valid,
  output logic signed [34:0]  ef_y_re [8],
  output logic signed [34:0]  ef_y_im [8],
  // truncated filter bank
  input  logic                tr_in_valid,
  input  logic signed [11:0]  tr_in_re,
  input  logic signed [11:0]  tr_in_im,
  input  logic                tr_load,
  output logic                tr_loading,
  output logic                tr_out_valid,
  output logic signed [28:0]  tr_y_re [8],
  output logic signed [28:0]  tr_y_im [8]
);

  qrns_fb_errfree u_errfree (
    .clk, .rst_n, .in_valid(ef_in_valid), .in_re(ef_in_re), .in_im(ef_in_im),
    .load(ef_load), .loading(ef_loading), .out_valid(ef_out_valid),
    .y_re(ef_y_re), .y_im(ef_y_im));

  qrns_fb_truncated u_truncated (
    .clk, .rst_n, .in_valid(tr_in_valid), .in_re(tr_in_re), .in_im(tr_in_im),
    .load(tr_load), .loading(tr_loading), .out_valid(tr_out_valid),
    .y_re(tr_y_re), .y_im(tr_y_im));

endmodule
