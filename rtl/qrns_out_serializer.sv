// qrns_out_serializer: output mux / QRNS-to-binary converter / demux.
//
// The IDFTs deliver all 8 channels of a frame at once, at f_c/8. As in the
// source design, a single qrns2bin converter running at f_c converts them one
// after the other: on in_valid channel 0 enters the converter, then channels
// 1..7 in the following 7 cycles, read straight from the IDFT output
// registers (which hold until the next frame, at least 8 cycles later). The
// results are demultiplexed into staging registers; when channel 7 comes out
// all 8 outputs are loaded together and out_valid pulses, so y_re/y_im stay
// stable for a whole frame. Loading all channels together is this design's
// choice.
//
// Timing: out_valid rises 10 clocks after in_valid (7 cycles of
// multiplexing, 2 converter stages, 1 output register). in_valid must be at
// least 8 cycles apart.
module qrns_out_serializer
  import qrns_pkg::*;
#(
  parameter int unsigned NM = 7,
  parameter int unsigned MODS [NM] = '{13, 17, 29, 37, 41, 53, 61},
  parameter int unsigned OW = 35
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  res_t                 x  [8][NM],
  input  res_t                 xh [8][NM],
  output logic                 out_valid,
  output logic signed [OW-1:0] y_re [8],
  output logic signed [OW-1:0] y_im [8]
);

  logic       active;
  logic [2:0] cnt, sel;
  logic       cv;
  logic [2:0] tag1, tag2;
  logic       c_ov;
  logic signed [OW-1:0] c_re, c_im;
  logic signed [OW-1:0] st_re [7], st_im [7];

  assign sel = in_valid ? 3'd0 : cnt;
  assign cv  = in_valid || active;

  qrns2bin #(.NM(NM), .MODS(MODS)) u_conv (
    .clk, .rst_n, .in_valid(cv), .x(x[sel]), .xh(xh[sel]),
    .out_valid(c_ov), .re(c_re), .im(c_im));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      active    <= 1'b0;
      cnt       <= '0;
      tag1      <= '0;
      tag2      <= '0;
      out_valid <= 1'b0;
      for (int c = 0; c < 8; c++) begin
        y_re[c] <= '0;
        y_im[c] <= '0;
      end
      for (int c = 0; c < 7; c++) begin
        st_re[c] <= '0;
        st_im[c] <= '0;
      end
    end else begin
      // channel sequencer
      if (in_valid) begin
        active <= 1'b1;
        cnt    <= 3'd1;
      end else if (active) begin
        cnt <= cnt + 3'd1;
        if (cnt == 3'd7) active <= 1'b0;
      end
      // channel tag travels alongside the converter pipeline
      tag1 <= sel;
      tag2 <= tag1;
      // demux
      out_valid <= 1'b0;
      if (c_ov) begin
        if (tag2 != 3'd7) begin
          st_re[tag2] <= c_re;
          st_im[tag2] <= c_im;
        end else begin
          for (int c = 0; c < 7; c++) begin
            y_re[c] <= st_re[c];
            y_im[c] <= st_im[c];
          end
          y_re[7]   <= c_re;
          y_im[7]   <= c_im;
          out_valid <= 1'b1;
        end
      end
    end
  end

  // the converter's result width is clog2 of the moduli product
  function automatic int conv_w();
    longint unsigned p = 1;
    for (int i = 0; i < NM; i++) p = p * MODS[i];
    return $clog2(p);
  endfunction
  initial assert (OW == conv_w()) else $error("OW must equal clog2 of the moduli product");

endmodule
