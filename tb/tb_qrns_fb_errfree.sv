// tb_qrns_fb_errfree: end-to-end test of the complete filter bank at its
// full size (7 moduli, 2 QRNS structures, 8 channels, 367 taps).
//
// 1. Load a 367-tap complex prototype of random full-scale 12-bit values
//    through the input port, with gaps in in_valid.
// 2. Stream random 10-bit complex samples, mostly one per clock, with some
//    gaps inside frames.
// 3. Reload a second prototype of small values at a frame boundary and stream
//    again (the delay lines keep their history across the reload).
// Every output frame is compared with a reference computed here in ordinary
// 64-bit complex arithmetic: the polyphase sub-filter outputs
// v_p(n) = sum_t h[8t+p] x[8(n-t)+7-p], the quantised IDFT
// (a_n = 256(v_n+v_{n+4}), b_n = W_n (v_n-v_{n+4}), Y_2r = sum a_n j^nr,
// Y_2r+1 = sum b_n j^nr), and the wrap into the signed range of the moduli
// product. out_valid must come 18 clocks after the last sample of its frame.
// Counted mechanisms (each must occur): coefficient loads, frames decimated
// and converted, input gaps inside a frame. Outputs outside the signed range
// of the moduli product (which wrap) are only counted and reported.
module tb_qrns_fb_errfree;
  localparam longint MP = 64'd31432690549;
  localparam int NT = 367;

  logic clk = 0, rst_n = 0, in_valid = 0, load = 0, loading, out_valid;
  logic signed [11:0] in_re = 0, in_im = 0;
  logic signed [34:0] y_re [8], y_im [8];
  always #5 clk = ~clk;
  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc++;

  qrns_fb_errfree dut (.*);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference state
  longint hr [NT], hi [NT];
  longint sr [$], si [$];           // data samples, in arrival order
  longint er [$], ei [$];           // expected outputs, 8 per frame
  int due [$];
  int n_loads = 0, n_frames = 0, n_gaps = 0, n_wraps = 0;

  function automatic longint wrap(longint v);
    longint r = v % MP;
    if (r < 0) r += MP;
    if (r > (MP - 1) / 2) r -= MP;
    return r;
  endfunction

  // expected outputs of frame n (samples 8n .. 8n+7 already in sr/si)
  task automatic model_frame(input int n);
    longint vr [8], vi [8], ar [4], ai [4], br [4], bi [4];
    longint twr [4], twi [4];
    twr = '{256, 181, 0, -181};
    twi = '{0, 181, 256, 181};
    for (int p = 0; p < 8; p++) begin
      vr[p] = 0; vi[p] = 0;
      for (int t = 0; 8 * t + p < NT && t <= n; t++) begin
        int k;
        k = 8 * (n - t) + 7 - p;
        vr[p] += hr[8*t+p] * sr[k] - hi[8*t+p] * si[k];
        vi[p] += hr[8*t+p] * si[k] + hi[8*t+p] * sr[k];
      end
    end
    for (int m = 0; m < 4; m++) begin
      longint dr, di;
      ar[m] = 256 * (vr[m] + vr[m+4]);
      ai[m] = 256 * (vi[m] + vi[m+4]);
      dr = vr[m] - vr[m+4];
      di = vi[m] - vi[m+4];
      br[m] = twr[m] * dr - twi[m] * di;
      bi[m] = twr[m] * di + twi[m] * dr;
    end
    for (int k = 0; k < 8; k++) begin
      longint yr, yi;
      yr = 0; yi = 0;
      for (int m = 0; m < 4; m++) begin
        longint ur, ui, tr;
        ur = (k % 2 == 0) ? ar[m] : br[m];
        ui = (k % 2 == 0) ? ai[m] : bi[m];
        // multiply by j^(m * (k/2))
        for (int e = 0; e < (m * (k / 2)) % 4; e++) begin
          tr = ur; ur = -ui; ui = tr;
        end
        yr += ur; yi += ui;
      end
      if (wrap(yr) != yr || wrap(yi) != yi) n_wraps++;
      er.push_back(wrap(yr));
      ei.push_back(wrap(yi));
    end
  endtask

  // output checker
  always @(negedge clk) begin
    if (rst_n && out_valid) begin
      int d;
      checks++;
      if (due.size() == 0) begin
        failures++;
        $display("unexpected out_valid at %0d", cyc);
      end else begin
        d = due.pop_front();
        if (d != cyc) begin failures++; $display("latency: out at %0d, expected %0d", cyc, d); end
        for (int c = 0; c < 8; c++) begin
          longint xr, xi;
          xr = er.pop_front(); xi = ei.pop_front();
          checks++;
          if (longint'(y_re[c]) != xr || longint'(y_im[c]) != xi) begin
            failures++;
            if (failures < 20)
              $display("frame %0d ch %0d got (%0d,%0d) exp (%0d,%0d)", n_frames, c, y_re[c], y_im[c], xr, xi);
          end
        end
        n_frames++;
      end
    end
  end

  task automatic load_coefs(input int amp);
    @(negedge clk);
    load = 1;
    @(negedge clk);
    load = 0;
    for (int k = 0; k < NT; k++) begin
      while ($urandom % 5 == 0) begin
        in_valid = 0;
        @(negedge clk);
      end
      hr[k] = longint'($urandom % (2 * amp)) - amp;
      hi[k] = longint'($urandom % (2 * amp)) - amp;
      in_re = 12'(hr[k]); in_im = 12'(hi[k]);
      in_valid = 1;
      checks++;
      if (!loading) begin failures++; $display("loading low during load"); end
      @(negedge clk);
    end
    in_valid = 0;
    @(negedge clk);
    checks++;
    if (loading) begin failures++; $display("loading still high"); end
    n_loads++;
  endtask

  task automatic stream(input int frames, input bit gaps);
    for (int f = 0; f < frames; f++) begin
      int n;
      n = sr.size() / 8;
      for (int s = 0; s < 8; s++) begin
        if (gaps && s > 0 && $urandom % 6 == 0) begin
          in_valid = 0;
          n_gaps++;
          repeat (1 + $urandom % 3) @(negedge clk);
        end
        sr.push_back(longint'($urandom % 1024) - 512);
        si.push_back(longint'($urandom % 1024) - 512);
        in_re = 12'(sr[$]); in_im = 12'(si[$]);
        in_valid = 1;
        if (s == 7) begin
          model_frame(n);
          due.push_back(cyc + 18);
        end
        @(negedge clk);
      end
    end
    in_valid = 0;
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    load_coefs(2048);
    stream(40, 0);
    stream(20, 1);
    repeat (30) @(negedge clk);
    load_coefs(64);
    stream(30, 0);
    repeat (30) @(negedge clk);
    checks += 4;
    if (due.size() != 0) begin failures++; $display("%0d frames never came out", due.size()); end
    if (n_loads < 2)  begin failures++; $display("coefficient reload not exercised"); end
    if (n_frames < 1) begin failures++; $display("no frame"); end
    if (n_gaps < 1)   begin failures++; $display("no input gap"); end
    $display("loads=%0d frames=%0d gaps=%0d wrapped_outputs=%0d", n_loads, n_frames, n_gaps, n_wraps);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
