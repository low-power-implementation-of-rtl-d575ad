// tb_qrns_filter_bank_top: end-to-end test of the complete design at full
// size: both filter banks (error-free and truncated) get the same stimulus
// on their own ports and are checked against tb_fb_ref.
//
// 1. Load a 367-tap complex prototype (random 12-bit values, full scale)
//    through the input port, with gaps in in_valid.
// 2. Stream random 10-bit complex samples, first one per clock, then with
//    gaps inside frames.
// 3. Reload a second prototype of small values at a frame boundary and
//    stream again (the delay lines keep their history across the reload).
// Every output frame of each bank is compared with the model, and out_valid
// must come 18 (error-free) or 22 (truncated) clocks after the frame's last
// sample. Counted mechanisms, each of which must occur: coefficient loads,
// output frames of each bank, input gaps inside a frame, and sub-filter
// outputs that saturate the truncated bank's 15-bit range from above or
// below (|v| / 512 of at least 2^13). Outputs of the error-free bank outside
// its signed range wrap; they are only counted.
module tb_qrns_filter_bank_top;
  import tb_fb_ref::*;

  logic clk = 0, rst_n = 0, in_valid = 0, load = 0;
  logic signed [11:0] in_re = 0, in_im = 0;
  logic ef_loading, ef_out_valid, tr_loading, tr_out_valid;
  logic signed [34:0] ef_y_re [8], ef_y_im [8];
  logic signed [28:0] tr_y_re [8], tr_y_im [8];
  always #5 clk = ~clk;
  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc++;

  qrns_filter_bank_top dut (
    .clk, .rst_n,
    .ef_in_valid(in_valid), .ef_in_re(in_re), .ef_in_im(in_im), .ef_load(load),
    .ef_loading, .ef_out_valid, .ef_y_re, .ef_y_im,
    .tr_in_valid(in_valid), .tr_in_re(in_re), .tr_in_im(in_im), .tr_load(load),
    .tr_loading, .tr_out_valid, .tr_y_re, .tr_y_im);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint hr [NT], hi [NT];
  longint sr [$], si [$];
  longint efr [$], efi [$], trr_q [$], tri_q [$];
  int ef_due [$], tr_due [$];
  int n_loads = 0, n_ef = 0, n_tr = 0, n_gaps = 0, n_big = 0, n_wraps = 0;

  always @(negedge clk) begin
    if (rst_n && ef_out_valid) begin
      checks++;
      if (ef_due.size() == 0) begin failures++; $display("unexpected ef_out_valid"); end
      else begin
        int d;
        d = ef_due.pop_front();
        if (d != cyc) begin failures++; $display("error-free latency: %0d vs %0d", cyc, d); end
        for (int c = 0; c < 8; c++) begin
          longint xr, xi;
          xr = efr.pop_front(); xi = efi.pop_front();
          checks++;
          if (longint'(ef_y_re[c]) != xr || longint'(ef_y_im[c]) != xi) begin
            failures++;
            if (failures < 20) $display("ef frame %0d ch %0d got (%0d,%0d) exp (%0d,%0d)",
                                        n_ef, c, ef_y_re[c], ef_y_im[c], xr, xi);
          end
        end
        n_ef++;
      end
    end
    if (rst_n && tr_out_valid) begin
      checks++;
      if (tr_due.size() == 0) begin failures++; $display("unexpected tr_out_valid"); end
      else begin
        int d;
        d = tr_due.pop_front();
        if (d != cyc) begin failures++; $display("truncated latency: %0d vs %0d", cyc, d); end
        for (int c = 0; c < 8; c++) begin
          longint xr, xi;
          xr = trr_q.pop_front(); xi = tri_q.pop_front();
          checks++;
          if (longint'(tr_y_re[c]) != xr || longint'(tr_y_im[c]) != xi) begin
            failures++;
            if (failures < 20) $display("tr frame %0d ch %0d got (%0d,%0d) exp (%0d,%0d)",
                                        n_tr, c, tr_y_re[c], tr_y_im[c], xr, xi);
          end
        end
        n_tr++;
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
      if (!ef_loading || !tr_loading) begin failures++; $display("loading low during load"); end
      @(negedge clk);
    end
    in_valid = 0;
    @(negedge clk);
    checks++;
    if (ef_loading || tr_loading) begin failures++; $display("loading still high"); end
    n_loads++;
  endtask

  task automatic model(input int n);
    longint yr [8], yi [8], vr [8], vi [8];
    frame_errfree(hr, hi, sr, si, n, yr, yi);
    for (int k = 0; k < 8; k++) begin efr.push_back(yr[k]); efi.push_back(yi[k]); end
    frame_truncated(hr, hi, sr, si, n, yr, yi);
    for (int k = 0; k < 8; k++) begin trr_q.push_back(yr[k]); tri_q.push_back(yi[k]); end
    subfilter(hr, hi, sr, si, n, vr, vi);
    for (int p = 0; p < 8; p++) begin
      longint t;
      t = wrapm(vr[p], M5) >>> 9;
      if (t >= 8192 || t < -8192) n_big++;
      t = 256 * 8 * (vr[p] < 0 ? -vr[p] : vr[p]);
      if (t > (M7 - 1) / 2) n_wraps++;
    end
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
          model(n);
          ef_due.push_back(cyc + 18);
          tr_due.push_back(cyc + 22);
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
    stream(30, 0);
    stream(15, 1);
    repeat (30) @(negedge clk);
    load_coefs(64);
    stream(20, 0);
    repeat (30) @(negedge clk);
    checks += 6;
    if (ef_due.size() != 0 || tr_due.size() != 0) begin failures++; $display("frames missing"); end
    if (n_loads < 2) begin failures++; $display("reload not exercised"); end
    if (n_ef < 1)    begin failures++; $display("no error-free frame"); end
    if (n_tr < 1)    begin failures++; $display("no truncated frame"); end
    if (n_gaps < 1)  begin failures++; $display("no input gap"); end
    if (n_big < 1)   begin failures++; $display("15-bit range never used to its top"); end
    $display("loads=%0d ef_frames=%0d tr_frames=%0d gaps=%0d full_range_subfilter_outputs=%0d possible_wraps=%0d",
             n_loads, n_ef, n_tr, n_gaps, n_big, n_wraps);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
