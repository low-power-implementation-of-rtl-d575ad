// tb_qrns_fb_truncated: test of the truncated filter bank alone at full
// size, checked against frame_truncated() of tb_fb_ref.
//
// 1. Load a 367-tap complex prototype (random 12-bit values, full scale)
//    through the input port, with gaps in in_valid.
// 2. Stream random 10-bit complex samples, first one per clock, then with
//    gaps inside frames.
// 3. Reload a second prototype of small values at a frame boundary and
//    stream again (the delay lines keep their history across the reload).
// Every output frame is compared with the model, and out_valid must come 22
// clocks after the frame's last sample. Counted mechanisms, each of which
// must occur: coefficient loads, output frames, input gaps inside a frame,
// and sub-filter outputs that use the top of the 15-bit range after
// truncation (|v| / 512 of at least 2^13).
module tb_qrns_fb_truncated;
  import tb_fb_ref::*;

  logic clk = 0, rst_n = 0, in_valid = 0, load = 0;
  logic signed [11:0] in_re = 0, in_im = 0;
  logic tr_loading, tr_out_valid;
  logic signed [28:0] tr_y_re [8], tr_y_im [8];
  always #5 clk = ~clk;
  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc++;

  qrns_fb_truncated dut (
    .clk, .rst_n, .in_valid, .in_re, .in_im, .load,
    .loading(tr_loading), .out_valid(tr_out_valid), .y_re(tr_y_re), .y_im(tr_y_im));

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint hr [NT], hi [NT];
  longint sr [$], si [$];
  longint trr_q [$], tri_q [$];
  int tr_due [$];
  int n_loads = 0, n_tr = 0, n_gaps = 0, n_big = 0;

  always @(negedge clk) begin
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
      if (!tr_loading) begin failures++; $display("loading low during load"); end
      @(negedge clk);
    end
    in_valid = 0;
    @(negedge clk);
    checks++;
    if (tr_loading) begin failures++; $display("loading still high"); end
    n_loads++;
  endtask

  task automatic model(input int n);
    longint yr [8], yi [8], vr [8], vi [8];
    frame_truncated(hr, hi, sr, si, n, yr, yi);
    for (int k = 0; k < 8; k++) begin trr_q.push_back(yr[k]); tri_q.push_back(yi[k]); end
    subfilter(hr, hi, sr, si, n, vr, vi);
    for (int p = 0; p < 8; p++) begin
      longint t;
      t = wrapm(vr[p], M5) >>> 9;
      if (t >= 8192 || t < -8192) n_big++;
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
    checks += 5;
    if (tr_due.size() != 0) begin failures++; $display("frames missing"); end
    if (n_loads < 2) begin failures++; $display("reload not exercised"); end
    if (n_tr < 1)    begin failures++; $display("no truncated frame"); end
    if (n_gaps < 1)  begin failures++; $display("no input gap"); end
    if (n_big < 1)   begin failures++; $display("15-bit range never used to its top"); end
    $display("loads=%0d frames=%0d gaps=%0d full_range_subfilter_outputs=%0d",
             n_loads, n_tr, n_gaps, n_big);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
