// tb_rns_path: one RNS path (M = 29, X^ structure, 46 taps per branch).
// Loads random coefficients into all 8 branches through the shared write
// port, feeds random frames, and checks every output frame against 8 direct
// modular convolutions followed by the reference IDFT of tb_idft_ref. Each
// result must come 6 clocks after its frame.
module tb_rns_path;
  import qrns_pkg::*;
  import tb_idft_ref::*;
  localparam int M = 29, QS = -1, TAPS = 46;

  logic clk = 0, rst_n = 0, en = 0, coef_clr = 0, out_valid;
  logic [7:0] coef_we = 0;
  logic [5:0] coef_addr = 0;
  res_t coef_val = 0;
  res_t x [8], y [8];
  always #5 clk = ~clk;
  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc++;

  rns_path #(.M(M), .QS(QS), .TAPS(TAPS)) dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int coef [8][TAPS];
  int hist [8][$];
  int exp_y [$], due [$];

  always @(negedge clk) begin
    if (rst_n && out_valid) begin
      int d;
      checks++;
      d = due.pop_front();
      if (d != cyc) begin failures++; $display("latency %0d vs %0d", cyc, d); end
      for (int k = 0; k < 8; k++) begin
        int e;
        e = exp_y.pop_front();
        checks++;
        if (int'(y[k]) != e) begin failures++; $display("k=%0d got %0d exp %0d", k, y[k], e); end
      end
    end
  end

  initial begin
    for (int p = 0; p < 8; p++) x[p] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    coef_clr = 1;
    @(negedge clk);
    coef_clr = 0;
    for (int p = 0; p < 8; p++)
      for (int t = 0; t < TAPS; t++) begin
        coef[p][t] = $urandom % M;
        coef_we = 8'(1 << p); coef_addr = 6'(t); coef_val = res_t'(coef[p][t]);
        @(negedge clk);
      end
    coef_we = 0;
    for (int f = 0; f < 150; f++) begin
      int v [8], yi [8];
      for (int p = 0; p < 8; p++) begin
        longint s;
        s = 0;
        hist[p].push_back($urandom % M);
        x[p] = res_t'(hist[p][$]);
        for (int t = 0; t < TAPS && t < hist[p].size(); t++)
          s += longint'(coef[p][t]) * hist[p][hist[p].size() - 1 - t];
        v[p] = int'(s % M);
      end
      idft8_res(v, M, QS, yi);
      for (int k = 0; k < 8; k++) exp_y.push_back(yi[k]);
      en = 1;
      due.push_back(cyc + 6);
      @(negedge clk);
      en = 0;
      repeat (7) @(negedge clk);
    end
    repeat (8) @(negedge clk);
    checks++;
    if (due.size() != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
