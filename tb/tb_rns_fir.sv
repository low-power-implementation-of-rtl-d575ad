// tb_rns_fir: checks the modular FIR sub-filter for two moduli (61 and 13)
// at the full 46 taps. Random coefficients (including zeros) are written,
// then random samples (including zeros) are fed with random gaps; each
// output must equal sum_t c[t] x(n-t) mod M, computed here with ordinary
// integer arithmetic, and arrive exactly 3 clocks after its `en`. A second
// coefficient set written after coef_clr checks clearing and reloading.
module tb_rns_fir;
  import qrns_pkg::*;
  localparam int TAPS = 46;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // two instances, different moduli, driven with the same control
  logic en = 0, coef_clr = 0, coef_we = 0;
  logic [5:0] coef_addr = 0;
  res_t xa = 0, xb = 0, ca = 0, cb = 0;
  logic va, vb;
  res_t ya, yb;

  rns_fir #(.M(61), .TAPS(TAPS)) dut_a (.clk, .rst_n, .en, .x(xa), .coef_clr, .coef_we, .coef_addr,
                                        .coef_val(ca), .y_valid(va), .y(ya));
  rns_fir #(.M(13), .TAPS(TAPS)) dut_b (.clk, .rst_n, .en, .x(xb), .coef_clr, .coef_we, .coef_addr,
                                        .coef_val(cb), .y_valid(vb), .y(yb));

  int coefa [TAPS], coefb [TAPS];
  int hista [$], histb [$];
  int expa [$], expb [$];
  int due [$];
  int cyc = 0;
  always @(posedge clk) cyc++;

  function automatic int fir_ref(ref int c [TAPS], ref int h [$], input int m);
    longint s = 0;
    for (int t = 0; t < TAPS; t++)
      if (t < h.size()) s += longint'(c[t]) * longint'(h[h.size() - 1 - t]);
    return int'(s % m);
  endfunction

  // output monitor
  always @(negedge clk) begin
    if (rst_n && (va || vb)) begin
      checks++;
      if (due.size() == 0 || !va || !vb) begin
        failures++;
        $display("unexpected output at %0d", cyc);
      end else begin
        int d, ea, eb;
        d = due.pop_front(); ea = expa.pop_front(); eb = expb.pop_front();
        checks += 3;
        if (d != cyc) begin failures++; $display("latency: out at %0d expected %0d", cyc, d); end
        if (int'(ya) != ea) begin failures++; $display("M=61 y=%0d exp %0d", ya, ea); end
        if (int'(yb) != eb) begin failures++; $display("M=13 y=%0d exp %0d", yb, eb); end
      end
    end
  end

  // stimulus changes on the falling edge
  task automatic write_coefs(input int zero_pct);
    @(negedge clk);
    coef_clr = 1;
    @(negedge clk);
    coef_clr = 0;
    for (int t = 0; t < TAPS; t++) begin coefa[t] = 0; coefb[t] = 0; end
    for (int t = 0; t < TAPS; t++) begin
      if (t == TAPS - 1 && zero_pct > 0) continue;   // leave the last tap cleared
      coefa[t] = ($urandom % 100 < zero_pct) ? 0 : $urandom % 61;
      coefb[t] = ($urandom % 100 < zero_pct) ? 0 : $urandom % 13;
      coef_we = 1; coef_addr = 6'(t); ca = res_t'(coefa[t]); cb = res_t'(coefb[t]);
      @(negedge clk);
    end
    coef_we = 0;
  endtask

  task automatic feed(input int n);
    for (int i = 0; i < n; i++) begin
      int a, b;
      a = ($urandom % 8 == 0) ? 0 : $urandom % 61;
      b = ($urandom % 8 == 0) ? 0 : $urandom % 13;
      en = 1; xa = res_t'(a); xb = res_t'(b);
      hista.push_back(a); histb.push_back(b);
      expa.push_back(fir_ref(coefa, hista, 61));
      expb.push_back(fir_ref(coefb, histb, 13));
      due.push_back(cyc + 3);
      @(negedge clk);
      en = 0;
      repeat ($urandom % 3) @(negedge clk);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    write_coefs(15);
    feed(300);
    repeat (5) @(posedge clk);
    write_coefs(0);
    feed(200);
    repeat (6) @(posedge clk);
    checks++;
    if (due.size() != 0) begin failures++; $display("%0d outputs missing", due.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
