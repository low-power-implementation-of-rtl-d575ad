// tb_rns_idft8: checks the modular 8-point IDFT in both QRNS structures
// (M = 61 in X, M = 13 in X^, M = 37 in X) against the direct formula of
// tb_idft_ref, for random frames sent back to back and with gaps; each
// result must arrive exactly 3 clocks after its input.
module tb_rns_idft8;
  import qrns_pkg::*;
  import tb_idft_ref::*;

  logic clk = 0, rst_n = 0, in_valid = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc++;

  localparam int NI = 3;
  localparam int MM [NI] = '{61, 13, 37};
  localparam int QQ [NI] = '{1, -1, 1};
  res_t x [NI][8], y [NI][8];
  logic ov [NI];

  for (genvar g = 0; g < NI; g++) begin : g_dut
    rns_idft8 #(.M(MM[g]), .QS(QQ[g])) dut (.clk, .rst_n, .in_valid, .x(x[g]), .out_valid(ov[g]), .y(y[g]));
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int exp_y [$];
  int due [$];

  always @(negedge clk) begin
    if (rst_n && ov[0]) begin
      int d;
      checks++;
      d = due.pop_front();
      if (d != cyc) begin failures++; $display("latency: %0d vs %0d", cyc, d); end
      for (int g = 0; g < NI; g++)
        for (int k = 0; k < 8; k++) begin
          int e;
          e = exp_y.pop_front();
          checks++;
          if (int'(y[g][k]) != e) begin
            failures++;
            $display("M=%0d k=%0d got %0d exp %0d", MM[g], k, y[g][k], e);
          end
        end
    end
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int it = 0; it < 500; it++) begin
      @(negedge clk);
      for (int g = 0; g < NI; g++) begin
        int xi [8], yi [8];
        for (int n = 0; n < 8; n++) begin
          xi[n] = (it < 8) ? ((n == it) ? 1 : 0) : $urandom % MM[g];
          x[g][n] = res_t'(xi[n]);
        end
        idft8_res(xi, MM[g], QQ[g], yi);
        for (int k = 0; k < 8; k++) exp_y.push_back(yi[k]);
      end
      in_valid = 1;
      due.push_back(cyc + 3);
      @(negedge clk);
      in_valid = 0;
      repeat ($urandom % 3) @(negedge clk);
    end
    repeat (5) @(negedge clk);
    checks++;
    if (due.size() != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
