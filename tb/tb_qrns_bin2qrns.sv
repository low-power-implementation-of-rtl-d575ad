// tb_qrns_bin2qrns: self-checking test of the binary-to-QRNS converter.
// Drives random and extreme 12-bit complex samples (with valid gaps) and
// compares both QRNS residues of every modulus, one clock later, with values
// computed here by brute-force search for q and plain integer remainders.
module tb_qrns_bin2qrns;
  import qrns_pkg::*;
  localparam int NM = 7;
  localparam int unsigned MS [NM] = '{13, 17, 29, 37, 41, 53, 61};

  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  logic signed [11:0] in_re = 0, in_im = 0;
  res_t x [NM], xh [NM];
  int checks = 0, failures = 0;

  qrns_bin2qrns #(.NM(NM), .MODS(MS), .W(12)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int rmod(int a, int m);
    int r = a % m;
    return (r < 0) ? r + m : r;
  endfunction
  function automatic int find_q(int m);
    for (int q = 2; q < m; q++) if ((q * q + 1) % m == 0) return q;
    return -1;
  endfunction

  int exp_x [NM], exp_xh [NM];
  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int n = 0; n < 3000; n++) begin
      int vr, vi;
      vr = (n < 4) ? ((n & 1) ? 2047 : -2048) : ($urandom % 4096) - 2048;
      vi = (n < 4) ? ((n & 2) ? 2047 : -2048) : ($urandom % 4096) - 2048;
      in_re    <= 12'(vr);
      in_im    <= 12'(vi);
      in_valid <= 1;
      for (int i = 0; i < NM; i++) begin
        int q;
        q = find_q(MS[i]);
        exp_x[i]  = rmod(vr + q * vi, MS[i]);
        exp_xh[i] = rmod(vr - q * vi, MS[i]);
      end
      @(posedge clk);
      in_valid <= 0;
      #1;
      checks++;
      if (!out_valid) begin failures++; $display("no out_valid at n=%0d", n); end
      for (int i = 0; i < NM; i++) begin
        checks += 2;
        if (int'(x[i]) != exp_x[i] || int'(xh[i]) != exp_xh[i]) begin
          failures++;
          $display("n=%0d m=%0d in=(%0d,%0d) got (%0d,%0d) exp (%0d,%0d)", n, MS[i], vr, vi,
                   x[i], xh[i], exp_x[i], exp_xh[i]);
        end
      end
      if ($urandom % 3 == 0) begin
        @(posedge clk); #1;
        checks++;
        if (out_valid) begin failures++; $display("out_valid without input"); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
