// tb_rns_butterfly: exhaustive check of the modular butterfly for two
// modulus/constant sets: every pair (a, b) of residues must give
// ya = (a+b)*CA mod M and yb = (a-b)*CB mod M.
module tb_rns_butterfly;
  import qrns_pkg::*;
  int checks = 0, failures = 0;
  res_t a = 0, b = 0, ya1, yb1, ya2, yb2;

  rns_butterfly #(.M(61), .CA(12), .CB(47)) dut1 (.a, .b, .ya(ya1), .yb(yb1));
  rns_butterfly #(.M(13), .CA(1),  .CB(5))  dut2 (.a, .b, .ya(ya2), .yb(yb2));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int rmod(int v, int m);
    int r = v % m;
    return (r < 0) ? r + m : r;
  endfunction

  initial begin
    for (int i = 0; i < 61; i++)
      for (int k = 0; k < 61; k++) begin
        a = res_t'(i); b = res_t'(k);
        #1;
        checks += 2;
        if (int'(ya1) != rmod((i + k) * 12, 61) || int'(yb1) != rmod((i - k) * 47, 61)) begin
          failures++;
          $display("M=61 a=%0d b=%0d -> %0d %0d", i, k, ya1, yb1);
        end
        if (i < 13 && k < 13) begin
          checks += 2;
          if (int'(ya2) != rmod(i + k, 13) || int'(yb2) != rmod((i - k) * 5, 13)) begin
            failures++;
            $display("M=13 a=%0d b=%0d -> %0d %0d", i, k, ya2, yb2);
          end
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
