// tb_qrns_trunc_requant: checks the intermediate QRNS->binary->truncate->
// QRNS conversion of one branch. Random complex values over the whole
// signed range of the 5-moduli product (and its end points) are put into
// QRNS form here; the outputs must be the 6-moduli QRNS form of
// floor(v / 512) for both parts, 4 clocks later.
module tb_qrns_trunc_requant;
  import qrns_pkg::*;
  import tb_idft_ref::*;
  localparam int unsigned MA [5] = '{13, 17, 29, 37, 41};
  localparam int unsigned MB [6] = '{13, 17, 29, 37, 41, 53};
  localparam longint H = (64'd9722453 - 1) / 2;

  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  res_t x [5], xh [5], yx [6], yxh [6];
  always #5 clk = ~clk;
  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc++;

  qrns_trunc_requant #(.NA(5), .MODS_A(MA), .NB(6), .MODS_B(MB), .TW(15)) dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int ex [$], exh [$], due [$];

  always @(negedge clk) begin
    if (rst_n && out_valid) begin
      int d;
      d = due.pop_front();
      checks++;
      if (d != cyc) begin failures++; $display("latency %0d vs %0d", cyc, d); end
      for (int i = 0; i < 6; i++) begin
        int a, b;
        a = ex.pop_front(); b = exh.pop_front();
        checks++;
        if (int'(yx[i]) != a || int'(yxh[i]) != b) begin
          failures++;
          $display("m=%0d got (%0d,%0d) exp (%0d,%0d)", MB[i], yx[i], yxh[i], a, b);
        end
      end
    end
  end

  function automatic longint pick(int n);
    longint unsigned u;
    case (n)
      0: return H;
      1: return -H;
      2: return -1;
      3: return 511;
      4: return -512;
      default: begin
        u = {$urandom, $urandom};
        return longint'(u % unsigned'(2 * H + 1)) - H;
      end
    endcase
  endfunction

  initial begin
    for (int i = 0; i < 5; i++) begin x[i] = '0; xh[i] = '0; end
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 2000; n++) begin
      longint vr, vi, tr, ti;
      vr = pick(n);
      vi = pick(n < 5 ? 4 - n : n);
      for (int i = 0; i < 5; i++) begin
        int q, rr, ri;
        q  = find_q(MA[i]);
        rr = rmod(vr, MA[i]);
        ri = rmod(vi, MA[i]);
        x[i]  = res_t'(rmod(rr + q * ri, MA[i]));
        xh[i] = res_t'(rmod(rr - q * ri, MA[i]));
      end
      tr = vr >>> 9;
      ti = vi >>> 9;
      for (int i = 0; i < 6; i++) begin
        int q;
        q = find_q(MB[i]);
        ex.push_back(rmod(tr + q * ti, MB[i]));
        exh.push_back(rmod(tr - q * ti, MB[i]));
      end
      due.push_back(cyc + 4);
      in_valid = 1;
      @(negedge clk);
      in_valid = 0;
      if ($urandom % 4 == 0) @(negedge clk);
    end
    repeat (6) @(negedge clk);
    checks++;
    if (due.size() != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
