// tb_qrns2bin: checks the QRNS-to-binary converter for the 7-moduli set.
// Random complex values over the whole signed range (and its end points)
// are mapped to QRNS here with plain remainders, sent one per clock, and the
// converter must return the original values exactly, 2 clocks later.
module tb_qrns2bin;
  import qrns_pkg::*;
  import tb_idft_ref::*;
  localparam int NM = 7;
  localparam int unsigned MS [NM] = '{13, 17, 29, 37, 41, 53, 61};
  localparam longint MP = 64'd31432690549;

  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  res_t x [NM], xh [NM];
  logic signed [34:0] re, im;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc++;

  qrns2bin #(.NM(NM), .MODS(MS)) dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint exp_re [$], exp_im [$];
  int due [$];

  always @(negedge clk) begin
    if (rst_n && out_valid) begin
      longint er, ei;
      int d;
      d = due.pop_front(); er = exp_re.pop_front(); ei = exp_im.pop_front();
      checks += 3;
      if (d != cyc) begin failures++; $display("latency %0d vs %0d", cyc, d); end
      if (longint'(re) != er || longint'(im) != ei) begin
        failures++;
        $display("got (%0d,%0d) exp (%0d,%0d)", re, im, er, ei);
      end
    end
  end

  function automatic longint rnd_val(int n);
    longint h = (MP - 1) / 2;
    case (n)
      0: return h;
      1: return -h;
      2: return 0;
      3: return -1;
      default: begin
        longint unsigned u;
        u = {$urandom, $urandom};
        return longint'(u % unsigned'(2 * h + 1)) - h;
      end
    endcase
  endfunction

  initial begin
    for (int i = 0; i < NM; i++) begin x[i] = '0; xh[i] = '0; end
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      longint vr, vi;
      vr = rnd_val(n);
      vi = rnd_val((n + 2) % 5 == 0 ? n : n + 5);
      for (int i = 0; i < NM; i++) begin
        int q, rr, ri;
        q  = find_q(MS[i]);
        rr = rmod(vr, MS[i]);
        ri = rmod(vi, MS[i]);
        x[i]  = res_t'(rmod(rr + q * ri, MS[i]));
        xh[i] = res_t'(rmod(rr - q * ri, MS[i]));
      end
      exp_re.push_back(vr); exp_im.push_back(vi);
      due.push_back(cyc + 2);
      in_valid = 1;
      @(negedge clk);
      in_valid = 0;
      if ($urandom % 4 == 0) @(negedge clk);
    end
    repeat (4) @(negedge clk);
    checks++;
    if (due.size() != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
