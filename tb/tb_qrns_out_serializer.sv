// tb_qrns_out_serializer: checks the output mux / converter / demux. Random
// complex values for the 8 channels are put into QRNS form here, presented
// with a one-cycle in_valid and held until the next frame (frames back to
// back every 8 clocks, or with gaps). All 8 binary outputs must appear
// together with out_valid exactly 10 clocks after in_valid and stay
// unchanged until the next out_valid.
module tb_qrns_out_serializer;
  import qrns_pkg::*;
  import tb_idft_ref::*;
  localparam int NM = 7;
  localparam int unsigned MS [NM] = '{13, 17, 29, 37, 41, 53, 61};
  localparam longint H = (64'd31432690549 - 1) / 2;

  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  res_t x [8][NM], xh [8][NM];
  logic signed [34:0] y_re [8], y_im [8];
  always #5 clk = ~clk;
  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc++;

  qrns_out_serializer #(.NM(NM), .MODS(MS), .OW(35)) dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint exp_re [$], exp_im [$];
  int due [$];
  longint last_re [8], last_im [8];
  int frames = 0;

  always @(negedge clk) begin
    if (rst_n) begin
      if (out_valid) begin
        int d;
        d = due.pop_front();
        checks++;
        if (d != cyc) begin failures++; $display("latency %0d vs %0d", cyc, d); end
        for (int c = 0; c < 8; c++) begin
          last_re[c] = exp_re.pop_front();
          last_im[c] = exp_im.pop_front();
        end
        frames++;
      end
      if (frames > 0)
        for (int c = 0; c < 8; c++) begin
          checks++;
          if (longint'(y_re[c]) != last_re[c] || longint'(y_im[c]) != last_im[c]) begin
            failures++;
            $display("cyc %0d ch %0d got (%0d,%0d) exp (%0d,%0d)", cyc, c, y_re[c], y_im[c],
                     last_re[c], last_im[c]);
          end
        end
    end
  end

  function automatic longint rnd();
    longint unsigned u;
    u = {$urandom, $urandom};
    return longint'(u % unsigned'(2 * H + 1)) - H;
  endfunction

  initial begin
    for (int c = 0; c < 8; c++)
      for (int i = 0; i < NM; i++) begin x[c][i] = '0; xh[c][i] = '0; end
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int f = 0; f < 300; f++) begin
      for (int c = 0; c < 8; c++) begin
        longint vr, vi;
        vr = rnd(); vi = rnd();
        exp_re.push_back(vr); exp_im.push_back(vi);
        for (int i = 0; i < NM; i++) begin
          int q, rr, ri;
          q  = find_q(MS[i]);
          rr = rmod(vr, MS[i]);
          ri = rmod(vi, MS[i]);
          x[c][i]  = res_t'(rmod(rr + q * ri, MS[i]));
          xh[c][i] = res_t'(rmod(rr - q * ri, MS[i]));
        end
      end
      in_valid = 1;
      due.push_back(cyc + 10);
      @(negedge clk);
      in_valid = 0;
      repeat (7 + (($urandom % 3 == 0) ? $urandom % 5 : 0)) @(negedge clk);
    end
    repeat (12) @(negedge clk);
    checks++;
    if (due.size() != 0 || frames != 300) begin failures++; $display("frames %0d", frames); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
