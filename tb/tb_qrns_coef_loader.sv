// tb_qrns_coef_loader: checks the coefficient-load state machine. After a
// load pulse exactly 367 valid samples (sent with random gaps) must be marked
// as coefficients, sample k going to branch k mod 8 and tap k div 8; then
// busy drops, done pulses once, and later samples are not coefficients.
// A second load restarted in the middle must begin again at k = 0.
module tb_qrns_coef_loader;
  logic clk = 0, rst_n = 0, load = 0, in_valid = 0;
  logic coef_now, busy, done;
  logic [2:0] branch;
  logic [5:0] tap;
  int checks = 0, failures = 0;
  int k = 0, dones = 0;

  qrns_coef_loader #(.NTAPS(367), .NCH(8)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && done) dones++;

  task automatic run_load(input int n_before_restart);
    // pulse load
    load <= 1; in_valid <= ($urandom % 2);
    @(posedge clk);
    load <= 0; in_valid <= 0;
    k = 0;
    while (1) begin
      in_valid <= ($urandom % 4 != 0);
      #1;
      if (in_valid) begin
        checks++;
        if (!coef_now || branch != 3'(k % 8) || tap != 6'(k / 8) || !busy) begin
          failures++;
          $display("k=%0d coef_now=%0d branch=%0d tap=%0d", k, coef_now, branch, tap);
        end
        k++;
      end else begin
        checks++;
        if (coef_now) begin failures++; $display("coef_now without valid"); end
      end
      @(posedge clk);
      if (n_before_restart > 0 && k == n_before_restart) break;
      if (k == 367) break;
    end
    in_valid <= 0;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    #1 checks++;
    if (busy || coef_now) begin failures++; $display("busy after reset"); end
    run_load(100);          // interrupted load
    run_load(0);            // restarted, full load
    @(posedge clk); #1;
    checks++;
    if (busy) begin failures++; $display("still busy after 367"); end
    in_valid <= 1;
    repeat (20) begin
      #1 checks++;
      if (coef_now) begin failures++; $display("coef after end"); end
      @(posedge clk);
    end
    checks++;
    if (dones != 1) begin failures++; $display("done pulses %0d", dones); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
