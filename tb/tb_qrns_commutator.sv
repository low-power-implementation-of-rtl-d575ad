// tb_qrns_commutator: feeds numbered samples with random gaps and checks that
// every 8 valid samples produce one frame_valid pulse, one clock after the
// 8th sample, with frame[p] holding sample 8n+7-p (the newest in slot 0).
// Also checks that sync restarts the phase.
module tb_qrns_commutator;
  logic clk = 0, rst_n = 0, sync = 0, in_valid = 0, frame_valid;
  logic [15:0] din = 0;
  logic [15:0] frame [8];
  int checks = 0, failures = 0;
  int sent = 0, frames = 0, base = 0;

  qrns_commutator #(.NCH(8), .W(16)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int it = 0; it < 2000; it++) begin
      bit v, s;
      v = ($urandom % 3 != 0);
      s = (it == 1000);
      in_valid <= v;
      sync     <= s;
      din      <= 16'(sent);
      @(posedge clk);
      #1;
      if (s) begin
        base = sent;            // phase restarts, partial frame dropped
      end else if (v) begin
        sent++;
      end
      checks++;
      if (!s && v && ((sent - base) % 8 == 0)) begin
        if (!frame_valid) begin failures++; $display("missing frame at %0d", sent); end
        for (int p = 0; p < 8; p++) begin
          checks++;
          if (frame[p] != 16'(sent - 1 - p)) begin
            failures++;
            $display("frame slot %0d = %0d exp %0d", p, frame[p], sent - 1 - p);
          end
        end
        frames++;
      end else if (frame_valid) begin
        failures++;
        $display("unexpected frame_valid at it=%0d", it);
      end
    end
    in_valid <= 0;
    checks++;
    if (frames < 100) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
