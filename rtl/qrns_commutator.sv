// qrns_commutator: input commutator and decimation by NCH.
//
// Realises the NCH down-samplers at the input of the polyphase bank. Samples
// arrive one per valid cycle at f_c; branch p must see x[NCH*n - p], so the
// sample arriving at phase k of a frame (k = 0..NCH-1) is written to slot
// NCH-1-k. After the NCH-th sample the whole frame is presented with a one-cycle
// frame_valid pulse, i.e. at f_c/NCH. The frame registers are only written on
// valid samples. `sync` restarts the phase at 0 (used after a coefficient
// load). One register stage: frame_valid follows the last sample's in_valid
// by one clock. The decimation is the source design's; the slot order and the
// sync input are this design's.
module qrns_commutator #(
  parameter int unsigned NCH = 8,
  parameter int unsigned W   = 84
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         sync,
  input  logic         in_valid,
  input  logic [W-1:0] din,
  output logic         frame_valid,
  output logic [W-1:0] frame [NCH]
);

  logic [$clog2(NCH)-1:0] phase;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      phase       <= '0;
      frame_valid <= 1'b0;
      for (int p = 0; p < NCH; p++) frame[p] <= '0;
    end else begin
      frame_valid <= 1'b0;
      if (sync) begin
        phase <= '0;
      end else if (in_valid) begin
        frame[NCH - 1 - int'(phase)] <= din;
        phase <= phase + 1'b1;
        if (phase == $bits(phase)'(NCH - 1)) frame_valid <= 1'b1;
      end
    end
  end

endmodule
