// qrns_coef_loader: coefficient-load state machine of the programmable filter
// bank.
//
// When `load` is pulsed, the next NTAPS (367) valid input samples are not
// filtered but taken as the complex prototype coefficients h[0..366]. Sample k
// of the load is steered to polyphase branch k mod NCH, tap k div NCH, since
// branch p of the bank realises E_p(z) = sum_t h[NCH*t + p] z^-t. That a state
// machine loads the coefficients from the input port after a load signal is
// the source design's; the index mapping, restart-on-load and the `done`
// pulse are this design's choices.
//
// Timing: coef_now/branch/tap describe the sample presented in the same cycle
// (combinational from the state); the caller registers them together with the
// converted sample. `done` pulses in the cycle after the last coefficient.
module qrns_coef_loader #(
  parameter int unsigned NTAPS = 367,
  parameter int unsigned NCH   = 8
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         load,
  input  logic                         in_valid,
  output logic                         coef_now,
  output logic [$clog2(NCH)-1:0]       branch,
  output logic [$clog2((NTAPS+NCH-1)/NCH)-1:0] tap,
  output logic                         busy,
  output logic                         done
);

  typedef enum logic {IDLE, LOAD} state_t;
  state_t state;
  logic [$clog2(NTAPS+1)-1:0] cnt;

  assign busy     = (state == LOAD);
  assign coef_now = busy && in_valid && !load;
  assign branch   = cnt[$clog2(NCH)-1:0];
  assign tap      = $bits(tap)'(cnt >> $clog2(NCH));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state <= IDLE;
      cnt   <= '0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      if (load) begin
        state <= LOAD;
        cnt   <= '0;
      end else if (coef_now) begin
        if (cnt == $bits(cnt)'(NTAPS - 1)) begin
          state <= IDLE;
          cnt   <= '0;
          done  <= 1'b1;
        end else begin
          cnt <= cnt + 1'b1;
        end
      end
    end
  end

  initial assert ((NCH & (NCH - 1)) == 0) else $error("NCH must be a power of two");

endmodule
