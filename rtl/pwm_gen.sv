// pwm_gen: gate pulse generator for a group of sub-modules.
//
// A counter runs from 0 to PERIOD-1. At the end of each period the duty
// values are copied into shadow registers, and during the next period
// channel k is high while the counter is below its shadow duty. A duty of
// PERIOD keeps the channel on for the whole period and 0 keeps it off,
// which is how the nearest level modulation uses it (an SM is either
// inserted or bypassed); other values give ordinary edge-aligned PWM.
// The reference design names the block and its role (on and off times of
// the IGBTs from a duty cycle); the counter, the shadow registers and the
// default period (10 us, the ADC sampling period) are this
// implementation's choices.
//
// Timing: a new duty takes effect at the next period start, so the output
// follows a duty change within 1 to PERIOD+1 clocks. period_start pulses on
// the clock where the counter is 0. Outputs are registered.
module pwm_gen #(
  parameter int unsigned N_CH   = 36,
  parameter int unsigned PERIOD = 500,
  localparam int unsigned CW = $clog2(PERIOD + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [CW-1:0] duty [N_CH],
  output logic          pwm  [N_CH],
  output logic          period_start
);

  logic [CW-1:0] cnt;
  logic [CW-1:0] duty_q [N_CH];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt          <= '0;
      period_start <= 1'b0;
      for (int k = 0; k < int'(N_CH); k++) begin
        duty_q[k] <= '0;
        pwm[k]    <= 1'b0;
      end
    end else begin
      cnt          <= (cnt == CW'(PERIOD - 1)) ? '0 : cnt + 1'b1;
      period_start <= (cnt == '0);
      for (int k = 0; k < int'(N_CH); k++) begin
        if (cnt == CW'(PERIOD - 1)) duty_q[k] <= duty[k];
        pwm[k] <= (cnt < duty_q[k]);
      end
    end
  end

endmodule
