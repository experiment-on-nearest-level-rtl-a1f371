// dead_time_gen: complementary gate pair with dead time for each sub-module.
//
// A half-bridge SM has an upper switch S1 (on = SM inserted) and a lower
// switch S2 (on = SM bypassed) that must never conduct together. For each
// channel this block drives s1 = pwm and s2 = NOT pwm, but after every
// change of pwm it first turns both off for DEAD clocks and only then turns
// on the switch of the new state. The reference design makes the inverted
// second signal in a dead-time circuit after the FPGA; its delay is not
// given, so DEAD = 50 clocks (1 us at 50 MHz) is this implementation's
// choice.
//
// Timing: registered outputs; the newly selected switch turns on DEAD+1
// clocks after the pwm edge, the other one turns off one clock after it.
// A pulse shorter than DEAD clocks restarts the dead time. After reset both
// switches stay off for DEAD clocks, then S2 (bypass) turns on.
module dead_time_gen #(
  parameter int unsigned N_CH = 36,
  parameter int unsigned DEAD = 50,
  localparam int unsigned TW = $clog2(DEAD + 1)
) (
  input  logic clk,
  input  logic rst_n,
  input  logic pwm [N_CH],
  output logic s1  [N_CH],
  output logic s2  [N_CH]
);

  logic          last [N_CH];
  logic [TW-1:0] tmr  [N_CH];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < int'(N_CH); k++) begin
        last[k] <= 1'b0;
        tmr[k]  <= TW'(DEAD);
        s1[k]   <= 1'b0;
        s2[k]   <= 1'b0;
      end
    end else begin
      for (int k = 0; k < int'(N_CH); k++) begin
        last[k] <= pwm[k];
        if (pwm[k] != last[k]) begin
          tmr[k] <= TW'(DEAD);
          s1[k]  <= 1'b0;
          s2[k]  <= 1'b0;
        end else if (tmr[k] != '0) begin
          tmr[k] <= tmr[k] - 1'b1;
          s1[k]  <= 1'b0;
          s2[k]  <= 1'b0;
        end else begin
          s1[k]  <= pwm[k];
          s2[k]  <= !pwm[k];
        end
      end
    end
  end

  // the two switches of a half-bridge are never commanded on together
  for (genvar k = 0; k < int'(N_CH); k++) begin : g_chk
    a_no_overlap: assert property (@(posedge clk) disable iff (!rst_n) !(s1[k] && s2[k]));
  end

endmodule
