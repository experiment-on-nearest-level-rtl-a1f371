// mmc_nlm_top: FPGA controller of a three-phase modular multilevel
// converter with six half-bridge sub-modules per arm (twelve per phase).
//
// Data flow, one path per phase:
//   ref_sine_gen   three 50 Hz, 120-degree reference sines (8-bit DDS)
//   nlm_level      quarter-step nearest level modulation: how many SMs the
//                  upper (n_h) and lower (n_l) arm insert; 7 arm levels,
//                  13 phase-voltage levels
//   adc_capture    six SPI ADCs at 100 kHz: 36 capacitor voltages and
//                  6 arm currents
//   cap_balance    per arm: sort the capacitor voltages and pick which SMs
//                  to insert from the current direction (one per arm)
//   pwm_gen        per-SM gate pulse; duty is full (inserted) or zero
//   dead_time_gen  complementary S1/S2 pair per SM with dead time
// The block chain is the reference design's; the rates at which the
// stages hand on results are this implementation's: the SM selection is
// renewed after every complete ADC scan (scan_done, every 80 us), and the
// PWM stage takes it at the start of its next 10 us period.
//
// Arm numbering: arm = 2*phase + 0 (upper) / 1 (lower); SM k of arm a is
// output [a][k]. gate_pwm are the one-per-SM pulses (1 = inserted);
// gate_s1 / gate_s2 are the upper / lower switch commands after the dead
// time. n_h, n_l and level (n_l - n_h + 6, 0..12) expose the modulator;
// scan_done marks a completed ADC scan (and an SM selection update one
// clock later) and bal_resort[a] that arm a renewed its voltage order.
module mmc_nlm_top
  import mmc_pkg::*;
#(
  parameter int unsigned LUT_AW     = 10,
  parameter int unsigned SAMPLE_DIV = F_CLK_HZ / F_ADC_HZ,
  parameter int unsigned SCLK_HALF  = 12,
  parameter int unsigned PWM_PERIOD = 500,
  parameter int unsigned DEAD       = 50,
  parameter int unsigned DELTA_V    = 16,
  parameter int unsigned I_ZERO     = 2048,
  localparam int unsigned NW = $clog2(N_ARM_SM + 1),
  localparam int unsigned LW = $clog2(2 * N_ARM_SM + 1)
) (
  input  logic                      clk,
  input  logic                      rst_n,
  // DDS configuration (optional; reset values give 50 Hz, 3 phases)
  input  logic                      cfg_we,
  input  logic [2:0]                cfg_addr,
  input  logic [PHASE_W-1:0]        cfg_wdata,
  input  logic [8:0]                m_q8,
  // SPI bus to the six ADCs
  output logic                      adc_cs_n,
  output logic                      adc_sclk,
  output logic                      adc_mosi,
  input  logic                      adc_miso [N_ADC],
  // gate signals
  output logic                      gate_pwm [N_ARM][N_ARM_SM],
  output logic                      gate_s1  [N_ARM][N_ARM_SM],
  output logic                      gate_s2  [N_ARM][N_ARM_SM],
  // modulator state
  output logic signed [SINE_W-1:0]  vref  [N_PHASE],
  output logic [NW-1:0]             n_h   [N_PHASE],
  output logic [NW-1:0]             n_l   [N_PHASE],
  output logic [LW-1:0]             level [N_PHASE],
  // balancing status
  output logic                      scan_done,        // new measurements
  output logic                      bal_resort [N_ARM] // arm took new order
);

  localparam int unsigned N_SM_ALL = N_ARM * N_ARM_SM;
  localparam int unsigned CW = $clog2(PWM_PERIOD + 1);
  localparam int unsigned RW = $clog2(N_ARM_SM);

  logic [PHASE_W-1:0] phase [N_PHASE];
  adc_word_t          vcap  [N_ARM][N_ARM_SM];
  adc_word_t          iarm  [N_ARM];
  logic               frame_done;
  logic               insert [N_ARM][N_ARM_SM];
  logic [RW-1:0]      sorted_idx [N_ARM][N_ARM_SM];
  logic               imbalance [N_ARM];
  logic [NW-1:0]      n_ins [N_ARM];
  logic [CW-1:0]      duty  [N_SM_ALL];
  logic               pwm   [N_SM_ALL];
  logic               s1    [N_SM_ALL];
  logic               s2    [N_SM_ALL];
  logic               period_start;

  ref_sine_gen #(.LUT_AW(LUT_AW)) u_ref (
    .clk, .rst_n, .en(1'b1), .cfg_we, .cfg_addr, .cfg_wdata,
    .vref, .phase
  );

  for (genvar p = 0; p < int'(N_PHASE); p++) begin : g_phase
    nlm_level #(.N_SM(N_ARM_SM)) u_nlm (
      .clk, .rst_n, .vref(vref[p]), .m_q8,
      .n_h(n_h[p]), .n_l(n_l[p]), .level(level[p])
    );
    assign n_ins[2*p]   = n_h[p];
    assign n_ins[2*p+1] = n_l[p];
  end

  adc_capture #(.SAMPLE_DIV(SAMPLE_DIV), .SCLK_HALF(SCLK_HALF)) u_adc (
    .clk, .rst_n,
    .cs_n(adc_cs_n), .sclk(adc_sclk), .mosi(adc_mosi), .miso(adc_miso),
    .vcap, .iarm, .frame_done, .scan_done
  );

  for (genvar a = 0; a < int'(N_ARM); a++) begin : g_arm
    cap_balance #(.N_SM(N_ARM_SM), .DELTA_V(DELTA_V), .I_ZERO(I_ZERO)) u_bal (
      .clk, .rst_n, .update(scan_done), .n_ins(n_ins[a]),
      .vcap(vcap[a]), .i_arm(iarm[a]),
      .insert(insert[a]), .sorted_idx(sorted_idx[a]),
      .resort(bal_resort[a]), .imbalance(imbalance[a])
    );
    for (genvar k = 0; k < int'(N_ARM_SM); k++) begin : g_sm
      assign duty[a*N_ARM_SM + k]  = insert[a][k] ? CW'(PWM_PERIOD) : '0;
      assign gate_pwm[a][k] = pwm[a*N_ARM_SM + k];
      assign gate_s1[a][k]  = s1[a*N_ARM_SM + k];
      assign gate_s2[a][k]  = s2[a*N_ARM_SM + k];
    end
  end

  pwm_gen #(.N_CH(N_SM_ALL), .PERIOD(PWM_PERIOD)) u_pwm (
    .clk, .rst_n, .duty, .pwm, .period_start
  );

  dead_time_gen #(.N_CH(N_SM_ALL), .DEAD(DEAD)) u_dt (
    .clk, .rst_n, .pwm, .s1, .s2
  );

endmodule
