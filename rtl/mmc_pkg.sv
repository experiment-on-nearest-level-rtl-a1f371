// mmc_pkg: constants and types shared by the three-phase MMC controller.
//
// The converter has three phases (legs). Each leg has an upper arm (H) and a
// lower arm (L) of N_ARM_SM half-bridge sub-modules (SMs) each; with six SMs
// per arm a leg holds twelve SMs and the phase voltage has 2*6+1 = 13 levels.
// Measurements come from six 12-bit, 8-channel SPI ADCs sampled at 100 kHz:
// 36 capacitor voltages and 6 arm currents. The 50 MHz clock, the 32-bit DDS
// phase, the 8-bit sine and the 50 Hz phase increment 4295 are the reference
// design's numbers; the rest are this implementation's choices and are noted
// where they are used.
package mmc_pkg;

  localparam int unsigned N_PHASE   = 3;   // phases A, B, C
  localparam int unsigned N_ARM_SM  = 6;   // SMs per arm
  localparam int unsigned N_ARM     = 2 * N_PHASE;   // 6 arms
  localparam int unsigned ADC_W     = 12;  // MCP3208 resolution
  localparam int unsigned N_ADC     = 6;   // number of ADC chips
  localparam int unsigned ADC_CH    = 8;   // channels per ADC chip
  localparam int unsigned SINE_W    = 8;   // DDS output width
  localparam int unsigned PHASE_W   = 32;  // DDS phase width

  localparam int unsigned F_CLK_HZ  = 50_000_000;
  localparam int unsigned F_ADC_HZ  = 100_000;

  // DDS settings for a 50 Hz, 120-degree-spaced three-phase set.
  // 2^32 * 50 / 50e6 = 4294.97 -> 4295; offsets are 1/3 and 2/3 of 2^32.
  localparam logic [PHASE_W-1:0] PINC_50HZ = 32'd4295;
  localparam logic [PHASE_W-1:0] POFF_A    = 32'd0;
  localparam logic [PHASE_W-1:0] POFF_B    = 32'd1431655765;
  localparam logic [PHASE_W-1:0] POFF_C    = 32'd2863311531;

  // Arm index used across the design: arm = 2*phase + (0 upper, 1 lower).
  typedef enum logic {ARM_UPPER = 1'b0, ARM_LOWER = 1'b1} arm_e;

  typedef logic [ADC_W-1:0] adc_word_t;

endpackage
