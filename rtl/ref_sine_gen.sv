// ref_sine_gen: three-phase reference sine wave generator.
//
// Combines the Configure register bank (dds_config) with three DDS channels
// (dds_sine). After reset it produces three 50 Hz sines, 120 degrees apart,
// as 8-bit signed samples (+-127), one new sample every clock. The channel
// settings can be rewritten through the cfg_* port (see dds_config).
//
// Timing: outputs are registered one clock behind the phase accumulators.
module ref_sine_gen
  import mmc_pkg::*;
#(
  parameter int unsigned LUT_AW = 10
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      en,
  input  logic                      cfg_we,
  input  logic [2:0]                cfg_addr,
  input  logic [PHASE_W-1:0]        cfg_wdata,
  output logic signed [SINE_W-1:0]  vref  [N_PHASE],
  output logic [PHASE_W-1:0]        phase [N_PHASE]
);

  logic [PHASE_W-1:0] pinc [N_PHASE];
  logic [PHASE_W-1:0] poff [N_PHASE];

  dds_config u_cfg (
    .clk, .rst_n, .cfg_we, .cfg_addr, .cfg_wdata, .pinc, .poff
  );

  for (genvar p = 0; p < int'(N_PHASE); p++) begin : g_ch
    dds_sine #(.LUT_AW(LUT_AW)) u_dds (
      .clk, .rst_n, .en,
      .pinc (pinc[p]),
      .poff (poff[p]),
      .sine (vref[p]),
      .phase(phase[p])
    );
  end

endmodule
