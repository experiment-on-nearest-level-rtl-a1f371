// dds_config: the "Configure" register bank of the reference sine generator.
//
// Holds the phase increment (frequency word) and phase offset of each of the
// three DDS channels. Reset loads the values of the reference design: a 50 Hz
// increment of 4295 on every channel (2^32 * 50 Hz / 50 MHz) and offsets of
// 0, 1/3 and 2/3 of a turn for phases A, B and C. A simple write port lets the
// frequency or phase of a channel be changed at run time; this port is this
// implementation's addition, the reference only fixes the values.
//
// Interface: cfg_we with cfg_addr selects one 32-bit register:
//   addr 2*k   -> pinc of channel k, addr 2*k+1 -> poff of channel k (k=0..2).
// Addresses 6 and 7 are ignored. Timing: a write shows on the outputs one
// clock after cfg_we.
module dds_config
  import mmc_pkg::*;
#(
  parameter logic [PHASE_W-1:0] PINC_RST   = PINC_50HZ,
  parameter logic [PHASE_W-1:0] POFF_A_RST = POFF_A,
  parameter logic [PHASE_W-1:0] POFF_B_RST = POFF_B,
  parameter logic [PHASE_W-1:0] POFF_C_RST = POFF_C
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                cfg_we,
  input  logic [2:0]          cfg_addr,
  input  logic [PHASE_W-1:0]  cfg_wdata,
  output logic [PHASE_W-1:0]  pinc [N_PHASE],
  output logic [PHASE_W-1:0]  poff [N_PHASE]
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < int'(N_PHASE); k++) pinc[k] <= PINC_RST;
      poff[0] <= POFF_A_RST;
      poff[1] <= POFF_B_RST;
      poff[2] <= POFF_C_RST;
    end else if (cfg_we && cfg_addr < 3'(2 * N_PHASE)) begin
      if (cfg_addr[0]) poff[cfg_addr[2:1]] <= cfg_wdata;
      else             pinc[cfg_addr[2:1]] <= cfg_wdata;
    end
  end

endmodule
