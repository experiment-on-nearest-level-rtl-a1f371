// nlm_level: modified nearest level modulation for one phase leg.
//
// From the reference sample r = vref/128 (8-bit signed) and the modulation
// index m = m_q8/256, it computes how many sub-modules each arm must insert:
//   x_L = (N/2) * (1 - m*r),   x_H = (N/2) * (1 + m*r)
//   n_L = round025(x_L),       n_H = round025(x_H)
// where N is the number of SMs per arm (the DC link over one capacitor
// voltage) and round025(x) = floor(x + 0.75), i.e. round(x + 0.25).
// Because x_L + x_H = N, shifting both roundings by a quarter step makes the
// two arms switch at instants half a level apart: n_L + n_H alternates
// between N and N+1, so the phase voltage (n_L - n_H)/2 * Vc moves in half
// steps and takes 2N+1 levels (13 for N = 6) while each arm takes N+1
// levels (7). The formula and the quarter-step rounding are the reference
// design's; the fixed-point scaling (r full scale 128, m in Q8) is this
// implementation's choice.
//
// Arithmetic: num = N * (2^15 +- m_q8*vref) is x in units of 2^-16, so
// n = (num + 0.75*2^16) >> 16, clamped to 0..N.
//
// Timing: n_h, n_l and level are registered; one clock of latency.
module nlm_level
  import mmc_pkg::*;
#(
  parameter int unsigned N_SM = N_ARM_SM,
  localparam int unsigned NW  = $clog2(N_SM + 1),
  localparam int unsigned LW  = $clog2(2 * N_SM + 1)
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic signed [SINE_W-1:0]  vref,
  input  logic [8:0]                m_q8,   // modulation index, 256 = 1.0
  output logic [NW-1:0]             n_h,    // SMs to insert, upper arm
  output logic [NW-1:0]             n_l,    // SMs to insert, lower arm
  output logic [LW-1:0]             level   // n_l - n_h + N: 0 .. 2N
);

  logic signed [18:0] prod;       // m_q8 * vref, |.| <= 2^15
  logic signed [31:0] num_h, num_l;

  function automatic logic [NW-1:0] round025(input logic signed [31:0] num);
    logic signed [31:0] q;
    q = (num + 32'sd49152) >>> 16;
    if (q < 0)                q = 0;
    if (q > 32'(signed'(N_SM))) q = 32'(signed'(N_SM));
    return NW'(q);
  endfunction

  assign prod  = signed'({1'b0, m_q8}) * 19'(vref);
  assign num_h = 32'(signed'(N_SM)) * (32'sd32768 + 32'(prod));
  assign num_l = 32'(signed'(N_SM)) * (32'sd32768 - 32'(prod));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      n_h   <= NW'(N_SM / 2);
      n_l   <= NW'(N_SM / 2);
      level <= LW'(N_SM);
    end else begin
      n_h   <= round025(num_h);
      n_l   <= round025(num_l);
      level <= LW'(N_SM) + LW'(round025(num_l)) - LW'(round025(num_h));
    end
  end

endmodule
