// dds_sine: one channel of the direct digital synthesiser that makes a
// reference sine wave.
//
// A 32-bit phase accumulator adds the phase increment pinc every enabled
// clock. The phase offset poff is added to the accumulator, and the top
// LUT_AW bits of the sum address a full-wave sine table with 8-bit signed
// samples (amplitude 127). With pinc = 4295 and a 50 MHz clock the output
// is a 50 Hz sine. The 32-bit phase and 8-bit output follow the reference
// design; the table depth LUT_AW and the amplitude of 127 are this
// implementation's choices.
//
// The table is computed at elaboration from sin(x) = x - x^3/3! + ... in
// Q28 fixed point, folded to the first quadrant:
//   entry k = round(127 * sin(2*pi*k / 2^LUT_AW)).
//
// Timing: the accumulator starts at 0 after reset; sine and phase are
// registered, so they show the accumulator value of the previous clock.
module dds_sine
  import mmc_pkg::*;
#(
  parameter int unsigned LUT_AW = 10
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      en,
  input  logic [PHASE_W-1:0]        pinc,
  input  logic [PHASE_W-1:0]        poff,
  output logic signed [SINE_W-1:0]  sine,
  output logic [PHASE_W-1:0]        phase
);

  localparam int unsigned DEPTH = 2 ** LUT_AW;

  // round(127 * sin(2*pi*k/DEPTH)) with integer arithmetic only.
  function automatic int sine_entry(input int unsigned k);
    longint x, x2, term, sum, q;
    logic [1:0] quad;
    int unsigned idx;
    bit neg;
    quad = 2'((k * 4) / DEPTH);             // quadrant 0..3
    idx  = k % (DEPTH / 4);                 // position in quadrant
    if (quad[0]) idx = DEPTH / 4 - idx;     // mirror for quadrants 1 and 3
    neg = quad[1];
    // x = 2*pi*idx/DEPTH in Q28 (pi = 843314857 / 2^28)
    x    = (longint'(843314857) * 2 * longint'(idx)) / longint'(DEPTH);
    x2   = (x * x) >>> 28;
    term = x;
    sum  = x;
    for (int n = 1; n <= 6; n++) begin
      term = -((term * x2) >>> 28) / longint'((2 * n) * (2 * n + 1));
      sum  = sum + term;
    end
    q = (sum * 127 + (longint'(1) <<< 27)) >>> 28;
    if (q > 127) q = 127;
    return neg ? -int'(q) : int'(q);
  endfunction

  function automatic logic [DEPTH*SINE_W-1:0] build_rom();
    logic [DEPTH*SINE_W-1:0] r;
    r = '0;
    for (int unsigned k = 0; k < DEPTH; k++)
      r[k*SINE_W +: SINE_W] = SINE_W'(sine_entry(k));
    return r;
  endfunction

  localparam logic [DEPTH*SINE_W-1:0] ROM = build_rom();

  logic [PHASE_W-1:0] acc;
  logic [PHASE_W-1:0] ph;
  logic [LUT_AW-1:0]  addr;

  assign ph   = acc + poff;
  assign addr = ph[PHASE_W-1 -: LUT_AW];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc   <= '0;
      sine  <= '0;
      phase <= '0;
    end else begin
      if (en) acc <= acc + pinc;
      sine  <= ROM[addr*SINE_W +: SINE_W];
      phase <= ph;
    end
  end

endmodule
