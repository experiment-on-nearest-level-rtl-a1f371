// cap_balance: capacitor voltage sorting and SM selection for one arm.
//
// On each update pulse the arm's N_SM capacitor voltages are ranked in
// ascending order (rank 0 = lowest voltage; equal voltages are ordered by
// SM number). The n_ins SMs to insert are then picked from that order by
// the direction of the arm current:
//   current >= 0 (it charges inserted capacitors): the n_ins lowest,
//   current <  0 (it discharges them):             the n_ins highest.
// The ranking is only renewed when some capacitor leaves the band
// Vavg +- DELTA_V around the arm average; while all stay inside it the
// previous order is kept, so the same SMs stay inserted and the switching
// frequency stays low. Sorting with an index list, selection by current
// direction and the DELTA_V band follow the reference design; the parallel
// rank comparison, the offset-binary current code (I_ZERO = 0 A) and the
// band test done without division (N*V_i against sum +- N*DELTA_V) are this
// implementation's choices.
//
// Interface: vcap and i_arm are raw ADC codes. insert[k] = 1 means SM k is
// inserted (its capacitor in the arm). sorted_idx[r] is the SM of rank r in
// the ranking in use. resort pulses when a new ranking was taken.
// Timing: insert, resort and the ranking change one clock after update.
module cap_balance
  import mmc_pkg::*;
#(
  parameter int unsigned N_SM    = N_ARM_SM,
  parameter int unsigned DELTA_V = 16,      // ADC codes
  parameter int unsigned I_ZERO  = 2048,    // ADC code of zero current
  localparam int unsigned NW = $clog2(N_SM + 1),
  localparam int unsigned RW = (N_SM > 1) ? $clog2(N_SM) : 1
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           update,
  input  logic [NW-1:0]  n_ins,
  input  adc_word_t      vcap [N_SM],
  input  adc_word_t      i_arm,
  output logic           insert [N_SM],
  output logic [RW-1:0]  sorted_idx [N_SM],
  output logic           resort,
  output logic           imbalance
);

  localparam int unsigned SW = ADC_W + $clog2(N_SM + 1) + 1;

  logic [RW-1:0] rank_new [N_SM];
  logic [RW-1:0] rank_q   [N_SM];
  logic [RW-1:0] rank_use [N_SM];
  logic          valid;
  logic          i_pos;
  logic [SW-1:0] sum;

  // ranks: number of SMs that sort before SM i
  always_comb begin
    for (int i = 0; i < int'(N_SM); i++) begin
      rank_new[i] = '0;
      for (int j = 0; j < int'(N_SM); j++)
        if (vcap[j] < vcap[i] || (vcap[j] == vcap[i] && j < i))
          rank_new[i] = rank_new[i] + 1'b1;
    end
  end

  // deviation band around the arm average
  always_comb begin
    sum = '0;
    for (int i = 0; i < int'(N_SM); i++) sum = sum + SW'(vcap[i]);
    imbalance = 1'b0;
    for (int i = 0; i < int'(N_SM); i++) begin
      if (SW'(N_SM) * SW'(vcap[i]) > sum + SW'(N_SM * DELTA_V)) imbalance = 1'b1;
      if (SW'(N_SM) * SW'(vcap[i]) + SW'(N_SM * DELTA_V) < sum) imbalance = 1'b1;
    end
  end

  assign i_pos = (i_arm >= ADC_W'(I_ZERO));

  always_comb begin
    for (int i = 0; i < int'(N_SM); i++)
      rank_use[i] = (imbalance || !valid) ? rank_new[i] : rank_q[i];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid  <= 1'b0;
      resort <= 1'b0;
      for (int i = 0; i < int'(N_SM); i++) begin
        rank_q[i] <= RW'(i);
        insert[i] <= 1'b0;
      end
    end else begin
      resort <= 1'b0;
      if (update) begin
        valid  <= 1'b1;
        resort <= imbalance || !valid;
        for (int i = 0; i < int'(N_SM); i++) begin
          rank_q[i] <= rank_use[i];
          if (i_pos) insert[i] <= ({1'b0, rank_use[i]} < (NW + 1)'(n_ins));
          else       insert[i] <= ({1'b0, rank_use[i]} + (NW + 1)'(n_ins) >= (NW + 1)'(N_SM));
        end
      end
    end
  end

  // index list of the ranking in use (Fig.-5 style "sorted + index")
  always_comb begin
    for (int r = 0; r < int'(N_SM); r++) begin
      sorted_idx[r] = '0;
      for (int i = 0; i < int'(N_SM); i++)
        if (rank_q[i] == RW'(r)) sorted_idx[r] = RW'(i);
    end
  end

endmodule
