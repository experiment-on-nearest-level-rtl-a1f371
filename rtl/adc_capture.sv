// adc_capture: ADC sampling, channel sequencing and measurement store.
//
// A sampling timer starts a conversion frame every SAMPLE_DIV clocks
// (100 kHz at 50 MHz). Each frame reads the same channel on all six ADC
// chips through adc_spi_master; the channel steps 0..7, so one scan of all
// 48 inputs takes eight frames (80 us) and ends with a scan_done pulse.
// Results are stored by input number idx = 8*adc + channel:
//   idx 0..35  capacitor voltages, vcap[arm][k] with arm = idx / 6,
//              k = idx % 6 (arm = 2*phase + 0 upper / 1 lower),
//   idx 36..41 arm currents, iarm[idx-36],
//   idx 42..47 unused.
// The reference design gives the six chips, the 100 kHz sampling and the
// 36 voltage and 6 current inputs; the round-robin order and this input
// map are this implementation's choices.
//
// Timing: a stored value changes one clock after its frame's done; outputs
// are registers, all zero after reset.
module adc_capture
  import mmc_pkg::*;
#(
  parameter int unsigned SAMPLE_DIV = F_CLK_HZ / F_ADC_HZ,
  parameter int unsigned SCLK_HALF  = 12,
  localparam int unsigned DW = $clog2(SAMPLE_DIV)
) (
  input  logic        clk,
  input  logic        rst_n,
  output logic        cs_n,
  output logic        sclk,
  output logic        mosi,
  input  logic        miso [N_ADC],
  output adc_word_t   vcap [N_ARM][N_ARM_SM],
  output adc_word_t   iarm [N_ARM],
  output logic        frame_done,
  output logic        scan_done
);

  localparam int unsigned N_IN = N_ADC * ADC_CH;

  logic [DW-1:0] div;
  logic          start, busy;
  logic [2:0]    ch;
  adc_word_t     data [N_ADC];
  adc_word_t     store [N_IN];

  // sampling timer
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) div <= '0;
    else        div <= (div == DW'(SAMPLE_DIV - 1)) ? '0 : div + 1'b1;
  end
  assign start = (div == '0) && !busy;

  adc_spi_master #(.N_LANE(N_ADC), .SCLK_HALF(SCLK_HALF)) u_spi (
    .clk, .rst_n, .start, .ch, .busy, .done(frame_done),
    .cs_n, .sclk, .mosi, .miso, .data
  );

  // channel sequencer and store
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ch        <= '0;
      scan_done <= 1'b0;
      for (int i = 0; i < int'(N_IN); i++) store[i] <= '0;
    end else begin
      scan_done <= 1'b0;
      if (frame_done) begin
        for (int a = 0; a < int'(N_ADC); a++) store[a * ADC_CH + int'(ch)] <= data[a];
        ch <= ch + 1'b1;
        if (ch == 3'(ADC_CH - 1)) scan_done <= 1'b1;
      end
    end
  end

  for (genvar a = 0; a < int'(N_ARM); a++) begin : g_arm
    for (genvar k = 0; k < int'(N_ARM_SM); k++) begin : g_sm
      assign vcap[a][k] = store[a * N_ARM_SM + k];
    end
    assign iarm[a] = store[N_ARM * N_ARM_SM + a];
  end

endmodule
