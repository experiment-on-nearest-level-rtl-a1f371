// adc_spi_master: one conversion frame on several MCP3208-type SPI ADCs at
// once.
//
// The ADC chips share chip select, serial clock and command line (MOSI) and
// each returns its result on its own MISO line, so one frame converts the
// same channel number on every chip. SPI mode 0: SCLK idles low, the
// command is driven after falling edges and read by the ADC on rising
// edges, and MISO is sampled on rising edges. The frame has 19 SCLK
// periods: the command bits start=1, single-ended=1, D2, D1, D0 on rising
// edges 1..5, the ADC's sample time, a null bit on rising edge 7, and the
// 12 result bits, MSB first, on rising edges 8..19. The reference design
// names the ADC type, the SPI link and the 12-bit, 8-channel chips; the
// frame layout follows the ADC's usual single-ended read, and sharing the
// bus with one MISO per chip is this implementation's choice.
//
// Interface: pulse start with ch (0..7) while busy is low. SCLK runs at
// clk / (2*SCLK_HALF). Timing: done pulses for one clock with data valid
// 38*SCLK_HALF + 1 clocks after start; cs_n is high again at that point.
module adc_spi_master
  import mmc_pkg::*;
#(
  parameter int unsigned N_LANE    = N_ADC,
  parameter int unsigned SCLK_HALF = 12,
  localparam int unsigned HW = $clog2(SCLK_HALF)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic [2:0]        ch,
  output logic              busy,
  output logic              done,
  output logic              cs_n,
  output logic              sclk,
  output logic              mosi,
  input  logic              miso [N_LANE],
  output adc_word_t         data [N_LANE]
);

  localparam int unsigned N_CLK = 19;   // SCLK periods per frame

  logic [HW-1:0] hcnt;
  logic [4:0]    nrise;
  logic [4:0]    tx;
  adc_word_t     rx [N_LANE];
  logic          tick;

  assign tick = (hcnt == HW'(SCLK_HALF - 1));
  assign mosi = tx[4];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy  <= 1'b0;
      done  <= 1'b0;
      cs_n  <= 1'b1;
      sclk  <= 1'b0;
      hcnt  <= '0;
      nrise <= '0;
      tx    <= '0;
      for (int l = 0; l < int'(N_LANE); l++) begin
        rx[l]   <= '0;
        data[l] <= '0;
      end
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          busy  <= 1'b1;
          cs_n  <= 1'b0;
          sclk  <= 1'b0;
          hcnt  <= '0;
          nrise <= '0;
          tx    <= {1'b1, 1'b1, ch};
        end
      end else begin
        hcnt <= tick ? '0 : hcnt + 1'b1;
        if (tick) begin
          if (!sclk) begin
            // rising edge: ADC latches MOSI, we sample MISO
            sclk  <= 1'b1;
            nrise <= nrise + 1'b1;
            for (int l = 0; l < int'(N_LANE); l++)
              rx[l] <= {rx[l][ADC_W-2:0], miso[l]};
          end else begin
            // falling edge: next command bit, or end of frame
            sclk <= 1'b0;
            tx   <= {tx[3:0], 1'b0};
            if (nrise == 5'(N_CLK)) begin
              busy <= 1'b0;
              cs_n <= 1'b1;
              done <= 1'b1;
              for (int l = 0; l < int'(N_LANE); l++) data[l] <= rx[l];
            end
          end
        end
      end
    end
  end

  // chip select is low for the whole frame and high again when the
  // results are handed on
  a_done_idle:  assert property (@(posedge clk) disable iff (!rst_n) done |-> !busy && cs_n);
  a_cs_busy:    assert property (@(posedge clk) disable iff (!rst_n) busy |-> !cs_n);

endmodule
