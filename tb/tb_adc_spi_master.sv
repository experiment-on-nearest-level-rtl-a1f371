// tb_adc_spi_master: runs conversion frames on six ADC models with random
// input values and random channel numbers. Checks that every lane returns
// the value of the selected channel, that the ADC models saw a valid
// command for the right channel, the frame length of 38*SCLK_HALF+1 clocks
// from start to done, and the SCLK half period.
module tb_adc_spi_master;
  import mmc_pkg::*;
  localparam int unsigned SCLK_HALF = 4;
  logic clk = 1'b0, rst_n = 1'b0;
  logic start = 1'b0;
  logic [2:0] ch = '0;
  logic busy, done, cs_n, sclk, mosi;
  logic miso [6];
  logic [11:0] data [6];
  logic [11:0] ain [6][8];
  logic [2:0] last_ch [6];
  int frames [6], bad_cmd [6];
  int checks = 0, failures = 0;
  longint cyc = 0, t_start, t_rise;
  int half_min = 1000, half_max = 0;
  logic sclk_d = 1'b0;
  longint t_edge = 0;

  adc_spi_master #(.N_LANE(6), .SCLK_HALF(SCLK_HALF)) dut (.*);

  for (genvar a = 0; a < 6; a++) begin : g_adc
    mcp3208_model u_adc (
      .cs_n, .sclk, .din(mosi), .dout(miso[a]), .ain(ain[a]),
      .last_ch(last_ch[a]), .frames(frames[a]), .bad_cmd(bad_cmd[a])
    );
  end

  always #10 clk = ~clk;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    sclk_d <= sclk;
    if (sclk != sclk_d) begin
      if (t_edge != 0) begin
        if (int'(cyc - t_edge) < half_min) half_min = int'(cyc - t_edge);
        if (int'(cyc - t_edge) > half_max) half_max = int'(cyc - t_edge);
      end
      t_edge <= cyc;
    end
    if (!busy) t_edge <= 0;
  end

  initial begin
    #10_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 6; a++) for (int c = 0; c < 8; c++) ain[a][c] = 12'($urandom);
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int f = 0; f < 40; f++) begin
      logic [2:0] c;
      longint lat;
      c = 3'($urandom);
      if (f < 8) c = 3'(f);
      if (f == 8) for (int a = 0; a < 6; a++) ain[a][c] = (a % 2 == 0) ? 12'hFFF : 12'h000;
      @(negedge clk);
      start = 1'b1; ch = c;
      t_start = cyc;
      @(negedge clk);
      start = 1'b0;
      while (!done) @(negedge clk);
      lat = cyc - t_start;
      checks++;
      if (lat != 38 * SCLK_HALF + 1) begin failures++; $display("FAIL frame length %0d", lat); end
      for (int a = 0; a < 6; a++) begin
        checks += 2;
        if (data[a] !== ain[a][c]) begin failures++; $display("FAIL lane %0d ch %0d got %0h exp %0h", a, c, data[a], ain[a][c]); end
        if (last_ch[a] !== c) begin failures++; $display("FAIL model %0d saw ch %0d exp %0d", a, last_ch[a], c); end
      end
      checks++;
      if (!cs_n) begin failures++; $display("FAIL cs_n low after done"); end
      repeat (3) @(negedge clk);
    end
    for (int a = 0; a < 6; a++) begin
      checks += 2;
      if (frames[a] != 40) begin failures++; $display("FAIL frames %0d", frames[a]); end
      if (bad_cmd[a] != 0) begin failures++; $display("FAIL bad command"); end
    end
    checks++;
    if (half_min != SCLK_HALF || half_max != SCLK_HALF) begin failures++; $display("FAIL sclk half %0d..%0d", half_min, half_max); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
