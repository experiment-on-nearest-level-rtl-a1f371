// tb_dds_sine: checks the phase accumulator (phase = n*pinc + poff after n
// enabled clocks, held while en is low) and every table entry against
// 127*sin(2*pi*phase/2^32) computed with real arithmetic (within 1 code).
module tb_dds_sine;
  import mmc_pkg::*;
  localparam int unsigned LUT_AW = 10;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  logic [31:0] pinc, poff;
  logic signed [7:0] sine;
  logic [31:0] phase;
  int checks = 0, failures = 0;
  longint unsigned acc_model;
  int seen_max, seen_min;

  dds_sine #(.LUT_AW(LUT_AW)) dut (.*);

  always #10 clk = ~clk;

  initial begin
    #10_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int expect_sine(logic [31:0] ph);
    real a;
    logic [LUT_AW-1:0] idx;
    idx = ph[31 -: LUT_AW];
    a = 2.0 * 3.14159265358979 * real'(idx) / real'(2 ** LUT_AW);
    return int'($floor(127.0 * $sin(a) + 0.5));
  endfunction

  initial begin
    pinc = 32'd1 << (32 - LUT_AW);   // one table step per clock
    poff = 32'h1234_5678;
    seen_max = -200; seen_min = 200;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    @(negedge clk);
    en = 1'b1;
    acc_model = 0;
    // sweep 2 full turns
    for (int n = 0; n < 2 * (2 ** LUT_AW); n++) begin
      @(posedge clk); #1;
      // outputs show the accumulator before this edge
      checks++;
      if (phase !== 32'(acc_model + poff)) begin
        failures++;
        if (failures < 10) $display("FAIL phase n=%0d %0h exp %0h", n, phase, 32'(acc_model + poff));
      end
      checks++;
      if ((int'(sine) - expect_sine(phase)) > 1 || (expect_sine(phase) - int'(sine)) > 1) begin
        failures++;
        if (failures < 10) $display("FAIL sine ph=%0h got %0d exp %0d", phase, sine, expect_sine(phase));
      end
      if (int'(sine) > seen_max) seen_max = int'(sine);
      if (int'(sine) < seen_min) seen_min = int'(sine);
      acc_model = 32'(acc_model + pinc);
    end
    checks++;
    if (seen_max != 127 || seen_min != -127) begin
      failures++; $display("FAIL amplitude %0d %0d", seen_max, seen_min);
    end
    // hold while en is low
    @(negedge clk); en = 1'b0;
    repeat (3) @(posedge clk);
    #1;
    begin
      logic [31:0] p0;
      p0 = phase;
      repeat (5) @(posedge clk);
      #1;
      checks++;
      if (phase !== p0) begin failures++; $display("FAIL hold"); end
    end
    // 50 Hz increment: phase advances 4295 per clock
    @(negedge clk); pinc = 32'd4295; poff = 32'd0; en = 1'b1;
    @(posedge clk); #1;
    begin
      logic [31:0] p1;
      p1 = phase;
      repeat (1000) @(posedge clk);
      #1;
      checks++;
      if (phase - p1 !== 32'd4295000) begin failures++; $display("FAIL 50Hz rate %0d", phase - p1); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
