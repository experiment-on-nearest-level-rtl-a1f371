// tb_ref_sine_gen: runs the three-phase generator at its reset settings for
// two 50 Hz periods. Checks that the three phase words stay 1/3 turn apart,
// that each sample matches 127*sin(phase) within 1 code, and that phase A
// crosses zero upwards every 2^32/4295 = 999,992 clocks (+-1), i.e. 50.0004 Hz at 50 MHz.
// Then doubles the frequency of phase A through the configuration port and
// checks the new period.
module tb_ref_sine_gen;
  import mmc_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b1;
  logic cfg_we = 1'b0;
  logic [2:0] cfg_addr = '0;
  logic [31:0] cfg_wdata = '0;
  logic signed [7:0] vref [3];
  logic [31:0] phase [3];
  int checks = 0, failures = 0;
  longint last_cross, cyc;
  int ncross;
  logic signed [7:0] prev_a;

  ref_sine_gen dut (.*);

  always #10 clk = ~clk;

  initial begin
    #100_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int expect_sine(logic [31:0] ph);
    real a;
    a = 2.0 * 3.14159265358979 * real'(ph[31:22]) / 1024.0;
    return int'($floor(127.0 * $sin(a) + 0.5));
  endfunction

  task automatic run_cycles(longint n, longint exp_period);
    for (longint i = 0; i < n; i++) begin
      @(posedge clk); #1;
      cyc++;
      if (i % 997 == 0) begin
        for (int p = 0; p < 3; p++) begin
          checks++;
          if ((int'(vref[p]) - expect_sine(phase[p])) > 1 || (expect_sine(phase[p]) - int'(vref[p])) > 1) begin
            failures++;
            if (failures < 10) $display("FAIL sine p=%0d ph=%0h got %0d", p, phase[p], vref[p]);
          end
        end
      end
      if (prev_a < 0 && vref[0] >= 0) begin
        if (ncross > 0) begin
          checks++;
          if (cyc - last_cross > exp_period + 1 || cyc - last_cross < exp_period - 1) begin
            failures++;
            $display("FAIL period %0d exp %0d", cyc - last_cross, exp_period);
          end
        end
        ncross++;
        last_cross = cyc;
      end
      prev_a = vref[0];
    end
  endtask

  initial begin
    cyc = 0; ncross = 0; last_cross = 0; prev_a = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    @(posedge clk); #1;
    checks += 2;
    if (phase[1] - phase[0] !== 32'd1431655765) begin failures++; $display("FAIL offset B"); end
    if (phase[2] - phase[0] !== 32'd2863311531) begin failures++; $display("FAIL offset C"); end
    run_cycles(2_100_000, 999_992);
    checks++;
    if (ncross < 2) begin failures++; $display("FAIL no zero crossing"); end
    checks += 2;
    if (phase[1] - phase[0] !== 32'd1431655765) begin failures++; $display("FAIL offset B late"); end
    if (phase[2] - phase[0] !== 32'd2863311531) begin failures++; $display("FAIL offset C late"); end
    // 100 Hz on phase A
    @(negedge clk);
    cfg_we = 1'b1; cfg_addr = 3'd0; cfg_wdata = 32'd8590;
    @(negedge clk);
    cfg_we = 1'b0;
    ncross = 0;
    run_cycles(1_100_000, 499_996);
    checks++;
    if (ncross < 2) begin failures++; $display("FAIL no zero crossing at 100 Hz"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
