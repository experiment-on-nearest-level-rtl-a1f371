// tb_dead_time_gen: drives random pulse trains (including pulses shorter
// than the dead time) on three channels with DEAD = 5. A reference model
// counts clocks since the last input change; s1/s2 must both be low until
// DEAD+1 clocks after a change and then equal pwm / NOT pwm. s1 and s2 must
// never be high together. Counts that both short and long pulses occurred.
module tb_dead_time_gen;
  localparam int NC = 3;
  localparam int D  = 5;
  logic clk = 1'b0, rst_n = 1'b0;
  logic pwm [NC];
  logic s1 [NC], s2 [NC];
  int checks = 0, failures = 0;
  int since [NC];
  logic prev [NC];
  int n_short = 0, n_long = 0;

  dead_time_gen #(.N_CH(NC), .DEAD(D)) dut (.*);

  always #10 clk = ~clk;

  initial begin
    #5_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // model: 'since' = clocks since pwm last changed and 'prev' = pwm, both
  // as sampled at the last rising clock edge (what the design saw)
  always @(posedge clk) if (rst_n) begin
    for (int k = 0; k < NC; k++) begin
      if (pwm[k] != prev[k]) begin
        if (since[k] < D) n_short++; else n_long++;
        since[k] = 0;
      end else if (since[k] < 1000) since[k]++;
      prev[k] = pwm[k];
    end
  end

  always @(negedge clk) if (rst_n) begin
    for (int k = 0; k < NC; k++) begin
      checks++;
      if (s1[k] && s2[k]) begin failures++; $display("FAIL shoot-through ch%0d", k); end
      checks++;
      if (since[k] <= D) begin
        if (s1[k] || s2[k]) begin failures++; $display("FAIL ch%0d on during dead time (since=%0d)", k, since[k]); end
      end else begin
        if (s1[k] !== prev[k] || s2[k] !== !prev[k]) begin
          failures++; $display("FAIL ch%0d s1=%0b s2=%0b pwm=%0b since=%0d", k, s1[k], s2[k], prev[k], since[k]);
        end
      end
    end
  end

  initial begin
    for (int k = 0; k < NC; k++) begin pwm[k] = 1'b0; prev[k] = 1'b0; since[k] = 0; end
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int n = 0; n < 2000; n++) begin
      @(posedge clk); #1;
      for (int k = 0; k < NC; k++)
        if ($urandom_range(0, 9) == 0) pwm[k] = !pwm[k];
    end
    repeat (20) @(posedge clk);
    checks += 2;
    if (n_short == 0) begin failures++; $display("FAIL no short pulse"); end
    if (n_long == 0)  begin failures++; $display("FAIL no long pulse"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
