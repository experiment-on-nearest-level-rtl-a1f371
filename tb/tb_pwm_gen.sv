// tb_pwm_gen: four channels, period 20. Random duties 0..20 are written at
// random times; for every full period the number of high clocks of each
// channel must equal the duty that was in place at the period's start, and
// high clocks must come first (edge-aligned). Also checks that a change
// shows within PERIOD+1 clocks and that period_start comes every PERIOD.
module tb_pwm_gen;
  localparam int NC = 4;
  localparam int P  = 20;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [4:0] duty [NC];
  logic pwm [NC];
  logic period_start;
  int checks = 0, failures = 0;
  int highs [NC];
  logic [4:0] duty_at_start [NC];
  logic [4:0] duty_next [NC];
  int pos = -1;
  bit fell [NC];
  longint cyc = 0, last_ps = -1;

  pwm_gen #(.N_CH(NC), .PERIOD(P)) dut (.*);

  always #10 clk = ~clk;

  initial begin
    #2_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Sampled at each negedge: period_start marks the first clock of a period
  // (the pwm value then belongs to counter 0). Duties latched by the design
  // at the end of the previous period are those present one clock before.
  always @(negedge clk) if (rst_n) begin
    cyc++;
    if (period_start) begin
      if (last_ps >= 0) begin
        checks++;
        if (cyc - last_ps != P) begin failures++; $display("FAIL period_start spacing %0d", cyc - last_ps); end
        if (pos == P) begin
          for (int k = 0; k < NC; k++) begin
            checks++;
            if (highs[k] != int'(duty_at_start[k])) begin
              failures++; $display("FAIL ch%0d high %0d exp %0d", k, highs[k], duty_at_start[k]);
            end
          end
        end
      end
      last_ps = cyc;
      pos = 0;
      for (int k = 0; k < NC; k++) begin highs[k] = 0; fell[k] = 0; duty_at_start[k] = duty_next[k]; end
    end
    if (pos >= 0) begin
      for (int k = 0; k < NC; k++) begin
        if (pwm[k]) begin
          highs[k]++;
          if (fell[k]) begin checks++; failures++; $display("FAIL ch%0d not edge aligned", k); end
        end else fell[k] = 1;
      end
      pos++;
    end
  end

  // duty values seen at the last two rising edges; the design copies the
  // duties at the edge two clocks before period_start is seen high
  logic [4:0] hist1 [NC];
  always @(posedge clk) begin
    hist1     <= duty;
    duty_next <= hist1;
  end

  initial begin
    for (int k = 0; k < NC; k++) begin duty[k] = '0; duty_next[k] = '0; end
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int n = 0; n < 400; n++) begin
      repeat ($urandom_range(1, 30)) @(posedge clk);
      #2;
      duty[$urandom_range(0, NC - 1)] = 5'($urandom_range(0, P));
    end
    // latency: set all full on, must be high within P+1 clocks
    @(posedge clk); #2;
    for (int k = 0; k < NC; k++) duty[k] = 5'(P);
    repeat (P + 1) @(posedge clk);
    #2;
    for (int k = 0; k < NC; k++) begin
      checks++;
      if (!pwm[k]) begin failures++; $display("FAIL latency ch%0d", k); end
    end
    repeat (2 * P) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
