// tb_cap_balance: random capacitor voltages, arm currents and insertion
// counts on one arm of six SMs. A reference model keeps its own ascending
// voltage order (stable in SM number), renews it only when a voltage lies
// outside average +- DELTA_V, and inserts the n lowest SMs for a current
// at or above the zero code and the n highest below it. insert, resort and
// sorted_idx are compared after every update; the test counts that both
// current directions, renewed and held orders all occur.
module tb_cap_balance;
  import mmc_pkg::*;
  localparam int N = 6;
  localparam int DV = 16;
  logic clk = 1'b0, rst_n = 1'b0;
  logic update = 1'b0;
  logic [2:0] n_ins;
  logic [11:0] vcap [N];
  logic [11:0] i_arm;
  logic insert [N];
  logic [2:0] sorted_idx [N];
  logic resort, imbalance;
  int checks = 0, failures = 0;
  int order [N];
  bit have_order = 0;
  int n_resort = 0, n_hold = 0, n_pos = 0, n_neg = 0;

  cap_balance #(.N_SM(N), .DELTA_V(DV), .I_ZERO(2048)) dut (.*);

  always #10 clk = ~clk;

  initial begin
    #20_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic model_sort();
    for (int i = 0; i < N; i++) order[i] = i;
    for (int i = 1; i < N; i++) begin
      int j;
      j = i;
      while (j > 0 && vcap[order[j-1]] > vcap[order[j]]) begin
        int t;
        t = order[j]; order[j] = order[j-1]; order[j-1] = t;
        j--;
      end
    end
  endtask

  task automatic step(int base, int spread);
    real avg;
    bit out_band;
    bit exp_ins [N];
    bit exp_resort;
    @(negedge clk);
    for (int i = 0; i < N; i++) vcap[i] = 12'(base + int'($urandom_range(0, spread)));
    n_ins = 3'($urandom_range(0, N));
    i_arm = 12'($urandom_range(1900, 2200));
    avg = 0.0;
    for (int i = 0; i < N; i++) avg += real'(vcap[i]);
    avg = avg / N;
    out_band = 0;
    for (int i = 0; i < N; i++)
      if (real'(vcap[i]) > avg + DV || real'(vcap[i]) < avg - DV) out_band = 1;
    exp_resort = out_band || !have_order;
    if (exp_resort) begin model_sort(); have_order = 1; n_resort++; end
    else n_hold++;
    for (int i = 0; i < N; i++) exp_ins[i] = 0;
    if (i_arm >= 2048) begin
      n_pos++;
      for (int r = 0; r < n_ins; r++) exp_ins[order[r]] = 1;
    end else begin
      n_neg++;
      for (int r = N - n_ins; r < N; r++) exp_ins[order[r]] = 1;
    end
    update = 1'b1;
    @(negedge clk);
    update = 1'b0;
    checks++;
    if (resort !== exp_resort) begin failures++; $display("FAIL resort %0b exp %0b", resort, exp_resort); end
    for (int i = 0; i < N; i++) begin
      checks += 2;
      if (insert[i] !== exp_ins[i]) begin
        failures++;
        if (failures < 10) $display("FAIL insert[%0d]=%0b exp %0b n=%0d i=%0d", i, insert[i], exp_ins[i], n_ins, i_arm);
      end
      if (int'(sorted_idx[i]) != order[i]) begin
        failures++;
        if (failures < 10) $display("FAIL sorted_idx[%0d]=%0d exp %0d", i, sorted_idx[i], order[i]);
      end
    end
    // no update: outputs hold
    @(negedge clk);
    for (int i = 0; i < N; i++) vcap[i] = 12'($urandom);
    @(negedge clk);
    for (int i = 0; i < N; i++) begin
      checks++;
      if (insert[i] !== exp_ins[i]) begin failures++; $display("FAIL insert changed without update"); end
    end
    // count check: exactly n_ins inserted
    begin
      int c;
      c = 0;
      for (int i = 0; i < N; i++) c += int'(insert[i]);
      checks++;
      if (c != int'(n_ins)) begin failures++; $display("FAIL %0d inserted, exp %0d", c, n_ins); end
    end
  endtask

  initial begin
    for (int i = 0; i < N; i++) vcap[i] = '0;
    n_ins = '0; i_arm = 12'd2048;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int k = 0; k < 300; k++) step(1500, 80);   // mostly out of band
    for (int k = 0; k < 300; k++) step(1500, 30);   // mix of both
    for (int k = 0; k < 300; k++) step(1500, 10);   // mostly in band: order held
    for (int k = 0; k < 100; k++) step(1500, 2);    // many equal voltages
    $display("resorts=%0d holds=%0d positive=%0d negative=%0d", n_resort, n_hold, n_pos, n_neg);
    checks += 4;
    if (n_resort == 0) begin failures++; $display("FAIL no resort"); end
    if (n_hold == 0)   begin failures++; $display("FAIL no held order"); end
    if (n_pos == 0)    begin failures++; $display("FAIL no positive current"); end
    if (n_neg == 0)    begin failures++; $display("FAIL no negative current"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
