// tb_nlm_level: drives every reference sample -128..127 at several
// modulation indices and compares n_h, n_l and level with
//   n = floor(x + 0.75), x = 3 * (1 +- m * vref/128), clamped to 0..6,
// computed in real arithmetic. Then sweeps one full sine at m = 1 and
// checks that each arm takes all 7 levels, the phase output all 13, and
// that n_h + n_l is always 6 or 7 (the two arms switch half a level apart).
module tb_nlm_level;
  import mmc_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic signed [7:0] vref;
  logic [8:0] m_q8;
  logic [2:0] n_h, n_l;
  logic [3:0] level;
  int checks = 0, failures = 0;
  bit seen_lvl [13];
  bit seen_h [7];
  bit seen_l [7];

  nlm_level dut (.*);

  always #10 clk = ~clk;

  initial begin
    #10_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int ref_round(real x);
    int q;
    q = int'($floor(x + 0.75));
    if (q < 0) q = 0;
    if (q > 6) q = 6;
    return q;
  endfunction

  task automatic apply_check(int v, int m);
    real r, xh, xl;
    int eh, el;
    @(negedge clk);
    vref = 8'(v); m_q8 = 9'(m);
    @(posedge clk); #1;
    r  = real'(m) / 256.0 * real'(v) / 128.0;
    xh = 3.0 * (1.0 + r);
    xl = 3.0 * (1.0 - r);
    eh = ref_round(xh);
    el = ref_round(xl);
    checks += 3;
    if (int'(n_h) != eh) begin failures++; if (failures < 10) $display("FAIL n_h v=%0d m=%0d got %0d exp %0d", v, m, n_h, eh); end
    if (int'(n_l) != el) begin failures++; if (failures < 10) $display("FAIL n_l v=%0d m=%0d got %0d exp %0d", v, m, n_l, el); end
    if (int'(level) != el - eh + 6) begin failures++; if (failures < 10) $display("FAIL level v=%0d m=%0d", v, m); end
  endtask

  initial begin
    vref = 0; m_q8 = 9'd256;
    repeat (2) @(posedge clk);
    #1;
    checks++;
    if (n_h != 3'd3 || n_l != 3'd3) begin failures++; $display("FAIL reset value"); end
    rst_n = 1'b1;
    for (int m = 0; m <= 256; m += 32)
      for (int v = -128; v <= 127; v++) apply_check(v, m);
    for (int k = 0; k < 200; k++) apply_check(int'($urandom_range(0, 255)) - 128, int'($urandom_range(0, 256)));
    // one sine period at m = 1
    for (int k = 0; k < 1024; k++) begin
      int s;
      s = int'($floor(127.0 * $sin(2.0 * 3.14159265358979 * real'(k) / 1024.0) + 0.5));
      apply_check(s, 256);
      seen_lvl[level] = 1'b1;
      seen_h[n_h] = 1'b1;
      seen_l[n_l] = 1'b1;
      checks++;
      if (int'(n_h) + int'(n_l) != 6 && int'(n_h) + int'(n_l) != 7) begin
        failures++; $display("FAIL sum %0d", int'(n_h) + int'(n_l));
      end
    end
    for (int i = 0; i < 13; i++) begin
      checks++;
      if (!seen_lvl[i]) begin failures++; $display("FAIL phase level %0d never seen", i); end
    end
    for (int i = 0; i < 7; i++) begin
      checks += 2;
      if (!seen_h[i]) begin failures++; $display("FAIL upper arm level %0d never seen", i); end
      if (!seen_l[i]) begin failures++; $display("FAIL lower arm level %0d never seen", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
