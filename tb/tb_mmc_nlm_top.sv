// tb_mmc_nlm_top: end-to-end test of the three-phase MMC controller at its
// default parameters (50 MHz clock, 50 Hz reference, 100 kHz ADC sampling).
//
// Six ADC models feed the controller with the capacitor voltages and arm
// currents of a simple converter model kept by this testbench:
//   * load current of phase p: cos of the phase-p reference angle (a purely
//     reactive load, so the arm energy has no net drift), arm currents
//     +-0.5 of it in the upper/lower arm, ADC code 2048 + 1000*i;
//   * after every ADC scan each inserted SM's capacitor code moves by
//     +6*i_arm (a positive arm current charges inserted capacitors);
//   * capacitor codes start around 1333 with a +-100 spread.
// The run covers two reference periods and checks:
//   * the gate signals themselves (inserted lower minus inserted upper SMs)
//     reach all 13 phase levels;
//   * level = n_l - n_h + 6 on every clock, n_h + n_l in {6, 7}, all 13
//     phase levels and all 7 levels of each arm seen on every phase;
//   * about 1100 clocks after every scan, each arm has exactly the number
//     of inserted SMs the modulator asked for at the scan, and the
//     S1/S2 gate pair equals (pwm, NOT pwm);
//   * when an arm renews its order, the inserted SMs are the lowest-voltage
//     ones for positive current and the highest for negative current;
//   * S1 and S2 of an SM are never on together and both are off right after
//     every pwm edge (dead time);
//   * every arm ends with a capacitor voltage spread within the balancing
//     band: 2*DELTA_V (32 codes) plus one 6-code step on each side.
// Each mechanism (scan, renewed order, held order, both current signs,
// dead time) must occur at least once.
module tb_mmc_nlm_top;
  import mmc_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic cfg_we = 1'b0;
  logic [2:0] cfg_addr = '0;
  logic [31:0] cfg_wdata = '0;
  logic [8:0] m_q8 = 9'd256;
  logic adc_cs_n, adc_sclk, adc_mosi;
  logic adc_miso [6];
  logic gate_pwm [6][6], gate_s1 [6][6], gate_s2 [6][6];
  logic signed [7:0] vref [3];
  logic [2:0] n_h [3], n_l [3];
  logic [3:0] level [3];
  logic scan_done;
  logic bal_resort [6];

  logic [11:0] ain [6][8];
  logic [2:0] last_ch [6];
  int frames [6], bad_cmd [6];

  real vcap_m [6][6];      // capacitor voltages in ADC codes
  real iarm_m [6];         // arm currents (+-0.5 full scale)
  logic [11:0] snap_v [6][6];   // values the controller read in the last scan
  logic [11:0] snap_i [6];

  int checks = 0, failures = 0;
  longint cyc = 0;
  int n_scan = 0, n_resort = 0, n_hold = 0, n_pos = 0, n_neg = 0, n_dead = 0, n_sel_checked = 0;
  bit seen_lvl [3][13];
  bit seen_arm [6][7];
  real spread0 [6];

  mmc_nlm_top dut (.*);

  for (genvar a = 0; a < 6; a++) begin : g_adc
    mcp3208_model u_adc (
      .cs_n(adc_cs_n), .sclk(adc_sclk), .din(adc_mosi), .dout(adc_miso[a]),
      .ain(ain[a]), .last_ch(last_ch[a]), .frames(frames[a]), .bad_cmd(bad_cmd[a])
    );
  end

  always #10 clk = ~clk;

  initial begin
    #45_000_000;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [11:0] to_code(real v);
    if (v < 0.0) return 12'd0;
    if (v > 4095.0) return 12'd4095;
    return 12'(int'($floor(v + 0.5)));
  endfunction

  // ADC inputs from the model: input idx = 8*adc + ch
  task automatic drive_adc();
    for (int idx = 0; idx < 48; idx++) begin
      logic [11:0] c;
      if (idx < 36)      c = to_code(vcap_m[idx / 6][idx % 6]);
      else if (idx < 42) c = to_code(2048.0 + 1000.0 * iarm_m[idx - 36]);
      else               c = 12'd0;
      ain[idx / 8][idx % 8] = c;
    end
  endtask

  function automatic real spread(int a);
    real mx, mn;
    mx = vcap_m[a][0]; mn = vcap_m[a][0];
    for (int k = 1; k < 6; k++) begin
      if (vcap_m[a][k] > mx) mx = vcap_m[a][k];
      if (vcap_m[a][k] < mn) mn = vcap_m[a][k];
    end
    return mx - mn;
  endfunction

  // reference angle of phase p at clock cyc (same DDS settings as reset)
  function automatic real angle(int p, longint c);
    longint unsigned ph;
    ph = (longint'(c) * 4295 + (p == 0 ? 0 : (p == 1 ? 1431655765 : 2863311531))) % 64'h1_0000_0000;
    return 2.0 * 3.14159265358979 * real'(ph) / 4294967296.0;
  endfunction

  // modulator checks every clock
  always @(negedge clk) if (rst_n) begin
    cyc++;
    for (int p = 0; p < 3; p++) begin
      checks += 2;
      if (int'(level[p]) != int'(n_l[p]) - int'(n_h[p]) + 6) begin
        failures++; if (failures < 20) $display("FAIL level p=%0d", p);
      end
      if (int'(n_h[p]) + int'(n_l[p]) != 6 && int'(n_h[p]) + int'(n_l[p]) != 7) begin
        failures++; if (failures < 20) $display("FAIL n_h+n_l=%0d", int'(n_h[p]) + int'(n_l[p]));
      end
      if (level[p] <= 12) seen_lvl[p][level[p]] = 1'b1;
      seen_arm[2*p][n_h[p]] = 1'b1;
      seen_arm[2*p+1][n_l[p]] = 1'b1;
    end
    for (int a = 0; a < 6; a++)
      for (int k = 0; k < 6; k++) begin
        checks++;
        if (gate_s1[a][k] && gate_s2[a][k]) begin failures++; $display("FAIL shoot-through %0d %0d", a, k); end
      end
  end

  // dead time: gate_pwm changes at a clock edge, the dead-time stage sees
  // it at the next edge and must then turn both switches off
  logic pwm_d [6][6];
  bit   chg_d [6][6];
  always @(negedge clk) if (rst_n) begin
    for (int a = 0; a < 6; a++)
      for (int k = 0; k < 6; k++) begin
        if (chg_d[a][k]) begin
          checks++;
          n_dead++;
          if (gate_s1[a][k] || gate_s2[a][k]) begin failures++; if (failures < 20) $display("FAIL no dead time %0d %0d", a, k); end
        end
        chg_d[a][k] = (gate_pwm[a][k] != pwm_d[a][k]) && cyc > 10;
        pwm_d[a][k] = gate_pwm[a][k];
      end
  end

  // scan handling: plant update, selection checks
  int exp_n [6];
  int gate_cnt [6];
  bit seen_gate_lvl [3][13];
  bit renewed [6];
  initial begin
    for (int a = 0; a < 6; a++) begin
      for (int k = 0; k < 6; k++) begin
        vcap_m[a][k] = 1333.0 + real'(int'($urandom_range(0, 200)) - 100);
        pwm_d[a][k] = 1'b0;
        chg_d[a][k] = 1'b0;
      end
      iarm_m[a] = 0.0;
    end
    for (int a = 0; a < 6; a++) spread0[a] = spread(a);
    drive_adc();
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    while (cyc < 2 * 999_992 + 1000) begin
      @(negedge clk);
      if (scan_done) begin
        n_scan++;
        // what the controller has just read (set at the previous scan)
        for (int a = 0; a < 6; a++) begin
          for (int k = 0; k < 6; k++) snap_v[a][k] = ain[(6*a+k)/8][(6*a+k)%8];
          snap_i[a] = ain[(36+a)/8][(36+a)%8];
        end
        for (int p = 0; p < 3; p++) begin
          exp_n[2*p] = int'(n_h[p]);
          exp_n[2*p+1] = int'(n_l[p]);
        end
        for (int p = 0; p < 3; p++) seen_gate_lvl[p][gate_cnt[2*p+1] - gate_cnt[2*p] + 6] = 1'b1;
        // plant step (the switches as they stand during the scan just ended): inserted capacitors take charge from the arm current
        for (int p = 0; p < 3; p++) begin
          real il;
          il = $cos(angle(p, cyc));
          iarm_m[2*p]   =  0.5 * il;
          iarm_m[2*p+1] = -0.5 * il;
        end
        for (int a = 0; a < 6; a++)
          for (int k = 0; k < 6; k++)
            if (gate_pwm[a][k]) vcap_m[a][k] += 6.0 * iarm_m[a];
        drive_adc();
        // selection happens at the next edge
        @(negedge clk);
        for (int a = 0; a < 6; a++) begin
          if (snap_i[a] >= 12'd2048) n_pos++; else n_neg++;
          if (bal_resort[a]) n_resort++; else n_hold++;
          renewed[a] = bal_resort[a];
        end
        // wait for the PWM stage to take it over
        repeat (1100) @(negedge clk);
        for (int a = 0; a < 6; a++) begin
          int cnt;
          cnt = 0;
          for (int k = 0; k < 6; k++) begin
            cnt += int'(gate_pwm[a][k]);
            checks++;
            if (gate_s1[a][k] !== gate_pwm[a][k] || gate_s2[a][k] !== !gate_pwm[a][k]) begin
              failures++; if (failures < 20) $display("FAIL gate pair %0d %0d", a, k);
            end
          end
          gate_cnt[a] = cnt;
          checks++;
          if (cnt != exp_n[a]) begin
            failures++; if (failures < 20) $display("FAIL arm %0d inserted %0d exp %0d", a, cnt, exp_n[a]);
          end
          // a renewed order must pick by voltage and current sign
          if (renewed[a] && cnt > 0 && cnt < 6) begin
            int in_max, in_min, out_max, out_min;
            in_max = -1; in_min = 5000; out_max = -1; out_min = 5000;
            for (int k = 0; k < 6; k++) begin
              int v;
              v = int'(snap_v[a][k]);
              if (gate_pwm[a][k]) begin
                if (v > in_max) in_max = v;
                if (v < in_min) in_min = v;
              end else begin
                if (v > out_max) out_max = v;
                if (v < out_min) out_min = v;
              end
            end
            checks++;
            n_sel_checked++;
            if (snap_i[a] >= 12'd2048 ? (in_max > out_min) : (in_min < out_max)) begin
              failures++; if (failures < 20) $display("FAIL arm %0d selection not by voltage order", a);
            end
          end
        end
      end
    end
    for (int p = 0; p < 3; p++) begin
      for (int l = 0; l < 13; l++) begin
        checks++;
        if (!seen_lvl[p][l]) begin failures++; $display("FAIL phase %0d level %0d never seen", p, l); end
        checks++;
        if (!seen_gate_lvl[p][l]) begin failures++; $display("FAIL phase %0d level %0d never reached the gates", p, l); end
      end
    end
    for (int a = 0; a < 6; a++) begin
      for (int l = 0; l < 7; l++) begin
        checks++;
        if (!seen_arm[a][l]) begin failures++; $display("FAIL arm %0d level %0d never seen", a, l); end
      end
      checks++;
      $display("arm %0d spread %0.1f -> %0.1f", a, spread0[a], spread(a));
      if (spread(a) > 2.0 * 16.0 + 2.0 * 6.0) begin
        failures++; $display("FAIL arm %0d not balanced", a);
      end
      checks++;
      if (bad_cmd[a] != 0) begin failures++; $display("FAIL ADC command"); end
    end
    $display("scans=%0d resorts=%0d holds=%0d positive=%0d negative=%0d pwm_edges=%0d selections_checked=%0d",
             n_scan, n_resort, n_hold, n_pos, n_neg, n_dead, n_sel_checked);
    checks += 6;
    if (n_scan == 0)   begin failures++; $display("FAIL no ADC scan"); end
    if (n_resort == 0) begin failures++; $display("FAIL no renewed order"); end
    if (n_hold == 0)   begin failures++; $display("FAIL no held order"); end
    if (n_pos == 0)    begin failures++; $display("FAIL no positive current"); end
    if (n_neg == 0)    begin failures++; $display("FAIL no negative current"); end
    if (n_dead == 0)   begin failures++; $display("FAIL no pwm edge / dead time"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
