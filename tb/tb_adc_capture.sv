// tb_adc_capture: six ADC models with distinct values on all 48 inputs.
// After three scans, checks that every capacitor voltage vcap[arm][k] holds
// input 6*arm+k and every arm current iarm[a] holds input 36+a (input
// idx = 8*adc + channel), that frames start every SAMPLE_DIV clocks
// (100 kHz at 50 MHz with the default) and that scan_done comes every eight
// frames. Values are then changed and must show after the next scan.
module tb_adc_capture;
  import mmc_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic cs_n, sclk, mosi;
  logic miso [6];
  logic [11:0] vcap [6][6];
  logic [11:0] iarm [6];
  logic frame_done, scan_done;
  logic [11:0] ain [6][8];
  logic [2:0] last_ch [6];
  int frames [6], bad_cmd [6];
  int checks = 0, failures = 0;
  longint cyc = 0, last_frame = 0, last_scan = 0;
  int nframe = 0, nscan = 0;

  adc_capture dut (.*);

  for (genvar a = 0; a < 6; a++) begin : g_adc
    mcp3208_model u_adc (
      .cs_n, .sclk, .din(mosi), .dout(miso[a]), .ain(ain[a]),
      .last_ch(last_ch[a]), .frames(frames[a]), .bad_cmd(bad_cmd[a])
    );
  end

  always #10 clk = ~clk;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && frame_done) begin
      if (nframe > 0) begin
        checks++;
        if (cyc - last_frame != 500) begin failures++; $display("FAIL frame period %0d", cyc - last_frame); end
      end
      nframe++;
      last_frame = cyc;
    end
    if (rst_n && scan_done) begin
      if (nscan > 0) begin
        checks++;
        if (cyc - last_scan != 4000) begin failures++; $display("FAIL scan period %0d", cyc - last_scan); end
      end
      nscan++;
      last_scan = cyc;
    end
  end

  initial begin
    #2_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_map(string tag);
    for (int a = 0; a < 6; a++) begin
      for (int k = 0; k < 6; k++) begin
        int idx;
        idx = 6 * a + k;
        checks++;
        if (vcap[a][k] !== ain[idx / 8][idx % 8]) begin
          failures++; $display("FAIL %s vcap[%0d][%0d]=%0h exp %0h", tag, a, k, vcap[a][k], ain[idx / 8][idx % 8]);
        end
      end
      checks++;
      if (iarm[a] !== ain[(36 + a) / 8][(36 + a) % 8]) begin
        failures++; $display("FAIL %s iarm[%0d]", tag, a);
      end
    end
  endtask

  initial begin
    for (int a = 0; a < 6; a++) for (int c = 0; c < 8; c++) ain[a][c] = 12'(100 * a + 10 * c + 7);
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    wait (nscan == 3);
    @(negedge clk);
    check_map("scan3");
    for (int a = 0; a < 6; a++) for (int c = 0; c < 8; c++) ain[a][c] = 12'($urandom);
    wait (nscan == 5);
    @(negedge clk);
    check_map("scan5");
    for (int a = 0; a < 6; a++) begin
      checks++;
      if (bad_cmd[a] != 0) begin failures++; $display("FAIL bad command on ADC %0d", a); end
    end
    checks++;
    if (nframe < 40) begin failures++; $display("FAIL only %0d frames", nframe); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
