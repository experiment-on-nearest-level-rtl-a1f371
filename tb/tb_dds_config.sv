// tb_dds_config: checks the reset values of the DDS settings (50 Hz
// increment 4295 and offsets 0, 1431655765, 2863311531), single register
// writes to each address, and that addresses 6 and 7 change nothing.
module tb_dds_config;
  import mmc_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic cfg_we = 1'b0;
  logic [2:0] cfg_addr = '0;
  logic [31:0] cfg_wdata = '0;
  logic [31:0] pinc [3], poff [3];
  logic [31:0] exp_pinc [3], exp_poff [3];
  int checks = 0, failures = 0;

  dds_config dut (.*);

  always #10 clk = ~clk;

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare(string what);
    for (int k = 0; k < 3; k++) begin
      checks += 2;
      if (pinc[k] !== exp_pinc[k]) begin failures++; $display("FAIL %s pinc[%0d]=%0d exp %0d", what, k, pinc[k], exp_pinc[k]); end
      if (poff[k] !== exp_poff[k]) begin failures++; $display("FAIL %s poff[%0d]=%0d exp %0d", what, k, poff[k], exp_poff[k]); end
    end
  endtask

  initial begin
    exp_pinc = '{32'd4295, 32'd4295, 32'd4295};
    exp_poff = '{32'd0, 32'd1431655765, 32'd2863311531};
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    compare("reset");
    for (int a = 0; a < 8; a++) begin
      logic [31:0] v;
      v = $urandom;
      @(negedge clk);
      cfg_we = 1'b1; cfg_addr = 3'(a); cfg_wdata = v;
      @(negedge clk);
      cfg_we = 1'b0;
      if (a < 6) begin
        if (a % 2 == 0) exp_pinc[a/2] = v; else exp_poff[a/2] = v;
      end
      compare($sformatf("write %0d", a));
    end
    // reset restores the defaults
    rst_n = 1'b0; #5; rst_n = 1'b1;
    exp_pinc = '{32'd4295, 32'd4295, 32'd4295};
    exp_poff = '{32'd0, 32'd1431655765, 32'd2863311531};
    @(negedge clk);
    compare("reset2");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
