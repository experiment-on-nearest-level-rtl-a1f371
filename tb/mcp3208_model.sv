// mcp3208_model: behavioural model of the SPI side of a 12-bit, 8-channel
// MCP3208-type ADC, for testbenches only (not synthesizable).
//
// While cs_n is low it counts SCLK rising edges. It reads the command
// start, single/diff, D2, D1, D0 from din on rising edges 1..5, takes the
// value of the selected input ain[ch] as its sample, drives a null bit
// after falling edge 6 and the 12 result bits, MSB first, after falling
// edges 7..18. dout is 0 when not driven. frames counts completed frames
// (cs_n rising after at least 19 clocks); bad_cmd counts frames whose start
// or single-ended bit was not 1; last_ch is the channel of the last frame.
module mcp3208_model (
  input  logic        cs_n,
  input  logic        sclk,
  input  logic        din,
  output logic        dout,
  input  logic [11:0] ain [8],
  output logic [2:0]  last_ch,
  output int          frames,
  output int          bad_cmd
);
  int          cnt;
  logic [4:0]  cmd;
  logic [11:0] val;

  initial begin
    dout = 1'b0; cnt = 0; cmd = '0; val = '0;
    last_ch = '0; frames = 0; bad_cmd = 0;
  end

  always @(negedge cs_n) begin
    cnt  = 0;
    cmd  = '0;
    dout = 1'b0;
  end

  always @(posedge sclk) if (!cs_n) begin
    cnt = cnt + 1;
    if (cnt <= 5) cmd = {cmd[3:0], din};
    if (cnt == 5) begin
      last_ch = cmd[2:0];
      val     = ain[cmd[2:0]];
    end
  end

  always @(negedge sclk) if (!cs_n) begin
    if (cnt == 6)                    dout = 1'b0;
    else if (cnt >= 7 && cnt <= 18)  dout = val[18 - cnt];
    else                             dout = 1'b0;
  end

  always @(posedge cs_n) begin
    if (cnt >= 19) begin
      frames = frames + 1;
      if (cmd[4:3] != 2'b11) bad_cmd = bad_cmd + 1;
    end
    dout = 1'b0;
  end
endmodule
