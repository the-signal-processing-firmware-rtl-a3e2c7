// tb_adc_framer: checks PPS-aligned frame start, frame boundaries, frame
// and time counters, the UTC second counter and start_time capture, with
// short frames of 6 beats.
module tb_adc_framer;
  localparam int NSIG = 2, FL = 6;
  logic clk = 0, rst = 1;
  always #5 clk = !clk;
  int checks = 0, failures = 0;
  logic signed [7:0] adc [NSIG][4];
  logic adc_valid = 1, pps = 0, arm = 0, sync_load = 0;
  logic [31:0] sync_value = 0;
  logic signed [7:0] dout [NSIG][4];
  logic dout_valid, sof, running;
  logic [31:0] frame_num, sync_time, start_time;
  logic [47:0] time_stamp;

  adc_framer #(.NSIG(NSIG), .FRAME_LEN(FL)) dut (.clk, .rst, .adc_data(adc), .adc_valid, .pps, .arm,
    .sync_load, .sync_value, .dout, .dout_valid, .sof, .frame_num, .time_stamp, .sync_time,
    .start_time, .running);

  task automatic check(input logic c, input string m);
    checks++;
    if (!c) begin failures++; $display("FAIL %s at %0t", m, $time); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;
  always_comb for (int s = 0; s < NSIG; s++) for (int l = 0; l < 4; l++) adc[s][l] = 8'(cyc * 4 + l + s * 16);

  initial begin
    int beats;
    logic signed [7:0] exp0;
    repeat (3) @(posedge clk);
    rst = 0;
    @(negedge clk) sync_load = 1; sync_value = 1000;
    @(negedge clk) sync_load = 0;
    // PPS before arming: counts the second, no framing
    repeat (3) @(negedge clk); pps = 1;
    repeat (2) @(negedge clk); pps = 0;
    @(negedge clk);
    check(sync_time == 1001, "sync_time increments on PPS");
    check(!running && !dout_valid, "idle before arm");
    arm = 1; @(negedge clk); arm = 0;
    repeat (5) @(negedge clk);
    check(!running, "waits for PPS after arm");
    pps = 1;
    exp0 = 8'(cyc * 4);
    @(negedge clk);
    check(running && dout_valid && sof, "first beat at PPS edge");
    check(frame_num == 0 && time_stamp == 0, "counters start at zero");
    check(start_time == 1002, "start_time is the new second");
    check(dout[0][0] == exp0, "data registered once");
    beats = 1;
    pps = 0;
    repeat (40) begin
      @(negedge clk);
      check(dout_valid, "valid while running");
      check(sof == (beats % FL == 0), "sof every frame");
      check(frame_num == beats / FL, "frame number");
      check(time_stamp == 48'(beats * 5), "time stamp in ns");
      beats++;
    end
    // gaps in adc_valid stop the counters
    adc_valid = 0;
    @(negedge clk);
    check(!dout_valid, "no output without valid");
    adc_valid = 1;
    @(negedge clk);
    check(time_stamp == 48'(beats * 5) && frame_num == beats / FL, "counters hold across gaps");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
