// tb_total_power: reduced detector (4 signals, 8-beat frames, integration
// over 3 frames). Beats before the first frame start are ignored. Random
// samples with random valid gaps; each result must equal the sum of
// squares over exactly three frames, appear one clock after the last beat,
// and the next integration must start without losing a frame. A second
// run uses a one-frame integration.
module tb_total_power;
  import lfaa_pkg::*;
  localparam int NS = 4, FL = 8;
  logic clk = 0, rst = 1;
  always #5 clk = !clk;
  int checks = 0, failures = 0;

  logic signed [7:0] din [NS][LANES];
  logic din_valid = 0, din_sof = 0, pwr_valid;
  logic [31:0] integ_frames = 3, n_results;
  logic [47:0] power [NS];

  total_power #(.NSIG(NS), .FRAME_LEN(FL)) dut (.*);

  task automatic check(input logic c, input string m);
    checks++;
    if (!c) begin failures++; if (failures < 10) $display("FAIL %s at %0t", m, $time); end
  endtask
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint exp_q [$];   // NS values per result
  int nres = 0;
  bit expect_pulse = 0;
  always @(posedge clk) if (!rst) begin
    check(pwr_valid == expect_pulse, "result pulse timing");
    if (pwr_valid) begin
      check(exp_q.size() >= NS, "unexpected result");
      if (exp_q.size() >= NS)
        for (int s = 0; s < NS; s++) begin
          automatic longint e = exp_q.pop_front();
          check(power[s] == 48'(e), $sformatf("power %0d: %0d vs %0d", s, power[s], e));
        end
      nres++;
    end
  end

  task automatic run(input int nframes, input int integ);
    longint acc [NS];
    for (int s = 0; s < NS; s++) acc[s] = 0;
    for (int f = 0; f < nframes; f++)
      for (int b = 0; b < FL; b++) begin
        @(negedge clk);
        expect_pulse = 0;
        while ($urandom_range(0, 2) == 0) begin din_valid = 0; @(negedge clk); expect_pulse = 0; end
        din_valid = 1; din_sof = (b == 0);
        for (int s = 0; s < NS; s++)
          for (int l = 0; l < LANES; l++) begin
            din[s][l] = 8'($urandom);
            acc[s] += longint'(din[s][l]) * longint'(din[s][l]);
          end
        if (b == FL - 1 && f % integ == integ - 1) begin
          for (int s = 0; s < NS; s++) exp_q.push_back(acc[s]);
          for (int s = 0; s < NS; s++) acc[s] = 0;
          @(negedge clk) din_valid = 0; expect_pulse = 1;
        end
      end
    @(negedge clk) din_valid = 0; expect_pulse = 0;
    repeat (3) @(negedge clk);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst = 0;
    // beats outside a frame before the first start
    for (int i = 0; i < 5; i++) begin
      @(negedge clk) din_valid = 1; din_sof = 0;
      for (int s = 0; s < NS; s++) for (int l = 0; l < LANES; l++) din[s][l] = 8'sd100;
    end
    @(negedge clk) din_valid = 0;
    run(12, 3);
    check(nres == 4 && n_results == 4, $sformatf("results %0d", nres));
    @(negedge clk) rst = 1; integ_frames = 1;
    @(negedge clk) rst = 0;
    nres = 0;
    run(5, 1);
    check(nres == 5 && exp_q.size() == 0, "one-frame integration");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
