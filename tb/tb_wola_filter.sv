// tb_wola_filter: random input through a reduced filter (N=64, M=48,
// 4 tap blocks); every output value is compared with the weighted overlap-
// add sum, rotated by the window start, computed here from the input
// record. Also checks preload length, start-of-frame marking, output
// stalls and the overrun counter.
module tb_wola_filter;
  localparam int N = 64, M = 48, T = 4, HB = 8, PRE = (T * N + M - 1) / M;
  logic clk = 0, rst = 1;
  always #5 clk = !clk;
  int checks = 0, failures = 0;
  logic signed [7:0] din [4];
  logic din_valid = 0, din_sof = 0, dout_valid, dout_sof, dout_ready = 1;
  logic signed [15:0] dout [4];
  logic [15:0] overruns;
  wola_filter #(.N(N), .M(M), .TAPS(T), .HBANKS(HB)) dut (.clk, .rst, .din, .din_valid, .din_sof,
    .dout, .dout_valid, .dout_sof, .dout_ready, .overruns);

  task automatic check(input logic c, input string m);
    checks++;
    if (!c) begin failures++; if (failures < 10) $display("FAIL %s at %0t", m, $time); end
  endtask
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int x [0:4095];
  int nout = 0;   // output words received
  int stall_seen = 0;

  function automatic int expected(input int j, input int p);
    longint acc;
    int f, s0, n;
    f  = PRE - 1 + j;
    s0 = (f + 1) * M - T * N;
    n  = ((p - s0) % N + N) % N;
    acc = 0;
    for (int k = 0; k < T; k++) acc += longint'(dut.coef[k][n]) * x[s0 + k * N + n];
    acc = (acc + 2048) >>> 12;
    if (acc > 32767) acc = 32767;
    if (acc < -32768) acc = -32768;
    return int'(acc);
  endfunction

  always @(posedge clk) if (!rst) begin
    if (dout_valid && !dout_ready) stall_seen++;
    if (dout_valid && dout_ready) begin
      int j, w;
      j = nout / (N / 4);
      w = nout % (N / 4);
      check(dout_sof == (w == 0), "sof on first word");
      for (int l = 0; l < 4; l++)
        check(int'(dout[l]) == expected(j, w * 4 + l), $sformatf("frame %0d value %0d: %0d vs %0d",
              j, w * 4 + l, dout[l], expected(j, w * 4 + l)));
      nout++;
    end
  end

  initial begin
    int s;
    for (int i = 0; i < 4096; i++) x[i] = int'($urandom_range(0, 255)) - 128;
    repeat (3) @(posedge clk);
    rst = 0;
    s = 0;
    for (int f = 0; f < 14; f++) begin
      for (int b = 0; b < M / 4; b++) begin
        @(negedge clk);
        din_valid = 1;
        din_sof = (b == 0);
        dout_ready = (f < 9) || ($urandom % 3 != 0);
        for (int l = 0; l < 4; l++) din[l] = 8'(x[s + l]);
        s += 4;
        @(posedge clk);
        if (f < PRE - 1) check(nout == 0 && !dout_valid, "silent during preload");
      end
      @(negedge clk) din_valid = 0;
      repeat (60) begin
        dout_ready = (f < 9) || ($urandom % 3 != 0);
        @(negedge clk);
      end
    end
    dout_ready = 1;
    repeat (50) @(negedge clk);
    check(nout == (14 - PRE + 1) * N / 4, $sformatf("output frames: %0d words", nout));
    check(overruns == 0, "no overrun with spaced frames");
    check(stall_seen > 0, "output stall exercised");
    // two frames back to back while the output is blocked: one is dropped
    dout_ready = 0;
    for (int f = 0; f < 2; f++)
      for (int b = 0; b < M / 4; b++) begin
        @(negedge clk);
        din_valid = 1;
        din_sof = (b == 0);
        for (int l = 0; l < 4; l++) din[l] = 8'(x[s + l]);
        s += 4;
      end
    @(negedge clk) din_valid = 0;
    @(negedge clk);
    check(overruns == 1, "overrun counted");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
