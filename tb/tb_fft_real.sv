// tb_fft_real: full-size (1024-point) transform of random frames compared
// with a direct DFT computed here in floating point, within 2 LSB; frame
// timing; and a strong tone that must saturate and flag its channel.
module tb_fft_real;
  localparam int N = 1024, NC = N / 2, OSH = 4;
  logic clk = 0, rst = 1;
  always #5 clk = !clk;
  int checks = 0, failures = 0;
  logic signed [15:0] din [4];
  logic din_valid = 0, din_sof = 0, din_ready, ch_valid, ch_sof, ch_ovf;
  lfaa_pkg::cplx18_t ch_data;
  logic [8:0] ch_idx;
  fft_real #(.N(N)) dut (.clk, .rst, .din, .din_valid, .din_sof, .din_ready, .ch_data, .ch_idx,
    .ch_valid, .ch_sof, .ch_ovf);

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

  int x [N];
  real er [NC], ei [NC];
  int got_re [NC], got_im [NC], got_ovf [NC];

  task automatic run_frame(output int cycles);
    int t0, k;
    for (int k2 = 0; k2 < NC; k2++) begin
      real a;
      er[k2] = 0.0; ei[k2] = 0.0;
      for (int n = 0; n < N; n++) begin
        a = 2.0 * 3.14159265358979323846 * real'((k2 * n) % N) / real'(N);
        er[k2] += real'(x[n]) * $cos(a);
        ei[k2] -= real'(x[n]) * $sin(a);
      end
      er[k2] /= real'(1 << OSH);
      ei[k2] /= real'(1 << OSH);
    end
    @(negedge clk);
    while (!din_ready) @(negedge clk);
    t0 = $time / 10;
    for (int b = 0; b < N / 4; b++) begin
      din_valid = 1;
      din_sof = (b == 0);
      for (int l = 0; l < 4; l++) din[l] = 16'(x[4 * b + l]);
      @(negedge clk);
    end
    din_valid = 0;
    k = 0;
    while (k < NC) begin
      @(posedge clk); #1;
      if (ch_valid) begin
        check(ch_idx == 9'(k), "channel order");
        check(ch_sof == (k == 0), "sof on channel 0");
        got_re[k] = ch_data.re; got_im[k] = ch_data.im; got_ovf[k] = ch_ovf;
        k++;
      end
    end
    cycles = $time / 10 - t0;
  endtask

  initial begin
    int cyc;
    repeat (3) @(posedge clk);
    rst = 0;
    for (int fr = 0; fr < 2; fr++) begin
      for (int n = 0; n < N; n++) x[n] = int'($urandom_range(0, 2000)) - 1000;
      run_frame(cyc);
      for (int k = 0; k < NC; k++) begin
        real dr, di;
        dr = real'(got_re[k]) - er[k];
        di = real'(got_im[k]) - ei[k];
        check(dr < 2.0 && dr > -2.0 && di < 2.0 && di > -2.0,
              $sformatf("ch %0d: %0d,%0d vs %f,%f", k, got_re[k], got_im[k], er[k], ei[k]));
        check(!got_ovf[k], "no overflow on noise");
      end
      check(cyc >= 3068 && cyc <= 3080, $sformatf("frame time %0d clocks", cyc));
    end
    // strong tone at channel 100: X = A*N/2 / 16 = 8000*512/16 > 2^17
    for (int n = 0; n < N; n++) x[n] = int'($rtoi(8000.0 * $cos(2.0 * 3.14159265358979 * 100.0 * n / N)));
    run_frame(cyc);
    check(got_ovf[100] == 1, "tone channel flagged");
    check(got_re[100] == 131071, "tone channel saturated");
    check(got_ovf[200] == 0 && got_ovf[99] == 0, "other channels clean");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
