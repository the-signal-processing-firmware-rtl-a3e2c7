// tb_channelizer: a reduced channelizer (N=64, M=48, 4 tap blocks) fed
// with one tone per polarisation at a channel centre. Checks that each
// tone appears in its own channel and polarisation, that neighbouring
// power is far below it, and that the tone's complex value is the same
// in every frame, which holds only if the oversampling phase rotation is
// corrected.
module tb_channelizer;
  localparam int N = 64, M = 48, T = 4, HB = 8;
  localparam int K0 = 5, K1 = 20;
  logic clk = 0, rst = 1;
  always #5 clk = !clk;
  int checks = 0, failures = 0;
  logic signed [7:0] din [2][4];
  logic din_valid = 0, din_sof = 0, ch_valid, ch_sof;
  lfaa_pkg::cplx18_t ch_data [2];
  logic [4:0] ch_idx;
  logic [1:0] ch_ovf;
  logic [15:0] overruns;
  channelizer #(.N(N), .M(M), .TAPS(T), .HBANKS(HB)) dut (.clk, .rst, .din, .din_valid, .din_sof,
    .ch_data, .ch_idx, .ch_valid, .ch_sof, .ch_ovf, .overruns);

  task automatic check(input logic c, input string m);
    checks++;
    if (!c) begin failures++; if (failures < 10) $display("FAIL %s at %0t", m, $time); end
  endtask
  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  real pw [2][N/2];
  int  re0 [2], im0 [2];
  int  frames = 0, kexp = 0;

  always @(posedge clk) if (!rst && ch_valid) begin
    check(ch_idx == 5'(kexp), "channel index sequence");
    check(ch_sof == (kexp == 0), "sof");
    for (int p = 0; p < 2; p++)
      pw[p][ch_idx] = real'(ch_data[p].re) * real'(ch_data[p].re) + real'(ch_data[p].im) * real'(ch_data[p].im);
    if (ch_idx == 5'(K0)) begin
      if (frames > 0) check((ch_data[0].re - re0[0]) ** 2 + (ch_data[0].im - im0[0]) ** 2 < 16,
                            $sformatf("stable phase pol0: %0d,%0d vs %0d,%0d", ch_data[0].re, ch_data[0].im, re0[0], im0[0]));
      re0[0] = ch_data[0].re; im0[0] = ch_data[0].im;
    end
    if (ch_idx == 5'(K1)) begin
      if (frames > 0) check((ch_data[1].re - re0[1]) ** 2 + (ch_data[1].im - im0[1]) ** 2 < 16, "stable phase pol1");
      re0[1] = ch_data[1].re; im0[1] = ch_data[1].im;
    end
    kexp = (kexp + 1) % (N / 2);
    if (ch_idx == 5'(N / 2 - 1)) begin
      frames++;
      check(pw[0][K0] > 1.0e4, "tone 0 present");
      check(pw[1][K1] > 1.0e4, "tone 1 present");
      check(pw[0][K1] < pw[0][K0] * 1.0e-4, "pol 0 clean at other tone");
      check(pw[1][K0] < pw[1][K1] * 1.0e-4, "pol 1 clean at other tone");
      check(pw[0][K0 + 3] < pw[0][K0] * 1.0e-3, "leakage 3 channels away");
      check(!ch_ovf[0] && !ch_ovf[1], "no overflow");
    end
  end

  initial begin
    int s;
    repeat (3) @(posedge clk);
    rst = 0;
    s = 0;
    for (int f = 0; f < 12; f++) begin
      for (int b = 0; b < M / 4; b++) begin
        @(negedge clk);
        if ($urandom_range(0, 3) == 0) begin   // gaps inside the frame
          din_valid = 0;
          repeat ($urandom_range(1, 6)) @(negedge clk);
        end
        din_valid = 1;
        din_sof = (b == 0);
        for (int l = 0; l < 4; l++) begin
          din[0][l] = 8'($rtoi($floor(100.0 * $cos(2.0 * 3.14159265358979 * K0 * (s + l) / N) + 0.5)));
          din[1][l] = 8'($rtoi($floor(60.0 * $sin(2.0 * 3.14159265358979 * K1 * (s + l) / N) + 0.5)));
        end
        s += 4;
      end
      @(negedge clk) din_valid = 0;
      repeat (150) @(negedge clk);
    end
    check(frames == 12 - (T * N + M - 1) / M + 1, $sformatf("frames out %0d", frames));
    check(overruns == 0, "no overruns");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
