// tb_coarse_spectrometer: reduced spectrometer (4 signals, 16 channels,
// 3-frame integration). A cross spectrum of signals 1 and 2 and then an
// auto spectrum of signal 3 are integrated from random channel data; after
// each `done` all channels are read back (one-clock read latency) and
// compared with sums of A*conj(B) shifted and saturated to 32 bits. The
// selection change must take effect only at the next integration start.
module tb_coarse_spectrometer;
  import lfaa_pkg::*;
  localparam int NS = 4, NC = 16;
  logic clk = 0, rst = 1;
  always #5 clk = !clk;
  int checks = 0, failures = 0;

  cplx18_t ch_data [NS];
  logic [3:0] ch_idx, rd_addr = 0;
  logic ch_valid = 0, ch_sof = 0, done;
  logic [1:0] sel_a = 1, sel_b = 2;
  logic [31:0] integ_frames = 3, n_spectra;
  logic [5:0] out_shift = 2;
  logic signed [31:0] rd_re, rd_im;

  coarse_spectrometer #(.NSIG(NS), .NCH(NC)) dut (.*);

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

  longint are [NC], aim [NC];
  int ndone = 0;
  always @(posedge clk) if (!rst && done) ndone++;

  function automatic longint s32(input longint x);
    if (x > 64'sd2147483647) return 64'sd2147483647;
    if (x < -64'sd2147483648) return -64'sd2147483648;
    return x;
  endfunction

  task automatic integrate(input int a, input int b, input int big);
    for (int k = 0; k < NC; k++) begin are[k] = 0; aim[k] = 0; end
    for (int f = 0; f < 3; f++) begin
      for (int k = 0; k < NC; k++) begin
        @(negedge clk);
        while ($urandom_range(0, 3) == 0) begin ch_valid = 0; @(negedge clk); end
        ch_valid = 1; ch_sof = (k == 0); ch_idx = 4'(k);
        for (int s = 0; s < NS; s++) begin
          ch_data[s].re = 18'($urandom_range(0, 2 * big) - big);
          ch_data[s].im = 18'($urandom_range(0, 2 * big) - big);
        end
        // a new selection written mid-integration must not be used yet
        if (f == 1 && k == 3) begin sel_a = 0; sel_b = 0; end
        are[k] += longint'($signed(ch_data[a].re)) * $signed(ch_data[b].re)
                + longint'($signed(ch_data[a].im)) * $signed(ch_data[b].im);
        aim[k] += longint'($signed(ch_data[a].im)) * $signed(ch_data[b].re)
                - longint'($signed(ch_data[a].re)) * $signed(ch_data[b].im);
      end
      @(negedge clk) ch_valid = 0;
      repeat (5) @(negedge clk);
    end
  endtask

  task automatic readback;
    for (int k = 0; k < NC; k++) begin
      @(negedge clk) rd_addr = 4'(k);
      @(negedge clk);
      check(rd_re == 32'(s32(are[k] >>> 2)) && rd_im == 32'(s32(aim[k] >>> 2)),
            $sformatf("chan %0d: %0d %0d vs %0d %0d", k, rd_re, rd_im, are[k] >>> 2, aim[k] >>> 2));
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst = 0;
    integrate(1, 2, 1000);
    check(ndone == 1 && n_spectra == 1, "first spectrum done");
    readback();
    sel_a = 3; sel_b = 3;
    integrate(3, 3, 131071);   // large auto powers: some saturate at 32 bits
    check(ndone == 2, "second spectrum done");
    readback();
    for (int k = 0; k < NC; k++) check(aim[k] == 0, "auto spectrum is real");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
