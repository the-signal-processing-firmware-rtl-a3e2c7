// tb_antenna_calib: random samples, exponents, phases and matrices; the
// three-stage result is compared with a model written here from the
// stated arithmetic (shift by 7-exp, rotation with 2^14 trig values,
// matrix with 2^15 mantissas, 12 and 8 bit saturation), and the latency is
// checked to be three clocks.
module tb_antenna_calib;
  import lfaa_pkg::*;
  logic clk = 0;
  always #5 clk = !clk;
  int checks = 0, failures = 0;
  cplx18_t a_in [2];
  logic [2:0] expo;
  logic [11:0] phase;
  cplx16_t jones [2][2];
  cplx8_t s_out [2];
  antenna_calib dut (.clk, .a_in, .expo, .phase, .jones, .s_out);

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

  function automatic longint clip(input longint x, input int w);
    longint mx = (64'sd1 <<< (w - 1)) - 1;
    if (x > mx) return mx;
    if (x < -mx - 1) return -mx - 1;
    return x;
  endfunction
  function automatic longint rnd(input longint x, input int s);
    return (x + (64'sd1 <<< (s - 1))) >>> s;
  endfunction

  typedef struct { longint hr, hi, vr, vi; } res_t;
  res_t expq[$];

  function automatic res_t model(input cplx18_t a [2], input int e, input int ph, input cplx16_t j [2][2]);
    longint r1 [2], i1 [2], r2 [2], i2 [2], c, s, sr, si;
    res_t o;
    c = longint'($rtoi($floor($cos(2.0 * 3.14159265358979323846 * ph / 4096.0) * 16384.0 + 0.5)));
    s = longint'($rtoi($floor($sin(2.0 * 3.14159265358979323846 * ph / 4096.0) * 16384.0 + 0.5)));
    for (int p = 0; p < 2; p++) begin
      r1[p] = clip(rnd(longint'(a[p].re) * (1 << e), 7), 12);
      i1[p] = clip(rnd(longint'(a[p].im) * (1 << e), 7), 12);
      r2[p] = clip(rnd(r1[p] * c - i1[p] * s, 14), 12);
      i2[p] = clip(rnd(r1[p] * s + i1[p] * c, 14), 12);
    end
    sr = longint'(j[0][0].re) * r2[0] - longint'(j[0][0].im) * i2[0] + longint'(j[0][1].re) * r2[1] - longint'(j[0][1].im) * i2[1];
    si = longint'(j[0][0].re) * i2[0] + longint'(j[0][0].im) * r2[0] + longint'(j[0][1].re) * i2[1] + longint'(j[0][1].im) * r2[1];
    o.hr = clip(rnd(sr, 15), 8); o.hi = clip(rnd(si, 15), 8);
    sr = longint'(j[1][0].re) * r2[0] - longint'(j[1][0].im) * i2[0] + longint'(j[1][1].re) * r2[1] - longint'(j[1][1].im) * i2[1];
    si = longint'(j[1][0].re) * i2[0] + longint'(j[1][0].im) * r2[0] + longint'(j[1][1].re) * i2[1] + longint'(j[1][1].im) * r2[1];
    o.vr = clip(rnd(sr, 15), 8); o.vi = clip(rnd(si, 15), 8);
    return o;
  endfunction

  initial begin
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      for (int p = 0; p < 2; p++) begin
        a_in[p].re = 18'($urandom);
        a_in[p].im = 18'($urandom);
        if (i % 2 == 0) begin a_in[p].re = a_in[p].re >>> 8; a_in[p].im = a_in[p].im >>> 8; end
      end
      expo  = 3'($urandom);
      phase = 12'($urandom);
      for (int r = 0; r < 2; r++) for (int c = 0; c < 2; c++) begin
        jones[r][c].re = 16'($urandom);
        jones[r][c].im = 16'($urandom);
        if (i % 3 == 0) jones[r][c] = '{re: (r == c) ? 16'sh4000 : 16'sh0, im: 16'sh0};
      end
      expq.push_back(model(a_in, expo, phase, jones));
      if (i >= 3) begin
        res_t o;
        o = expq.pop_front();
        check(s_out[0].re == 8'(o.hr) && s_out[0].im == 8'(o.hi) && s_out[1].re == 8'(o.vr) && s_out[1].im == 8'(o.vi),
              $sformatf("sample %0d: %0d %0d %0d %0d vs %0d %0d %0d %0d", i - 3, s_out[0].re, s_out[0].im,
                        s_out[1].re, s_out[1].im, o.hr, o.hi, o.vr, o.vi));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
