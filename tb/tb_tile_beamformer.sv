// tb_tile_beamformer: reduced beamformer (2 antennas, 64 channels, 4
// sub-bands, 2 beams). Random channel data, exponents, matrices and
// delay models; the output stream (selected channels in order, slot,
// beam, channel, frame and the 16-bit sum of the calibrated antennas) is
// compared with a model written here, over frames that include delay-rate
// updates. Overlapping sub-bands and a disabled one are included.
module tb_tile_beamformer;
  import lfaa_pkg::*;
  localparam int NA = 2, NCH = 64, NS = 4, NBM = 2, NSL = 32, UPD = 4;
  logic clk = 0, rst = 1;
  always #5 clk = !clk;
  int checks = 0, failures = 0;

  cplx18_t ch_data [NA][2];
  logic [5:0] ch_idx;
  logic ch_valid = 0, ch_sof = 0;
  logic sub_en [NS];
  logic [5:0] sub_start [NS];
  logic [6:0] sub_nch [NS];
  logic [0:0] sub_beam [NS];
  logic exp_we = 0, jw_we = 0, dly_we = 0;
  logic [0:0] exp_ant, jw_ant, dly_ant, dly_beam;
  logic [2:0] exp_grp, exp_val;
  logic [4:0] jw_slot;
  cplx16_t jw_val [2][2];
  logic signed [19:0] dly_tau0;
  logic signed [21:0] dly_rate;
  beam16_t bm_data;
  beam_user_t bm_user;
  logic bm_valid, bm_sof;

  tile_beamformer #(.NANT(NA), .NCH(NCH), .NSUB(NS), .NB(NBM), .NSL(NSL), .UPDATE(UPD)) dut (
    .clk, .rst, .ch_data, .ch_idx, .ch_valid, .ch_sof, .sub_en, .sub_start, .sub_nch, .sub_beam,
    .exp_we, .exp_ant, .exp_grp, .exp_val, .jw_we, .jw_ant, .jw_slot, .jw_val,
    .dly_we, .dly_ant, .dly_beam, .dly_tau0, .dly_rate, .bm_data, .bm_user, .bm_valid, .bm_sof);

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

  function automatic longint clip(input longint x, input int w);
    longint mx = (64'sd1 <<< (w - 1)) - 1;
    if (x > mx) return mx;
    if (x < -mx - 1) return -mx - 1;
    return x;
  endfunction
  function automatic longint rnd(input longint x, input int s);
    return (x + (64'sd1 <<< (s - 1))) >>> s;
  endfunction

  // model state
  int m_exp [NA][NCH/8];
  cplx16_t m_j [NA][NSL][2][2];
  longint m_tau0 [NA][NBM], m_rate [NA][NBM];

  typedef struct { longint v [4]; int slot, beam, chan, frame; bit first; } exp_t;
  exp_t q[$];

  // calibrated 8-bit output of one antenna, [hr, hi, vr, vi]
  function automatic void calib(input cplx18_t a [2], input int e, input int ph, input cplx16_t j [2][2],
                                output longint o [4]);
    longint r1 [2], i1 [2], r2 [2], i2 [2], c, s, sr, si;
    c = longint'($rtoi($floor($cos(2.0 * 3.14159265358979323846 * ph / 4096.0) * 16384.0 + 0.5)));
    s = longint'($rtoi($floor($sin(2.0 * 3.14159265358979323846 * ph / 4096.0) * 16384.0 + 0.5)));
    for (int p = 0; p < 2; p++) begin
      r1[p] = clip(rnd(longint'(a[p].re) * (1 << e), 7), 12);
      i1[p] = clip(rnd(longint'(a[p].im) * (1 << e), 7), 12);
      r2[p] = clip(rnd(r1[p] * c - i1[p] * s, 14), 12);
      i2[p] = clip(rnd(r1[p] * s + i1[p] * c, 14), 12);
    end
    for (int r = 0; r < 2; r++) begin
      sr = 0; si = 0;
      for (int k = 0; k < 2; k++) begin
        sr += longint'(j[r][k].re) * r2[k] - longint'(j[r][k].im) * i2[k];
        si += longint'(j[r][k].re) * i2[k] + longint'(j[r][k].im) * r2[k];
      end
      o[2*r]   = clip(rnd(sr, 15), 8);
      o[2*r+1] = clip(rnd(si, 15), 8);
    end
  endfunction

  int nrecv = 0, nsub_hits [NS];
  always @(posedge clk) if (!rst && bm_valid) begin
    exp_t e;
    check(q.size() > 0, "unexpected output");
    if (q.size() > 0) begin
      e = q.pop_front();
      check(bm_user.slot == 9'(e.slot) && bm_user.beam == 4'(e.beam) && bm_user.chan == 9'(e.chan)
            && bm_user.frame == 32'(e.frame), $sformatf("sideband slot %0d/%0d chan %0d/%0d frame %0d/%0d",
            bm_user.slot, e.slot, bm_user.chan, e.chan, bm_user.frame, e.frame));
      check(bm_sof == e.first, "bm_sof");
      check(bm_data.h.re == 16'(e.v[0]) && bm_data.h.im == 16'(e.v[1]) && bm_data.v.re == 16'(e.v[2])
            && bm_data.v.im == 16'(e.v[3]), $sformatf("sum chan %0d: %0d %0d vs %0d %0d", e.chan,
            bm_data.h.re, bm_data.h.im, e.v[0], e.v[1]));
      nrecv++;
    end
  end

  initial begin
    int slot;
    repeat (3) @(posedge clk);
    rst = 0;
    // sub-bands: [4,12) beam 1; [16,32) beam 0; [20,28) beam 1 (shadowed); disabled
    sub_en = '{1, 1, 1, 0};
    sub_start = '{6'd5, 6'd16, 6'd20, 6'd0};   // 5 -> rounded down to 4
    sub_nch = '{7'd8, 7'd19, 7'd8, 7'd8};      // 19 -> 16
    sub_beam = '{1'd1, 1'd0, 1'd1, 1'd0};
    for (int a = 0; a < NA; a++) begin
      for (int g = 0; g < NCH / 8; g++) begin
        @(negedge clk);
        exp_we = 1; exp_ant = 1'(a); exp_grp = 3'(g); exp_val = 3'($urandom);
        m_exp[a][g] = exp_val;
      end
      for (int s = 0; s < NSL; s++) begin
        @(negedge clk);
        exp_we = 0; jw_we = 1; jw_ant = 1'(a); jw_slot = 5'(s);
        for (int r = 0; r < 2; r++) for (int c = 0; c < 2; c++) begin
          jw_val[r][c].re = 16'($urandom);
          jw_val[r][c].im = 16'($urandom);
        end
        m_j[a][s] = jw_val;
      end
      for (int b = 0; b < NBM; b++) begin
        @(negedge clk);
        jw_we = 0; dly_we = 1; dly_ant = 1'(a); dly_beam = 1'(b);
        dly_tau0 = 20'($urandom); dly_rate = 22'($urandom);
        m_tau0[a][b] = dly_tau0; m_rate[a][b] = dly_rate;
      end
    end
    @(negedge clk) dly_we = 0;

    for (int f = 0; f < 10; f++) begin
      slot = 0;
      for (int k = 0; k < NCH; k++) begin
        int sb, beam;
        @(negedge clk);
        ch_valid = 1; ch_sof = (k == 0); ch_idx = 6'(k);
        for (int a = 0; a < NA; a++) for (int p = 0; p < 2; p++) begin
          ch_data[a][p].re = 18'(int'($urandom_range(0, 32767)) - 16384);
          ch_data[a][p].im = 18'(int'($urandom_range(0, 32767)) - 16384);
        end
        sb = -1;
        if (k >= 4 && k < 12) sb = 0; else if (k >= 16 && k < 32) sb = 1;
        if (sb >= 0) begin
          exp_t e;
          beam = (sb == 0) ? 1 : 0;
          e.slot = slot; e.beam = beam; e.chan = k; e.frame = f; e.first = (slot == 0);
          for (int i = 0; i < 4; i++) e.v[i] = 0;
          for (int a = 0; a < NA; a++) begin
            longint o [4], acc, tau;
            int ph;
            acc = (m_tau0[a][beam] <<< 14) + longint'((f + 1) / UPD) * m_rate[a][beam];
            acc = (acc << 30) >>> 30;
            tau = acc >>> 14;
            ph = int'(((longint'(k) * tau + 1024) >>> 11) & 4095);
            calib(ch_data[a], m_exp[a][k / 8], ph, m_j[a][slot], o);
            for (int i = 0; i < 4; i++) e.v[i] += o[i];
          end
          q.push_back(e);
          slot++;
          nsub_hits[sb]++;
        end
      end
      @(negedge clk) ch_valid = 0;
      repeat ($urandom_range(1, 20)) @(negedge clk);
    end
    repeat (20) @(negedge clk);
    check(nrecv == 10 * 24 && q.size() == 0, $sformatf("received %0d", nrecv));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
