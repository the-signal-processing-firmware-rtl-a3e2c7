// tb_station_beam_adder: local and chain streams with independent random
// valid gaps and random output back-pressure. In add mode every output must
// be the saturated sum of the next local and next chain word, with the
// local sideband; saturations are counted. In first mode the local stream
// passes unchanged and the chain input is never accepted. A final packet
// with mismatched packet ends must raise align_err.
module tb_station_beam_adder;
  import lfaa_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = !clk;
  int checks = 0, failures = 0;

  logic first = 0;
  beam16_t l_data, c_data, m_data;
  beam_user_t l_user, m_user;
  logic l_last, l_valid = 0, l_ready, c_last, c_valid = 0, c_ready, m_last, m_valid, m_ready;
  logic align_err;
  logic [31:0] sat_count;

  station_beam_adder dut (.*);

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

  function automatic beam16_t rnd_beam(input bit big);
    beam16_t b;
    b = beam16_t'({$urandom, $urandom});
    if (!big) begin
      b.h.re = 16'($signed(b.h.re) >>> 2); b.h.im = 16'($signed(b.h.im) >>> 2);
      b.v.re = 16'($signed(b.v.re) >>> 2); b.v.im = 16'($signed(b.v.im) >>> 2);
    end
    return b;
  endfunction
  function automatic logic [15:0] s16(input logic [15:0] a, input logic [15:0] b);
    int s = int'($signed(a)) + int'($signed(b));
    if (s > 32767) s = 32767;
    if (s < -32768) s = -32768;
    return 16'(s);
  endfunction

  localparam int NW = 400;
  beam16_t lq [NW], cq [NW];
  int li = 0, ci = 0, oi = 0, nsat = 0, nstall = 0, n_c_taken_first = 0;
  int nword = NW;

  // sources: present word i while valid, advance on handshake
  always @(posedge clk) if (!rst) begin
    if (l_valid && l_ready) li <= li + 1;
    if (c_valid && c_ready) begin ci <= ci + 1; if (first) n_c_taken_first++; end
    if (m_valid && !m_ready) nstall++;
    if (m_valid && m_ready) begin
      beam16_t e;
      if (first) e = lq[oi];
      else begin
        e.h.re = s16(lq[oi].h.re, cq[oi].h.re); e.h.im = s16(lq[oi].h.im, cq[oi].h.im);
        e.v.re = s16(lq[oi].v.re, cq[oi].v.re); e.v.im = s16(lq[oi].v.im, cq[oi].v.im);
      end
      check(m_data == e, $sformatf("word %0d", oi));
      check(m_user.frame == 32'(oi) && m_last == (oi % 8 == 7), "sideband");
      oi <= oi + 1;
    end
  end
  always @(negedge clk) begin
    l_valid <= (li < nword) && ($urandom_range(0, 2) != 0);
    c_valid <= (ci < nword) && ($urandom_range(0, 2) != 0);
    m_ready <= $urandom_range(0, 3) != 0;
  end
  always_comb begin
    l_data = lq[li % NW]; l_user = '{frame: 32'(li), beam: 0, chan: 0, slot: 0}; l_last = (li % 8 == 7);
    c_data = cq[ci % NW]; c_last = (ci % 8 == 7) ^ (ci >= NW - 8 && ci < NW);
  end

  initial begin
    int exp_sat;
    for (int i = 0; i < NW; i++) begin
      lq[i] = rnd_beam(i % 5 == 0);
      cq[i] = rnd_beam(i % 5 == 0);
    end
    exp_sat = 0;
    for (int i = 0; i < NW - 8; i++)
      if (s16(lq[i].h.re, cq[i].h.re) != 16'(lq[i].h.re + cq[i].h.re)
          || s16(lq[i].h.im, cq[i].h.im) != 16'(lq[i].h.im + cq[i].h.im)
          || s16(lq[i].v.re, cq[i].v.re) != 16'(lq[i].v.re + cq[i].v.re)
          || s16(lq[i].v.im, cq[i].v.im) != 16'(lq[i].v.im + cq[i].v.im)) exp_sat++;
    repeat (3) @(posedge clk);
    // add mode, last packet has misaligned packet ends
    nword = NW - 8;
    rst = 0;
    wait (oi == NW - 8);
    check(sat_count == 32'(exp_sat) && exp_sat > 0, $sformatf("sat_count %0d exp %0d", sat_count, exp_sat));
    check(!align_err, "no align error on aligned packets");
    nword = NW;
    wait (oi == NW);
    @(posedge clk);
    check(align_err, "align error detected");
    check(nstall > 0, "back-pressure seen");
    // first mode: chain ignored
    @(negedge clk) rst = 1; first = 1;
    @(negedge clk);
    oi = 0; li = 0; ci = NW;
    @(negedge clk) rst = 0;
    wait (oi == NW);
    repeat (5) @(posedge clk);
    check(n_c_taken_first == 0, "chain not accepted in first mode");
    check(sat_count == 0 && !align_err, "first mode has no sums");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
