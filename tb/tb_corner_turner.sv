// tb_corner_turner: reduced corner turner (4 slots, blocks of 8 frames,
// packets of 4 times x 2 channels). Frames carry data that encode frame
// and slot; the output order, packet ends, frame stamps and sidebands are
// checked against the expected group/packet/time/channel order with
// random back-pressure. A final phase holds the output stalled so a new
// block completes while the old one is still being read; the overflow
// counter must count it.
module tb_corner_turner;
  import lfaa_pkg::*;
  localparam int NS = 4, TBL = 8, PT = 4, PC = 2;
  logic clk = 0, rst = 1;
  always #5 clk = !clk;
  int checks = 0, failures = 0;

  beam16_t din, m_data;
  beam_user_t din_user, m_user;
  logic [1:0] din_slot;
  logic din_valid = 0, din_sof = 0, m_last, m_valid, m_ready = 1;
  logic [15:0] overflows;

  corner_turner #(.NSL(NS), .TB(TBL), .PKT_T(PT), .PKT_C(PC)) dut (.*);

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

  function automatic beam16_t pat(input int f, input int s);
    beam16_t b;
    b.v.re = 16'(f); b.v.im = 16'(s); b.h.re = 16'(f * 7 + s); b.h.im = 16'(~(f * 3 + s));
    return b;
  endfunction

  typedef struct { beam16_t d; int frame, slot; bit last; } exp_t;
  exp_t q[$];
  bit checking = 1;
  int nout = 0, npkt = 0, nstall = 0;
  always @(posedge clk) if (!rst) begin
    if (m_valid && !m_ready) nstall++;
    if (m_valid && m_ready && checking) begin
      exp_t e;
      check(q.size() > 0, "unexpected output");
      if (q.size() > 0) begin
        e = q.pop_front();
        check(m_data == e.d, $sformatf("data f%0d s%0d", e.frame, e.slot));
        check(m_user.frame == 32'(e.frame) && m_user.slot == 9'(e.slot) && m_user.chan == 9'(e.slot + 40)
              && m_user.beam == 4'(e.slot % 3), "sideband");
        check(m_last == e.last, "last");
        nout++;
        if (m_last) npkt++;
      end
    end
  end
  always @(negedge clk) m_ready <= checking ? ($urandom_range(0, 3) != 0) : 1'b0;

  task automatic send_frame(input int f);
    for (int s = 0; s < NS; s++) begin
      @(negedge clk);
      din_valid = 1; din_sof = (s == 0); din_slot = 2'(s); din = pat(f, s);
      din_user = '{frame: 32'(f), beam: 4'(s % 3), chan: 9'(s + 40), slot: 9'(s)};
    end
    @(negedge clk) din_valid = 0;
    repeat ($urandom_range(4, 8)) @(negedge clk);
  endtask

  initial begin
    automatic int f0 = 100;
    repeat (3) @(posedge clk);
    rst = 0;
    for (int f = f0; f < f0 + 3 * TBL + 1; f++) begin
      // the first frame of a block closes the previous one
      if (f > f0 && (f - f0) % TBL == 0) begin
        automatic int b0 = f - TBL;
        for (int g = 0; g < NS / PC; g++)
          for (int p = 0; p < TBL / PT; p++)
            for (int t = 0; t < PT; t++)
              for (int c = 0; c < PC; c++) begin
                exp_t e;
                e.slot = g * PC + c; e.frame = b0 + p * PT;
                e.d = pat(b0 + p * PT + t, e.slot);
                e.last = (t == PT - 1) && (c == PC - 1);
                q.push_back(e);
              end
      end
      send_frame(f);
    end
    repeat (100) @(negedge clk);
    check(q.size() == 0 && nout == 3 * TBL * NS, $sformatf("outputs %0d left %0d", nout, q.size()));
    check(npkt == 3 * NS / PC * TBL / PT, "packet count");
    check(overflows == 0, "no overflow in normal flow");
    check(nstall > 0, "back-pressure exercised");
    // overflow: stall the output and push two more blocks
    checking = 0;
    for (int f = f0 + 3 * TBL + 1; f < f0 + 5 * TBL + 1; f++) send_frame(f);
    check(overflows == 1, $sformatf("overflows %0d", overflows));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
