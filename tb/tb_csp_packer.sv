// tb_csp_packer: reduced packer (packets of 4 times x 2 channels, 2 packets
// per frame, so 8-sample frames). Random 16-bit station samples, some large
// enough to saturate, are sent group by group; each output frame must hold
// one channel's samples in time order, requantised (rounded shift,
// saturated to 8 bits), two samples per word in the CSP byte order, with
// the channel's tuser and first frame number, and m_last on its last word.
// Random back-pressure; then, with the output stalled, the last word of
// the next group must be held (s_ready low, one stall counted) and no data
// may be lost when the output resumes.
module tb_csp_packer;
  import lfaa_pkg::*;
  localparam int PT = 4, PC = 2, NP = 2, FT = PT * NP;
  logic clk = 0, rst = 1;
  always #5 clk = !clk;
  int checks = 0, failures = 0;

  logic [3:0] rq_shift = 4'd4;
  beam16_t s_data;
  beam_user_t s_user;
  logic s_last, s_valid = 0, s_ready, m_last, m_valid, m_ready;
  logic [63:0] m_data;
  logic [31:0] m_tuser, m_frame;
  logic [15:0] stalls;

  csp_packer #(.PKT_T(PT), .PKT_C(PC), .NPKT(NP)) dut (.*);

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

  function automatic logic [7:0] q8(input logic [15:0] x);
    int v = (int'($signed(x)) + 8) >>> 4;
    if (v > 127) v = 127;
    if (v < -128) v = -128;
    return 8'(v);
  endfunction

  typedef struct { logic [63:0] d; logic [31:0] tu, fr; bit last; } exp_t;
  exp_t q[$];
  bit hold = 0;
  int nout = 0, nstall = 0, nsat = 0;
  always @(posedge clk) if (!rst) begin
    if (m_valid && !m_ready) nstall++;
    if (m_valid && m_ready) begin
      exp_t e;
      check(q.size() > 0, "unexpected output");
      if (q.size() > 0) begin
        e = q.pop_front();
        check(m_data == e.d, $sformatf("data %h vs %h", m_data, e.d));
        check(m_tuser == e.tu && m_frame == e.fr && m_last == e.last, "sideband/last");
        nout++;
      end
    end
  end
  always @(negedge clk) m_ready <= !hold && ($urandom_range(0, 3) != 0);

  task automatic send_group(input int f0, input bit model);
    beam16_t smp [FT][PC];
    for (int t = 0; t < FT; t++)
      for (int c = 0; c < PC; c++) begin
        smp[t][c] = beam16_t'({$urandom, $urandom});
        if ((t + c) % 3 != 0) smp[t][c] = beam16_t'({4{4'h0, 12'($urandom)}});
      end
    for (int p = 0; p < NP; p++)
      for (int t = 0; t < PT; t++)
        for (int c = 0; c < PC; c++) begin
          @(negedge clk);
          s_valid = 1; s_data = smp[p * PT + t][c];
          s_user = '{frame: 32'(f0 + p * PT), beam: 4'(3), chan: 9'(c + 20), slot: 9'(c + 2)};
          s_last = (t == PT - 1) && (c == PC - 1);
          @(posedge clk);
          while (!s_ready) @(posedge clk);
        end
    @(negedge clk) s_valid = 0;
    if (model)
      for (int c = 0; c < PC; c++)
        for (int w = 0; w < FT / 2; w++) begin
          exp_t e;
          beam16_t a = smp[2 * w][c], b = smp[2 * w + 1][c];
          e.d = {q8(b.v.re), q8(b.v.im), q8(b.h.re), q8(b.h.im), q8(a.v.re), q8(a.v.im), q8(a.h.re), q8(a.h.im)};
          e.tu = {10'b0, 9'(c + 2), 4'(3), 9'(c + 20)};
          e.fr = 32'(f0);
          e.last = (w == FT / 2 - 1);
          q.push_back(e);
          for (int i = 0; i < 8; i++) if (e.d[8*i +: 8] == 8'h7f || e.d[8*i +: 8] == 8'h80) nsat++;
        end
    repeat ($urandom_range(10, 30)) @(negedge clk);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst = 0;
    for (int g = 0; g < 6; g++) send_group(1000 + g * FT, 1);
    repeat (50) @(negedge clk);
    check(q.size() == 0 && nout == 6 * FT, $sformatf("outputs %0d", nout));
    check(nsat > 0 && nstall > 0, "saturation and back-pressure exercised");
    check(stalls == 0, "no stall while the output keeps up");
    hold = 1;
    fork
      begin
        send_group(2000, 1);
        send_group(2000 + FT, 1);
      end
      begin
        wait (!s_ready);
        repeat (20) @(negedge clk);
        check(stalls == 1 && !s_ready, $sformatf("stalls %0d", stalls));
        hold = 0;
      end
    join
    repeat (60) @(negedge clk);
    check(q.size() == 0 && nout == 8 * FT, $sformatf("outputs after stall %0d", nout));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
