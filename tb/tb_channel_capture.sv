// tb_channel_capture: reduced capture (4 signals, 16 channels, blocks of 4
// frames, channel 5, shift 3). Random channel data; every output block must
// hold the selected channel of all signals for four consecutive frames,
// requantised (rounded, saturated) to 8+8 bits, time-major with four
// samples per word, tlast on the last word and tuser = channel. Capture
// starts at a frame boundary after enable. With the output stalled, a
// completed block must be dropped and counted as an overrun.
module tb_channel_capture;
  import lfaa_pkg::*;
  localparam int NS = 4, NC = 16, NT = 4;
  logic clk = 0, rst = 1;
  always #5 clk = !clk;
  int checks = 0, failures = 0;

  cplx18_t ch_data [NS];
  logic [3:0] ch_idx, chan_sel = 5;
  logic ch_valid = 0, ch_sof = 0, enable = 0;
  logic [4:0] rq_shift = 3;
  logic [63:0] m_tdata;
  logic [8:0] m_tuser;
  logic m_tlast, m_tvalid, m_tready;
  logic [15:0] overruns;

  channel_capture #(.NSIG(NS), .NCH(NC), .NT(NT)) dut (.*);

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

  function automatic logic [7:0] q8(input logic [17:0] x);
    int v = (int'($signed(x)) + 4) >>> 3;
    if (v > 127) v = 127;
    if (v < -128) v = -128;
    return 8'(v);
  endfunction

  logic [63:0] q [$];
  bit checking = 1;
  int nwords = 0, nblocks = 0;
  always @(posedge clk) if (!rst && m_tvalid && m_tready) begin
    check(q.size() > 0, "unexpected word");
    if (q.size() > 0) begin
      automatic logic [63:0] e = q.pop_front();
      check(m_tdata == e, $sformatf("word %0d: %h vs %h", nwords, m_tdata, e));
      check(m_tuser == 9'd5 && m_tlast == (nwords % NT == NT - 1), "tuser/tlast");
    end
    nwords++;
  end
  always @(negedge clk) m_tready <= checking ? ($urandom_range(0, 2) != 0) : 1'b0;

  // frames: capture is enabled from frame 1; frames 1..8 give two blocks
  task automatic frames(input int nf, input bit model);
    for (int f = 0; f < nf; f++) begin
      logic [63:0] w;
      for (int k = 0; k < NC; k++) begin
        @(negedge clk);
        ch_valid = 1; ch_sof = (k == 0); ch_idx = 4'(k);
        for (int s = 0; s < NS; s++) begin
          ch_data[s].re = 18'($urandom);
          ch_data[s].im = 18'($urandom_range(0, 2000) - 1000);
          w[16 * s +: 16] = {q8(ch_data[s].re), q8(ch_data[s].im)};
        end
        if (k == 5 && model) q.push_back(w);
        if (k == 8) enable = 1;
      end
      @(negedge clk) ch_valid = 0;
      repeat (3) @(negedge clk);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst = 0;
    frames(1, 0);          // enable rises mid-frame: nothing captured here
    frames(2 * NT, 1);
    repeat (30) @(negedge clk);
    check(q.size() == 0 && nwords == 2 * NT, $sformatf("words %0d", nwords));
    check(overruns == 0, "no overrun");
    checking = 0;
    frames(3 * NT, 0);
    check(overruns == 2, $sformatf("overruns %0d", overruns));  // first block is being sent
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
