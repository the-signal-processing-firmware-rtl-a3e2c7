// channel_capture: captures the channelised samples of one channel from
// all signals for station calibration.
//
// Once per frame, when the channel `chan_sel` passes, the samples of all
// NSIG signals are requantised to 8+8 bits (arithmetic shift right by
// `rq_shift`, rounded, saturated) and stored. After NT frames the block is
// sent on a 64-bit AXI4-Stream master, four 16-bit samples per word in the
// order time-major, signal-minor (real part in the high byte of each
// sample); m_tlast marks the last word, m_tuser the captured channel.
// Capture continues into a second bank meanwhile; a block completed while
// the previous one is still being sent is dropped and counted in
// `overruns`. Capture runs while `enable` is high and starts at a frame
// boundary.
//
// Following the design: one channel, all antennas and polarisations,
// 8+8 bit samples, blocks of 128 samples. Own choices: sample packing,
// requantisation shift and buffering.
module channel_capture
  import lfaa_pkg::*;
#(
  parameter int unsigned NSIG = 16,
  parameter int unsigned NCH  = NCHAN,
  parameter int unsigned NT   = PKT_TIMES
) (
  input  logic                    clk,
  input  logic                    rst,
  input  cplx18_t                 ch_data [NSIG],
  input  logic [$clog2(NCH)-1:0]  ch_idx,
  input  logic                    ch_valid,
  input  logic                    ch_sof,
  input  logic                    enable,
  input  logic [$clog2(NCH)-1:0]  chan_sel,
  input  logic [4:0]              rq_shift,
  output logic [63:0]             m_tdata,
  output logic [8:0]              m_tuser,
  output logic                    m_tlast,
  output logic                    m_tvalid,
  input  logic                    m_tready,
  output logic [15:0]             overruns
);
  localparam int unsigned NW = NT * NSIG / 4;

  cplx8_t buffer [2][NT * NSIG];
  logic   wb, started;
  logic   rbusy, rb;
  logic [$clog2(NT)-1:0] wt;
  logic [$clog2(NCH)-1:0] csel;

  function automatic logic signed [7:0] rq(input logic signed [17:0] x, input logic [4:0] s);
    return 8'(sat(rshift_round(64'(x), 32'(s)), 8));
  endfunction

  logic hit, blk_done;
  assign hit      = ch_valid && started && (ch_idx == csel);
  assign blk_done = hit && (wt == $clog2(NT)'(NT - 1));

  always_ff @(posedge clk) begin
    if (rst) begin
      wb      <= 1'b0;
      wt      <= '0;
      started <= 1'b0;
      csel    <= '0;
    end else begin
      if (ch_valid && ch_sof) begin
        if (!started && enable) begin
          started <= 1'b1;
          csel    <= chan_sel;
          wt      <= '0;
        end else if (!enable) started <= 1'b0;
      end
      if (hit) begin
        wt <= wt + 1'b1;
        if (blk_done) begin
          wt <= '0;
          if (!rbusy) wb <= !wb;  // a dropped block's bank is reused
        end
      end
    end
  end

  always_ff @(posedge clk)
    if (hit)
      for (int s = 0; s < NSIG; s++)
        buffer[wb][int'(wt) * NSIG + s] <= '{re: rq(ch_data[s].re, rq_shift),
                                               im: rq(ch_data[s].im, rq_shift)};

  logic [$clog2(NW)-1:0] rw;
  logic [8:0] rchan;
  logic adv;
  assign adv = rbusy && (!m_tvalid || m_tready);

  always_ff @(posedge clk) begin
    if (rst) begin
      rbusy    <= 1'b0;
      rb       <= 1'b0;
      rw       <= '0;
      rchan    <= '0;
      m_tvalid <= 1'b0;
      m_tlast  <= 1'b0;
      overruns <= '0;
    end else begin
      if (m_tvalid && m_tready) m_tvalid <= 1'b0;
      if (adv) begin
        for (int j = 0; j < 4; j++) m_tdata[16*j +: 16] <= buffer[rb][{rw, 2'(j)}];
        m_tuser  <= rchan;
        m_tvalid <= 1'b1;
        m_tlast  <= (rw == $clog2(NW)'(NW - 1));
        rw       <= rw + 1'b1;
        if (rw == $clog2(NW)'(NW - 1)) rbusy <= 1'b0;
      end
      if (blk_done) begin
        if (rbusy) overruns <= overruns + 1'b1;
        else begin
          rbusy <= 1'b1;
          rb    <= wb;
          rw    <= '0;
          rchan <= 9'(csel);
        end
      end
    end
  end
endmodule
