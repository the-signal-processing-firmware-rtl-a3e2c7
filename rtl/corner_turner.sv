// corner_turner: reorders tile beam samples from frames of one time sample
// and all channels into packets of PKT_T consecutive time samples for
// PKT_C channels.
//
// Samples are written into one of two banks, addressed by (time within
// block, slot). `din_sof` marks the first sample of each frame; a block is
// TB frames long. When the first frame of the next block starts, the full
// bank is read out while the other one fills. Read order: for each group of
// PKT_C slots, for each of the TB/PKT_T packets of the block, for each time
// sample, for each slot of the group. So a downstream stage receives, for
// one channel group, the successive packets covering the whole block,
// which is what the CSP frame builder needs. Each output word carries the
// sideband of its slot (beam, physical channel, logical channel) and the
// frame number of the packet's first time sample; `m_last` ends each
// packet. Output handshake: valid/ready, one registered stage. A block
// that completes while the previous one is still being read is counted in
// `overflows` and the read restarts on the new block.
//
// Following the design: the reordering, 128 time samples x 8 channels per
// packet, retrieval of a whole time block group by group. Own choices: an
// on-chip double-buffered memory in place of the board's external memory,
// and the block length TB = 2048 frames (the original holds up to about
// 0.23 s, some 213,000 frames, in external memory; 2048 is the shortest
// block that fills one CSP frame).
module corner_turner
  import lfaa_pkg::*;
#(
  parameter int unsigned NSL   = NSLOT / 2,
  parameter int unsigned TB    = CSP_TIMES,
  parameter int unsigned PKT_T = PKT_TIMES,
  parameter int unsigned PKT_C = PKT_CHANS
) (
  input  logic                    clk,
  input  logic                    rst,
  input  beam16_t                 din,
  input  beam_user_t              din_user,
  input  logic [$clog2(NSL)-1:0]  din_slot,
  input  logic                    din_valid,
  input  logic                    din_sof,
  output beam16_t                 m_data,
  output beam_user_t              m_user,
  output logic                    m_last,
  output logic                    m_valid,
  input  logic                    m_ready,
  output logic [15:0]             overflows
);
  localparam int unsigned TW = $clog2(TB);
  localparam int unsigned SW = $clog2(NSL);
  localparam int unsigned NG = NSL / PKT_C;
  localparam int unsigned NP = TB / PKT_T;

  beam16_t    mem  [2][TB][NSL];
  beam_user_t info [2][NSL];

  // write side
  logic          wb;
  logic [TW-1:0] wt;
  logic          started;
  logic [31:0]   wframe0;
  logic          blk_done;
  logic [TW-1:0] t_now;

  assign blk_done = din_valid && din_sof && started && (wt == TW'(TB - 1));
  assign t_now    = (din_sof && started) ? ((wt == TW'(TB - 1)) ? '0 : wt + 1'b1) : wt;

  logic wbank_now;
  assign wbank_now = blk_done ? !wb : wb;

  always_ff @(posedge clk) begin
    if (rst) begin
      wb      <= 1'b0;
      wt      <= '0;
      started <= 1'b0;
      wframe0 <= '0;
    end else if (din_valid) begin
      if (din_sof) begin
        if (!started) wframe0 <= din_user.frame;
        started <= 1'b1;
        wt      <= t_now;
        if (blk_done) begin
          wb      <= !wb;
          wframe0 <= din_user.frame;
        end
      end
    end
  end

  always_ff @(posedge clk)
    if (din_valid) begin
      mem[wbank_now][t_now][din_slot] <= din;
      info[wbank_now][din_slot]       <= din_user;
    end

  // read side
  logic rbusy, rb;
  logic [31:0] rframe0;
  logic [$clog2(NG)-1:0] rg;
  logic [$clog2(NP+1)-1:0] rp;
  logic [$clog2(PKT_T)-1:0] rt;
  logic [$clog2(PKT_C)-1:0] rc;
  logic adv;
  assign adv = rbusy && (!m_valid || m_ready);

  always_ff @(posedge clk) begin
    if (rst) begin
      rbusy     <= 1'b0;
      rb        <= 1'b0;
      rframe0   <= '0;
      {rg, rp, rt, rc} <= '0;
      m_valid   <= 1'b0;
      m_last    <= 1'b0;
      overflows <= '0;
    end else begin
      if (m_valid && m_ready) m_valid <= 1'b0;
      if (adv) begin
        logic [SW-1:0] s;
        logic [TW-1:0] t;
        s = SW'(rg * PKT_C + rc);
        t = TW'(rp * PKT_T + rt);
        m_data  <= mem[rb][t][s];
        m_user  <= '{frame: rframe0 + 32'(rp * PKT_T), beam: info[rb][s].beam,
                     chan: info[rb][s].chan, slot: info[rb][s].slot};
        m_valid <= 1'b1;
        m_last  <= (rt == PKT_T - 1) && (rc == PKT_C - 1);
        rc <= rc + 1'b1;
        if (rc == PKT_C - 1) begin
          rc <= '0;
          rt <= rt + 1'b1;
          if (rt == PKT_T - 1) begin
            rt <= '0;
            rp <= rp + 1'b1;
            if (rp == NP - 1) begin
              rp <= '0;
              rg <= rg + 1'b1;
              if (rg == NG - 1) begin
                rg    <= '0;
                rbusy <= 1'b0;
              end
            end
          end
        end
      end
      if (blk_done) begin
        if (rbusy) overflows <= overflows + 1'b1;
        rbusy   <= 1'b1;
        rb      <= wb;
        rframe0 <= wframe0;
        {rg, rp, rt, rc} <= '0;
      end
    end
  end
endmodule
