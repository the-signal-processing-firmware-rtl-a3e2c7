// csp_packer: builds the frames sent to the central signal processor in the
// last tile of a station chain.
//
// Input: station beam packets of PKT_T time samples x PKT_C channels (time
// major), all packets of one channel group in time order. NPKT consecutive
// packets are collected, so each channel of the group then has
// NPKT*PKT_T (2048) consecutive time samples. Each 16-bit component is
// requantised to 8 bits (arithmetic shift right by `rq_shift`, rounded,
// saturated). Output: PKT_C frames, one per channel, each of
// NPKT*PKT_T/2 64-bit words; word w holds time samples 2w (bytes 0..3)
// and 2w+1 (bytes 4..7), each as H imaginary, H real, V imaginary, V real
// from the low byte up. `m_last` ends a frame. Every frame carries a
// 32-bit tuser in the layout the SPEAD formatter expects (logical channel
// in bits 28..13, beam in 12..9, physical channel in 8..0) and the frame
// number of its first sample. Collection and read-out use two banks. The
// last word of a group is held (s_ready low) while the previous group is
// still being sent; `stalls` counts the groups that had to wait.
//
// Following the design: 16 packets of 128 samples per group, 8 frames of
// 2048 samples each with one channel, 8+8 bit samples, byte order of the
// CSP payload table. Own choices: the requantisation shift input and the
// buffering.
module csp_packer
  import lfaa_pkg::*;
#(
  parameter int unsigned PKT_T = PKT_TIMES,
  parameter int unsigned PKT_C = PKT_CHANS,
  parameter int unsigned NPKT  = CSP_TIMES / PKT_TIMES
) (
  input  logic        clk,
  input  logic        rst,
  input  logic [3:0]  rq_shift,
  input  beam16_t     s_data,
  input  beam_user_t  s_user,
  input  logic        s_last,
  input  logic        s_valid,
  output logic        s_ready,
  output logic [63:0] m_data,
  output logic [31:0] m_tuser,
  output logic [31:0] m_frame,
  output logic        m_last,
  output logic        m_valid,
  input  logic        m_ready,
  output logic [15:0] stalls
);
  localparam int unsigned FT = NPKT * PKT_T;   // samples per output frame
  localparam int unsigned FW = FT / 2;         // words per output frame
  localparam int unsigned TW = $clog2(FT);

  logic [31:0] buffer [2][FT][PKT_C];
  beam_user_t  info   [2][PKT_C];

  function automatic logic [7:0] rq(input logic signed [15:0] x, input logic [3:0] s);
    return 8'(sat(rshift_round(64'(x), 32'(s)), 8));
  endfunction

  logic [TW-1:0] wt;                   // time index within the group
  logic rbusy, rb, fin, waiting;
  assign fin     = s_last && (wt == TW'(FT - 1));
  assign s_ready = !(fin && rbusy);

  // write side
  logic wb;
  logic [$clog2(PKT_C)-1:0] wc;
  logic grp_done;
  assign grp_done = s_valid && s_ready && fin;

  always_ff @(posedge clk) begin
    if (rst) begin
      wb <= 1'b0;
      wt <= '0;
      wc <= '0;
    end else if (s_valid && s_ready) begin
      wc <= wc + 1'b1;
      if (wc == PKT_C - 1) begin
        wc <= '0;
        wt <= wt + 1'b1;
      end
      if (grp_done) begin
        wb <= !wb;
        wt <= '0;
      end
    end
  end

  always_ff @(posedge clk)
    if (s_valid && s_ready) begin
      buffer[wb][wt][wc] <= {rq(s_data.v.re, rq_shift), rq(s_data.v.im, rq_shift),
                             rq(s_data.h.re, rq_shift), rq(s_data.h.im, rq_shift)};
      if (wt == '0) info[wb][wc] <= s_user;
    end

  // read side
  logic [$clog2(PKT_C)-1:0] rc;
  logic [$clog2(FW)-1:0] rw;
  logic adv;
  assign adv = rbusy && (!m_valid || m_ready);

  always_ff @(posedge clk) begin
    if (rst) begin
      rbusy     <= 1'b0;
      rb        <= 1'b0;
      rc        <= '0;
      rw        <= '0;
      m_valid   <= 1'b0;
      m_last    <= 1'b0;
      stalls    <= '0;
      waiting   <= 1'b0;
    end else begin
      if (m_valid && m_ready) m_valid <= 1'b0;
      if (adv) begin
        m_data  <= {buffer[rb][{rw, 1'b1}][rc], buffer[rb][{rw, 1'b0}][rc]};
        m_tuser <= {3'b0, 7'b0, info[rb][rc].slot, info[rb][rc].beam, info[rb][rc].chan};
        m_frame <= info[rb][rc].frame;
        m_valid <= 1'b1;
        m_last  <= (rw == $clog2(FW)'(FW - 1));
        rw <= rw + 1'b1;
        if (rw == $clog2(FW)'(FW - 1)) begin
          rw <= '0;
          rc <= rc + 1'b1;
          if (rc == $clog2(PKT_C)'(PKT_C - 1)) begin
            rc    <= '0;
            rbusy <= 1'b0;
          end
        end
      end
      waiting <= s_valid && !s_ready;
      if (s_valid && !s_ready && !waiting) stalls <= stalls + 1'b1;
      if (grp_done) begin
        rbusy <= 1'b1;
        rb    <= wb;
        rc    <= '0;
        rw    <= '0;
      end
    end
  end
endmodule
