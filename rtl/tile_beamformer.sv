// tile_beamformer: channel selection, calibration, delay correction and
// antenna sum for the antennas processed in one FPGA.
//
// Input is one channel per clock for all NANT antennas (both
// polarisations), as produced by the channelizers. Up to NSUB sub-bands
// select which channels are beamformed and to which beam they belong: a
// sub-band has a start channel (even), a width (multiple of 8 channels) and
// a beam number, and a channel is taken by the first enabled sub-band that
// contains it. Selected channels are numbered in order of arrival within
// the frame; that number is the slot (logical channel) of the sample,
// 0..NSLOT-1.
//
// For each selected channel and antenna, antenna_calib applies the 3-bit
// exponent of the antenna's 8-channel group, the delay phase from
// delay_phase_gen for the sub-band's beam, and the 2x2 correction matrix
// stored for that antenna and slot. The 8+8 bit results of all antennas
// are added with 16-bit arithmetic. Output: one beam16_t per selected
// channel with its sideband (frame number, beam, physical channel, slot),
// `bm_sof` on the first selected channel of each frame. Latency 5 clocks.
//
// Tables are written through simple write ports; writes take effect at
// once (the original changes them at predefined times without stopping the
// observation; timed switching is left to the controller). The exponent
// and matrix tables start as 0 and identity.
//
// Following the design: up to 8 beams, 16 sub-bands, width multiple of 8
// channels, start granularity of 2 channels, 384 slots, per channel/antenna/
// beam matrix, exponent every 8 channels, 16-bit sum. Own choice: a channel
// can belong to one sub-band only, since it arrives once per frame.
module tile_beamformer
  import lfaa_pkg::*;
#(
  parameter int unsigned NANT   = 8,
  parameter int unsigned NCH    = NCHAN,
  parameter int unsigned NSUB   = NSUBBAND,
  parameter int unsigned NB     = NBEAM,
  parameter int unsigned NSL    = NSLOT,
  parameter int unsigned UPDATE = 1024
) (
  input  logic                     clk,
  input  logic                     rst,
  input  cplx18_t                  ch_data [NANT][2],
  input  logic [$clog2(NCH)-1:0]   ch_idx,
  input  logic                     ch_valid,
  input  logic                     ch_sof,
  // sub-band table (static configuration)
  input  logic                     sub_en    [NSUB],
  input  logic [$clog2(NCH)-1:0]   sub_start [NSUB],
  input  logic [$clog2(NCH):0]     sub_nch   [NSUB],
  input  logic [$clog2(NB)-1:0]    sub_beam  [NSUB],
  // exponent table
  input  logic                     exp_we,
  input  logic [$clog2(NANT)-1:0]  exp_ant,
  input  logic [$clog2(NCH/8)-1:0] exp_grp,
  input  logic [2:0]               exp_val,
  // correction matrix table
  input  logic                     jw_we,
  input  logic [$clog2(NANT)-1:0]  jw_ant,
  input  logic [$clog2(NSL)-1:0]   jw_slot,
  input  cplx16_t                  jw_val [2][2],
  // delay model
  input  logic                     dly_we,
  input  logic [$clog2(NANT)-1:0]  dly_ant,
  input  logic [$clog2(NB)-1:0]    dly_beam,
  input  logic signed [19:0]       dly_tau0,
  input  logic signed [21:0]       dly_rate,
  // beam output
  output beam16_t                  bm_data,
  output beam_user_t               bm_user,
  output logic                     bm_valid,
  output logic                     bm_sof
);
  localparam int unsigned CW = $clog2(NCH);
  localparam int unsigned SW = $clog2(NSL);

  logic [2:0] exp_mem   [NANT][NCH/8];
  cplx16_t    jones_mem [NANT][NSL][2][2];

  initial
    for (int a = 0; a < int'(NANT); a++) begin
      for (int g = 0; g < int'(NCH / 8); g++) exp_mem[a][g] = '0;
      for (int s = 0; s < int'(NSL); s++)
        for (int r = 0; r < 2; r++)
          for (int c = 0; c < 2; c++)
            jones_mem[a][s][r][c] = '{re: (r == c) ? 16'sh7fff : 16'sh0, im: 16'sh0};
    end

  always_ff @(posedge clk) begin
    if (exp_we) exp_mem[exp_ant][exp_grp] <= exp_val;
    if (jw_we)  jones_mem[jw_ant][jw_slot] <= jw_val;
  end

  // stage 0: sub-band lookup
  logic sel0;
  logic [$clog2(NB)-1:0] beam0;
  always_comb begin
    sel0  = 1'b0;
    beam0 = '0;
    for (int s = NSUB - 1; s >= 0; s--) begin
      logic [CW:0] st, en;
      st = {1'b0, sub_start[s][CW-1:1], 1'b0};
      en = st + {sub_nch[s][CW:3], 3'b000};
      if (sub_en[s] && ({1'b0, ch_idx} >= st) && ({1'b0, ch_idx} < en)) begin
        sel0  = 1'b1;
        beam0 = sub_beam[s];
      end
    end
  end

  logic [SW-1:0] slot_cnt, slot0;
  logic [31:0]   frame_cnt, frame0;
  assign slot0  = ch_sof ? '0 : slot_cnt;
  assign frame0 = frame_cnt;

  // stage A registers
  cplx18_t  dA [NANT][2];
  logic     vA, firstA;
  logic [CW-1:0] chA;
  logic [SW-1:0] slotA;
  logic [$clog2(NB)-1:0] beamA;
  logic [31:0] frameA;
  logic [11:0] phA [NANT];
  logic [2:0]  expA [NANT];
  logic seen_sel;   // a channel has been selected in this frame

  always_ff @(posedge clk) begin
    if (rst) begin
      slot_cnt  <= '0;
      frame_cnt <= '0;
      vA        <= 1'b0;
      firstA    <= 1'b0;
      seen_sel  <= 1'b0;
    end else begin
      vA     <= ch_valid && sel0;
      firstA <= ch_valid && sel0 && (ch_sof || !seen_sel);
      if (ch_valid) begin
        if (ch_sof) seen_sel <= sel0;
        else if (sel0) seen_sel <= 1'b1;
        if (sel0) slot_cnt <= slot0 + 1'b1;
        else      slot_cnt <= slot0;
        if (ch_sof) frame_cnt <= frame_cnt + 1'b1;
      end
    end
  end

  always_ff @(posedge clk) begin
    dA     <= ch_data;
    chA    <= ch_idx;
    slotA  <= slot0;
    beamA  <= beam0;
    frameA <= ch_sof ? frame0 : frame0 - 1'b1;   // first frame is number 0
    for (int a = 0; a < NANT; a++) expA[a] <= exp_mem[a][ch_idx[CW-1:3]];
  end

  delay_phase_gen #(.NANT(NANT), .NB(NB), .UPDATE(UPDATE), .CHW(CW)) u_phase (
    .clk, .rst,
    .frame_tick(ch_valid && ch_sof),
    .cfg_we(dly_we), .cfg_ant(dly_ant), .cfg_beam(dly_beam),
    .cfg_tau0(dly_tau0), .cfg_rate(dly_rate),
    .req_beam(beam0), .req_chan(ch_idx),
    .phase(phA)
  );

  cplx8_t s_ant [NANT][2];
  for (genvar a = 0; a < NANT; a++) begin : g_ant
    antenna_calib u_cal (
      .clk,
      .a_in(dA[a]), .expo(expA[a]), .phase(phA[a]),
      .jones(jones_mem[a][slotA]),
      .s_out(s_ant[a])
    );
  end

  // sideband pipeline matching the 3 calibration stages
  logic [2:0] vP, fP;
  beam_user_t uA, uP [3];
  assign uA = '{frame: frameA, beam: 4'(beamA), chan: 9'(chA), slot: 9'(slotA)};

  always_ff @(posedge clk) begin
    if (rst) begin
      vP       <= '0;
      fP       <= '0;
      bm_valid <= 1'b0;
      bm_sof   <= 1'b0;
    end else begin
      vP       <= {vP[1:0], vA};
      fP       <= {fP[1:0], firstA};
      bm_valid <= vP[2];
      bm_sof   <= fP[2];
    end
  end

  always_ff @(posedge clk) begin
    uP[0] <= uA;
    uP[1] <= uP[0];
    uP[2] <= uP[1];
    bm_user <= uP[2];
    begin
      logic signed [15:0] hr, hi, vr, vi;
      hr = '0; hi = '0; vr = '0; vi = '0;
      for (int a = 0; a < NANT; a++) begin
        hr += 16'(s_ant[a][0].re);
        hi += 16'(s_ant[a][0].im);
        vr += 16'(s_ant[a][1].re);
        vi += 16'(s_ant[a][1].im);
      end
      bm_data <= '{v: '{re: vr, im: vi}, h: '{re: hr, im: hi}};
    end
  end
endmodule
