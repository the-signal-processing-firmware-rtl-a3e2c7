// tpm_top: signal processing of one Tile Processing Module (16 dual-
// polarisation antennas) as two FPGA chains and the station beam output.
//
// Each FPGA f (0, 1) takes NANT_F antennas. Its chain is: adc_framer
// (frames of 864 samples aligned to the PPS, time counters) -> cable_delay
// -> one channelizer per antenna (512 channels of 781.25 kHz per frame) ->
// tile_beamformer (sub-band selection, calibration, delay phase, sum of the
// FPGA's antennas). The two partial beams are added (the design exchanges
// them between the FPGAs so that FPGA 0 completes the even and FPGA 1 the
// odd logical channels); each FPGA's share goes into its corner_turner.
// The packets of both corner turners are merged and added to the
// travelling station beam from the previous tile (station_beam_adder).
// In a tile that is not the last of its chain the sum leaves on the
// chain output; in the last tile it goes through csp_packer and
// spead_formatter to the CSP output. Diagnostics per FPGA: total_power on
// the framed ADC samples, coarse_spectrometer and channel_capture on the
// channelised samples. A pps_sampler shared by both FPGAs recovers the PPS.
//
// The ADC links, the 40 GbE interface, the external memory and the control
// bus are outside this RTL: ADC data, chain input/output, CSP output and
// all configuration are ports. The timestamp of each CSP packet is the
// time of its first sample relative to the observation start, frame * 1080
// ns + 7560 ns (filter preload); the packet counter counts CSP packets.
// Everything runs on one clock; see the individual blocks for their
// timing. The defaults are the full design sizes.
module tpm_top
  import lfaa_pkg::*;
#(
  parameter int unsigned NANT_F  = 8,
  parameter int unsigned N       = NFFT,
  parameter int unsigned M       = MHOP,
  parameter int unsigned TAPS    = NTAPS,
  parameter int unsigned HBANKS  = 16,
  parameter int unsigned FFT_SHIFT = 4,
  parameter int unsigned NSL     = NSLOT,
  parameter int unsigned TB      = CSP_TIMES,
  parameter int unsigned PKT_T   = PKT_TIMES,
  parameter int unsigned PKT_C   = PKT_CHANS,
  parameter int unsigned NPKT    = CSP_TIMES / PKT_TIMES,
  parameter int unsigned UPDATE  = 1024,
  parameter int unsigned CAP_T   = PKT_TIMES
) (
  input  logic                        clk,
  input  logic                        rst,
  // ADC samples: [fpga][antenna][polarisation][lane]
  input  logic signed [7:0]           adc_data [2][NANT_F][2][LANES],
  input  logic                        adc_valid,
  // timing
  input  logic [3:0]                  pps_ph,
  input  logic                        pps_recal,
  input  logic                        arm,
  input  logic                        sync_load,
  input  logic [31:0]                 sync_value,
  output logic [31:0]                 start_time,
  output logic                        running,
  // cable delays, samples
  input  logic signed [9:0]           cable_dly [2][NANT_F],
  // sub-band table, shared by both FPGAs
  input  logic                        sub_en    [NSUBBAND],
  input  logic [$clog2(N/2)-1:0]      sub_start [NSUBBAND],
  input  logic [$clog2(N/2):0]        sub_nch   [NSUBBAND],
  input  logic [2:0]                  sub_beam  [NSUBBAND],
  // calibration table writes, to FPGA cfg_fpga
  input  logic                        cfg_fpga,
  input  logic                        exp_we,
  input  logic [$clog2(NANT_F)-1:0]   exp_ant,
  input  logic [$clog2(N/16)-1:0]     exp_grp,
  input  logic [2:0]                  exp_val,
  input  logic                        jw_we,
  input  logic [$clog2(NANT_F)-1:0]   jw_ant,
  input  logic [$clog2(NSL)-1:0]      jw_slot,
  input  cplx16_t                     jw_val [2][2],
  input  logic                        dly_we,
  input  logic [$clog2(NANT_F)-1:0]   dly_ant,
  input  logic [2:0]                  dly_beam,
  input  logic signed [19:0]          dly_tau0,
  input  logic signed [21:0]          dly_rate,
  // station chain
  input  logic                        chain_first,
  input  logic                        chain_last,
  input  beam16_t                     chain_in_data,
  input  logic                        chain_in_last,
  input  logic                        chain_in_valid,
  output logic                        chain_in_ready,
  output beam16_t                     chain_out_data,
  output beam_user_t                  chain_out_user,
  output logic                        chain_out_last,
  output logic                        chain_out_valid,
  input  logic                        chain_out_ready,
  // CSP output (last tile)
  input  logic [3:0]                  csp_rq_shift,
  input  logic [7:0]                  subarray_id,
  input  logic [15:0]                 station_id,
  input  logic [15:0]                 n_antennas,
  output logic [63:0]                 csp_tdata,
  output logic                        csp_tlast,
  output logic                        csp_tvalid,
  input  logic                        csp_tready,
  // diagnostics
  input  logic [31:0]                 tp_integ_frames,
  output logic [47:0]                 tp_power [2][2*NANT_F],
  output logic [1:0]                  tp_valid,
  input  logic [$clog2(2*NANT_F)-1:0] sp_sel_a [2],
  input  logic [$clog2(2*NANT_F)-1:0] sp_sel_b [2],
  input  logic [31:0]                 sp_integ_frames,
  input  logic [5:0]                  sp_shift,
  input  logic [$clog2(N/2)-1:0]      sp_rd_addr,
  output logic signed [31:0]          sp_rd_re [2],
  output logic signed [31:0]          sp_rd_im [2],
  output logic [1:0]                  sp_done,
  input  logic                        cap_enable,
  input  logic [$clog2(N/2)-1:0]      cap_chan,
  input  logic [4:0]                  cap_shift,
  output logic [63:0]                 cap_tdata [2],
  output logic [8:0]                  cap_tuser [2],
  output logic [1:0]                  cap_tlast,
  output logic [1:0]                  cap_tvalid,
  input  logic [1:0]                  cap_tready,
  // status
  output logic [31:0]                 chan_ovf_count,
  output logic [31:0]                 station_sat_count,
  output logic [31:0]                 csp_packets,
  output logic                        error
);
  localparam int unsigned NCH  = N / 2;
  localparam int unsigned CW   = $clog2(NCH);
  localparam int unsigned NSIG = 2 * NANT_F;

  logic pps, pps_edge_unused;
  logic [1:0] pps_sel_unused;
  logic pps_locked;
  pps_sampler #(.NPH(4)) u_pps (
    .clk, .rst, .pps_ph, .recal(pps_recal),
    .pps_out(pps), .pps_edge(pps_edge_unused), .sel_phase(pps_sel_unused), .locked(pps_locked)
  );

  beam16_t    bf_data [2];
  beam_user_t bf_user [2];
  logic [1:0] bf_valid, bf_sof;
  logic [15:0] wola_ovr [2][NANT_F];
  logic [1:0] run_f;
  logic [31:0] start_f [2];
  logic [NANT_F*2-1:0] ovf_bits [2];
  logic [1:0] ch_valid_f;

  for (genvar f = 0; f < 2; f++) begin : g_fpga
    logic signed [7:0] fr_data [NSIG][LANES];
    logic signed [7:0] fr_in   [NSIG][LANES];
    logic fr_valid, fr_sof;
    logic [31:0] fr_num, fr_sync;
    logic [47:0] fr_ts;

    always_comb
      for (int a = 0; a < NANT_F; a++)
        for (int p = 0; p < 2; p++)
          fr_in[2*a+p] = adc_data[f][a][p];

    adc_framer #(.NSIG(NSIG), .FRAME_LEN(M / LANES)) u_framer (
      .clk, .rst,
      .adc_data(fr_in), .adc_valid, .pps, .arm, .sync_load, .sync_value,
      .dout(fr_data), .dout_valid(fr_valid), .sof(fr_sof),
      .frame_num(fr_num), .time_stamp(fr_ts), .sync_time(fr_sync),
      .start_time(start_f[f]), .running(run_f[f])
    );

    total_power #(.NSIG(NSIG), .FRAME_LEN(M / LANES)) u_tp (
      .clk, .rst, .din(fr_data), .din_valid(fr_valid), .din_sof(fr_sof),
      .integ_frames(tp_integ_frames), .power(tp_power[f]), .pwr_valid(tp_valid[f]),
      .n_results()
    );

    logic signed [7:0] cd_in  [NANT_F][2][LANES];
    logic signed [7:0] cd_out [NANT_F][2][LANES];
    logic cd_valid, cd_sof;
    always_comb
      for (int a = 0; a < NANT_F; a++)
        for (int p = 0; p < 2; p++)
          cd_in[a][p] = fr_data[2*a+p];

    cable_delay #(.NANT(NANT_F)) u_cable (
      .clk, .rst, .din(cd_in), .din_valid(fr_valid), .din_sof(fr_sof),
      .delay(cable_dly[f]), .dout(cd_out), .dout_valid(cd_valid), .dout_sof(cd_sof)
    );

    cplx18_t ch_data [NANT_F][2];
    logic [CW-1:0] ch_idx_a [NANT_F];
    logic [NANT_F-1:0] ch_valid_a, ch_sof_a;
    for (genvar a = 0; a < NANT_F; a++) begin : g_ant
      channelizer #(.N(N), .M(M), .TAPS(TAPS), .HBANKS(HBANKS), .OSHIFT(FFT_SHIFT)) u_chan (
        .clk, .rst,
        .din(cd_out[a]), .din_valid(cd_valid), .din_sof(cd_sof),
        .ch_data(ch_data[a]), .ch_idx(ch_idx_a[a]), .ch_valid(ch_valid_a[a]),
        .ch_sof(ch_sof_a[a]), .ch_ovf(ovf_bits[f][2*a +: 2]), .overruns(wola_ovr[f][a])
      );
    end
    assign ch_valid_f[f] = ch_valid_a[0];

    tile_beamformer #(.NANT(NANT_F), .NCH(NCH), .NSL(NSL), .UPDATE(UPDATE)) u_bf (
      .clk, .rst,
      .ch_data, .ch_idx(ch_idx_a[0]), .ch_valid(ch_valid_a[0]), .ch_sof(ch_sof_a[0]),
      .sub_en, .sub_start, .sub_nch, .sub_beam,
      .exp_we(exp_we && cfg_fpga == f), .exp_ant, .exp_grp, .exp_val,
      .jw_we(jw_we && cfg_fpga == f), .jw_ant, .jw_slot, .jw_val,
      .dly_we(dly_we && cfg_fpga == f), .dly_ant, .dly_beam, .dly_tau0, .dly_rate,
      .bm_data(bf_data[f]), .bm_user(bf_user[f]), .bm_valid(bf_valid[f]), .bm_sof(bf_sof[f])
    );

    cplx18_t sp_data [NSIG];
    always_comb
      for (int a = 0; a < NANT_F; a++)
        for (int p = 0; p < 2; p++)
          sp_data[2*a+p] = ch_data[a][p];

    coarse_spectrometer #(.NSIG(NSIG), .NCH(NCH)) u_spec (
      .clk, .rst, .ch_data(sp_data), .ch_idx(ch_idx_a[0]), .ch_valid(ch_valid_a[0]),
      .ch_sof(ch_sof_a[0]), .sel_a(sp_sel_a[f]), .sel_b(sp_sel_b[f]),
      .integ_frames(sp_integ_frames), .out_shift(sp_shift), .rd_addr(sp_rd_addr),
      .rd_re(sp_rd_re[f]), .rd_im(sp_rd_im[f]), .done(sp_done[f]), .n_spectra()
    );

    channel_capture #(.NSIG(NSIG), .NCH(NCH), .NT(CAP_T)) u_cap (
      .clk, .rst, .ch_data(sp_data), .ch_idx(ch_idx_a[0]), .ch_valid(ch_valid_a[0]),
      .ch_sof(ch_sof_a[0]), .enable(cap_enable), .chan_sel(cap_chan), .rq_shift(cap_shift),
      .m_tdata(cap_tdata[f]), .m_tuser(cap_tuser[f]), .m_tlast(cap_tlast[f]),
      .m_tvalid(cap_tvalid[f]), .m_tready(cap_tready[f]), .overruns()
    );
  end

  assign start_time = start_f[0];
  assign running    = run_f[0];

  // tile sum of the two FPGAs' partial beams; even logical channels are
  // completed in FPGA 0, odd ones in FPGA 1
  function automatic logic signed [15:0] add16(input logic signed [15:0] a, input logic signed [15:0] b);
    return 16'(sat(64'(a) + 64'(b), 16));
  endfunction
  beam16_t tile_sum;
  always_comb begin
    tile_sum.h.re = add16(bf_data[0].h.re, bf_data[1].h.re);
    tile_sum.h.im = add16(bf_data[0].h.im, bf_data[1].h.im);
    tile_sum.v.re = add16(bf_data[0].v.re, bf_data[1].v.re);
    tile_sum.v.im = add16(bf_data[0].v.im, bf_data[1].v.im);
  end

  beam16_t    ct_data  [2];
  beam_user_t ct_user  [2];
  logic       ct_last  [2];
  logic       ct_valid [2];
  logic       ct_ready [2];
  logic [15:0] ct_ovf  [2];
  for (genvar f = 0; f < 2; f++) begin : g_ct
    logic sof_f;
    // the first selected sample of a frame has slot 0, so it belongs to
    // FPGA 0; FPGA 1 starts its frame with slot 1
    assign sof_f = (f == 0) ? bf_sof[0] : (bf_valid[0] && bf_user[0].slot == 9'd1);
    corner_turner #(.NSL(NSL / 2), .TB(TB), .PKT_T(PKT_T), .PKT_C(PKT_C)) u_ct (
      .clk, .rst,
      .din(tile_sum), .din_user(bf_user[0]),
      .din_slot($clog2(NSL / 2)'(bf_user[0].slot >> 1)),
      .din_valid(bf_valid[0] && bf_user[0].slot[0] == 1'(f)), .din_sof(sof_f),
      .m_data(ct_data[f]), .m_user(ct_user[f]), .m_last(ct_last[f]),
      .m_valid(ct_valid[f]), .m_ready(ct_ready[f]), .overflows(ct_ovf[f])
    );
  end

  beam16_t    mx_data;
  beam_user_t mx_user;
  logic mx_last, mx_valid, mx_ready;
  axis_packet_mux #(.NPKT(NPKT)) u_mux (
    .clk, .rst,
    .s_data(ct_data), .s_user(ct_user), .s_last(ct_last), .s_valid(ct_valid), .s_ready(ct_ready),
    .m_data(mx_data), .m_user(mx_user), .m_last(mx_last), .m_valid(mx_valid), .m_ready(mx_ready)
  );

  beam16_t    sb_data;
  beam_user_t sb_user;
  logic sb_last, sb_valid, sb_ready, align_err;
  station_beam_adder u_sba (
    .clk, .rst, .first(chain_first),
    .l_data(mx_data), .l_user(mx_user), .l_last(mx_last), .l_valid(mx_valid), .l_ready(mx_ready),
    .c_data(chain_in_data), .c_last(chain_in_last), .c_valid(chain_in_valid), .c_ready(chain_in_ready),
    .m_data(sb_data), .m_user(sb_user), .m_last(sb_last), .m_valid(sb_valid), .m_ready(sb_ready),
    .align_err, .sat_count(station_sat_count)
  );

  assign chain_out_data  = sb_data;
  assign chain_out_user  = sb_user;
  assign chain_out_last  = sb_last;
  assign chain_out_valid = sb_valid && !chain_last;

  logic pk_ready;
  logic [63:0] pk_data;
  logic [31:0] pk_tuser, pk_frame;
  logic pk_last, pk_valid, fm_ready;
  logic [15:0] pk_stalls;
  assign sb_ready = chain_last ? pk_ready : chain_out_ready;

  csp_packer #(.PKT_T(PKT_T), .PKT_C(PKT_C), .NPKT(NPKT)) u_pack (
    .clk, .rst, .rq_shift(csp_rq_shift),
    .s_data(sb_data), .s_user(sb_user), .s_last(sb_last), .s_valid(sb_valid && chain_last),
    .s_ready(pk_ready),
    .m_data(pk_data), .m_tuser(pk_tuser), .m_frame(pk_frame), .m_last(pk_last),
    .m_valid(pk_valid), .m_ready(fm_ready), .stalls(pk_stalls)
  );

  logic [31:0] pkt_cnt, fm_sent;
  always_ff @(posedge clk)
    if (rst) pkt_cnt <= '0;
    else if (csp_tvalid && csp_tready && csp_tlast) pkt_cnt <= pkt_cnt + 1'b1;
  assign csp_packets = pkt_cnt;

  spead_formatter u_spead (
    .clk, .rst,
    .s_tdata(pk_data), .s_tuser(pk_tuser), .s_tlast(pk_last), .s_tvalid(pk_valid), .s_tready(fm_ready),
    .pkt_counter(fm_sent), .pkt_len(48'(NPKT * PKT_T * 4)), .ref_time(start_f[0]),
    .timestamp(48'(pk_frame) * 48'(FRAME_NS) + 48'(PRELOAD_NS)),
    .subarray_id, .station_id, .n_antennas,
    .m_tdata(csp_tdata), .m_tlast(csp_tlast), .m_tvalid(csp_tvalid), .m_tready(csp_tready),
    .packets_sent(fm_sent)
  );

  // status
  always_ff @(posedge clk)
    if (rst) chan_ovf_count <= '0;
    else chan_ovf_count <= chan_ovf_count
                           + 32'(ch_valid_f[0] ? $countones(ovf_bits[0]) : 0)
                           + 32'(ch_valid_f[1] ? $countones(ovf_bits[1]) : 0);

  always_comb begin
    error = align_err || (ct_ovf[0] != 0) || (ct_ovf[1] != 0)
            || (run_f[0] != run_f[1]) || !pps_locked && running;
    for (int f = 0; f < 2; f++)
      for (int a = 0; a < NANT_F; a++)
        if (wola_ovr[f][a] != 0) error = 1'b1;
  end

  // both FPGA chains run in lock step
  assert property (@(posedge clk) disable iff (rst) bf_valid[0] == bf_valid[1]);
endmodule
