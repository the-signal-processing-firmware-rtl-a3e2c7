// channelizer: coarse polyphase channelizer for one dual-polarisation
// antenna.
//
// Each polarisation goes through a wola_filter and an fft_real; the two
// chains run in lock step, so their channels leave together: one channel
// index per clock with the complex value of both polarisations, `ch_sof`
// on channel 0 and a per-polarisation overflow flag. Input is the framed
// real sample stream, LANES samples per clock per polarisation, with
// `din_sof` on the first beat of each 864-sample frame. One output frame of
// NFFT/2 channels follows every input frame once the filter is loaded,
// provided input frames are spaced by at least the FFT frame time
// (see fft_real); `overruns` counts frames that were dropped.
//
// Following the design: oversampled polyphase filter + real FFT per
// signal, both polarisations of an antenna processed together. Own choice:
// polarisations handled by two instances rather than one shared core.
module channelizer
  import lfaa_pkg::*;
#(
  parameter int unsigned N      = NFFT,
  parameter int unsigned M      = MHOP,
  parameter int unsigned TAPS   = NTAPS,
  parameter int unsigned HBANKS = 16,
  parameter int unsigned OSHIFT = 4     // FFT output scaling, see fft_real
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic signed [7:0]        din [2][LANES],
  input  logic                     din_valid,
  input  logic                     din_sof,
  output cplx18_t                  ch_data [2],
  output logic [$clog2(N/2)-1:0]   ch_idx,
  output logic                     ch_valid,
  output logic                     ch_sof,
  output logic [1:0]               ch_ovf,
  output logic [15:0]              overruns
);
  logic signed [15:0] w_data [2][LANES];
  logic [1:0] w_valid, w_sof, f_ready, c_valid, c_sof;
  logic [$clog2(N/2)-1:0] c_idx [2];
  logic [15:0] ovr [2];

  for (genvar p = 0; p < 2; p++) begin : g_pol
    wola_filter #(.N(N), .M(M), .TAPS(TAPS), .HBANKS(HBANKS)) u_wola (
      .clk, .rst,
      .din(din[p]), .din_valid, .din_sof,
      .dout(w_data[p]), .dout_valid(w_valid[p]), .dout_sof(w_sof[p]),
      .dout_ready(f_ready[p]), .overruns(ovr[p])
    );
    fft_real #(.N(N), .OSHIFT(OSHIFT)) u_fft (
      .clk, .rst,
      .din(w_data[p]), .din_valid(w_valid[p]), .din_sof(w_sof[p]), .din_ready(f_ready[p]),
      .ch_data(ch_data[p]), .ch_idx(c_idx[p]), .ch_valid(c_valid[p]), .ch_sof(c_sof[p]),
      .ch_ovf(ch_ovf[p])
    );
  end

  assign ch_idx   = c_idx[0];
  assign ch_valid = c_valid[0];
  assign ch_sof   = c_sof[0];
  assign overruns = ovr[0];

  // both polarisation chains see identical timing
  assert property (@(posedge clk) disable iff (rst) c_valid[0] == c_valid[1]);
endmodule
