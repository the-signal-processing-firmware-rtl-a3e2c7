// delay_phase_gen: geometric delay tracking and per-channel phase for the
// frequency-domain beamformer.
//
// For every antenna a and beam b the delay is tau = tau0 + t * rate. The
// delay is held in units of 2^-13 samples (152.6 fs at 800 MS/s) in a
// 20-bit signed register (+-64 samples, +-80 ns); the rate is in units of
// 2^-14 of that step per update (8.4 fs/s when updated every 1024 frames
// of 1080 ns), 22-bit signed (+-17 ns/s). Every UPDATE frames (`frame_tick`
// pulses) the rate is added to a 34-bit accumulator whose upper 20 bits are
// the delay. Writing an antenna/beam entry loads tau0 and rate at once.
//
// The phase applied to channel k (centre frequency k/N cycles per sample)
// is nu*tau turns = k * tau / 2^23, i.e. k*tau/2^11 in the 4096 steps per
// turn used downstream. `phase` returns that value for the requested beam
// and channel for all antennas, one clock after the request (two
// multipliers per antenna: the product and nothing else).
//
// Following the design: initial delay plus delay rate, 4096 steps per
// turn, 153 fs / 8.4 fs/s resolution and ranges, update every 1024
// channelised samples. Own choices: register widths derived from those
// numbers, the immediate load on write and the write port.
module delay_phase_gen
  import lfaa_pkg::*;
#(
  parameter int unsigned NANT   = 8,
  parameter int unsigned NB     = NBEAM,
  parameter int unsigned UPDATE = 1024,
  parameter int unsigned CHW    = $clog2(NCHAN)
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    frame_tick,
  // configuration
  input  logic                    cfg_we,
  input  logic [$clog2(NANT)-1:0] cfg_ant,
  input  logic [$clog2(NB)-1:0]   cfg_beam,
  input  logic signed [19:0]      cfg_tau0,
  input  logic signed [21:0]      cfg_rate,
  // phase request
  input  logic [$clog2(NB)-1:0]   req_beam,
  input  logic [CHW-1:0]          req_chan,
  output logic [11:0]             phase [NANT]
);
  logic signed [33:0] acc  [NANT][NB];
  logic signed [21:0] rate [NANT][NB];
  logic [$clog2(UPDATE)-1:0] fcnt;

  always_ff @(posedge clk) begin
    if (rst) begin
      fcnt <= '0;
      for (int a = 0; a < NANT; a++)
        for (int b = 0; b < NB; b++) begin
          acc[a][b]  <= '0;
          rate[a][b] <= '0;
        end
    end else begin
      if (frame_tick) begin
        fcnt <= fcnt + 1'b1;
        if (fcnt == $clog2(UPDATE)'(UPDATE - 1))
          for (int a = 0; a < NANT; a++)
            for (int b = 0; b < NB; b++)
              acc[a][b] <= acc[a][b] + 34'(rate[a][b]);
      end
      if (cfg_we) begin
        acc[cfg_ant][cfg_beam]  <= {cfg_tau0, 14'd0};
        rate[cfg_ant][cfg_beam] <= cfg_rate;
      end
    end
  end

  always_ff @(posedge clk)
    for (int a = 0; a < NANT; a++) begin
      logic signed [31:0] p;
      p = 32'(signed'({1'b0, req_chan})) * 32'(signed'(acc[a][req_beam][33:14]));
      phase[a] <= 12'(rshift_round(64'(p), 11));
    end
endmodule
