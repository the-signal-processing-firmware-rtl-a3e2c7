// cable_delay: integer-sample delay per antenna, to compensate for the
// different cable lengths between the antennas and the digitizers.
//
// Each antenna carries two polarisation signals, delayed together. The
// requested correction is a signed sample count in -512..+511 relative to
// a nominal delay of 512 samples, so the stream of an antenna is delayed
// by LAT + 512 + delay[a] samples in total, where LAT = LANES is the fixed
// latency of this block. Samples arrive LANES per clock; the buffer of
// each signal is split into LANES banks by sample index modulo LANES, so
// the LANES outputs of a clock read LANES different banks even when the
// delay is not a multiple of LANES. Output is registered.
//
// Following the design: the +-512 sample range, whole-sample steps, one
// value for both polarisations of an antenna, a static setting. Own
// choices: the nominal-delay offset, the buffer depth and organisation.
module cable_delay
  import lfaa_pkg::*;
#(
  parameter int unsigned NANT  = 8,
  parameter int unsigned DEPTH = 2048   // samples per signal, >= 1024 + 2*LANES
) (
  input  logic              clk,
  input  logic              rst,
  input  logic signed [7:0] din  [NANT][2][LANES],
  input  logic              din_valid,
  input  logic              din_sof,
  input  logic signed [9:0] delay [NANT],   // -512..+511 samples
  output logic signed [7:0] dout [NANT][2][LANES],
  output logic              dout_valid,
  output logic              dout_sof
);
  localparam int unsigned WORDS = DEPTH / LANES;
  localparam int unsigned AW    = $clog2(DEPTH);
  localparam int unsigned WW    = $clog2(WORDS);

  logic signed [7:0] mem [NANT][2][LANES][WORDS];
  logic [WW-1:0] wptr;

  always_ff @(posedge clk) begin
    if (rst) begin
      wptr       <= '0;
      dout_valid <= 1'b0;
      dout_sof   <= 1'b0;
    end else begin
      dout_valid <= din_valid;
      dout_sof   <= din_sof && din_valid;
      if (din_valid) wptr <= wptr + 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (din_valid) begin
      for (int a = 0; a < NANT; a++)
        for (int p = 0; p < 2; p++)
          for (int l = 0; l < LANES; l++) begin
            logic [AW-1:0] idx;
            mem[a][p][l][wptr] <= din[a][p][l];
            // sample index being written is wptr*LANES+l; read back the one
            // (LANES + 512 + delay) samples older
            idx = AW'({wptr, 2'(l)}) - AW'(LANES + 512) - AW'(signed'(delay[a]));
            dout[a][p][l] <= mem[a][p][idx[1:0]][idx[AW-1:2]];
          end
    end
  end
endmodule
