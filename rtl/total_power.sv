// total_power: per-input total power detector on the raw ADC samples.
//
// For each of NSIG signals the squares of all samples (LANES per clock)
// are summed over `integ_frames` frames, starting at a frame boundary.
// When the integration ends the sums appear on `power` (held until the
// next result), `pwr_valid` pulses and `n_results` counts results; the
// next integration starts at once, so no frame is lost. 48-bit sums hold
// several seconds of 8-bit samples at 800 MS/s. Latency: the result is
// presented on the clock after the last beat of the last frame.
//
// Following the design: one detector per ADC input, integration over a
// programmable number of frames (about 1 ms to seconds). Own choices:
// widths and the restart behaviour.
module total_power
  import lfaa_pkg::*;
#(
  parameter int unsigned NSIG      = 16,
  parameter int unsigned FRAME_LEN = FRAME_BEATS
) (
  input  logic              clk,
  input  logic              rst,
  input  logic signed [7:0] din [NSIG][LANES],
  input  logic              din_valid,
  input  logic              din_sof,
  input  logic [31:0]       integ_frames,
  output logic [47:0]       power [NSIG],
  output logic              pwr_valid,
  output logic [31:0]       n_results
);
  logic [47:0] acc [NSIG];
  logic [31:0] fcnt;
  logic [$clog2(FRAME_LEN)-1:0] beat;
  logic active, last_beat;

  assign last_beat = active && din_valid && (beat == $clog2(FRAME_LEN)'(FRAME_LEN - 1))
                     && (fcnt == integ_frames - 1);

  always_ff @(posedge clk) begin
    if (rst) begin
      active    <= 1'b0;
      fcnt      <= '0;
      beat      <= '0;
      pwr_valid <= 1'b0;
      n_results <= '0;
      for (int s = 0; s < NSIG; s++) begin
        acc[s]   <= '0;
        power[s] <= '0;
      end
    end else begin
      pwr_valid <= 1'b0;
      if (din_valid && (active || din_sof)) begin
        logic [$clog2(FRAME_LEN)-1:0] b;
        b = din_sof ? '0 : beat;
        active <= 1'b1;
        beat   <= (b == $clog2(FRAME_LEN)'(FRAME_LEN - 1)) ? '0 : b + 1'b1;
        if (din_sof && !active) fcnt <= '0;
        for (int s = 0; s < NSIG; s++) begin
          logic [47:0] sq;
          sq = '0;
          for (int l = 0; l < LANES; l++) sq += 48'(din[s][l] * din[s][l]);
          if (last_beat) begin
            power[s] <= acc[s] + sq;
            acc[s]   <= '0;
          end else begin
            acc[s] <= ((din_sof && !active) ? '0 : acc[s]) + sq;
          end
        end
        if (b == $clog2(FRAME_LEN)'(FRAME_LEN - 1))
          fcnt <= last_beat ? '0 : fcnt + 1'b1;
        if (last_beat) begin
          pwr_valid <= 1'b1;
          n_results <= n_results + 1'b1;
        end
      end
    end
  end
endmodule
