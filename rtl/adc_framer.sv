// adc_framer: cuts the aligned ADC sample stream into frames and keeps the
// observation time counters.
//
// Samples arrive LANES per clock for NSIG signals. After `arm` the framer
// waits for the next PPS rising edge; the first valid beat at or after
// that edge carries the first sample of frame 0. From then on every FRAME_BEATS
// valid beats form one frame (864 samples, 1080 ns), marked by `sof` on its
// first beat. `frame_num` counts frames from zero, `time_stamp` counts ns
// since the first sample (5 ns per beat), `sync_time` holds UTC seconds
// (loaded by software, incremented on every PPS rising edge) and
// `start_time` is the sync_time captured when framing starts. The frame
// time is then start_time + t1 + frame_num * 1080 ns, as in the design this
// follows. Output data, sof and counters are registered: one clock latency.
//
// Following the design: frame length, PPS alignment, the two counters and
// the start_time copy. Own choices: the load port of sync_time, which
// value is copied (the second that starts at the aligning edge), a
// synchronous active-high reset, and the `adc_valid` qualifier.
module adc_framer
  import lfaa_pkg::*;
#(
  parameter int unsigned NSIG        = 16,
  parameter int unsigned FRAME_LEN   = FRAME_BEATS,
  parameter int unsigned NS_PER_CLK  = NS_PER_BEAT
) (
  input  logic              clk,
  input  logic              rst,
  input  logic signed [7:0] adc_data [NSIG][LANES],
  input  logic              adc_valid,
  input  logic              pps,            // PPS already sampled in this clock domain
  input  logic              arm,            // start an observation at the next PPS edge
  input  logic              sync_load,
  input  logic [31:0]       sync_value,
  output logic signed [7:0] dout [NSIG][LANES],
  output logic              dout_valid,
  output logic              sof,
  output logic [31:0]       frame_num,
  output logic [47:0]       time_stamp,
  output logic [31:0]       sync_time,
  output logic [31:0]       start_time,
  output logic              running
);
  logic pps_d, pps_rise, armed, pps_hit;
  logic [$clog2(FRAME_LEN)-1:0] beat;

  assign pps_rise = pps && !pps_d;

  always_ff @(posedge clk) begin
    if (rst) begin
      pps_d      <= 1'b0;
      armed      <= 1'b0;
      pps_hit    <= 1'b0;
      running    <= 1'b0;
      sync_time  <= '0;
      start_time <= '0;
      beat       <= '0;
      dout_valid <= 1'b0;
      sof        <= 1'b0;
      frame_num  <= '0;
      time_stamp <= '0;
    end else begin
      pps_d <= pps;
      if (sync_load)     sync_time <= sync_value;
      else if (pps_rise) sync_time <= sync_time + 32'd1;

      if (arm && !running) armed <= 1'b1;
      if (armed && !running && pps_rise) pps_hit <= 1'b1;

      dout       <= adc_data;
      dout_valid <= 1'b0;
      sof        <= 1'b0;

      if (armed && !running && (pps_rise || pps_hit) && adc_valid) begin
        // first beat of the observation
        armed      <= 1'b0;
        pps_hit    <= 1'b0;
        running    <= 1'b1;
        start_time <= pps_rise ? sync_time + 32'd1 : sync_time;
        dout_valid <= 1'b1;
        sof        <= 1'b1;
        frame_num  <= '0;
        time_stamp <= '0;
        beat       <= (FRAME_LEN == 1) ? '0 : 1;
      end else if (running && adc_valid) begin
        dout_valid <= 1'b1;
        time_stamp <= time_stamp + 48'(NS_PER_CLK);
        if (beat == 0) begin
          sof       <= 1'b1;
          frame_num <= frame_num + 32'd1;
        end
        beat <= (beat == FRAME_LEN - 1) ? '0 : beat + 1'b1;
      end
    end
  end
endmodule
