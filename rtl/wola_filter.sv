// wola_filter: oversampling polyphase (weight-overlap-add) filter for one
// real signal.
//
// Every input frame of M samples produces one output frame of N values,
// N > M, so successive transform windows overlap by N-M samples. For the
// window ending with the newest input sample, starting at sample s0, the
// output is
//   y[n] = sum_{k=0}^{TAPS-1} h[k*N + n] * x[s0 + k*N + n],  n = 0..N-1
// and it is emitted cyclically rotated, z[p] = y[(p - s0) mod N], which
// removes the phase rotation that a hop M != N puts on each channel; the
// FFT of z then gives the channels referenced to absolute sample time.
//
// Structure: the input history is held in HBANKS banks of N samples each,
// LANES samples per word. The TAPS samples that one output needs lie in
// TAPS different banks at the same word address, so each bank is read once
// per clock: these banks play the role of the chained N-sample delay
// blocks. Each clock produces LANES outputs from TAPS*LANES products (56
// multipliers at the default size). One frame needs N/LANES clocks, which
// must not exceed the gap between input frames; a frame that completes
// while the previous one is still being computed is dropped and counted
// in `overruns`. Outputs start after ceil(TAPS*N/M) input frames (filter
// preload). Output handshake: valid/ready; `dout_sof` marks the first word.
//
// Coefficients: a symmetric length TAPS*N low-pass prototype, cut off at
// half a channel spacing. The original filter is a designed equiripple
// response that is not tabulated; this RTL fills the ROM at elaboration
// with a Blackman-windowed sinc of the same length instead, and a real
// coefficient set can replace the initial block.
//
// Following the design: N=1024, M=864, 14 tap blocks, 4 samples per clock,
// one coefficient memory for all lanes, rotation before the FFT. Own
// choices: the banked history, the coefficient values, widths and scaling
// (18-bit coefficients, output = sum >> SHIFT, saturated to OW bits), and
// a single clock where the original uses a faster output clock.
`include "lfaa_trig.svh"

module wola_filter
  import lfaa_pkg::*;
#(
  parameter int unsigned N      = NFFT,
  parameter int unsigned M      = MHOP,
  parameter int unsigned TAPS   = NTAPS,
  parameter int unsigned HBANKS = 16,      // power of two, >= TAPS + ceil(M/N)
  parameter int unsigned CW     = 18,
  parameter int unsigned OW     = 16,
  parameter int unsigned SHIFT  = 12
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic signed [7:0]    din [LANES],
  input  logic                 din_valid,
  input  logic                 din_sof,
  output logic signed [OW-1:0] dout [LANES],
  output logic                 dout_valid,
  output logic                 dout_sof,
  input  logic                 dout_ready,
  output logic [15:0]          overruns
);
  localparam int unsigned NW    = N / LANES;          // words per bank
  localparam int unsigned HW    = HBANKS * NW;        // history words
  localparam int unsigned MW    = M / LANES;          // words per input frame
  localparam int unsigned PRE   = (TAPS * N + M - 1) / M;
  localparam int unsigned HAW   = $clog2(HW);
  localparam int unsigned NAW   = $clog2(NW);
  localparam int unsigned BAW   = $clog2(HBANKS);

  // history: [bank][word][lane]
  logic signed [7:0] hist [HBANKS][NW][LANES];
  // coefficient ROM: [tap block][index within block]
  logic signed [CW-1:0] coef [TAPS][N];

  // Blackman window times sinc((i - c) / N), c = (TAPS*N - 1) / 2, in Q30
  // integer arithmetic. d = 2 * (i - c) is odd, so never zero. The
  // prototype is symmetric, so only the first half is evaluated.
  initial begin
    longint d, w, v, c1, c2, sn;
    logic signed [CW-1:0] h;
    for (int i = 0; i < TAPS * N / 2; i++) begin
      d = 2 * longint'(i) - longint'(TAPS * N) + 1;
      `LFAA_COS30(c1, 2 * longint'(i) + 1, 2 * longint'(TAPS * N))
      `LFAA_SIN30(sn, d, 4 * longint'(N))
      c2 = ((c1 * c1) >>> 29) - (64'sd1 <<< 30);
      w = 64'sd450971566 - (c1 >>> 1) + ((64'sd85899346 * c2) >>> 30);
      v = (sn <<< 30) / ((d * 64'sd3373259426) / longint'(2 * N));
      h = CW'((((v * w) >>> 30) * ((64'sd1 <<< (CW - 1)) - 1) + (64'sd1 <<< 29)) >>> 30);
      coef[i / N][i % N] = h;
      coef[(TAPS * N - 1 - i) / N][(TAPS * N - 1 - i) % N] = h;
    end
  end

  logic [HAW-1:0] wptr;          // next history word to write
  logic [$clog2(MW)-1:0] beat;   // word within input frame
  logic [$clog2(PRE+1)-1:0] nfr; // frames received, saturating at PRE
  logic busy;
  logic [HAW-1:0] s0;            // first word of the window being computed
  logic [NAW-1:0] pb;            // output word index

  logic frame_done;
  assign frame_done = din_valid && ((din_sof && MW == 1) || (!din_sof && beat == MW - 1));

  // input side
  always_ff @(posedge clk) begin
    if (rst) begin
      wptr     <= '0;
      beat     <= '0;
      nfr      <= '0;
      overruns <= '0;
    end else if (din_valid) begin
      wptr <= wptr + 1'b1;
      beat <= din_sof ? ((MW == 1) ? '0 : 1) : ((beat == MW - 1) ? '0 : beat + 1'b1);
      if (frame_done) begin
        if (nfr < PRE) nfr <= nfr + 1'b1;
        if (busy && nfr >= PRE - 1) overruns <= overruns + 1'b1;
      end
    end
  end

  always_ff @(posedge clk)
    if (din_valid)
      for (int l = 0; l < LANES; l++)
        hist[wptr[HAW-1 -: BAW]][wptr[NAW-1:0]][l] <= din[l];

  // compute side
  logic [HAW-1:0] base;
  logic [NAW-1:0] nb;
  logic signed [OW-1:0] y [LANES];
  always_comb begin
    nb   = pb - s0[NAW-1:0];
    base = s0 + HAW'(nb);
    for (int l = 0; l < LANES; l++) begin
      logic signed [63:0] acc;
      acc = '0;
      for (int k = 0; k < TAPS; k++) begin
        logic [BAW-1:0] bank;
        bank = base[HAW-1 -: BAW] + BAW'(k);
        acc += 64'(hist[bank][base[NAW-1:0]][l]) * 64'(coef[k][{nb, 2'(l)}]);
      end
      y[l] = OW'(sat(rshift_round(acc, SHIFT), OW));
    end
  end

  logic advance;
  assign advance = busy && (!dout_valid || dout_ready);

  always_ff @(posedge clk) begin
    if (rst) begin
      busy       <= 1'b0;
      s0         <= '0;
      pb         <= '0;
      dout_valid <= 1'b0;
      dout_sof   <= 1'b0;
    end else begin
      if (dout_valid && dout_ready) begin
        dout_valid <= 1'b0;
        dout_sof   <= 1'b0;
      end
      if (advance) begin
        dout       <= y;
        dout_valid <= 1'b1;
        dout_sof   <= (pb == 0);
        pb         <= pb + 1'b1;
        if (pb == NAW'(NW - 1)) busy <= 1'b0;
      end
      if (frame_done && !busy && nfr >= PRE - 1) begin
        busy <= 1'b1;
        pb   <= '0;
        s0   <= wptr + 1'b1 - HAW'(TAPS * NW);
      end
    end
  end
endmodule
