// fft_real: N-point FFT of one real frame, giving N/2 complex channels.
//
// Two consecutive real samples are packed as the real and imaginary part of
// one complex value, z[m] = x[2m] + j*x[2m+1], a complex FFT of size N/2 is
// computed, and channel k is separated from the bins k and N/2-k:
//   E = Z[k] + conj(Z[N/2-k]),  O = -j*(Z[k] - conj(Z[N/2-k]))
//   X[k] = (E + W^k * O) / 2,   W = exp(-2*pi*j/N)
// The complex FFT is a radix-2 decimation-in-frequency transform, computed
// in place in one frame buffer, one butterfly per clock, without scaling
// (FW-bit internal words). The result is then read in bit-reversed order.
//
// Interface: the frame enters LANES real samples per clock while
// `din_ready` is high (N/LANES beats, `din_sof` on the first). Channels
// leave one per clock, k = 0..N/2-1 with `ch_sof` on k = 0; channel 0 holds
// the DC term. Each output is the exact result shifted right by OSHIFT and
// rounded; a value that does not fit OW bits is saturated and flagged with
// `ch_ovf`, as monochromatic interference can overflow the last stages.
// A frame takes N/4 load + (N/4)*log2(N/2) butterfly + N/2 output clocks
// (3072 at N = 1024).
//
// Following the design: real-to-complex packing, N/2-point complex DIF
// transform, the channel separation stage, the overflow flag. Own choices:
// the iterative one-butterfly-per-clock schedule (the original is a
// pipelined radix-4 core processing four samples of two signals per clock,
// so it keeps up with one frame per 216 clocks and this block does not),
// widths and scaling.
`include "lfaa_trig.svh"

module fft_real
  import lfaa_pkg::*;
#(
  parameter int unsigned N      = NFFT,
  parameter int unsigned IW     = 16,
  parameter int unsigned FW     = 28,
  parameter int unsigned OW     = 18,
  parameter int unsigned TW     = 18,
  parameter int unsigned OSHIFT = 4
) (
  input  logic                        clk,
  input  logic                        rst,
  input  logic signed [IW-1:0]        din [LANES],
  input  logic                        din_valid,
  input  logic                        din_sof,
  output logic                        din_ready,
  output cplx18_t                     ch_data,
  output logic [$clog2(N/2)-1:0]      ch_idx,
  output logic                        ch_valid,
  output logic                        ch_sof,
  output logic                        ch_ovf
);
  localparam int unsigned NC  = N / 2;
  localparam int unsigned L   = $clog2(NC);
  localparam int unsigned CAW = L;            // complex buffer address width
  localparam int unsigned TS  = TW - 2;       // twiddle fraction bits (1.0 = 2^TS)

  typedef enum logic [1:0] {S_LOAD, S_FFT, S_OUT} state_t;
  state_t state;

  logic signed [FW-1:0] zr [NC];
  logic signed [FW-1:0] zi [NC];
  logic signed [TW-1:0] twc [NC];   // cos(2*pi*j/N)
  logic signed [TW-1:0] tws [NC];   // sin(2*pi*j/N)

  initial begin
    longint c, s;
    for (int j = 0; j < int'(NC); j++) begin
      `LFAA_COS30(c, longint'(j), longint'(N))
      `LFAA_SIN30(s, longint'(j), longint'(N))
      twc[j] = TW'((c + (64'sd1 <<< (29 - TS))) >>> (30 - TS));
      tws[j] = TW'((s + (64'sd1 <<< (29 - TS))) >>> (30 - TS));
    end
  end

  function automatic logic [CAW-1:0] bitrev(input logic [CAW-1:0] a);
    for (int i = 0; i < int'(CAW); i++) bitrev[i] = a[CAW-1-i];
  endfunction

  logic [CAW-1:0] cnt;              // load beat / butterfly / output index
  logic [$clog2(L+1)-1:0] stage;

  assign din_ready = (state == S_LOAD);

  // butterfly addressing
  logic [CAW-1:0] i0, i1, jj, half;
  logic [CAW-1:0] te;
  always_comb begin
    half = CAW'(NC >> (stage + 1));
    jj   = cnt & (half - 1'b1);
    i0   = ((cnt & ~(half - 1'b1)) << 1) | jj;
    i1   = i0 | half;
    te   = CAW'(jj << (stage + 1));
  end

  logic signed [FW-1:0] br0, bi0, br1, bi1;
  always_comb begin
    logic signed [FW:0] dr, di;
    logic signed [63:0] pr, pi_;
    dr = (FW+1)'(zr[i0]) - (FW+1)'(zr[i1]);
    di = (FW+1)'(zi[i0]) - (FW+1)'(zi[i1]);
    br0 = zr[i0] + zr[i1];
    bi0 = zi[i0] + zi[i1];
    pr  = 64'(dr) * 64'(twc[te]) + 64'(di) * 64'(tws[te]);
    pi_ = 64'(di) * 64'(twc[te]) - 64'(dr) * 64'(tws[te]);
    br1 = FW'(rshift_round(pr, TS));
    bi1 = FW'(rshift_round(pi_, TS));
  end

  // channel separation
  cplx18_t xk;
  logic    xovf;
  always_comb begin
    logic [CAW-1:0] ka, kb;
    logic signed [FW+1:0] er, ei, or_, oi;
    logic signed [63:0] xr, xi, sr, si;
    ka  = bitrev(cnt);
    kb  = bitrev(CAW'(NC) - cnt);           // (NC-k) mod NC
    er  = (FW+2)'(zr[ka]) + (FW+2)'(zr[kb]);
    ei  = (FW+2)'(zi[ka]) - (FW+2)'(zi[kb]);
    // -j*(A - conj(B)) = (Ai + Bi) - j(Ar - Br)
    or_ = (FW+2)'(zi[ka]) + (FW+2)'(zi[kb]);
    oi  = (FW+2)'(zr[kb]) - (FW+2)'(zr[ka]);
    xr  = (64'(er) <<< TS) + 64'(or_) * 64'(twc[cnt]) + 64'(oi) * 64'(tws[cnt]);
    xi  = (64'(ei) <<< TS) + 64'(oi) * 64'(twc[cnt]) - 64'(or_) * 64'(tws[cnt]);
    xr  = rshift_round(xr, TS + OSHIFT + 1);
    xi  = rshift_round(xi, TS + OSHIFT + 1);
    sr  = sat(xr, OW);
    si  = sat(xi, OW);
    xk.re = 18'(sr);
    xk.im = 18'(si);
    xovf  = (sr != xr) || (si != xi);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state    <= S_LOAD;
      cnt      <= '0;
      stage    <= '0;
      ch_valid <= 1'b0;
      ch_sof   <= 1'b0;
      ch_ovf   <= 1'b0;
      ch_idx   <= '0;
      ch_data  <= '0;
    end else begin
      ch_valid <= 1'b0;
      ch_sof   <= 1'b0;
      unique case (state)
        S_LOAD: if (din_valid) begin
          logic [CAW-1:0] b;
          b = din_sof ? '0 : cnt;
          zr[{b[CAW-2:0], 1'b0}] <= FW'(din[0]);
          zi[{b[CAW-2:0], 1'b0}] <= FW'(din[1]);
          zr[{b[CAW-2:0], 1'b1}] <= FW'(din[2]);
          zi[{b[CAW-2:0], 1'b1}] <= FW'(din[3]);
          cnt <= b + 1'b1;
          if (b == CAW'(N / LANES - 1)) begin
            state <= S_FFT;
            cnt   <= '0;
            stage <= '0;
          end
        end
        S_FFT: begin
          zr[i0] <= br0;
          zi[i0] <= bi0;
          zr[i1] <= br1;
          zi[i1] <= bi1;
          cnt <= cnt + 1'b1;
          if (cnt == CAW'(NC / 2 - 1)) begin
            cnt <= '0;
            if (stage == L - 1) state <= S_OUT;
            else stage <= stage + 1'b1;
          end
        end
        S_OUT: begin
          ch_data  <= xk;
          ch_ovf   <= xovf;
          ch_idx   <= cnt;
          ch_valid <= 1'b1;
          ch_sof   <= (cnt == 0);
          cnt      <= cnt + 1'b1;
          if (cnt == CAW'(NC - 1)) begin
            state <= S_LOAD;
            cnt   <= '0;
          end
        end
        default: state <= S_LOAD;
      endcase
    end
  end
endmodule
