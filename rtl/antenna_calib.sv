// antenna_calib: calibration and delay correction of one antenna's two
// polarisations for one channel per clock.
//
// Three registered stages (latency 3 clocks, one sample per clock):
//  1. each 18-bit component is multiplied by 2^exp and shifted right by 7
//     with rounding, then saturated to 12 bits (exp = 0..7 is the 3-bit
//     exponent of the correction matrix);
//  2. the pair is rotated by exp(+j*2*pi*phase/4096) for the geometric
//     delay, using a 4096-entry cos/sin table with 1.0 = 2^14, rounded and
//     saturated to 12 bits;
//  3. the 2x2 complex correction matrix C (16+16 bit mantissas, 1.0 =
//     2^15) is applied, S_h = C_hh*A_h + C_hv*A_v, S_v = C_vh*A_h + C_vv*A_v,
//     and the results are rounded and saturated to 8+8 bits.
// Eight complex products for the matrix and two for the rotation per
// antenna, as in the design this follows.
//
// Following the design: operation order, 12-bit and 8-bit requantisation
// points, 3-bit exponent, 16+16 bit mantissa, 4096 phase steps. Own
// choices: the fixed-point positions, rounding and saturation.
`include "lfaa_trig.svh"

module antenna_calib
  import lfaa_pkg::*;
(
  input  logic        clk,
  input  cplx18_t     a_in [2],     // [0] = H, [1] = V
  input  logic [2:0]  expo,
  input  logic [11:0] phase,
  input  cplx16_t     jones [2][2], // [row][col], row 0 = H output
  output cplx8_t      s_out [2]
);
  // cos/sin table, 1.0 = 2^14
  logic signed [15:0] cos_t [4096];
  logic signed [15:0] sin_t [4096];
  initial begin
    longint c, s;
    for (int i = 0; i < 4096; i++) begin
      `LFAA_COS30(c, longint'(i), 64'sd4096)
      `LFAA_SIN30(s, longint'(i), 64'sd4096)
      cos_t[i] = 16'((c + (64'sd1 <<< 15)) >>> 16);
      sin_t[i] = 16'((s + (64'sd1 <<< 15)) >>> 16);
    end
  end

  function automatic logic signed [11:0] q12(input logic signed [63:0] x, input int unsigned s);
    return 12'(sat(rshift_round(x, s), 12));
  endfunction

  // stage 1
  cplx12_t a1 [2];
  logic [11:0] ph1;
  cplx16_t j1 [2][2], j2 [2][2];
  always_ff @(posedge clk) begin
    for (int p = 0; p < 2; p++) begin
      a1[p].re <= q12(64'(a_in[p].re) <<< expo, 7);
      a1[p].im <= q12(64'(a_in[p].im) <<< expo, 7);
    end
    ph1 <= phase;
    j1  <= jones;
  end

  // stage 2: phase rotation
  cplx12_t a2 [2];
  always_ff @(posedge clk) begin
    for (int p = 0; p < 2; p++) begin
      a2[p].re <= q12(64'(a1[p].re) * 64'(cos_t[ph1]) - 64'(a1[p].im) * 64'(sin_t[ph1]), 14);
      a2[p].im <= q12(64'(a1[p].re) * 64'(sin_t[ph1]) + 64'(a1[p].im) * 64'(cos_t[ph1]), 14);
    end
    j2 <= j1;
  end

  // stage 3: polarisation matrix
  always_ff @(posedge clk)
    for (int r = 0; r < 2; r++) begin
      logic signed [63:0] sr, si;
      sr = '0;
      si = '0;
      for (int c = 0; c < 2; c++) begin
        sr += 64'(j2[r][c].re) * 64'(a2[c].re) - 64'(j2[r][c].im) * 64'(a2[c].im);
        si += 64'(j2[r][c].re) * 64'(a2[c].im) + 64'(j2[r][c].im) * 64'(a2[c].re);
      end
      s_out[r].re <= 8'(sat(rshift_round(sr, 15), 8));
      s_out[r].im <= 8'(sat(rshift_round(si, 15), 8));
    end
endmodule
