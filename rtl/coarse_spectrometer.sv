// coarse_spectrometer: integrated auto- or cross-power spectrum of two
// selected channelised signals, one value per coarse channel.
//
// `sel_a` and `sel_b` pick two of the NSIG channelised signals (the same
// one twice gives a total power spectrum). For every channel k the product
// A_k * conj(B_k) is accumulated in 64-bit registers over `integ_frames`
// frames, starting at a frame boundary. In the last frame the final sums
// are shifted right by `out_shift`, saturated to 32 bits and written to a
// read-out memory, so the previous spectrum stays readable until the new
// one is complete. `done` pulses after the last channel; `n_spectra`
// counts spectra. Read-out: `rd_addr` gives `rd_re`/`rd_im` one clock
// later. A new selection takes effect at the next integration.
//
// Following the design: auto or cross spectrum of arbitrary inputs at one
// channel resolution, 32-bit read-out. Own choices: accumulator width,
// output scaling, read port.
module coarse_spectrometer
  import lfaa_pkg::*;
#(
  parameter int unsigned NSIG = 16,
  parameter int unsigned NCH  = NCHAN
) (
  input  logic                     clk,
  input  logic                     rst,
  input  cplx18_t                  ch_data [NSIG],
  input  logic [$clog2(NCH)-1:0]   ch_idx,
  input  logic                     ch_valid,
  input  logic                     ch_sof,
  input  logic [$clog2(NSIG)-1:0]  sel_a,
  input  logic [$clog2(NSIG)-1:0]  sel_b,
  input  logic [31:0]              integ_frames,
  input  logic [5:0]               out_shift,
  input  logic [$clog2(NCH)-1:0]   rd_addr,
  output logic signed [31:0]       rd_re,
  output logic signed [31:0]       rd_im,
  output logic                     done,
  output logic [31:0]              n_spectra
);
  logic signed [63:0] acc_re [NCH];
  logic signed [63:0] acc_im [NCH];
  logic signed [31:0] res_re [NCH];
  logic signed [31:0] res_im [NCH];
  logic [31:0] fcnt, fcnt_now;
  logic active;
  logic [$clog2(NSIG)-1:0] a_q, b_q;

  assign fcnt_now = (ch_sof && active) ? ((fcnt == integ_frames - 1) ? '0 : fcnt + 1) :
                    (ch_sof ? '0 : fcnt);

  always_ff @(posedge clk) begin
    if (rst) begin
      active    <= 1'b0;
      fcnt      <= '0;
      done      <= 1'b0;
      n_spectra <= '0;
      a_q       <= '0;
      b_q       <= '0;
    end else begin
      done <= 1'b0;
      if (ch_valid && (active || ch_sof)) begin
        logic [$clog2(NSIG)-1:0] a, b;
        logic signed [63:0] pr, pim, sr, si;
        a = (ch_sof && fcnt_now == 0) ? sel_a : a_q;
        b = (ch_sof && fcnt_now == 0) ? sel_b : b_q;
        a_q    <= a;
        b_q    <= b;
        active <= 1'b1;
        fcnt   <= fcnt_now;
        pr  = 64'(ch_data[a].re) * 64'(ch_data[b].re) + 64'(ch_data[a].im) * 64'(ch_data[b].im);
        pim = 64'(ch_data[a].im) * 64'(ch_data[b].re) - 64'(ch_data[a].re) * 64'(ch_data[b].im);
        sr  = ((fcnt_now == 0) ? 64'sd0 : acc_re[ch_idx]) + pr;
        si  = ((fcnt_now == 0) ? 64'sd0 : acc_im[ch_idx]) + pim;
        acc_re[ch_idx] <= sr;
        acc_im[ch_idx] <= si;
        if (fcnt_now == integ_frames - 1) begin
          res_re[ch_idx] <= 32'(sat(sr >>> out_shift, 32));
          res_im[ch_idx] <= 32'(sat(si >>> out_shift, 32));
          if (ch_idx == $clog2(NCH)'(NCH - 1)) begin
            done      <= 1'b1;
            n_spectra <= n_spectra + 1'b1;
          end
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    rd_re <= res_re[rd_addr];
    rd_im <= res_im[rd_addr];
  end
endmodule
