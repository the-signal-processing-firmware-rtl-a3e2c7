// station_beam_adder: adds this tile's partial beam to the travelling
// station beam packet coming from the previous tile in the chain.
//
// In the first tile of a chain (`first` high) the local packets are
// forwarded unchanged and the chain input is not used. In every other tile
// a word leaves only when both a local and a chain word are present; the
// four 16-bit components are added with saturation (`sat_count` counts
// saturated words). The local sideband goes with the sum; `m_last` follows
// the local packet, and a word whose chain and local packet ends disagree
// sets the sticky `align_err`. Combinational valid/ready path, no latency.
//
// Following the design: daisy-chained partial sums, first tile only
// forwards, 16+16 bit complex samples. Own choices: saturation and the
// alignment check.
module station_beam_adder
  import lfaa_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic       first,
  input  beam16_t    l_data,
  input  beam_user_t l_user,
  input  logic       l_last,
  input  logic       l_valid,
  output logic       l_ready,
  input  beam16_t    c_data,
  input  logic       c_last,
  input  logic       c_valid,
  output logic       c_ready,
  output beam16_t    m_data,
  output beam_user_t m_user,
  output logic       m_last,
  output logic       m_valid,
  input  logic       m_ready,
  output logic       align_err,
  output logic [31:0] sat_count
);
  function automatic logic signed [15:0] add16(input logic signed [15:0] a, input logic signed [15:0] b);
    return 16'(sat(64'(a) + 64'(b), 16));
  endfunction

  logic sat_now;
  always_comb begin
    m_user = l_user;
    m_last = l_last;
    if (first) begin
      m_data  = l_data;
      m_valid = l_valid;
      l_ready = m_ready;
      c_ready = 1'b0;
      sat_now = 1'b0;
    end else begin
      m_data.h.re = add16(l_data.h.re, c_data.h.re);
      m_data.h.im = add16(l_data.h.im, c_data.h.im);
      m_data.v.re = add16(l_data.v.re, c_data.v.re);
      m_data.v.im = add16(l_data.v.im, c_data.v.im);
      m_valid = l_valid && c_valid;
      l_ready = m_ready && c_valid;
      c_ready = m_ready && l_valid;
      sat_now = (17'(l_data.h.re) + 17'(c_data.h.re) != 17'(m_data.h.re))
             || (17'(l_data.h.im) + 17'(c_data.h.im) != 17'(m_data.h.im))
             || (17'(l_data.v.re) + 17'(c_data.v.re) != 17'(m_data.v.re))
             || (17'(l_data.v.im) + 17'(c_data.v.im) != 17'(m_data.v.im));
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      align_err <= 1'b0;
      sat_count <= '0;
    end else if (m_valid && m_ready && !first) begin
      if (l_last != c_last) align_err <= 1'b1;
      if (sat_now) sat_count <= sat_count + 1'b1;
    end
  end
endmodule
