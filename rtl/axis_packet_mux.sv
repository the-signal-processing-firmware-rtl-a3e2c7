// axis_packet_mux: merges two beam packet streams into one, NPKT whole
// packets at a time.
//
// When idle it takes the next run of NPKT packets from input 0 or 1,
// alternating when both are waiting, and stays on that input until the
// NPKT-th word with `last` has passed, so a run of packets that belongs
// together (all packets of one channel group for one CSP frame) is never
// interleaved with the other input. Combinational valid/ready path, no
// latency. Interface: AXI4-Stream style valid/ready with beam data,
// sideband and last.
module axis_packet_mux
  import lfaa_pkg::*;
#(
  parameter int unsigned NPKT = CSP_TIMES / PKT_TIMES
) (
  input  logic       clk,
  input  logic       rst,
  input  beam16_t    s_data  [2],
  input  beam_user_t s_user  [2],
  input  logic       s_last  [2],
  input  logic       s_valid [2],
  output logic       s_ready [2],
  output beam16_t    m_data,
  output beam_user_t m_user,
  output logic       m_last,
  output logic       m_valid,
  input  logic       m_ready
);
  logic locked, cur, prefer, sel;
  logic [$clog2(NPKT+1)-1:0] pcnt;

  always_comb begin
    if (locked)               sel = cur;
    else if (s_valid[prefer]) sel = prefer;
    else                      sel = !prefer;
    m_data     = s_data[sel];
    m_user     = s_user[sel];
    m_last     = s_last[sel];
    m_valid    = s_valid[sel];
    s_ready[0] = m_ready && (sel == 1'b0);
    s_ready[1] = m_ready && (sel == 1'b1);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      locked <= 1'b0;
      cur    <= 1'b0;
      prefer <= 1'b0;
      pcnt   <= '0;
    end else if (m_valid && m_ready) begin
      if (m_last && pcnt == $clog2(NPKT+1)'(NPKT - 1)) begin
        locked <= 1'b0;
        prefer <= !sel;
        pcnt   <= '0;
      end else begin
        locked <= 1'b1;
        cur    <= sel;
        if (m_last) pcnt <= pcnt + 1'b1;
      end
    end
  end
endmodule
