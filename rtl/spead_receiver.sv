// spead_receiver: recovers payload and header fields from SPEAD-64-48
// packets of the kind built by spead_formatter.
//
// The first word of a packet is the SPEAD header; its low 16 bits give the
// number of item words that follow, and a wrong magic number or version
// sets `hdr_err` (the packet is still parsed). Each item word is decoded by
// its 15-bit id and the 48-bit value placed on the output that corresponds
// to the formatter's input: heap counter -> logical channel and packet
// counter, packet length, reference time, timestamp, centre frequency,
// CSP channel info -> beam and physical channel, CSP antenna info ->
// sub-array, station and antenna count. Unknown ids are skipped. These
// outputs change only while a header is read and are held for the
// payload. The payload words that follow are forwarded on the master
// interface with tuser rebuilt (logical channel 28..13, beam 12..9,
// physical channel 8..0); m_tlast is raised on the last word, given by the
// packet length (bytes / 8) or by the input tlast, whichever comes first.
// No latency on the payload path (combinational valid/ready).
//
// Following the design: header-driven reconstruction of tuser and of the
// dedicated outputs, payload length from the header. Own choices: one
// clock domain and word width (no FIFOs), the error flag.
module spead_receiver
  import lfaa_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic [63:0] s_tdata,
  input  logic        s_tlast,
  input  logic        s_tvalid,
  output logic        s_tready,
  output logic [63:0] m_tdata,
  output logic [31:0] m_tuser,
  output logic        m_tlast,
  output logic        m_tvalid,
  input  logic        m_tready,
  output logic [31:0] pkt_counter,
  output logic [47:0] pkt_len,
  output logic [31:0] ref_time,
  output logic [47:0] timestamp,
  output logic [47:0] center_freq,
  output logic [7:0]  subarray_id,
  output logic [15:0] station_id,
  output logic [15:0] n_antennas,
  output logic        hdr_err,
  output logic [31:0] packets_rcvd
);
  typedef enum logic [1:0] {HDR, ITEMS, PAY} state_t;
  state_t state;
  logic [15:0] nitems, icnt;
  logic [44:0] wcnt;
  logic [15:0] lch;
  logic [3:0]  beam;
  logic [8:0]  phys;

  logic last_word;
  assign last_word = s_tlast || (wcnt == pkt_len[47:3] - 1'b1);

  always_comb begin
    m_tdata  = s_tdata;
    m_tuser  = {3'b0, lch, beam, phys};
    m_tlast  = last_word;
    m_tvalid = (state == PAY) && s_tvalid;
    s_tready = (state == PAY) ? m_tready : 1'b1;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state        <= HDR;
      hdr_err      <= 1'b0;
      packets_rcvd <= '0;
      {nitems, icnt, wcnt} <= '0;
      {pkt_counter, pkt_len, ref_time, timestamp, center_freq} <= '0;
      {subarray_id, station_id, n_antennas, lch, beam, phys} <= '0;
    end else if (s_tvalid && s_tready) begin
      unique case (state)
        HDR: begin
          if (s_tdata[63:56] != SPEAD_MAGIC || s_tdata[55:48] != SPEAD_VERSION) hdr_err <= 1'b1;
          nitems <= s_tdata[15:0];
          icnt   <= '0;
          state  <= (s_tdata[15:0] == 0) ? PAY : ITEMS;
          wcnt   <= '0;
        end
        ITEMS: begin
          unique case (s_tdata[62:48])
            ID_HEAP_CNT:    begin lch <= s_tdata[47:32]; pkt_counter <= s_tdata[31:0]; end
            ID_PKT_LEN:     pkt_len     <= s_tdata[47:0];
            ID_REF_TIME:    ref_time    <= s_tdata[31:0];
            ID_TIMESTAMP:   timestamp   <= s_tdata[47:0];
            ID_CENTER_FREQ: center_freq <= s_tdata[47:0];
            ID_CSP_CHAN:    begin beam <= s_tdata[19:16]; phys <= s_tdata[8:0]; end
            ID_CSP_ANT:     begin subarray_id <= s_tdata[39:32]; station_id <= s_tdata[31:16];
                                  n_antennas <= s_tdata[15:0]; end
            default: ;
          endcase
          icnt <= icnt + 1'b1;
          if (icnt == nitems - 1'b1) state <= PAY;
        end
        PAY: begin
          wcnt <= wcnt + 1'b1;
          if (last_word) begin
            state        <= HDR;
            packets_rcvd <= packets_rcvd + 1'b1;
          end
        end
        default: state <= HDR;
      endcase
    end
  end
endmodule
