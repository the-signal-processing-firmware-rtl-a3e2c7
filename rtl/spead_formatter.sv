// spead_formatter: wraps a payload stream into SPEAD-64-48 packets with the
// 72-byte header used for station beam data sent to the central signal
// processor.
//
// The payload arrives on an AXI4-Stream slave (64-bit tdata, 32-bit tuser,
// tlast ending a packet) and goes into a payload FIFO. When the first word
// of a packet reaches the head of that FIFO the header fields are taken
// from its tuser and from the dedicated inputs, and the nine header words
// are written into a header FIFO:
//   0  SPEAD header: magic 0x53, version 4, item id width 2, heap address
//      width 6, reserved 0, 8 items
//   1  0x0001 heap counter  = logical channel (tuser[28:13], 16 bit) and
//                             packet counter (32 bit)
//   2  0x0004 packet length = pkt_len (bytes)
//   3  0x1027 reference time = ref_time (Unix seconds, widened to 48 bit)
//   4  0x1600 timestamp      = timestamp (ns)
//   5  0x1011 centre frequency = tuser[8:0] * 781250 Hz, integer
//   6  0x3000 CSP channel info = reserved(16), beam id tuser[12:9] (16),
//                                physical channel tuser[8:0] (16)
//   7  0x3001 CSP antenna info = reserved(8), sub-array id (8),
//                                station id (16), contributing antennas (16)
//   8  0x3300 CSP sample vector = payload offset 0
// Every item word is immediate: bit 63 set, 15-bit id, 48-bit value. The
// controller then moves the header words and then the payload up to tlast
// into the output FIFO, which drives the AXI4-Stream master. Words are
// presented most significant byte first on the wire.
//
// Following the design: the three FIFOs, header assembly on the first
// valid word, field sources and widths, centre frequency calculation, item
// ids and order. Own choices: one clock domain and one word width
// throughout (the original FIFOs also convert clocks and widths), FIFO
// depths, and only the CSP header type is built (the original selects one
// of four header types at compile time).
module spead_formatter
  import lfaa_pkg::*;
#(
  parameter int unsigned PAY_DEPTH = 16,
  parameter int unsigned OUT_DEPTH = 16
) (
  input  logic        clk,
  input  logic        rst,
  input  logic [63:0] s_tdata,
  input  logic [31:0] s_tuser,
  input  logic        s_tlast,
  input  logic        s_tvalid,
  output logic        s_tready,
  input  logic [31:0] pkt_counter,
  input  logic [47:0] pkt_len,
  input  logic [31:0] ref_time,
  input  logic [47:0] timestamp,
  input  logic [7:0]  subarray_id,
  input  logic [15:0] station_id,
  input  logic [15:0] n_antennas,
  output logic [63:0] m_tdata,
  output logic        m_tlast,
  output logic        m_tvalid,
  input  logic        m_tready,
  output logic [31:0] packets_sent
);
  localparam int unsigned NHDR = SPEAD_CSP_ITEMS + 1;

  // payload FIFO
  logic [96:0] p_head;
  logic p_valid, p_ready;
  axis_fifo #(.W(97), .DEPTH(PAY_DEPTH)) u_pay (
    .clk, .rst,
    .s_data({s_tlast, s_tuser, s_tdata}), .s_valid(s_tvalid), .s_ready(s_tready),
    .m_data(p_head), .m_valid(p_valid), .m_ready(p_ready), .count()
  );

  // header FIFO
  logic [63:0] h_in, h_head;
  logic h_push, h_in_ready, h_valid, h_ready;
  axis_fifo #(.W(64), .DEPTH(16)) u_hdr (
    .clk, .rst,
    .s_data(h_in), .s_valid(h_push), .s_ready(h_in_ready),
    .m_data(h_head), .m_valid(h_valid), .m_ready(h_ready), .count()
  );

  // output FIFO
  logic [64:0] o_in, o_head;
  logic o_push, o_ready;
  axis_fifo #(.W(65), .DEPTH(OUT_DEPTH)) u_out (
    .clk, .rst,
    .s_data(o_in), .s_valid(o_push), .s_ready(o_ready),
    .m_data(o_head), .m_valid(m_tvalid), .m_ready(m_tready), .count()
  );
  assign m_tdata = o_head[63:0];
  assign m_tlast = o_head[64];

  typedef enum logic [1:0] {IDLE, BUILD, SEND_HDR, SEND_PAY} state_t;
  state_t state;
  logic [3:0] hcnt;
  logic [63:0] hdr [NHDR];

  always_comb begin
    h_in   = hdr[hcnt];
    h_push = (state == BUILD) && h_in_ready;
    h_ready = 1'b0;
    p_ready = 1'b0;
    o_push  = 1'b0;
    o_in    = '0;
    if (state == SEND_HDR) begin
      o_in    = {1'b0, h_head};
      o_push  = h_valid;
      h_ready = o_ready;
    end else if (state == SEND_PAY) begin
      o_in    = {p_head[96], p_head[63:0]};
      o_push  = p_valid;
      p_ready = o_ready;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state        <= IDLE;
      hcnt         <= '0;
      packets_sent <= '0;
    end else begin
      unique case (state)
        IDLE: if (p_valid) begin
          logic [15:0] lch;
          logic [8:0]  phys;
          lch  = p_head[64 + 28 -: 16];
          phys = p_head[64 + 8 -: 9];
          hdr[0] <= {SPEAD_MAGIC, SPEAD_VERSION, SPEAD_ITEM_W, SPEAD_ADDR_W, 16'h0000,
                     16'(SPEAD_CSP_ITEMS)};
          hdr[1] <= spead_item(ID_HEAP_CNT, {lch, pkt_counter});
          hdr[2] <= spead_item(ID_PKT_LEN, pkt_len);
          hdr[3] <= spead_item(ID_REF_TIME, {16'h0, ref_time});
          hdr[4] <= spead_item(ID_TIMESTAMP, timestamp);
          hdr[5] <= spead_item(ID_CENTER_FREQ, 48'(phys) * 48'(CHAN_SPACING_HZ));
          hdr[6] <= spead_item(ID_CSP_CHAN, {16'h0, 12'h0, p_head[64 + 12 -: 4], 7'h0, phys});
          hdr[7] <= spead_item(ID_CSP_ANT, {8'h0, subarray_id, station_id, n_antennas});
          hdr[8] <= spead_item(ID_CSP_SAMPLES, 48'h0);
          hcnt   <= '0;
          state  <= BUILD;
        end
        BUILD: if (h_push) begin
          hcnt <= hcnt + 1'b1;
          if (hcnt == 4'(NHDR - 1)) begin
            hcnt  <= '0;
            state <= SEND_HDR;
          end
        end
        SEND_HDR: if (h_valid && o_ready) begin
          hcnt <= hcnt + 1'b1;
          if (hcnt == 4'(NHDR - 1)) state <= SEND_PAY;
        end
        SEND_PAY: if (p_valid && o_ready && p_head[96]) begin
          state        <= IDLE;
          packets_sent <= packets_sent + 1'b1;
        end
        default: state <= IDLE;
      endcase
    end
  end
endmodule
