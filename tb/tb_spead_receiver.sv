// tb_spead_receiver: the SPEAD formatter builds packets from random
// payloads, tuser values and header fields; the receiver must return the
// payload unchanged with the same tuser, tlast on the last word, and
// present the header fields (plus centre frequency = channel x 781250 Hz).
// Packet lengths equal to the payload and larger ones (tlast ends the
// packet) are both used. Finally a packet with a wrong magic number is
// fed directly and must set hdr_err.
module tb_spead_receiver;
  import lfaa_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = !clk;
  int checks = 0, failures = 0;

  logic [63:0] s_tdata, f_tdata, r_tdata, m_tdata, t_tdata;
  logic [31:0] s_tuser, pkt_counter, ref_time, packets_sent, m_tuser;
  logic s_tlast, s_tvalid = 0, s_tready, f_tlast, f_tvalid, f_tready, m_tlast, m_tvalid, m_tready;
  logic r_tlast, r_tvalid, r_tready, t_tlast, t_tvalid = 0, direct = 0;
  logic [47:0] pkt_len, timestamp;
  logic [7:0] subarray_id;
  logic [15:0] station_id, n_antennas;
  logic [31:0] o_pkt_counter, o_ref_time, packets_rcvd;
  logic [47:0] o_pkt_len, o_timestamp, o_center_freq;
  logic [7:0] o_subarray_id;
  logic [15:0] o_station_id, o_n_antennas;
  logic hdr_err;

  spead_formatter u_fmt (.clk, .rst, .s_tdata, .s_tuser, .s_tlast, .s_tvalid, .s_tready,
    .pkt_counter, .pkt_len, .ref_time, .timestamp, .subarray_id, .station_id, .n_antennas,
    .m_tdata(f_tdata), .m_tlast(f_tlast), .m_tvalid(f_tvalid), .m_tready(f_tready), .packets_sent);
  assign r_tdata  = direct ? t_tdata : f_tdata;
  assign r_tlast  = direct ? t_tlast : f_tlast;
  assign r_tvalid = direct ? t_tvalid : f_tvalid;
  assign f_tready = !direct && r_tready;
  spead_receiver dut (.clk, .rst, .s_tdata(r_tdata), .s_tlast(r_tlast), .s_tvalid(r_tvalid),
    .s_tready(r_tready), .m_tdata, .m_tuser, .m_tlast, .m_tvalid, .m_tready,
    .pkt_counter(o_pkt_counter), .pkt_len(o_pkt_len), .ref_time(o_ref_time),
    .timestamp(o_timestamp), .center_freq(o_center_freq), .subarray_id(o_subarray_id),
    .station_id(o_station_id), .n_antennas(o_n_antennas), .hdr_err, .packets_rcvd);

  task automatic check(input logic c, input string m);
    checks++;
    if (!c) begin failures++; if (failures < 10) $display("FAIL %s at %0t", m, $time); end
  endtask
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct { logic [63:0] d; logic [31:0] tu; bit last; } w_t;
  w_t q[$];
  int nout = 0;
  always @(posedge clk) if (!rst && m_tvalid && m_tready) begin
    w_t e;
    check(q.size() > 0, "unexpected word");
    if (q.size() > 0) begin
      e = q.pop_front();
      check(m_tdata == e.d && m_tuser == e.tu && m_tlast == e.last,
            $sformatf("word %0d: %h %h %0d vs %h %h %0d", nout, m_tdata, m_tuser, m_tlast, e.d, e.tu, e.last));
    end
    nout++;
  end
  always @(negedge clk) m_tready <= $urandom_range(0, 4) != 0;

  initial begin
    repeat (3) @(posedge clk);
    rst = 0;
    for (int p = 0; p < 12; p++) begin
      automatic int nw = $urandom_range(1, 30);
      automatic logic [31:0] tu = {3'b0, 29'($urandom)};
      pkt_counter = $urandom; ref_time = $urandom;
      pkt_len = (p % 2 == 0) ? 48'(nw * 8) : 48'(nw * 8 + 800);
      timestamp = {16'($urandom), $urandom}; subarray_id = 8'($urandom);
      station_id = 16'($urandom); n_antennas = 16'($urandom);
      for (int w = 0; w < nw; w++) begin
        automatic logic [63:0] d = {$urandom, $urandom};
        q.push_back('{d, tu, w == nw - 1});
        @(negedge clk);
        s_tvalid = 1; s_tdata = d; s_tuser = tu; s_tlast = (w == nw - 1);
        @(posedge clk);
        while (!s_tready) @(posedge clk);
      end
      @(negedge clk) s_tvalid = 0;
      wait (packets_rcvd == 32'(p + 1));
      @(negedge clk);
      check(o_pkt_counter == pkt_counter && o_pkt_len == pkt_len && o_ref_time == ref_time
            && o_timestamp == timestamp && o_subarray_id == subarray_id && o_station_id == station_id
            && o_n_antennas == n_antennas, "header fields");
      check(o_center_freq == 48'(tu[8:0]) * 48'd781250, "centre frequency");
      check(!hdr_err, "no header error");
    end
    check(q.size() == 0, "all payload received");
    // corrupted header, no items, one payload word
    direct = 1;
    @(negedge clk) t_tvalid = 1; t_tdata = 64'h5204020600000000; t_tlast = 0;
    q.push_back('{64'h1234, {3'b0, u_fmt.hdr[1][47:32], dut.beam, dut.phys}, 1});
    @(negedge clk) t_tdata = 64'h1234; t_tlast = 1;
    @(posedge clk);
    while (!r_tready) @(posedge clk);
    @(negedge clk) t_tvalid = 0;
    repeat (5) @(negedge clk);
    check(hdr_err, "bad magic flagged");
    check(packets_rcvd == 13 && q.size() == 0, "bad packet still delimited");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
