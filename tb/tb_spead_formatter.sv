// tb_spead_formatter: sends payload packets with random tuser and header
// fields and checks every output word: the SPEAD header word
// 0x5304020600000008, the eight immediate items in order with their ids and
// values (heap counter, length, reference time, timestamp, centre frequency
// = physical channel x 781250 Hz, CSP channel and antenna info, sample
// offset), then the payload unchanged with tlast on the last word only.
// Packets are sent one at a time with changing fields and then back to
// back, with random valid gaps and output back-pressure.
module tb_spead_formatter;
  import lfaa_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = !clk;
  int checks = 0, failures = 0;

  logic [63:0] s_tdata, m_tdata;
  logic [31:0] s_tuser, pkt_counter, ref_time, packets_sent;
  logic s_tlast, s_tvalid = 0, s_tready, m_tlast, m_tvalid, m_tready;
  logic [47:0] pkt_len, timestamp;
  logic [7:0] subarray_id;
  logic [15:0] station_id, n_antennas;

  spead_formatter dut (.*);

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

  typedef struct { logic [63:0] d; bit last; } w_t;
  w_t q[$];
  int nout = 0, nstall = 0;
  always @(posedge clk) if (!rst) begin
    if (m_tvalid && !m_tready) nstall++;
    if (m_tvalid && m_tready) begin
      w_t e;
      check(q.size() > 0, "unexpected word");
      if (q.size() > 0) begin
        e = q.pop_front();
        check(m_tdata == e.d && m_tlast == e.last, $sformatf("word %0d: %h/%0d vs %h/%0d", nout,
              m_tdata, m_tlast, e.d, e.last));
      end
      nout++;
    end
  end
  always @(negedge clk) m_tready <= $urandom_range(0, 4) != 0;

  function automatic logic [63:0] it(input logic [14:0] id, input logic [47:0] v);
    return {1'b1, id, v};
  endfunction

  task automatic packet(input int nw, input bit wait_done);
    logic [31:0] tu = {3'b0, 7'b0, 22'($urandom)};
    logic [8:0] phys = 9'($urandom_range(0, 511));
    int n0 = packets_sent;
    tu[8:0] = phys;
    q.push_back('{64'h5304020600000008, 0});
    q.push_back('{it(15'h0001, {tu[28:13], pkt_counter}), 0});
    q.push_back('{it(15'h0004, pkt_len), 0});
    q.push_back('{it(15'h1027, {16'h0, ref_time}), 0});
    q.push_back('{it(15'h1600, timestamp), 0});
    q.push_back('{it(15'h1011, 48'(phys) * 48'd781250), 0});
    q.push_back('{it(15'h3000, {16'h0, 12'h0, tu[12:9], 7'h0, phys}), 0});
    q.push_back('{it(15'h3001, {8'h0, subarray_id, station_id, n_antennas}), 0});
    q.push_back('{it(15'h3300, 48'h0), 0});
    for (int w = 0; w < nw; w++) begin
      logic [63:0] d = {$urandom, $urandom};
      q.push_back('{d, w == nw - 1});
      @(negedge clk);
      while ($urandom_range(0, 3) == 0) begin s_tvalid = 0; @(negedge clk); end
      s_tvalid = 1; s_tdata = d; s_tuser = tu; s_tlast = (w == nw - 1);
      @(posedge clk);
      while (!s_tready) @(posedge clk);
    end
    @(negedge clk) s_tvalid = 0;
    if (wait_done) wait (packets_sent == n0 + 1);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst = 0;
    for (int p = 0; p < 10; p++) begin
      pkt_counter = $urandom; pkt_len = 48'($urandom); ref_time = $urandom;
      timestamp = {16'($urandom), $urandom}; subarray_id = 8'($urandom);
      station_id = 16'($urandom); n_antennas = 16'($urandom);
      packet($urandom_range(1, 40), 1);
    end
    for (int p = 0; p < 6; p++) packet(32, 0);
    wait (packets_sent == 16);
    repeat (20) @(posedge clk);
    check(q.size() == 0, $sformatf("%0d words missing", q.size()));
    check(nstall > 0, "back-pressure exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
