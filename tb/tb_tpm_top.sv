// tb_tpm_top: end-to-end test of the tile at reduced size (2 antennas per
// FPGA, 64-point channeliser with 48-sample hop and 4 taps, 32 channels,
// 16 beam slots, corner-turn blocks of 8 frames, packets of 4 times x 2
// channels, CSP frames of 8 samples).
//
// Stimulus: a PPS sampled at four phases, an ADC stream with one valid beat
// every 16 clocks plus random extra gaps, carrying a tone in channel 6 on
// every input with small noise, and a full-scale square-wave burst that
// overflows the channeliser output. Two sub-bands
// (channels 4..11 to beam 0, 16..23 to beam 1) fill the 16 slots.
//
// Phase 1, last tile of a chain: a neighbour tile's stream arrives on the
// chain input (small values, sometimes full scale), and SPEAD packets leave
// on the CSP output. Every CSP packet is parsed: SPEAD header word, item
// ids and order, packet length, centre frequency = channel x 781250 Hz,
// timestamps that advance by one block (8 frames x 1080 ns) per packet of
// the same channel, payload length. The tone channel must carry far more
// power than the others. Delay and calibration tables are rewritten while
// running.
// Phase 2, first tile: the station beam leaves on the chain output with
// packet ends every 8 words and the chain input is never taken.
//
// Each mechanism is counted (PPS lock, input gaps, channel overflow, chain
// add and saturation, CSP packets and back-pressure, table writes, total
// power, spectrum, channel capture, chain output and back-pressure) and the
// test fails if any count is zero. The error output must stay low.
module tb_tpm_top;
  import lfaa_pkg::*;
  localparam int NA = 2, NN = 64, MM = 48, NT = 4, NSLT = 16, TBL = 8, PT = 4, PC = 2, NP = 2;
  localparam int NCH = NN / 2, TONE = 6, FSH = 0;
  logic clk = 0, rst = 1;
  always #5 clk = !clk;
  int checks = 0, failures = 0;

  logic signed [7:0] adc_data [2][NA][2][LANES];
  logic adc_valid = 0;
  logic [3:0] pps_ph = 0;
  logic pps_recal = 0, arm = 0, sync_load = 0;
  logic [31:0] sync_value = 32'd1700000000, start_time;
  logic running;
  logic signed [9:0] cable_dly [2][NA];
  logic sub_en [NSUBBAND];
  logic [4:0] sub_start [NSUBBAND];
  logic [5:0] sub_nch [NSUBBAND];
  logic [2:0] sub_beam [NSUBBAND];
  logic cfg_fpga = 0, exp_we = 0, jw_we = 0, dly_we = 0;
  logic [0:0] exp_ant = 0, jw_ant = 0, dly_ant = 0;
  logic [1:0] exp_grp = 0;
  logic [2:0] exp_val = 0, dly_beam = 0;
  logic [3:0] jw_slot = 0;
  cplx16_t jw_val [2][2];
  logic signed [19:0] dly_tau0 = 0;
  logic signed [21:0] dly_rate = 0;
  logic chain_first = 0, chain_last = 1;
  beam16_t chain_in_data, chain_out_data;
  logic chain_in_last = 0, chain_in_valid = 0, chain_in_ready;
  beam_user_t chain_out_user;
  logic chain_out_last, chain_out_valid, chain_out_ready = 1;
  logic [3:0] csp_rq_shift = 0;
  logic [7:0] subarray_id = 8'd3;
  logic [15:0] station_id = 16'd345, n_antennas = 16'd256;
  logic [63:0] csp_tdata;
  logic csp_tlast, csp_tvalid, csp_tready = 1;
  logic [31:0] tp_integ_frames = 2;
  logic [47:0] tp_power [2][2*NA];
  logic [1:0] tp_valid;
  logic [1:0] sp_sel_a [2], sp_sel_b [2];
  logic [31:0] sp_integ_frames = 3;
  logic [5:0] sp_shift = 0;
  logic [4:0] sp_rd_addr = 0;
  logic signed [31:0] sp_rd_re [2], sp_rd_im [2];
  logic [1:0] sp_done;
  logic cap_enable = 1;
  logic [4:0] cap_chan = 5'(TONE), cap_shift = 4;
  logic [63:0] cap_tdata [2];
  logic [8:0] cap_tuser [2];
  logic [1:0] cap_tlast, cap_tvalid, cap_tready;
  logic [31:0] chan_ovf_count, station_sat_count, csp_packets;
  logic error;

  tpm_top #(.NANT_F(NA), .N(NN), .M(MM), .TAPS(NT), .HBANKS(8), .FFT_SHIFT(FSH), .NSL(NSLT), .TB(TBL),
            .PKT_T(PT), .PKT_C(PC), .NPKT(NP), .UPDATE(4), .CAP_T(4)) dut (.*);

  task automatic check(input logic c, input string m);
    checks++;
    if (!c) begin failures++; if (failures < 15) $display("FAIL %s at %0t", m, $time); end
  endtask
  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- mechanism counters
  int m_lock = 0, m_gap = 0, m_cfg = 0, m_chain_in = 0, m_csp = 0, m_csp_stall = 0, m_tp = 0;
  int m_spec = 0, m_cap = 0, m_cap_stall = 0, m_chain_out = 0, m_chain_out_stall = 0;
  int m_burst = 0, ovf1 = 0, sat1 = 0;

  // ---------------- PPS: period 6000 clocks, edge skewed across the phases
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;
  always @(negedge clk) begin
    automatic int ph = cyc % 6000;
    pps_ph <= (ph >= 1000 && ph < 1100) ? 4'b1111 : (ph == 999 ? 4'b1100 : 4'b0000);
  end
  logic run_q = 0;
  always @(posedge clk) begin
    run_q <= running;
    if (!rst && running && !run_q) m_lock++;
  end

  // ---------------- ADC: tone in channel TONE plus noise; bursts at full scale
  int nsamp = 0;
  bit burst = 0;
  int amp = 20;
  always @(negedge clk) begin
    automatic bit v = (cyc % 16 == 0) && ($urandom_range(0, 9) != 0);
    if (cyc % 16 == 0 && !v) m_gap++;
    adc_valid <= v;
    if (v) begin
      for (int l = 0; l < LANES; l++) begin
        automatic real x = real'(amp) * $cos(2.0 * 3.14159265358979 * TONE * (nsamp + l) / NN);
        // burst: full-scale square wave at the tone frequency
        if (burst) x = (x >= 0.0) ? 127.0 : -127.0;
        for (int f = 0; f < 2; f++)
          for (int a = 0; a < NA; a++)
            for (int p = 0; p < 2; p++) begin
              automatic int s = $rtoi(x) + (burst ? 0 : int'($urandom_range(0, 4)) - 2);
              if (s > 127) s = 127;
              if (s < -128) s = -128;
              adc_data[f][a][p][l] <= 8'(s);
            end
      end
      nsamp <= nsamp + LANES;
    end
  end

  // ---------------- chain input (phase 1): aligned packets of 8 words
  int cin_words = 0;
  beam16_t cin_next;
  always @(posedge clk) if (!rst && chain_in_valid && chain_in_ready) begin
    cin_words <= cin_words + 1;
    m_chain_in++;
  end
  always @(negedge clk) begin
    chain_in_valid <= !chain_first && ($urandom_range(0, 5) != 0);
    chain_in_last  <= ((cin_words % (PT * PC)) == PT * PC - 1);
    if ($urandom_range(0, 40) == 0) chain_in_data <= '{v: '{16'h7fff, 16'h7fff}, h: '{16'h7fff, 16'h8000}};
    else chain_in_data <= beam16_t'({4{16'($urandom_range(0, 6) - 3)}});
    csp_tready <= $urandom_range(0, 5) != 0;
    chain_out_ready <= $urandom_range(0, 5) != 0;
    cap_tready <= 2'($urandom);
  end

  // ---------------- CSP packet parser
  int wi = 0, nwords_pay = 0, cur_chan = 0;
  longint cur_ts = 0, cur_pow = 0, pow_tone = 0, pow_other = 0, n_tone = 0, n_other = 0;
  longint last_ts [NCH];
  logic [31:0] last_cnt = 0;
  bit seen [NCH];
  always @(posedge clk) if (!rst) begin
    if (csp_tvalid && !csp_tready) m_csp_stall++;
    if (csp_tvalid && csp_tready) begin
      if (wi == 0) check(csp_tdata == 64'h5304020600000008, $sformatf("SPEAD header %h", csp_tdata));
      else if (wi < 9) begin
        logic [14:0] ids [8] = '{15'h0001, 15'h0004, 15'h1027, 15'h1600, 15'h1011, 15'h3000, 15'h3001, 15'h3300};
        check(csp_tdata[63] && csp_tdata[62:48] == ids[wi - 1], $sformatf("item %0d id %h", wi, csp_tdata[62:48]));
        case (wi)
          1: begin
            if (m_csp > 0) check(csp_tdata[31:0] == last_cnt + 1, "packet counter");
            last_cnt <= csp_tdata[31:0];
          end
          2: check(csp_tdata[47:0] == 48'(NP * PT * 4), "packet length");
          3: check(csp_tdata[31:0] == start_time, "reference time");
          4: cur_ts = longint'(csp_tdata[47:0]);
          5: begin
            cur_chan = int'(csp_tdata[47:0] / 781250);
            check(csp_tdata[47:0] % 781250 == 0 && cur_chan < NCH, "centre frequency");
          end
          6: begin
            check(csp_tdata[8:0] == 9'(cur_chan), "channel info matches centre frequency");
            check((cur_ts - 7560) % 1080 == 0, "timestamp on a frame boundary");
            if (seen[cur_chan]) check(cur_ts - last_ts[cur_chan] == TBL * 1080,
                                      $sformatf("timestamp step chan %0d: %0d", cur_chan, cur_ts - last_ts[cur_chan]));
            seen[cur_chan] = 1;
            last_ts[cur_chan] = cur_ts;
          end
          7: check(csp_tdata[47:0] == {8'h0, 8'd3, 16'd345, 16'd256}, "antenna info");
          default: ;
        endcase
        cur_pow = 0;
        nwords_pay = 0;
      end else begin
        for (int b = 0; b < 8; b++) cur_pow += longint'($signed(csp_tdata[8*b +: 8])) ** 2;
        nwords_pay++;
      end
      check(csp_tlast == (wi == 9 + NP * PT / 2 - 1), "CSP tlast position");
      wi = csp_tlast ? 0 : wi + 1;
      if (csp_tlast) begin
        m_csp++;
        if (cur_chan == TONE) begin pow_tone += cur_pow; n_tone++; end
        else begin pow_other += cur_pow; n_other++; end
      end
    end
  end

  // ---------------- chain output (phase 2)
  int cout_words = 0;
  always @(posedge clk) if (!rst && chain_first) begin
    if (chain_out_valid && !chain_out_ready) m_chain_out_stall++;
    if (chain_out_valid && chain_out_ready) begin
      check(chain_out_last == (cout_words % (PT * PC) == PT * PC - 1), "chain output packet end");
      cout_words <= cout_words + 1;
      if (chain_out_last) m_chain_out++;
    end
    check(!(chain_in_ready && chain_in_valid), "chain input unused in first tile");
  end

  // ---------------- diagnostics
  always @(posedge clk) if (!rst) begin
    if (|tp_valid) m_tp++;
    if (|sp_done) m_spec++;
    for (int f = 0; f < 2; f++) begin
      if (cap_tvalid[f] && cap_tready[f] && cap_tlast[f]) begin
        m_cap++;
        check(cap_tuser[f] == 9'(TONE), "capture channel");
      end
      if (cap_tvalid[f] && !cap_tready[f]) m_cap_stall++;
    end
    if (running) check(!error, "error flag");
  end

  // channel amplitude seen at one channeliser output (reported)
  int ch_max = 0;
  int ch_max_idx = 0;
  always @(posedge clk) if (dut.g_fpga[0].ch_valid_a[0]) begin
    automatic int v = $signed(dut.g_fpga[0].ch_data[0][0].re);
    automatic int w = $signed(dut.g_fpga[0].ch_data[0][0].im);
    v = (v < 0 ? -v : v) + (w < 0 ? -w : w);
    if (!rst && running && v > ch_max) begin ch_max = v; ch_max_idx = dut.g_fpga[0].ch_idx_a[0]; end
  end

  // ---------------- configuration
  task automatic setup;
    for (int i = 0; i < NSUBBAND; i++) begin
      sub_en[i] = (i < 2); sub_start[i] = (i == 0) ? 5'd4 : 5'd16; sub_nch[i] = 6'd8; sub_beam[i] = 3'(i);
    end
    for (int f = 0; f < 2; f++) for (int a = 0; a < NA; a++) cable_dly[f][a] = 10'(f * 3 - a);
    for (int f = 0; f < 2; f++) begin sp_sel_a[f] = 2'(f); sp_sel_b[f] = 2'(f); end
  endtask

  task automatic write_tables(input int seed);
    for (int f = 0; f < 2; f++) begin
      cfg_fpga = 1'(f);
      for (int a = 0; a < NA; a++) begin
        @(negedge clk);
        dly_we = 1; dly_ant = 1'(a); dly_beam = 3'(seed % 2);
        dly_tau0 = 20'(seed * 100 - a * 50); dly_rate = 22'(seed * 1000);
        @(negedge clk) dly_we = 0;
        jw_we = 1; jw_ant = 1'(a); jw_slot = 4'(seed % 16);
        jw_val = '{'{'{16'h7fff, 16'h0}, '{16'h0, 16'h0}}, '{'{16'h0, 16'h0}, '{16'h7fff, 16'h0}}};
        @(negedge clk) jw_we = 0;
        exp_we = 1; exp_ant = 1'(a); exp_grp = 2'(TONE / 8); exp_val = 3'd1;
        @(negedge clk) exp_we = 0;
        m_cfg++;
      end
    end
  endtask

  task automatic frames(input int n);
    repeat (n * (MM / LANES) * 16) @(negedge clk);
  endtask

  initial begin
    setup();
    repeat (5) @(negedge clk);
    rst = 0;
    sync_load = 1;
    @(negedge clk) sync_load = 0; arm = 1;
    @(negedge clk) arm = 0;
    wait (running);
    check(start_time == 32'd1700000001, "start time is the second after the sync value");
    frames(14);
    write_tables(1);
    frames(6);
    burst = 1;
    m_burst++;
    frames(2);
    burst = 0;
    frames(6);
    write_tables(2);
    sp_sel_b[0] = 2'd1;   // cross spectrum from the next integration
    frames(24);
    $display("channel amplitude (|re|+|im|): max %0d in channel %0d", ch_max, ch_max_idx);
    $display("CSP power: tone %0d over %0d packets, others %0d over %0d", pow_tone, n_tone, pow_other, n_other);
    check(n_tone > 0 && n_other > 0 && pow_tone * n_other > 5 * pow_other * n_tone, "tone channel dominates");
    check(chan_ovf_count > 0, "channel overflow counted during the burst");
    check(station_sat_count > 0, "station adder saturation counted");
    ovf1 = chan_ovf_count;
    sat1 = station_sat_count;
    check(csp_packets == 32'(m_csp), "CSP packet count");

    // phase 2: first tile of a chain
    @(negedge clk) rst = 1; chain_first = 1; chain_last = 0;
    repeat (5) @(negedge clk);
    rst = 0;
    sync_load = 1;
    @(negedge clk) sync_load = 0; arm = 1;
    @(negedge clk) arm = 0;
    wait (running);
    frames(26);
    check(cout_words > 0 && cout_words % (PT * PC) <= PT * PC, "chain output words");

    check(m_lock == 2, "PPS start seen in both phases");
    check(m_gap > 0, "input gaps");
    check(m_cfg > 0, "table writes while running");
    check(m_chain_in > 0, "chain input added");
    check(m_csp >= 8, $sformatf("CSP packets %0d", m_csp));
    check(m_csp_stall > 0, "CSP back-pressure");
    check(m_tp > 0, "total power results");
    check(m_spec > 0, "spectra");
    check(m_cap > 0, "capture blocks");
    check(m_cap_stall > 0, "capture back-pressure");
    check(m_chain_out > 0, "chain output packets");
    check(m_chain_out_stall > 0, "chain output back-pressure");
    $display("mechanisms: lock %0d gaps %0d cfg %0d chain_in %0d csp %0d csp_stall %0d tp %0d spec %0d cap %0d cap_stall %0d chain_out %0d chain_out_stall %0d ovf %0d sat %0d",
             m_lock, m_gap, m_cfg, m_chain_in, m_csp, m_csp_stall, m_tp, m_spec, m_cap, m_cap_stall,
             m_chain_out, m_chain_out_stall, ovf1, sat1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
