// tb_delay_phase_gen: phases for random channels against k*tau/2^11 mod
// 4096 computed here, before and after delay-rate updates every UPDATE
// frames, for several antennas and beams.
module tb_delay_phase_gen;
  localparam int NA = 3, NB = 2, UPD = 4;
  logic clk = 0, rst = 1;
  always #5 clk = !clk;
  int checks = 0, failures = 0;
  logic frame_tick = 0, cfg_we = 0;
  logic [1:0] cfg_ant;
  logic [0:0] cfg_beam, req_beam;
  logic signed [19:0] cfg_tau0;
  logic signed [21:0] cfg_rate;
  logic [8:0] req_chan;
  logic [11:0] phase [NA];
  delay_phase_gen #(.NANT(NA), .NB(NB), .UPDATE(UPD)) dut (.clk, .rst, .frame_tick, .cfg_we, .cfg_ant,
    .cfg_beam, .cfg_tau0, .cfg_rate, .req_beam, .req_chan, .phase);

  task automatic check(input logic c, input string m);
    checks++;
    if (!c) begin failures++; if (failures < 10) $display("FAIL %s at %0t", m, $time); end
  endtask
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint acc [NA][NB], rate [NA][NB];   // delay in 2^-27 sample units

  function automatic int ref_phase(input int a, input int b, input int k);
    longint tau, p;
    tau = acc[a][b] >>> 14;
    p = longint'(k) * tau;
    p = (p + 1024) >>> 11;
    return int'(p & 4095);
  endfunction

  task automatic probe();
    for (int i = 0; i < 20; i++) begin
      @(negedge clk);
      req_beam = 1'($urandom % NB);
      req_chan = 9'($urandom % 512);
      if (i == 0) req_chan = 9'd511;
      @(posedge clk); #1;
      for (int a = 0; a < NA; a++)
        check(int'(phase[a]) == ref_phase(a, req_beam, req_chan),
              $sformatf("ant %0d beam %0d chan %0d: %0d vs %0d", a, req_beam, req_chan, phase[a],
                        ref_phase(a, req_beam, req_chan)));
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst = 0;
    for (int a = 0; a < NA; a++)
      for (int b = 0; b < NB; b++) begin
        @(negedge clk);
        cfg_we = 1; cfg_ant = 2'(a); cfg_beam = 1'(b);
        cfg_tau0 = 20'($urandom);
        cfg_rate = 22'($urandom);
        if (a == 0 && b == 0) begin cfg_tau0 = 20'sh7ffff; cfg_rate = 22'sh1fffff; end
        if (a == 1 && b == 1) begin cfg_tau0 = -20'sh80000; cfg_rate = -22'sh200000; end
        acc[a][b]  = longint'(cfg_tau0) <<< 14;
        rate[a][b] = longint'(cfg_rate);
      end
    @(negedge clk) cfg_we = 0;
    probe();
    for (int u = 0; u < 3; u++) begin
      for (int t = 0; t < UPD; t++) begin
        @(negedge clk) frame_tick = 1;
        @(negedge clk) frame_tick = 0;
      end
      for (int a = 0; a < NA; a++) for (int b = 0; b < NB; b++) begin
        acc[a][b] += rate[a][b];
        // 34-bit wrap
        acc[a][b] = (acc[a][b] << 30) >>> 30;
      end
      probe();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
