// tb_pps_sampler: a PPS whose edge falls at a given sub-clock phase must
// lock the phase half a period away and give one edge per pulse, at the
// same clock for every later pulse.
module tb_pps_sampler;
  logic clk = 0, rst = 1;
  always #5 clk = !clk;
  int checks = 0, failures = 0;
  logic [3:0] pps_ph = 0;
  logic recal = 0, pps_out, pps_edge, locked;
  logic [1:0] sel_phase;
  pps_sampler #(.NPH(4)) dut (.clk, .rst, .pps_ph, .recal, .pps_out, .pps_edge, .sel_phase, .locked);

  task automatic check(input logic c, input string m);
    checks++;
    if (!c) begin failures++; $display("FAIL %s at %0t", m, $time); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // one PPS pulse rising at phase e of clock 0, high for 20 clocks;
  // returns the clock (relative to the rising clock) where pps_edge was seen
  task automatic pulse(input int e, output int at);
    at = -1;
    for (int c = 0; c < 30; c++) begin
      @(negedge clk);
      if (c == 0) pps_ph = 4'hF << e;
      else if (c < 20) pps_ph = 4'hF;
      else pps_ph = 4'h0;
      @(posedge clk); #1;
      if (pps_edge) begin
        check(at == -1, "single edge per pulse");
        at = c;
      end
    end
  endtask

  initial begin
    int at0, at1;
    repeat (3) @(posedge clk);
    rst = 0;
    for (int e = 0; e < 4; e++) begin
      @(negedge clk) recal = 1;
      @(negedge clk) recal = 0;
      pulse(e, at0);
      check(locked, "locked after first pulse");
      check(sel_phase == 2'((e + 2) % 4), $sformatf("phase opposite edge %0d", e));
      pulse(e, at1);
      check(at1 >= 0, "edge reported");
      check(at1 == ((e + 2) % 4 >= e ? 0 : 1), $sformatf("edge clock for phase %0d: %0d", e, at1));
      // edge jitter of one phase either way keeps the same clock
      pulse((e + 1) % 4 == 0 ? e : e + 1, at0);
      if ((e + 1) % 4 != 0) check(at0 == at1, "no ambiguity under jitter");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
