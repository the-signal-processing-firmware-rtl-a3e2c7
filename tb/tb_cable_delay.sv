// tb_cable_delay: each output sample must be the input sample
// 4 + 512 + delay samples older, for delays at both ends of the range and
// not multiples of four.
module tb_cable_delay;
  localparam int NANT = 4;
  logic clk = 0, rst = 1;
  always #5 clk = !clk;
  int checks = 0, failures = 0;
  logic signed [7:0] din [NANT][2][4], dout [NANT][2][4];
  logic din_valid = 0, din_sof = 0, dout_valid, dout_sof;
  logic signed [9:0] delay [NANT];
  cable_delay #(.NANT(NANT)) dut (.clk, .rst, .din, .din_valid, .din_sof, .delay, .dout, .dout_valid, .dout_sof);

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

  function automatic logic signed [7:0] val(input int a, input int p, input int s);
    return 8'((s * 7 + a * 31 + p * 101) ^ (s >> 8));
  endfunction

  initial begin
    int s;
    delay[0] = -512; delay[1] = 511; delay[2] = 37; delay[3] = -3;
    repeat (3) @(posedge clk);
    rst = 0;
    s = 0;
    for (int cyc = 0; cyc < 1200; cyc++) begin
      @(negedge clk);
      din_valid = (cyc % 5 != 3);
      for (int a = 0; a < NANT; a++) for (int p = 0; p < 2; p++) for (int l = 0; l < 4; l++)
        din[a][p][l] = val(a, p, s + l);
      @(posedge clk); #1;
      if (din_valid) begin
        check(dout_valid, "valid follows input");
        for (int a = 0; a < NANT; a++) for (int p = 0; p < 2; p++) for (int l = 0; l < 4; l++) begin
          int src;
          src = s + l - 4 - 512 - int'(delay[a]);
          if (src >= 0) check(dout[a][p][l] == val(a, p, src), $sformatf("ant %0d lane %0d", a, l));
        end
        s += 4;
      end else check(!dout_valid, "no valid in gap");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
