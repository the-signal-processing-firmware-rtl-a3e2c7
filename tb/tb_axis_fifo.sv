// tb_axis_fifo: random pushes and pops against a queue model, including
// full and empty conditions.
module tb_axis_fifo;
  logic clk = 0, rst = 1;
  always #5 clk = !clk;
  int checks = 0, failures = 0;
  logic [15:0] s_data, m_data;
  logic s_valid = 0, s_ready, m_valid, m_ready = 0;
  logic [3:0] count;
  axis_fifo #(.W(16), .DEPTH(8)) dut (.clk, .rst, .s_data, .s_valid, .s_ready, .m_data, .m_valid, .m_ready, .count);
  logic [15:0] q[$];
  int full_seen = 0;

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

  initial begin
    repeat (3) @(posedge clk);
    rst = 0;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      s_valid = ($urandom % 4) < ((i / 500) % 2 ? 3 : 1);
      m_ready = ($urandom % 4) < ((i / 500) % 2 ? 1 : 3);
      s_data  = 16'($urandom);
      check(count == 4'(q.size()), "count");
      check(m_valid == (q.size() > 0), "m_valid");
      check(s_ready == (q.size() < 8), "s_ready");
      if (q.size() == 8) full_seen++;
      if (m_valid && q.size() > 0) check(m_data == q[0], "order");
      @(posedge clk);
      if (m_valid && m_ready) void'(q.pop_front());
      if (s_valid && s_ready) q.push_back(s_data);
    end
    check(full_seen > 0, "filled at least once");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
