// axis_fifo: synchronous first-in first-out buffer with valid/ready
// handshakes on both sides.
//
// DEPTH words of W bits (DEPTH a power of two). The head word is presented
// on m_data while m_valid is high (show-ahead); a word moves when valid and
// ready are both high. `count` is the fill level. Reset empties it.
// A single clock is used; where the original FIFOs also cross clock
// domains and change word width, this one does neither.
module axis_fifo #(
  parameter int unsigned W     = 64,
  parameter int unsigned DEPTH = 16
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic [W-1:0]             s_data,
  input  logic                     s_valid,
  output logic                     s_ready,
  output logic [W-1:0]             m_data,
  output logic                     m_valid,
  input  logic                     m_ready,
  output logic [$clog2(DEPTH):0]   count
);
  localparam int unsigned AW = $clog2(DEPTH);
  logic [W-1:0] mem [DEPTH];
  logic [AW-1:0] wp, rp;
  logic push, pop;

  assign s_ready = (count != (AW+1)'(DEPTH));
  assign m_valid = (count != '0);
  assign m_data  = mem[rp];
  assign push    = s_valid && s_ready;
  assign pop     = m_valid && m_ready;

  always_ff @(posedge clk) begin
    if (rst) begin
      wp    <= '0;
      rp    <= '0;
      count <= '0;
    end else begin
      if (push) wp <= wp + 1'b1;
      if (pop)  rp <= rp + 1'b1;
      count <= count + (AW+1)'(push) - (AW+1)'(pop);
    end
  end

  always_ff @(posedge clk)
    if (push) mem[wp] <= s_data;

  assert property (@(posedge clk) disable iff (rst) count <= (AW+1)'(DEPTH));
endmodule
