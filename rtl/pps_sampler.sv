// pps_sampler: recovers the PPS edge from a signal sampled at several clock
// phases, choosing a phase far from where the edge falls.
//
// The PPS has an arbitrary phase relative to the processing clock. An
// external deserializer samples it NPH times per clock period and presents
// the NPH samples each clock in `pps_ph` (bit 0 is the earliest phase). On
// the first rising edge after `recal` (and after reset) the module finds
// the phase at which the edge appeared and selects the phase half a clock
// period away from it; from then on the PPS used by the design is the
// signal seen at that selected phase, so a later edge that jitters around
// its original position can no longer move by a whole clock. `pps_out` is
// the selected sample (registered, one clock latency), `pps_edge` pulses on
// its rising edge, `sel_phase` shows the choice and `locked` that one has
// been made.
//
// Following the design: sampling the PPS several times per clock period and
// choosing an unambiguous phase. Own choices: the number of phases, the
// "half a period away" rule and the recal input.
module pps_sampler #(
  parameter int unsigned NPH = 4
) (
  input  logic                   clk,
  input  logic                   rst,
  input  logic [NPH-1:0]         pps_ph,
  input  logic                   recal,
  output logic                   pps_out,
  output logic                   pps_edge,
  output logic [$clog2(NPH)-1:0] sel_phase,
  output logic                   locked
);
  localparam int unsigned PW = $clog2(NPH);
  logic prev_last;     // last phase of previous clock
  logic rise_any;
  logic [PW-1:0] edge_ph;

  // position of the first 0->1 transition in {pps_ph, prev_last}
  always_comb begin
    rise_any = 1'b0;
    edge_ph  = '0;
    for (int i = NPH - 1; i >= 0; i--) begin
      logic prv;
      prv = (i == 0) ? prev_last : pps_ph[i-1];
      if (pps_ph[i] && !prv) begin
        rise_any = 1'b1;
        edge_ph  = PW'(i);
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      prev_last <= 1'b0;
      pps_out   <= 1'b0;
      pps_edge  <= 1'b0;
      sel_phase <= '0;
      locked    <= 1'b0;
    end else begin
      prev_last <= pps_ph[NPH-1];
      if (recal) locked <= 1'b0;
      else if (!locked && rise_any) begin
        sel_phase <= PW'(edge_ph + PW'(NPH / 2));
        locked    <= 1'b1;
      end
      pps_out  <= locked ? pps_ph[sel_phase] : 1'b0;
      pps_edge <= locked && pps_ph[sel_phase] && !pps_out;
    end
  end
endmodule
