// Control unit of the streaming bitonic sorter.
//
// The whole pipeline runs every cycle, so all control follows from one free-running
// counter: cnt counts input cycles modulo N/p and is 0 in the first cycle of every N-key
// sequence slot at the sorter input. Every stage receives the position (cycle index
// within its sequence) of the keys now at its input, cnt minus the fixed latency from the
// sorter input to that stage. The comparison stages derive their directions from it and
// the permutation networks their lane connections and memory addresses (see cas_stage,
// spn, spn_agu), so no per-stage control memory is needed. The paper draws one control
// unit feeding every stage; what it sends is this design's choice.
//
// Interface: pos_cas[s] / pos_spn[s] are the positions at the inputs of comparison stage
// s and of the permutation network after it. in_pos is the position at the sorter input,
// out_pos the position of the keys at the sorter output. All are combinational from cnt.
module bitonic_ctrl
  import bitonic_pkg::*;
#(
  parameter int unsigned N_BITS    = 14,
  parameter int unsigned LANE_BITS = 2,
  localparam int unsigned PW = N_BITS - LANE_BITS,
  localparam int unsigned S  = num_stages(N_BITS)
) (
  input  logic          clk,
  input  logic          rst_n,
  output logic [PW-1:0] in_pos,
  output logic [PW-1:0] out_pos,
  output logic [PW-1:0] pos_cas [S],
  output logic [PW-1:0] pos_spn [S-1]
);
  logic [PW-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) cnt <= '0;
    else        cnt <= cnt + 1'b1;
  end

  assign in_pos  = cnt;
  assign out_pos = cnt - PW'(sorter_latency(N_BITS, LANE_BITS));

  for (genvar s = 0; s < S; s++) begin : g_stage
    localparam int LC = cas_in_latency(N_BITS, LANE_BITS, s);
    assign pos_cas[s] = cnt - PW'(LC);
    if (s + 1 < S) begin : g_spn
      assign pos_spn[s] = cnt - PW'(LC + CAS_LATENCY);
    end
  end
endmodule
