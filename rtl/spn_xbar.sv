// p-to-p lane connection of a streaming permutation network (its stage 0 or stage 2):
// output lane l carries input lane sel[l]. Combinational. The network drives sel so that
// it is a permutation of the lanes in every cycle; the paper names this connection, its
// realisation as a selector per output lane is this design's choice.
module spn_xbar #(
  parameter int unsigned LANE_BITS = 2,
  parameter int unsigned WIDTH     = 33,
  localparam int unsigned P = 1 << LANE_BITS
) (
  input  logic [LANE_BITS-1:0] sel  [P],
  input  logic [WIDTH-1:0]     din  [P],
  output logic [WIDTH-1:0]     dout [P]
);
  always_comb
    for (int l = 0; l < int'(P); l++) dout[l] = din[sel[l]];
endmodule
