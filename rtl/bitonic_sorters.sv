// The two bitonic sorter architectures side by side, each with its own ports:
//   ht_*  high-throughput sorter (bitonic_sorter_ht): one comparison stage and one
//         streaming permutation network per network stage, p keys per cycle in and out
//         continuously, about 6N key words of single-port memory;
//   re_*  resource-efficient sorter (bitonic_sorter_re): one comparison stage of p/2 CAS
//         units and one programmable permutation network reused for every stage, one
//         sequence at a time, 2N key words of dual-port memory.
// They share only clock, reset and the size parameters. See the two modules for their
// interfaces and timing.
module bitonic_sorters #(
  parameter int unsigned N_BITS    = 14,  // log2 N, N = 16384
  parameter int unsigned LANE_BITS = 2,   // log2 p, p = 4
  parameter int unsigned W         = 32,  // key width
  localparam int unsigned P = 1 << LANE_BITS
) (
  input  logic         clk,
  input  logic         rst_n,
  // high-throughput sorter
  output logic         ht_in_sob,
  input  logic         ht_in_valid,
  input  logic [W-1:0] ht_in_key  [P],
  output logic         ht_out_valid,
  output logic         ht_out_sob,
  output logic [W-1:0] ht_out_key [P],
  // resource-efficient sorter
  output logic         re_in_ready,
  input  logic         re_in_valid,
  input  logic [W-1:0] re_in_key  [P],
  output logic         re_out_valid,
  output logic         re_out_sob,
  output logic [W-1:0] re_out_key [P]
);
  bitonic_sorter_ht #(.N_BITS(N_BITS), .LANE_BITS(LANE_BITS), .W(W)) u_ht (
    .clk(clk), .rst_n(rst_n), .in_sob(ht_in_sob), .in_valid(ht_in_valid), .in_key(ht_in_key),
    .out_valid(ht_out_valid), .out_sob(ht_out_sob), .out_key(ht_out_key)
  );

  bitonic_sorter_re #(.N_BITS(N_BITS), .LANE_BITS(LANE_BITS), .W(W)) u_re (
    .clk(clk), .rst_n(rst_n), .in_ready(re_in_ready), .in_valid(re_in_valid), .in_key(re_in_key),
    .out_valid(re_out_valid), .out_sob(re_out_sob), .out_key(re_out_key)
  );
endmodule
