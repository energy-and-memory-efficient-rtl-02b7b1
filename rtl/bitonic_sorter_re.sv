// Resource-efficient streaming bitonic sorter.
//
// Trades throughput for area: instead of one comparison stage per network stage it has a
// single stage of p/2 compare-and-swap units and one programmable permutation network
// (prog_spn) whose output is fed back to the comparison stage. An N-key sequence is
// loaded, then passes log N (log N + 1) / 2 times through the comparison stage; between
// passes the network reorders it for the next stage, the permutation being selected at
// run time. After the last pass the sorted keys leave p per cycle in natural order. The
// control unit (re_ctrl) sequences the passes. Memory is dual-port, two buffers of N keys.
//
// Interface: in_ready/in_valid accept one sequence of N/p cycles, key c*p+l in lane l of
// the c-th accepted cycle; a new sequence is accepted only after the previous one has left.
// out_valid holds for N/p consecutive cycles with the ascending result, out_sob on the
// first. A sequence takes N/p load cycles plus log N (log N + 1)/2 passes of N/p + 2
// cycles. The paper gives the structure (p/2 CAS units, programmable SPN, feedback, control
// unit); the buffering, pass timing and interface are this design's choices.
module bitonic_sorter_re
  import bitonic_pkg::*;
#(
  parameter int unsigned N_BITS    = 14,
  parameter int unsigned LANE_BITS = 2,
  parameter int unsigned W         = 32,
  localparam int unsigned P  = 1 << LANE_BITS,
  localparam int unsigned D  = N_BITS - LANE_BITS,
  localparam int unsigned JW = $clog2(N_BITS),
  localparam int unsigned IW = $clog2(N_BITS + 1)
) (
  input  logic         clk,
  input  logic         rst_n,
  output logic         in_ready,
  input  logic         in_valid,
  input  logic [W-1:0] in_key  [P],
  output logic         out_valid,
  output logic         out_sob,
  output logic [W-1:0] out_key [P]
);
  logic          rd_en, rd_buf, cas_en, wr_en, wr_from_input, wr_buf, out_en, out_first;
  logic [D-1:0]  rd_k, cas_k, wr_k;
  logic [JW-1:0] rd_jf, rd_jt, wr_jf, wr_jt;
  logic [IW-1:0] cas_phase;
  logic [W-1:0]  rd_key  [P];
  logic [W-1:0]  cas_key [P];
  logic [W-1:0]  wr_key  [P];
  logic [W-1:0]  lo [P/2];
  logic [W-1:0]  hi [P/2];
  logic          desc [P/2];

  re_ctrl #(.N_BITS(N_BITS), .LANE_BITS(LANE_BITS)) u_ctrl (
    .clk(clk), .rst_n(rst_n), .in_ready(in_ready), .in_valid(in_valid),
    .rd_en(rd_en), .rd_buf(rd_buf), .rd_k(rd_k), .rd_jf(rd_jf), .rd_jt(rd_jt),
    .cas_en(cas_en), .cas_k(cas_k), .cas_phase(cas_phase),
    .wr_en(wr_en), .wr_from_input(wr_from_input), .wr_buf(wr_buf), .wr_k(wr_k),
    .wr_jf(wr_jf), .wr_jt(wr_jt), .out_en(out_en), .out_first(out_first)
  );

  prog_spn #(.N_BITS(N_BITS), .LANE_BITS(LANE_BITS), .W(W)) u_spn (
    .clk(clk),
    .wr_en(wr_en), .wr_buf(wr_buf), .wr_k(wr_k), .wr_jf(wr_jf), .wr_jt(wr_jt), .wr_key(wr_key),
    .rd_en(rd_en), .rd_buf(rd_buf), .rd_k(rd_k), .rd_jf(rd_jf), .rd_jt(rd_jt), .rd_key(rd_key)
  );

  // The time-multiplexed comparison stage: pair k is descending when bit i (the merge
  // phase) of its stream position {cas_k, 2k} is 1; the last phase is all ascending.
  for (genvar k = 0; k < P / 2; k++) begin : g_pair
    always_comb begin
      logic [N_BITS:0] y;
      y = {1'b0, cas_k, LANE_BITS'(2 * k)};
      desc[k] = y[cas_phase];
    end
    cas_unit #(.W(W)) u_cas (
      .desc(desc[k]), .a(rd_key[2*k]), .b(rd_key[2*k+1]), .lo(lo[k]), .hi(hi[k])
    );
  end

  always_ff @(posedge clk)
    if (cas_en)
      for (int k = 0; k < int'(P / 2); k++) begin
        cas_key[2*k]   <= lo[k];
        cas_key[2*k+1] <= hi[k];
      end

  assign wr_key    = wr_from_input ? in_key : cas_key;
  assign out_valid = out_en;
  assign out_sob   = out_first;
  assign out_key   = cas_key;
endmodule
