// High-throughput streaming bitonic sorter.
//
// Sorts a continuous stream of N-key sequences (N = 2^N_BITS) arriving p = 2^LANE_BITS
// keys per cycle, and emits each sequence in ascending order at the same rate. The
// bitonic sorting network of log N (log N + 1) / 2 comparison stages is folded to width
// p: every stage is p/2 compare-and-swap units (cas_stage) followed by a streaming
// permutation network (spn) that reorders the stream for the next stage, and one control
// unit (bitonic_ctrl) drives all stages. The permutation networks use single-port
// memories addressed in place, one block per lane, about 6N key words in total. The last
// stage already delivers natural order, so it needs no network after it.
//
// Interface:
//   in_sob   high in the first cycle of each N/p-cycle input slot. A sequence must start
//            in such a cycle and hold in_valid for N/p consecutive cycles; in_key[l] in
//            cycle c of the slot is the key with index c*p + l. Sequences may follow one
//            another with no gap, or with whole idle slots between them.
//   out_*    the sorted sequence, key c*p + l of the result in lane l of the c-th output
//            cycle; out_sob marks the first cycle. Latency from in_sob to out_sob is
//            sorter_latency(N_BITS, LANE_BITS) cycles, about 6N/p.
// Keys are unsigned. The stage order, layout and permutation networks are described in
// bitonic_pkg and spn; the architecture follows the paper's high-throughput design, the
// stream protocol is this design's choice.
module bitonic_sorter_ht
  import bitonic_pkg::*;
#(
  parameter int unsigned N_BITS    = 14,  // log2 N, N = 16384
  parameter int unsigned LANE_BITS = 2,   // log2 p, p = 4
  parameter int unsigned W         = 32,  // key width
  localparam int unsigned P  = 1 << LANE_BITS,
  localparam int unsigned PW = N_BITS - LANE_BITS,
  localparam int unsigned S  = num_stages(N_BITS)
) (
  input  logic         clk,
  input  logic         rst_n,
  output logic         in_sob,
  input  logic         in_valid,
  input  logic [W-1:0] in_key  [P],
  output logic         out_valid,
  output logic         out_sob,
  output logic [W-1:0] out_key [P]
);
  logic [PW-1:0] in_pos, out_pos;
  logic [PW-1:0] pos_cas [S];
  logic [PW-1:0] pos_spn [S-1];

  logic         cas_in_valid  [S];
  logic [W-1:0] cas_in_key    [S][P];
  logic         cas_out_valid [S];
  logic [W-1:0] cas_out_key   [S][P];

  bitonic_ctrl #(.N_BITS(N_BITS), .LANE_BITS(LANE_BITS)) u_ctrl (
    .clk(clk), .rst_n(rst_n), .in_pos(in_pos), .out_pos(out_pos),
    .pos_cas(pos_cas), .pos_spn(pos_spn)
  );

  assign in_sob          = (in_pos == '0);
  assign cas_in_valid[0] = in_valid;
  assign cas_in_key[0]   = in_key;

  for (genvar s = 0; s < S; s++) begin : g_stage
    cas_stage #(
      .N_BITS(N_BITS), .LANE_BITS(LANE_BITS), .W(W),
      .PHASE(stage_phase(N_BITS, s)), .CBIT(stage_bit(N_BITS, s))
    ) u_cas (
      .clk(clk), .rst_n(rst_n), .pos(pos_cas[s]),
      .in_valid(cas_in_valid[s]), .in_key(cas_in_key[s]),
      .out_valid(cas_out_valid[s]), .out_key(cas_out_key[s])
    );

    if (s + 1 < S) begin : g_spn
      spn #(
        .N_BITS(N_BITS), .LANE_BITS(LANE_BITS), .W(W),
        .J_FROM(stage_bit(N_BITS, s)), .J_TO(stage_bit(N_BITS, s + 1))
      ) u_spn (
        .clk(clk), .rst_n(rst_n), .pos(pos_spn[s]),
        .in_valid(cas_out_valid[s]), .in_key(cas_out_key[s]),
        .out_valid(cas_in_valid[s+1]), .out_key(cas_in_key[s+1])
      );
    end
  end

  assign out_valid = cas_out_valid[S-1];
  assign out_key   = cas_out_key[S-1];
  assign out_sob   = out_valid && (out_pos == '0);

  // A sequence occupies one whole input slot: valid may only rise at a slot start and
  // only fall at the next slot start.
  logic in_valid_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) in_valid_q <= 1'b0;
    else        in_valid_q <= in_valid;
  end

  a_slot_valid: assert property (@(posedge clk) disable iff (!rst_n)
                                 !in_sob |-> in_valid == in_valid_q)
    else $error("bitonic_sorter_ht: in_valid changed inside a sequence slot");

  initial assert (N_BITS >= 2 && LANE_BITS >= 1 && LANE_BITS < N_BITS)
    else $error("bitonic_sorter_ht: need 2 <= p < N");
endmodule
