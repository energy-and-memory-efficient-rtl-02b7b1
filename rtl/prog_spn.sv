// Programmable streaming permutation network of the resource-efficient sorter.
//
// The same network is used for every one of the 2 log N distinct permutations between
// comparison stages; which one is selected at run time by the compared bits jf (stage
// the keys come from) and jt (stage they go to), see bitonic_pkg for the bit permutation
// "exchange bits 0 and jf, then bits 0 and jt". It has the three stages of the
// high-throughput network, but its memory is dual-port and double-buffered: p banks of
// 2N/p words, buffer wr_buf being written while buffer rd_buf is read.
//   write side (stage 0 + memory write): the p keys of write cycle wr_k go to banks
//     lane xor G(wr_k), each at address {wr_buf, wr_k};
//   read side (memory read + stage 2): in read cycle rd_k, output lane l' needs the key
//     written at position perm^-1({rd_k, l'}); its bank and address are computed here,
//     the addresses are scattered to the banks, and one cycle later the bank outputs are
//     routed back to the lanes.
// Both sides must use the same (jf, jt) for one buffer. The bank rule keeps every bank to
// one write and one read per cycle. The paper names the programmable network and its
// control widths; this realisation is this design's own.
//
// Timing: rd_key is valid in the cycle after rd_en.
module prog_spn
  import bitonic_pkg::*;
#(
  parameter int unsigned N_BITS    = 14,
  parameter int unsigned LANE_BITS = 2,
  parameter int unsigned W         = 32,
  localparam int unsigned P  = 1 << LANE_BITS,
  localparam int unsigned D  = N_BITS - LANE_BITS,
  localparam int unsigned JW = $clog2(N_BITS)
) (
  input  logic          clk,
  input  logic          wr_en,
  input  logic          wr_buf,
  input  logic [D-1:0]  wr_k,
  input  logic [JW-1:0] wr_jf,
  input  logic [JW-1:0] wr_jt,
  input  logic [W-1:0]  wr_key [P],
  input  logic          rd_en,
  input  logic          rd_buf,
  input  logic [D-1:0]  rd_k,
  input  logic [JW-1:0] rd_jf,
  input  logic [JW-1:0] rd_jt,
  output logic [W-1:0]  rd_key [P]
);
  typedef logic [LANE_BITS-1:0] lane_t;

  lane_t        sel0 [P];
  lane_t        sel2 [P];
  lane_t        sel2_q [P];
  logic [W-1:0] bank_wr [P];
  logic [W-1:0] bank_rd [P];
  logic [D:0]   raddr [P];

  // Write side: bank beta takes lane beta xor G(wr_k).
  always_comb begin
    int a, c;
    a = spn_pair_lane(LANE_BITS, int'(wr_jf), int'(wr_jt));
    c = spn_pair_time(LANE_BITS, int'(wr_jf), int'(wr_jt));
    for (int beta = 0; beta < int'(P); beta++) begin
      sel0[beta] = lane_t'(beta);
      if (a >= 0 && c >= 0 && c < int'(N_BITS))
        if (wr_k[c-int'(LANE_BITS)]) sel0[beta][a] = ~sel0[beta][a];
    end
  end

  spn_xbar #(.LANE_BITS(LANE_BITS), .WIDTH(W)) u_stage0 (
    .sel(sel0), .din(wr_key), .dout(bank_wr)
  );

  // Read side: bank and address of the key each output lane needs.
  always_comb begin
    int a, c;
    logic [N_BITS-1:0] yo, yi;
    a = spn_pair_lane(LANE_BITS, int'(rd_jf), int'(rd_jt));
    c = spn_pair_time(LANE_BITS, int'(rd_jf), int'(rd_jt));
    for (int beta = 0; beta < int'(P); beta++) raddr[beta] = '0;
    for (int l = 0; l < int'(P); l++) begin
      yo = {rd_k, lane_t'(l)};
      for (int m = 0; m < int'(N_BITS); m++) yi[m] = yo[spn_perm(m, int'(rd_jf), int'(rd_jt))];
      sel2[l] = yi[LANE_BITS-1:0];
      if (a >= 0 && c >= 0 && c < int'(N_BITS))
        if (yi[c]) sel2[l][a] = ~sel2[l][a];
    end
    // scatter: every bank is named by exactly one output lane
    for (int l = 0; l < int'(P); l++)
      for (int beta = 0; beta < int'(P); beta++)
        if (sel2[l] == lane_t'(beta)) begin
          yo = {rd_k, lane_t'(l)};
          for (int m = 0; m < int'(N_BITS); m++)
            yi[m] = yo[spn_perm(m, int'(rd_jf), int'(rd_jt))];
          raddr[beta] = {rd_buf, yi[N_BITS-1:LANE_BITS]};
        end
  end

  for (genvar beta = 0; beta < P; beta++) begin : g_bank
    dp_ram #(.DEPTH(2 << D), .WIDTH(W)) u_ram (
      .clk(clk), .we(wr_en), .waddr({wr_buf, wr_k}), .wdata(bank_wr[beta]),
      .re(rd_en), .raddr(raddr[beta]), .rdata(bank_rd[beta])
    );
  end

  always_ff @(posedge clk)
    if (rd_en) sel2_q <= sel2;

  spn_xbar #(.LANE_BITS(LANE_BITS), .WIDTH(W)) u_stage2 (
    .sel(sel2_q), .din(bank_rd), .dout(rd_key)
  );
endmodule
