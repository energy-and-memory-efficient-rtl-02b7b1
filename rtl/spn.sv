// Streaming permutation network (SPN) between two comparison stages.
//
// The network reorders a stream of p keys per cycle: the key at stream position y =
// {cycle, lane} of an N-key sequence leaves at position y' = perm(y), where perm is the bit
// permutation "exchange bits 0 and J_FROM, then bits 0 and J_TO" (see bitonic_pkg). Bits
// above the highest moved bit M stay, so the network works on blocks of 2^(M+1) keys,
// i.e. T = 2^D cycles with D = M+1-log2 p.
//
// It is the three-stage structure folded from a Clos network:
//   stage 0  p-to-p connection: the key of lane l goes to memory bank l xor G(cycle);
//   stage 1  p single-port memory banks of T words (permutation in time), addressed
//            in place by the AGU: each cycle a bank emits the word of the previous block
//            and stores the new key in the same word;
//   stage 2  p-to-p connection: output lane l' takes the bank that holds the key for
//            position {cycle, l'}.
// When the permutation moves a lane bit a into the cycle index and a cycle bit c into the
// lane index, G(cycle) has the single bit a set to cycle bit c. Then the p keys of one
// input cycle go to p different banks, and so do the p keys of one output cycle, so no
// bank is ever asked for two words in a cycle. This bank assignment and the closed-form
// control are this design's own derivation for the bit permutations the sorter needs;
// the paper routes general permutations through the same three stages. When M < log2 p
// the permutation is spatial only and the network is a fixed lane wiring plus a register.
//
// Timing: keys enter every cycle with the position pos of their cycle; the permuted
// block leaves T+2 cycles later (1 cycle when spatial only), one block after the other
// with no gap. out_valid is the valid bit stored with the keys and is held low until the
// memories hold a complete block written after reset.
module spn
  import bitonic_pkg::*;
#(
  parameter int unsigned N_BITS    = 14,
  parameter int unsigned LANE_BITS = 2,
  parameter int unsigned W         = 32,
  parameter int unsigned J_FROM    = 1,
  parameter int unsigned J_TO      = 0,
  localparam int unsigned P  = 1 << LANE_BITS,
  localparam int unsigned PW = N_BITS - LANE_BITS
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [PW-1:0] pos,
  input  logic          in_valid,
  input  logic [W-1:0]  in_key  [P],
  output logic          out_valid,
  output logic [W-1:0]  out_key [P]
);
  localparam int unsigned D        = spn_time_bits(LANE_BITS, J_FROM, J_TO);
  localparam int          PAIR_LANE = spn_pair_lane(LANE_BITS, J_FROM, J_TO);
  localparam int          PAIR_TIME = spn_pair_time(LANE_BITS, J_FROM, J_TO);
  localparam bit          HAS_PAIR  = (PAIR_LANE >= 0) && (PAIR_TIME >= 0);

  typedef logic [LANE_BITS-1:0] lane_t;

  if (D == 0) begin : g_spatial
    // Only lane bits move: output lane l' takes input lane s with s[m] = l'[perm(m)].
    lane_t        sel [P];
    logic [W-1:0] perm_key [P];

    always_comb
      for (int l = 0; l < int'(P); l++)
        for (int m = 0; m < int'(LANE_BITS); m++)
          sel[l][m] = l[spn_perm(m, J_FROM, J_TO)];

    spn_xbar #(.LANE_BITS(LANE_BITS), .WIDTH(W)) u_wire (
      .sel(sel), .din(in_key), .dout(perm_key)
    );

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) out_valid <= 1'b0;
      else        out_valid <= in_valid;
    end

    always_ff @(posedge clk) out_key <= perm_key;

  end else begin : g_mem
    localparam int unsigned T   = 1 << D;
    localparam int unsigned YW  = D + LANE_BITS;   // bits of a position inside a block
    localparam int          PZ  = HAS_PAIR ? PAIR_TIME - int'(LANE_BITS) : 0;
    localparam int          PA  = HAS_PAIR ? PAIR_LANE : 0;

    logic [D-1:0] k, k_d;
    logic         primed, primed_d;
    lane_t        sel0 [P];
    lane_t        sel2 [P];
    logic [W:0]   lane_word [P];   // {valid, key}
    logic [W:0]   bank_wr   [P];
    logic [W:0]   bank_rd   [P];
    logic [W:0]   out_word  [P];
    logic [D-1:0] addr      [P];

    assign k = pos[D-1:0];

    // Stage 0: bank beta takes lane beta xor G(k).
    always_comb
      for (int beta = 0; beta < int'(P); beta++) begin
        sel0[beta] = lane_t'(beta);
        if (HAS_PAIR && k[PZ]) sel0[beta][PA] = ~sel0[beta][PA];
      end

    always_comb
      for (int l = 0; l < int'(P); l++) lane_word[l] = {in_valid, in_key[l]};

    spn_xbar #(.LANE_BITS(LANE_BITS), .WIDTH(W + 1)) u_stage0 (
      .sel(sel0), .din(lane_word), .dout(bank_wr)
    );

    // Stage 1: in-place permutation in time.
    spn_agu #(.LANE_BITS(LANE_BITS), .J_FROM(J_FROM), .J_TO(J_TO)) u_agu (
      .clk(clk), .rst_n(rst_n), .k(k), .addr(addr), .primed(primed)
    );

    for (genvar beta = 0; beta < P; beta++) begin : g_bank
      sp_ram #(.DEPTH(T), .WIDTH(W + 1)) u_ram (
        .clk(clk), .en(1'b1), .addr(addr[beta]), .wdata(bank_wr[beta]), .rdata(bank_rd[beta])
      );
    end

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        k_d      <= '0;
        primed_d <= 1'b0;
      end else begin
        k_d      <= k;
        primed_d <= primed;
      end
    end

    // Stage 2: output lane l' takes the bank of the key at input position perm^-1({k_d, l'}).
    always_comb
      for (int l = 0; l < int'(P); l++) begin
        logic [YW-1:0] yo, yi;
        yo = {k_d, lane_t'(l)};
        for (int m = 0; m < int'(YW); m++) yi[m] = yo[spn_perm(m, J_FROM, J_TO)];
        sel2[l] = yi[LANE_BITS-1:0];
        if (HAS_PAIR && yi[PAIR_TIME]) sel2[l][PA] = ~sel2[l][PA];
      end

    spn_xbar #(.LANE_BITS(LANE_BITS), .WIDTH(W + 1)) u_stage2 (
      .sel(sel2), .din(bank_rd), .dout(out_word)
    );

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) out_valid <= 1'b0;
      else        out_valid <= primed_d & out_word[0][W];
    end

    always_ff @(posedge clk)
      for (int l = 0; l < int'(P); l++) out_key[l] <= out_word[l][W-1:0];

    // All keys of one output cycle belong to the same block, so their valid bits agree.
    for (genvar l = 1; l < P; l++) begin : g_chk
      a_lane_valid: assert property (@(posedge clk) disable iff (!rst_n)
                                     primed_d |-> out_word[l][W] == out_word[0][W])
        else $error("spn: lanes of one output cycle disagree on valid");
    end
  end
endmodule
