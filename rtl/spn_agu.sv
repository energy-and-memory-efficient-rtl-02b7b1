// Address generation unit (AGU) for the in-place permutation in time.
//
// Each memory bank of a streaming permutation network is a single-port memory of one
// sequence (T = 2^D words). In cycle k of a sequence the bank reads the word at address
// A_i[k], which holds the key the previous sequence must emit in cycle k, and writes the
// new key to the same word. If R is the permutation in time (the input cycle whose key is
// needed in output cycle k), the addresses of the next sequence are A_{i+1}[k] = A_i[R(k)],
// starting from A_0[k] = k. Powers of R repeat, so only a fixed number of address
// sequences occurs.
//
// For the bit permutations of this sorter R(k) = Q(k) xor c, where Q moves the bits of k
// and c is nonzero only in banks whose lane bit PAIR_LANE is 1 (and only on one bit).
// The AGU therefore keeps A_i[k] = Q^i(k) xor (bank bit ? w_i : 0): a table tab of D
// small entries (bit x of Q^i(k) is bit tab[x] of k) and one D-bit vector w_i, updated
// once per sequence. That is O(D log D) state, shared by all banks. The paper gives the
// recurrence A_i = P A_{i-1} and an AGU built from a ROM, sequential logic and a feedback
// multiplexer; the closed form with table and offset vector is this design's realisation
// (the reset value of the table plays the part of the ROM).
//
// Interface: k is the cycle index within the sequence, one new k per clock. addr[beta] is
// the address for bank beta in this cycle. The state advances after the cycle with
// k = T-1. primed goes high at the first sequence boundary that closes a complete
// sequence after reset; from then on every word read was written by the stream.
module spn_agu
  import bitonic_pkg::*;
#(
  parameter int unsigned LANE_BITS = 2,
  parameter int unsigned J_FROM    = 1,   // compared bit of the stage before the network
  parameter int unsigned J_TO      = 0,   // compared bit of the stage after the network
  localparam int unsigned P  = 1 << LANE_BITS,
  localparam int unsigned D  = spn_time_bits(LANE_BITS, J_FROM, J_TO) > 0 ?
                               spn_time_bits(LANE_BITS, J_FROM, J_TO) : 1,
  localparam int unsigned TW = (D > 1) ? $clog2(D) : 1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [D-1:0] k,
  output logic [D-1:0] addr [P],
  output logic         primed
);
  localparam int PAIR_LANE = spn_pair_lane(LANE_BITS, J_FROM, J_TO);
  localparam int PAIR_TIME = spn_pair_time(LANE_BITS, J_FROM, J_TO);
  localparam bit HAS_PAIR  = (PAIR_LANE >= 0) && (PAIR_TIME >= 0);
  localparam int PAIR_Z    = HAS_PAIR ? PAIR_TIME - int'(LANE_BITS) : 0;

  typedef logic [TW-1:0] tab_t [D];

  function automatic tab_t qsrc_table();
    tab_t t;
    for (int z = 0; z < int'(D); z++) t[z] = TW'(spn_qsrc(z, LANE_BITS, J_FROM, J_TO));
    return t;
  endfunction

  localparam tab_t QSRC = qsrc_table();

  tab_t         tab;
  logic [D-1:0] w;
  logic [D-1:0] base;
  logic         started;
  logic         wrap;

  assign wrap = (k == D'((1 << D) - 1));

  always_comb
    for (int x = 0; x < int'(D); x++) base[x] = k[tab[x]];

  always_comb
    for (int beta = 0; beta < int'(P); beta++) begin
      addr[beta] = base;
      if (HAS_PAIR && beta[PAIR_LANE]) addr[beta] = base ^ w;
    end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int x = 0; x < int'(D); x++) tab[x] <= TW'(x);
      w       <= '0;
      started <= 1'b0;
      primed  <= 1'b0;
    end else begin
      if (k == '0) started <= 1'b1;
      if (wrap) begin
        for (int x = 0; x < int'(D); x++) begin
          tab[x] <= QSRC[tab[x]];
          if (HAS_PAIR && int'(tab[x]) == PAIR_Z) w[x] <= ~w[x];
        end
        if (started) primed <= 1'b1;
      end
    end
  end
endmodule
