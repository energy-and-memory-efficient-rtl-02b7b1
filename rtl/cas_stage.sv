// One comparison stage of the streaming bitonic sorter: p/2 CAS units working on the
// p lanes of every cycle, followed by a pipeline register (latency 1 cycle).
//
// Lanes 2k and 2k+1 form a pair. The stage compares index bit CBIT of merge phase PHASE
// (see bitonic_pkg for the data layout). A pair is sorted in descending order when bit
// PHASE of the keys' logical index is 1; in the stage's layout that bit equals bit PHASE
// of the stream position {pos, lane}, so it comes from the lane number when PHASE < b and
// from the cycle position pos otherwise. In the last phase (PHASE = n) every pair is
// ascending. The paper gives the CAS stage and its place in the pipeline; the layout and
// direction rule are the standard bitonic network in this design's stream layout.
//
// Interface: in_valid/in_key are taken every cycle; pos is the position (cycle index
// within the N-key sequence) of the keys now at the input, supplied by the control unit.
// out_valid/out_key follow one cycle later.
module cas_stage #(
  parameter int unsigned N_BITS    = 14,  // log2 N
  parameter int unsigned LANE_BITS = 2,   // log2 p
  parameter int unsigned W         = 32,  // key width
  parameter int unsigned PHASE     = 1,   // merge phase i, 1..N_BITS
  parameter int unsigned CBIT      = 0,   // compared index bit j, 0..PHASE-1
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
  logic [W-1:0] lo [P/2];
  logic [W-1:0] hi [P/2];
  logic         desc [P/2];

  for (genvar k = 0; k < P / 2; k++) begin : g_pair
    // Bit PHASE of the stream position of lane 2k.
    if (PHASE >= N_BITS) begin : g_last
      assign desc[k] = 1'b0;
    end else if (PHASE < LANE_BITS) begin : g_lane
      localparam logic [LANE_BITS-1:0] LANE = LANE_BITS'(2 * k);
      assign desc[k] = LANE[PHASE];
    end else begin : g_time
      assign desc[k] = pos[PHASE-LANE_BITS];
    end

    cas_unit #(.W(W)) u_cas (
      .desc(desc[k]), .a(in_key[2*k]), .b(in_key[2*k+1]), .lo(lo[k]), .hi(hi[k])
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= in_valid;
  end

  always_ff @(posedge clk) begin
    for (int k = 0; k < int'(P / 2); k++) begin
      out_key[2*k]   <= lo[k];
      out_key[2*k+1] <= hi[k];
    end
  end

  initial begin
    assert (PHASE >= 1 && PHASE <= N_BITS && CBIT < PHASE)
      else $error("cas_stage: CBIT must be below PHASE");
    assert (N_BITS > LANE_BITS && LANE_BITS >= 1)
      else $error("cas_stage: need 2 <= p < N");
  end
endmodule
