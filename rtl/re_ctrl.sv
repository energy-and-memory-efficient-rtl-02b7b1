// Control unit of the resource-efficient bitonic sorter.
//
// A finite-state machine runs one N-key sequence at a time through the single comparison
// stage and the programmable permutation network:
//   LOAD   takes N/p input cycles (in_valid & in_ready) and writes them in natural order
//          into buffer 0 (identity permutation);
//   PASS   for comparison stage s = 0 .. S-1 (S = log N (log N + 1) / 2) reads the
//          current buffer for N/p cycles through the network (permutation from the
//          layout of stage s-1 to that of stage s); two cycles later each read cycle
//          leaves the comparison stage and is written, already routed for stage s+1,
//          into the other buffer, or for the last stage sent to the output;
//   DRAIN  waits two cycles so that a pass has written everything before the next reads.
// The stage order (phase i, compared bit j) is stepped with two counters instead of a
// table: after bit 0 the next phase starts at bit i. The paper gives only the unit's
// place and its control widths; the sequencing is this design's choice.
//
// Outputs are the read controls (this cycle), the comparison-stage controls (one cycle
// later, registered here) and the write/output controls (two cycles later).
module re_ctrl
  import bitonic_pkg::*;
#(
  parameter int unsigned N_BITS    = 14,
  parameter int unsigned LANE_BITS = 2,
  localparam int unsigned D  = N_BITS - LANE_BITS,
  localparam int unsigned JW = $clog2(N_BITS),
  localparam int unsigned IW = $clog2(N_BITS + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  // input side
  output logic          in_ready,
  input  logic          in_valid,
  // network read side (this cycle)
  output logic          rd_en,
  output logic          rd_buf,
  output logic [D-1:0]  rd_k,
  output logic [JW-1:0] rd_jf,
  output logic [JW-1:0] rd_jt,
  // comparison stage (one cycle after the read)
  output logic          cas_en,
  output logic [D-1:0]  cas_k,
  output logic [IW-1:0] cas_phase,
  // network write side / output (two cycles after the read, or the input cycle in LOAD)
  output logic          wr_en,
  output logic          wr_from_input,
  output logic          wr_buf,
  output logic [D-1:0]  wr_k,
  output logic [JW-1:0] wr_jf,
  output logic [JW-1:0] wr_jt,
  output logic          out_en,
  output logic          out_first
);
  typedef enum logic [1:0] {LOAD, PASS, DRAIN} state_t;

  localparam logic [D-1:0] LAST_K = D'((1 << D) - 1);

  state_t        state;
  logic [D-1:0]  cnt;
  logic          dcnt;
  logic [IW-1:0] phase;      // merge phase i of the current pass
  logic [JW-1:0] cbit;       // compared bit j of the current pass
  logic [JW-1:0] pbit;       // compared bit of the previous pass (0 after LOAD)
  logic          rbuf;       // buffer read in this pass
  logic          last_pass;
  logic [IW-1:0] nphase;
  logic [JW-1:0] ncbit;

  // stage after the current one
  always_comb begin
    if (cbit == '0) begin
      nphase = phase + 1'b1;
      ncbit  = JW'(phase);
    end else begin
      nphase = phase;
      ncbit  = cbit - 1'b1;
    end
  end

  assign last_pass = (phase == IW'(N_BITS)) && (cbit == '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= LOAD;
      cnt   <= '0;
      dcnt  <= 1'b0;
      phase <= IW'(1);
      cbit  <= '0;
      pbit  <= '0;
      rbuf  <= 1'b0;
    end else begin
      case (state)
        LOAD: if (in_valid) begin
          cnt <= cnt + 1'b1;
          if (cnt == LAST_K) begin
            state <= PASS;
            phase <= IW'(1);
            cbit  <= '0;
            pbit  <= '0;
            rbuf  <= 1'b0;
          end
        end
        PASS: begin
          cnt <= cnt + 1'b1;
          if (cnt == LAST_K) begin
            state <= DRAIN;
            dcnt  <= 1'b0;
          end
        end
        default: begin    // DRAIN
          dcnt <= 1'b1;
          if (dcnt) begin
            if (last_pass) state <= LOAD;
            else begin
              state <= PASS;
              pbit  <= cbit;
              phase <= nphase;
              cbit  <= ncbit;
              rbuf  <= ~rbuf;
            end
          end
        end
      endcase
    end
  end

  assign in_ready   = (state == LOAD);
  assign rd_en      = (state == PASS);
  assign rd_buf     = rbuf;
  assign rd_k       = cnt;
  assign rd_jf      = pbit;
  assign rd_jt      = cbit;

  // pipeline of the pass: read -> comparison stage -> write / output
  logic         en1, en2;
  logic [D-1:0] k1, k2;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      en1 <= 1'b0;
      en2 <= 1'b0;
      k1  <= '0;
      k2  <= '0;
    end else begin
      en1 <= rd_en;
      en2 <= en1;
      k1  <= rd_k;
      k2  <= k1;
    end
  end

  assign cas_en    = en1;
  assign cas_k     = k1;
  assign cas_phase = phase;

  // phase/cbit stay fixed from the first read of a pass until two cycles after its last
  assign wr_from_input = (state == LOAD);
  assign wr_en         = (state == LOAD) ? in_valid : (en2 && !last_pass);
  assign wr_buf        = (state == LOAD) ? 1'b0 : ~rbuf;
  assign wr_k          = (state == LOAD) ? cnt : k2;
  assign wr_jf         = (state == LOAD) ? '0 : cbit;
  assign wr_jt         = (state == LOAD) ? '0 : ncbit;
  assign out_en        = en2 && last_pass && (state != LOAD);
  assign out_first     = out_en && (k2 == '0);
endmodule
