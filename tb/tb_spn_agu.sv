// Test of the in-place address generation unit for the network that rotates position
// bits 0 -> 4 -> 3 -> 0 of an N = 32, p = 4 stream (lane bit 0 goes into the cycle index,
// cycle bit 3 into the lane index), 8-cycle sequences. The testbench models the four
// memory banks: in every cycle each bank writes the key of the current sequence at the
// address the unit gives, and the word read there must be the key of the previous
// sequence that the bank has to emit in this cycle. Which key that is follows from the
// bit permutation and the bank rule (bank = lane xor cycle bit 3 on lane bit 0), worked
// out here. Also checks that primed rises after the first complete sequence and that the
// unit runs through more than one address sequence.
module tb_spn_agu;
  localparam int LB = 2, P = 1 << LB, D = 3, T = 1 << D;
  localparam int SEQS = 40;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [D-1:0] k;
  logic [D-1:0] addr [P];
  logic         primed;
  int checks = 0, failures = 0, n_nonident = 0;

  spn_agu #(.LANE_BITS(LB), .J_FROM(4), .J_TO(3)) dut (
    .clk(clk), .rst_n(rst_n), .k(k), .addr(addr), .primed(primed)
  );

  // Input position (inside the 32-key block) of the key that leaves at output position yo:
  // undo "swap bits 0,3" then "swap bits 0,4".
  function automatic int swap_bits(int y, int i, int j);
    int bi, bj;
    bi = (y >> i) & 1; bj = (y >> j) & 1;
    y = y & ~(1 << i) & ~(1 << j);
    return y | (bi << j) | (bj << i);
  endfunction

  function automatic int bank_of(int y);
    return (y & (P - 1)) ^ ((y >> 3) & 1);
  endfunction

  int mem_seq [P][T];
  int mem_cyc [P][T];

  initial begin
    k = '0;
    for (int b = 0; b < P; b++) for (int a = 0; a < T; a++) mem_seq[b][a] = -1;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int s = 0; s < SEQS; s++) begin
      for (int c = 0; c < T; c++) begin
        k = D'(c);
        #1;
        if (s == 1 && c == 0) begin
          checks++;
          if (!primed) begin failures++; $display("FAIL primed low after first sequence"); end
        end
        if (s == 0) begin
          checks++;
          if (primed) begin failures++; $display("FAIL primed during first sequence"); end
        end
        for (int b = 0; b < P; b++) begin
          if (int'(addr[b]) != c) n_nonident++;
          if (s > 0) begin
            // the key bank b must emit in output cycle c
            int want;
            want = -1;
            for (int l = 0; l < P; l++) begin
              int yi;
              yi = swap_bits(swap_bits(c * P + l, 0, 3), 0, 4);
              if (bank_of(yi) == b) want = yi / P;
            end
            checks++;
            if (mem_seq[b][addr[b]] != s - 1 || mem_cyc[b][addr[b]] != want) begin
              failures++;
              if (failures < 10)
                $display("FAIL seq %0d cycle %0d bank %0d addr %0d holds (%0d,%0d) want (%0d,%0d)",
                         s, c, b, addr[b], mem_seq[b][addr[b]], mem_cyc[b][addr[b]], s - 1, want);
            end
          end
          mem_seq[b][addr[b]] = s;
          mem_cyc[b][addr[b]] = c;
        end
        @(negedge clk);
      end
    end
    checks++;
    if (n_nonident == 0) begin failures++; $display("FAIL addresses never left the identity"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (SEQS * T + 100) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
