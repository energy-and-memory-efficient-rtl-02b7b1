// Test of the streaming permutation network in four configurations of an N = 32, p = 4
// stream: a lane-only rewiring (bits 1,0), a swap of a lane bit with the top cycle bit
// (bits 0,4), and two three-bit rotations between lane and cycle bits (bits 4,3 and 3,2).
// Every input key is tagged with its global stream index; the testbench computes, for each
// output slot, which input key must appear there (the bit permutation applied to the
// position inside its block) and the expected latency, and checks key, valid and timing.
// Valid is dropped for whole sequences now and then to check that the valid bit travels
// with the data. It also counts that some memory bank is read and written at an address
// other than the cycle index, i.e. that the in-place address sequences change.
module tb_spn;
  localparam int NB = 5, LB = 2, W = 12, P = 1 << LB, PW = NB - LB;
  localparam int NCFG = 4;
  localparam int JF [NCFG] = '{1, 0, 4, 3};
  localparam int JT [NCFG] = '{0, 4, 3, 2};
  localparam int CYCLES = 600;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [PW-1:0] pos;
  logic          in_valid;
  logic [W-1:0]  in_key [P];
  logic          out_valid [NCFG];
  logic [W-1:0]  out_key [NCFG][P];
  int checks = 0, failures = 0, n_moved_addr = 0, n_out = 0;
  int cyc = 0;
  bit valid_hist [CYCLES + 64];

  for (genvar g = 0; g < NCFG; g++) begin : g_dut
    spn #(.N_BITS(NB), .LANE_BITS(LB), .W(W), .J_FROM(JF[g]), .J_TO(JT[g])) dut (
      .clk(clk), .rst_n(rst_n), .pos(pos), .in_valid(in_valid), .in_key(in_key),
      .out_valid(out_valid[g]), .out_key(out_key[g])
    );
  end

  function automatic int swap_bits(int y, int i, int j);
    int bi, bj;
    bi = (y >> i) & 1; bj = (y >> j) & 1;
    y = y & ~(1 << i) & ~(1 << j);
    return y | (bi << j) | (bj << i);
  endfunction

  // Position inside the permutation block from which output position yo is taken.
  function automatic int src_pos(int yo, int g);
    return swap_bits(swap_bits(yo, 0, JT[g]), 0, JF[g]);
  endfunction

  function automatic int top_bit(int g);
    return (JF[g] > JT[g]) ? JF[g] : JT[g];
  endfunction

  function automatic int latency(int g);
    return (top_bit(g) < LB) ? 1 : (1 << (top_bit(g) + 1 - LB)) + 2;
  endfunction

  // Stimulus: positions from a free-running counter; keys tagged with c*P + l; valid off
  // during every fifth N/p-cycle sequence slot.
  initial begin
    pos = '0; in_valid = 0;
    foreach (in_key[l]) in_key[l] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (cyc = 0; cyc < CYCLES; cyc++) begin
      pos = PW'(cyc);
      in_valid = ((cyc / (1 << PW)) % 5 != 3);
      valid_hist[cyc] = in_valid;
      foreach (in_key[l]) in_key[l] = W'(cyc * P + l);
      @(posedge clk);
      #1;
      // check outputs produced by this edge (they belong to cycle cyc + 1 - latency)
      for (int g = 0; g < NCFG; g++) begin
        int oc, ob;
        oc = cyc + 1 - latency(g);          // output cycle index in input numbering
        if (oc >= 2 * (1 << PW)) begin      // past priming
          ob = oc * P;
          checks++;
          if (out_valid[g] != valid_hist[oc]) begin
            failures++;
            $display("FAIL cfg %0d cycle %0d valid %0d expected %0d", g, oc, out_valid[g],
                     valid_hist[oc]);
          end
          if (out_valid[g]) begin
            n_out++;
            for (int l = 0; l < P; l++) begin
              int yo, blk_mask, src;
              blk_mask = (2 << top_bit(g)) - 1;
              yo = ob + l;
              src = (yo & ~blk_mask) | src_pos(yo & blk_mask, g);
              checks++;
              if (out_key[g][l] != W'(src)) begin
                failures++;
                if (failures < 20)
                  $display("FAIL cfg %0d out slot %0d got %0d expected %0d", g, yo,
                           out_key[g][l], src);
              end
            end
          end
        end
      end
      if (g_dut[2].dut.g_mem.addr[0] != g_dut[2].dut.g_mem.k) n_moved_addr++;
      @(negedge clk);
    end
    checks++;
    if (n_moved_addr == 0) begin failures++; $display("FAIL in-place addresses never moved"); end
    checks++;
    if (n_out == 0) begin failures++; $display("FAIL no output"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (CYCLES + 200) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
