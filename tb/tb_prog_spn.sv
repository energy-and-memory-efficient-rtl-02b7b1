// Test of the programmable permutation network for N = 32, p = 4. For each of several
// (jf, jt) programs, a block of 8 cycles of tagged keys is written into one buffer and
// read back through the network; output lane l' of read cycle k' must carry the key
// written at position perm^-1({k', l'}), computed here from the bit exchanges. Buffers
// alternate, and the next block is written while the previous one is read, so both ports
// work in the same cycles.
module tb_prog_spn;
  localparam int NB = 5, LB = 2, W = 12, P = 1 << LB, D = NB - LB, C = 1 << D;
  localparam int NPROG = 6;
  localparam int JF [NPROG] = '{0, 0, 1, 4, 3, 0};
  localparam int JT [NPROG] = '{0, 4, 0, 3, 2, 2};

  logic clk = 0;
  always #5 clk = ~clk;

  logic wr_en, wr_buf, rd_en, rd_buf;
  logic [D-1:0] wr_k, rd_k;
  logic [2:0] wr_jf, wr_jt, rd_jf, rd_jt;
  logic [W-1:0] wr_key [P];
  logic [W-1:0] rd_key [P];
  int checks = 0, failures = 0;

  prog_spn #(.N_BITS(NB), .LANE_BITS(LB), .W(W)) dut (
    .clk(clk), .wr_en(wr_en), .wr_buf(wr_buf), .wr_k(wr_k), .wr_jf(wr_jf), .wr_jt(wr_jt),
    .wr_key(wr_key), .rd_en(rd_en), .rd_buf(rd_buf), .rd_k(rd_k), .rd_jf(rd_jf),
    .rd_jt(rd_jt), .rd_key(rd_key)
  );

  function automatic int swap_bits(int y, int i, int j);
    int bi, bj;
    bi = (y >> i) & 1; bj = (y >> j) & 1;
    y = y & ~(1 << i) & ~(1 << j);
    return y | (bi << j) | (bj << i);
  endfunction

  // tag of a key: program number * 64 + position
  initial begin
    wr_en = 0; rd_en = 0; wr_buf = 0; rd_buf = 0; wr_k = '0; rd_k = '0;
    wr_jf = '0; wr_jt = '0; rd_jf = '0; rd_jt = '0;
    foreach (wr_key[l]) wr_key[l] = '0;
    @(negedge clk);
    // block g is written in slot g and read in slot g+1
    for (int g = 0; g <= NPROG; g++) begin
      for (int c = 0; c < C; c++) begin
        wr_en = (g < NPROG);
        if (g < NPROG) begin
          wr_buf = 1'(g); wr_k = D'(c); wr_jf = 3'(JF[g]); wr_jt = 3'(JT[g]);
          foreach (wr_key[l]) wr_key[l] = W'(g * 64 + c * P + l);
        end
        rd_en = (g > 0);
        if (g > 0) begin
          rd_buf = 1'(g - 1); rd_k = D'(c); rd_jf = 3'(JF[g-1]); rd_jt = 3'(JT[g-1]);
        end
        @(negedge clk);
        if (g > 0)
          for (int l = 0; l < P; l++) begin
            int src;
            src = swap_bits(swap_bits(c * P + l, 0, JT[g-1]), 0, JF[g-1]);
            checks++;
            if (rd_key[l] != W'((g - 1) * 64 + src)) begin
              failures++;
              $display("FAIL prog %0d cycle %0d lane %0d got %0d expected %0d", g - 1, c, l,
                       rd_key[l], (g - 1) * 64 + src);
            end
          end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (500) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
