// Test of the resource-efficient sorter's control unit for N = 32, p = 4 (8 cycles per
// pass, 15 passes). Loads one sequence with a pause, then follows the schedule: the read
// side must step through cycles 0..7 of each pass with the (previous bit, current bit)
// program of the stage list worked out here, the buffers must alternate, the writes must
// follow the reads by two cycles with the (current bit, next bit) program, no write may
// happen in the last pass, and the output enable must cover exactly the 8 cycles of the
// last pass two cycles after its reads; afterwards the unit must be ready again.
module tb_re_ctrl;
  localparam int NB = 5, LB = 2, D = NB - LB, C = 1 << D, S = NB * (NB + 1) / 2;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic in_ready, in_valid, rd_en, rd_buf, cas_en, wr_en, wr_from_input, wr_buf, out_en, out_first;
  logic [D-1:0] rd_k, cas_k, wr_k;
  logic [2:0] rd_jf, rd_jt, wr_jf, wr_jt, cas_phase;
  int checks = 0, failures = 0;

  re_ctrl #(.N_BITS(NB), .LANE_BITS(LB)) dut (
    .clk(clk), .rst_n(rst_n), .in_ready(in_ready), .in_valid(in_valid),
    .rd_en(rd_en), .rd_buf(rd_buf), .rd_k(rd_k), .rd_jf(rd_jf), .rd_jt(rd_jt),
    .cas_en(cas_en), .cas_k(cas_k), .cas_phase(cas_phase),
    .wr_en(wr_en), .wr_from_input(wr_from_input), .wr_buf(wr_buf), .wr_k(wr_k),
    .wr_jf(wr_jf), .wr_jt(wr_jt), .out_en(out_en), .out_first(out_first)
  );

  task automatic expect1(string what, int got, int want);
    checks++;
    if (got != want) begin
      failures++;
      $display("FAIL %s got %0d expected %0d", what, got, want);
    end
  endtask

  initial begin
    int jl[$], il[$];
    int n_out;
    for (int i = 1; i <= NB; i++)
      for (int j = i - 1; j >= 0; j--) begin jl.push_back(j); il.push_back(i); end
    in_valid = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // load with one pause
    for (int c = 0; c < C; c++) begin
      if (c == 4) begin in_valid = 0; #1 expect1("ready", in_ready, 1); @(negedge clk); end
      in_valid = 1;
      #1;
      expect1("ready", in_ready, 1);
      expect1("load write", wr_en, 1);
      expect1("load from input", wr_from_input, 1);
      expect1("load k", wr_k, c);
      expect1("load buf", wr_buf, 0);
      @(negedge clk);
    end
    in_valid = 0;
    n_out = 0;
    for (int s = 0; s < S; s++) begin
      for (int c = 0; c < C + 2; c++) begin
        #1;
        expect1("ready low", in_ready, 0);
        expect1("rd_en", rd_en, c < C);
        if (c < C) begin
          expect1("rd_k", rd_k, c);
          expect1("rd_buf", rd_buf, s % 2);
          expect1("rd_jf", rd_jf, s == 0 ? 0 : jl[s-1]);
          expect1("rd_jt", rd_jt, jl[s]);
        end
        if (c >= 1 && c <= C) begin
          expect1("cas_en", cas_en, 1);
          expect1("cas_k", cas_k, c - 1);
          expect1("cas_phase", cas_phase, il[s]);
        end
        if (c >= 2) begin
          expect1("wr_en", wr_en, s < S - 1);
          expect1("out_en", out_en, s == S - 1);
          if (s == S - 1) begin n_out++; expect1("out_first", out_first, c == 2); end
          else begin
            expect1("wr_k", wr_k, c - 2);
            expect1("wr_buf", wr_buf, (s + 1) % 2);
            expect1("wr_jf", wr_jf, jl[s]);
            expect1("wr_jt", wr_jt, jl[s+1]);
          end
        end else if (s > 0 || c > 0) begin
          expect1("no write", wr_en && (s == 0 && c == 0), 0);
        end
        @(negedge clk);
      end
    end
    #1;
    expect1("output cycles", n_out, C);
    expect1("ready again", in_ready, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (S * (C + 2) + 3 * C + 50) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
