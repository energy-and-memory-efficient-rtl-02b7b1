// Test of the control unit for N = 64, p = 4: in_pos must count 0,1,2,... from reset
// modulo N/p, and every stage position must equal in_pos minus the latency from the sorter
// input to that stage, which the testbench works out from the stage list (comparison
// stages 1 cycle; networks 1 cycle when both compared bits are lane bits, otherwise a
// block of 2^(max bit + 1)/p cycles plus 2).
module tb_bitonic_ctrl;
  localparam int NB = 6, LB = 2, PW = NB - LB, S = NB * (NB + 1) / 2, P = 1 << LB;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [PW-1:0] in_pos, out_pos;
  logic [PW-1:0] pos_cas [S];
  logic [PW-1:0] pos_spn [S-1];
  int checks = 0, failures = 0;
  int lat_cas [S];
  int lat_out;

  bitonic_ctrl #(.N_BITS(NB), .LANE_BITS(LB)) dut (
    .clk(clk), .rst_n(rst_n), .in_pos(in_pos), .out_pos(out_pos),
    .pos_cas(pos_cas), .pos_spn(pos_spn)
  );

  initial begin
    int jl[$];
    for (int i = 1; i <= NB; i++)
      for (int j = i - 1; j >= 0; j--) jl.push_back(j);
    lat_cas[0] = 0;
    for (int s = 1; s < S; s++) begin
      int m;
      m = (jl[s-1] > jl[s]) ? jl[s-1] : jl[s];
      lat_cas[s] = lat_cas[s-1] + 1 + ((m < LB) ? 1 : (1 << (m + 1)) / P + 2);
    end
    lat_out = lat_cas[S-1] + 1;

    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int c = 0; c < 100; c++) begin
      checks++;
      if (int'(in_pos) != c % (1 << PW)) begin failures++; $display("FAIL in_pos %0d at %0d", in_pos, c); end
      checks++;
      if (int'(out_pos) != ((c - lat_out) % (1 << PW) + (1 << PW)) % (1 << PW)) begin
        failures++; $display("FAIL out_pos");
      end
      for (int s = 0; s < S; s++) begin
        int e;
        e = ((c - lat_cas[s]) % (1 << PW) + (1 << PW)) % (1 << PW);
        checks++;
        if (int'(pos_cas[s]) != e) begin failures++; $display("FAIL pos_cas[%0d]", s); end
        if (s < S - 1) begin
          e = ((c - lat_cas[s] - 1) % (1 << PW) + (1 << PW)) % (1 << PW);
          checks++;
          if (int'(pos_spn[s]) != e) begin failures++; $display("FAIL pos_spn[%0d]", s); end
        end
      end
      @(negedge clk);
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
