// Test of one comparison stage in three configurations: direction from the lane number
// (phase 1), direction from the cycle position (phase 3 of N = 32, p = 4) and the final
// all-ascending phase. Random keys and positions are driven every cycle; one cycle later
// each lane pair must hold min/max in the direction given by bit PHASE of the pair's
// stream position, computed here, and the valid bit must follow with the same delay.
module tb_cas_stage;
  localparam int NB = 5, LB = 2, W = 8, P = 1 << LB, PW = NB - LB;
  localparam int NCFG = 3;
  localparam int PH [NCFG] = '{1, 3, 5};
  localparam int CB [NCFG] = '{0, 1, 0};

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [PW-1:0] pos;
  logic          in_valid;
  logic [W-1:0]  in_key [P];
  logic          out_valid [NCFG];
  logic [W-1:0]  out_key [NCFG][P];
  int checks = 0, failures = 0, n_desc = 0, n_asc = 0;

  for (genvar g = 0; g < NCFG; g++) begin : g_dut
    cas_stage #(.N_BITS(NB), .LANE_BITS(LB), .W(W), .PHASE(PH[g]), .CBIT(CB[g])) dut (
      .clk(clk), .rst_n(rst_n), .pos(pos), .in_valid(in_valid), .in_key(in_key),
      .out_valid(out_valid[g]), .out_key(out_key[g])
    );
  end

  initial begin
    logic [W-1:0] k0 [P];
    logic [PW-1:0] p0;
    logic v0;
    pos = '0; in_valid = 0;
    foreach (in_key[l]) in_key[l] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int it = 0; it < 400; it++) begin
      pos = PW'($urandom); in_valid = 1'($urandom);
      foreach (in_key[l]) in_key[l] = W'($urandom);
      k0 = in_key; p0 = pos; v0 = in_valid;
      @(negedge clk);
      for (int g = 0; g < NCFG; g++) begin
        checks++;
        if (out_valid[g] != v0) begin failures++; $display("FAIL valid cfg %0d", g); end
        for (int k = 0; k < P / 2; k++) begin
          int y;
          logic d;
          logic [W-1:0] mn, mx;
          y = int'(p0) * P + 2 * k;
          d = (PH[g] < NB) ? 1'((y >> PH[g]) & 1) : 1'b0;
          if (d) n_desc++; else n_asc++;
          mn = (k0[2*k] < k0[2*k+1]) ? k0[2*k] : k0[2*k+1];
          mx = (k0[2*k] < k0[2*k+1]) ? k0[2*k+1] : k0[2*k];
          checks++;
          if (out_key[g][2*k] != (d ? mx : mn) || out_key[g][2*k+1] != (d ? mn : mx)) begin
            failures++;
            $display("FAIL cfg %0d pair %0d pos %0d", g, k, p0);
          end
        end
      end
    end
    checks++;
    if (n_desc == 0 || n_asc == 0) begin failures++; $display("FAIL both directions not seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
