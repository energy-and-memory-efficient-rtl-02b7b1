// Test of the p-to-p lane connection (p = 8): random lane permutations and random data;
// every output lane must carry the input lane its select names.
module tb_spn_xbar;
  localparam int LB = 3, P = 1 << LB, WIDTH = 12;
  logic [LB-1:0]    sel  [P];
  logic [WIDTH-1:0] din  [P];
  logic [WIDTH-1:0] dout [P];
  int checks = 0, failures = 0;

  spn_xbar #(.LANE_BITS(LB), .WIDTH(WIDTH)) dut (.sel(sel), .din(din), .dout(dout));

  initial begin
    for (int it = 0; it < 300; it++) begin
      int perm [P];
      foreach (perm[l]) perm[l] = l;
      for (int l = P - 1; l > 0; l--) begin
        int r, t;
        r = $urandom_range(l);
        t = perm[l]; perm[l] = perm[r]; perm[r] = t;
      end
      foreach (sel[l]) sel[l] = LB'(perm[l]);
      foreach (din[l]) din[l] = WIDTH'($urandom);
      #1;
      foreach (dout[l]) begin
        checks++;
        if (dout[l] != din[perm[l]]) begin failures++; $display("FAIL lane %0d", l); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
