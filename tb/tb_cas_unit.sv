// Test of the compare-and-swap unit: random and corner-case key pairs in both directions,
// checked against min/max worked out in the testbench.
module tb_cas_unit;
  localparam int W = 8;
  logic desc;
  logic [W-1:0] a, b, lo, hi;
  int checks = 0, failures = 0;

  cas_unit #(.W(W)) dut (.desc(desc), .a(a), .b(b), .lo(lo), .hi(hi));

  task automatic check_one(logic d, logic [W-1:0] x, logic [W-1:0] y);
    logic [W-1:0] mn, mx;
    desc = d; a = x; b = y;
    #1;
    mn = (x < y) ? x : y;
    mx = (x < y) ? y : x;
    checks++;
    if ((!d && (lo != mn || hi != mx)) || (d && (lo != mx || hi != mn))) begin
      failures++;
      $display("FAIL desc=%0d a=%0d b=%0d lo=%0d hi=%0d", d, x, y, lo, hi);
    end
  endtask

  initial begin
    check_one(0, 0, 255); check_one(0, 255, 0); check_one(1, 0, 255); check_one(1, 255, 0);
    check_one(0, 7, 7);   check_one(1, 7, 7);   check_one(0, 128, 127); check_one(1, 127, 128);
    for (int i = 0; i < 500; i++) check_one(1'($urandom), W'($urandom), W'($urandom));
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
