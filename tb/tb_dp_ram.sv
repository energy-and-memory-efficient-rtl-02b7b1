// Test of the simple dual-port memory against an array model: random writes and reads on
// independent addresses, including reads of the word being written in the same cycle
// (must return the old word) and cycles with either port disabled.
module tb_dp_ram;
  localparam int DEPTH = 32, WIDTH = 11;
  logic clk = 0;
  always #5 clk = ~clk;
  logic we, re;
  logic [4:0] waddr, raddr;
  logic [WIDTH-1:0] wdata, rdata;
  logic [WIDTH-1:0] model [DEPTH];
  int checks = 0, failures = 0, n_same = 0;

  dp_ram #(.DEPTH(DEPTH), .WIDTH(WIDTH)) dut (
    .clk(clk), .we(we), .waddr(waddr), .wdata(wdata), .re(re), .raddr(raddr), .rdata(rdata)
  );

  initial begin
    logic [WIDTH-1:0] exp_rd;
    we = 1; re = 0;
    for (int i = 0; i < DEPTH; i++) begin
      waddr = 5'(i); wdata = WIDTH'($urandom); model[i] = wdata;
      @(negedge clk);
    end
    for (int it = 0; it < 800; it++) begin
      we = 1'($urandom); re = (it % 5 != 0);
      waddr = 5'($urandom); wdata = WIDTH'($urandom);
      raddr = (it % 7 == 0) ? waddr : 5'($urandom);
      if (re && we && raddr == waddr) n_same++;
      exp_rd = re ? model[raddr] : rdata;
      if (we) model[waddr] = wdata;
      @(negedge clk);
      checks++;
      if (rdata != exp_rd) begin
        failures++;
        $display("FAIL it %0d raddr %0d got %0h expected %0h", it, raddr, rdata, exp_rd);
      end
    end
    checks++;
    if (n_same == 0) begin failures++; $display("FAIL no same-address cycle"); end
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
