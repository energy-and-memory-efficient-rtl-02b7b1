// Test of the single-port read-before-write memory against an array model: every cycle
// reads and overwrites a random word; the word read must be the one written there before.
// Also checks that a disabled cycle changes neither the memory nor the read register.
module tb_sp_ram;
  localparam int DEPTH = 16, WIDTH = 9;
  logic clk = 0;
  always #5 clk = ~clk;
  logic en;
  logic [3:0] addr;
  logic [WIDTH-1:0] wdata, rdata;
  logic [WIDTH-1:0] model [DEPTH];
  int checks = 0, failures = 0;

  sp_ram #(.DEPTH(DEPTH), .WIDTH(WIDTH)) dut (
    .clk(clk), .en(en), .addr(addr), .wdata(wdata), .rdata(rdata)
  );

  initial begin
    logic [WIDTH-1:0] expect_rd;
    logic [WIDTH-1:0] hold;
    en = 1;
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk);
      addr = 4'(i); wdata = WIDTH'($urandom); model[i] = wdata;
    end
    @(negedge clk);
    for (int it = 0; it < 600; it++) begin
      en = (it % 7 != 3);
      addr = 4'($urandom); wdata = WIDTH'($urandom);
      expect_rd = model[addr];
      hold = rdata;
      if (en) model[addr] = wdata;
      @(negedge clk);
      checks++;
      if (rdata != (en ? expect_rd : hold)) begin
        failures++;
        $display("FAIL it %0d en %0d addr %0d got %0h expected %0h", it, en, addr, rdata,
                 en ? expect_rd : hold);
      end
    end
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
