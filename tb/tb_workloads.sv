// Runs both sorters at the problem sizes and key widths of the published evaluation, all
// with p = 4: N = 16 with 8-bit keys, N = 1024 with 16-bit keys, N = 4096 with 32-bit
// keys and N = 16384 with 64-bit keys (the default build is N = 16384 with 32-bit keys,
// covered by the full-size test). Each size sorts a few sequences in both architectures
// and checks every key and the high-throughput latency (see sort_run).
module tb_workloads;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  localparam int NRUN = 4;
  logic done [NRUN];
  int   chk  [NRUN];
  int   fail [NRUN];

  sort_run #(.NB(4),  .LB(2), .W(8),  .FRAMES(4)) u_n16    (.clk(clk), .rst_n(rst_n), .done(done[0]), .checks(chk[0]), .failures(fail[0]));
  sort_run #(.NB(10), .LB(2), .W(16), .FRAMES(4)) u_n1024  (.clk(clk), .rst_n(rst_n), .done(done[1]), .checks(chk[1]), .failures(fail[1]));
  sort_run #(.NB(12), .LB(2), .W(32), .FRAMES(2)) u_n4096  (.clk(clk), .rst_n(rst_n), .done(done[2]), .checks(chk[2]), .failures(fail[2]));
  sort_run #(.NB(14), .LB(2), .W(64), .FRAMES(1)) u_n16384 (.clk(clk), .rst_n(rst_n), .done(done[3]), .checks(chk[3]), .failures(fail[3]));

  function automatic void report(int extra_fail);
    int checks, failures;
    checks = 0; failures = extra_fail;
    for (int r = 0; r < NRUN; r++) begin
      checks += chk[r];
      failures += fail[r];
      checks++;
      if (!done[r]) begin failures++; $display("FAIL run %0d did not finish", r); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
  endfunction

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    wait (done[0] && done[1] && done[2] && done[3]);
    report(0);
    $finish;
  end

  // watchdog: the 64-bit N = 16384 resource-efficient run is the longest (about 435k cycles)
  initial begin
    repeat (600000) @(posedge clk);
    $display("FAIL watchdog");
    report(1);
    $finish;
  end
endmodule
