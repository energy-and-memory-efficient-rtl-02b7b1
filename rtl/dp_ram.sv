// Simple dual-port memory: one write port and one read port with independent addresses,
// as an FPGA block RAM in simple dual-port mode. The read is registered (data one cycle
// after the address). A read of the word being written in the same cycle returns the old
// word. Contents are not reset.
module dp_ram #(
  parameter int unsigned DEPTH = 8192,
  parameter int unsigned WIDTH = 32,
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [WIDTH-1:0] wdata,
  input  logic             re,
  input  logic [AW-1:0]    raddr,
  output logic [WIDTH-1:0] rdata
);
  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (re) rdata <= mem[raddr];
    if (we) mem[waddr] <= wdata;
  end
endmodule
