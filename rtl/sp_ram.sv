// Single-port memory block with read-before-write, as used for the in-place permutation
// in time. Each enabled cycle it reads the word at addr and, on the same clock edge,
// overwrites that word with wdata; the old word appears on rdata in the next cycle
// (registered read, like an FPGA block RAM in read-first mode). One address port serves
// both accesses, which is what lets the permutation network work with a single
// sequence-sized memory per lane. Contents are not reset.
module sp_ram #(
  parameter int unsigned DEPTH = 4096,
  parameter int unsigned WIDTH = 33,
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  input  logic             en,
  input  logic [AW-1:0]    addr,
  input  logic [WIDTH-1:0] wdata,
  output logic [WIDTH-1:0] rdata
);
  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (en) begin
      rdata     <= mem[addr];
      mem[addr] <= wdata;
    end
  end
endmodule
