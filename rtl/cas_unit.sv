// Compare-and-swap (CAS) unit: the basic element of the bitonic sorting network.
//
// It takes two unsigned keys and returns them ordered. With desc = 0 the smaller key
// leaves on lo and the larger on hi; with desc = 1 the order is reversed. The unit is
// purely combinational; the comparison stage that holds it adds the pipeline register.
// Equal keys leave unchanged (a is taken as the smaller one). Keys are compared as
// unsigned numbers; the ordering rule for equal or signed keys is this design's choice.
module cas_unit #(
  parameter int unsigned W = 32   // key width in bits
) (
  input  logic         desc,      // 1: descending pair (larger key on lo)
  input  logic [W-1:0] a,         // key on the lower lane of the pair
  input  logic [W-1:0] b,         // key on the upper lane of the pair
  output logic [W-1:0] lo,        // key for the lower lane
  output logic [W-1:0] hi         // key for the upper lane
);
  logic swap;

  always_comb begin
    swap = desc ? (a < b) : (a > b);
    lo   = swap ? b : a;
    hi   = swap ? a : b;
  end
endmodule
