// maxpool_node: one MAXPOOL node, an OR over a binary window.
//
// With activations encoded as 1 = +1 and 0 = -1, the maximum of a window is
// the OR of its bits. N = 9 covers every window up to 3x3; mask selects the
// window positions in use, so smaller windows leave the rest out. Purely
// combinational. The OR gate follows the design description; the mask input
// is how this implementation serves windows smaller than 3x3.
module maxpool_node #(
  parameter int N = 9
) (
  input  logic [N-1:0] x,
  input  logic [N-1:0] mask,
  output logic         y
);

  assign y = |(x & mask);

endmodule
