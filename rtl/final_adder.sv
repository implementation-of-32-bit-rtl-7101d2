// final_adder: last level of the Wallace tree.
//
// Once the tree is down to two operands it is no longer cut into blocks; the
// two are added directly into the product. The adder is written as a plain
// W-bit addition modulo 2^W (the carry out of the top bit is dropped) and left
// to synthesis to map onto a fast carry-propagate adder; its internal
// structure is this implementation's choice.
// Purely combinational.
module final_adder #(
  parameter int unsigned W = 64
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] sum
);

  always_comb sum = a + b;

endmodule
