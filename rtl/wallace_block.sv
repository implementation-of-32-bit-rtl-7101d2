// wallace_block: one block of a Wallace tree level, four operands in, two out.
//
// Every bit column of the block is handled by one 4:2 compressor. Counting the
// four operands as rows from the top, the bits of the bottom three rows
// (op[1], op[2], op[3]) go to its a, b and c inputs; its d and
// cin inputs take the cout and carry of the compressor one column to the right
// (zero in the rightmost column). The compressor's sum bit forms the column of
// the first output operand and the fourth operand's bit, which no compressor
// uses, forms the column of the second. The carries out of the leftmost column
// are dropped: all arithmetic is modulo 2^W, which is what a W-bit product
// needs. So
//     sum_o + pass_o == op[0] + op[1] + op[2] + op[3]   (mod 2^W)
//
// The operands are full W-bit numbers (partial products are sign extended and
// zero filled on the right), so every column holds four bits and every column
// gets a compressor. A column with fewer than three significant bits then
// has zeros on the unused inputs, which gives the same sum as copying such a
// column through unchanged.
// The compressor chain (d and cin fed from the previous column, zero in the
// first), the three compressed rows and the uncompressed fourth row follow the
// design. Using full-width operands instead of copying short columns is this
// implementation's choice. Purely combinational; carry and cout ripple from
// column to column, so the carry of column 63 depends on all columns below.
module wallace_block #(
  parameter int unsigned W = 64
) (
  input  logic [W-1:0] op [4],
  output logic [W-1:0] sum_o,    // sum bits of the compressor chain
  output logic [W-1:0] pass_o    // top row op[0], carried to the next level
);

  logic [W:0] d_chain;     // cout of column j-1 into d of column j
  logic [W:0] cin_chain;   // carry of column j-1 into cin of column j

  assign d_chain[0]   = 1'b0;
  assign cin_chain[0] = 1'b0;

  for (genvar j = 0; j < W; j++) begin : g_col
    compressor42 u_cmp (
      .a     (op[1][j]),
      .b     (op[2][j]),
      .c     (op[3][j]),
      .d     (d_chain[j]),
      .cin   (cin_chain[j]),
      .s     (sum_o[j]),
      .carry (cin_chain[j+1]),
      .cout  (d_chain[j+1])
    );
  end

  assign pass_o = op[0];

endmodule
