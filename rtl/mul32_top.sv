// mul32_top: pipelined 32x32 signed multiplication unit.
//
// Multiplies two signed XLEN-bit operands into their 2*XLEN-bit product in a
// six-rank pipeline that accepts a new operation every cycle:
//   rank 1  input register: operands and valid bit
//   rank 2  radix-4 Booth recoding -> XLEN/2 partial products (booth_radix4)
//   rank 3  Wallace tree level 1, 16 -> 8 operands  \
//   rank 4  Wallace tree level 2,  8 -> 4 operands   > wallace_tree
//   rank 5  Wallace tree level 3,  4 -> 2 operands  /
//   rank 6  final adder, 2 -> 1 (final_adder), product register
// Every compressor level is a row of 4:2 compressors (wallace_block,
// compressor42). Booth recoding, the tree of 4:2 compressors, the level
// counts and the six-cycle latency follow the design this unit implements.
//
// Interface: drive multiplicand_i, multiplier_i and valid_i before a rising
// edge of clk; the product of that pair is on product_o, with valid_o high,
// exactly six rising edges later (in general 3 + log2(XLEN/2) - 1 edges:
// six for XLEN = 32). Operations may be issued back to back, so up to six are in
// flight and x operations issued on consecutive cycles finish within x + 5
// cycles of the first. There is no stall or back-pressure: the consumer must
// take each result in the cycle valid_o is high. rst is synchronous and active
// high; it clears the valid bits only (data registers need no reset because
// nothing reads them while their valid bit is low). The unit computes the
// signed x signed product; selecting one half of it or treating operands as
// unsigned (RISC-V MULH/MULHU/MULHSU) is left to the surrounding logic.
module mul32_top #(
  parameter  int unsigned XLEN = mul_pkg::XLEN,
  localparam int unsigned PW   = 2 * XLEN,
  localparam int unsigned NPP  = XLEN / 2
) (
  input  logic            clk,
  input  logic            rst,
  input  logic            valid_i,
  input  logic [XLEN-1:0] multiplicand_i,
  input  logic [XLEN-1:0] multiplier_i,
  output logic            valid_o,
  output logic [PW-1:0]   product_o
);

  // rank 1: operand register
  logic            v_in_q;
  logic [XLEN-1:0] mcand_q, mplier_q;

  always_ff @(posedge clk) begin
    mcand_q  <= multiplicand_i;
    mplier_q <= multiplier_i;
    if (rst) v_in_q <= 1'b0;
    else     v_in_q <= valid_i;
  end

  // rank 2: Booth partial products
  logic [PW-1:0] pp_d [NPP];
  logic [PW-1:0] pp_q [NPP];
  logic          v_pp_q;

  booth_radix4 #(.XLEN(XLEN)) u_booth (
    .multiplicand (mcand_q),
    .multiplier   (mplier_q),
    .pp           (pp_d)
  );

  always_ff @(posedge clk) begin
    pp_q <= pp_d;
    if (rst) v_pp_q <= 1'b0;
    else     v_pp_q <= v_in_q;
  end

  // ranks 3..5: Wallace tree levels, registered inside
  logic          v_tree;
  logic [PW-1:0] tree_sum, tree_pass;

  wallace_tree #(.NOP(NPP), .W(PW)) u_tree (
    .clk     (clk),
    .rst     (rst),
    .valid_i (v_pp_q),
    .pp_i    (pp_q),
    .valid_o (v_tree),
    .sum_o   (tree_sum),
    .pass_o  (tree_pass)
  );

  // rank 6: final addition of the last two operands
  logic [PW-1:0] prod_d;

  final_adder #(.W(PW)) u_add (
    .a   (tree_sum),
    .b   (tree_pass),
    .sum (prod_d)
  );

  always_ff @(posedge clk) begin
    product_o <= prod_d;
    if (rst) valid_o <= 1'b0;
    else     valid_o <= v_tree;
  end

endmodule
