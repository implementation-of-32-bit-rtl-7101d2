// wallace_tree: pipelined Wallace tree of 4:2 compressor blocks.
//
// NOP operands (16 partial products for a 32-bit multiplier) are reduced to two.
// Each level cuts its operands into blocks of four and reduces every block to
// two with a wallace_block, so the operand count halves per level:
// 16 -> 8 -> 4 -> 2, three compressor levels for NOP = 16. The two operands
// left form the last level of the tree; they go to the final adder outside
// this module.
//
// The blocks of four and the halving per level follow the design; so do the
// registers between stages. The valid bit and the reset are this
// implementation's choice. A pipeline register follows every compressor
// level, so an operand set presented on pp_i with valid_i appears on
// sum_o/pass_o with valid_o
// LEVELS = log2(NOP) - 1 clock cycles later (3 for NOP = 16). A new operand set
// can enter every cycle; there is no stall. Reset (synchronous, active high)
// clears only the valid bits; the data registers are loaded every cycle and
// are meaningful only while their valid bit is set.
module wallace_tree #(
  parameter  int unsigned NOP    = 16,
  parameter  int unsigned W      = 64,
  localparam int unsigned LEVELS = $clog2(NOP) - 1
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         valid_i,
  input  logic [W-1:0] pp_i [NOP],
  output logic         valid_o,
  output logic [W-1:0] sum_o,
  output logic [W-1:0] pass_o
);

  if (NOP < 4 || (NOP & (NOP - 1)) != 0) begin : g_chk
    $error("wallace_tree: NOP must be a power of two of at least 4");
  end

  for (genvar l = 0; l < LEVELS; l++) begin : g_lvl
    localparam int unsigned NIN  = NOP >> l;   // operands into this level
    localparam int unsigned NOUT = NIN / 2;    // operands out of this level

    logic [W-1:0] d_in  [NIN];
    logic [W-1:0] d_out [NOUT];
    logic [W-1:0] q     [NOUT];   // pipeline register after this level
    logic         v_in;
    logic         v_q;

    if (l == 0) begin : g_src
      assign d_in = pp_i;
      assign v_in = valid_i;
    end else begin : g_src
      assign d_in = g_lvl[l-1].q;
      assign v_in = g_lvl[l-1].v_q;
    end

    for (genvar k = 0; k < NIN / 4; k++) begin : g_blk
      wallace_block #(.W(W)) u_blk (
        .op     (d_in[4*k +: 4]),
        .sum_o  (d_out[2*k]),
        .pass_o (d_out[2*k+1])
      );
    end

    always_ff @(posedge clk) begin
      q <= d_out;
      if (rst) v_q <= 1'b0;
      else     v_q <= v_in;
    end
  end

  assign valid_o = g_lvl[LEVELS-1].v_q;
  assign sum_o   = g_lvl[LEVELS-1].q[0];
  assign pass_o  = g_lvl[LEVELS-1].q[1];

endmodule
