// booth_radix4: radix-4 Booth partial product generator.
//
// A zero bit is appended to the right of the multiplier, which is then cut into
// XLEN/2 overlapping groups of three bits, {b[2i+1], b[2i], b[2i-1]}. Each group
// selects a multiple of the multiplicand in {-2,-1,0,+1,+2} (mul_pkg::booth_encode):
// 000/111 -> 0, 001/010 -> +1, 011 -> +2, 100 -> -2, 101/110 -> -1.
// Partial product i is that multiple, sign extended to 2*XLEN bits and shifted
// left by 2*i, so the XLEN/2 partial products sum (mod 2^(2*XLEN)) to the signed
// product of the two operands. For XLEN = 32 this gives 16 partial products of
// 64 bits each.
//
// The recoding table, the appended zero, the 64-bit extended multiplicand and
// the count of 16 partial products follow the design. Making each partial
// product a complete two's complement number -- negated in full, with no
// sign-extension compression or separate negate bit -- is this
// implementation's choice, as is treating both operands as signed.
// Purely combinational.
module booth_radix4 #(
  parameter int unsigned XLEN = 32,
  localparam int unsigned PW  = 2 * XLEN,
  localparam int unsigned NPP = XLEN / 2
) (
  input  logic [XLEN-1:0] multiplicand,
  input  logic [XLEN-1:0] multiplier,
  output logic [PW-1:0]   pp [NPP]
);

  import mul_pkg::*;

  logic [XLEN:0] mr_ext;   // multiplier with the appended zero bit at position 0
  logic [PW-1:0] m1;       // multiplicand, sign extended
  logic [PW-1:0] m2;       // 2 * multiplicand

  always_comb begin
    mr_ext = {multiplier, 1'b0};
    m1     = {{XLEN{multiplicand[XLEN-1]}}, multiplicand};
    m2     = m1 << 1;
  end

  for (genvar i = 0; i < NPP; i++) begin : g_pp
    booth_sel_t    sel;
    logic [PW-1:0] mag;    // selected magnitude: 0, M or 2M
    logic [PW-1:0] val;    // signed multiple

    always_comb begin
      sel   = booth_encode(mr_ext[2*i +: 3]);
      mag   = sel.two ? m2 : (sel.one ? m1 : '0);
      val   = sel.neg ? (~mag + PW'(1)) : mag;
      pp[i] = val << (2 * i);
    end
  end

endmodule
