// mul_pkg: constants and types shared by the multiplication unit.
//
// The unit multiplies two XLEN-bit signed operands into a 2*XLEN-bit product
// using radix-4 Booth recoding (XLEN/2 partial products) and a Wallace tree of
// 4:2 compressors. The 32-bit operand width, the 64-bit product and the 16
// partial products are the numbers the design is built around; the encoding of
// a Booth digit as {neg, two, one} select lines is this implementation's own.
package mul_pkg;

  // Operand width. The product has 2*XLEN = 64 bits and radix-4 recoding
  // gives XLEN/2 = 16 partial products.
  localparam int unsigned XLEN = 32;

  // One radix-4 Booth digit in {-2,-1,0,+1,+2}, as select lines:
  //   one : magnitude 1 (take the multiplicand)
  //   two : magnitude 2 (take the multiplicand shifted left by one)
  //   neg : negate the selected multiple
  typedef struct packed {
    logic neg;
    logic two;
    logic one;
  } booth_sel_t;

  // Recode a group of three multiplier bits {b[2i+1], b[2i], b[2i-1]}:
  //   000 -> 0   001 -> +1  010 -> +1  011 -> +2
  //   100 -> -2  101 -> -1  110 -> -1  111 -> 0
  function automatic booth_sel_t booth_encode(input logic [2:0] grp);
    booth_sel_t s;
    s.one = grp[0] ^ grp[1];
    s.two = (grp == 3'b011) || (grp == 3'b100);
    s.neg = grp[2] && !(grp[1] && grp[0]);
    return s;
  endfunction

endpackage
