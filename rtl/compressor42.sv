// compressor42: exact 4:2 compressor, one bit column of a Wallace tree block.
//
// Adds five bits of equal weight -- a, b, c, d and cin -- and returns them as
// one bit of the same weight (s) and two bits of double weight (carry, cout):
//     a + b + c + d + cin = s + 2*(carry + cout)
// It is built as two chained full adders. The first adds a, b and c; its
// carry is cout, which depends on neither d nor cin, so a row of compressors
// whose cin is fed from the neighbour's carry has no loop through cout. The
// second full adder adds the first one's sum to d and cin; its sum is s and
// its carry is carry, written as a 2:1 choice between cin and d:
//     s     = a ^ b ^ c ^ d ^ cin
//     carry = (a^b^c^d) ? cin : d
//     cout  = (a^b) ? c : a
// The port names and the three result signals follow the exact compressor of
// the design; the two-full-adder structure is the standard one it refers to.
// Purely combinational.
module compressor42 (
  input  logic a,
  input  logic b,
  input  logic c,
  input  logic d,
  input  logic cin,
  output logic s,
  output logic carry,
  output logic cout
);

  logic ab_x;    // a ^ b
  logic abcd_x;  // a ^ b ^ c ^ d

  always_comb begin
    ab_x   = a ^ b;
    abcd_x = ab_x ^ c ^ d;
    s      = abcd_x ^ cin;
    carry  = abcd_x ? cin : d;
    cout   = ab_x ? c : a;
  end

endmodule
