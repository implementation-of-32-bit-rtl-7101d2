// booth_radix4_tb: self-check of the radix-4 Booth partial product generator.
//
// For directed corner operands and random ones, every partial product is
// compared with digit * multiplicand * 4^i, where the digit of group i is
// worked out here as -2*b[2i+1] + b[2i] + b[2i-1] (b[-1] = 0). The sum of all
// 16 partial products is also checked against the signed 64-bit product.
// Counts how often each of the eight three-bit groups occurred and fails if
// one never did.
module booth_radix4_tb;

  localparam int XLEN = 32;
  localparam int NPP  = XLEN / 2;

  logic [XLEN-1:0]   mcand, mplier;
  logic [2*XLEN-1:0] pp [NPP];
  int   checks = 0;
  int   failures = 0;
  int   grp_seen [8];

  booth_radix4 #(.XLEN(XLEN)) dut (.multiplicand(mcand), .multiplier(mplier), .pp);

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_one(input logic [XLEN-1:0] x, input logic [XLEN-1:0] y);
    logic signed [63:0] total, expect_total, expect_pp;
    logic [XLEN:0] yext;
    int digit;
    mcand  = x;
    mplier = y;
    #1;
    yext  = {y, 1'b0};
    total = '0;
    for (int i = 0; i < NPP; i++) begin
      digit = -2 * int'(yext[2*i+2]) + int'(yext[2*i+1]) + int'(yext[2*i]);
      grp_seen[yext[2*i +: 3]]++;
      expect_pp = 64'(longint'(digit) * longint'($signed(x))) <<< (2 * i);
      checks++;
      if (pp[i] !== expect_pp) begin
        failures++;
        $display("FAIL pp[%0d]: x=%h y=%h got %h expected %h", i, x, y, pp[i], expect_pp);
      end
      total += pp[i];
    end
    expect_total = longint'($signed(x)) * longint'($signed(y));
    checks++;
    if (total !== expect_total) begin
      failures++;
      $display("FAIL sum: x=%h y=%h got %h expected %h", x, y, total, expect_total);
    end
  endtask

  initial begin
    logic [XLEN-1:0] corners [6] = '{32'h0, 32'h1, 32'hFFFF_FFFF, 32'h8000_0000,
                                     32'h7FFF_FFFF, 32'hAAAA_5555};
    foreach (grp_seen[g]) grp_seen[g] = 0;
    foreach (corners[i]) foreach (corners[j]) check_one(corners[i], corners[j]);
    check_one(32'hFFFF_FFFD, 32'h0000_0003);   // -3 * 3
    for (int n = 0; n < 2000; n++) check_one($urandom, $urandom);
    for (int g = 0; g < 8; g++) begin
      checks++;
      if (grp_seen[g] == 0) begin
        failures++;
        $display("FAIL: Booth group %03b never occurred", 3'(g));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
