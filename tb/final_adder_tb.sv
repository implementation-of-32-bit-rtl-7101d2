// final_adder_tb: self-check of the final two-operand adder.
//
// Compares the 64-bit sum with a + b computed here, for carries that run
// across the whole word, across the 32-bit boundary, wrap-around and random
// operands.
module final_adder_tb;

  localparam int W = 64;

  logic [W-1:0] a, b, sum;
  int   checks = 0;
  int   failures = 0;

  final_adder #(.W(W)) dut (.a, .b, .sum);

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_one(input logic [W-1:0] x, input logic [W-1:0] y);
    logic [W:0] full;
    a = x; b = y;
    #1;
    full = {1'b0, x} + {1'b0, y};
    checks++;
    if (sum !== full[W-1:0]) begin
      failures++;
      $display("FAIL: %h + %h = %h expected %h", x, y, sum, full[W-1:0]);
    end
  endtask

  initial begin
    check_one('1, 64'h1);
    check_one(64'h0000_0000_FFFF_FFFF, 64'h1);
    check_one(64'h7FFF_FFFF_FFFF_FFFF, 64'h1);
    check_one(64'h8000_0000_0000_0000, 64'h8000_0000_0000_0000);
    for (int n = 0; n < 5000; n++) check_one({$urandom, $urandom}, {$urandom, $urandom});
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
