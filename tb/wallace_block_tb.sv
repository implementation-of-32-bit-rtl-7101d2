// wallace_block_tb: self-check of one four-to-two Wallace tree block.
//
// Drives four 64-bit operands (directed all-ones and sign patterns, then
// random values) and checks that sum_o + pass_o equals the sum of the four
// operands modulo 2^64, and that pass_o is the top row op[0] unchanged.
module wallace_block_tb;

  localparam int W = 64;

  logic [W-1:0] op [4];
  logic [W-1:0] sum_o, pass_o;
  int   checks = 0;
  int   failures = 0;

  wallace_block #(.W(W)) dut (.op, .sum_o, .pass_o);

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_one(input logic [W-1:0] a0, input logic [W-1:0] a1,
                           input logic [W-1:0] a2, input logic [W-1:0] a3);
    logic [W-1:0] expect_sum, got;
    op[0] = a0; op[1] = a1; op[2] = a2; op[3] = a3;
    #1;
    expect_sum = a0 + a1 + a2 + a3;
    got        = sum_o + pass_o;
    checks++;
    if (got !== expect_sum) begin
      failures++;
      $display("FAIL sum: %h %h %h %h -> %h expected %h", a0, a1, a2, a3, got, expect_sum);
    end
    checks++;
    if (pass_o !== a0) begin
      failures++;
      $display("FAIL pass: got %h expected %h", pass_o, a0);
    end
  endtask

  function automatic logic [W-1:0] rnd64();
    return {$urandom, $urandom};
  endfunction

  initial begin
    check_one('0, '0, '0, '0);
    check_one('1, '1, '1, '1);
    check_one(64'h1, 64'h1, 64'h1, 64'h1);
    check_one('0, '1, '1, '1);
    check_one(64'h8000_0000_0000_0000, 64'h8000_0000_0000_0000, 64'h7FFF_FFFF_FFFF_FFFF, 64'h1);
    for (int n = 0; n < 5000; n++) check_one(rnd64(), rnd64(), rnd64(), rnd64());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
