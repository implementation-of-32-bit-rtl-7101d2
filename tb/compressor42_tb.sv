// compressor42_tb: exhaustive self-check of the exact 4:2 compressor.
//
// Applies all 32 combinations of a, b, c, d, cin and checks, against values
// computed here from the inputs:
//   - the arithmetic identity a + b + c + d + cin == s + 2*(carry + cout);
//   - that cout is the majority of a, b, c, i.e. independent of d and cin,
//     which is what lets a row of compressors chain without a loop.
// Prints one TB_RESULT line. A watchdog ends the run if it ever hangs.
module compressor42_tb;

  logic a, b, c, d, cin;
  logic s, carry, cout;
  int   checks = 0;
  int   failures = 0;

  compressor42 dut (.a, .b, .c, .d, .cin, .s, .carry, .cout);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 32; v++) begin
      int in_sum, out_sum;
      logic maj;
      {a, b, c, d, cin} = 5'(v);
      #1;
      in_sum  = int'(a) + int'(b) + int'(c) + int'(d) + int'(cin);
      out_sum = int'(s) + 2 * (int'(carry) + int'(cout));
      maj     = (a & b) | (a & c) | (b & c);
      checks++;
      if (in_sum != out_sum) begin
        failures++;
        $display("FAIL sum: in=%05b s=%0b carry=%0b cout=%0b", v[4:0], s, carry, cout);
      end
      checks++;
      if (cout != maj) begin
        failures++;
        $display("FAIL cout: in=%05b cout=%0b expected %0b", v[4:0], cout, maj);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
