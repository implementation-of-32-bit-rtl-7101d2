// wallace_tree_tb: self-check of the pipelined 16-operand Wallace tree.
//
// Each cycle a set of 16 random 64-bit operands is offered, with valid_i
// randomly high or low (so both back-to-back sets and bubbles occur). A
// reference delay line of three ranks, kept here, records the valid bit and
// the modulo-2^64 sum of every set. After each rising edge the tree's valid_o
// must match the delay line, i.e. the tree's latency must be exactly three
// cycles, and for a valid result sum_o + pass_o must equal the recorded sum.
// A reset while sets are in flight must drop them.
module wallace_tree_tb;

  localparam int NOP = 16;
  localparam int W   = 64;
  localparam int LAT = 3;

  logic         clk = 1'b0;
  logic         rst;
  logic         valid_i;
  logic [W-1:0] pp_i [NOP];
  logic         valid_o;
  logic [W-1:0] sum_o, pass_o;

  logic         ref_v [LAT];
  logic [W-1:0] ref_s [LAT];
  int   checks = 0;
  int   failures = 0;
  int   n_valid = 0, n_bubble = 0, n_flush = 0;

  wallace_tree #(.NOP(NOP), .W(W)) dut (.clk, .rst, .valid_i, .pp_i, .valid_o, .sum_o, .pass_o);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference: LAT-rank delay line of valid bit and operand sum
  always @(posedge clk) begin
    logic [W-1:0] s;
    s = '0;
    foreach (pp_i[i]) s += pp_i[i];
    for (int k = LAT - 1; k > 0; k--) begin
      ref_v[k] <= rst ? 1'b0 : ref_v[k-1];
      ref_s[k] <= ref_s[k-1];
    end
    ref_v[0] <= rst ? 1'b0 : valid_i;
    ref_s[0] <= s;
  end

  initial begin
    rst     = 1'b1;
    valid_i = 1'b0;
    foreach (pp_i[i]) pp_i[i] = '0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    for (int cyc = 0; cyc < 3000; cyc++) begin
      @(negedge clk);
      // check what the last edge produced
      checks++;
      if (valid_o !== ref_v[LAT-1]) begin
        failures++;
        $display("FAIL cycle %0d: valid_o=%0b expected %0b", cyc, valid_o, ref_v[LAT-1]);
      end
      if (ref_v[LAT-1]) begin
        checks++;
        if (sum_o + pass_o !== ref_s[LAT-1]) begin
          failures++;
          $display("FAIL cycle %0d: sum %h expected %h", cyc, sum_o + pass_o, ref_s[LAT-1]);
        end
      end
      // drive the next set
      rst = (cyc == 1500);
      if (rst && (ref_v[0] || ref_v[1])) n_flush++;
      valid_i = ($urandom_range(0, 3) != 0);
      if (valid_i) n_valid++; else n_bubble++;
      foreach (pp_i[i]) pp_i[i] = {$urandom, $urandom};
    end
    checks++;
    if (n_valid == 0 || n_bubble == 0 || n_flush == 0) begin
      failures++;
      $display("FAIL: valid=%0d bubble=%0d flush=%0d", n_valid, n_bubble, n_flush);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
