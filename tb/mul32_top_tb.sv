// mul32_top_tb: end-to-end self-check of the pipelined multiplication unit.
//
// Runs the unit at its default size (32-bit operands, 64-bit product) with
// 10,000 multiplications plus directed cases:
//   - a burst of corner-case operand pairs (0, +-1, most negative, most
//     positive, alternating patterns) issued back to back, whose completion
//     time is checked: x operations issued on consecutive cycles must all
//     finish within x + 5 cycles of the first;
//   - 10,000 random pairs, issued in runs of back-to-back operations
//     separated by random bubbles, drawn half from uniform random values and
//     half with small or extreme magnitudes;
//   - a reset while operations are in flight, which must drop them.
// The expected product is the signed 64-bit product computed here. A
// reference delay line of six ranks, kept here, gives the cycle at which each
// result is due, so every cycle checks valid_o and, when it is high,
// product_o: the latency must be exactly six rising edges.
// Also counted, and a failure if never seen: a full pipeline (six operations
// in flight), a bubble, a flush by reset, every one of the eight Booth groups,
// negative x negative operands and the most negative operand.
module mul32_top_tb;

  localparam int LAT = 6;

  logic        clk = 1'b0;
  logic        rst;
  logic        valid_i;
  logic [31:0] mcand, mplier;
  logic        valid_o;
  logic [63:0] product_o;

  logic        ref_v [LAT];
  logic [63:0] ref_p [LAT];
  longint      cyc = 0;
  int   checks = 0;
  int   failures = 0;
  int   n_ops = 0, n_results = 0;
  int   n_full = 0, n_bubble = 0, n_flush = 0, n_negneg = 0, n_minop = 0;
  int   grp_seen [8];

  mul32_top dut (
    .clk, .rst, .valid_i,
    .multiplicand_i (mcand),
    .multiplier_i   (mplier),
    .valid_o, .product_o
  );

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference: six-rank delay line of valid bit and expected product
  always @(posedge clk) begin
    cyc <= cyc + 1;
    for (int k = LAT - 1; k > 0; k--) begin
      ref_v[k] <= rst ? 1'b0 : ref_v[k-1];
      ref_p[k] <= ref_p[k-1];
    end
    ref_v[0] <= rst ? 1'b0 : valid_i;
    ref_p[0] <= 64'(longint'($signed(mcand)) * longint'($signed(mplier)));
  end

  // called at a falling edge: check what the last rising edge produced
  task automatic check_outputs();
    int inflight = 0;
    checks++;
    if (valid_o !== ref_v[LAT-1]) begin
      failures++;
      $display("FAIL cycle %0d: valid_o=%0b expected %0b", cyc, valid_o, ref_v[LAT-1]);
    end
    if (ref_v[LAT-1]) begin
      n_results++;
      checks++;
      if (product_o !== ref_p[LAT-1]) begin
        failures++;
        $display("FAIL cycle %0d: product %h expected %h", cyc, product_o, ref_p[LAT-1]);
      end
    end
    foreach (ref_v[k]) if (ref_v[k]) inflight++;
    if (inflight == LAT) n_full++;
  endtask

  // called at a falling edge: present the next input, then wait one cycle
  task automatic step(input logic v, input logic [31:0] x, input logic [31:0] y);
    logic [32:0] yext;
    valid_i = v;
    mcand   = x;
    mplier  = y;
    if (v) begin
      n_ops++;
      yext = {y, 1'b0};
      for (int i = 0; i < 16; i++) grp_seen[yext[2*i +: 3]]++;
      if (x[31] && y[31]) n_negneg++;
      if (x == 32'h8000_0000 || y == 32'h8000_0000) n_minop++;
    end else if (n_ops > 0) begin
      n_bubble++;
    end
    @(negedge clk);
    check_outputs();
  endtask

  function automatic logic [31:0] pick_operand();
    case ($urandom_range(0, 7))
      0:       return 32'($signed($urandom_range(0, 31)) - 16);   // small, either sign
      1:       return 32'h8000_0000 + $urandom_range(0, 3);       // near most negative
      2:       return 32'h7FFF_FFFF - $urandom_range(0, 3);       // near most positive
      default: return $urandom;
    endcase
  endfunction

  localparam logic [31:0] CORNERS [8] = '{32'h0, 32'h1, 32'hFFFF_FFFF, 32'h8000_0000,
                                          32'h7FFF_FFFF, 32'hAAAA_AAAA, 32'h5555_5555,
                                          32'hFFFF_FFFD};

  initial begin
    longint first_edge, last_edge;
    int burst;

    foreach (grp_seen[g]) grp_seen[g] = 0;
    rst     = 1'b1;
    valid_i = 1'b0;
    mcand   = '0;
    mplier  = '0;
    repeat (3) @(negedge clk);
    rst = 1'b0;

    // 1. corner-case burst, back to back, with completion-time check
    burst      = 0;
    first_edge = cyc + 1;          // edge that samples the first operation
    foreach (CORNERS[i]) foreach (CORNERS[j]) begin
      step(1'b1, CORNERS[i], CORNERS[j]);
      burst++;
    end
    last_edge = 0;
    for (int k = 0; k < 2 * LAT; k++) begin
      step(1'b0, '0, '0);
      if (valid_o) last_edge = cyc;
    end
    checks++;
    if (last_edge - first_edge + 1 != longint'(burst + LAT - 1)) begin
      failures++;
      $display("FAIL: %0d back-to-back operations took %0d cycles, expected %0d",
               burst, last_edge - first_edge + 1, burst + LAT - 1);
    end

    // 2. 10,000 random operations in runs separated by bubbles
    for (int n = 0; n < 10000; ) begin
      int run;
      run = $urandom_range(1, 40);
      for (int r = 0; r < run && n < 10000; r++, n++) step(1'b1, pick_operand(), pick_operand());
      repeat ($urandom_range(0, 3)) step(1'b0, '0, '0);
    end

    // 3. reset with operations in flight: they must not appear
    for (int k = 0; k < 3; k++) step(1'b1, $urandom, $urandom);
    if (ref_v[0] || ref_v[1]) n_flush++;
    rst = 1'b1;
    step(1'b0, '0, '0);
    rst = 1'b0;
    for (int k = 0; k < 2 * LAT; k++) step(1'b0, '0, '0);

    // every issued operation not flushed must have produced exactly one result
    checks++;
    if (n_results != n_ops - 3) begin
      failures++;
      $display("FAIL: %0d results for %0d operations (3 flushed)", n_results, n_ops);
    end

    // 4. mechanisms that must have happened
    checks++;
    if (n_full == 0 || n_bubble == 0 || n_flush == 0 || n_negneg == 0 || n_minop == 0) begin
      failures++;
      $display("FAIL: full=%0d bubble=%0d flush=%0d negneg=%0d minop=%0d",
               n_full, n_bubble, n_flush, n_negneg, n_minop);
    end
    for (int g = 0; g < 8; g++) begin
      checks++;
      if (grp_seen[g] == 0) begin
        failures++;
        $display("FAIL: Booth group %03b never occurred", 3'(g));
      end
    end
    $display("ops=%0d results=%0d full-pipeline cycles=%0d bubbles=%0d flushes=%0d negxneg=%0d min-operand=%0d",
             n_ops, n_results, n_full, n_bubble, n_flush, n_negneg, n_minop);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
