// tb_abs_value_comparator -- end-to-end test of the absolute-value
// comparator at its default size (4-bit A, 3-bit T).
//
// Every (A, T) pair is applied; the expected result is computed with
// ordinary integer arithmetic: |A| > T with A read as two's complement.
// The design's critical vector (A = 0111, T = 110, expected 1) is applied
// on its own first.  Each mechanism of the circuit is counted and must
// occur at least once:
//   - negative A path (true bits, carry-in 0), with output 1 and with 0
//   - positive A path (complemented bits, carry-in 1), with output 1 and 0
//   - the most negative A, whose magnitude has no positive code
//   - a carry that ripples from the carry-in through every stage
// Combinational: each vector is given 1 ns to settle.
module tb_abs_value_comparator;
  localparam int unsigned W = 4;

  logic [W-1:0] a_i;
  logic [W-2:0] t_i;
  logic         gt_o;

  int checks = 0, failures = 0;
  int neg_hi = 0, neg_lo = 0, pos_hi = 0, pos_lo = 0;
  int most_neg = 0, full_ripple = 0, critical = 0;

  abs_value_comparator dut (.a_i(a_i), .t_i(t_i), .gt_o(gt_o));

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input logic [W-1:0] a, input logic [W-2:0] t);
    int sa, mag;
    logic expected;
    logic [W-2:0] addend;
    logic ripple;
    sa  = (a[W-1]) ? int'(a) - (1 << W) : int'(a);
    mag = (sa < 0) ? -sa : sa;
    expected = (mag > int'(t));
    a_i = a;
    t_i = t;
    #1;
    checks++;
    if (gt_o !== expected) begin
      failures++;
      $display("FAIL A=%b (%0d) T=%b (%0d): gt=%b expected %b", a, sa, t, t, gt_o, expected);
    end
    // Mechanism bookkeeping, from the inputs alone.
    addend = a[W-1] ? a[W-2:0] : ~a[W-2:0];
    ripple = !a[W-1] && ((addend ^ t) == '1);
    if (a[W-1]) begin
      if (expected) neg_hi++; else neg_lo++;
    end else begin
      if (expected) pos_hi++; else pos_lo++;
    end
    if (a == {1'b1, {(W-1){1'b0}}}) most_neg++;
    if (ripple) full_ripple++;
  endtask

  initial begin
    // Critical-path vector of the design: A = 0111, T = 110 -> 1.
    apply(4'b0111, 3'b110);
    checks++;
    if (gt_o !== 1'b1) begin
      failures++;
      $display("FAIL critical vector");
    end else critical++;

    for (int a = 0; a < (1 << W); a++)
      for (int t = 0; t < (1 << (W-1)); t++)
        apply(W'(a), (W-1)'(t));

    $display("mechanisms: neg_hi=%0d neg_lo=%0d pos_hi=%0d pos_lo=%0d most_neg=%0d full_ripple=%0d critical=%0d",
             neg_hi, neg_lo, pos_hi, pos_lo, most_neg, full_ripple, critical);
    if (neg_hi == 0) begin failures++; $display("FAIL never: negative A, output 1"); end
    if (neg_lo == 0) begin failures++; $display("FAIL never: negative A, output 0"); end
    if (pos_hi == 0) begin failures++; $display("FAIL never: positive A, output 1"); end
    if (pos_lo == 0) begin failures++; $display("FAIL never: positive A, output 0"); end
    if (most_neg == 0) begin failures++; $display("FAIL never: most negative A"); end
    if (full_ripple == 0) begin failures++; $display("FAIL never: full carry ripple"); end
    if (critical == 0) begin failures++; $display("FAIL never: critical vector"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
