// absv_mux2 -- 2:1 multiplexer cell steered by the sign bit.
//
// Built in the design as two transmission gates with a local inverter
// that makes the complementary select.  In the comparator the select is
// the sign bit A1 of the input: when A is negative (sel_i = 1) the true
// magnitude bit on a_i is passed, when A is positive (sel_i = 0) the
// complemented bit on b_i is passed.  Which pin goes with which select
// value is this design's choice; the behaviour it serves is the design's.
//
// Interface: y_o = sel_i ? a_i : b_i.  Purely combinational.
module absv_mux2 (
  input  logic a_i,
  input  logic b_i,
  input  logic sel_i,
  output logic y_o
);

  logic sel_n;

  // Complementary select, as the internal inverter of the TG pair makes it.
  always_comb sel_n = ~sel_i;

  // Exactly one of the two transmission gates conducts.
  always_comb y_o = (sel_i & a_i) | (sel_n & b_i);

endmodule
