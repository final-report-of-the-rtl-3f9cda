// abs_value_comparator -- decides |A| > T in one carry chain.
//
// A is an A_WIDTH-bit two's-complement number (sign bit a_i[A_WIDTH-1]),
// T an (A_WIDTH-1)-bit unsigned threshold.  Instead of forming |A| and
// then comparing, the sign of one sum is examined:
//   A negative: B = T + A.        |A| > T  exactly when B < 0.
//   A positive: B = T - A = T + ~A + 1.  A > T exactly when B < 0.
// Both sums share one ripple chain over the magnitude bits.  Each stage
// adds T[i] to either A[i] (A negative) or ~A[i] (A positive), chosen by
// a multiplexer on the sign bit; the first carry-in is 1 for a positive A
// (the "+1" of the negation) and 0 for a negative A, i.e. ~sign.
// With the sign extensions (A's sign for the negative case, ones for the
// complemented positive case, zero for T) the top bit of B always works
// out to the complement of the chain's final carry, so the answer is the
// inverted carry out of the last stage: the last mirror-adder network is
// used without its restoring inverter.  A = -2^(A_WIDTH-1) is handled
// naturally (its magnitude exceeds every T).
//
// Stage i (i = 0 is the least significant bit):
//   inverter (~A[i]) -> mux (sel = sign) -> mirror carry network
//   -> inverter (true carry into stage i+1, not on the last stage).
//
// Interface: a_i, t_i in; gt_o = (|A| > T).  Purely combinational, no
// clock or reset; the delay is A_WIDTH-1 carry stages plus one mux.
// The structure, the cell set and the strict ">" follow the design; the
// A_WIDTH generalisation and port names are this implementation's own.
module abs_value_comparator #(
  parameter int unsigned A_WIDTH = 4
) (
  input  logic [A_WIDTH-1:0] a_i,
  input  logic [A_WIDTH-2:0] t_i,
  output logic               gt_o
);

  localparam int unsigned STAGES = A_WIDTH - 1;

  logic                sign;
  logic [STAGES-1:0]   a_n;       // complemented magnitude bits
  logic [STAGES-1:0]   addend;    // A[i] or ~A[i], by the sign
  logic [STAGES-1:0]   carry;     // true carries, carry[0] = first Cin
  logic [STAGES-1:0]   carry_n;   // outputs of the mirror carry networks

  assign sign = a_i[A_WIDTH-1];

  // First carry-in: 1 for a positive A (two's-complement "+1"), else 0.
  absv_inv u_cin_inv (
    .in_i  (sign),
    .out_o (carry[0])
  );

  for (genvar i = 0; i < STAGES; i++) begin : g_stage
    absv_inv u_a_inv (
      .in_i  (a_i[i]),
      .out_o (a_n[i])
    );

    absv_mux2 u_mux (
      .a_i   (a_i[i]),
      .b_i   (a_n[i]),
      .sel_i (sign),
      .y_o   (addend[i])
    );

    mirror_adder_carry u_carry (
      .a_i      (addend[i]),
      .b_i      (t_i[i]),
      .cin_i    (carry[i]),
      .cout_n_o (carry_n[i])
    );

    // The last stage needs no restoring inverter: its network output is
    // the answer.
    if (i < STAGES - 1) begin : g_restore
      absv_inv u_cout_inv (
        .in_i  (carry_n[i]),
        .out_o (carry[i+1])
      );
    end
  end

  // B < 0 exactly when the chain does not carry out.
  assign gt_o = carry_n[STAGES-1];

endmodule
