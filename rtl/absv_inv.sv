// absv_inv -- single-bit inverter cell of the absolute-value comparator.
//
// The comparator is built from three kinds of cells, and this is the
// simplest: a static CMOS inverter (one PMOS pull-up, one NMOS pull-down).
// In the comparator it complements each magnitude bit of A for the
// "A positive" path, derives the first carry-in from the sign bit, and
// restores the true carry after each mirror-adder carry network.
//
// Interface: in_i -> out_o = ~in_i.  Purely combinational, no clock.
// The cell and its use follow the design; transistor sizing (PMOS twice
// the NMOS width) is a circuit property and is not represented here.
module absv_inv (
  input  logic in_i,
  output logic out_o
);

  always_comb out_o = ~in_i;

endmodule
