// mirror_adder_carry -- carry network ("adder part") of a mirror adder.
//
// A mirror adder computes its carry with a symmetric pull-up/pull-down
// network whose output is the complemented carry; a separate inverter
// then restores the carry.  The design splits the two so the inverter
// can be sized on its own, and only the carry is needed: no sum is built.
// This module is the network alone, so its output is inverted.
//
// The network has two branches, mirrored in the pull-up and pull-down:
//   - A and B both active               -> generate
//   - Cin active and (A or B) active    -> propagate
// and the output node is pulled to the complement of the result.
//
// Interface: cout_n_o = ~MAJ(a_i, b_i, cin_i).  Purely combinational.
module mirror_adder_carry (
  input  logic a_i,
  input  logic b_i,
  input  logic cin_i,
  output logic cout_n_o
);

  logic generate_br;
  logic propagate_br;

  always_comb begin
    generate_br  = a_i & b_i;
    propagate_br = cin_i & (a_i | b_i);
    cout_n_o     = ~(generate_br | propagate_br);
  end

endmodule
