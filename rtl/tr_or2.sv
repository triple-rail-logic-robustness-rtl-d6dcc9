// tr_or2: triple rail Or2 gate, derived from the triple rail And2 by De Morgan.
//
// a OR b = NOT(NOT a AND NOT b). In triple rail logic NOT is a swap of the two
// data rails, so the gate is one tr_and2 whose inputs and output have their
// data rails swapped: z1 = a1 + b1 is produced by the And2's false-rail logic
// and z0 = a0 . b0 by its true-rail logic. Timing, validity behaviour and
// protocol are those of tr_and2. This derivation is a choice of this design.
module tr_or2
  import sttl_pkg::*;
#(
  parameter sttl_style_e STYLE = STTL_COMPACT
) (
  input  tr_bit_t a_i,
  input  tr_bit_t b_i,
  output tr_bit_t z_o
);

  tr_bit_t zn;

  tr_and2 #(.STYLE(STYLE)) u_and (.a_i(tr_not(a_i)), .b_i(tr_not(b_i)), .z_o(zn));

  assign z_o = tr_not(zn);

endmodule
