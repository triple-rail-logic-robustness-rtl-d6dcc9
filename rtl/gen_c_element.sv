// gen_c_element: asymmetric (generalized) C-element C'.
//
// Function, as defined for the compact triple rail And2:
//     Z = (a + b) . c  +  Z . (a + b + c)
// The output is set when the enabling input c is high and at least one of a
// and b is high; it is cleared only when a, b and c are all low; otherwise it
// holds. In the And2 gate this produces the false output (a0 OR b0) while
// waiting for the validity input c, in a single LUT with feedback.
//
// The feedback term is written as a level-sensitive latch (set and clear
// conditions are mutually exclusive), so the latch reported by lint and
// synthesis is the gate's intended storage.
// Once instances are flattened into a network, a linter may instead see the
// latch as combinational feedback (a loop) or find "no latch": either way it
// is this gate's state, which the self-timed logic needs.
//
// Interface: a_i, b_i, c_i, z_o. Timing: no clock; the state is undefined
// after power-up until the all-low spacer has been applied once.
module gen_c_element (
  input  logic a_i,
  input  logic b_i,
  input  logic c_i,
  output logic z_o
);

  logic set_c, clr_c;

  assign set_c = (a_i | b_i) & c_i;
  assign clr_c = ~(a_i | b_i | c_i);

  always_latch begin
    if (set_c || clr_c) z_o = set_c;
  end

endmodule
