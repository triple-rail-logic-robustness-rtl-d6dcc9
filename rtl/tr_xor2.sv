// tr_xor2: triple rail exclusive-or, the bit-by-bit modulo-2 addition of the
// plaintext block and the subkey.
//
// Built from the gate library as a XOR b = (a AND NOT b) OR (NOT a AND b):
// two tr_and2 gates in parallel, then one tr_or2, all of the same STYLE. The
// inversions are rail swaps. Every path crosses exactly two gates, so the
// output validity arrives after a fixed number of gate delays whatever the
// data. The decomposition is a choice of this design (the published design names only
// the function).
//
// Interface: a_i, b_i, z_o (tr_bit_t). Protocol: four-phase return to zero,
// as tr_and2; latency two gate levels.
module tr_xor2
  import sttl_pkg::*;
#(
  parameter sttl_style_e STYLE = STTL_COMPACT
) (
  input  tr_bit_t a_i,
  input  tr_bit_t b_i,
  output tr_bit_t z_o
);

  tr_bit_t p, q;

  tr_and2 #(.STYLE(STYLE)) u_p (.a_i(a_i),         .b_i(tr_not(b_i)), .z_o(p));
  tr_and2 #(.STYLE(STYLE)) u_q (.a_i(tr_not(a_i)), .b_i(b_i),         .z_o(q));
  tr_or2  #(.STYLE(STYLE)) u_o (.a_i(p),           .b_i(q),           .z_o(z_o));

endmodule
