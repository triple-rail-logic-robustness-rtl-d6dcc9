// tr_and2: secure triple rail (STTL) And2 gate.
//
// Each operand is a triple rail bit (false rail r0, true rail r1, validity
// rail rv). The gate first merges the two validity rails in a C-element; its
// output v is the internal "inputs are valid" event. The data outputs are
// gated by v, so the gate fires when the validity inputs arrive and not when
// the (possibly skewed) data rails settle. The output validity rail is v sent
// through a chain of buffers, which makes the validity path slower than the
// data path: the next gate is therefore triggered by the validity rail, and
// load mismatches on the data rails do not pile up along a datapath.
//
// Two mappings, selected by STYLE:
//   STTL_BASIC   (C-elements only): Z1 = C(a1,b1,v), followed by a NAND with
//                both inputs tied, fed by an inverting C-element, so that the
//                true path has the same depth as the false path;
//                Z0 = NAND(~C(a0,v), ~C(b0,v)) = C(a0,v) | C(b0,v);
//                five buffers on ZV.
//   STTL_COMPACT (generalized C-element): Z1 = C(a1,b1,v),
//                Z0 = C'(a0,b0,v) with C' = (a+b).c + Z.(a+b+c);
//                three buffers on ZV.
// The gate structure and buffer counts follow the two published mappings
// (11 and 6 LUTs). The buffer chain has no logic function; it is kept as a
// chain of nets marked keep, and the delay it is there for exists only in
// the placed circuit, not in a zero-delay simulation.
//
// Protocol: four-phase return to zero. Apply valid operands (data rails
// first or together with the validity rails); z_o.r0 or z_o.r1 rises, then
// z_o.rv. Then bring every input rail low; every output rail falls. No clock.
// The C-elements hold state through feedback, so lint reports latches or
// combinational loops in this gate and in everything built from it; they
// are the gate's memory and are intended.
module tr_and2
  import sttl_pkg::*;
#(
  parameter sttl_style_e STYLE = STTL_COMPACT,
  parameter int unsigned N_BUF = validity_buffers(STYLE)
) (
  input  tr_bit_t a_i,
  input  tr_bit_t b_i,
  output tr_bit_t z_o
);

  logic v;

  c_element #(.N(2)) u_cv (.in_i({a_i.rv, b_i.rv}), .z_o(v));

  // Data rails.
  if (STYLE == STTL_COMPACT) begin : g_compact
    c_element #(.N(3)) u_c1 (.in_i({a_i.r1, b_i.r1, v}), .z_o(z_o.r1));
    gen_c_element u_c0 (.a_i(a_i.r0), .b_i(b_i.r0), .c_i(v), .z_o(z_o.r0));
  end else begin : g_basic
    logic c1, c0a, c0b;
    logic n1, n0a, n0b;
    c_element #(.N(3)) u_c1  (.in_i({a_i.r1, b_i.r1, v}), .z_o(c1));
    c_element #(.N(2)) u_c0a (.in_i({a_i.r0, v}), .z_o(c0a));
    c_element #(.N(2)) u_c0b (.in_i({b_i.r0, v}), .z_o(c0b));
    assign n1  = ~c1;
    assign n0a = ~c0a;
    assign n0b = ~c0b;
    assign z_o.r1 = ~(n1 & n1);
    assign z_o.r0 = ~(n0a & n0b);
  end

  // Validity rail: v through N_BUF buffers.
  (* keep *) logic [N_BUF:0] vbuf;
  assign vbuf[0] = v;
  for (genvar i = 0; i < N_BUF; i++) begin : g_vbuf
    assign vbuf[i+1] = vbuf[i];
  end
  assign z_o.rv = vbuf[N_BUF];

endmodule
