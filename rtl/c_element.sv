// c_element: Muller C-element with N inputs.
//
// The output goes high when every input is high, goes low when every input is
// low, and otherwise keeps its value. It is the state-holding gate of the
// self-timed triple rail logic: it waits for all its inputs to agree, so a
// gate built from it cannot fire on a partial set of inputs, and it returns
// to zero only once the spacer has reached all of its inputs.
//
// On an FPGA the C-element is a LUT whose output is fed back to one of its
// inputs. Here it is written as a level-sensitive latch whose enable is
// "all inputs equal" and whose data is any one input, which is the same
// function. The latch is the intended storage element of the gate, so the
// latch that lint and synthesis report here is deliberate.
// Once instances are flattened into a network, a linter may instead see the
// latch as combinational feedback (a loop) or find "no latch": either way it
// is this gate's state, which the self-timed logic needs.
//
// Interface: in_i (N inputs), z_o. Timing: purely combinational plus the
// hold state, no clock. The output is undefined after power-up until all
// inputs have been low (or high) once; the spacer state clears it.
module c_element #(
  parameter int unsigned N = 2
) (
  input  logic [N-1:0] in_i,
  output logic         z_o
);

  logic all_one, all_zero;

  assign all_one  = &in_i;
  assign all_zero = ~|in_i;

  always_latch begin
    if (all_one || all_zero) z_o = all_one;
  end

endmodule
