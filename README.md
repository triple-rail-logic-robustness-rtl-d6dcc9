# Secure triple rail logic: a DPA-hardened DES S-box stage

Differential power analysis recovers a key by correlating a chip's supply
current with the data it processes. Dual rail, return-to-zero logic removes
most of that correlation: every bit is carried on two wires, exactly one of
which rises per computation, so the number of switching wires no longer
depends on the value. What remains is timing. After place and route, the true
and false wire of a bit carry different loads, so a 1 and a 0 arrive at
slightly different times; in a dual rail datapath these differences add up
gate after gate, and the moment each gate fires, and hence the shape of the
current trace, again depends on the data.

Secure triple rail logic (STTL) adds a third wire per bit, a **validity
rail**, and makes each gate fire on its validity inputs instead of on its
data inputs. The validity path of every gate is made deliberately slower than
its data path, so by the time a gate is told its inputs are valid, both of its
data rails have long settled, whichever one it was. Timing skew on the data
rails is absorbed at every gate instead of accumulating, and the whole block
computes in a time that does not depend on the data.

This repository holds synthesizable SystemVerilog for such a circuit: the
triple rail And2 gate in its two published FPGA mappings, a gate library
derived from it, the attacked part of DES (6-bit key addition followed by
S-box 1) built only from those gates, and the clocked FPGA shell that feeds it
from a serial link. It was written from a published description of an FPGA
experiment that measured this circuit against power analysis; the structure
of the gates, the buffer counts and the sub-module's function follow that
description, while everything it leaves open (how XOR and the S-box are made
of gates, the serial protocol, the handshake with the clocked logic) is this
design's own choice and is flagged as such below.

## Triple rail bits and the four-phase cycle

A bit is a `tr_bit_t` (in `sttl_pkg`): `r0` (false rail), `r1` (true rail),
`rv` (validity rail).

| state  | r0 | r1 | rv | meaning                          |
|--------|----|----|----|----------------------------------|
| spacer | 0  | 0  | 0  | no data, between two computations |
| 0      | 1  | 0  | 1  | valid logic 0                    |
| 1      | 0  | 1  | 1  | valid logic 1                    |

Every computation is one four-phase cycle: the inputs go from spacer to
valid (data rails first, or together with the validity rails), the outputs
fire, the inputs return to the spacer, the outputs return to the spacer.
Inversion costs nothing: swap `r0` and `r1`, keep `rv` (`sttl_pkg::tr_not`).

There is no clock inside the triple rail logic and no reset: the all-low
spacer clears every gate, so the first thing any driver must do after
power-up is apply it (the sequencer does this from reset).

## The triple rail And2 gate (`tr_and2`)

Both mappings start with a C-element (`c_element`) on the two validity
inputs, giving an internal event `v` ("both operands valid"). A C-element
raises its output when all inputs are 1, clears it when all are 0 and holds
it otherwise. `v` then gates the data outputs and, through a buffer chain,
becomes the output validity `z.rv`.

**Compact mapping** (`STYLE = STTL_COMPACT`, the default, 6 LUTs):

```
v     = C(a.rv, b.rv)
z.r1  = C(a.r1, b.r1, v)
z.r0  = C'(a.r0, b.r0, v)        C'(a,b,c): Z = (a+b).c + Z.(a+b+c)
z.rv  = v -> buf -> buf -> buf
```

`C'` (`gen_c_element`) is an asymmetric C-element: it sets when `c` is high
and either data input is high (the OR of the false rails, which is the false
output of an AND) and clears only when all three inputs are low.

**Basic mapping** (`STYLE = STTL_BASIC`, 11 LUTs, plain C-elements only):

```
v     = C(a.rv, b.rv)
z.r1  = NAND(~C(a.r1, b.r1, v), ~C(a.r1, b.r1, v))     (NAND with tied inputs)
z.r0  = NAND(~C(a.r0, v), ~C(b.r0, v))                 = C(a.r0,v) | C(b.r0,v)
z.rv  = v -> five buffers
```

The tied NAND on the true path exists only to give both data paths the same
logic depth.

The buffers are the heart of the scheme and also the part RTL cannot
express: they have no logic function, only delay. In `tr_and2` they are a
chain of nets marked `keep`, one per buffer, so a synthesis tool that honours
the attribute leaves a chain of LUTs there, as the original FPGA macros did
with three cascaded LUTs. Whether the validity path is really slower than the
data path under the actual routing is a property of the placed design and
must be checked with static timing analysis; a zero-delay simulation cannot
show it. The number of buffers can be changed with `N_BUF`.

`tr_or2` is an And2 with its inputs and output rail-swapped (De Morgan), so it
has the same timing and protocol.

## The DES sub-module (`tr_des_submodule`)

The circuit under attack is the first S-box lookup of the first DES round: the
first 6-bit block of the expanded right half is XORed with the first 6 bits of
the round key, and the result goes through S-box 1, giving 4 bits. This is the
smallest piece of DES whose output depends on both data and key.

Built only from triple rail gates, every path has the same depth, so the
output validity rails fire after a fixed number of gate delays:

| stage            | gates                                                      | levels |
|------------------|------------------------------------------------------------|--------|
| key addition     | 6 × `tr_xor2` = (a AND NOT b) OR (NOT a AND b), 3 gates each | 2      |
| S-box decoder    | 12 pair products, 16 products of 4 bits, 64 minterms (And2)  | 3      |
| S-box OR trees   | per output bit, OR of the 32 minterms that set it (31 Or2)   | 5      |

That is 234 gates and 10 levels. Every DES S-box row is a permutation of
0..15, so each output bit is 1 for exactly 32 of the 64 inputs and each OR
tree is a full binary tree. The S-box values come from the standard DES table
(`sttl_pkg::des_sbox1`, outer bits select the row, middle four the column),
and the tree leaves are chosen at elaboration. Bit 5 of the 6-bit vectors is
the first DES bit; bit 3 of the output is the first output bit.

For reference, the published Spartan-3 implementation of this sub-module had
a constant computation time of 81.7 ns with the compact gate and 103.0 ns with
the basic gate, against 15.6 to 26.6 ns (varying with the data) for a plain
single rail version, and occupied 501 and 966 slices. These numbers come from
that placement, not from this RTL.

## The clocked shell (`sttl_des_top`)

```
rs232_rx_i -> uart_rx -> command decode -> sttl_sequencer <-> tr_des_submodule
                         (key register)        |
                                               +-> ct_o, ct_valid_o, eval_cycles_o
```

* `uart_rx`: 8N1 serial receiver, two-flop input synchronizer, mid-bit
  sampling, `CLKS_PER_BIT` cycles per bit (default 434: 115200 bit/s at
  50 MHz). A frame with a low stop bit is dropped and flagged, and the
  receiver then waits for the line to return high.
* Commands, one byte each: bit 7 = 1 loads bits 5:0 as the subkey; bit 7 = 0
  sends bits 5:0 as a plaintext block and starts a computation. Bit 6 is
  ignored. A plaintext that arrives while a computation is running is dropped
  and `dropped_o` pulses; at any real bit rate this cannot happen, since a
  computation takes a few clock cycles and a frame hundreds.
* `sttl_sequencer`: on start it drives the encoded plaintext and subkey, all
  rails from one clock edge, then waits for completion (all four output
  validity rails high with one data rail each), captures the result, drives
  the spacer and waits for every output rail to be low before it accepts the
  next vector. Both conditions come from the asynchronous network and pass
  through two-flop synchronizers; the captured rails are stable because the
  sub-module holds its outputs until the spacer arrives. `eval_cycles_o`
  reports the clock cycles from launch to completion; in simulation it is 3
  for every vector. An assertion checks that no output bit ever has both data
  rails high, and `proto_err_o` flags completion with a malformed bit.

The shell, the serial protocol and the handshake are this design's own: the
original work says only that a host PC fed the sub-module through an on-chip
RS232 module.

## Files

| file | contents |
|------|----------|
| `rtl/sttl_pkg.sv` | `tr_bit_t`, gate style enum, rail helpers, DES S-box 1 |
| `rtl/c_element.sv` | N-input Muller C-element |
| `rtl/gen_c_element.sv` | asymmetric C-element C' |
| `rtl/tr_and2.sv` | triple rail And2, both mappings, validity buffer chain |
| `rtl/tr_or2.sv`, `rtl/tr_xor2.sv` | gates derived from And2 |
| `rtl/tr_sbox1.sv` | S-box 1 as a balanced decoder and OR trees |
| `rtl/tr_des_submodule.sv` | key addition and S-box 1 |
| `rtl/uart_rx.sv`, `rtl/sttl_sequencer.sv` | clocked shell |
| `rtl/sttl_des_top.sv` | top level |
| `tb/tb_*.sv` | one self-checking testbench per module, a second for the top (all subkeys) and a skewed-arrival test of the sub-module |

## Simulating

Each testbench is self-checking and ends with a line
`TB_RESULT checks=N failures=M`. With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv -Irtl \
    rtl/sttl_pkg.sv tb/tb_tr_des_submodule.sv --top-module tb_tr_des_submodule
./obj_dir/Vtb_tr_des_submodule
```

Replace the testbench name to run another. What each one covers:

* `tb_c_element`, `tb_gen_c_element`: random sequences against the set /
  clear / hold rules.
* `tb_tr_and2`, `tb_tr_xor2`: both mappings; that nothing fires while only
  data rails (or one validity rail) are valid, the result once both validity
  rails are high, that outputs hold while inputs are being withdrawn, and
  return to zero.
* `tb_tr_sbox1`: all 64 inputs (and random repeats), both mappings, against a
  separately written S-box table.
* `tb_tr_des_submodule`: all 4096 plaintext/subkey pairs with the compact
  mapping, 1024 with the basic one.
* `tb_tr_des_submodule_skew`: the timing property at the logic level. Every
  data rail arrives after its own random delay (0 to 49 ns, standing in for
  uneven routing) and all validity rails at 60 ns; no output may move before
  60 ns and all must move at exactly 60 ns. The same holds for the return to
  zero. A gate whose data outputs did not wait for the validity rails fails
  this test at once.
* `tb_uart_rx`: 300 random bytes with random gaps, latency, a bad stop bit,
  a glitch.
* `tb_sttl_sequencer`: the sub-module replaced by a responder with a set
  delay; checks encoding, capture, spacer, waiting for return to zero, and
  that the reported evaluation time is the same for every vector and grows by
  exactly the added delay.
* `tb_sttl_des_top`: the top at its default parameters, driven over the
  serial line at 115200 bit/s: 4 subkeys × 64 plaintexts, constant
  evaluation time, return to zero after every result, a bad frame. About 80 s.
* `tb_sttl_des_top_allkeys`: the whole analysed workload, 64 subkeys × 64
  plaintexts through the serial line, basic mapping, 16 cycles per bit.

The triple rail network is slow to simulate (about 14,000 clock cycles per
second for the top) because the simulator re-settles the C-element feedback
of some 460 C-elements on every event.

## How far to trust it, and what differs from the published circuit

* **Timing is not modelled.** The defining property of STTL (validity path
  slower than data path, constant computation time) depends on the placed
  circuit. The RTL fixes the structure that produces it (gates triggered by
  validity, buffer chains, equal logic depth on every path); the testbenches
  check the logic and the protocol, not the delays.
* **C-elements are latches.** On the FPGA they were LUTs with their output fed
  back. Here they are `always_latch` blocks with the same function. Lint
  reports them as latches or, once flattened, as combinational loops; both are
  intended.
* **Gate reading of the basic mapping.** The inverting C-element outputs in
  front of the two NANDs are read from the published schematic; they are what
  makes the NANDs produce the And2 function, and the resulting count matches
  the published 11 LUTs.
* **XOR and S-box structure are this design's.** The original work gives the
  function (key addition, S-box 1) and the rule that true and false paths
  must have equal depth, not the gate netlist.
* **The key is a triple rail input like the plaintext** and returns to zero
  with it in every cycle.
* **Not built:** the single rail and dual rail versions the published
  experiment used as references, the power-measurement bench (battery
  supply, current probe, oscilloscope), the host PC and the DPA/CPA analysis
  software.
