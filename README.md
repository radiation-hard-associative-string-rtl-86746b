# Associative String Processor substring (VASP64-style) in SystemVerilog

An Associative String Processor (ASP) is a fine-grain SIMD machine. It has no
processor addresses. A long string of identical one-bit Associative
Processing Elements (APEs) all see the same instruction. The controller picks
the APEs it wants by **content**: it broadcasts a pattern, and every APE whose
data and activity bits match raises a tag. Tags then become activity, either
directly or after being passed along the string to other APEs. The active
APEs assign values or compute bit-serially, all in the same step. Scalars
come back on a single Match Reply (MR) line and through a read of one tagged
APE. Vectors stream in and out through a buffer while the APEs keep working.

This RTL models one **substring**, the content of one 64-APE chip of the
VASP64 family (the radiation-hard CMOS/SOS version runs at 40 MHz). A larger
machine is a chain of substrings joined at their LKL/LKR link ports. The
top module is `asp_substring`.

## The APE

Each APE (`ape.sv`) holds:

| item | width | role |
|---|---|---|
| data register | 64 | vector element(s) |
| activity register | 6 | per-APE labels, matchable like data |
| M | 1 | tagged by the last MATCH (a *responder*) |
| D | 1 | destination of the last network transfer |
| A | 1 | active: takes part in WRITE, ADD, CARRY, VLOAD |
| C | 1 | carry of bit-serial arithmetic |

It also has a 70-bit masked comparator (`ape_comparator.sv`, data + activity)
and a one-bit full adder (`ape_adder.sv`).

## Busses and the four-slot step

All APEs share three broadcast busses:

* the 32-bit **Data bus**, which carries a scalar;
* the 12-bit **Activity bus**, read here as 6 value bits and 6 care bits;
* the **Control bus**, which carries the instruction (`asp_ctrl_t` in `asp_pkg.sv`).

A 32-bit Data bus addresses a 64-bit data register like this. The control bit
`half` selects bits 31:0 or 63:32. The 32-bit `mask` selects which bits of
that field take part in a comparison or are written.

Every instruction is one **step of four clock periods**, so a 40 MHz clock
gives 10 M steps/s. The scalar data and control interface (`scalar_ctrl_if.sv`)
accepts an instruction with a valid/ready handshake and holds it on the
busses for slots 0 to 3. It raises `commit` in slot 3, and all APE state
changes on the clock edge that ends slot 3. The next instruction can be
accepted in slot 3, so a stream runs at exactly one step per four clocks.

## Instruction set

The instruction set and its encoding are this design's own. It covers the
operations that ASPs are built around: bit-parallel matching and assignment,
and bit-serial arithmetic.

| op | who | effect |
|---|---|---|
| `MATCH` | all | M ← ({activity, field} equals {Activity value, Data bus} on every cared bit). With `in_active` set, M is also ANDed with A |
| `TAG` | all | A or M ← M, D, 1 or 0 |
| `WRITE` | active | masked write of the Data bus into the field, and of the activity value into the activity bits whose care bit is set |
| `ADD` | active | `data[d_idx] ← data[a_idx] + b + C`, C ← carry out. `b` is `data[b_idx]`, or Data bus bit 0 when `b_scalar` is set |
| `CARRY` | active | C ← `cin` |
| `NET` | all | D ← the signal the inter-APE network delivers (see below) |
| `READ` | — | `rd_data` ← the field of the leftmost APE with M set. `rd_hit` says whether there was one |
| `VLOAD` | active | masked load of the APE's vector-buffer word into the field |
| `VSTORE` | all | vector buffer ← every APE's field |

An n-bit addition takes one `CARRY` step and then n `ADD` steps (n+1 if the
final carry is stored as a sum bit). For example, 64 APEs adding 12-bit
numbers do 64 × 10 M / 12 ≈ 53 M additions/s. The same formula with 16,384
APEs gives the 13.7 G operations/s quoted for such modules.

## Inter-APE network: moving tags, not data

`ape_comm_net.sv` never moves data words. It moves **activity signals**.
Every APE with M set launches a signal towards LKR (rightwards) or towards
LKL (leftwards). The signal travels until it reaches an APE with an open
gate, sets D there and stops:

* **neighbour mode** (`net_gated=0`): every gate is open, so the M pattern
  shifts by one APE.
* **gated mode** (`net_gated=1`): only active APEs (A=1) are gates. Each
  responder therefore signals the *next selected APE*, however far away it
  is, and skips the unselected APEs in between.

Transfers from many responders proceed in parallel. An APE that is itself a
responder always launches its own signal.

LKL and LKR stand in for the neighbours beyond the two ends of the string.
A signal arriving on `lkl_in` (rightward transfer) or `lkr_in` (leftward
transfer) enters the string. A signal that runs off the end appears on
`lkr_out` or `lkl_out`. Wire `lkr_out` of one substring to `lkl_in` of the
next, and `lkl_out` of the next to `lkr_in` of the first, and the two behave
as one longer string. The same network lets software group neighbouring
APEs into wider "virtual APEs".

The network is a combinational ripple chain, like a carry chain. It is
sampled into D at the end of the step. A chain of many substrings therefore
lengthens this path. At this level no hardware is provided to speed up
long-distance transfers.

## Vector data buffer

`vector_data_buffer.sv` holds one 32-bit word per APE. Outside the chip it
is a byte-wide shift register. On each clock with `vshift=1`, one byte leaves
on `vout` (APE 0's least significant byte first) and one byte enters on
`vin`. This gives 40 Mbytes/s at 40 MHz. Old results are unloaded and new
operands loaded in the same 256 shifts, while the APEs run other steps.
Inside, `VLOAD` and `VSTORE` move all 64 words in one step. A capture wins
over a shift in the same cycle. The byte width and the shift organisation
are this design's own choice.

## Top-level ports (`asp_substring`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset (clears all state) |
| `instr_valid` / `instr_ready` | in/out | 1 | instruction handshake |
| `instr` | in | `asp_instr_t` | `{ctrl, data[31:0], act[11:0]}`; `act = {care[5:0], value[5:0]}` |
| `step_done` | out | 1 | high in slot 3 of every step |
| `mr` | out | 1 | Match Reply: OR of all M flags (combinational) |
| `rd_valid`, `rd_hit`, `rd_data` | out | 1,1,32 | READ result, one clock after the READ step |
| `vshift`, `vin`, `vout` | in/in/out | 1,8,8 | vector port |
| `lkl_in`, `lkl_out`, `lkr_in`, `lkr_out` | | 1 | network ends |

The substring controller that issues the instructions is not part of this
RTL. Neither are the application software and the host. A testbench plays
the controller's part.

## What follows the source architecture and what is this design's own

These follow the VASP64/H1 description:

* a 64-APE string;
* the 64-bit data register and the 6-bit activity register;
* the 70-bit comparator;
* the one-bit full adder;
* the flags C, M, D and A;
* the 32-bit Data bus, the 12-bit Activity bus and the one-bit Match Reply;
* four clocks per step;
* tag transfers to neighbours or to selected remote APEs, with LKL/LKR chaining;
* a vector data buffer;
* the 40 Mbytes/s I/O rate.

These are this design's own choices:

* the instruction set and its encoding;
* the half/mask addressing of the 64-bit register from the 32-bit bus;
* the value/care reading of the Activity bus;
* "stop at the next active APE" as the meaning of a remote transfer;
* the leftmost-responder rule for READ;
* the commit slot and the handshake;
* the reset values;
* the buffer's width and organisation.

One more departure follows from the bus widths. The comparator is 70 bits
wide, but a single `MATCH` compares at most 38 of them: one 32-bit field and
the 6 activity bits. Selecting on both data fields takes three steps: `MATCH` on one field, `TAG` A ← M,
then `MATCH` with `in_active` on the other field.

Not modelled:

* the radiation-hardening process and circuit techniques, which have no
  logic function;
* any bit-parallel carry linkage between the APEs of a virtual APE, which
  the architecture only hints at;
* wafer-scale fault-tolerant versions.

## Files

`rtl/`:

* `asp_pkg.sv`: widths, opcodes, the control-word and broadcast structs.
* `asp_substring.sv`: the top. It instantiates `scalar_ctrl_if`,
  `ape_comm_net`, `vector_data_buffer` and 64 × `ape`.
* `ape.sv`: uses `ape_comparator` and `ape_adder`.

`tb/` has one self-checking testbench per module, `tb_<module>.sv`. Each
prints `TB_RESULT checks=N failures=M`. `tb_asp_substring` runs a complete
program on the full-size 64-APE substring: vector input, 12-bit additions,
vector output, matching, reads, the network and the link ports. It checks
the step and I/O timing too.
`tb_asp_chain` links two full-size substrings into one 128-APE string. The
network is joined through LKL/LKR. The vector ports are joined so that the
two buffers form one 512-byte stream. The test checks that additions, tag
transfers across the boundary in both directions, and gated transfers from
one chip into the other behave as they would in a single string. The
testbench acts as the controller: it ORs the Match Reply lines and takes a
READ from the leftmost substring that reports a hit.

## Simulating

```
verilator --binary --timing --assert -Irtl -y rtl rtl/asp_pkg.sv \
    tb/tb_asp_substring.sv --top tb_asp_substring
./obj_dir/Vtb_asp_substring
```

Replace `asp_substring` with any other module name to run its testbench.
The full-size run takes under a second.
