# Loop-back interconnect test for an EMIB bridge with one die attached

An EMIB (embedded multi-die interconnect bridge) is a small silicon die buried
in the package substrate. It carries thousands of short, dense wires between two
neighbouring dies through fine-pitch micro-bumps. There are no through-silicon
vias, so a tester on the package balls cannot reach those wires. A defective
bridge is best found after the first, cheaper die is mounted and before the
expensive second die is added.

This RTL is the test logic in that first die. Before assembly, the far ends of
the bridge wires are shorted in pairs with sacrificial ("dummy") metal, so each
pair forms a loop that starts and ends at the mounted die. One wire of each pair
is driven by a **transmitter** wrapper cell. The other wire comes back into a
**receiver** wrapper cell. All access goes through one IEEE 1149.1-style
TAP whose pins reach the package balls. The TAP shifts a pattern into the
transmitters, lets it run around the loops, captures it in the receivers and
shifts it out. A wire that is open or too slow (resistive open) returns a stale
bit. Two wires shorted together return a merged value. In both cases the bit
read back differs from the bit sent.

The test-access architecture follows IEEE P1838 (the 3D-test standard): a
*primary* test interface on the package side of the die and *secondary*
interfaces toward the neighbouring die. Here the neighbouring die is missing,
so the two secondary interfaces lead to the die's own transmitter cells (SI1)
and receiver cells (SI2).

## Pairing of the wires

The bridge has `N_IC` interconnects, numbered 1..N. Interconnect `i` is looped
to interconnect `N/2 + i`. In this RTL, interconnects `N/2+1 .. N` are the
transmitters and `1 .. N/2` are the receivers. Pair `j` (0-based) is
transmitter cell `j`, bump `tx_bump[j]` and interconnect `N/2+1+j`, together
with receiver cell `j`, bump `rx_bump[j]` and interconnect `1+j`.

With an odd `N_IC`, the middle interconnect `(N+1)/2` has no partner. It gets
one extra receiver cell, the last one in the receiver segment (`NRX = N - N/2`).
It can only be tested after the dummy metal is reworked so that it is paired
with a transmitter wire whose own short has been removed. That rework is a
physical step, not a logic one.

Only one cell sits on each wire: a transmitter or a receiver, never both. That
halves the wrapper area compared with a full boundary cell per wire end.

## The test sequence

A complete interconnect test takes four TAP operations. Opcodes are 4 bits.

| step | instruction (opcode) | what is scanned | effect |
|---|---|---|---|
| 1 | CONFIG `0001` | 4-bit configuration value `0001` | SI1 (transmitter segment) joins the path in test mode |
| 2 | SHIFTIN `0000` | `NTX` pattern bits on TDI_P while the TAP sits in Run-Test/Idle | pattern shifted into the transmitters, launched and captured |
| 3 | CONFIG `0001` | configuration value with bit 1 set | SI2 (receiver segment) joins the path |
| 4 | SHIFTOUT `0100` | DR scan of `NRX` bits | responses come out on TDO_P |

SHIFTIN and SHIFTOUT are the two added instructions. They are the only ones that
raise `TEST_ENABLE_P`. The decoder drives:

| instruction | TP | FP | TEST_ENABLE_P |
|---|---|---|---|
| SHIFTIN  | 1 | 0 | 1 |
| SHIFTOUT | 0 | 1 | 1 |
| any other | 0 | 0 | 0 |

### Timing of SHIFTIN (the part that needs care)

During SHIFTIN the TAP stays in Run-Test/Idle. TCK does the following in every
cycle:

```
rising TCK   transmitter segment shifts: TDI_P -> cell 0 -> cell 1 ...
falling TCK  each transmitter's update flip-flop takes its new bit -> bump (launch)
rising TCK   every receiver captures its bump (capture), transmitters shift again
```

So every shift is also a launch, and every receiver samples its wire half a TCK
after the launch. The wire must settle within that half period. A resistive open
adds RC delay. If the delay is longer than the half period, the receiver still
holds the previous bit. Shortening TCK therefore catches smaller opens. The
document's circuit analysis gives roughly 16 kOhm at 200 MHz and 90 kOhm at
50 MHz for a 2 mm wire. The RTL cannot show these numbers: they are properties of
the wires and the drivers.

The receivers keep capturing on every Run-Test/Idle cycle. The capture that
counts is the one on the rising edge that leaves Run-Test/Idle, i.e. the first
TCK of the next scan. It sees the pattern after all `NTX` shifts, and receiver
`j` should then hold transmitter `j`'s bit. After `NTX` shifts, the bit shifted
in first sits in the last transmitter. That capturing edge also shifts one more
bit into the transmitters, but that bit is never launched. Use an alternating
pattern (`0101...`): every wire then toggles at the last launch, which exposes
opens, and neighbouring wires differ, which exposes shorts between neighbours.

### SHIFTOUT

SHIFTOUT is an ordinary DR scan. The path is TDI_P → SI2 → receiver segment →
TDO_P, `NRX` bits long. The receiver of the last pair appears first. During
SHIFTOUT the transmitters hold their bits (FP = 1) and the receivers do not
capture (TP = 0).

## Blocks

```
emib_die_dft                  top: pins, wiring of the two segments
├── primary_tap               primary TAP (package side)
│   ├── tap_fsm               16-state 1149.1 state machine
│   ├── instruction_register  4-bit IR, update on falling TCK
│   ├── ir_decoder            TP / FP / TEST_ENABLE_P, register select
│   ├── bypass_register       1 bit
│   ├── idcode_register       32 bits
│   └── tap_config_register   4 bits: secondary-interface selection
├── secondary_interface  x2   SI1 (transmitters), SI2 (receivers)
└── die_wrapper_register      NTX transmitter + NRX receiver cells
    ├── tx_dwr_cell
    └── rx_dwr_cell
emib_tap_pkg                  states, opcodes, strobe and decode structs
```

### Primary TAP

This is an IEEE 1149.1 TAP. State changes, captures and shifts happen on the
rising edge of TCK. The instruction, the configuration and the wrapper update
stages load on the falling edge. TDO_P also changes on the falling edge and is
enabled (`tdo_p_en`) only in Shift-IR and Shift-DR. TRSTN_P resets
asynchronously. TRSTN_P or Test-Logic-Reset loads IDCODE into the instruction
register and clears the configuration.

| opcode | instruction | register between TDI_P and TDO_P |
|---|---|---|
| `0000` | SHIFTIN  | none of its own; the selected secondary segments |
| `0001` | CONFIG   | configuration register (4 bits) |
| `0010` | EXTEST   | transmitter segment, then receiver segment (NTX+NRX bits) |
| `0011` | INTEST   | same as EXTEST |
| `0100` | SHIFTOUT | none of its own; the selected secondary segments |
| `0101` | IDCODE   | 32-bit IDCODE (also the reset instruction) |
| `0110` | ISCAN    | the core's internal scan chains, through `isc_*` ports |
| `1111` and unused codes | BYPASS | 1 bit |

EXTEST and INTEST set the wrapper mode control. Transmitters then drive their
update bit onto the bump, and receivers drive theirs toward the core. In this
mode the segments behave as an ordinary boundary register with Capture-DR,
Shift-DR and Update-DR. An EXTEST scan is a second, slower way to check the
loops: update to launch, then Capture-DR to capture.

### Configuration register and secondary interfaces

| bit | meaning |
|---|---|
| 0 | SI1 (transmitter segment) in the path |
| 1 | SI2 (receiver segment) in the path |
| 2 | value of TMS_S1 while SI1 is deselected |
| 3 | value of TMS_S2 while SI2 is deselected |

A secondary interface is spliced in only while TEST_ENABLE_P is 1, i.e. under
SHIFTIN or SHIFTOUT. Bits 0 and 1 may both be set. In that case the transmitter
segment comes first, but each segment shifts only in its own mode, so in
practice one segment is selected at a time. Each interface passes TCK_P and
TRSTN_P through unchanged and turns TEST_ENABLE_P into TEST_ENABLE_S1/S2. It
gives TMS_S the primary TMS_P while the interface is selected and its
configuration bit otherwise. The transmitter segment is clocked by
TCK_S1 and the receiver segment by TCK_S2, which are the same net as TCK_P.
TMS_S1 and TMS_S2 are top-level outputs. They
are meant for a TAP on the second die, which is absent before assembly.

### Wrapper cells

Both cell types have a shift/capture flip-flop and an update flip-flop.

* **tx_dwr_cell**. With TEST_ENABLE_S1 = 0 it is an 1149.1 boundary cell.
  With TEST_ENABLE_S1 = 1, FP takes over from Shift-DR. With FP = 0 the cell
  shifts, and its update stage follows, on every Run-Test/Idle cycle. With
  FP = 1 it holds. In test mode the bump always carries the update bit.
* **rx_dwr_cell**. With TEST_ENABLE_S2 = 0 it is an 1149.1 boundary cell.
  With TEST_ENABLE_S2 = 1, TP = 1 captures the bump on every Run-Test/Idle
  cycle, and FP = 1 shifts in Shift-DR.

## Parameters

| parameter | default | where |
|---|---|---|
| `N_IC` | 16 | `emib_die_dft`, `die_wrapper_register`: number of bridge interconnects |
| `NTX`, `NRX` | `N_IC/2`, `N_IC - N_IC/2` | derived; override only together with `N_IC` |
| `IDCODE` | `32'h1838_E001` | placeholder identification code (bit 0 must be 1) |

The logic grows linearly with `N_IC`: two flip-flops per wire, about 12
gate-level cells per wire pair, plus a fixed TAP of about 55 flip-flops. A real
bridge with hundreds or thousands of wires only needs a larger `N_IC`. In
practice it could also be split into several segments.

## Simulating

Every testbench prints `TB_RESULT checks=<n> failures=<m>` and ends with
`$finish`. With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv \
    rtl/emib_tap_pkg.sv tb/tb_emib_die_dft.sv --top-module tb_emib_die_dft
./obj_dir/Vtb_emib_die_dft
```

Replace the testbench name to run any other one. Each block `X` has its own
self-checking testbench `tb/tb_X.sv`.

`tb_emib_die_dft` runs the whole design at its default size, driving only the
TAP pins. The bumps are connected to `tb/emib_bridge_model.sv`, a behavioural
bridge. Its loops can be given three kinds of defect. A large open is modelled
as 7 time units of extra delay, against a TCK period of 10. A small open is
2 units, inside the half-period window. A short between neighbouring pairs is
modelled as a wired AND, where the low driver wins. Shorts on adjacent pairs
chain, so three wires can be shorted together. The testbench runs fault-free
tests, one large open on each pair, a small open, and a short between each
pair of neighbours. It then shorts three wires and drives them with each of
the six mixed level combinations (one wire against two, in both polarities).
Each combination must come back wrong on at least one wire. It
also runs EXTEST, INTEST, ISCAN, BYPASS, IDCODE and the TMS_S multiplexing, and
counts how often each happened. Large opens and shorts must be detected. The
small open must pass at this TCK. It also checks that the SI1 selection
(`send_select`) is high under SHIFTIN and the SI2 selection (`receive_select`)
under SHIFTOUT.

`tb_emib_die_dft_odd` runs the design with seven interconnects. It first
checks that the middle receiver is unpaired. It then applies the rework: one
pair's dummy short is removed and its transmitter wire is looped to the middle
wire. The testbench checks that the middle wire is now tested, including an
open on it.

`primary_tap` carries two assertions, checked when simulating with
`--assert`. TP and FP are never high together, and TEST_ENABLE_P is high
exactly when one of them is.

## How far to trust it, and where it departs from the source design

All blocks compile cleanly and pass their testbenches. Each testbench has been
shown to fail on a deliberately broken copy of its block. What follows is this
implementation's own reading where the source design is silent or
inconsistent:

* **Opcodes.** SHIFTIN = `0000` and CONFIG = `0001` come from the source. The
  codes of EXTEST, INTEST, SHIFTOUT, IDCODE, ISCAN and BYPASS are chosen here.
* **Configuration bits.** The source describes the selection both as a single
  value (1 = transmitter side, 0 = receiver side) and as allowing several
  secondary interfaces at once. This RTL uses one select bit per interface. A
  value of `0001` selects the transmitter side, as described. Selecting the
  receiver side takes `0010`, not `0000`.
* **Where SHIFTIN happens.** Shifting and capturing in Run-Test/Idle follows
  the source's statement that the TAP waits in that state while SHIFTIN runs.
  The half-period launch-to-capture window comes from this RTL's use of the
  falling edge for launch.
* **Receiver cell gates.** The source's receiver cell adds a NAND of TP and FP
  and a multiplexer in a feedback path from the cell's parallel output to its
  serial input. Read gate for gate, that circuit could not shift the responses
  out. The cell here implements the intended behaviour (capture on TP, shift
  on FP) directly, without that feedback path.
* **Transmitter cell shift polarity** follows 1149.1 (shift when Shift-DR is
  high) outside test mode.
* **Secondary interface.** There is no retiming flip-flop on the return path.
  The P1838 flexible-parallel-port configuration register is not included.
* **Which half transmits** (interconnects N/2+1..N) and the default of 16
  interconnects are chosen here.

## Not included

* The bridge itself, the dummy metal, the micro-bumps and the C4 bumps. These
  are passive metal; a simulation model is in `tb/`.
* The core logic and its internal scan chains. They are reached through the
  `isc_si`, `isc_shift` and `isc_so` ports.
* Anything analog. Which open or short resistance is caught at a given TCK
  depends on wire RC and driver strength, not on this logic.
