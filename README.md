# Active interlock for storage-ring insertion devices

A wiggler in an electron storage ring makes an X-ray beam strong enough to
melt the vacuum chamber. This happens if the electron beam goes through the
wiggler at a steep vertical angle, about 1.6 mrad or more, because the photon
fan then lands on parts of the beam pipe that have no water cooling. Passive
masks cannot cover every such case, so an *active* interlock watches the beam
position on both sides of each wiggler. If the beam leaves a safe window, the
interlock turns off the ring's RF. The beam is then lost within a few turns,
long before anything heats up.

This repository has a synchronous SystemVerilog model of that interlock's
decision logic. Three insertion devices are protected by default. Beam
positions and beam currents come in as digitised numbers. The outputs are
relay drives, an RF permit, and the status bits that a local microprocessor and
the control room read. The electrodes, RF detectors, current transformer,
relays and the microprocessor are not modelled. They are represented by ports.

## From beam position to RF permit

```
 PUEs ─► detector (primary) ─► logic unit UP_PRI ─┐                 ┌► relay ┐
 up   └► detector (backup)  ─► logic unit UP_BAK ─┤  Y of the same  ├► relay │ series
 PUEs ─► detector (primary) ─► logic unit DN_PRI ─┤  chain, other   ├► relay │ loop ─► rf_permit
 down └► detector (backup)  ─► logic unit DN_BAK ─┘  side = delta   └► relay ┘
                                   ▲        │ status bits
           DCCT comparators a, b ──┤        ▼
           gap bits (via iface) ───┘   micro_interface ─► micro / control room
```

Each insertion device has four sets of pick-up electrodes (PUEs): one set
upstream and one set downstream. Each set feeds two independent detectors, a
primary and a backup. That gives four detectors per device, and each one
drives its own `interlock_logic_unit`. A logic unit owns one central relay.
`relay_drive = 0` means the relay is open. The contacts of all relays are in
series in the RF permit loop, so `rf_permit` is the AND of every relay drive in
the ring. Any single unit can turn off the RF.

The hierarchy is:

| module | what it is |
|---|---|
| `active_interlock` (top) | `N_ID` subsystems, two DCCT comparators, the RF permit AND |
| `interlock_subsystem` | one insertion device: four logic units and one interface |
| `interlock_logic_unit` | Y and delta windows, enable gates, relay drive, status bits |
| `window_comparator` | `LO <= value <= HI` |
| `dcct_comparator` | stored current below 3.75 mA |
| `micro_interface` | first event latch, AND/NOR monitors, gap fan-out |
| `interlock_pkg` | number formats, limits, the status struct, unit indices |

## The logic unit

A unit trips on two signals:

* **Y**: its own detector's vertical position. Y must stay inside ±`Y_LIMIT`
  (default ±2000 µm).
* **delta**: Y minus the Y of the detector in the *same chain* on the *other
  side* of the device. For example, UP_PRI pairs with DN_PRI. Divided by the
  electrode spacing, delta is the vertical angle through the device. Delta
  must stay inside ±`DELTA_LIMIT`. The default is 1.6 mrad × 2 m = ±3200 µm.
  It is computed one bit wider than a position, so it cannot wrap.

Each window output passes through an OR gate whose other input is the unit's
*disable* signal. The two OR outputs are ANDed to give the relay drive:

```
disabled    = (dcct_low_a & dcct_low_b) | gap_open
relay_drive = (y_ok | disabled) & (delta_ok | disabled)      -- registered
```

The horizontal position is not used. The devices are safe for a beam that is
missteered horizontally.

The unit reports four status bits (`unit_status_t`):

* `zero_cross` is 1 when Y > 0.
* `y_ok` is the output of the Y window.
* `delta_ok` is the output of the delta window.
* `disabled` is the interlock status bit. It is **1 when the unit is not
  protecting**.

## What disables the interlock, and why redundancy matters there

The interlock must stay out of the way in two situations:

* **Low current.** Below 3.75 mA the beam cannot do damage. There are two DCCT
  comparators, and each unit receives both. A unit is disabled only when
  *both* comparators report low current. If one comparator fails high, the
  interlock stays armed.
* **Open gap.** With the wiggler gap open, there is no intense X-ray beam.
  The insertion device reports this with two gap bits, a primary and a
  backup. `micro_interface` sends the primary bit to the two primary units
  and the backup bit to the two backup units. Any single armed unit can trip
  the RF, so the device is unprotected only when *both* gap bits say "open".

The current enable makes the interlock recover by itself. A trip turns off the
RF and the beam is lost. The current then drops below 3.75 mA, both DCCT
comparators go high, every unit is disabled, and the relays close again. The
RF comes back with no operator action. This is why the cause of the trip has
to be captured, which the first event latch does.

Where it could, the original design made signals fail safe: a dead wire trips
the RF. This model follows that for the relay drive, which resets to open. The
gap bit and the DCCT comparator outputs are active-high enables. This follows
the source, and it means a signal stuck high disables protection.

## First event latch and monitors (`micro_interface`)

While the latch is open, `status_out` follows the 16 status bits of the four
units. In the first clock in which any `y_ok` or `delta_ok` bit is 0, it stores
that clock's bits and sets `latch_status`. The bits are then frozen until the
reset line is raised, so they survive the beam dump and the automatic RF
restore that follows it.

The reset line is `reset_ctrl | reset_micro`, for the control room and the
local micro. It is level sensitive. Raising it clears the latch, and while it
stays high the latch is *inhibited*: `status_out` keeps following the inputs.
The test program uses this mode.

The interface also watches the four `disabled` bits with two gates. The AND
gives `all_disabled`: the whole device is off, which is normal at low current.
The NOR gives `all_enabled`: all four units are armed. Both gates watch the
live bits. An assertion checks that a latched interface does not change its
bits until the reset line rises.

## The pre-fill test sequence

Before each fill, the operator checks the interlock with the beam itself:

1. Inject 2.5 mA. The interlock is disabled everywhere, so all
   `disabled`/`all_disabled` bits are 1. With the latches inhibited, closed
   orbit distortions are applied with trim magnets at one device after the
   other. A steep downward angle drives all four Y status bits of that device
   low, with `zero_cross` = 1 upstream and 0 downstream. An upward angle
   reverses the zero-crossing bits. The RF stays on throughout.
2. Raise the current to 5 mA. Every unit is armed (`all_enabled`). A
   distortion at one device must now dump the beam.

`tb/tb_active_interlock.sv` replays this sequence. It uses a small beam model:
both DCCTs read the stored current, and the beam is lost 4 clocks after
`rf_permit` drops. The testbench then adds the remaining mechanisms:

* a delta-only fault and a Y-only fault;
* a gap open on the primary bit only, where the backup units still trip;
* a gap open on both bits, where nothing trips;
* one DCCT reading low, where the interlock is still armed;
* latch resets from the control room and from the micro.

It counts each mechanism, and one that never happens counts as a failure.

## Timing

* Logic units register their outputs. `relay_drive`, `rf_permit` and
  `status_live` change one clock after a position, current or gap input.
* `status_out` and `latch_status` follow one clock later, two clocks after the
  input.
* The DCCT comparators, the window comparators, the AND/NOR monitors and the
  gap fan-out are combinational.
* Reset (`rst_n`, asynchronous, active low) opens every relay, clears the
  latches, and reports "in window, enabled" for every unit.

## Numbers and formats

| quantity | value | origin |
|---|---|---|
| insertion devices `N_ID` | 3 | from the design (two hybrid wigglers, one superconducting) |
| logic units per device | 4 | from the design |
| current threshold | 3.75 mA = 375 × 10 µA | from the design |
| angle limit | 1.6 mrad | from the design |
| PUE spacing | 2 m | chosen here, sets `DELTA_LIMIT` |
| Y window | ±2000 µm | chosen here |
| delta window | ±3200 µm | derived: 1.6 mrad × 2 m |
| position format | signed 16 bit, 1 µm/LSB | chosen here |
| current format | unsigned 16 bit, 10 µA/LSB | chosen here |

To change a limit, edit `interlock_pkg`, or override `Y_LO/Y_HI/D_LO/D_HI` on
`interlock_logic_unit` and `THRESHOLD` on `dcct_comparator`.

## How far to trust it, and where it departs from the original

The original interlock was built from analog window comparators and discrete
gates. This RTL keeps its logic equations, its redundancy scheme and its latch
behaviour. It differs in these ways:

* **Digital signals.** It is clocked and works on digitised signals. The
  original responds continuously to voltages.
* **Window limits.** The window limits, the electrode spacing and all number
  formats are not specified by the source design. They are placeholders to
  set for a real machine.
* **Meaning of delta.** The source names a "delta" signal but does not say
  what it is made of. Here it is the up/down difference in the same chain, the
  angle. If a different pairing is wanted, change `other_side()` in
  `interlock_subsystem`.
* **Latch and monitors.** The first event latch is a clocked register with a
  level-sensitive reset/inhibit, not an asynchronous latch. The AND/NOR
  monitors watch the live status bits.
* **RF loop.** The relays are reduced to an AND of their drives. Relay
  drop-out time, DCCT response time and the time to lose the beam are not
  modelled. In the top-level testbench, only the beam loss is modelled, as a
  fixed delay.
* **Not included.** The X signal and the buffered copies of X, Y and the
  current sent to an ADC for diagnostics are not part of this model.

All six modules have self-checking testbenches. Each testbench computes its
expected values independently of the RTL, from an integer model or a
scripted scenario.

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself. For
example, to run the full interlock at its default size:

```
verilator --binary --timing --assert -Irtl \
  rtl/interlock_pkg.sv rtl/window_comparator.sv rtl/dcct_comparator.sv \
  rtl/interlock_logic_unit.sv rtl/micro_interface.sv rtl/interlock_subsystem.sv \
  rtl/active_interlock.sv tb/tb_active_interlock.sv --top-module tb_active_interlock
./obj_dir/Vtb_active_interlock
```

The other testbenches are `tb_interlock_subsystem`, `tb_interlock_logic_unit`,
`tb_micro_interface`, `tb_window_comparator` and `tb_dcct_comparator`. Build
each with the package and the modules it uses. Every run takes well under a
second.
