# PPU: a pipelined physics processor for 2-D square objects

This is a small physics engine in hardware. A memory holds an array of square
"molecules". Each one has a position, a velocity, a size, a mass, an
elasticity and a stress limit. The physics processing unit (PPU) sweeps this
array without end. For each object it adds up the pushes from every object it
overlaps, adds gravity and wind, moves the object on by the time since its
last update, and writes it back. A host processor shares the memory through
its second port. It adds, deletes and reads objects while the PPU runs, and
sets the global parameters (gravity, wind velocity, wind viscosity, run/stop)
through a small register file.

Everything is fixed-point, and the whole object fits one 256-bit memory word.
One object therefore moves per cycle, and the pipeline does one object pair per
clock.

## The sweep: object A against every object B

The PPU works on one object at a time, called **A**. It reads A once, then
reads every other object, called **B**, one per cycle. For each B the collision
unit works out the acceleration B puts on A. The last slot of A's loop is A's
own address ("reached end"). In that slot the global effects are applied
instead of a collision, and A's update leaves for writeback. The next A is
then loaded.

The array starts at `BASE_ADDR` and ends with an object whose ID is 0. The end
is not stored anywhere else, so the address generator (`ppu_addr_gen`) only
learns that it has reached the end when the data of a read comes back. That is
why it is a **Mealy machine**: in the cycle the terminator's data appears, the
`is_null` flag from the breakdown stage goes straight back into the generator.
The address put on the memory in that same cycle is already the wrapped one.
Only the read of the terminator itself is lost.

The reads for an array of three objects (at addresses 0, 1, 2; terminator at 3)
are:

```
A0  B1  B2  B3(null)  B0*   A1  B2  B3(null)  B0  B1*   A2  B3(null)  B0  B1  B2*   A3(null)  A0 ...
```

`*` marks the final slot, where B == A. B starts just after A, wraps at the
terminator and stops when it comes round to A. A wraps to the base when the
object after it is the terminator. Two registers hold the state, `&A` and the
next candidate address, plus a comparator (`&B + 1 == &A`) that marks the final
slot.

One sweep costs `N·(N+3)+1` cycles for `N` live objects. Each A takes N+2
reads plus one cycle in which the writeback takes the memory port. The extra
cycle is the read of the terminator as an A. For 101 objects that is 10,505
cycles, so each object is updated about every 10 k cycles.

## Pipeline and timing

```
 t     address generator drives memory port A (one read per cycle)
 t+1   breakdown: split the word into fields, classify the slot
       (load A / collision slot / final slot / NOP), capture A
 t+1   overlap calculator  ──┐  collision acceleration: 4 cycles
       global effects (same latency, on the final slot)
 t+5   accumulator + overstress detector (sum over A's collisions)
 t+6   time-dependent update, pack the word
 t+7   writeback on memory port A
```

The memory has one port for the PPU, and that port is busy reading on every
cycle. A writeback therefore **stalls the read stage** for one cycle: the
control block drops `issue_en`, and the address generator holds its next
address, including any wrap it has just learnt. Everything behind the read
stage keeps flowing and never stalls, so each unit has a fixed latency and
carries a valid bit. A's fields travel beside the slots, so the next A can be
loaded while the last one is still on its way to writeback.

A slot is a NOP when there is no data, when it is the terminator, or when B is
marked destroyed. A destroyed A is not updated or written back.

**No read-after-write interlock.** An object is read again for its next
update about N·(N+3) cycles later, and its writeback comes 7 cycles after its
final slot. With very few objects (roughly N ≤ 2) the next read can therefore
beat the writeback, and the earlier update is lost. Each update measures its
own elapsed time from the stored timestamp, so positions stay consistent in
that case. Only the collision and global accelerations of the lost update go
missing. B reads always see the most recent writeback. B objects therefore
lag by at most one sweep.

## The object word (`ppu_pkg::obj_t`)

| bits     | field          | format                                    |
|----------|----------------|-------------------------------------------|
| 255:240  | `obj_id`       | 16 b; 0 terminates the array              |
| 239:224  | `pos_x`        | unsigned 8.8, centre of the square        |
| 223:208  | `pos_y`        | unsigned 8.8                              |
| 207:192  | `pos_t`        | orientation, 2^16 = one turn              |
| 191:176  | `vel_x`        | signed 8.8                                |
| 175:160  | `vel_y`        | signed 8.8                                |
| 159:144  | `vel_t`        | signed, orientation units                 |
| 143:139  | `side`         | 5 b integer side length                   |
| 138:131  | `inv_mass`     | unsigned 4.4, **1/mass** (0 = immovable)  |
| 130:123  | `elas`         | unsigned 4.4 elasticity                   |
| 122:107  | `max_stress`   | 16 b, largest tolerated \|acceleration\|  |
| 106      | `overstressed` |                                           |
| 105      | `destroyed`    | lazily deleted; removed by compaction     |
| 104:73   | `timestamp`    | 32-bit cycle count of the last update     |
| 72:0     | reserved       | carried through unchanged                 |

Accelerations are 16-bit two's complement. The binary scalings between the
quantities are the `*_SHIFT` constants in `ppu_pkg`. They set the physical
units seen by software and can be changed in one place.

## The physics

**Overlap** (`ppu_overlap`, combinational). For each axis:
`d = |A − B|` and `a = (sideA + sideB)/2 − d`, clamped at 0 (8.8 format).
Two comparisons give the push directions: `dir_x = Ax < Bx` and
`dir_y = Ay > By`.

**Collision acceleration** (`ppu_collision_accel`, 4 cycles, one pair per
cycle). The force model is

```
F_x = a · b · dx · (elas_A + elas_B)        F_y = a · b · dy · (elas_A + elas_B)
acc = F · m⁻¹                                 (m⁻¹ = A's inv_mass, no divider)
```

This is computed as (elasticity sum × m⁻¹) and (a × b), then their product,
then × dx and × dy. The result is scaled by `FORCE_SHIFT` (32 fraction bits)
and saturated to −32768…32767. A is pushed away from B (+y is "up"). The
angular acceleration is the component with the larger magnitude, negated.
With no overlap, a·b = 0 and all three outputs are zero.

**Global effects** (`ppu_global_accel`, same latency, applied on A's final
slot):

```
acc_x = (wind_vx − vel_x) · visc · side >>> WIND_SHIFT
acc_y = gravity + (wind_vy − vel_y) · visc · side >>> WIND_SHIFT
```

Gravity is a register that software sets, and the wind acts as a drag towards
the wind velocity. The angular term quantises the linear global acceleration to
one of 8 orientations (45° steps, tan 22.5° taken as 1/2). It then turns the
object towards that orientation: `acc_t = (octant·2^13 − pos_t) >>> 4`.

**Accumulation** (`ppu_accumulator`, `ppu_overstress`). Three saturating
16-bit adders keep the running sum of A's collision accelerations. Muxes keep
empty slots out of the sum. On the final slot the global acceleration is added,
the total goes to the update stage, and the sum restarts for the next A.
Alongside, three magnitude comparators check each collision against A's
`max_stress`. The result is a sticky overstress flag, reported on the final
slot.

**Time-dependent update** (`ppu_time_update`). With `dt = now − timestamp`:

```
pos += vel · dt >>> VEL_SHIFT   (x, y saturate to 0..65535; orientation wraps)
vel += acc · dt >>> ACC_SHIFT   (saturating)
timestamp = now
overstressed |= this update's flag;  destroyed |= previous overstressed
```

The position uses the velocity from before the update. So an object that is
overstressed at one update is destroyed at its next one.

## Processor side

Port B of `ppu_bram` is the processor's port. It carries 256-bit words, reads
with one cycle of latency, and raises `data_ready` after each read. The RAM has
a single physical write port. If the processor writes in the same cycle as a
PPU writeback, the PPU wins, the processor's write is dropped and
`write_error` pulses. The error also sets a sticky bit in the status register,
so software can retry.

Global registers (`ppu_global_regs`; 16-bit data, 3-bit address):

| addr | register    | access                                        |
|------|-------------|-----------------------------------------------|
| 0    | CTRL        | bit 0 run                                     |
| 1    | GRAVITY     | signed acceleration added to acc_y            |
| 2    | WIND_VISC   | unsigned 4.4                                  |
| 3    | WIND_VX     | signed 8.8                                    |
| 4    | WIND_VY     | signed 8.8                                    |
| 5    | STATUS      | bit 0 idle; bit 1 write refused (W1C)         |
| 6, 7 | TIME_LO/HI  | current cycle count (read only)               |

**Start, stop, garbage collection** (`ppu_control`). Setting run starts the
sweep at the first object. Clearing run lets the current A finish and stops
issuing at the next "load A". The controller then waits for the pipeline to
drain and reports idle. While idle, the address generator is held at the base,
and software may rewrite or compact the array: drop destroyed objects, move
the terminator. The next start begins from the first object again. New objects
can also be added while the PPU runs. Write the new terminator first, then the
object in the old terminator's place, and stamp it with TIME_LO/HI so that its
first elapsed time is small.

Deleting an object while the PPU runs means setting its `destroyed` bit:
read the word, set the bit and write it back. If the object is A at that
moment, its pending writeback carries the old word and clears the bit again.
Software should therefore read the object back about one A-loop later
(N+3 cycles plus the 7-cycle pipeline) and repeat the delete if the bit is
gone. Once it holds, the object is skipped as a B and never written again.
Compaction while idle then reclaims the word.

## Choices made in this implementation

The block structure, the formats in the table, the 256-bit × 8192-word memory
with PPU write priority, the Mealy wrap at a null ID, the force formulas,
saturation to 16 bits, the three-adder accumulator and the timestamp-based
update all follow the original design. These were filled in here:

- the order of the fields inside the word, and 16-bit orientation, angular
  velocity and max stress;
- all `*_SHIFT` scalings, the sign conventions of the push and of the angular
  term, and positions measured at the centre of the square;
- the angular part of the global effects (turn towards one of 8 directions);
  drag relative to the object's own velocity, using three multipliers where
  the original sketch has two;
- saturating (not wrapping) sums and updates;
- "overstressed, then destroyed at the next update", and skipping destroyed
  objects;
- the control block's stop-at-boundary / drain / idle behaviour, and the
  register map standing in for the processor bus;
- no read-after-write interlock (see above);
- gravity is a register that resets to 0. Software writes the scaled value
  of g, and that value can be of either sign;
- the collision calculator has three internal register stages plus an output
  register, which plays the part of the acceleration register in front of
  the accumulator. That gives the 4-cycle latency. The global calculator is
  padded to the same latency, and its result is added to the collision sum
  on the final slot. The original design instead selects it with a mux in
  place of a collision result; the effect is the same.

The processor bus adapter and the host software (network server, garbage
collector) are not part of this RTL. `ppu_top` brings the memory port and the
register port out as plain signals instead.

## Files

`rtl/`: `ppu_pkg` (types and constants), `ppu_top`, and one module per block:
`ppu_addr_gen`, `ppu_bram`, `ppu_breakdown`, `ppu_overlap`,
`ppu_collision_accel`, `ppu_global_accel`, `ppu_accumulator`, `ppu_overstress`,
`ppu_time_update`, `ppu_cycle_counter`, `ppu_global_regs`, `ppu_control`.

`tb/`: one self-checking testbench per module, `tb_<module>`, and
`tb_ppu_pkg` for the word layout and the saturation helpers. Each compares
the block with an independent integer model, checks latencies, ends with a
`TB_RESULT checks=… failures=…` line and has a watchdog. `tb_ppu_top` runs the
whole PPU at its default size (8192-word memory). It acts as the processor,
with 8 isolated objects, a colliding pair and a fragile pair. It checks every
writeback of the isolated objects field by field against a model. It also
checks that the colliding pair is pushed apart, and that the fragile pair is
overstressed, then destroyed, then no longer updated. It forces a write clash,
stops to idle, compacts the array and restarts. Each of these mechanisms is
counted, and one that never happens fails the test.

`tb_ppu_demo_boxes` also runs the whole PPU at its default size, on two demo
scenes. The first is one large box with 100 random boxes in a wind (101
objects). The second is a tower of boxes hit by a fast box, next to a canyon
of three boxes holding 30 random boxes, under gravity (42 objects). Each scene
runs for four full sweeps while the processor port reads the whole array over
and over. The second scene then goes on as the two-player game does. Five boxes
are added and three deleted while the PPU runs. Refused processor writes
(clashes with a writeback) are retried, and lost deletes are repeated. The
testbench keeps an independent model of the whole sweep. Every
read address on the PPU port is checked against the expected A/B order. Every
collision is recomputed from the memory contents of its read cycle. Every
writeback is compared field by field and checked to come exactly 7 cycles
after its final slot. The measured sweep length must be exactly
`N·(N+2)+1` reads plus one cycle per writeback. For 101 objects that is
10,505 cycles.

Simulating, for example the whole design:

```
verilator --binary --timing --assert -Irtl rtl/ppu_pkg.sv rtl/*.sv \
          tb/tb_ppu_top.sv --top-module tb_ppu_top -Mdir obj_top
./obj_top/Vtb_ppu_top
```

For one block, list `rtl/ppu_pkg.sv`, the module (and `rtl/ppu_overlap.sv`
for the collision calculator) and its testbench. Lint with
`verilator --lint-only -Wall -Irtl rtl/ppu_pkg.sv rtl/*.sv --top-module ppu_top`.
Every testbench passes, and the full-size run takes well under a second.
