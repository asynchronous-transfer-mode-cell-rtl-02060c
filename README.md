# ATM cell delineation: four HEC-hunting receivers

An ATM link carries a gap-free stream of 53-octet cells with no framing word between them.
A receiver finds where each cell starts from the header checksum. The first four header
octets are followed by an HEC octet, chosen so that the 40 header bits divide exactly by
G(x) = x^8 + x^2 + x + 1. Random data passes that test at a given position only about once
in 256 tries. A real header passes it at the same position every 424 bits. So a receiver
can search for a position with a zero remainder, confirm it on several following cells, and
then lock to it.

This RTL implements that receiver four ways, in two widths and with two search methods:

| instance | data per clock | search (HUNT) method | rate at 160 MHz |
|---|---|---|---|
| serial fixed boundary (`sfb_`) | 1 bit | 40 fixed-window CRC detectors, staggered by one bit | 160 Mbit/s |
| serial moving window (`smw_`) | 1 bit | one sliding-window divider plus a 40-bit delay line | 160 Mbit/s |
| octet fixed boundary (`ofb_`) | 1 octet | 5 fixed-window detectors, staggered by one octet | 1280 Mbit/s |
| octet moving window (`omw_`) | 1 octet | one sliding-window divider plus a 5-octet delay line | 1280 Mbit/s |

The octet versions assume that octet boundaries are already known, as they are when cells
travel inside an SDH frame. The bit-serial versions search every bit position. The
moving-window octet version is the best of the four: it is small and runs at eight times
the rate.

## The hunting state machine

Every version runs the same three-state procedure (the ITU-T I.432 procedure):

```
          header with zero syndrome found
   HUNT ------------------------------------> PRESYNC
    ^  ^                                         |  |
    |  +---------- one incorrect HEC ------------+  |  DELTA consecutive correct HECs
    |                                               v
    +---------- ALPHA consecutive incorrect ------ SYNC
                HECs (delineation lost)
```

* **HUNT** tests every bit position (or every octet position): it checks whether the most
  recent 40 bits form a valid header.
* **PRESYNC** assumes that the header just found is real. It checks the HEC exactly one cell
  later, and then once per cell. After `DELTA` = 8 correct HECs in a row it moves to SYNC. A
  single incorrect HEC sends it back to HUNT.
* **SYNC** checks one header per cell and reports each correct one. After `ALPHA` = 7
  incorrect HECs in a row, delineation is lost and the receiver goes back to HUNT. A correct
  HEC resets that count.

The header found in HUNT is not one of the `DELTA` confirmations. The first of them is the
header one cell later.

## Checking a header: the polynomial divider

All HEC checks use a polynomial divider with an 8-bit remainder register r0..r7. Each clock
it shifts in one bit: the new r0 is the input XOR r7, the new r1 is r0 XOR r7, the new r2 is
r1 XOR r7, and r3..r7 shift along. The first bit on the line is bit 8 of header octet 1 and
the highest power of x. After the 40 header bits have been shifted in from a cleared
register, the register holds the remainder of the header divided by G(x). That remainder is
the *syndrome*, and it is zero for a valid header. `atm_pkg::crc_step` is one such shift.
For eight bits per clock, `crc_feed` unrolls the step eight times into an XOR network.

No I.432 coset is applied: the design expects the raw CRC in the HEC octet. To use it on a
line where the HEC carries the standard 0x55 coset, XOR 0x55 into the fifth header octet
before the delineator.

### Fixed boundary: one detector per alignment

`atm_crc_detector` checks one fixed window. While enabled, it absorbs 40 bits (5 octets).
On the last one it raises `correct` or `incorrect` for that clock, then clears itself, so the
next clock starts a new window. Such a detector only sees windows that begin where it was
started. Searching every position therefore takes 40 detectors (5 for octets), each started
one clock after the previous one. A thermometer shift register in `atm_hunt_fixed` does the
staggering. Once the first 40 clocks of HUNT are over, one detector or another completes a
window in every clock. `found` is the OR of their `correct` outputs. Because all 40 run in
parallel, this is by far the largest version (see the table below).

### Moving window: subtract the bit that leaves

`atm_hunt_window` keeps a single remainder that always covers the last 40 bits. Each clock
it shifts in the new bit and cancels the bit that entered 40 clocks earlier. That bit is
read from a 40-bit delay line. After 40 shifts its contribution to the remainder is
x^40 mod G(x) = x^6 + x^5 + x. So the delayed bit is XORed into the register at the inputs
of r1, r5 and r6. In the octet version, each clock shifts a whole octet in. The octet from
five clocks earlier leaves the 5-octet delay line and is cancelled by multiplying it by
x^40 mod G(x), which is again a fixed XOR network (`mul_xn`). The register is never
cleared between checks. A fill counter keeps `found` low until the first full window has
arrived.

## Where the checks fall in time

The hardest part of the design to follow is the timing. It is also what makes the three
sub-modules line up. The conventions are:

* All check outputs (`found`, `correct`, `to_sync`, `to_hunt`, `cell_ok`) are combinational
  and last one clock. They are high **in the clock that presents the last bit (octet) of the
  header**.
* The state register changes on the clock edge that ends that clock. So the first clock in
  the new state carries the first payload bit (octet) of the cell.
* PRESYNC and SYNC each count cell positions from 0 in their first clock, modulo 424 (53 for
  octets). Positions 0..383 (0..47) are payload. The CRC detector is enabled for positions
  384..423 (48..52), so its verdict falls on position 423 (52), just as the counter wraps to
  0 on the next payload.
* In any other state, the HUNT, PRESYNC and SYNC sub-modules are held cleared. Each state
  therefore starts from clean registers.

Example, serial, counting from the first clock of HUNT. Say a header ends on bit n. `found`
is high in the clock of bit n, and PRESYNC starts with bit n+1. The next headers are checked
at bits n+424, n+848, and so on. SYNC starts with bit n+8·424+1. The data output is the input
delayed by one clock. `correct_cell_out` is high in the clock in which `data_out` carries
the last header bit (octet) of a cell whose HEC checked correct in SYNC. The 48 octets of
that cell's payload follow on `data_out`.

## Module structure

```
atm_cell_delineators            four delineators side by side (clock and reset shared)
└── atm_delineator  (W, MOVING_WINDOW, ALPHA, DELTA)
    ├── atm_control              state register, enables, data_out, correct_cell_out
    ├── atm_hunt_fixed (W)       40/5 x atm_crc_detector, staggered      [MOVING_WINDOW = 0]
    │   or atm_hunt_window (W)   sliding divider + delay line            [MOVING_WINDOW = 1]
    ├── atm_presync (W, DELTA)   cell counter + atm_crc_detector
    └── atm_sync (W, ALPHA)      cell counter + atm_crc_detector
atm_pkg                          cell sizes, state type, divider functions
```

The control block holds the state register. Each of HUNT, PRESYNC and SYNC is a separate
module, enabled only in its own state. PRESYNC and SYNC each have their own CRC detector.
The bit-serial and octet-parallel versions differ only in `W`, which sets the data width
and, through it, the detector count, the delay-line depth and the cell counter's modulus.

### Ports of `atm_cell_delineators`

| port | width | meaning |
|---|---|---|
| `clk`, `reset` | 1 | clock; synchronous reset, active high (returns every delineator to HUNT) |
| `sfb_data_in`, `smw_data_in` | 1 | serial streams, one bit per clock |
| `ofb_data_in`, `omw_data_in` | 8 | octet streams, one octet per clock, bit 7 first on the line |
| `*_data_out` | 1 / 8 | the input stream one clock later |
| `*_correct_cell_out` | 1 | marks the last header unit on `*_data_out` of a cell accepted in SYNC |
| `*_state` | 2 | 0 HUNT, 1 PRESYNC, 2 SYNC |

Parameters: `ALPHA` = 7 and `DELTA` = 8 (the values I.432 recommends). On `atm_delineator`,
`W` is 1 or 8 and `MOVING_WINDOW` is 0 or 1.

## Size of the four versions

The versions were synthesised to generic gates with yosys (NAND/NOT mapping, flattened,
not a cell library). Only their relative sizes mean anything:

| version | flip-flops | NAND + NOT gates |
|---|---|---|
| serial fixed boundary | 656 | 3465 |
| serial moving window | 111 | 419 |
| octet fixed boundary | 111 | 1266 |
| octet moving window | 103 | 990 |

These follow the published comparison. The serial fixed-boundary version is several times
larger than the others, because of its 40 detectors. In octet form, fixed boundary needs far
fewer registers than in serial form. Moving window uses about the same number of registers
in both widths, and its octet form costs more logic than its serial form. The published
results, in a 0.18 µm library with the equivalent of 2-input NAND gates, are 12633 / 2091 /
3356 / 2299 gates (in the table's order) at 160 MHz. Timing at 160 MHz has not been checked
for this RTL.

## Choices this design makes

These points are not fixed by the algorithm. They were chosen here:

* The names of the two outputs come from the original block diagram. Their exact behaviour
  does not: the data output is a one-clock delay of the input, and the correct-cell marker
  is a one-clock pulse aligned with the last header unit, produced only in SYNC.
* Data arrive one unit per clock, with no valid or stall signal.
* Reset is synchronous and active high. Every register is cleared by reset, and again
  whenever its sub-module is disabled.
* No HEC coset is applied (see above). There is no single-bit header correction: the
  design only delineates cells.
* The octet-parallel dividers are the serial step unrolled, not a separately derived
  matrix. They compute the same function.
* A `state` output is added for observation.

Assertions in `atm_presync` and `atm_sync` check that a HEC verdict falls only on the last
position of a cell. An assertion in `atm_control` checks that PRESYNC never reports a pass
and a failure at once.

## Verification

Every module has a self-checking testbench in `tb/`. Each ends by printing
`TB_RESULT checks=N failures=M`:

* `tb_atm_crc_detector`: random valid and invalid 40-bit words, serial and octet. The flags
  must stay low for 39 bits and give the right verdict on the 40th. The detector must
  restart when `en` drops.
* `tb_atm_hunt_fixed`, `tb_atm_hunt_window`: random streams with valid headers inserted at
  random offsets. In every clock, `found` must equal a reference that divides the last 40
  bits by long division.
* `tb_atm_presync`, `tb_atm_sync`: streams of cells with chosen bad HECs. The pulses must
  fall on exactly the expected clock.
* `tb_atm_control`: random sub-module pulses against a reference state machine. Every
  transition must be taken.
* `tb_atm_delineator` (ALPHA = 3, DELTA = 4, all four versions) and
  `tb_atm_cell_delineators` (the top at its defaults, 60 cells per version). Cell streams
  start at an arbitrary bit and carry bad HECs placed to make every mechanism happen: a
  header found, a PRESYNC failure, entry to SYNC, an incorrect HEC tolerated in SYNC, loss
  of delineation, and re-acquisition. Each delineator is compared in every clock with a
  cycle-accurate reference model (`tb_atm_ref_delineator`). That model takes one bit or
  one octet per clock, so the data rate and every latency are checked as well. The test
  fails if any mechanism never occurred.

The reference model (`tb_atm_pkg`, `tb_atm_ref_delineator`) uses schoolbook long division
and position counting. It shares no code with the RTL's divider.

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/atm_pkg.sv tb/tb_atm_pkg.sv tb/tb_atm_cell_delineators.sv \
    --top-module tb_atm_cell_delineators -o sim
./obj_dir/sim
```

Replace the testbench file and top-module name to run another one. Each finishes in well
under a second.

## Limits

* The HEC error-correction mode (correcting single-bit header errors) is not included: the
  receiver only detects.
* Nothing here descrambles the cell payload or extracts cells from an SDH frame. The octet
  versions expect an octet-aligned stream from such a stage.
* Timing closure at 160 MHz, and power, are not evaluated.
