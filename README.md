# Time-redundant 1-wire thermal-monitoring controller

A spacecraft carries dozens of temperature sensors. Digital 1-wire sensors
(DS18S20 type) can share a single wire, which saves harness mass, but the bus
master that polls them then sits in an SRAM-based FPGA, where radiation can
flip configuration or user bits (SEU) or put a short glitch on a signal (SET).
Triplicating the master in space and voting (classic TMR) triples the area
that can be hit and adds a voter that can itself be hit.

This design triplicates the master **in time**. Three identical 1-wire modules
sample the whole sensor network one after another. Each module keeps its
readings in its own RAM. A module starts only when the previous one has
finished its round. The three readings of one sensor are therefore taken a
whole round apart (about 1.1 s for 32 sensors), far longer than any transient.
When the host reads a sensor, a compare & vote block looks at the three stored
words and either passes a majority value or raises a critical-error flag.
The price is time: a full TMR round takes three times as long as one module's
round.

In configuration-upset injection on the original FPGA build, one million
random upsets over the same fixed area gave about 27 wrong answers for the
time-redundant version. A single module gave about 212, and a spatial TMR
version about 1185. The spatial TMR did worst because it occupies more of the
area under attack and has a voter that can be hit. This RTL reproduces the
logic of that design; it has not been through such a campaign itself.

The RTL is SystemVerilog (IEEE 1800-2017) and synthesizable. The testbenches
use Verilator 5.

## Files

| File | Contents |
|---|---|
| `rtl/ow_pkg.sv` | slot timings, command bytes, state and fault-nature enums, CRC helpers, `rom_code()` |
| `rtl/ow_tmr_top.sv` | top: three modules chained in time, voter, output mux |
| `rtl/ow_master.sv` | one regular 1-wire module: state machine plus its ROM, CRC, RAM and slot generator |
| `rtl/ow_phy.sv` | slot generator: reset/presence, write-0, write-1 and read slots |
| `rtl/ow_crc8.sv` | bit-serial 1-wire CRC-8 |
| `rtl/ow_rom.sv` | constant table of the sensors' 64-bit ROM codes |
| `rtl/ow_ram.sv` | local RAM, one 16-bit word per sensor, with the external address mux |
| `rtl/ow_vote.sv` | compare & vote truth table |
| `tb/ow_sensor_model.sv` | behavioural DS18S20-style sensor, with fault hooks |
| `tb/tb_*.sv` | self-checking testbenches, one per module, plus `tb_ow_tmr_stress` and `tb_ow_full` |

Hierarchy: `ow_tmr_top` → 3 × `ow_master` (each holding `ow_phy`, `ow_rom`,
`ow_crc8` and `ow_ram`) + `ow_vote`.

## One round, step by step

A pulse on `rst` starts a round.

1. **Module 1** resets, clears its RAM and walks the sensor list from index 0.
2. **Module 2** is held in reset while module 1's `rd[0]` is low. It runs the
   same round as soon as `rd[0]` rises. **Module 3** waits for `rd[1]` in the
   same way. Its `rd[2]` tells the host that the round is complete.
3. The host raises `en`, puts a sensor index on `addr`, and one clock later
   gets the voted word on `dout` together with `ce`, `s` and `nature`.

Each `rd` stays high until the next `rst`. A new `rst` drops `rd[0]`, which
resets modules 2 and 3 and clears their RAMs. So read the results before
starting the next round.

### What a module does for one sensor

The state machine of `ow_master` has one state per step:

```
Initialization -> End of sensors? --yes--> Idle (ready = 1)
                        | no
                  Load 1-wire code (ROM[idx])
                        |
                  Send reset pulse <----------- no presence (retry)
                        |
                  Detect presence pulse
                        |
                  Send sensor code & update <-- bad CRC (retry)
                        |
                  Receive data from sensor
                        |
                  CRC OK? ---> Increase sensor number ---> End of sensors?
```

In bus terms, one sensor costs:

* reset + presence;
* Match ROM `0x55`, then the 64-bit code, then Convert T `0x44`;
* read slots until the sensor answers 1, meaning its conversion is done;
* reset + presence;
* Match ROM + code, then Read Scratchpad `0xBE`;
* 72 read slots for the nine scratchpad bytes, fed through the CRC.

If the CRC is right, scratchpad bytes 0 and 1 (the temperature register) go to
RAM at the sensor's index.

**Retries.** A failed presence check repeats the reset pulse. A bad CRC
repeats the addressing and read-out: reset, Match ROM, Read Scratchpad. The
conversion is not repeated. Each sensor gets `MAX_RETRY` retries in total
(default 3). A conversion that has not finished within `CONV_TIMEOUT_US` also
counts as a failed attempt. When the retries run out, the sensor is skipped,
its RAM word stays 0 (cleared at the start of the round) and the module's
sticky `fault` output goes high. The original scheme retries without limit.
The limit is this design's addition, so that a dead sensor cannot stall the
round.

**Sensor addressing.** There is no Search ROM. Every sensor's code is a
constant in `ow_rom`, so each reading belongs to a known place on the
spacecraft. `ow_pkg::rom_code(bank, idx)` builds the table:

* family code 0x10 (DS18S20);
* a 48-bit serial `{bank, 0x0000, 0x5A, idx}`;
* a correct CRC byte.

For real hardware, put the harness's codes in that function.

### Timing on the wire

| Slot | Low | Released | Notes |
|---|---|---|---|
| Reset / presence | 560 µs | 30 µs wait, 115 µs presence window, 335 µs recovery | presence = line seen low in the window |
| Write 0 | 73 µs | 24 µs | 97 µs slot |
| Write 1 | 12 µs | 84 µs | 96 µs slot |
| Read | 2 µs | sample at 12 µs, slot 97 µs | |

The reset, presence and write timings are the original implementation's
values. The read slot and the 335 µs recovery time are this design's own: the
recovery makes the next slot start 480 µs after release, the 1-wire minimum.
All times are whole microseconds times `CLK_FREQ_HZ / 1 MHz`, so the clock
must be a whole number of MHz. The default is 10 MHz, which the source does
not fix.

The slot generator leaves two clocks between operations. The line input goes
through a two-flop synchronizer.

One sensor takes 2 × 1.04 ms for the resets, about 15.5 ms of write slots and
7.0 ms of read slots. That is 24.6 ms, plus the sensor's conversion time. With
a 10 ms conversion this comes to 34.7 ms per sensor and 1.11 s per pass of 32
sensors. A full TMR round is three passes: 3.33 s, or 104 ms per sensor. The
original figures are 35 ms per sensor for one module and 110 ms per sensor for
the TMR controller. A real DS18S20 converts in up to 750 ms, which adds
up to 740 ms per sensor to every figure here.

## Voting

`ow_vote` compares only bits 8..3 of the three words. The DS18S20 register
counts 0.5 °C per step with the sign in bit 8. The ignored bits 2..0 therefore
span up to 3.5 °C, and readings that differ only there count as equal. The three comparison results choose the output:

| d3=d2 | d3=d1 | d2=d1 | normal sensor | duplicated sensor |
|---|---|---|---|---|
| 0 | 0 | 0 | CE, transient (SET) | CE, transient (SET) |
| 0 | 0 | 1 | S=0: d1 | S=0: d1 |
| 0 | 1 | 0 | S=0: d1 (d2 outvoted) | CE, sensor upset (SEU) |
| 1 | 0 | 0 | S=1: d2 (d1 outvoted) | S=1: d2 |
| 1 | 1 | 1 | S=0: d1 | S=0: d1 |
| other | | | CE, controller or sensor | CE, controller or sensor |

`dout = s ? d2 : d1`. Where CE is set, `s` is 0.

The three "other" rows cannot occur when the comparisons are exact equalities
of the same bits. They are decoded anyway, as a guard.

**Sensor duplication.** This is meant for critical spots. A twin sensor is
mounted next to the original, and module 2 addresses the twin instead.
`DUP_MASK[i] = 1` makes module 2's ROM return the bank-1 code for sensor i. It
also makes the voter use the right-hand column, where a lone disagreement of
d2 is reported as a sensor upset rather than outvoted.

What to do with CE (switch the network off, reconfigure the FPGA) is up to the
system. The controller only reports it.

## Top-level interface (`ow_tmr_top`)

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `clk` | in | 1 | clock |
| `rst` | in | 1 | synchronous, active high; a pulse starts a round |
| `en` | in | 1 | host takes the RAM read ports |
| `addr` | in | log2(N) | sensor to read |
| `dout` | out | 16 | voted temperature word, one clock after `addr` |
| `ce` | out | 1 | critical error for that sensor |
| `s` | out | 1 | mux select chosen by the voter |
| `nature` | out | 2 | `fault_nature_e`: none, SET, SEU, controller/sensor |
| `rd` | out | 3 | ready of modules 1..3 |
| `fault` | out | 3 | per module: some sensor was skipped |
| `dq_pull` | out | 3 | per module pin: 1 = pull the 1-wire line low |
| `dq_in` | in | 3 | per module pin: line level |

Each module has its own pin, and the three pins are tied together outside the
FPGA onto the sensor net. With an open-drain I/O buffer, `dq_pull[k]` drives
the pin's output enable with data 0, and `dq_in[k]` is the pin's input.

Parameters:

| Parameter | Default | Meaning |
|---|---|---|
| `NUM_SENSORS` | 32 | sensors on the network |
| `CLK_FREQ_HZ` | 10 000 000 | clock frequency, whole MHz |
| `DUP_MASK` | 0 | per sensor: module 2 reads the twin |
| `MAX_RETRY` | 3 | retries per sensor |
| `CONV_TIMEOUT_US` | 800 000 | conversion time-out |

Synthesis with yosys gives, for the default top: 702 flip-flop bits, 3 × 512
RAM bits and 3 × 2048 ROM bits.

## Departures from the original description

* **Retry limit and `fault` output.** Added, as described above.
* **Command set.** The source lists four access steps: initialization, ROM
  function, memory function, data transfer. It does not give the bytes. The
  DS18S20 commands are used here (the DS18B20 shares them): Match ROM,
  Convert T with polling, Read Scratchpad.
* **Meaning of "update".** "Update" in "send sensor code & update" is taken to
  be the conversion.
* **CRC.** The 1-wire CRC-8 polynomial x⁸+x⁵+x⁴+1 is assumed.
* **Host interface.** The surrounding telemetry system uses an
  interrupt-request handshake with address and data, which is not specified
  further. Here the host side is just `rst` / `rd` / `en` / `addr` / `dout`.
* **Chaining polarity.** The reset of module k+1 is "not ready" of module k,
  so each module starts when the previous one finishes.
* **Own choices the source leaves open.** The RAM read is synchronous, the RAM
  is cleared at the start of each module's round, and the ROM read is
  registered.
* **Not part of the RTL.** The configuration-memory SEU experiments and the
  network-topology reliability analysis are outside the RTL. The topology
  (bus, loop, tree) is passive wiring and does not change the controller.

## Simulation

Every testbench prints `TB_RESULT checks=N failures=M` and ends with
`$finish`. Each also has a watchdog that fails the run if it hangs. Build and
run one with Verilator:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/ow_pkg.sv tb/tb_ow_tmr_top.sv --top-module tb_ow_tmr_top -Mdir obj
./obj/Vtb_ow_tmr_top
```

| Testbench | What it checks |
|---|---|
| `tb_ow_crc8` | known 1-wire vector (02 1C B8 01 00 00 00 → A2); 200 random frames against an independent non-reflected CRC; zero residue; single-bit errors |
| `tb_ow_rom` | family, index, bank, CRC byte and uniqueness of each code; registered read |
| `tb_ow_ram` | random traffic against a shadow array through both address paths; reset clears the RAM |
| `tb_ow_phy` | exact low time and length of every slot type; presence inside, after and without a pulse; read 0 and read 1 |
| `tb_ow_vote` | 2000 random triples covering every reachable pattern in both modes; ignored low bits; majority selection |
| `tb_ow_master` | one module, 4 sensor models; stored values; round time to the clock from the slot count; CRC retry; missing sensor (gives up, `fault`); dead network (presence retries); reset pulses on the wire |
| `tb_ow_tmr_top` | full controller, 4 sensors + 1 twin; strict pass order and equal pass times; each voting case: outvote with S=0 and S=1, SET, SEU, drift tolerated; CRC retry in pass 3; each mechanism counted and required |
| `tb_ow_tmr_stress` | 8 sensors, 3 duplicated; 4 rounds of random per-pass values (same, drift, different), random twin disagreement and a corrupted read-out per pass; every voted word against a reference of the voting rules |
| `tb_ow_full` | default parameters (32 sensors, 10 MHz): one complete round of 3 × 11.1 M clocks; 34–36 ms per sensor; a disagreement in pass 2 is outvoted; all 32 voted words correct. Runs in about 40 s |

The sensor model answers reset, Match/Skip ROM, Convert T (its read slots
return 0 until its conversion time has passed) and Read Scratchpad. It
captures its `temp` input at the end of each conversion. The testbenches
change `temp` between passes to create disagreements. `corrupt` flips a bit in
the next read-out, and `absent` removes the sensor from the wire.

The testbenches check the controller against this model, not against real
sensors. Electrical effects (slew, parasitic power, long-line timing) are not
modelled. Nor are radiation effects inside the FPGA: the disagreements that
the voter sees are injected on the sensor side.
