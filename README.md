# MPSoC fault-handling demonstrator on an IEEE P1687 network

A multi-processor SoC needs to notice faults quickly and then find out exactly
where they are. This design uses two paths for that. Both reuse test
hardware the chip already has.

* **A slow, precise path.** Every fault-detection instrument sits in an IEEE
  P1687 (IJTAG) scan network. Segment Insertion Bits (SIBs) make the network
  reconfigurable. Software on the master CPU drives the chip's JTAG TAP. It
  opens only the SIBs on the way to the register it wants, so each access
  stays short.
* **A fast, coarse path.** Each level of the hierarchy has an Error
  Indication Flag register (EIF), a status register with one bit per item
  below it. The Fault Indication and Propagation Infrastructure (FIPI) ORs
  each EIF into one bit of the EIF above it, all the way up to a single
  System-Level bit. The ORing is combinational, so the System-Level bit
  rises in the same clock as the fault flag. It works like an interrupt
  line that software can poll cheaply.

Each EIF has a mask register M of the same size. Setting a mask bit blocks
that bit from propagating upward, while the bit stays readable in its own
EIF. This is how a component known to be defective is "fault marked": it
stops raising the System-Level flag, so other faults can still be seen.

A Fault Injection Manager (FIM) replays a list of timed faults into the
instruments: into their fault flags and into their data bits. This lets
fault-handling software be exercised in simulation.

## The hierarchy

The RTL builds the configuration of the demonstrator: one master CPU (only
its TAP is built), ten identical work-horse CPUs and one DSP segment. Each
level is a chain of SIBs. Every SIB hosts one segment. The level's own
EIF/M register sits behind the last SIB of the chain.

| Level | SIB chain, tdi side first | EIF bits |
|---|---|---|
| System | type level, System EIF/M | 1 |
| Component-Type | CPUs, DSP, EIF/M | 2: bit 0 CPUs, bit 1 DSP |
| Component (`cpu_cluster`) | CPU 0 … CPU 9, EIF/M | 10: bit *i* = CPU *i* |
| Intra-Component (`workhorse_cpu`) | ALU, CTRL, EIF/M | 2: bit 0 ALU, bit 1 CTRL |
| Instrument (`alu_block`) | scan chain, register file, EIF/M | 2: bit 0 scan chain, bit 1 register file |
| Instrument (`ctrl_block`) | PC, REGISTER, EIF/M | 2: bit 0 PC, bit 1 REGISTER |

CPUs are numbered from 0 here, so "CPU1" of a one-based numbering is CPU 0.

Reaching the System-Level EIF takes just two SIBs. After reset every SIB is
closed, and the whole network is two bits long. One 2-bit scan opens the
System EIF SIB. From then on, each poll is a 4-bit scan: two SIB bits plus
the EIF and M bits.

## SIBs and the scan order

A SIB (`sib`) has a scan cell and an update cell. When closed, it is one bit
in the path. When its update cell holds 1, the hosted segment is spliced in
just before the SIB's own cell: `si → segment → SIB cell → so`. Capture-DR
loads the scan cell with the update cell, so every scan reads back each
SIB's state. The hosted segment is selected (`host_sel`) only while the SIB
is open and is itself selected. A closed SIB therefore freezes everything
below it, open SIBs included: they reappear unchanged when the parent opens
again.

Inside a multi-bit register, bit 0 is nearest `so`. Software assembling a
scan vector counts from the `tdo` end:

* the last element of the chain comes first;
* each register contributes its bits from 0 upward;
* an open SIB contributes its own bit first and then its segment.

For example, a poll scan reads, from the `tdo` end: System EIF SIB, EIF, M,
type-level SIB.

All network registers act on the rising clock edge while they are selected
and the matching one-clock enable in `ijtag_pkg::ijtag_ctrl_t` (`capture`,
`shift`, `update`) is high.

## EIF and mask registers (`eif_mask_reg`, `fipi_node`)

The register is one scan data register of 2N bits, `{M, EIF}`, with EIF
bit 0 leaving first.

* **Upper levels (STICKY=0).** The EIF bits follow the FIPI outputs of the
  level below combinationally. Capture-DR samples them. Update-DR writes
  only M.
* **Instrument-Level (STICKY=1).** The EIF bits are flags. An instrument's
  error-detection output (`instr_err`) sets its flag, and the flag holds
  until software clears it. Clearing is *write 1 to clear*: Update-DR
  clears each flag whose bit was shifted in as 1. A plain read, with zeros
  shifted in, changes nothing. A detection in the clearing clock wins.
* **FIPI output.** `flag_up = |(EIF & ~M)`.
* **Forcing.** The FIM's `force_en`/`force_val` override an Instrument-Level
  bit.
  * A permanent force holds the bit against both detection and clearing.
  * A one-clock (soft) force writes the value into the flag. A soft
    stuck-at-1 therefore stays recorded until cleared, and a soft
    stuck-at-0 clears the flag once.

Masking at one level keeps the bit in that level's EIF but removes it from
all levels above. After CPU 0 is marked, the Component-Level EIF still
reads 1 for CPU 0 and M reads 1 for CPU 0. The Component-Type and System
EIFs read 0.

## Fault injection (`fim`)

The FaultList is a table of `N_FAULTS` entries (`ijtag_pkg::fault_entry_t`),
loaded through a write port. The end-to-end testbench keeps its list in
`tb/fault_list.hex`, one fault per line as a 51-bit hex word, and writes it
into the FIM before starting the run. Each entry has these fields:

| Field | Meaning |
|---|---|
| valid | the entry is in use |
| time stamp | clock cycles after `run` rises |
| location | index of an injection point (see below) |
| effect | the forced value: stuck-at-0 or stuck-at-1 |
| type | soft or permanent |

When the time base `now` equals an entry's time stamp, the entry fires. From
the next clock the bit is forced:

* soft: for one clock;
* permanent: until reset. A permanent fault wins over a soft one on the
  same bit.

`fired` and `n_fired` report the injections.

There are two kinds of injection point, numbered in one flat range:

| Points | Location | Forces |
|---|---|---|
| `0` … `N_CPU*4-1` | `cpu*4 + block*2 + instrument` (`ijtag_pkg::fault_loc`) | an Instrument-Level EIF bit |
| `N_CPU*4` … | `N_CPU*4 + cpu*112 + offset` (`ijtag_pkg::data_loc`) | an instrument data bit |

Per CPU, data offsets run through the scan chain (0–15), register file
(16–79, register 0 first), PC (80–95) and REGISTER (96–111). The sizes here
are the defaults.

* Forcing a flag with no real fault behind it models a detector that
  reports a fault that never happened.
* Forcing a data bit corrupts the instrument itself. The forced value is
  stored in the flop: a soft fault leaves a wrong bit behind, and a
  permanent one is a stuck-at. No error detector is modelled, so a data
  fault raises no flag. Software finds it by reading the instrument, or
  through its effect: a stuck PC bit changes how long a job runs.

At the defaults the FIM has 1,160 injection points.

## Work-horse CPUs (`workhorse_cpu`, `alu_block`, `ctrl_block`)

A CPU has two blocks.

* **ALU** holds two instruments:
  * a test scan chain (`scan_chain`): its flops are shifted directly, with
    no shadow register;
  * a register file of `RF_REGS` × `DATA_W`: it is read and written as a
    whole through one scan register (`tdr`), register 0 first.
* **CTRL** holds:
  * the program counter (PC) that emulates job execution;
  * a general REGISTER.

  Both are reached through `tdr` registers. Update-DR on a `tdr` always
  writes the instrument. Reading the PC or REGISTER through the network
  therefore writes back whatever was shifted in.

Job emulation:

* A `job_start` pulse clears the PC and raises `job_busy`.
* The PC then counts one per clock.
* A job of length L keeps `job_busy` high for exactly L clocks and ends
  with one `job_done` pulse. The PC stops at L−1.
* A new `job_start` restarts the CPU.

The ALU's arithmetic is not modelled: only the parts the network reaches
exist.

## Top level (`mpsoc_top`) and its ports

`mpsoc_top` wires the TAP (`jtag_tap`), the System-Level and
Component-Type-Level SIBs and EIF/M registers, the CPU cluster and the FIM.

The TAP is a standard IEEE 1149.1 controller with a 4-bit instruction
register:

| Instruction | Code | Selects |
|---|---|---|
| IJTAG | `4'b1000` | the P1687 network |
| BYPASS | `4'b1111`, and every other code | a 1-bit bypass register |

* BYPASS is also the reset instruction.
* Capture-IR loads `0001`.
* The whole design runs on `clk`, which also serves as TCK.
* TDO is combinational, valid while the TAP is in Shift-IR or Shift-DR.

These parts of a real system are outside this design and connect through
ports:

| Part | Ports |
|---|---|
| Resource manager and instrument manager (software on the master CPU) | `tms`/`tdi`/`tdo`, `job_*` |
| Error-detection mechanisms of the instruments | `instr_err`, four bits per CPU in the `fault_loc` order |
| DSP subsystem | a scan segment (`dsp_sel`, `dsp_ctrl`, `dsp_si`, `dsp_so`) behind the DSP SIB, and a pre-ORed fault flag `dsp_flag` |

`sys_flag` is the System-Level FIPI output; software may poll the EIF or use
the flag directly. The EIF and mask contents are brought out for
observation.

Parameters and their defaults:

| Parameter | Default | Origin |
|---|---|---|
| `N_CPU` | 10 | the demonstrator's configuration |
| `DATA_W` | 16 | chosen |
| `RF_REGS` | 4 | chosen |
| `SC_LEN` | 16 | chosen |
| `PC_W` | 16 | chosen |
| `N_FAULTS` | 8 | chosen |

At the defaults, the fully opened scan path is 1,372 bits plus the DSP segment.

## Fault handling as the testbench does it

`tb/tb_mpsoc_top.sv` stands in for the master CPU's software, at the default
sizes. It has two parts.

The **instrument manager model** keeps a tree of the network and the state
of every SIB. To access a register it does three things:

1. opens the SIBs on the way to the register and closes all others;
2. runs scans until the register is in the path;
3. uses the scan in which the register appears, which both captures and
   writes it.

Every scan also checks that each SIB reads back the state the model
expects.

The **resource manager model** handles a fault as follows:

1. Polls the System-Level EIF.
2. Reads the Component-Type EIF, then the Component EIF, then the CPU's
   Intra-Component EIF, then the block's Instrument EIF.
3. Clears the instrument flag and reads it again.
4. If the flag is gone, treats the fault as transient.
5. If the flag stays, records the CPU in its health map, sets the CPU's
   Component-Level mask bit, and restarts the CPU's job on an idle healthy
   CPU.

The scenario has three faults:

1. A permanent stuck-at-1 on CPU 0's register-file flag at time 44, while
   CPU 0 runs a job.
2. A soft stuck-at-1 on CPU 5's REGISTER flag.
3. A DSP fault, read out through the DSP segment and masked at
   Component-Type-Level.
4. A soft stuck-at-1 on bit 9 of CPU 7's register file. The testbench
   first writes a pattern through the network. After the fault time it
   reads the pattern back and finds exactly that bit flipped.

The test counts every mechanism and fails if any never happens:

* injection;
* same-clock propagation to `sys_flag`;
* SIB opening;
* detection;
* identification;
* clearing;
* marking;
* blocking of a later fault on the masked CPU;
* job re-execution;
* DSP access;
* Component-Type masking;
* data-bit corruption.

Each block also has its own self-checking testbench, `tb/tb_<module>.sv`.

## Simulating

With Verilator 5, from the directory holding `rtl/` and `tb/`:

```
verilator --binary --timing -Wno-fatal -Irtl -y rtl +libext+.sv \
    rtl/ijtag_pkg.sv tb/tb_mpsoc_top.sv --top-module tb_mpsoc_top
./obj_dir/Vtb_mpsoc_top
```

Run the simulation from that same directory: the end-to-end testbench reads
`tb/fault_list.hex` by that relative path. Replace `tb_mpsoc_top` with any
other testbench in `tb/`. Each testbench
ends by printing `TB_RESULT checks=N failures=M`. The end-to-end test takes
a few seconds. The block testbenches override sizes to keep their expected
scan vectors short.

## What is this design's own choice

The following follow the source design:

* the level structure and the order of SIBs;
* the EIF/mask pairing with equal sizes;
* the upward OR;
* the mask semantics;
* the FaultList contents;
* the register file as bit 1 of the ALU's Instrument-Level EIF;
* the case-study flow.

The following are choices made here, where the source is silent:

* single clock;
* TAP instruction codes;
* SIB cell structure (the usual P1687 one);
* scan bit order inside registers;
* sticky, write-1-to-clear Instrument-Level flags;
* the remaining EIF bit assignments;
* widths and depths of the data instruments;
* the job interface of the PC;
* the FIM's table with a write port, its time unit (clock cycles) and its
  location encoding;
* which data bits the FIM can reach, and that a forced value is stored;
* the FaultList file format: one hex word per fault;
* one DSP segment for both DSPs.

The network is reset only by `rst_n`, not by the TAP's Test-Logic-Reset.
Masks set by fault marking therefore survive TAP resets.

Not built:

* the master CPU;
* the DSPs;
* the ALU datapath;
* the instruments' error-detection logic;
* memories and accelerators;
* the resource and instrument managers, which are software (modelled only
  in the testbench).
