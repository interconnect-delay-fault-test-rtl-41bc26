# At-speed interconnect delay test through IEEE 1149.1 and IEEE 1500

Boundary scan (IEEE 1149.1 on boards, IEEE 1500 around embedded cores) finds
opens, shorts and stuck nets between chips or cores. It cannot find a net that
is merely *slow*. With EXTEST, an output cell launches its new value on the
falling TCK edge in Update-DR, and the input cell at the other end of the wire
captures on the rising TCK edge that leaves Capture-DR, 2.5 TCK later. At a
10 MHz TCK that is 250 ns, so a wire that needs 10 ns instead of 2 ns still
passes. A delay test must capture one *system* clock after the launch. When
the board or SoC has several system clocks, each group of wires must use its
own clock.

This RTL implements the interconnect delay fault test (IDFT) scheme published
as "Interconnect Delay Fault Test on Boards and SoCs with Multiple Clock
Domains" (Yi, Song, Park). The scheme needs no change to the boundary cells
and no change to the TAP controller. It adds one small controller per system
clock, two flip-flops and a few gates. The controller sits between the TAP's
ClockDR/UpdateDR and the cells of that clock domain. A new instruction,
Delay_EXTEST, enables the controllers. The tester then holds TCK low in the
Update-DR state (a "stretched" Update-DR). While it does so, every controller
does two things, each on its own system clock:

* It launches the new output values on one rising system clock edge (the late
  update, `UpDR`).
* It captures the input cells on the very next rising edge (the early capture,
  `CapDR`).

The responses are then scanned out as in any DR scan.

The repository holds two demonstrators of the scheme, side by side in
`idft_top`:

* `idft_board`: two 1149.1 chips on a board with one system clock.
* `idft_soc`: an SoC whose three IEEE 1500 wrapped cores are spread over two
  clock domains, CLK1 and CLK2, with four nets between the cores.

## The IDFT controller (`idft_controller`)

```
            IDFT_Mode ─┬────────────────────────────────┐
                       │                                 M1 ── UpDR
 UpdateDR ─────────────┼──&── D FF1 Q ─┬─ IDFT_UpDR ─────┘ (0: UpdateDR, 1: IDFT_UpDR)
 SysCLK ──& IDFT_Mode ─┴── gclk ──> FF1, FF2              
                                       └─ D FF2 Q ── IDFT_CapDR ─┐
 ClockDR ────────────────────────────────────────────────────────M2 ── CapDR
 IDFT_Mode & ~ShiftDR ─────────────────────── select of M2 ──────┘ (0: ClockDR, 1: IDFT_CapDR)
```

* **Normal mode** (`idft_mode = 0`): M1 and M2 pass UpdateDR and ClockDR
  through unchanged. The flip-flops get no clock, so the controller adds no
  delay and no power to normal operation.
* **Delay_EXTEST, stretched Update-DR**: UpdateDR goes high on the falling
  TCK edge and stays high while TCK is held low. FF1 samples it on the next
  rising SysCLK edge. The rising edge of `UpDR` updates the output cells, which
  is the launch. FF2 follows FF1 one SysCLK later. The rising edge of `CapDR`
  clocks the input cells, which is the capture, exactly one system clock after
  the launch.
* **After Update-DR**: UpdateDR falls at the next rising TCK edge. IDFT_UpDR
  and then IDFT_CapDR fall on the next two SysCLK edges.
* **Capture-DR**: ShiftDR is still low, so M2 keeps selecting IDFT_CapDR, which
  is low by then. The capture that ClockDR would make in Capture-DR is
  suppressed, and the early-captured responses survive.
* **Shift-DR**: ShiftDR is high, so M2 passes ClockDR again and the responses
  shift out.

The mode switches of M2 happen while both of its inputs are low, or produce
only a falling edge, so they never make a spurious capture edge. The four
states one can name in this behaviour (normal, IDFT idle, UpDR generated, CapDR
generated) are the flip-flop values 00, 10, 11 and 01 in IDFT mode; there is no
separate state register.

Timing of one launch/capture in one domain (TCK held low in Update-DR):

```
TCK        _/‾\_____________________________/‾\_/‾\_/‾\_ ...
TAP state   Exit1 | Update-DR (stretched)    |Sel|Cap|Shift ...
UpdateDR   ______/‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾\_______________
SysCLK     _/‾\_/‾\_/‾\_/‾\_/‾\_/‾\_/‾\_/‾\_/‾\_/‾\_/‾\_/‾\_
UpDR       __________/‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾\_________   launch
CapDR      ______________/‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾\_____   capture, +1 SysCLK
```

With several system clocks, each domain has its own controller. Every domain
launches and captures within its own clock period during the same stretched
Update-DR, so all domains are tested by one scan.

**Stretch length.** TCK must stay low in Update-DR until each controller has
seen UpdateDR at a rising edge of its clock and made its capture one clock
later. That is about two periods of the slowest system clock plus margin. The
testbenches hold it 40 ns to 60 ns, with 5 ns and 8 ns clocks.

## Running a delay test

1. Load Delay_EXTEST into every chip's instruction register, or every
   wrapper's WIR. This raises IDFT_Mode (Core_IDFT_Mode).
2. Shift in the initial values of the output cells and do a stretched
   Update-DR. This sets the "before" value on every net.
3. Shift in the opposite values and do a stretched Update-DR. Every net makes
   a transition, and each domain captures one clock later.
4. Scan out (any DR scan; Capture-DR does not overwrite). An input cell that
   holds the *old* value sits at the end of a net slower than its clock
   period.

Scans may run Update-DR → Select-DR → Capture-DR directly, without passing
through Run-Test/Idle. Output cells keep driving their update stage between
patterns, as in EXTEST.

## Board demonstrator: `chip_1149`, `idft_board`

`chip_1149` is an ordinary 1149.1 chip with these parts:

* `tap_controller`: the 16-state TAP controller.
* `instruction_register`: 3 bits.
* `bypass_register`: one bit.
* A boundary register split into one `bsc_chain` per system clock domain.
* One `idft_controller` per domain.

Parameters: `N_DOM` domains, each with `N_IN` input cells and `N_OUT` output
cells. The defaults (1, 1, 1) match a chip of the board example.

Boundary register order from TDI: domain 0 inputs, domain 0 outputs, domain 1
inputs, and so on. Vectors are indexed domain-major: pin `d*N_IN+i` is input
cell `i` of domain `d`.

ClockDR and UpdateDR reach the boundary register only while an instruction
selects it. The gating produces no edge when the instruction changes.

| instruction  | opcode | selects  | output cells drive pins | IDFT_Mode |
|--------------|--------|----------|-------------------------|-----------|
| EXTEST       | 000    | boundary | yes                     | 0         |
| SAMPLE       | 001    | boundary | no                      | 0         |
| DELAY_EXTEST | 010    | boundary | yes                     | 1         |
| BYPASS       | 111    | bypass   | no                      | 0         |

Every other opcode acts as BYPASS. The IR captures `..01` and resets to
BYPASS. `TDO` changes on falling TCK. `tdo_en` marks Shift-DR/Shift-IR,
because the design has no tri-state pin.

`idft_board` chains two of these chips (TDI → chip 1 → chip 2 → TDO) with
shared TCK, TMS, TRST_N and SysCLK. The board wires are not logic, so the pins
are ports of `idft_board`. The testbench connects chip 1's output to chip 2's
input through a 1 ns or a 10 ns wire.

## SoC demonstrator: `idft_soc`

```
 CLK1 domain                                         CLK2 domain
 core 1 (IDFTC1)        core 2 (IDFTC2_1 | IDFTC2_2)        core 3 (IDFTC3)
 I1 <- soc_in[0]        I3 <- net1     I4 <- net4            I5 <- net3
 O1 -> soc_out[0]       O3 -> net2     O4 -> net3            I6 <- soc_in[1]
 O2 -> net1                                                  O5 -> net4
 I2 <- net2                                                  O6 -> soc_out[1]
```

* **Cores and controllers.** Core 1 and core 3 each have one clock domain and
  one controller. Core 2 has a CLK1 part and a CLK2 part, so it has two
  controllers.
* **TAP and glue.** One TAP controller drives the IEEE 1500 wrapper serial
  control (WSC) through `tap_wsp_glue`:
  * WRCK = TCK, WSI = TDI, WRSTN = TAP reset.
  * SelectWIR = the TAP's Select, so IR scans reach the WIRs.
  * ShiftWR and CaptureWR are the Shift and Capture states, registered on
    falling TCK.
  * UpdateWR is "in Update-IR or Update-DR", so it lasts through a stretched
    Update-DR.
* **Serial path.** WSI → core 1 → core 2 → core 3 → WSO → TDO.
  * An IR scan is 9 bits, three WIRs. Core 3's WIR is nearest TDO.
  * With all three WIRs in a boundary instruction, a DR scan is 12 cells, in
    this order from TDI: `I1 I2 O1 O2 | I3 O3 I4 O4 | I5 I6 O5 O6`.
  * With all three in WS_BYPASS, a DR scan is 3 bits.
* **Wrapper.** `core_wrapper` holds these parts:
  * A `wir`.
  * A one-bit WBY (`bypass_register`).
  * `wbc_csg`, which turns the WSC into cell controls shaped like ShiftDR,
    ClockDR and UpdateDR:
    `ShiftDR_Sig = ShiftWR·/SelectWIR`,
    `CapDR_Sig = WRCK·(ShiftWR+CaptureWR)·/SelectWIR`,
    `UpDR_Sig = /WRCK·UpdateWR·/SelectWIR`.
  * Per clock domain, one `idft_controller` and one `bsc_chain` of
    two-flip-flop wrapper cells.

  CapDR_Sig idles low where ClockDR idles high. Both make their capture or
  shift edge on rising TCK, so the same controller works for both.

| wrapper instruction | opcode | selects | cells driving           | Core_IDFT_Mode |
|---------------------|--------|---------|-------------------------|----------------|
| WS_EXTEST           | 000    | WBR     | output cells → wrapper outputs | 0       |
| WS_INTEST           | 001    | WBR     | input cells → core      | 0              |
| WS_DELAY_EXTEST     | 010    | WBR     | output cells → wrapper outputs | 1       |
| WS_BYPASS           | 111    | WBY     | none                    | 0              |

The core logic is not part of the design: each wrapper's `to_core` and
`from_core` terminals are ports of `idft_soc`. The `nets`, `updr`, `capdr` and
`core_idft_mode` outputs are there for observation.

## Files

| file | content |
|------|---------|
| `rtl/idft_pkg.sv` | TAP state type, opcodes, decoded-control struct |
| `rtl/tap_controller.sv` | 1149.1 TAP controller and its register controls |
| `rtl/instruction_register.sv` | chip instruction register and decoder |
| `rtl/bypass_register.sv` | 1-bit bypass (chip) / WBY (wrapper) |
| `rtl/boundary_scan_cell.sv` | two-flip-flop BSC / WBC |
| `rtl/bsc_chain.sv` | cells of one clock domain |
| `rtl/idft_controller.sv` | the IDFT edge generator |
| `rtl/chip_1149.sv` | 1149.1 chip with IDFT controllers |
| `rtl/idft_board.sv` | two-chip board |
| `rtl/tap_wsp_glue.sv` | TAP to wrapper serial port |
| `rtl/wbc_csg.sv` | WSC to cell controls |
| `rtl/wir.sv` | wrapper instruction register |
| `rtl/core_wrapper.sv` | IEEE 1500 wrapper with per-domain controllers |
| `rtl/idft_soc.sv` | three-core, two-clock SoC |
| `rtl/idft_top.sv` | SoC and board side by side |
| `tb/jtag_driver.sv` | JTAG master tasks for the testbenches (reset, IR/DR scans, stretched Update-DR) |
| `tb/tb_<module>.sv` | one self-checking testbench per module |
| `tb/chip_delay_run.sv` | Delay_EXTEST harness for one large `chip_1149` |
| `tb/tb_table2_chips.sv` | three chip sizes at once through that harness |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself. A
watchdog fails it if it hangs. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb rtl/idft_pkg.sv tb/tb_idft_top.sv \
          -y rtl -y tb --top-module tb_idft_top
./obj_dir/Vtb_idft_top
```

Replace `tb_idft_top` with any other testbench name. The design is two-valued
safe: anything read before it is written is reset or scanned first. The JTAG
driver's `reset()` pulses TRST_N after leaving Test-Logic-Reset, so the reset
edge reaches every flip-flop whatever its power-up value.

What the testbenches establish:

* **`tb_idft_top`** runs the SoC and the board concurrently at the clock rates
  of the published experiment: TCK 100 MHz, CLK1 200 MHz, CLK2 125 MHz, and
  200 MHz on the board. It counts the following events and fails if any never
  happens:
  * bypass, EXTEST and INTEST scans;
  * IDFT mode switching on and off;
  * stretched updates;
  * a launch-to-capture interval of exactly one clock period at each of the
    six controllers;
  * a slow board wire caught by Delay_EXTEST that passes static EXTEST.
* **`tb_chip_1149`, `tb_core_wrapper`, `tb_idft_board`** check a 10 ns wire
  against 8 ns and 5 ns clocks. Delay_EXTEST reports the slow wire; EXTEST
  does not.
* **`tb_table2_chips`** runs Delay_EXTEST on three large chips in parallel:
  * 3 domains of 42 input and 42 output cells (126 inputs);
  * 4 domains of 42 (168 inputs, the nearest even split of 165);
  * 4 domains of 71 (284 inputs).

  Domain d runs at 5 + 3d ns. Each output is wired to an input through 1 ns,
  or 20 ns on a random eighth of the wires. Each round launches a random
  pattern after another one. Per domain, the test checks that the
  launch-to-capture time is exactly one period. Every input must capture the
  new value, except slow wires that switched, which must still show the old
  value. EXTEST must then pass every wire. The same single controller per
  domain serves 42 or 71 cells, so controller logic grows with the number of
  clocks, not the number of pins.
* **`tb_idft_controller`** drives UpdateDR at random phases to SysCLK. It
  checks that UpDR rises on the first SysCLK edge after UpdateDR, that CapDR
  rises exactly one period later, that the Capture-DR edge is suppressed, and
  that ClockDR passes again in Shift-DR.
* **`tb_tap_controller`** compares 3000 random TMS steps against a reference
  state graph.

## Design choices and limits

Taken from the published scheme:

* The controller circuit and its timing.
* One controller per system clock.
* The unmodified two-flip-flop boundary cell.
* The stretched Update-DR procedure.
* The TAP-to-WSP glue and the WBC control functions.
* The SoC's cores, cells, nets and clock assignment.

This design's own choices:

* **Clock gate.** The controller's flip-flops run on `SysCLK & IDFT_Mode`.
  They must keep running after UpdateDR falls, so that UpDR and CapDR return
  to 0 on system clock edges. The gate therefore does not include UpdateDR.
  IDFT_Mode changes only in Update-IR, where the flip-flops' data input is 0,
  so a clipped clock pulse at that moment is harmless. A silicon
  implementation would still use a latch-based clock-gating cell.
* **No synchroniser.** UpdateDR is asynchronous to the system clocks and FF1
  samples it directly. For silicon, add a synchroniser or accept the
  metastability window.
* **Reset.** FF1 and FF2 are reset asynchronously by the TAP reset, so the
  first Delay_EXTEST starts clean.
* **Encodings.** Instruction lengths and opcodes, capture values, scan orders
  inside a chip or wrapper, and the per-domain split of boundary registers
  are chosen here.
* **Selection gating.** ClockDR, UpdateDR, CapDR_Sig and UpDR_Sig are gated by
  the selected register.
* **SoC TAP.** It has no instruction register of its own: Select drives
  SelectWIR directly, so an IR scan loads the WIRs.

Not built:

* The embedded core logic, and the TAM of the 1500 wrapper.
* Internal scan chains.
* The optional 1149.1 instructions CLAMP, HIGHZ and RUNBIST.
* Any selection scheme for individual cores in the SoC.
* Tri-state or bidirectional pins.

Clock rates are testbench settings, not RTL parameters.

Any number of clock domains works through `N_DOM`. A chip with three domains
and 126 input cells, for example, is `chip_1149 #(.N_DOM(3), .N_IN(42), ...)`.
