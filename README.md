# Boundary-scan test of FPGA I/O blocks and of pad-to-pin connections

An FPGA's I/O blocks (IOBs) sit between the pads and the programmable core.
Test methods aimed at the logic array leave them out, and the standard
IEEE 1149.1 boundary-scan (BS) register only half reaches them: it can drive
an IOB's input path and observe its output and tristate paths. It cannot
drive the output, tristate, clock and control inputs from the core side, and
it cannot see the two signals the IOB returns to the core.

This design closes the gap the way a reconfigurable device allows. During the
test, the FPGA is configured with an extra *User Test Register* (UTR), a
BS-like register that wraps every IOB from the core side and is reached
through the TAP as a user instruction (USER1). It costs nothing in the
application: a normal configuration simply does not contain it. The same
stimulus goes to all IOBs at once, so the UTR needs only **7 stimulus cells
for the whole device plus 2 capture cells per IOB**, i.e. `2·N_IOB + 7`
cells. With three test configurations and a short vector list, every
flip-flop and multiplexer of every IOB is exercised and any wrong answer
points at one IOB.

What an IOB test cannot show is whether the bond wire from pad to package
pin is intact. For that the board's edge connectors are replaced by
*active connectors*: transparent connectors made of BS cells, with their own
TAP. They join the board's scan chain, and an ordinary EXTEST interconnect
test then checks each PLD pad, its bond wire, package pin and board trace up
to the connector.

The RTL contains the PLD side (IOBs, BS register, UTR, TAP and its
registers), the active connector, the board chain, and a small scan master
that runs the complete IOB test without external test equipment.

## Hierarchy

```
test_system                 board + IOB test controller + external tester port
├── bs_test_controller      scan master running the IOB structural test
└── board_top               PLD and N_CONN active connectors on one chain
    ├── pld_top             the PLD's I/O side and TAP
    │   ├── tap_controller, instruction_register, bypass_register
    │   ├── config_register     IOB configuration bits, loaded through the TAP
    │   ├── user_test_register  2·N_IOB + 7 cells
    │   └── iob  (× N_IOB)      flip-flops, multiplexers, buffer, 3 × bs_cell
    └── active_connector (× N_CONN)
        ├── tap_controller, instruction_register, bypass_register
        └── bs_cell (× N_PINS)
```

`jtag_pkg` holds the TAP state type, the capture/shift/update strobe
bundle, the instruction codes and the IOB configuration and stimulus
structs. `iob_test_pkg` holds the test configurations and vectors.

Default sizes are those of a Xilinx XCV200 in a BG352 package: 336 IOBs, of
which 260 are bonded to package pins. The board has four active
connectors of 65 pins each.

## The IOB

Each IOB (`iob.sv`) has seven inputs from the core (Tristate, TEC, Output,
OEC, IEC, CLK, SR) and two outputs to it (Input, Reg. Input).

* **Tristate and output paths.** Each has a flip-flop (D = Tristate or
  Output, CE = TEC or OEC) and a 2-to-1 multiplexer that passes either the
  flip-flop or the raw signal. The multiplexer select is a configuration
  bit (`mux_t`, `mux_o`; 1 = registered).
* **Input path.** It has no multiplexer. The pad value goes to the core
  directly (Input) and through a flip-flop with CE = IEC (Reg. Input).
* **Flip-flops.** All three share CLK and SR. On a rising CLK edge, SR high
  loads the flip-flop's INIT bit, which comes from the configuration.
  Otherwise CE high loads D. SR therefore either sets or resets the
  flip-flop, depending on the configuration. Loading a configuration leaves
  the stored value alone.
* **Boundary scan.** Three BC_1-style cells are chained TDI → input cell →
  output cell → tristate cell → TDO. The output and tristate cells sit
  between the multiplexers and the buffer, so they observe those paths. The
  input cell sits between the pad and the input path, so it can drive it.
* **Buffer.** The pad is driven while the tristate value is 0.

## Two registers, one test vector

A test vector is a value for CLK, SR, CE and D. It is applied to all three
paths of all IOBs at the same time: D goes to Tristate, Output and the input
path, and CE goes to TEC, OEC and IEC. The stimulus comes from two places:

| signal                          | applied through         | response seen by |
|---------------------------------|-------------------------|------------------|
| Tristate, Output, TEC, OEC, IEC, CLK, SR | UTR stimulus cells (broadcast) | |
| input-path D                    | BS register, input cells | |
| tristate- and output-path value |                          | BS register, tristate/output cells |
| Input, Reg. Input               |                          | UTR capture cells, 2 per IOB |

Each vector therefore takes four scans, all made from Run-Test/Idle:

1. **INTEST, BS register.** Shift D into every input cell. Tristate cells
   get 1, so the pads stay undriven. Update applies the values.
2. **USER1, UTR.** Shift the seven stimulus bits. Update applies them; a
   CLK bit going from 0 to 1 is the clock edge.
3. **INTEST again.** Capture, then shift out, every IOB's tristate- and
   output-path value.
4. **USER1 again.** Capture, then shift out, Input and Reg. Input. The same
   stimulus is shifted back in, so nothing changes.

For this to work, the BS cells must keep their INTEST state while USER1 is
the instruction. Otherwise, once the UTR is selected, the input path would
fall back to the pad. `pld_top` does this: in the test configuration, USER1
puts the input cells in drive mode and lets the output and tristate cells
drive the pads, just as INTEST does.

Every vector is built so that only CLK changes on a clock edge. D, CE and SR
equal their values in the previous vector. The clock edge therefore never
races the data, even though all update stages change on the same TCK edge.

The UTR shift stage is laid out as follows, with bit 0 next to TDO:
`[2N+6:2N]` holds the stimulus (`iob_stim_t`, Tristate in the MSB), and
`[2i+1]`, `[2i]` hold Reg. Input and Input of IOB *i*. In the BS register,
IOB 0 is next to TDI, so IOB *i*'s cells are bits `3(N−1−i)+{2,1,0}`
(input, output, tristate).

Shift cost: at 336 IOBs the UTR has 679 cells and the BS register 1008.
Shifting both (1687) takes less than shifting the BS register twice (2016).
For any `N > 7`, `2N + 7 < 3N`.

## Test configurations and vectors

The multiplexer selects and INIT values live in the configuration, so the
test needs three configurations. They are loaded through the TAP (instruction
CFG_IN, `config_register`). The vectors, in `iob_test_pkg::VECTORS`, are:

| group | mux | INIT | vectors (CLK SR CE D → expected path output) |
|-------|-----|------|----------------------------------------------|
| 0 | direct     | 0 | 0000→0, 0001→1 |
| 1 | registered | 0 | *set-up:* 0011→–, 1011→1; then 0101→1, 1101→0, 1001→0, 0001→0, 1001→0, 1010→0, 0010→0, 1010→0 |
| 2 | registered | 1 | 1110→0, 0110→0, 1110→1 |

The thirteen unmarked vectors are the method's test set. Together they
cover the multiplexer on both settings, SR to 0 and to 1, CE blocking a
clock edge, and CE loading.

The first vector of group 1 expects the flip-flop to already hold 1, so that
the following SR edge visibly clears it. No earlier vector stores a 1, so
this design adds two **set-up vectors** that load 1 with CE. They are marked
`table_row = 0`. The first vector of group 2 expects 0 although INIT is now
1. This works only because reconfiguring does not touch the flip-flop: it
still holds the 0 left by group 1, and CLK stays high, so there is no edge.

For the input path, only Reg. Input is compared in groups 1 and 2; Input
must always equal D.

## The IOB test controller

`bs_test_controller` is a scan master that runs the whole procedure. It
loads each configuration (every IOB alike, test flag set) and then makes the
four scans of each vector. It does not store scan images. Each TDI bit is
computed from the current vector and from counters (bit number, position
within an IOB's cells, IOB number). Each TDO bit is compared as it comes
out. Devices after the PLD on the chain (`NPOST`) are held in BYPASS.

* TCK = clk/2. TMS and the counters change while TCK is low. TDO is sampled
  on the clk edge that raises TCK.
* A run takes `6 + 3·(IR + CFG) + 15·(4·IR + 2·BS + 2·UTR)` TCK cycles.
  Here an IR scan is `4 + 5·(NPOST+1) + 2` cycles and a DR scan is
  `3 + NPOST + length + 2`. At the default size on the board this is 58,179
  TCK cycles.
* Results: `fail_count` (wrong responses, saturating at 16 bits), and the
  vector index and IOB number of the first wrong response.

In `test_system`, the controller owns the chain while `busy` is high.
Otherwise the `ext_*` tester port drives it.

## Active connectors and the bond test

`active_connector` has a chain of BS cells, one per pin, with cell 0 next
to TDI. It also has a TAP controller, an instruction register (EXTEST,
SAMPLE, BYPASS) and a bypass register. In normal operation each cell passes
its board-side line straight to the mating side. In EXTEST the cells drive
the mating side. On Capture-DR each cell samples its board line.

`board_top` chains TDI → PLD → connector 0 → … → connector N_CONN−1 → TDO.
Bonded PLD pad *p* is routed to connector `p / 65`, pin `p % 65`. With all
devices in EXTEST, the PLD's output and tristate cells drive the pads and
the connector cells read the lines. The chain is 1008 + 260 cells. The
connector part adds about 25 % to the PLD's length.

A broken bond is invisible from inside the PLD, because the pad's own input
cell still sees the pad's own drive. Only the connector sees the line
float. The testbenches show exactly this.

Pads, bond wires, package pins, traces and the passive connector body have
no logic. They are therefore not modelled: their signals are ports of
`board_top` and `test_system` (`pld_pin_o/oe/i`, `conn_board_i`). The
testbenches supply a board model: a pull-up on an undriven line, a wired-AND
short, and an open bond.

## Registers and instructions

The instruction register is 5 bits. Its codes are those of the Virtex
family.

| instruction | code  | PLD register               | active connector |
|-------------|-------|----------------------------|------------------|
| EXTEST      | 00000 | BS register, cells drive pads | cells drive mating side |
| SAMPLE      | 00001 | BS register                | cells            |
| USER1       | 00010 | UTR (test configuration only, else bypass) | bypass |
| CFG_IN      | 00101 | configuration register     | bypass           |
| INTEST      | 00111 | BS register, cells drive the input paths | bypass |
| BYPASS      | 11111 | bypass (also after reset)  | bypass           |

The configuration register is `5·N_IOB + 1` bits. Bit `5N` is the test flag
`utr_en`. Bits `[5i+4:5i]` are IOB *i*'s `{mux_t, mux_o, init_t, init_o,
init_i}`. Capture reads back the active configuration. With `utr_en` clear,
the IOBs take their seven inputs from the `core_stim` ports (normal
operation). With it set, they take the UTR's broadcast stimulus.

All registers act on the rising TCK edge that leaves Capture, Shift or
Update, and TDO is combinational from the selected register. IEEE 1149.1
updates on the falling edge and retimes TDO; this design does not. A
1149.1-compliant part would have to add both. `trst_n` resets every
register. Test-Logic-Reset, entered through TMS, resets the instruction to
BYPASS.

## Simulating

Every testbench is self-checking. Each ends by printing
`TB_RESULT checks=N failures=M`. With verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/jtag_pkg.sv rtl/iob_test_pkg.sv rtl/*.sv tb/tb_test_system.sv \
  --top-module tb_test_system -o sim && ./obj_dir/sim
```

Replace the testbench and top module to run a single block. Some
testbenches take `.svh` helpers from `tb/`: `jtag_tasks.svh` (TAP driving),
`iob_test_flow.svh` (the four-scan procedure in testbench form) and
`interconnect_flow.svh` (counting-sequence EXTEST).

| testbench | what it shows |
|-----------|---------------|
| tb_test_system | full default size. The controller passes a good PLD, with the exact TCK count. It finds a stuck multiplexer select in unbonded IOB 300 and locates it. An EXTEST interconnect test finds an open bond and a short. Normal operation reaches the mating side. IOB 0's flip-flop activity is counted by mechanism. |
| tb_board_top | full default size. The same procedure is run from the tester port in testbench code, plus the interconnect test with faults. |
| tb_pld_top | 6 IOBs, 4 bonded: BYPASS, USER1 falling back to bypass, normal operation, the full IOB test, EXTEST, and unbonded loop-back |
| tb_bs_test_controller | 6 IOBs: a good PLD passes with the exact TCK count. Stuck configuration bits are each found and located, and the count of wrong responses is checked against the vector table. These are a stuck output or tristate select, a stuck output or input INIT, and two faulty IOBs at once. |
| tb_iob | all vectors on the three paths; the BS cells' capture, order, update and modes; 400 random stimulus steps with random configurations against a flip-flop reference model |
| tb_user_test_register, tb_config_register | length, layout, capture and update |
| tb_active_connector | transparency, BYPASS, SAMPLE, EXTEST |
| tb_tap_controller, tb_instruction_register, tb_bypass_register, tb_bs_cell | against models of the IEEE 1149.1 behaviour written in the testbench |


## Choices made here, and limits

* **Flip-flop semantics** (synchronous SR to INIT, priority over CE, value
  kept across reconfiguration) and the **two set-up vectors** are inferred
  from the expected outputs of the vector set, as explained above.
* The method only says the test vectors are shifted into both registers in
  turn. Keeping the BS cells in their INTEST state under USER1 is this
  design's way of holding the input-path stimulus while the UTR is shifted.
* All vectors are shifted through both registers. The method notes that the
  two direct-path vectors need not go through the BS register for the input
  path; the extra scans only cost time.
* **Configuration memory.** A real device loads its configuration as a
  bitstream. Here only the IOB bits and a test flag are modelled, as one
  TAP data register. All IOBs get the same word in the test.
* **Instruction codes**, the IR length, the chain order (PLD first), four
  connectors of 65 pins, and the pin-to-connector mapping are this design's
  choices.
* **Active-connector channels** are one-directional, board to mating side,
  as each cell is drawn with one input and one output. The bond test
  therefore drives from the PLD, which every IOB can do since all IOBs are
  bidirectional.
* The PLD's BS register has 3 cells per IOB (1008 at the default size). The
  real XCV200 chain of 1022 cells also covers dedicated pins, which are not
  modelled.
* An undriven unbonded pad reads 1, since there are only two logic levels.
* The IOB flip-flops are clocked by the IOB's CLK. In the test
  configuration, that CLK comes from a UTR update flip-flop, so the flip-flop
  clock is a generated, multiplexed clock. This is intended: it is how the
  method controls CLK.
