# MIPS single-cycle controller

A single-cycle MIPS processor needs one piece of logic that looks at each
instruction and decides how data moves through the datapath that cycle:
which register is written, whether the ALU's second operand is a register
or the immediate, whether memory is read or written, whether the PC
branches or jumps, and which operation the ALU performs. This RTL is that
controller for a six-instruction subset of MIPS: R-type (`add`, `sub`,
`and`, `or`, `slt`), `addi`, `lw`, `sw`, `beq` and `j`.

The controller is pure combinational logic, with no clock, no state and no
reset. Its outputs follow the inputs within the same cycle.

## Two-level decoding

The decode is split in two, linked by a 2-bit internal code, `ALUOp`:

```
            +-----------+  RegDst ALUSrc MemtoReg RegWrite
 Op[5:0] -->|  maindec  |  MemRead MemWrite Branch Jump  ----> datapath
            +-----------+
                  | ALUOp[1:0]  (internal)
                  v
            +-----------+
 Funct[3:0]>|  aludec   |--> ALUControl[2:0] --------------> ALU
            +-----------+
```

* **`maindec`** sees only the opcode. It produces the eight single-bit
  controls. It also gives `ALUOp`, which says what kind of ALU work the
  instruction needs: `00` is an add (address or immediate arithmetic), `01`
  is a subtract (the equality compare of `beq`), and `1x` means that the
  function code decides.
* **`aludec`** turns `ALUOp` and the function code into `ALUControl`. It
  only looks at `Funct` when `ALUOp[1]` is 1.

The split keeps the opcode table small, because every R-type instruction
shares opcode `000000`. `ALUOp` is not a port of `controller`.

### Main decoder table

| Op       | Instr  | RegDst | ALUSrc | MemtoReg | RegWrite | MemRead | MemWrite | Branch | Jump | ALUOp |
|----------|--------|:------:|:------:|:--------:|:--------:|:-------:|:--------:|:------:|:----:|:-----:|
| `000000` | R-type | 1 | 0 | 0 | 1 | 0 | 0 | 0 | 0 | 10 |
| `001000` | addi   | 0 | 1 | 0 | 1 | 0 | 0 | 0 | 0 | 00 |
| `100011` | lw     | 0 | 1 | 1 | 1 | 1 | 0 | 0 | 0 | 00 |
| `101011` | sw     | (0) | 1 | (0) | 0 | 0 | 1 | 0 | 0 | 00 |
| `000100` | beq    | (0) | 0 | (0) | 0 | 0 | 0 | 1 | 0 | 01 |
| `000010` | j      | (0) | (0) | (0) | 0 | 0 | 0 | 0 | 1 | 00 |
| other    | —      | 0 | 0 | 0 | 0 | 0 | 0 | 0 | 0 | 00 |

Values in parentheses are don't-cares for that instruction, because the
datapath ignores them. This RTL drives them as 0. The last row is this
design's own choice. An opcode outside the table writes neither a register
nor memory and does not redirect the PC, so it behaves as a no-op.

### ALU decoder table

| ALUOp | Funct[3:0] | ALUControl | Operation |
|-------|------------|------------|-----------|
| 00    | any        | 010        | add |
| 01    | any        | 110        | subtract |
| 1x    | 0000       | 010        | add |
| 1x    | 0010       | 110        | subtract |
| 1x    | 0100       | 000        | and |
| 1x    | 0101       | 001        | or |
| 1x    | 1010       | 111        | set on less than |
| 1x    | other      | 010        | add (this design's choice) |

`Funct` is four bits wide. It is the low four bits of the six-bit MIPS
function field (`add` is `100000`, `sub` `100010`, and so on). All five
supported R-type instructions share the upper bits `10`, so a datapath
wires `instr[3:0]` to this input.

## Interface (`controller`)

| Port | Dir | Width | Meaning |
|------|-----|-------|---------|
| `Op` | in | 6 | opcode, `instr[31:26]` |
| `Funct` | in | 4 | low function bits, `instr[3:0]` |
| `RegDst` | out | 1 | write register is `rd` (1) or `rt` (0) |
| `ALUSrc` | out | 1 | ALU operand B is the sign-extended immediate |
| `MemtoReg` | out | 1 | register write-back data comes from memory |
| `RegWrite` | out | 1 | write the register file |
| `MemRead` | out | 1 | read data memory (`lw`) |
| `MemWrite` | out | 1 | write data memory (`sw`) |
| `Branch` | out | 1 | instruction is `beq`; the datapath ANDs this with the ALU's zero flag |
| `Jump` | out | 1 | instruction is `j` |
| `ALUControl` | out | 3 | ALU operation, see the table above |

`MemRead` is the only output that a datapath built with an always-enabled
data memory does not need. It is 1 only for `lw` and can be left open.

`controller` holds an immediate assertion: no decoded instruction may
assert `RegWrite` and `MemWrite` together.

## Files

| File | Content |
|------|---------|
| `rtl/mips_ctrl_pkg.sv` | opcode, `ALUOp` and `ALUControl` enums, function codes, control struct |
| `rtl/maindec.sv` | main decoder |
| `rtl/aludec.sv` | ALU decoder |
| `rtl/controller.sv` | top level: the two decoders and the `ALUOp` link |
| `tb/maindec_tb.sv` | all 64 opcodes against the main table |
| `tb/aludec_tb.sv` | all 4 x 16 `ALUOp`/`Funct` pairs against the ALU table |
| `tb/controller_tb.sv` | reference stimulus and exhaustive sweep of the whole controller |

## Verification

Each testbench checks itself. It compares the outputs with expected values
written into the testbench, independent of the RTL. It ends by printing
`TB_RESULT checks=N failures=M`. A time-based watchdog stops a run that
hangs and counts that as a failure.

`controller_tb` first replays a 100 ns reference sequence. Inputs change
every 10 ns and are sampled 1 ns later:

* `Op` is `00` for 50 ns, then `08`, `23`, `2b`, `04`, `02` for 10 ns each.
* `Funct` is `0`, `2`, `4`, `5`, `a` for 10 ns each, then `0` for 50 ns.

The first five slices run the five R-type operations. The last five run
`addi`, `lw`, `sw`, `beq` and `j`. The testbench counts how often each
instruction class and each ALU operation shows up. If any of them never
appears, it counts a failure. It then sweeps all 1024 `Op`/`Funct` pairs.

The testbenches compare don't-care entries of the tables only where the
test targets this design's own fill-in values (`maindec_tb` checks
undefined opcodes, `aludec_tb` checks undefined function codes).
`controller_tb` skips the don't-cares. Instead, it requires that an
undefined opcode asserts no write and no PC control.

Run one with Verilator 5:

```
verilator --binary --timing --assert -y rtl +libext+.sv \
    rtl/mips_ctrl_pkg.sv tb/controller_tb.sv --top-module controller_tb
./obj_dir/Vcontroller_tb
```

Change the testbench and top module names to run the other two.

## Departures and choices

* **`MemRead` output.** The controller's listed outputs are `RegDst`,
  `ALUSrc`, `MemtoReg`, `RegWrite`, `MemWrite`, `Branch` and `Jump`. Its
  truth table, however, has one more single-bit column, which is 1 only for
  `lw`. That column is kept here as `MemRead`.
* **Don't-cares** are driven as 0.
* **Inputs outside the tables** have no defined behaviour in the
  specification. Here they give no-op controls, and undefined R-type
  function codes select add.
* **`ALUOp = 11`** is decoded like `10`.
* **Four-bit `Funct`.** A full decoder would look at all six function bits.
  This one, as specified, cannot tell `add` (`100000`) from, for example,
  `sll` (`000000`).
* **The datapath** is not part of this design. The controller's outputs are
  the ports where it would connect.
