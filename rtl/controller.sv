// controller: MIPS single-cycle controller (top level).
//
// Turns an instruction's opcode and function code into the control signals
// that steer a single-cycle MIPS datapath. It is split the way the
// specification's two truth tables are: a main decoder (maindec) looks only
// at Op and produces the single-bit controls plus a 2-bit ALUOp code, and an
// ALU decoder (aludec) combines ALUOp with Funct to give ALUControl. ALUOp is
// internal and is not a port. The supported instructions are R-type
// (add, sub, and, or, slt), addi, lw, sw, beq and j.
//
// The single-bit outputs include MemRead, which the main truth table has as
// a column (1 only for lw) though the specification's list of schematic
// outputs leaves it out; it is brought out so that no column is lost.
// Don't-care table entries are driven as 0 and undefined inputs produce
// safe values; see maindec and aludec.
//
// Interface: Op[5:0], Funct[3:0] in; RegDst, ALUSrc, MemtoReg, RegWrite,
// MemRead, MemWrite, Branch, Jump, ALUControl[2:0] out. These outputs go to
// the datapath, which is not part of this design.
// Timing: combinational, no clock; outputs settle within the same cycle.
// The always_comb assertion checks that no decoded instruction writes both
// the register file and memory.
module controller
  import mips_ctrl_pkg::*;
(
  input  logic [5:0] Op,
  input  logic [3:0] Funct,
  output logic       RegDst,
  output logic       ALUSrc,
  output logic       MemtoReg,
  output logic       RegWrite,
  output logic       MemRead,
  output logic       MemWrite,
  output logic       Branch,
  output logic       Jump,
  output logic [2:0] ALUControl
);

  logic [1:0] ALUOp;

  maindec u_maindec (
    .Op       (Op),
    .RegDst   (RegDst),
    .ALUSrc   (ALUSrc),
    .MemtoReg (MemtoReg),
    .RegWrite (RegWrite),
    .MemRead  (MemRead),
    .MemWrite (MemWrite),
    .Branch   (Branch),
    .Jump     (Jump),
    .ALUOp    (ALUOp)
  );

  aludec u_aludec (
    .ALUOp      (ALUOp),
    .Funct      (Funct),
    .ALUControl (ALUControl)
  );

  always_comb begin
    assert (!(RegWrite && MemWrite))
      else $error("controller: RegWrite and MemWrite both asserted for Op=%b", Op);
  end

endmodule
