// mips_ctrl_pkg: encodings shared by the MIPS single-cycle controller.
//
// The opcodes, the ALUOp codes between the two decoder stages and the
// ALUControl codes are those of the controller's truth tables. The function
// code is four bits wide (the low bits of the MIPS funct field), as the
// controller specification uses it. The struct bundles the single-bit
// datapath controls so both decoder stages and the testbenches share one
// field order; the order matches the column order of the main truth table.
package mips_ctrl_pkg;

  // Instruction opcodes, Op[5:0]
  typedef enum logic [5:0] {
    OP_RTYPE = 6'b000000,
    OP_ADDI  = 6'b001000,
    OP_LW    = 6'b100011,
    OP_SW    = 6'b101011,
    OP_BEQ   = 6'b000100,
    OP_J     = 6'b000010
  } opcode_e;

  // Internal code from the main decoder to the ALU decoder
  typedef enum logic [1:0] {
    ALUOP_ADD   = 2'b00,   // address / immediate add
    ALUOP_SUB   = 2'b01,   // compare for branch
    ALUOP_FUNCT = 2'b10    // R-type: look at Funct (2'b11 behaves the same)
  } aluop_e;

  // Function codes, Funct[3:0], of the supported R-type instructions
  localparam logic [3:0] FUNCT_ADD = 4'b0000;
  localparam logic [3:0] FUNCT_SUB = 4'b0010;
  localparam logic [3:0] FUNCT_AND = 4'b0100;
  localparam logic [3:0] FUNCT_OR  = 4'b0101;
  localparam logic [3:0] FUNCT_SLT = 4'b1010;

  // ALU operation selected by ALUControl[2:0]
  typedef enum logic [2:0] {
    ALU_AND = 3'b000,
    ALU_OR  = 3'b001,
    ALU_ADD = 3'b010,
    ALU_SUB = 3'b110,
    ALU_SLT = 3'b111
  } alucontrol_e;

  // Single-bit datapath controls, in truth-table column order
  typedef struct packed {
    logic RegDst;
    logic ALUSrc;
    logic MemtoReg;
    logic RegWrite;
    logic MemRead;
    logic MemWrite;
    logic Branch;
    logic Jump;
  } ctrl_t;

endpackage
