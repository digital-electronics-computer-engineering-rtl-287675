// aludec: ALU decoder of the MIPS single-cycle controller.
//
// Purely combinational. ALUOp from the main decoder chooses between a fixed
// add (00, for addi, lw, sw and j), a fixed subtract (01, for beq) and,
// when its upper bit is 1, an operation picked by the 4-bit function code of
// an R-type instruction: add, sub, and, or, slt. These codes follow the
// specification. Function codes outside the table are undefined there; this
// design then selects add (ALUControl = 010).
//
// Interface: ALUOp[1:0] and Funct[3:0] in, ALUControl[2:0] out.
// Timing: combinational, no clock, no latency.
module aludec
  import mips_ctrl_pkg::*;
(
  input  logic [1:0] ALUOp,
  input  logic [3:0] Funct,
  output logic [2:0] ALUControl
);

  alucontrol_e alu;

  always_comb begin
    if (ALUOp == ALUOP_ADD)      alu = ALU_ADD;
    else if (ALUOp == ALUOP_SUB) alu = ALU_SUB;
    else begin
      unique case (Funct)
        FUNCT_ADD: alu = ALU_ADD;
        FUNCT_SUB: alu = ALU_SUB;
        FUNCT_AND: alu = ALU_AND;
        FUNCT_OR:  alu = ALU_OR;
        FUNCT_SLT: alu = ALU_SLT;
        default:   alu = ALU_ADD;
      endcase
    end
  end

  assign ALUControl = alu;

endmodule
