// maindec: main decoder of the MIPS single-cycle controller.
//
// Purely combinational. The 6-bit opcode selects one row of the main truth
// table and drives the eight single-bit datapath controls and the 2-bit
// ALUOp code that the ALU decoder refines. Six instructions are decoded:
// R-type, addi, lw, sw, beq and j; the rows and their values follow the
// specification. Where a row marks an output as don't-care (RegDst,
// MemtoReg for sw and beq; RegDst, ALUSrc, MemtoReg for j) this design
// drives 0. Opcodes outside the table are undefined in the specification;
// here they produce all controls 0 and ALUOp = 00, so an unknown instruction
// writes neither a register nor memory and does not redirect the PC.
//
// Interface: Op in; RegDst, ALUSrc, MemtoReg, RegWrite, MemRead, MemWrite,
// Branch, Jump and ALUOp out. Timing: outputs follow Op combinationally,
// no clock, no latency.
module maindec
  import mips_ctrl_pkg::*;
(
  input  logic [5:0] Op,
  output logic       RegDst,
  output logic       ALUSrc,
  output logic       MemtoReg,
  output logic       RegWrite,
  output logic       MemRead,
  output logic       MemWrite,
  output logic       Branch,
  output logic       Jump,
  output logic [1:0] ALUOp
);

  ctrl_t  ctrl;
  aluop_e aluop;

  always_comb begin
    unique case (Op)
      //                     RegDst ALUSrc MemtoReg RegWrite MemRead MemWrite Branch Jump
      OP_RTYPE: begin ctrl = '{1'b1, 1'b0, 1'b0, 1'b1, 1'b0, 1'b0, 1'b0, 1'b0}; aluop = ALUOP_FUNCT; end
      OP_ADDI:  begin ctrl = '{1'b0, 1'b1, 1'b0, 1'b1, 1'b0, 1'b0, 1'b0, 1'b0}; aluop = ALUOP_ADD;   end
      OP_LW:    begin ctrl = '{1'b0, 1'b1, 1'b1, 1'b1, 1'b1, 1'b0, 1'b0, 1'b0}; aluop = ALUOP_ADD;   end
      OP_SW:    begin ctrl = '{1'b0, 1'b1, 1'b0, 1'b0, 1'b0, 1'b1, 1'b0, 1'b0}; aluop = ALUOP_ADD;   end
      OP_BEQ:   begin ctrl = '{1'b0, 1'b0, 1'b0, 1'b0, 1'b0, 1'b0, 1'b1, 1'b0}; aluop = ALUOP_SUB;   end
      OP_J:     begin ctrl = '{1'b0, 1'b0, 1'b0, 1'b0, 1'b0, 1'b0, 1'b0, 1'b1}; aluop = ALUOP_ADD;   end
      default:  begin ctrl = '0;                                                  aluop = ALUOP_ADD;   end
    endcase
  end

  assign RegDst   = ctrl.RegDst;
  assign ALUSrc   = ctrl.ALUSrc;
  assign MemtoReg = ctrl.MemtoReg;
  assign RegWrite = ctrl.RegWrite;
  assign MemRead  = ctrl.MemRead;
  assign MemWrite = ctrl.MemWrite;
  assign Branch   = ctrl.Branch;
  assign Jump     = ctrl.Jump;
  assign ALUOp    = aluop;

endmodule
