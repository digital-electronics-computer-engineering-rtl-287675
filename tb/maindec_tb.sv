// maindec_tb: self-checking testbench for the main decoder.
//
// Sweeps all 64 opcodes. For the six defined instructions every output the
// truth table specifies is compared with a reference row written out here
// as strings ("1", "0" or "X" for don't-care); don't-care entries are not
// checked. Every other opcode must give all controls 0 and ALUOp 00, the
// safe default this design chooses. The decoder is combinational: each
// opcode is held for 10 ns and sampled 1 ns after it changes.
module maindec_tb;

  logic [5:0] Op;
  logic RegDst, ALUSrc, MemtoReg, RegWrite, MemRead, MemWrite, Branch, Jump;
  logic [1:0] ALUOp;
  int checks = 0, failures = 0;

  maindec dut (.*);

  // Reference rows: RegDst ALUSrc MemtoReg RegWrite MemRead MemWrite Branch Jump ALUOp1 ALUOp0
  function automatic string ref_row(input logic [5:0] op);
    case (op)
      6'b000000: return "1001000010";
      6'b001000: return "0101000000";
      6'b100011: return "0111100000";
      6'b101011: return "X1X0010000";
      6'b000100: return "X0X0001001";
      6'b000010: return "XXX0000100";
      default:   return "0000000000";
    endcase
  endfunction

  task automatic check_bit(input string name, input logic got, input byte exp, input logic [5:0] op);
    if (exp == "X") return;
    checks++;
    if (got !== (exp == "1")) begin
      failures++;
      $display("FAIL Op=%b %s got %b expected %c", op, name, got, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    string r;
    for (int i = 0; i < 64; i++) begin
      Op = 6'(i);
      #1;
      r = ref_row(Op);
      check_bit("RegDst",   RegDst,   r[0], Op);
      check_bit("ALUSrc",   ALUSrc,   r[1], Op);
      check_bit("MemtoReg", MemtoReg, r[2], Op);
      check_bit("RegWrite", RegWrite, r[3], Op);
      check_bit("MemRead",  MemRead,  r[4], Op);
      check_bit("MemWrite", MemWrite, r[5], Op);
      check_bit("Branch",   Branch,   r[6], Op);
      check_bit("Jump",     Jump,     r[7], Op);
      check_bit("ALUOp1",   ALUOp[1], r[8], Op);
      check_bit("ALUOp0",   ALUOp[0], r[9], Op);
      #9;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
