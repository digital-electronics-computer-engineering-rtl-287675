// aludec_tb: self-checking testbench for the ALU decoder.
//
// Sweeps every ALUOp (4 values) against every Funct (16 values). The
// expected ALUControl comes from the truth table: 010 for ALUOp 00, 110 for
// ALUOp 01, and for ALUOp 1x the R-type function codes 0000 add (010),
// 0010 sub (110), 0100 and (000), 0101 or (001), 1010 slt (111). Function
// codes outside the table must give 010, the default this design chooses.
// Combinational: each input pair is sampled 1 ns after it is applied.
module aludec_tb;

  logic [1:0] ALUOp;
  logic [3:0] Funct;
  logic [2:0] ALUControl;
  int checks = 0, failures = 0;

  aludec dut (.*);

  function automatic logic [2:0] expected(input logic [1:0] aop, input logic [3:0] f);
    if (aop == 2'b00) return 3'b010;
    if (aop == 2'b01) return 3'b110;
    case (f)
      4'b0000: return 3'b010;
      4'b0010: return 3'b110;
      4'b0100: return 3'b000;
      4'b0101: return 3'b001;
      4'b1010: return 3'b111;
      default: return 3'b010;
    endcase
  endfunction

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 4; a++) begin
      for (int f = 0; f < 16; f++) begin
        ALUOp = 2'(a);
        Funct = 4'(f);
        #1;
        checks++;
        if (ALUControl !== expected(ALUOp, Funct)) begin
          failures++;
          $display("FAIL ALUOp=%b Funct=%b got %b expected %b",
                   ALUOp, Funct, ALUControl, expected(ALUOp, Funct));
        end
        #9;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
