// controller_tb: end-to-end testbench for the MIPS single-cycle controller.
//
// Part 1 replays the controller's reference stimulus, 100 ns long, with a
// new input pair every 10 ns. Op is 00 for 50 ns, then 08, 23, 2b, 04, 02
// for 10 ns each; Funct is 0, 2, 4, 5, a for 10 ns each, then 0 for 50 ns.
// So the first five slices are the R-type functions add, sub, and, or, slt
// and the last five are addi, lw, sw, beq and j. Every slice is sampled
// 1 ns after the change (the controller is combinational, so outputs must
// be valid within the slice) and compared with the truth tables, with
// don't-care entries skipped. The run must take exactly 100 ns.
//
// Part 2 sweeps all 64 x 16 input pairs: specified rows are checked as in
// part 1, undefined opcodes must leave RegWrite, MemWrite, Branch and Jump
// low (the safe default of this design).
//
// Each decoded instruction class and each ALU operation is counted; one
// that never occurs counts as a failure.
module controller_tb;

  logic [5:0] Op;
  logic [3:0] Funct;
  logic RegDst, ALUSrc, MemtoReg, RegWrite, MemRead, MemWrite, Branch, Jump;
  logic [2:0] ALUControl;
  int checks = 0, failures = 0;

  controller dut (.*);

  // Instruction classes and ALU operations seen
  int n_rtype = 0, n_addi = 0, n_lw = 0, n_sw = 0, n_beq = 0, n_j = 0;
  int n_add = 0, n_sub = 0, n_and = 0, n_or = 0, n_slt = 0;

  // Reference: RegDst ALUSrc MemtoReg RegWrite MemRead MemWrite Branch Jump, "X" = don't care
  function automatic string ref_ctrl(input logic [5:0] op);
    case (op)
      6'h00:   return "10010000";
      6'h08:   return "01010000";
      6'h23:   return "01111000";
      6'h2b:   return "X1X00100";
      6'h04:   return "X0X00010";
      6'h02:   return "XXX00001";
      default: return "";
    endcase
  endfunction

  // Expected ALUControl, or -1 when the tables leave it undefined or don't-care
  function automatic int ref_alu(input logic [5:0] op, input logic [3:0] f);
    case (op)
      6'h08, 6'h23, 6'h2b: return int'(3'b010);
      6'h04:               return int'(3'b110);
      6'h00:
        case (f)
          4'h0: return int'(3'b010);
          4'h2: return int'(3'b110);
          4'h4: return int'(3'b000);
          4'h5: return int'(3'b001);
          4'ha: return int'(3'b111);
          default: return -1;
        endcase
      default: return -1;     // j uses no ALU result; undefined opcodes
    endcase
  endfunction

  task automatic check_one(input bit count);
    string r;
    logic [7:0] got;
    int ea;
    got = {RegDst, ALUSrc, MemtoReg, RegWrite, MemRead, MemWrite, Branch, Jump};
    r = ref_ctrl(Op);
    if (r.len() == 8) begin
      for (int b = 0; b < 8; b++) begin
        if (r[b] == "X") continue;
        checks++;
        if (got[7-b] !== (r[b] == "1")) begin
          failures++;
          $display("FAIL Op=%h Funct=%h control bit %0d got %b expected %c", Op, Funct, b, got[7-b], r[b]);
        end
      end
    end else begin
      checks++;
      if (RegWrite || MemWrite || Branch || Jump) begin
        failures++;
        $display("FAIL undefined Op=%h has a write or PC control asserted", Op);
      end
    end
    ea = ref_alu(Op, Funct);
    if (ea >= 0) begin
      checks++;
      if (ALUControl !== 3'(ea)) begin
        failures++;
        $display("FAIL Op=%h Funct=%h ALUControl got %b expected %b", Op, Funct, ALUControl, 3'(ea));
      end
    end
    if (count) begin
      // classify from the outputs themselves
      if (RegDst && RegWrite)                 n_rtype++;
      if (ALUSrc && RegWrite && !MemtoReg)    n_addi++;
      if (MemRead && MemtoReg && RegWrite)    n_lw++;
      if (MemWrite)                           n_sw++;
      if (Branch)                             n_beq++;
      if (Jump)                               n_j++;
      if (!Jump) begin
        case (ALUControl)
          3'b010: n_add++;
          3'b110: n_sub++;
          3'b000: n_and++;
          3'b001: n_or++;
          3'b111: n_slt++;
          default: ;
        endcase
      end
    end
  endtask

  task automatic need(input string what, input int n);
    checks++;
    if (n == 0) begin
      failures++;
      $display("FAIL %s never occurred", what);
    end else
      $display("  %-8s occurred %0d times", what, n);
  endtask

  initial begin
    #1000000;
    failures++;
    $display("FAIL watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Reference stimulus as (value, duration in ns) pairs
  localparam int NSEG_OP = 6, NSEG_FN = 6;
  localparam logic [7:0] OP_VAL [NSEG_OP] = '{8'h00, 8'h08, 8'h23, 8'h2b, 8'h04, 8'h02};
  localparam int         OP_DUR [NSEG_OP] = '{50, 10, 10, 10, 10, 10};
  localparam logic [7:0] FN_VAL [NSEG_FN] = '{8'h0, 8'h2, 8'h4, 8'h5, 8'ha, 8'h0};
  localparam int         FN_DUR [NSEG_FN] = '{10, 10, 10, 10, 10, 50};

  function automatic logic [7:0] seg_value(input int t, input bit is_op);
    int acc = 0;
    for (int s = 0; s < 6; s++) begin
      acc += is_op ? OP_DUR[s] : FN_DUR[s];
      if (t < acc) return is_op ? OP_VAL[s] : FN_VAL[s];
    end
    return 8'h00;
  endfunction

  initial begin
    time t0;
    t0 = $time;
    // Part 1: the 100 ns reference run, one slice every 10 ns
    for (int t = 0; t < 100; t += 10) begin
      Op    = seg_value(t, 1'b1)[5:0];   // only the low 6 bits reach Op
      Funct = seg_value(t, 1'b0)[3:0];
      #1;
      check_one(1'b1);
      #9;
    end
    checks++;
    if ($time - t0 != 100) begin
      failures++;
      $display("FAIL reference run took %0t ns, expected 100", $time - t0);
    end
    $display("Reference stimulus: mechanisms seen");
    need("R-type", n_rtype);
    need("addi",   n_addi);
    need("lw",     n_lw);
    need("sw",     n_sw);
    need("beq",    n_beq);
    need("j",      n_j);
    need("add",    n_add);
    need("sub",    n_sub);
    need("and",    n_and);
    need("or",     n_or);
    need("slt",    n_slt);

    // Part 2: every input pair
    for (int o = 0; o < 64; o++) begin
      for (int f = 0; f < 16; f++) begin
        Op = 6'(o);
        Funct = 4'(f);
        #1;
        check_one(1'b0);
      end
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
