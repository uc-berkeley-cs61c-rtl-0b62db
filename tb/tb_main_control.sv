// tb_main_control: drives every supported instruction, plus random
// unsupported opcode/funct pairs, through the complete controller and checks
// the ten control bits against the control table (don't cares as 0).
module tb_main_control;
  import cpu_pkg::*;

  logic [5:0] op, funct;
  ctrl_t ctrl;
  int checks = 0, failures = 0;

  main_control dut (.op(op), .funct(funct), .ctrl(ctrl));

  task automatic check(input logic [5:0] o, input logic [5:0] f, input logic [9:0] exp, input string nm);
    op = o; funct = f;
    #1;
    checks++;
    if (ctrl !== exp) begin
      failures++;
      $display("%s: op=%b funct=%b got %b exp %b", nm, o, f, ctrl, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [5:0] o, f;
    //                                       RegDst ALUSrc MemtoReg RegWr MemWr nPC Jump ExtOp ALUctr
    check(6'b000000, 6'b100000, 10'b1_0_0_1_0_0_0_0_00, "add");
    check(6'b000000, 6'b100010, 10'b1_0_0_1_0_0_0_0_01, "sub");
    check(6'b001101, 6'h15,     10'b0_1_0_1_0_0_0_0_10, "ori");
    check(6'b100011, 6'h2a,     10'b0_1_1_1_0_0_0_1_00, "lw");
    check(6'b101011, 6'h00,     10'b0_1_0_0_1_0_0_1_00, "sw");
    check(6'b000100, 6'h3f,     10'b0_0_0_0_0_1_0_0_01, "beq");
    check(6'b000010, 6'h20,     10'b0_0_0_0_0_0_1_0_00, "jump");
    check(6'b000000, 6'b100001, 10'b0, "addu (unsupported)");
    for (int i = 0; i < 200; i++) begin
      o = 6'($urandom); f = 6'($urandom);
      if (o inside {6'b001101, 6'b100011, 6'b101011, 6'b000100, 6'b000010}) continue;
      if (o == 6'b000000 && (f == 6'b100000 || f == 6'b100010)) continue;
      check(o, f, 10'b0, "unsupported");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
