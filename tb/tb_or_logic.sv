// tb_or_logic: checks every control signal for each decoded instruction line
// and for no line at all, against the control table
// (RegDst ALUSrc MemtoReg RegWrite MemWrite nPCsel Jump ExtOp ALUctr[1:0]),
// with don't-care entries expected as 0.
module tb_or_logic;
  import cpu_pkg::*;

  instr_onehot_t ins;
  ctrl_t ctrl;
  int checks = 0, failures = 0;

  or_logic dut (.ins(ins), .ctrl(ctrl));

  // Expected control word for input line k (k = 7: no line)
  //                       RegDst ALUSrc MemtoReg RegWr MemWr nPC Jump ExtOp ALUctr
  logic [9:0] exp_tab [8] = '{
    10'b1_0_0_1_0_0_0_0_00,   // add
    10'b1_0_0_1_0_0_0_0_01,   // sub
    10'b0_1_0_1_0_0_0_0_10,   // ori
    10'b0_1_1_1_0_0_0_1_00,   // lw
    10'b0_1_0_0_1_0_0_1_00,   // sw
    10'b0_0_0_0_0_1_0_0_01,   // beq
    10'b0_0_0_0_0_0_1_0_00,   // jump
    10'b0_0_0_0_0_0_0_0_00    // none
  };

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 8; k++) begin
      ins = (k < 7) ? instr_onehot_t'(7'b100_0000 >> k) : instr_onehot_t'(7'b0);
      #1;
      for (int b = 0; b < 10; b++) begin
        checks++;
        if (ctrl[b] !== exp_tab[k][b]) begin
          failures++;
          $display("line %0d bit %0d got %b exp %b", k, b, ctrl[b], exp_tab[k][b]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
