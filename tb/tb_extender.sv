// tb_extender: zero and sign extension of edge values and random immediates.
module tb_extender;
  logic [15:0] imm16;
  logic        ext_op;
  logic [31:0] imm32, exp;
  int checks = 0, failures = 0;

  extender dut (.imm16(imm16), .ext_op(ext_op), .imm32(imm32));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] edges [4] = '{16'h0000, 16'h7fff, 16'h8000, 16'hffff};
    for (int i = 0; i < 1004; i++) begin
      imm16  = (i < 4) ? edges[i] : 16'($urandom);
      for (int e = 0; e < 2; e++) begin
        ext_op = e[0];
        #1;
        if (ext_op) exp = 32'($signed(imm16));
        else        exp = {16'h0, imm16};
        checks++;
        if (imm32 !== exp) begin
          failures++;
          $display("imm16=%h ext_op=%b got %h exp %h", imm16, ext_op, imm32, exp);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
