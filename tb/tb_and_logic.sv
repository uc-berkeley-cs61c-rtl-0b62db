// tb_and_logic: exhaustive check of the instruction recogniser.
// Drives all 4096 combinations of op and funct and compares the seven lines
// with a reference written from the instruction encodings (bit patterns
// spelled out here, not taken from the design's package).
module tb_and_logic;
  import cpu_pkg::*;

  logic [5:0] op, funct;
  instr_onehot_t ins;
  int checks = 0, failures = 0;

  and_logic dut (.op(op), .funct(funct), .ins(ins));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [6:0] exp;
    for (int o = 0; o < 64; o++) begin
      for (int f = 0; f < 64; f++) begin
        op = 6'(o); funct = 6'(f);
        #1;
        exp = '0;
        if (o == 'b000000 && f == 'b100000) exp[6] = 1'b1; // add
        if (o == 'b000000 && f == 'b100010) exp[5] = 1'b1; // sub
        if (o == 'b001101) exp[4] = 1'b1;                  // ori
        if (o == 'b100011) exp[3] = 1'b1;                  // lw
        if (o == 'b101011) exp[2] = 1'b1;                  // sw
        if (o == 'b000100) exp[1] = 1'b1;                  // beq
        if (o == 'b000010) exp[0] = 1'b1;                  // jump
        checks++;
        if (ins !== exp) begin
          failures++;
          if (failures < 10) $display("op=%b funct=%b got %b exp %b", op, funct, ins, exp);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
