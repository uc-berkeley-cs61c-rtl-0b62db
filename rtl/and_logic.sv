// and_logic: instruction recogniser, the first ("AND") plane of the main
// controller.
//
// Each output line is a single product term of the opcode bits, ANDed with a
// product term of the function bits for the two R-type instructions, so at
// most one line is high for any instruction word. Opcodes or function codes
// outside the seven supported instructions raise no line. The terms are the
// ones the design's controller equations list; writing them as equality
// compares against the encodings in cpu_pkg gives exactly those products.
//
// Interface: op = Instruction<31:26>, funct = Instruction<5:0>; ins is the
// one-hot (or all-zero) instruction bundle. Purely combinational.
module and_logic
  import cpu_pkg::*;
(
  input  logic [5:0]    op,
  input  logic [5:0]    funct,
  output instr_onehot_t ins
);

  logic rtype;

  always_comb begin
    rtype    = (op == OP_RTYPE);
    ins.add  = rtype && (funct == FN_ADD);
    ins.sub  = rtype && (funct == FN_SUB);
    ins.ori  = (op == OP_ORI);
    ins.lw   = (op == OP_LW);
    ins.sw   = (op == OP_SW);
    ins.beq  = (op == OP_BEQ);
    ins.jump = (op == OP_J);
  end

endmodule
