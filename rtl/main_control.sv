// main_control: the main controller of the single-cycle processor.
//
// Decodes the opcode and function fields of the current instruction into the
// datapath's control points. It is organised as two planes: and_logic turns
// op/funct into one line per instruction (add, sub, ori, lw, sw, beq, jump),
// and or_logic ORs those lines into RegDst, ALUSrc, MemtoReg, RegWrite,
// MemWrite, nPC_sel, Jump, ExtOp and ALUctr. This two-level structure and the
// equations are the design's; the packed struct ctrl_t is this RTL's way of
// carrying the ten control bits.
//
// Interface: op = Instruction<31:26>, funct = Instruction<5:0>, ctrl out.
// Purely combinational: control settles within the same cycle as the fetch.
module main_control
  import cpu_pkg::*;
(
  input  logic [5:0] op,
  input  logic [5:0] funct,
  output ctrl_t      ctrl
);

  instr_onehot_t ins;

  and_logic u_and (.op(op), .funct(funct), .ins(ins));
  or_logic  u_or  (.ins(ins), .ctrl(ctrl));

  // At most one instruction line may be active.
  always_comb assert ($onehot0(ins)) else $error("and_logic raised several lines: %b", ins);

endmodule
