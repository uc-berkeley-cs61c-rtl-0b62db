// or_logic: the second ("OR") plane of the main controller.
//
// Every control signal is the OR of the decoded instruction lines for which
// the control table asks it to be 1. Entries the table leaves as "don't care"
// are taken as 0, which is what the controller equations produce:
//   RegDst   = add + sub            ALUSrc   = ori + lw + sw
//   MemtoReg = lw                   RegWrite = add + sub + ori + lw
//   MemWrite = sw                   nPC_sel  = beq
//   Jump     = jump                 ExtOp    = lw + sw
//   ALUctr[0] = sub + beq           ALUctr[1] = ori
// With no line high (an unsupported instruction) every output is 0: the
// instruction writes nothing and the PC advances by 4.
//
// Interface: ins from and_logic, ctrl to the datapath. Combinational.
module or_logic
  import cpu_pkg::*;
(
  input  instr_onehot_t ins,
  output ctrl_t         ctrl
);

  always_comb begin
    ctrl.reg_dst    = ins.add | ins.sub;
    ctrl.alu_src    = ins.ori | ins.lw | ins.sw;
    ctrl.mem_to_reg = ins.lw;
    ctrl.reg_write  = ins.add | ins.sub | ins.ori | ins.lw;
    ctrl.mem_write  = ins.sw;
    ctrl.npc_sel    = ins.beq;
    ctrl.jump       = ins.jump;
    ctrl.ext_op     = ins.lw | ins.sw;
    ctrl.alu_ctr    = alu_ctr_e'({ins.ori, ins.sub | ins.beq});
  end

endmodule
