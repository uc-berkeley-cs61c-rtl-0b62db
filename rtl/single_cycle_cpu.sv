// single_cycle_cpu: top of the single-cycle processor for the instructions
// add, sub, ori, lw, sw, beq and j.
//
// Every instruction completes in one clock cycle. In that cycle the
// instruction fetch unit presents Instruction = MEM[PC]; the main controller
// decodes op/funct into the control points; the register file reads R[rs]
// (busA) and R[rt] (busB); the extender widens imm16; the ALU works on busA
// and either busB or the immediate; the data memory is read (or, for sw,
// written at the clock edge) at the ALU result; and the MemtoReg mux sends
// the ALU result or the loaded word to busW, written at the clock edge into
// rd or rt (RegDst) when RegWrite is 1. The ALU's Zero and the controller's
// nPC_sel and Jump pick the next PC.
//
// Interface: clk (rising edge), synchronous rst (PC <= RESET_PC, registers
// cleared), the imem_* port to load a program while rst is held, and
// observation outputs carrying this cycle's PC, instruction, register write
// and memory access; these are existing datapath nets and add no logic.
// The structure, the control equations and the instruction behaviour follow
// the design; memory sizes, reset, the program-load port and register 0
// reading as zero are choices of this RTL.
module single_cycle_cpu
  import cpu_pkg::*;
#(
  parameter int unsigned DATA_W     = 32,
  parameter int unsigned IMEM_WORDS = 1024,
  parameter int unsigned DMEM_WORDS = 1024,
  parameter logic [31:0] RESET_PC   = 32'h0000_0000
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        imem_we,
  input  logic [31:0] imem_waddr,
  input  logic [31:0] imem_wdata,
  output logic [31:0] pc,
  output logic [31:0] instr,
  output logic        reg_we,
  output logic [4:0]  reg_waddr,
  output logic [31:0] reg_wdata,
  output logic        mem_we,
  output logic [31:0] mem_addr,
  output logic [31:0] mem_wdata
);

  if (DATA_W != 32) begin : g_width_check
    $error("single_cycle_cpu: the instruction set fixes DATA_W at 32");
  end

  ctrl_t       ctrl;
  logic        zero;
  logic [4:0]  rs, rt, rd, rw;
  logic [15:0] imm16;
  logic [31:0] busa, busb, busw, imm32, alu_b, alu_out, dmem_out;

  assign rs    = instr[25:21];
  assign rt    = instr[20:16];
  assign rd    = instr[15:11];
  assign imm16 = instr[15:0];

  ifetch #(.IMEM_WORDS(IMEM_WORDS), .RESET_PC(RESET_PC)) u_ifetch (
    .clk        (clk),
    .rst        (rst),
    .npc_sel    (ctrl.npc_sel),
    .zero       (zero),
    .jump       (ctrl.jump),
    .imem_we    (imem_we),
    .imem_waddr (imem_waddr),
    .imem_wdata (imem_wdata),
    .pc         (pc),
    .instr      (instr)
  );

  main_control u_ctrl (
    .op    (instr[31:26]),
    .funct (instr[5:0]),
    .ctrl  (ctrl)
  );

  mux2 #(.W(5)) u_regdst_mux (.sel(ctrl.reg_dst), .in0(rt), .in1(rd), .out(rw));

  regfile #(.DATA_W(32), .REGS(32)) u_regfile (
    .clk  (clk),
    .rst  (rst),
    .we   (ctrl.reg_write),
    .rw   (rw),
    .ra   (rs),
    .rb   (rt),
    .busw (busw),
    .busa (busa),
    .busb (busb)
  );

  extender u_ext (.imm16(imm16), .ext_op(ctrl.ext_op), .imm32(imm32));

  mux2 #(.W(32)) u_alusrc_mux (.sel(ctrl.alu_src), .in0(busb), .in1(imm32), .out(alu_b));

  alu #(.DATA_W(32)) u_alu (
    .a       (busa),
    .b       (alu_b),
    .alu_ctr (ctrl.alu_ctr),
    .result  (alu_out),
    .zero    (zero)
  );

  data_mem #(.WORDS(DMEM_WORDS), .DATA_W(32)) u_dmem (
    .clk      (clk),
    .wr_en    (ctrl.mem_write),
    .adr      (alu_out),
    .data_in  (busb),
    .data_out (dmem_out)
  );

  mux2 #(.W(32)) u_memtoreg_mux (.sel(ctrl.mem_to_reg), .in0(alu_out), .in1(dmem_out), .out(busw));

  assign reg_we    = ctrl.reg_write;
  assign reg_waddr = rw;
  assign reg_wdata = busw;
  assign mem_we    = ctrl.mem_write;
  assign mem_addr  = alu_out;
  assign mem_wdata = busb;

endmodule
