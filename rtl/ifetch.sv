// ifetch: the instruction fetch unit.
//
// Holds the PC and fetches Instruction = MEM[PC] from its instruction memory.
// The next PC is chosen at the end of every cycle:
//   * PC + 4 normally (the first adder),
//   * PC + 4 + SignExt(imm16) * 4 when nPC_sel = 1 (a branch) and the ALU's
//     Zero is 1; the branch target comes from a second adder fed by the first
//     adder's output and by "PC Ext", the sign-extended imm16 shifted left by
//     two. The mux select is nPC_sel AND Zero, which is the design's truth
//     table (nPC_sel 0 -> 0; 1 with Zero 0 -> 0; 1 with Zero 1 -> 1).
//   * {PC[31:28], target, 00} when Jump = 1. The design shows Jump entering
//     the next-PC select without drawing its insides; here it overrides the
//     branch choice.
// The PC keeps its two low bits at 00, so it is stored as a word address.
// Timing: PC updates on the rising clock edge; instr, and the pc output, are
// valid for the whole cycle. A synchronous rst (a choice of this design, the
// document is silent on reset) loads RESET_PC. The imem_* port loads the
// program into the instruction memory.
module ifetch #(
  parameter int unsigned IMEM_WORDS = 1024,
  parameter logic [31:0] RESET_PC   = 32'h0000_0000
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        npc_sel,
  input  logic        zero,
  input  logic        jump,
  input  logic        imem_we,
  input  logic [31:0] imem_waddr,
  input  logic [31:0] imem_wdata,
  output logic [31:0] pc,
  output logic [31:0] instr
);

  logic [31:2] pc_q;          // PC<31:2>; PC<1:0> is always 00
  logic [31:2] pc_plus4;
  logic [31:2] pc_ext;        // "PC Ext": SignExt(imm16), in words
  logic [31:2] br_target;
  logic [31:2] pc_next;
  logic        br_take;

  assign pc = {pc_q, 2'b00};

  inst_mem #(.WORDS(IMEM_WORDS)) u_imem (
    .clk   (clk),
    .addr  (pc),
    .instr (instr),
    .we    (imem_we),
    .waddr (imem_waddr),
    .wdata (imem_wdata)
  );

  always_comb begin
    pc_plus4  = pc_q + 30'd1;
    pc_ext    = {{14{instr[15]}}, instr[15:0]};
    br_target = pc_plus4 + pc_ext;
    br_take   = npc_sel & zero;
    if (jump)         pc_next = {pc_q[31:28], instr[25:0]};
    else if (br_take) pc_next = br_target;
    else              pc_next = pc_plus4;
  end

  always_ff @(posedge clk) begin
    if (rst) pc_q <= RESET_PC[31:2];
    else     pc_q <= pc_next;
  end

endmodule
