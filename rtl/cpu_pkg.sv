// cpu_pkg: types and constants shared by the single-cycle processor.
//
// Holds the instruction-set encodings (opcode and funct values of the seven
// supported instructions), the two-bit ALU control encoding, the one-hot
// bundle of decoded instruction lines that links the two halves of the main
// controller, and the bundle of control signals the controller hands to the
// datapath. The encodings are those of the MIPS instruction set; the two-bit
// ALU control code (00 add, 01 subtract, 10 or) follows the controller
// equations of the design. Value 11 of the ALU code is unused.
package cpu_pkg;


  // Opcodes, Instruction<31:26>
  localparam logic [5:0] OP_RTYPE = 6'b00_0000;
  localparam logic [5:0] OP_ORI   = 6'b00_1101;
  localparam logic [5:0] OP_LW    = 6'b10_0011;
  localparam logic [5:0] OP_SW    = 6'b10_1011;
  localparam logic [5:0] OP_BEQ   = 6'b00_0100;
  localparam logic [5:0] OP_J     = 6'b00_0010;

  // Function codes of R-type instructions, Instruction<5:0>
  localparam logic [5:0] FN_ADD   = 6'b10_0000;
  localparam logic [5:0] FN_SUB   = 6'b10_0010;

  typedef enum logic [1:0] {
    ALU_ADD = 2'b00,
    ALU_SUB = 2'b01,
    ALU_OR  = 2'b10
  } alu_ctr_e;

  // One line per recognised instruction (output of the AND plane)
  typedef struct packed {
    logic add;
    logic sub;
    logic ori;
    logic lw;
    logic sw;
    logic beq;
    logic jump;
  } instr_onehot_t;

  // Control points of the datapath (output of the OR plane)
  typedef struct packed {
    logic     reg_dst;    // 0: Rw = rt, 1: Rw = rd
    logic     alu_src;    // 0: ALU B = busB, 1: ALU B = extended immediate
    logic     mem_to_reg; // 0: busW = ALU result, 1: busW = data memory
    logic     reg_write;  // write the register file
    logic     mem_write;  // write the data memory
    logic     npc_sel;    // 1: branch instruction (taken when Zero)
    logic     jump;       // PC <- {PC[31:28], target, 00}
    logic     ext_op;     // 0: zero-extend, 1: sign-extend imm16
    alu_ctr_e alu_ctr;    // ALU operation
  } ctrl_t;

endpackage
