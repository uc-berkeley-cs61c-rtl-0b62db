// alu: the datapath's arithmetic-logic unit.
//
// Computes a + b, a - b or a | b, chosen by the two-bit ALUctr code
// (00 add, 01 subtract, 10 or; 11 is unused and gives 0). Zero is 1 when the
// result is 0; with ALUctr = subtract it tells beq whether R[rs] == R[rt].
// Arithmetic wraps modulo 2^DATA_W: overflow is neither detected nor
// trapped, as this design defines no exceptions. Combinational.
//
// Interface: a = busA, b = output of the ALUSrc mux, alu_ctr = ALUctr,
// result to the data memory address and the MemtoReg mux, zero to the
// instruction fetch unit.
module alu
  import cpu_pkg::*;
#(
  parameter int unsigned DATA_W = 32
) (
  input  logic [DATA_W-1:0] a,
  input  logic [DATA_W-1:0] b,
  input  alu_ctr_e          alu_ctr,
  output logic [DATA_W-1:0] result,
  output logic              zero
);

  always_comb begin
    unique case (alu_ctr)
      ALU_ADD: result = a + b;
      ALU_SUB: result = a - b;
      ALU_OR:  result = a | b;
      default: result = '0;
    endcase
    zero = (result == '0);
  end

endmodule
