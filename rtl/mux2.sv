// mux2: two-input multiplexer of parameterised width.
//
// out = in1 when sel is 1, else in0. The datapath uses it three times: the
// RegDst mux (5 bits: rt on input 0, rd on input 1), the ALUSrc mux (32 bits:
// busB on 0, the extended immediate on 1) and the MemtoReg mux (32 bits: ALU
// result on 0, data memory on 1). Combinational.
module mux2 #(
  parameter int unsigned W = 32
) (
  input  logic         sel,
  input  logic [W-1:0] in0,
  input  logic [W-1:0] in1,
  output logic [W-1:0] out
);

  always_comb out = sel ? in1 : in0;

endmodule
