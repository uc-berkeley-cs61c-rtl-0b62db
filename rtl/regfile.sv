// regfile: the processor's register file, REGS registers of DATA_W bits.
//
// Two combinational read ports (Ra -> busA, Rb -> busB) and one write port
// (Rw, busW) that writes on the rising clock edge when RegWr (we) is 1. A
// register written in a cycle shows its new value from the next cycle on, so
// an instruction reads the values left by the previous one. Register 0 always
// reads 0 and ignores writes, as in the MIPS architecture. A synchronous rst
// clears every register; the design leaves reset open, so this is a choice
// made here to start from known contents.
module regfile #(
  parameter int unsigned DATA_W = 32,
  parameter int unsigned REGS   = 32,
  localparam int unsigned AW    = $clog2(REGS)
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              we,
  input  logic [AW-1:0]     rw,
  input  logic [AW-1:0]     ra,
  input  logic [AW-1:0]     rb,
  input  logic [DATA_W-1:0] busw,
  output logic [DATA_W-1:0] busa,
  output logic [DATA_W-1:0] busb
);

  logic [DATA_W-1:0] regs [REGS];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < REGS; i++) regs[i] <= '0;
    end else if (we && rw != '0) begin
      regs[rw] <= busw;
    end
  end

  always_comb begin
    busa = (ra == '0) ? '0 : regs[ra];
    busb = (rb == '0) ? '0 : regs[rb];
  end

endmodule
