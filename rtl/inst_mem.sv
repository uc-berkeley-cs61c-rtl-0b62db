// inst_mem: instruction memory of WORDS 32-bit words.
//
// The fetch side is a combinational read: instr = MEM[addr] in the same cycle,
// as a single-cycle processor needs. addr is the byte address from the PC; its
// two low bits and the bits above the memory's size are ignored. A write port
// (we, waddr, wdata; rising clock edge) loads the program, normally while the
// processor is held in reset. The document states only what the memory
// returns; the size, the load port and the addressing rules are this design's.
module inst_mem #(
  parameter int unsigned WORDS = 1024,
  localparam int unsigned AW   = $clog2(WORDS)
) (
  input  logic        clk,
  input  logic [31:0] addr,
  output logic [31:0] instr,
  input  logic        we,
  input  logic [31:0] waddr,
  input  logic [31:0] wdata
);

  logic [31:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (we) mem[waddr[AW+1:2]] <= wdata;
  end

  assign instr = mem[addr[AW+1:2]];

endmodule
