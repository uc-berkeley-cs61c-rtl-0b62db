// data_mem: word-organised data memory of WORDS words of DATA_W bits.
//
// Reading is combinational: data_out is the word at Adr in the same cycle,
// which lets lw finish in one cycle. Data In is written to the word at Adr on
// the rising clock edge when WrEn (MemWr) is 1. Adr is a byte address; its
// two low bits and the bits above the memory's size are ignored, so unaligned
// addresses round down and large addresses wrap. The size and these
// addressing rules are this design's choices. Contents are not reset.
module data_mem #(
  parameter int unsigned WORDS  = 1024,
  parameter int unsigned DATA_W = 32,
  localparam int unsigned AW    = $clog2(WORDS)
) (
  input  logic              clk,
  input  logic              wr_en,
  input  logic [31:0]       adr,
  input  logic [DATA_W-1:0] data_in,
  output logic [DATA_W-1:0] data_out
);

  logic [DATA_W-1:0] mem [WORDS];
  logic [AW-1:0]     idx;

  assign idx = adr[AW+1:2];

  always_ff @(posedge clk) begin
    if (wr_en) mem[idx] <= data_in;
  end

  assign data_out = mem[idx];

endmodule
