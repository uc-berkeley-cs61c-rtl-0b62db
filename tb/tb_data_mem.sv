// tb_data_mem: random word writes and reads against a reference array,
// covering the write enable, combinational read, and the rule that the two
// low address bits and the bits above the memory size are ignored.
module tb_data_mem;
  localparam int WORDS = 1024;
  logic        clk = 0, wr_en;
  logic [31:0] adr, din, dout;
  logic [31:0] model [WORDS];
  logic        valid [WORDS];
  int checks = 0, failures = 0, cycles = 0;

  data_mem dut (.clk(clk), .wr_en(wr_en), .adr(adr), .data_in(din), .data_out(dout));

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin
    wait (cycles == 50000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int idx;
    foreach (valid[i]) valid[i] = 0;
    wr_en = 0; adr = 0; din = 0;
    @(negedge clk);
    for (int i = 0; i < 8000; i++) begin
      idx = $urandom_range(0, 63);          // a small window so reads hit written words
      adr = {$urandom_range(0, 3) == 0 ? 20'($urandom) : 20'h0, idx[9:0], 2'($urandom)};
      wr_en = ($urandom_range(0, 1) == 1);
      din = $urandom;
      #1;
      if (valid[idx]) begin
        checks++;
        if (dout !== model[idx]) begin failures++; $display("read word %0d got %h exp %h", idx, dout, model[idx]); end
      end
      @(posedge clk);
      if (wr_en) begin model[idx] = din; valid[idx] = 1; end
      @(negedge clk);
      if (valid[idx]) begin
        checks++;
        if (dout !== model[idx]) begin failures++; $display("after edge word %0d got %h exp %h", idx, dout, model[idx]); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
