// tb_inst_mem: loads every word through the load port with a value derived
// from its index, then reads them back in a shuffled order through the
// fetch port, also with the ignored address bits set.
module tb_inst_mem;
  localparam int WORDS = 1024;
  logic        clk = 0, we;
  logic [31:0] addr, instr, waddr, wdata;
  int checks = 0, failures = 0, cycles = 0;

  inst_mem dut (.clk(clk), .addr(addr), .instr(instr), .we(we), .waddr(waddr), .wdata(wdata));

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  function automatic logic [31:0] pattern(int i);
    return 32'(i) * 32'h9e37_79b9 ^ 32'h5a5a_0000;
  endfunction

  initial begin
    wait (cycles == 10000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int i;
    we = 0; addr = 0; waddr = 0; wdata = 0;
    @(negedge clk);
    for (int k = 0; k < WORDS; k++) begin
      we = 1; waddr = 32'(k) << 2; wdata = pattern(k);
      @(negedge clk);
    end
    we = 0;
    for (int k = 0; k < 3000; k++) begin
      i = $urandom_range(0, WORDS - 1);
      addr = (32'(i) << 2) | 32'($urandom_range(0, 3)) | (k[0] ? 32'hfff0_0000 : 32'h0);
      #1;
      checks++;
      if (instr !== pattern(i)) begin failures++; $display("word %0d got %h exp %h", i, instr, pattern(i)); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
