// tb_regfile: random writes and reads on both ports against a reference
// array. Checks that a write appears from the next cycle, that RegWr = 0
// leaves the registers alone, that register 0 stays 0 and that rst clears.
module tb_regfile;
  logic        clk = 0, rst, we;
  logic [4:0]  rw, ra, rb;
  logic [31:0] busw, busa, busb;
  logic [31:0] model [32];
  int checks = 0, failures = 0, cycles = 0;

  regfile dut (.clk(clk), .rst(rst), .we(we), .rw(rw), .ra(ra), .rb(rb),
               .busw(busw), .busa(busa), .busb(busb));

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin
    wait (cycles == 20000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_reads();
    checks += 2;
    if (busa !== model[ra]) begin failures++; $display("busA R%0d got %h exp %h", ra, busa, model[ra]); end
    if (busb !== model[rb]) begin failures++; $display("busB R%0d got %h exp %h", rb, busb, model[rb]); end
  endtask

  initial begin
    rst = 1; we = 0; rw = 0; ra = 0; rb = 0; busw = 0;
    @(negedge clk); @(negedge clk);
    rst = 0;
    foreach (model[i]) model[i] = 0;
    for (int i = 0; i < 32; i++) begin ra = 5'(i); rb = 5'(31 - i); #1; check_reads(); end
    for (int i = 0; i < 5000; i++) begin
      we = ($urandom_range(0, 3) != 0); rw = 5'($urandom); busw = $urandom;
      ra = 5'($urandom); rb = (i % 7 == 0) ? rw : 5'($urandom);
      #1; check_reads();                    // before the edge: old values
      @(posedge clk);
      if (we && rw != 0) model[rw] = busw;
      @(negedge clk);
      check_reads();                        // after the edge: new values
    end
    // synchronous clear
    we = 0; rst = 1; @(negedge clk); rst = 0;
    foreach (model[i]) model[i] = 0;
    for (int i = 0; i < 32; i++) begin ra = 5'(i); rb = 5'(i); #1; check_reads(); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
