// tb_alu: add, subtract and or on random and edge operands, including
// wrap-around, equal operands (Zero = 1 for subtract, the beq case) and the
// unused code 11; checks result and Zero.
module tb_alu;
  import cpu_pkg::*;

  logic [31:0] a, b, result;
  alu_ctr_e    ctr;
  logic        zero;
  int checks = 0, failures = 0, zero_seen = 0;

  alu dut (.a(a), .b(b), .alu_ctr(ctr), .result(result), .zero(zero));

  task automatic run(input logic [31:0] x, input logic [31:0] y, input logic [1:0] c);
    longint unsigned e;
    a = x; b = y; ctr = alu_ctr_e'(c);
    #1;
    case (c)
      2'b00: e = (longint'(x) + longint'(y)) & 64'hffff_ffff;
      2'b01: e = (longint'(x) - longint'(y)) & 64'hffff_ffff;
      2'b10: e = longint'(x | y);
      default: e = 0;
    endcase
    checks += 2;
    if (result !== e[31:0]) begin failures++; $display("a=%h b=%h c=%b got %h exp %h", x, y, c, result, e[31:0]); end
    if (zero !== (e[31:0] == 0)) begin failures++; $display("zero wrong a=%h b=%h c=%b", x, y, c); end
    if (zero) zero_seen++;
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] x;
    run(32'hffff_ffff, 32'h1, 2'b00);
    run(32'h7fff_ffff, 32'h1, 2'b00);
    run(32'h0, 32'h1, 2'b01);
    run(32'h8000_0000, 32'h1, 2'b01);
    run(32'h0, 32'h0, 2'b10);
    run(32'h1234_5678, 32'h1234_5678, 2'b11);
    for (int i = 0; i < 3000; i++) begin
      x = $urandom;
      run(x, (i % 5 == 0) ? x : $urandom, 2'($urandom_range(0, 2)));
    end
    checks++;
    if (zero_seen == 0) begin failures++; $display("Zero never asserted"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
