// tb_mux2: both selections of the 32-bit and the 5-bit (RegDst) multiplexer
// with random inputs.
module tb_mux2;
  logic        sel;
  logic [31:0] a0, a1, y32;
  logic [4:0]  b0, b1, y5;
  int checks = 0, failures = 0;

  mux2 #(.W(32)) dut32 (.sel(sel), .in0(a0), .in1(a1), .out(y32));
  mux2 #(.W(5))  dut5  (.sel(sel), .in0(b0), .in1(b1), .out(y5));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 500; i++) begin
      a0 = $urandom; a1 = $urandom; b0 = 5'($urandom); b1 = 5'($urandom);
      sel = i[0];
      #1;
      checks += 2;
      if (y32 !== (i[0] ? a1 : a0)) begin failures++; $display("W32 sel=%b got %h", sel, y32); end
      if (y5  !== (i[0] ? b1 : b0)) begin failures++; $display("W5 sel=%b got %h", sel, y5); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
