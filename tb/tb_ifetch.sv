// tb_ifetch: fills the instruction memory with random words, then runs the
// fetch unit for many cycles with random nPC_sel, Zero and Jump, checking
// each cycle that the fetched instruction is MEM[PC] and that the next PC is
// PC + 4, PC + 4 + SignExt(imm16) * 4 (nPC_sel and Zero both 1) or
// {PC[31:28], target, 00} (Jump). Also checks the reset value.
module tb_ifetch;
  localparam int WORDS = 1024;
  logic        clk = 0, rst, npc_sel, zero, jump, we;
  logic [31:0] waddr, wdata, pc, instr, exp_pc;
  logic [31:0] image [WORDS];
  int checks = 0, failures = 0, cycles = 0;
  int n_plus4 = 0, n_branch = 0, n_branch_not = 0, n_jump = 0;

  ifetch dut (.clk(clk), .rst(rst), .npc_sel(npc_sel), .zero(zero), .jump(jump),
              .imem_we(we), .imem_waddr(waddr), .imem_wdata(wdata), .pc(pc), .instr(instr));

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin
    wait (cycles == 20000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; npc_sel = 0; zero = 0; jump = 0; we = 0; waddr = 0; wdata = 0;
    @(negedge clk);
    for (int k = 0; k < WORDS; k++) begin
      image[k] = $urandom;
      we = 1; waddr = 32'(k) << 2; wdata = image[k];
      @(negedge clk);
    end
    we = 0;
    @(negedge clk);
    rst = 0;
    checks++;
    if (pc !== 32'h0) begin failures++; $display("reset PC %h", pc); end
    exp_pc = 0;
    for (int c = 0; c < 8000; c++) begin
      jump    = ($urandom_range(0, 9) == 0);
      npc_sel = ($urandom_range(0, 2) == 0);
      zero    = $urandom_range(0, 1);
      #1;
      checks += 2;
      if (pc !== exp_pc) begin failures++; $display("cycle %0d pc %h exp %h", c, pc, exp_pc); end
      if (instr !== image[exp_pc[11:2]]) begin failures++; $display("instr at %h got %h exp %h", pc, instr, image[exp_pc[11:2]]); end
      if (jump) begin
        exp_pc = {exp_pc[31:28], image[exp_pc[11:2]][25:0], 2'b00}; n_jump++;
      end else if (npc_sel && zero) begin
        exp_pc = exp_pc + 4 + {{14{image[exp_pc[11:2]][15]}}, image[exp_pc[11:2]][15:0], 2'b00}; n_branch++;
      end else begin
        exp_pc = exp_pc + 4;
        if (npc_sel) n_branch_not++; else n_plus4++;
      end
      @(negedge clk);
    end
    checks++;
    if (n_plus4 == 0 || n_branch == 0 || n_branch_not == 0 || n_jump == 0) begin
      failures++; $display("a next-PC case never happened");
    end
    $display("next-PC: +4 %0d, branch taken %0d, branch not taken %0d, jump %0d", n_plus4, n_branch, n_branch_not, n_jump);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
