// tb_single_cycle_cpu: end-to-end test of the processor at its default sizes.
//
// A reference model of the instruction set (written here, independent of the
// RTL) runs in lockstep with the processor: every cycle the model executes the
// instruction at its own PC, and the test compares PC, instruction, register
// write (enable, register, value) and memory write (enable, address, data)
// with what the processor does in that cycle. One instruction per cycle is
// therefore checked for every cycle run.
//
// Phase 1 runs a hand-written program that stores 1..10 to memory in a loop,
// sums them back in a second loop (expects 55), stores and reloads the sum
// through a negative offset, ORs in an immediate with bit 15 set, tries to
// write register 0 and ends in a branch to itself. Phase 2 reloads the whole
// instruction memory with random supported (and a few unsupported)
// instructions and runs several thousand cycles. The test counts how often
// each mechanism happened (each instruction, branch taken and not taken,
// jump, sign and zero extension of a negative immediate, a write to
// register 0, an unsupported instruction) and fails if one never did.
module tb_single_cycle_cpu;
  localparam int IMEM_WORDS = 1024;
  localparam int DMEM_WORDS = 1024;

  logic        clk = 0, rst;
  logic        imem_we;
  logic [31:0] imem_waddr, imem_wdata;
  logic [31:0] pc, instr, reg_wdata, mem_addr, mem_wdata;
  logic        reg_we, mem_we;
  logic [4:0]  reg_waddr;

  single_cycle_cpu dut (
    .clk(clk), .rst(rst), .imem_we(imem_we), .imem_waddr(imem_waddr), .imem_wdata(imem_wdata),
    .pc(pc), .instr(instr), .reg_we(reg_we), .reg_waddr(reg_waddr), .reg_wdata(reg_wdata),
    .mem_we(mem_we), .mem_addr(mem_addr), .mem_wdata(mem_wdata));

  always #5 clk = ~clk;

  int checks = 0, failures = 0, cycles = 0;
  always @(posedge clk) cycles++;

  initial begin
    wait (cycles == 60000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- instruction encoders ----------------
  function automatic logic [31:0] r_op(logic [5:0] fn, int rd, int rs, int rt);
    return {6'b000000, 5'(rs), 5'(rt), 5'(rd), 5'b0, fn};
  endfunction
  function automatic logic [31:0] add_(int rd, int rs, int rt); return r_op(6'b100000, rd, rs, rt); endfunction
  function automatic logic [31:0] sub_(int rd, int rs, int rt); return r_op(6'b100010, rd, rs, rt); endfunction
  function automatic logic [31:0] i_op(logic [5:0] op, int rt, int rs, int imm);
    return {op, 5'(rs), 5'(rt), 16'(imm)};
  endfunction
  function automatic logic [31:0] ori_(int rt, int rs, int imm); return i_op(6'b001101, rt, rs, imm); endfunction
  function automatic logic [31:0] lw_ (int rt, int imm, int rs); return i_op(6'b100011, rt, rs, imm); endfunction
  function automatic logic [31:0] sw_ (int rt, int imm, int rs); return i_op(6'b101011, rt, rs, imm); endfunction
  function automatic logic [31:0] beq_(int rs, int rt, int off); return i_op(6'b000100, rt, rs, off); endfunction
  function automatic logic [31:0] j_  (int word);                return {6'b000010, 26'(word)}; endfunction

  // ---------------- reference model ----------------
  logic [31:0] m_pc;
  logic [31:0] m_reg [32];
  logic [31:0] m_mem [DMEM_WORDS];
  logic        m_known [DMEM_WORDS];
  logic [31:0] m_imem [IMEM_WORDS];

  int n_add, n_sub, n_ori, n_lw, n_sw, n_beq_t, n_beq_n, n_j, n_neg_sext, n_neg_zext, n_r0, n_bad;

  function automatic logic [31:0] sext(logic [15:0] x); return {{16{x[15]}}, x}; endfunction

  task automatic load_program(input int n);
    rst = 1;
    for (int k = 0; k < n; k++) begin
      imem_we = 1; imem_waddr = 32'(k) << 2; imem_wdata = m_imem[k];
      @(negedge clk);
    end
    imem_we = 0;
    @(negedge clk);
    rst = 0;
    m_pc = 0;
    foreach (m_reg[i]) m_reg[i] = 0;
  endtask

  // Compare one cycle of the processor with the model, then advance the model.
  task automatic step();
    logic [31:0] ir, a, b, addr, res, nxt;
    logic [5:0]  op, fn;
    int          rs, rt, rd, widx;
    logic        exp_rwe, exp_mwe;
    int          exp_rw;
    logic [31:0] exp_rdata;
    ir = m_imem[m_pc[11:2]];
    op = ir[31:26]; fn = ir[5:0];
    rs = int'(ir[25:21]); rt = int'(ir[20:16]); rd = int'(ir[15:11]);
    a = m_reg[rs]; b = m_reg[rt];
    nxt = m_pc + 4;
    exp_rwe = 0; exp_mwe = 0; exp_rw = 0; exp_rdata = 0; addr = 0;
    case (op)
      6'b000000: begin
        if (fn == 6'b100000)      begin exp_rwe = 1; exp_rw = rd; exp_rdata = a + b; n_add++; end
        else if (fn == 6'b100010) begin exp_rwe = 1; exp_rw = rd; exp_rdata = a - b; n_sub++; end
        else n_bad++;
      end
      6'b001101: begin
        exp_rwe = 1; exp_rw = rt; exp_rdata = a | {16'h0, ir[15:0]}; n_ori++;
        if (ir[15]) n_neg_zext++;
      end
      6'b100011: begin
        addr = a + sext(ir[15:0]); widx = int'(addr[11:2]);
        exp_rwe = 1; exp_rw = rt; n_lw++;
        if (ir[15]) n_neg_sext++;
        if (!m_known[widx]) begin         // unwritten memory: adopt what the processor reads
          m_mem[widx] = reg_wdata; m_known[widx] = 1;
        end
        exp_rdata = m_mem[widx];
      end
      6'b101011: begin
        addr = a + sext(ir[15:0]); widx = int'(addr[11:2]);
        exp_mwe = 1; n_sw++;
        if (ir[15]) n_neg_sext++;
      end
      6'b000100: begin
        if (a == b) begin nxt = m_pc + 4 + (sext(ir[15:0]) << 2); n_beq_t++; end
        else n_beq_n++;
      end
      6'b000010: begin nxt = {m_pc[31:28], ir[25:0], 2'b00}; n_j++; end
      default: n_bad++;
    endcase
    if (exp_rwe && exp_rw == 0) n_r0++;

    checks++;
    if (pc !== m_pc || instr !== ir) begin
      failures++;
      if (failures < 20) $display("cycle %0d: pc %h instr %h, expected pc %h instr %h", cycles, pc, instr, m_pc, ir);
    end
    checks++;
    if (reg_we !== exp_rwe || (exp_rwe && (int'(reg_waddr) != exp_rw || reg_wdata !== exp_rdata))) begin
      failures++;
      if (failures < 20) $display("cycle %0d pc %h (%h): reg write %b R%0d=%h, expected %b R%0d=%h",
                                  cycles, m_pc, ir, reg_we, reg_waddr, reg_wdata, exp_rwe, exp_rw, exp_rdata);
    end
    checks++;
    if (mem_we !== exp_mwe || (exp_mwe && (mem_addr !== addr || mem_wdata !== b))) begin
      failures++;
      if (failures < 20) $display("cycle %0d pc %h (%h): mem write %b [%h]=%h, expected %b [%h]=%h",
                                  cycles, m_pc, ir, mem_we, mem_addr, mem_wdata, exp_mwe, addr, b);
    end

    if (exp_rwe && exp_rw != 0) m_reg[exp_rw] = exp_rdata;
    if (exp_mwe) begin m_mem[addr[11:2]] = b; m_known[addr[11:2]] = 1; end
    m_pc = nxt;
  endtask

  task automatic run(input int n);
    for (int c = 0; c < n; c++) begin
      #1;
      step();
      @(negedge clk);
    end
  endtask

  task automatic expect_eq(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("%s = %h, expected %h", what, got, exp); end
  endtask

  initial begin
    int k;
    logic [31:0] w;
    rst = 1; imem_we = 0; imem_waddr = 0; imem_wdata = 0;
    n_add = 0; n_sub = 0; n_ori = 0; n_lw = 0; n_sw = 0; n_beq_t = 0; n_beq_n = 0; n_j = 0;
    n_neg_sext = 0; n_neg_zext = 0; n_r0 = 0; n_bad = 0;
    foreach (m_known[i]) m_known[i] = 0;
    @(negedge clk);

    // ---------- phase 1: directed program ----------
    foreach (m_imem[i]) m_imem[i] = 32'h0;
    k = 0;
    m_imem[k++] = ori_(1, 0, 10);       // 0  n = 10
    m_imem[k++] = ori_(2, 0, 0);        // 1  ptr = 0
    m_imem[k++] = ori_(3, 0, 1);        // 2  one
    m_imem[k++] = ori_(6, 0, 4);        // 3  four
    m_imem[k++] = ori_(5, 0, 0);        // 4  v = 0
    m_imem[k++] = add_(5, 5, 3);        // 5  L1: v++
    m_imem[k++] = sw_ (5, 256, 2);      // 6  mem[256+ptr] = v
    m_imem[k++] = add_(2, 2, 6);        // 7  ptr += 4
    m_imem[k++] = sub_(1, 1, 3);        // 8  n--
    m_imem[k++] = beq_(1, 0, 1);        // 9  if n == 0 skip the jump
    m_imem[k++] = j_  (5);              // 10 j L1
    m_imem[k++] = ori_(1, 0, 10);       // 11
    m_imem[k++] = ori_(2, 0, 0);        // 12
    m_imem[k++] = ori_(4, 0, 0);        // 13 sum = 0
    m_imem[k++] = lw_ (7, 256, 2);      // 14 L2: t = mem[256+ptr]
    m_imem[k++] = add_(4, 4, 7);        // 15 sum += t
    m_imem[k++] = add_(2, 2, 6);        // 16 ptr += 4
    m_imem[k++] = sub_(1, 1, 3);        // 17 n--
    m_imem[k++] = beq_(1, 0, 1);        // 18
    m_imem[k++] = j_  (14);             // 19 j L2
    m_imem[k++] = sw_ (4, -8, 2);       // 20 mem[ptr-8] = sum   (ptr = 40)
    m_imem[k++] = lw_ (8, -8, 2);       // 21 r8 = mem[32]
    m_imem[k++] = ori_(9, 0, 'h8000);   // 22 r9 = 0x0000_8000
    m_imem[k++] = add_(0, 3, 3);        // 23 write to r0 is dropped
    m_imem[k++] = add_(10, 0, 3);       // 24 r10 = r0 + 1 = 1
    m_imem[k++] = beq_(0, 0, -1);       // 25 halt: branch to itself
    load_program(k);
    run(140);
    expect_eq("sum r4", m_reg[4], 32'd55);
    expect_eq("reloaded sum r8", m_reg[8], 32'd55);
    expect_eq("ori with bit 15 set, r9", m_reg[9], 32'h0000_8000);
    expect_eq("r0 + 1, r10", m_reg[10], 32'd1);
    expect_eq("halted pc", pc, 32'd100);
    for (int i = 0; i < 10; i++) expect_eq("stored value", m_mem[64 + i], 32'(i + 1));
    expect_eq("stored sum", m_mem[8], 32'd55);

    // ---------- phase 2: random programs filling the instruction memory ----------
    for (int prog = 0; prog < 6; prog++) begin
      for (int i = 0; i < IMEM_WORDS; i++) begin
        int sel;
        int rs, rt, rd, off;
        sel = $urandom_range(0, 99);
        rs = $urandom_range(0, 7); rt = $urandom_range(0, 7); rd = $urandom_range(0, 7);
        off = ($urandom_range(0, 4) == 0) ? -int'($urandom_range(2, 20)) : int'($urandom_range(0, 30));
        if (sel < 15)      w = add_(rd, rs, rt);
        else if (sel < 27) w = sub_(rd, rs, rt);
        else if (sel < 45) w = ori_(rt, rs, int'($urandom_range(0, 65535)));
        else if (sel < 60) w = lw_ (rt, int'($urandom_range(0, 65535)), ($urandom_range(0, 1) != 0) ? 0 : rs);
        else if (sel < 75) w = sw_ (rt, int'($urandom_range(0, 65535)), ($urandom_range(0, 1) != 0) ? 0 : rs);
        else if (sel < 90) w = beq_(rs, ($urandom_range(0, 1) != 0) ? rs : rt, off);
        else if (sel < 96) w = j_  ($urandom_range(0, IMEM_WORDS - 1));
        else               w = {6'($urandom_range(16, 31)), 26'($urandom)};   // unsupported opcode
        m_imem[i] = w;
      end
      load_program(IMEM_WORDS);
      run(1500);
    end

    $display("executed: add %0d sub %0d ori %0d lw %0d sw %0d beq taken %0d beq not taken %0d j %0d",
             n_add, n_sub, n_ori, n_lw, n_sw, n_beq_t, n_beq_n, n_j);
    $display("negative imm sign-extended %0d, zero-extended %0d, writes to r0 %0d, unsupported %0d",
             n_neg_sext, n_neg_zext, n_r0, n_bad);
    checks++;
    if (n_add == 0 || n_sub == 0 || n_ori == 0 || n_lw == 0 || n_sw == 0 || n_beq_t == 0 ||
        n_beq_n == 0 || n_j == 0 || n_neg_sext == 0 || n_neg_zext == 0 || n_r0 == 0 || n_bad == 0) begin
      failures++;
      $display("a mechanism never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
