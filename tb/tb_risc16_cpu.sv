// tb_risc16_cpu: end-to-end test of the single-cycle RiSC-16 processor at its
// default size (64K-word instruction and data memories).
//
// An instruction-set model of the RiSC-16, written here independently of the
// RTL, runs in lock step with the processor: after every clock edge the PC,
// registers r1..r7 and any word just stored are compared with the model, so
// each instruction is checked to complete in exactly one cycle.
//
// Phase 1 runs a hand-assembled program (array sum with lw and a bne loop,
// multiply by repeated addition, a lui+addi constant, a jalr call and return,
// a write to r0, a lw after sw, a not-taken bne, then halt). Its results and
// its cycle count (81 instructions before the halt) were worked out by hand
// and are checked on top of the lock-step comparison; the machine state is
// printed at the halt.
// Phase 2 fills both memories with random instructions and data and runs
// random code for RAND_CYCLES cycles. Every 400 cycles the machine is reset
// and a short launch sequence loads random register values and jumps to a
// random address. When a halt is reached the machine must stay frozen; the
// halt word is then replaced by an ordinary instruction and execution goes on.
//
// Mechanisms counted, each must occur at least once: every opcode, bne taken
// and not taken, a write aimed at r0, jalr linking, a halt, a lw of a word
// stored earlier by sw, and negative and positive branch offsets.
module tb_risc16_cpu;
  import risc16_pkg::*;

  localparam int unsigned AW = 16;
  localparam int unsigned MEMW = 1 << AW;
  localparam int RAND_CYCLES = 200000;

  logic          clk = 0, rst;
  logic          imem_we, dmem_ext_we;
  logic [AW-1:0] imem_waddr, dmem_ext_addr;
  word_t         imem_wdata, dmem_ext_wdata, dmem_ext_rdata;
  word_t         pc, instr;
  logic          halted;

  risc16_cpu dut (
    .clk(clk), .rst(rst),
    .imem_we(imem_we), .imem_waddr(imem_waddr), .imem_wdata(imem_wdata),
    .dmem_ext_addr(dmem_ext_addr), .dmem_ext_we(dmem_ext_we),
    .dmem_ext_wdata(dmem_ext_wdata), .dmem_ext_rdata(dmem_ext_rdata),
    .pc(pc), .instr(instr), .halted(halted)
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  // ------------------------------------------------------------ reference model
  logic [15:0] m_imem [MEMW];
  logic [15:0] m_dmem [MEMW];
  logic [15:0] m_reg  [8];
  logic [15:0] m_pc;
  logic        m_stored;     // last step was a store
  logic [15:0] m_store_addr;
  logic [15:0] last_sw_addr;

  // mechanism counters
  int n_op [8];
  int n_bne_taken, n_bne_not_taken, n_r0_write, n_jalr_link, n_halt;
  int n_lw_after_sw, n_neg_branch, n_pos_branch;

  function automatic logic [15:0] sx7(logic [6:0] v);
    return {{9{v[6]}}, v};
  endfunction

  function automatic logic is_halt_word(logic [15:0] w);
    return w[15:13] == 3'b111 && w[6:0] != 0;
  endfunction

  task automatic model_reset();
    m_pc = 0;
    for (int i = 0; i < 8; i++) m_reg[i] = 0;
  endtask

  // Execute one instruction in the model.
  task automatic model_step();
    logic [15:0] iw, a, b, res;
    logic [2:0]  op, ra, rb, rc;
    logic [15:0] nxt;
    logic        wr;
    iw = m_imem[m_pc];
    op = iw[15:13]; ra = iw[12:10]; rb = iw[9:7]; rc = iw[2:0];
    a  = (rb == 0) ? 16'h0 : m_reg[rb];
    m_stored = 0;
    nxt = m_pc + 16'd1;
    wr = 0; res = 0;
    if (is_halt_word(iw)) return;  // a halted machine does nothing
    n_op[op]++;
    case (op)
      3'b000: begin b = (rc == 0) ? 16'h0 : m_reg[rc]; res = a + b; wr = 1; end
      3'b001: begin res = a + sx7(iw[6:0]); wr = 1; end
      3'b010: begin b = (rc == 0) ? 16'h0 : m_reg[rc]; res = ~(a & b); wr = 1; end
      3'b011: begin res = {iw[9:0], 6'b0}; wr = 1; end
      3'b100: begin
        b = (ra == 0) ? 16'h0 : m_reg[ra];
        m_store_addr = a + sx7(iw[6:0]);
        m_dmem[m_store_addr] = b;
        m_stored = 1;
        last_sw_addr = m_store_addr;
      end
      3'b101: begin
        res = m_dmem[a + sx7(iw[6:0])];
        if (a + sx7(iw[6:0]) == last_sw_addr) n_lw_after_sw++;
        wr = 1;
      end
      3'b110: begin
        b = (ra == 0) ? 16'h0 : m_reg[ra];
        if (a != b) begin
          nxt = m_pc + 16'd1 + sx7(iw[6:0]);
          n_bne_taken++;
          if (iw[6]) n_neg_branch++; else n_pos_branch++;
        end else n_bne_not_taken++;
      end
      3'b111: begin res = m_pc + 16'd1; nxt = a; wr = 1; n_jalr_link++; end
      default: ;
    endcase
    if (wr) begin
      if (ra == 0) n_r0_write++;
      else m_reg[ra] = res;
    end
    m_pc = nxt;
  endtask

  // ------------------------------------------------------------ checks
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s (pc=%h instr=%h)", what, pc, instr);
    end
  endtask

  task automatic compare_state();
    check(pc === m_pc, $sformatf("pc %h exp %h", pc, m_pc));
    for (int i = 1; i < 8; i++)
      check(dut.u_rf.regs[i] === m_reg[i],
            $sformatf("r%0d %h exp %h", i, dut.u_rf.regs[i], m_reg[i]));
    check(halted === is_halt_word(m_imem[m_pc]),
          $sformatf("halted %b exp %b", halted, is_halt_word(m_imem[m_pc])));
    if (m_stored) begin
      dmem_ext_addr = m_store_addr;
      #1;
      check(dmem_ext_rdata === m_dmem[m_store_addr],
            $sformatf("mem[%h] %h exp %h", m_store_addr, dmem_ext_rdata, m_dmem[m_store_addr]));
    end
  endtask

  // One clock cycle of the processor and one step of the model.
  task automatic cycle();
    @(posedge clk);
    model_step();
    #1;
    compare_state();
  endtask

  task automatic do_reset();
    @(negedge clk); rst = 1;
    @(posedge clk); #1;
    @(negedge clk); rst = 0;
    model_reset();
    #1;
    check(pc === 16'h0, "pc after reset");
  endtask

  task automatic print_state();
    $display("state: pc=%h halted=%b", pc, halted);
    for (int i = 0; i < 8; i++)
      $display("  r%0d = %h", i, (i == 0) ? 16'h0 : dut.u_rf.regs[i]);
  endtask

  // ------------------------------------------------------------ assembler helpers
  function automatic logic [15:0] rrr(logic [2:0] op, int ra, int rb, int rc);
    return {op, 3'(ra), 3'(rb), 4'b0, 3'(rc)};
  endfunction
  function automatic logic [15:0] rri(logic [2:0] op, int ra, int rb, int imm);
    return {op, 3'(ra), 3'(rb), 7'(imm)};
  endfunction
  function automatic logic [15:0] ri(logic [2:0] op, int ra, int imm);
    return {op, 3'(ra), 10'(imm)};
  endfunction

  localparam logic [2:0] ADD = 3'b000, ADDI = 3'b001, NAND = 3'b010, LUI = 3'b011,
                         SW = 3'b100, LW = 3'b101, BNE = 3'b110, JALR = 3'b111;

  logic [15:0] prog [32];

  task automatic load_word_imem(int a, logic [15:0] w);
    @(negedge clk);
    imem_we = 1; imem_waddr = AW'(a); imem_wdata = w;
    @(posedge clk); #1 imem_we = 0;
    m_imem[a] = w;
  endtask
  task automatic load_word_dmem(int a, logic [15:0] w);
    @(negedge clk);
    dmem_ext_we = 1; dmem_ext_addr = AW'(a); dmem_ext_wdata = w;
    @(posedge clk); #1 dmem_ext_we = 0;
    m_dmem[a] = w;
  endtask

  function automatic logic [15:0] rand_instr();
    logic [15:0] w;
    w = 16'($urandom);
    if (w[15:13] == 3'b111) begin
      // mostly plain jalr, now and then a halt
      if ($urandom % 64 != 0) w[6:0] = 0;
      else if (w[6:0] == 0) w[6:0] = 7'd1;
    end
    return w;
  endfunction

  // Reset, then start the machine at a random address with random register
  // contents: a short launch sequence at address 0 sets r1..r7 with lui+addi
  // and jumps through r1.
  task automatic launch();
    @(negedge clk); rst = 1;  // hold the machine while the sequence is written
    for (int r = 1; r < 8; r++) begin
      load_word_imem(2 * r - 2, ri(LUI, r, int'($urandom % 1024)));
      load_word_imem(2 * r - 1, rri(ADDI, r, r, int'($urandom % 64)));
    end
    load_word_imem(14, rri(JALR, 0, 1, 0));
    do_reset();
  endtask

  // ------------------------------------------------------------ watchdog
  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------ stimulus
  int steps;

  initial begin
    rst = 1; imem_we = 0; dmem_ext_we = 0;
    imem_waddr = 0; imem_wdata = 0; dmem_ext_addr = 0; dmem_ext_wdata = 0;
    last_sw_addr = 16'hffff;
    for (int i = 0; i < 8; i++) n_op[i] = 0;
    {n_bne_taken, n_bne_not_taken, n_r0_write, n_jalr_link, n_halt} = '0;
    {n_lw_after_sw, n_neg_branch, n_pos_branch} = '0;

    // ---------------- phase 1: directed program
    prog[0]  = rri(ADDI, 1, 0, 40);   // r1 = 40 (array pointer)
    prog[1]  = rri(ADDI, 2, 0, 5);    // r2 = 5   (count)
    prog[2]  = rrr(ADD,  3, 0, 0);    // r3 = 0   (sum)
    prog[3]  = rri(LW,   4, 1, 0);    // loop: r4 = mem[r1]
    prog[4]  = rrr(ADD,  3, 3, 4);
    prog[5]  = rri(ADDI, 1, 1, 1);
    prog[6]  = rri(ADDI, 2, 2, -1);
    prog[7]  = rri(BNE,  2, 0, -5);   // back to 3
    prog[8]  = ri (LUI,  5, 3);       // r5 = 192
    prog[9]  = rri(ADDI, 5, 5, 8);    // r5 = 200
    prog[10] = rri(SW,   3, 5, 0);    // mem[200] = sum
    prog[11] = rri(ADDI, 1, 0, 13);
    prog[12] = rri(ADDI, 2, 0, 11);
    prog[13] = rrr(ADD,  3, 0, 0);
    prog[14] = rrr(ADD,  3, 3, 1);    // mloop
    prog[15] = rri(ADDI, 2, 2, -1);
    prog[16] = rri(BNE,  2, 0, -3);   // back to 14
    prog[17] = rri(SW,   3, 5, 1);    // mem[201] = 13*11
    prog[18] = ri (LUI,  6, 'h2FB);   // r6 = 0xBEC0
    prog[19] = rri(ADDI, 6, 6, 47);   // r6 = 0xBEEF
    prog[20] = rri(SW,   6, 5, 2);    // mem[202] = 0xBEEF
    prog[21] = rri(ADDI, 4, 0, 30);   // r4 = subroutine address
    prog[22] = rri(JALR, 7, 4, 0);    // call, r7 = 23
    prog[23] = rri(SW,   1, 5, 3);    // mem[203] = subroutine result
    prog[24] = rri(SW,   7, 5, 4);    // mem[204] = link value
    prog[25] = rrr(ADD,  0, 6, 6);    // write to r0, ignored
    prog[26] = rri(SW,   0, 5, 5);    // mem[205] = r0
    prog[27] = rri(LW,   2, 5, 2);    // r2 = mem[202]
    prog[28] = rri(BNE,  2, 6, 1);    // equal: not taken
    prog[29] = rri(JALR, 0, 0, 1);    // halt
    prog[30] = rrr(NAND, 1, 6, 3);    // subroutine: r1 = ~(r6 & r3)
    prog[31] = rri(JALR, 0, 7, 0);    // return

    for (int i = 0; i < 32; i++) load_word_imem(i, prog[i]);
    load_word_dmem(40, 3);
    load_word_dmem(41, 7);
    load_word_dmem(42, 11);
    load_word_dmem(43, 20);
    load_word_dmem(44, 1000);
    for (int i = 200; i < 206; i++) load_word_dmem(i, 16'h5555);

    do_reset();
    steps = 0;
    while (!halted && steps < 200) begin
      cycle();
      steps++;
    end
    if (halted) n_halt++;
    print_state();
    check(steps == 81, $sformatf("directed program took %0d cycles, exp 81", steps));
    check(pc == 16'd29, "halted at address 29");
    // the halted machine stays put
    repeat (3) cycle();
    check(pc == 16'd29 && halted, "machine frozen after halt");
    begin
      logic [15:0] exp_mem [6];
      exp_mem = '{16'd1041, 16'd143, 16'hBEEF, 16'hFF70, 16'd23, 16'd0};
      for (int i = 0; i < 6; i++) begin
        dmem_ext_addr = AW'(200 + i); #1;
        check(dmem_ext_rdata === exp_mem[i],
              $sformatf("result mem[%0d]=%h exp %h", 200 + i, dmem_ext_rdata, exp_mem[i]));
      end
    end
    check(dut.u_rf.regs[2] === 16'hBEEF, "r2 loaded 0xBEEF");

    // ---------------- phase 2: random programs over the full memories
    @(negedge clk);
    rst = 1;
    for (int a = 0; a < MEMW; a++) begin
      imem_we = 1; imem_waddr = AW'(a); imem_wdata = rand_instr();
      dmem_ext_we = 1; dmem_ext_addr = AW'(a); dmem_ext_wdata = 16'($urandom);
      m_imem[a] = imem_wdata;
      m_dmem[a] = dmem_ext_wdata;
      @(negedge clk);
    end
    imem_we = 0; dmem_ext_we = 0;
    // start the program with a few stores and loads to the same words
    for (int i = 0; i < 8; i++) begin
      load_word_imem(2 * i,     rri(SW, (i % 7) + 1, 0, i));
      load_word_imem(2 * i + 1, rri(LW, ((i + 3) % 7) + 1, 0, i));
    end
    do_reset();
    for (int n = 0; n < RAND_CYCLES; n++) begin
      if (halted) begin
        // stays frozen for a cycle, then the halt word is replaced by an
        // ordinary instruction and the program carries on from there
        n_halt++;
        cycle();
        begin
          logic [15:0] w;
          do w = rand_instr(); while (is_halt_word(w));
          load_word_imem(int'(m_pc), w);
        end
        #1 compare_state();
      end
      if (n % 400 == 399) launch();
      cycle();
    end

    // ---------------- mechanism coverage
    $display("opcodes add=%0d addi=%0d nand=%0d lui=%0d sw=%0d lw=%0d bne=%0d jalr=%0d",
             n_op[0], n_op[1], n_op[2], n_op[3], n_op[4], n_op[5], n_op[6], n_op[7]);
    $display("bne taken=%0d (neg %0d, pos %0d) not taken=%0d r0 writes=%0d jalr links=%0d halts=%0d lw-after-sw=%0d",
             n_bne_taken, n_neg_branch, n_pos_branch, n_bne_not_taken, n_r0_write,
             n_jalr_link, n_halt, n_lw_after_sw);
    for (int i = 0; i < 8; i++) check(n_op[i] > 0, $sformatf("opcode %0d never executed", i));
    check(n_bne_taken > 0, "bne never taken");
    check(n_bne_not_taken > 0, "bne never fell through");
    check(n_neg_branch > 0, "no backward branch");
    check(n_pos_branch > 0, "no forward branch");
    check(n_r0_write > 0, "no write aimed at r0");
    check(n_jalr_link > 0, "no jalr");
    check(n_halt > 0, "no halt");
    check(n_lw_after_sw > 0, "no lw of a stored word");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
