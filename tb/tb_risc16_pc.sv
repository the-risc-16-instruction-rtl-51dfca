// tb_risc16_pc: self-checking test of the program-counter unit.
// Checks reset to 0, then random cycles of each MUX_pc choice (PC+1,
// PC+1+simm with positive and negative offsets, ALU value) and of the hold
// input, against a PC model kept here. One PC update per clock cycle.
module tb_risc16_pc;
  import risc16_pkg::*;

  logic    clk = 0, rst, en;
  mux_pc_e sel;
  word_t   simm, alu, pc, pc1;
  word_t   model;
  int      checks = 0, failures = 0;
  int      seen [3];

  risc16_pc dut (.clk(clk), .rst(rst), .en(en), .mux_pc(sel), .simm(simm),
                 .alu_result(alu), .pc(pc), .pc_plus1(pc1));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    en = 1; sel = PC_PLUS1; simm = 0; alu = 16'h1234;
    rst = 1;
    @(posedge clk); #1;
    checks++;
    if (pc !== 16'h0) begin failures++; $display("FAIL reset pc=%h", pc); end
    rst = 0;
    model = 0;
    for (int n = 0; n < 5000; n++) begin
      @(negedge clk);
      sel  = mux_pc_e'($urandom % 3);
      // 7-bit signed offsets, as bne provides
      simm = word_t'(signed'(7'($urandom)));
      alu  = word_t'($urandom);
      en   = ($urandom % 8) != 0;
      #1;
      checks++;
      if (pc1 !== word_t'(model + 1)) begin
        failures++; $display("FAIL pc_plus1=%h exp %h", pc1, word_t'(model + 1));
      end
      @(posedge clk); #1;
      if (en) begin
        unique case (sel)
          PC_PLUS1:  model = model + 1;
          PC_BRANCH: model = model + 1 + simm;
          PC_ALU:    model = alu;
          default: ;
        endcase
        seen[sel]++;
      end
      checks++;
      if (pc !== model) begin
        failures++; $display("FAIL sel=%s en=%b pc=%h exp %h", sel.name(), en, pc, model);
      end
    end
    for (int i = 0; i < 3; i++) begin
      checks++;
      if (seen[i] == 0) begin failures++; $display("FAIL select %0d never used", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
