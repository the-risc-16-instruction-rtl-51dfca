// tb_risc16_regfile: self-checking test of the RiSC-16 register file.
// Checks reset to zero, that r0 always reads 0 even after a write, that a
// write lands only when WE is high, and that both read ports see the right
// register, against a shadow copy kept here, over random traffic.
module tb_risc16_regfile;
  import risc16_pkg::*;

  logic     clk = 0, rst;
  reg_idx_t s1, s2, t;
  word_t    d1, d2, wd;
  logic     we;
  word_t    model [NREGS];
  int       checks = 0, failures = 0;

  risc16_regfile dut (.clk(clk), .rst(rst), .src1_idx(s1), .src1_data(d1),
                      .src2_idx(s2), .src2_data(d2), .we(we), .tgt_idx(t),
                      .tgt_data(wd));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_reads();
    for (int i = 0; i < NREGS; i++) begin
      s1 = reg_idx_t'(i); s2 = reg_idx_t'(NREGS - 1 - i); #1;
      checks++;
      if (d1 !== ((i == 0) ? 16'h0 : model[i]) ||
          d2 !== ((NREGS-1-i == 0) ? 16'h0 : model[NREGS-1-i])) begin
        failures++;
        $display("FAIL read r%0d=%h r%0d=%h", i, d1, NREGS-1-i, d2);
      end
    end
  endtask

  initial begin
    we = 0; t = 0; wd = 0; s1 = 0; s2 = 0;
    rst = 1;
    @(posedge clk); @(posedge clk); #1 rst = 0;
    for (int i = 0; i < NREGS; i++) model[i] = '0;
    check_reads();
    // write every register, r0 included
    for (int i = 0; i < NREGS; i++) begin
      @(negedge clk);
      we = 1; t = reg_idx_t'(i); wd = word_t'(16'h1111 * (i + 1));
      @(posedge clk); #1;
      model[i] = wd;
    end
    we = 0;
    check_reads();
    // random traffic
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      we = 1'($urandom); t = reg_idx_t'($urandom); wd = word_t'($urandom);
      s1 = reg_idx_t'($urandom); s2 = reg_idx_t'($urandom); #1;
      checks++;
      if (d1 !== ((s1 == 0) ? 16'h0 : model[s1]) || d2 !== ((s2 == 0) ? 16'h0 : model[s2])) begin
        failures++;
        $display("FAIL random read s1=%0d d1=%h s2=%0d d2=%h", s1, d1, s2, d2);
      end
      @(posedge clk); #1;
      if (we) model[t] = wd;
    end
    we = 0;
    check_reads();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
