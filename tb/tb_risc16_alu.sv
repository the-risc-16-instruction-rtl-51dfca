// tb_risc16_alu: self-checking test of the RiSC-16 ALU.
// Drives random operand pairs (plus equal pairs and corner values) through
// every function and compares result and EQ! with values computed here.
module tb_risc16_alu;
  import risc16_pkg::*;

  alu_func_e func;
  word_t     a, b, y;
  logic      eq;
  int        checks = 0, failures = 0;

  risc16_alu dut (.func(func), .src1(a), .src2(b), .result(y), .eq(eq));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input word_t exp_y, input logic exp_eq);
    checks++;
    if (y !== exp_y || eq !== exp_eq) begin
      failures++;
      $display("FAIL func=%s a=%h b=%h y=%h (exp %h) eq=%b (exp %b)",
               func.name(), a, b, y, exp_y, eq, exp_eq);
    end
  endtask

  initial begin
    for (int i = 0; i < 2000; i++) begin
      a = word_t'($urandom);
      b = (i % 5 == 0) ? a : word_t'($urandom);
      if (i == 1) begin a = 16'hffff; b = 16'h0001; end
      if (i == 2) begin a = 16'h8000; b = 16'h8000; end
      func = ALU_ADD;   #1; check(word_t'((32'(a) + 32'(b)) & 32'hffff), a == b);
      func = ALU_NAND;  #1; check(~a | ~b, a == b);
      func = ALU_PASS1; #1; check(a, a == b);
      func = ALU_EQ;    #1; check({15'b0, a == b}, a == b);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
