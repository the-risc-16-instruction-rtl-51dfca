// tb_risc16_control: self-checking test of the CONTROL decoder.
// For all 8 opcodes and both values of EQ! it compares every control output
// with an expected table written out here from the per-instruction data flow.
// Fields an instruction does not use are not compared.
module tb_risc16_control;
  import risc16_pkg::*;

  opcode_e op;
  logic    eq;
  ctrl_t   c;
  int      checks = 0, failures = 0;

  risc16_control dut (.op(op), .eq(eq), .ctrl(c));

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_field(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL op=%s eq=%b %s=%0d exp %0d", op.name(), eq, what, got, exp);
    end
  endtask

  initial begin
    for (int o = 0; o < 8; o++) begin
      for (int e = 0; e < 2; e++) begin
        op = opcode_e'(o); eq = 1'(e); #1;
        case (op)
          OP_ADD: begin
            expect_field("func", c.func_alu, ALU_ADD);
            expect_field("alu1", c.mux_alu1, ALU1_REG);
            expect_field("alu2", c.mux_alu2, ALU2_REG);
            expect_field("rf",   c.mux_rf,   RF_RC);
            expect_field("tgt",  c.mux_tgt,  TGT_ALU);
            expect_field("pc",   c.mux_pc,   PC_PLUS1);
            expect_field("we_rf", c.we_rf, 1); expect_field("we_dmem", c.we_dmem, 0);
          end
          OP_ADDI: begin
            expect_field("func", c.func_alu, ALU_ADD);
            expect_field("alu1", c.mux_alu1, ALU1_REG);
            expect_field("alu2", c.mux_alu2, ALU2_SIMM);
            expect_field("tgt",  c.mux_tgt,  TGT_ALU);
            expect_field("pc",   c.mux_pc,   PC_PLUS1);
            expect_field("we_rf", c.we_rf, 1); expect_field("we_dmem", c.we_dmem, 0);
          end
          OP_NAND: begin
            expect_field("func", c.func_alu, ALU_NAND);
            expect_field("alu1", c.mux_alu1, ALU1_REG);
            expect_field("alu2", c.mux_alu2, ALU2_REG);
            expect_field("rf",   c.mux_rf,   RF_RC);
            expect_field("tgt",  c.mux_tgt,  TGT_ALU);
            expect_field("pc",   c.mux_pc,   PC_PLUS1);
            expect_field("we_rf", c.we_rf, 1); expect_field("we_dmem", c.we_dmem, 0);
          end
          OP_LUI: begin
            expect_field("func", c.func_alu, ALU_PASS1);
            expect_field("alu1", c.mux_alu1, ALU1_LUI);
            expect_field("tgt",  c.mux_tgt,  TGT_ALU);
            expect_field("pc",   c.mux_pc,   PC_PLUS1);
            expect_field("we_rf", c.we_rf, 1); expect_field("we_dmem", c.we_dmem, 0);
          end
          OP_SW: begin
            expect_field("func", c.func_alu, ALU_ADD);
            expect_field("alu1", c.mux_alu1, ALU1_REG);
            expect_field("alu2", c.mux_alu2, ALU2_SIMM);
            expect_field("rf",   c.mux_rf,   RF_RA);
            expect_field("pc",   c.mux_pc,   PC_PLUS1);
            expect_field("we_rf", c.we_rf, 0); expect_field("we_dmem", c.we_dmem, 1);
          end
          OP_LW: begin
            expect_field("func", c.func_alu, ALU_ADD);
            expect_field("alu1", c.mux_alu1, ALU1_REG);
            expect_field("alu2", c.mux_alu2, ALU2_SIMM);
            expect_field("tgt",  c.mux_tgt,  TGT_DMEM);
            expect_field("pc",   c.mux_pc,   PC_PLUS1);
            expect_field("we_rf", c.we_rf, 1); expect_field("we_dmem", c.we_dmem, 0);
          end
          OP_BNE: begin
            expect_field("func", c.func_alu, ALU_EQ);
            expect_field("alu1", c.mux_alu1, ALU1_REG);
            expect_field("alu2", c.mux_alu2, ALU2_REG);
            expect_field("rf",   c.mux_rf,   RF_RA);
            expect_field("pc",   c.mux_pc,   eq ? PC_PLUS1 : PC_BRANCH);
            expect_field("we_rf", c.we_rf, 0); expect_field("we_dmem", c.we_dmem, 0);
          end
          OP_JALR: begin
            expect_field("func", c.func_alu, ALU_PASS1);
            expect_field("alu1", c.mux_alu1, ALU1_REG);
            expect_field("tgt",  c.mux_tgt,  TGT_PC1);
            expect_field("pc",   c.mux_pc,   PC_ALU);
            expect_field("we_rf", c.we_rf, 1); expect_field("we_dmem", c.we_dmem, 0);
          end
          default: ;
        endcase
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
