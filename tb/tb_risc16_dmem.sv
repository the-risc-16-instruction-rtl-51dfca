// tb_risc16_dmem: self-checking test of the two-port data memory.
// Random writes and reads on both ports against a sparse reference kept here
// (an associative array), including same-address writes where port A must win.
module tb_risc16_dmem;
  import risc16_pkg::*;

  localparam int unsigned AW = 16;

  logic          clk = 0;
  logic [AW-1:0] a_addr, b_addr;
  word_t         a_rdata, b_rdata, a_wdata, b_wdata;
  logic          a_we, b_we;
  word_t         model [logic [AW-1:0]];
  int            checks = 0, failures = 0;

  risc16_dmem #(.AW(AW)) dut (.clk(clk), .a_addr(a_addr), .a_rdata(a_rdata),
    .a_we(a_we), .a_wdata(a_wdata), .b_addr(b_addr), .b_rdata(b_rdata),
    .b_we(b_we), .b_wdata(b_wdata));

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // addresses confined to a small window so that reads hit written words
  function automatic logic [AW-1:0] pick();
    return AW'(16'hF000 + ($urandom % 64));
  endfunction

  initial begin
    a_we = 0; b_we = 0; a_addr = 0; b_addr = 0; a_wdata = 0; b_wdata = 0;
    // initialise the window through port B
    for (int i = 0; i < 64; i++) begin
      @(negedge clk);
      b_we = 1; b_addr = AW'(16'hF000 + i); b_wdata = word_t'($urandom);
      model[b_addr] = b_wdata;
    end
    @(negedge clk); b_we = 0;
    for (int n = 0; n < 5000; n++) begin
      @(negedge clk);
      a_addr = pick(); b_addr = (n % 10 == 0) ? a_addr : pick();
      a_we = 1'($urandom); b_we = 1'($urandom);
      a_wdata = word_t'($urandom); b_wdata = word_t'($urandom);
      #1;
      checks++;
      if (a_rdata !== model[a_addr] || b_rdata !== model[b_addr]) begin
        failures++;
        $display("FAIL read a[%h]=%h exp %h b[%h]=%h exp %h", a_addr, a_rdata,
                 model[a_addr], b_addr, b_rdata, model[b_addr]);
      end
      @(posedge clk); #1;
      if (b_we) model[b_addr] = b_wdata;
      if (a_we) model[a_addr] = a_wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
