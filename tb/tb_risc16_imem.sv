// tb_risc16_imem: self-checking test of the instruction memory.
// Loads a pseudo-random pattern through the load port at scattered addresses
// across the whole address space and reads it back combinationally.
module tb_risc16_imem;
  import risc16_pkg::*;

  localparam int unsigned AW = 16;
  localparam int N = 1024;

  logic          clk = 0;
  logic [AW-1:0] addr, waddr;
  word_t         rdata, wdata;
  logic          we;
  int            checks = 0, failures = 0;

  risc16_imem #(.AW(AW)) dut (.clk(clk), .addr(addr), .rdata(rdata), .we(we),
                              .waddr(waddr), .wdata(wdata));

  always #5 clk = ~clk;

  function automatic logic [AW-1:0] addr_of(int i);
    return AW'(i * 64 + (i * 7) % 64);  // scattered, distinct addresses
  endfunction
  function automatic word_t data_of(int i);
    return word_t'((i * 40503 + 12345) ^ (i << 3));
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; addr = 0; waddr = 0; wdata = 0;
    for (int i = 0; i < N; i++) begin
      @(negedge clk);
      we = 1; waddr = addr_of(i); wdata = data_of(i);
    end
    @(negedge clk); we = 0;
    for (int i = N - 1; i >= 0; i--) begin
      addr = addr_of(i); #1;
      checks++;
      if (rdata !== data_of(i)) begin
        failures++;
        $display("FAIL addr=%h rdata=%h exp=%h", addr, rdata, data_of(i));
      end
    end
    // a write with we low must not change the memory
    @(negedge clk); we = 0; waddr = addr_of(3); wdata = ~data_of(3);
    @(negedge clk); addr = addr_of(3); #1;
    checks++;
    if (rdata !== data_of(3)) begin failures++; $display("FAIL write without we"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
