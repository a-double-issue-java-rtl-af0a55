// tb_stack_ram: fills both banks through their write ports, reads back
// with the one-cycle read latency, and checks the write-first bypass when
// a word is read in the cycle it is written.
module tb_stack_ram;
  logic clk = 0; always #5 clk = ~clk;
  logic [4:0] raddr [2], waddr [2]; logic [31:0] rdata [2], wdata [2]; logic we [2];
  int checks = 0, failures = 0;
  stack_ram #(.WORDS(64)) dut (.*);
  initial begin
    repeat (1000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    we = '{0, 0}; raddr = '{0, 0}; waddr = '{0, 0}; wdata = '{0, 0};
    for (int k = 0; k < 32; k++) begin
      #1 we = '{1, 1}; waddr = '{5'(k), 5'(k)}; wdata = '{32'(k * 2), 32'(k * 2 + 1) | 32'h1000};
      @(posedge clk);
    end
    #1 we = '{0, 0};
    for (int k = 0; k < 32; k++) begin
      #1 raddr = '{5'(k), 5'(31 - k)};
      @(posedge clk); #1;
      checks += 2;
      if (rdata[0] !== 32'(k * 2)) begin failures++; $display("FAIL b0 %0d", k); end
      if (rdata[1] !== (32'((31 - k) * 2 + 1) | 32'h1000)) begin failures++; $display("FAIL b1 %0d", k); end
    end
    // bypass: read and write the same word in one cycle
    #1 raddr = '{5'd7, 5'd9}; we = '{1, 1}; waddr = '{5'd7, 5'd9}; wdata = '{32'hAAAA, 32'hBBBB};
    @(posedge clk); #1 we = '{0, 0};
    checks += 2;
    if (rdata[0] !== 32'hAAAA) begin failures++; $display("FAIL bypass 0"); end
    if (rdata[1] !== 32'hBBBB) begin failures++; $display("FAIL bypass 1"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
