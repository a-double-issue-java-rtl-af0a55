// tb_code_mem: writes a byte pattern into the method area and reads it back
// as aligned pairs, even byte in the upper half, with odd read addresses
// rounded down. The byte-wide second port is read at every address too.
module tb_code_mem;
  logic clk = 0; always #5 clk = ~clk;
  logic we = 0; logic [6:0] waddr = 0, raddr = 0; logic [7:0] wdata = 0; logic [15:0] rdata;
  logic [6:0] raddr2 = 0; logic [7:0] rdata2;
  int checks = 0, failures = 0;
  code_mem #(.BYTES(128)) dut (.*);
  function automatic logic [7:0] pat(int k); return 8'((k * 37) ^ 8'h5a); endfunction
  initial begin
    repeat (1000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int k = 0; k < 128; k++) begin
      #1 we = 1; waddr = 7'(k); wdata = pat(k); @(posedge clk);
    end
    #1 we = 0;
    for (int k = 0; k < 128; k++) begin
      raddr = 7'(k); #1; checks++;
      if (rdata !== {pat(k & ~1), pat(k | 1)}) begin failures++; $display("FAIL %0d %h", k, rdata); end
      raddr2 = 7'(127 - k); #1; checks++;
      if (rdata2 !== pat(127 - k)) begin failures++; $display("FAIL port 2 %0d %h", 127 - k, rdata2); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
