// tb_irq_gen: a request raises irq with the latched code one cycle later;
// irq holds until ack, done is high exactly in the ack cycle, and a
// following request is raised again.
module tb_irq_gen;
  import jp_pkg::*;
  logic clk = 0, rst_n = 1; always #5 clk = ~clk;
  initial #1 rst_n = 0;  // a real falling edge, so the asynchronous reset acts
  logic req = 0, ack = 0, irq, done; mcode_t code = NOP, irq_code;
  int checks = 0, failures = 0;
  irq_gen dut (.*);
  task automatic chk(string s, logic c);
    checks++; if (!c) begin failures++; $display("FAIL %s at %0t", s, $time); end
  endtask
  initial begin
    repeat (1000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    repeat (2) @(posedge clk); #1 rst_n = 1;
    chk("idle", !irq && !done);
    req = 1; code = IDIV;
    @(posedge clk); #1;
    chk("raised", irq && irq_code == IDIV && !done);
    repeat (4) @(posedge clk); #1;
    chk("held", irq && !done);
    ack = 1; #1;
    chk("done in ack cycle", done);
    @(posedge clk); #1 ack = 0; req = 0;
    chk("cleared", !irq && !done);
    req = 1; code = IREM;
    @(posedge clk); #1;
    chk("second", irq && irq_code == IREM);
    ack = 1; @(posedge clk); #1 ack = 0; req = 0;
    @(posedge clk); #1;
    chk("idle again", !irq);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
