// tb_imm_rom: reads all eight entries of the immediate ROM and compares
// them with the constants of the instruction set (1.0f, 2.0f, upper word
// of 1.0, 0x7FFF, -1, 31, and two reserved zero entries).
module tb_imm_rom;
  logic [2:0]  idx;
  logic [31:0] value;
  int checks = 0, failures = 0;
  imm_rom dut (.idx(idx), .value(value));
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    logic [31:0] exp [8];
    exp = '{32'h3F800000, 32'h40000000, 32'h3FF00000, 32'h00007FFF,
            32'hFFFFFFFF, 32'h0000001F, 32'h0, 32'h0};
    for (int k = 0; k < 8; k++) begin
      idx = 3'(k); #1;
      checks++;
      if (value !== exp[k]) begin failures++; $display("FAIL idx %0d: %h", k, value); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
