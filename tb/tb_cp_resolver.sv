// tb_cp_resolver: checks the constant-pool resolver against a hand-built
// runtime image.
//
// The image reproduces the worked example of the runtime-image layout:
// invokestatic 0x001D, table entry 0x0156, a method reference (tag 0x0A,
// class_index 0x0002, name_and_type_index 0x001C) whose direct address
// points at a header with access flag 0x000A, 2 arguments, max stack 4,
// max locals 3, followed by the bytecodes 03 3D A7 00. A field reference
// (tag 0x09) at index 0x0003 points at a 16-byte field entry whose data
// space holds the static value 10000 (0x2710, the constant of the pi
// program); a string constant (tag 0x08) at index 0x0005 stops after the
// direct address. The bench checks every result, the latency (done 14
// cycles after the request for a method, 10 for a field, 6 otherwise: one
// cycle to accept, then one per byte read), that
// done holds until clear, and a back-to-back request at a
// second image base. The method area is modelled here as a byte array read
// combinationally.
module tb_cp_resolver;
  import jp_pkg::*;

  logic clk = 0, rst_n = 1;
  always #5 clk = ~clk;
  initial #1 rst_n = 0;  // a real falling edge, so the asynchronous reset acts

  logic        req = 0, clear = 0;
  logic [15:0] cp_index = 0;
  addr_t       base = 0;
  logic [9:0]  mem_addr;
  logic [7:0]  mem [1024];
  logic        busy, done;
  logic [7:0]  tag;
  addr_t       direct, code_addr;
  word_t       field_value;
  logic [15:0] arg_cnt, max_stack, max_locals;

  cp_resolver #(.AW(10)) dut (.clk, .rst_n, .req, .clear, .cp_index, .base, .mem_addr,
    .mem_data(mem[mem_addr]), .busy, .done, .tag, .direct, .code_addr, .arg_cnt,
    .max_stack, .max_locals, .field_value);

  int checks = 0, failures = 0;
  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  task automatic put16(int a, int v); mem[a] = 8'(v >> 8); mem[a + 1] = 8'(v); endtask

  // one image at base b: method ref at index 0x1D, field ref at index 3
  task automatic image(int b);
    put16(b + 8 + 2 * 'h1d, 'h0156);
    mem[b + 'h156] = 8'h0a; put16(b + 'h157, 'h0002); put16(b + 'h159, 'h001c);
    put16(b + 'h15b, 'h0100);                              // direct address
    put16(b + 'h100, 'h000a); put16(b + 'h102, 'h0002);    // access flag, arg_cnt
    put16(b + 'h104, 'h0004); put16(b + 'h106, 'h0003);    // max stack, max locals
    mem[b + 'h108] = 8'h03; mem[b + 'h109] = 8'h3d; mem[b + 'h10a] = 8'ha7; mem[b + 'h10b] = 8'h00;
    put16(b + 8 + 2 * 3, 'h0180);
    mem[b + 'h180] = 8'h09; put16(b + 'h181, 'h0002); put16(b + 'h183, 'h0007);
    put16(b + 'h185, 'h01c0);
    put16(b + 'h1c0, 'h0008); put16(b + 'h1c2, 'h0007);    // access, name index
    put16(b + 'h1c4, 'h0008); put16(b + 'h1c6, 'h0000);    // descriptor, heap offset
    put16(b + 'h1c8, 'h0000); put16(b + 'h1ca, 'h2710);    // static value 10000
    put16(b + 8 + 2 * 5, 'h01a0);
    mem[b + 'h1a0] = 8'h08; put16(b + 'h1a1, 'h0011); put16(b + 'h1a3, 'h0000);
  endtask

  task automatic resolve(int b, int idx, output int cyc);
    #1 base = addr_t'(b); cp_index = 16'(idx); req = 1;
    cyc = 0;
    do begin @(posedge clk); #1 cyc++; end while (!done && cyc < 100);
    req = 0;
  endtask

  initial begin
    repeat (200) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cyc;
    foreach (mem[i]) mem[i] = 8'hee;
    image(0);
    image('h200);
    repeat (2) @(posedge clk); #1 rst_n = 1;
    @(posedge clk);
    check("idle done", done, 0);

    resolve(0, 'h1d, cyc);
    check("method latency", cyc, 14);                     // request cycle + 13 reads
    check("tag", tag, 'h0a);
    check("direct", direct, 'h0100);
    check("code address", code_addr, 'h0108);
    check("first bytecode", mem[code_addr], 'h03);
    check("arg_cnt", arg_cnt, 2);
    check("max stack", max_stack, 4);
    check("max locals", max_locals, 3);
    repeat (3) @(posedge clk);
    check("done holds", done, 1);
    #1 clear = 1; @(posedge clk); #1 clear = 0;
    check("cleared", done, 0);

    resolve(0, 3, cyc);
    check("field latency", cyc, 10);
    check("field tag", tag, 'h09);
    check("field direct", direct, 'h01c0);
    check("static value", field_value, 10000);
    #1 clear = 1; @(posedge clk); #1 clear = 0;

    resolve(0, 5, cyc);
    check("string latency", cyc, 6);
    check("string tag", tag, 'h08);
    #1 clear = 1; @(posedge clk); #1 clear = 0;

    resolve('h200, 'h1d, cyc);
    check("second image latency", cyc, 14);
    check("second image code", code_addr, 'h0108);
    check("second image locals", max_locals, 3);
    #1 clear = 1; @(posedge clk); #1 clear = 0;
    check("busy after clear", busy, 0);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
