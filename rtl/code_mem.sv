// code_mem: on-chip method area holding the bytecodes.
//
// The host writes the runtime image one byte per cycle before it starts the
// processor. The translate stage reads the aligned 16-bit pair at an even
// byte address every cycle: rdata[15:8] is the byte at the even address,
// rdata[7:0] the byte after it. The read is combinational (distributed RAM);
// the write is synchronous. A second, byte-wide read port (raddr2/rdata2)
// serves the constant-pool resolver, which reads the runtime image held in
// the same memory. The size and the second port are this design's choice.
module code_mem #(
  parameter int unsigned BYTES = 1024
) (
  input  logic                      clk,
  input  logic                      we,
  input  logic [$clog2(BYTES)-1:0]  waddr,
  input  logic [7:0]                wdata,
  input  logic [$clog2(BYTES)-1:0]  raddr,   // bit 0 ignored
  output logic [15:0]               rdata,
  input  logic [$clog2(BYTES)-1:0]  raddr2,
  output logic [7:0]                rdata2
);
  localparam int unsigned AW = $clog2(BYTES);
  logic [7:0] mem [BYTES];

  always_ff @(posedge clk)
    if (we) mem[waddr] <= wdata;

  always_comb begin
    rdata[15:8] = mem[{raddr[AW-1:1], 1'b0}];
    rdata[7:0]  = mem[{raddr[AW-1:1], 1'b1}];
    rdata2      = mem[raddr2];
  end
endmodule
