// cp_resolver: fast resolution of a constant-pool reference in the runtime
// image held in the method area.
//
// The class loader leaves each class in the method area as a runtime image
// at a base address. Word 8 onwards of the image is the constant pool table
// of contents: entry i, a 16-bit offset from the base, sits at
// base + 8 + 2*i. The offset points at the constant-pool data item, which is
// the class-file item (tag, class_index, name_and_type_index) followed by a
// 16-bit direct address filled in by the loader. For a method reference
// the direct address points at the method's header in the method code
// area: access flag, argument count, max stack and max locals (16 bits
// each), followed by the bytecodes. For a field reference it points at
// the field's 16-byte entry in the field information: access flag, name
// index, descriptor index and heap offset (16 bits each), then the data
// space that holds a static field's value.
//
// On req (an invoke or getstatic in execute, with its constant-pool index)
// the resolver walks this chain one byte per cycle through its own read
// port of the method area: two bytes of the table entry, the tag, the two
// bytes of the direct address and, for a method reference (tag 0x0A) or an
// interface method reference (tag 0x0B), the eight header bytes, or for a
// field reference (tag 0x09) the four bytes of the static value. done then
// stays high with the results until clear (the host's acknowledge). done
// rises 14 cycles after the request for a method (one to accept it, 13
// byte reads), 10 for a field and 6 for anything else. field_value is
// meaningful only after a field reference.
//
// The table-of-contents layout (base + 8 + 2*index), the item layout and
// the header fields follow the runtime image of the source design. This
// design's own choices: all 16-bit fields are big-endian as in the class
// file, the direct address and all offsets are relative to the image base,
// the resolver reads bytes one at a time, and the static value is a 32-bit
// word in the first four bytes of the data space (entry offset 8).
module cp_resolver
  import jp_pkg::*;
#(
  parameter int unsigned AW = 10            // method area address width
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          req,
  input  logic          clear,
  input  logic [15:0]   cp_index,
  input  addr_t         base,
  output logic [AW-1:0] mem_addr,
  input  logic [7:0]    mem_data,
  output logic          busy,
  output logic          done,
  output logic [7:0]    tag,
  output addr_t         direct,
  output addr_t         code_addr,
  output logic [15:0]   arg_cnt,
  output logic [15:0]   max_stack,
  output logic [15:0]   max_locals,
  output word_t         field_value
);
  localparam logic [7:0] TAG_METHODREF  = 8'h0A;
  localparam logic [7:0] TAG_IMETHODREF = 8'h0B;
  localparam logic [7:0] TAG_FIELDREF   = 8'h09;

  logic [3:0]  k;        // byte step of the walk, 0..12
  addr_t       entry;    // table-of-contents entry (offset of the item)
  logic [7:0]  hdr [8];  // method header bytes

  logic is_method, is_field;
  assign is_method = (tag == TAG_METHODREF) || (tag == TAG_IMETHODREF);
  assign is_field  = (tag == TAG_FIELDREF);

  // address of the byte read at step k
  addr_t a;
  always_comb begin
    if (k < 4'd2)      a = base + 16'd8 + {cp_index[14:0], 1'b0} + addr_t'(k);
    else if (k == 4'd2) a = base + entry;
    else if (k < 4'd5)  a = base + entry + 16'd5 + addr_t'(4'(k - 4'd3));
    else if (is_field)  a = base + direct + 16'd8 + addr_t'(4'(k - 4'd5));
    else                a = base + direct + addr_t'(4'(k - 4'd5));
  end
  assign mem_addr = a[AW-1:0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      k <= '0; busy <= 1'b0; done <= 1'b0;
      entry <= '0; tag <= '0; direct <= '0;
      hdr <= '{default: '0};
    end else if (clear) begin
      busy <= 1'b0; done <= 1'b0;
    end else if (!busy && !done && req) begin
      busy <= 1'b1; k <= '0;
    end else if (busy) begin
      unique case (k)
        4'd0: entry[15:8]  <= mem_data;
        4'd1: entry[7:0]   <= mem_data;
        4'd2: tag          <= mem_data;
        4'd3: direct[15:8] <= mem_data;
        4'd4: direct[7:0]  <= mem_data;
        default: hdr[3'(k - 4'd5)] <= mem_data;
      endcase
      k <= k + 4'd1;
      if ((k == 4'd4 && !is_method && !is_field) || (k == 4'd8 && is_field) ||
          k == 4'd12) begin
        busy <= 1'b0;
        done <= 1'b1;
      end
    end
  end

  assign code_addr  = direct + 16'd8;
  assign arg_cnt    = {hdr[2], hdr[3]};
  assign max_stack  = {hdr[4], hdr[5]};
  assign max_locals = {hdr[6], hdr[7]};
  assign field_value = {hdr[0], hdr[1], hdr[2], hdr[3]};
endmodule
