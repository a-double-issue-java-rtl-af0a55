// trans_rom: translation ROM of the translate stage.
//
// Maps a Java bytecode to one of three results: a native microcode (a
// simple, one-to-one bytecode), an address of the one-to-many ROM (a
// complex bytecode), and in both cases the number of operand bytes that
// follow the bytecode in the stream (0..2). Combinational.
// Which bytecodes are simple and which microcode each maps to is this
// design's choice, made from the JVM definition of the bytecodes and the
// microcode semantics: the table covers the integer subset the microcode
// set can execute. Bytecodes outside it translate to nop with no operand.
module trans_rom
  import jp_pkg::*;
(
  input  logic [7:0] bc,
  output tkind_t     kind,   // K_O2O or K_O2M
  output logic [7:0] data,   // microcode or one-to-many ROM address
  output logic [1:0] nopd
);
  always_comb begin
    kind = K_O2O;
    data = NOP;
    nopd = 2'd0;
    unique casez (bc)
      8'h02:                 data = LDIMM8 | 8'd4;              // iconst_m1: immROM[4] = -1
      8'h03, 8'h04, 8'h05, 8'h06, 8'h07, 8'h08:
                             data = LDIMM0 | (bc - 8'h03);       // iconst_0..5
      8'h10:       begin data = LDOPD;      nopd = 2'd1; end     // bipush
      8'h11:       begin data = LDOPD2;     nopd = 2'd2; end     // sipush
      8'h15, 8'h19:begin data = LDVAL_OPD;  nopd = 2'd1; end     // iload, aload
      8'h1a, 8'h1b, 8'h1c, 8'h1d: data = LDVAL0 | (bc - 8'h1a);  // iload_0..3
      8'h2a, 8'h2b, 8'h2c, 8'h2d: data = LDVAL0 | (bc - 8'h2a);  // aload_0..3
      8'h2e:                 data = IALOAD;
      8'h36, 8'h3a:begin data = STVAL_OPD;  nopd = 2'd1; end     // istore, astore
      8'h3b, 8'h3c, 8'h3d, 8'h3e: data = STVAL0 | (bc - 8'h3b);  // istore_0..3
      8'h4b, 8'h4c, 8'h4d, 8'h4e: data = STVAL0 | (bc - 8'h4b);  // astore_0..3
      8'h4f:       begin kind = K_O2M; data = 8'd4; end          // iastore
      8'h57:                 data = POP;
      8'h59:                 data = DUP;
      8'h5f:                 data = SWAP;
      8'h60:                 data = AADD;
      8'h64:                 data = ASUB;
      8'h68:                 data = AMUL;
      8'h6c:                 data = IDIV;
      8'h70:                 data = IREM;
      8'h78:                 data = ASHL;
      8'h7a:                 data = ASHR;
      8'h7c:                 data = AUSHR;
      8'h7e:                 data = AAND;
      8'h80:                 data = AOR;
      8'h82:                 data = AXOR;
      8'h84:       begin kind = K_O2M; data = 8'd2; nopd = 2'd2; end // iinc
      8'h99, 8'h9a, 8'h9b, 8'h9c, 8'h9d, 8'h9e:
                   begin data = IFEQ | (bc - 8'h99); nopd = 2'd2; end
      8'h9f, 8'ha0, 8'ha1, 8'ha2, 8'ha3, 8'ha4:
                   begin data = IF_CMPEQ | (bc - 8'h9f); nopd = 2'd2; end
      8'ha5:       begin data = IF_CMPEQ;       nopd = 2'd2; end // if_acmpeq
      8'ha6:       begin data = IF_CMPEQ | 8'd1; nopd = 2'd2; end // if_acmpne
      8'ha7:       begin data = GOTO;       nopd = 2'd2; end
      8'hac, 8'hb1:          data = RETURN;                      // ireturn, return
      8'hb2:       begin data = GETSTATIC;  nopd = 2'd2; end
      8'hb8:       begin data = INVOKE;     nopd = 2'd2; end     // invokestatic
      8'hbc:       begin kind = K_O2M; data = 8'd0; nopd = 2'd1; end // newarray
      8'hc6:       begin data = IFEQ;       nopd = 2'd2; end     // ifnull
      8'hc7:       begin data = IFEQ | 8'd1; nopd = 2'd2; end    // ifnonnull
      default: ;
    endcase
  end
endmodule
