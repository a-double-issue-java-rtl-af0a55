// tb_alu: drives random operands through every ALU operation and compares
// with results computed in the bench (sub is B - A, shifts shift B by
// A[4:0], mul passes the externally computed product through).
module tb_alu;
  import jp_pkg::*;
  mcode_t op; word_t a, b, p, y;
  int checks = 0, failures = 0;
  alu dut (.op(op), .a(a), .b(b), .mul_p(p), .y(y));
  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  function automatic word_t model(mcode_t o, word_t x, word_t z, word_t pp);
    case (o)
      AOR: return x | z;
      AXOR: return x ^ z;
      AAND: return x & z;
      AADD: return x + z;
      ASUB: return z - x;
      AMUL: return pp;
      AUSHR: return z >> x[4:0];
      ASHR: return word_t'($signed(z) >>> x[4:0]);
      ASHL: return z << x[4:0];
      default: return 0;
    endcase
  endfunction
  initial begin
    mcode_t ops [9];
    ops = '{AOR, AXOR, AAND, AADD, ASUB, AMUL, AUSHR, ASHR, ASHL};
    for (int n = 0; n < 200; n++) begin
      op = ops[n % 9]; a = $urandom; b = $urandom; p = a * b;
      #1; checks++;
      if (y !== model(op, a, b, p)) begin failures++; $display("FAIL op %h a %h b %h y %h", op, a, b, y); end
    end
    // fixed points
    op = ASUB; a = 5; b = 3; #1; checks++; if (y !== 32'hFFFFFFFE) failures++;
    op = ASHR; a = 4; b = 32'h80000000; #1; checks++; if (y !== 32'hF8000000) failures++;
    op = AUSHR; a = 4; b = 32'h80000000; #1; checks++; if (y !== 32'h08000000) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
