// tb_alu: every operation on random and corner operands against
// independently written expressions.
module tb_alu;
  import simple_pkg::*;
  alu_op_e op;
  word_t y, b, z, e;
  int checks = 0, failures = 0;

  alu dut (.op(op), .y(y), .b(b), .z(z));

  function automatic word_t expect_of(alu_op_e o, word_t yy, word_t bb);
    longint sy, sb;
    sy = longint'($signed(yy)); sb = longint'($signed(bb));
    case (o)
      ALU_ADD: return word_t'(longint'(yy) + longint'(bb));
      ALU_AND: return yy & bb;
      ALU_XOR: return yy ^ bb;
      ALU_OR:  return yy | bb;
      ALU_SL:  return word_t'(64'(bb) << (yy % 32));
      ALU_SLT: return (sy < sb) ? 32'd1 : 32'd0;
      ALU_SRL: return bb >> (yy % 32);
      ALU_SUB: return word_t'(longint'(yy) - longint'(bb));
      default: return 'x;
    endcase
  endfunction

  initial begin
    word_t corners [6] = '{32'h0, 32'h1, 32'hFFFF_FFFF, 32'h8000_0000, 32'h7FFF_FFFF, 32'd31};
    for (int k = 0; k < 8; k++) begin
      op = alu_op_e'(k);
      for (int i = 0; i < 6; i++)
        for (int j = 0; j < 6; j++) begin
          y = corners[i]; b = corners[j]; #1;
          e = expect_of(op, y, b);
          checks++;
          if (z !== e) begin failures++; $display("op=%0d y=%h b=%h z=%h exp=%h", k, y, b, z, e); end
        end
      for (int i = 0; i < 200; i++) begin
        y = $urandom; b = $urandom;
        if (i % 2 == 0) y = y % 40;
        #1;
        e = expect_of(op, y, b);
        checks++;
        if (z !== e) begin failures++; $display("op=%0d y=%h b=%h z=%h exp=%h", k, y, b, z, e); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
