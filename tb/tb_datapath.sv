// tb_datapath: drives control words straight into the datapath and reads
// the results back through MAR, MDR and PC. Covers every bus driver, every
// ALU operation, the three register selects, PCinif0 both ways, the memory
// request timing and MDR loading on mfc.
module tb_datapath;
  import simple_pkg::*;
  logic clk = 0, rst;
  uinstr_t u;
  logic mfc;
  word_t mem_line, ir, pc, mar, mdr;
  logic strobe, rnw;
  int checks = 0, failures = 0;

  datapath dut (.clk(clk), .rst(rst), .u(u), .mfc(mfc), .mem_line(mem_line),
                .ir(ir), .pc(pc), .mar(mar), .mdr(mdr), .strobe(strobe), .read_not_write(rnw));

  always #5 clk = ~clk;

  function automatic uinstr_t w_const(word_t v);
    uinstr_t x;
    x = nop(); x.out[DRV_CONST] = 1; x.const_val = v;
    return x;
  endfunction

  function automatic uinstr_t w_out(drv_e d);
    uinstr_t x;
    x = nop(); x.out[d] = 1;
    return x;
  endfunction

  task automatic step(input uinstr_t x);
    u = x;
    @(posedge clk); #1;
    u = nop();
  endtask

  task automatic check(input string what, input word_t got, input word_t exp);
    checks++;
    if (got !== exp) begin failures++; $display("%s: got %h expected %h", what, got, exp); end
  endtask

  // put a driver on the bus and latch it into MAR
  task automatic read_bus(input drv_e d, input string what, input word_t exp);
    uinstr_t x;
    x = w_out(d); x.mar_in = 1;
    step(x);
    check(what, mar, exp);
  endtask

  function automatic word_t ref_alu(int op, word_t a, word_t b);
    case (op)
      0: return a + b;
      1: return a & b;
      2: return a ^ b;
      3: return a | b;
      4: begin word_t r; r = b; for (int i = 0; i < int'(a[4:0]); i++) r = {r[30:0], 1'b0}; return r; end
      5: return ((a[31] && !b[31]) || (a[31] == b[31] && a < b)) ? 1 : 0;
      6: begin word_t r; r = b; for (int i = 0; i < int'(a[4:0]); i++) r = {1'b0, r[31:1]}; return r; end
      default: return a + ~b + 1;
    endcase
  endfunction

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    uinstr_t x;
    word_t a, b, v, instr, pcv;
    rst = 1; u = nop(); mfc = 0; mem_line = '0;
    @(posedge clk); #1 rst = 0;
    check("reset pc", pc, 0);
    check("reset strobe", word_t'(strobe), 0);

    // undriven bus reads zero
    x = w_const(32'hFFFF_FFFF); x.mar_in = 1; step(x);
    x = nop(); x.mar_in = 1; step(x);
    check("floating bus", mar, 0);

    // ALU: every operation
    for (int rep = 0; rep < 40; rep++)
      for (int op = 0; op < 8; op++) begin
        a = $urandom; b = $urandom;
        if (rep % 2 == 0) a = a % 36;
        x = w_const(a); x.y_in = 1; step(x);
        read_bus(DRV_Y, "Yout", a);
        x = w_const(b); x.alu_op = alu_op_e'(op); x.z_in = 1; step(x);
        // Z holds without Zin
        x = w_const($urandom); x.alu_op = ALU_XOR; step(x);
        read_bus(DRV_Z, $sformatf("alu op %0d", op), ref_alu(op, a, b));
      end

    // IR fields and register selects
    for (int rep = 0; rep < 30; rep++) begin
      int rs, rt, rd;
      rs = $urandom_range(1, 31);
      rt = $urandom_range(1, 31); if (rt == rs) rt = (rs % 31) + 1;
      rd = $urandom_range(1, 31); if (rd == rs || rd == rt) rd = 0;
      instr = ($urandom & 32'hFC00_07FF) | (rs << 21) | (rt << 16) | (rd << 11);
      x = w_const(instr); x.ir_in = 1; step(x);
      check("IRin", ir, instr);
      read_bus(DRV_IRIMMED, "IRimmedout", {{16{instr[15]}}, instr[15:0]});
      read_bus(DRV_IROFFSET, "IRoffsetout", {{16{instr[15]}}, instr[15:0]} * 4);
      pcv = $urandom;
      x = w_const(pcv); x.pc_in = 1; step(x);
      check("PCin", pc, pcv);
      read_bus(DRV_PC, "PCout", pcv);
      read_bus(DRV_IRADDR, "IRaddout", {pcv[31:26], instr[25:0]});
      // write three registers through the three selects
      x = w_const(32'h1111_0000 + rs); x.sel = SEL_RS; x.reg_in = 1; step(x);
      x = w_const(32'h2222_0000 + rt); x.sel = SEL_RT; x.reg_in = 1; step(x);
      x = w_const(32'h3333_0000 + rd); x.sel = SEL_RD; x.reg_in = 1; step(x);
      x = w_out(DRV_REG); x.sel = SEL_RS; x.mar_in = 1; step(x);
      check("REG rs", mar, 32'h1111_0000 + rs);
      x = w_out(DRV_REG); x.sel = SEL_RT; x.mar_in = 1; step(x);
      check("REG rt", mar, 32'h2222_0000 + rt);
      x = w_out(DRV_REG); x.sel = SEL_RD; x.mar_in = 1; step(x);
      check("REG rd", mar, (rd == 0) ? 32'h0 : 32'h3333_0000 + rd);
    end

    // PCinif0: loads only when Z is zero
    for (int rep = 0; rep < 20; rep++) begin
      a = (rep % 2) ? 32'd0 : ($urandom | 1);
      x = w_const(0); x.y_in = 1; step(x);
      x = w_const(a); x.alu_op = ALU_ADD; x.z_in = 1; step(x);
      x = w_const(32'h0000_1000); x.pc_in = 1; step(x);
      v = $urandom;
      x = w_const(v); x.pc_in_if0 = 1; step(x);
      check("PCinif0", pc, (a == 0) ? v : 32'h0000_1000);
    end

    // MDRin / MDRout
    v = $urandom;
    x = w_const(v); x.mdr_in = 1; step(x);
    check("MDRin", mdr, v);
    read_bus(DRV_MDR, "MDRout", v);
    read_bus(DRV_MAR, "MARout", v);

    // memory requests: strobe in the next cycle, read_not_write held
    for (int rep = 0; rep < 20; rep++) begin
      bit is_rd;
      int lat;
      is_rd = $urandom_range(0, 1);
      v = $urandom;
      x = w_const(~v); x.mdr_in = 1; step(x);
      x = w_const(32'h40 + rep * 4); x.mar_in = 1;
      if (is_rd) x.mem_read = 1; else x.mem_write = 1;
      u = x;
      #1;
      checks++; if (strobe) begin failures++; $display("strobe too early"); end
      @(posedge clk); #1;
      u = nop();
      checks += 2;
      if (!strobe) begin failures++; $display("no strobe after request"); end
      if (rnw !== is_rd) begin failures++; $display("read_not_write wrong"); end
      check("MAR at strobe", mar, 32'h40 + rep * 4);
      @(posedge clk); #1;
      checks += 2;
      if (strobe) begin failures++; $display("strobe longer than one cycle"); end
      if (rnw !== is_rd) begin failures++; $display("read_not_write not held"); end
      if (is_rd) begin
        lat = $urandom_range(0, 3);
        mem_line = $urandom;
        a = mdr;
        repeat (lat) begin @(posedge clk); #1; end
        check("MDR waits for mfc", mdr, a);
        mem_line = v; mfc = 1;
        @(posedge clk); #1;
        mfc = 0;
        check("MDR from memory", mdr, v);
        // mfc with no read pending leaves MDR alone
        mem_line = ~v; mfc = 1;
        @(posedge clk); #1;
        mfc = 0;
        check("MDR without pending read", mdr, v);
      end
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
