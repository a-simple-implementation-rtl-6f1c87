// tb_control: the control state machine on its own.
// For each instruction class it follows the states from Start back to Start
// (or to the halt), holding mfc low for a random number of cycles in every
// UNTILmfc state, and compares the state trail and the key control signals
// of each state with an expected table written out here from the
// microprogram.
module tb_control;
  import simple_pkg::*;
  logic clk = 0, rst;
  word_t ir;
  logic mfc;
  uinstr_t u;
  logic halt;
  upc_t upc;
  int checks = 0, failures = 0;
  int waits_seen = 0;

  control dut (.clk(clk), .rst(rst), .ir(ir), .mfc(mfc), .u(u), .halt(halt), .upc(upc));

  always #5 clk = ~clk;

  // Expected control signals per state, as a string of signal names.
  function automatic string expect_sig(int s);
    case (s)
      0:  return "PCout MARin MEMread Yin";
      1:  return "CONST ALUadd Zin UNTILmfc";
      2:  return "MDRout IRin";
      3:  return "JUMPop Zout PCin";
      4:  return "HALT";
      5, 8, 11:  return "SELrs REGout Yin";
      6:  return "SELrt REGout ALUadd Zin";
      9:  return "SELrt REGout ALUand Zin";
      7, 10: return "Zout SELrd REGin JUMP";
      12, 18: return "IRimmedout ALUadd Zin";
      13: return "Zout MARin MEMread";
      14: return "UNTILmfc";
      15: return "MDRout SELrt REGin JUMP";
      16: return "SELrt REGout MDRin";
      17: return "SELrs REGout Yin";
      19: return "Zout MARin MEMwrite JUMP";
      default: return "?";
    endcase
  endfunction

  function automatic string actual_sig(uinstr_t w);
    string s;
    s = "";
    if (w.sel == SEL_RS && (w.out[DRV_REG] || w.reg_in)) s = {s, "SELrs "};
    if (w.sel == SEL_RT && (w.out[DRV_REG] || w.reg_in)) s = {s, "SELrt "};
    if (w.out[DRV_PC])      s = {s, "PCout "};
    if (w.out[DRV_MDR])     s = {s, "MDRout "};
    if (w.out[DRV_REG])     s = {s, "REGout "};
    if (w.out[DRV_IRIMMED]) s = {s, "IRimmedout "};
    if (w.out[DRV_Z])       s = {s, "Zout "};
    if (w.out[DRV_CONST])   s = {s, "CONST "};
    if (w.z_in && w.alu_op == ALU_ADD) s = {s, "ALUadd "};
    if (w.z_in && w.alu_op == ALU_AND) s = {s, "ALUand "};
    if (w.sel == SEL_RD && (w.out[DRV_REG] || w.reg_in)) s = {s, "SELrd "};
    if (w.mar_in)    s = {s, "MARin "};
    if (w.ir_in)     s = {s, "IRin "};
    if (w.pc_in)     s = {s, "PCin "};
    if (w.mdr_in)    s = {s, "MDRin "};
    if (w.reg_in)    s = {s, "REGin "};
    if (w.mem_read)  s = {s, "MEMread "};
    if (w.mem_write) s = {s, "MEMwrite "};
    if (w.y_in)      s = {s, "Yin "};
    if (w.z_in)      s = {s, "Zin "};
    if (w.until_mfc) s = {s, "UNTILmfc "};
    if (w.halt)      s = {s, "HALT "};
    if (w.nxt == NXT_JUMPOP) s = {s, "JUMPop "};
    if (w.nxt == NXT_JUMP && !w.halt) s = {s, "JUMP "};
    return s;
  endfunction

  // true when every name in e appears in a and both have the same count
  function automatic bit same_set(string e, string a);
    int ne, na;
    ne = 0; na = 0;
    for (int i = 0; i < e.len(); i++) if (e[i] == " ") ne++;
    for (int i = 0; i < a.len(); i++) if (a[i] == " ") na++;
    if (ne + 1 != na) return 0;
    // each word of e must be in a
    begin
      int st;
      st = 0;
      for (int i = 0; i <= e.len(); i++) begin
        if (i == e.len() || e[i] == " ") begin
          string w;
          bit found;
          w = e.substr(st, i - 1);
          found = 0;
          for (int j = 0; j + w.len() <= a.len(); j++)
            if (a.substr(j, j + w.len() - 1) == w && (j + w.len() == a.len() || a[j + w.len()] == " ")
                && (j == 0 || a[j-1] == " "))
              found = 1;
          if (!found) return 0;
          st = i + 1;
        end
      end
    end
    return 1;
  endfunction

  task automatic run_instr(input word_t instr, input int trail[$], input bit halts);
    int k;
    int stall;
    ir = instr;
    k = 0;
    while (k < trail.size()) begin
      stall = 0;
      checks++;
      if (upc !== upc_t'(trail[k])) begin
        failures++; $display("instr %h step %0d: state %0d, expected %0d", instr, k, upc, trail[k]);
      end
      checks++;
      if (!same_set(expect_sig(trail[k]), actual_sig(u))) begin
        failures++; $display("state %0d signals '%s' expected '%s'", upc, actual_sig(u), expect_sig(trail[k]));
      end
      if (u.until_mfc) begin
        // hold mfc low for a few cycles: the state must repeat
        stall = $urandom_range(0, 3);
        mfc = 0;
        repeat (stall) begin
          @(posedge clk); #1;
          checks++;
          if (upc !== upc_t'(trail[k])) begin failures++; $display("UNTILmfc did not hold"); end
          waits_seen++;
        end
        mfc = 1;
      end
      @(posedge clk); #1;
      mfc = $urandom_range(0, 1);
      k++;
    end
    if (halts) begin
      checks += 3;
      if (!halt) begin failures++; $display("no halt"); end
      if (u !== nop()) begin failures++; $display("control word not idle after halt"); end
      repeat (3) @(posedge clk);
      #1;
      if (upc !== upc_t'(trail[trail.size() - 1])) begin failures++; $display("state moved after halt"); end
    end else begin
      checks++;
      if (upc !== L_START) begin failures++; $display("did not return to Start: %0d", upc); end
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; ir = '0; mfc = 0;
    @(posedge clk); #1 rst = 0;
    for (int rep = 0; rep < 20; rep++) begin
      word_t base;
      base = word_t'($urandom) & 32'h03FF_F800;   // random rs, rt, rd, shamt clear
      run_instr(base | 32'h20,               '{0, 1, 2, 3, 5, 6, 7}, 0);       // add
      run_instr(base | 32'h24,               '{0, 1, 2, 3, 8, 9, 10}, 0);      // and
      run_instr(32'h8C00_0000 | (word_t'($urandom) & 32'h03FF_FFFF),
                '{0, 1, 2, 3, 11, 12, 13, 14, 15}, 0);                         // lw
      run_instr(32'hAC00_0000 | (word_t'($urandom) & 32'h03FF_FFFF),
                '{0, 1, 2, 3, 16, 17, 18, 19}, 0);                             // sw
    end
    // R-type with another function code is illegal
    run_instr(32'h0000_0022, '{0, 1, 2, 3, 4}, 1);
    checks++;
    if (waits_seen == 0) begin failures++; $display("no UNTILmfc wait exercised"); end
    // reset leaves the halt
    rst = 1; @(posedge clk); #1 rst = 0;
    checks++;
    if (halt || upc !== L_START) begin failures++; $display("reset did not clear halt"); end
    run_instr(32'hFC00_0000, '{0, 1, 2, 3, 4}, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
