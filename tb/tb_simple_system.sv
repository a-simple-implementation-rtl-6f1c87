// tb_simple_system: the whole design end to end, at its default sizes.
// For each of several random programs (mips_prog_pkg) it loads the memory
// through the host port while the processor is held in reset, lets the
// processor run to its halt, reads the whole memory back through the host
// port and compares it with the reference model. It also checks the total
// cycle count and the cycles of every single instruction (add 8, and 8,
// lw 11, sw 9), and counts how often each mechanism happened: waits in
// UNTILmfc during fetch and during lw, the dispatch to each instruction
// sequence, reads and writes on the memory interface, each direction of the
// shared data line, and the halt on an illegal instruction.
module tb_simple_system;
  import simple_pkg::*;
  import mips_prog_pkg::*;
  logic clk = 0, reset;
  logic halt, h_strobe, h_rnw, h_mfc;
  word_t h_addr, h_wdata, h_rdata, pc, ir;
  upc_t upc;
  int checks = 0, failures = 0;

  simple_system dut (
    .clk(clk), .reset(reset), .halt(halt),
    .host_strobe(h_strobe), .host_read_not_write(h_rnw), .host_addr(h_addr),
    .host_wdata(h_wdata), .host_rdata(h_rdata), .host_mfc(h_mfc),
    .pc(pc), .ir(ir), .upc(upc));

  always #5 clk = ~clk;

  // ---- mechanism counters ----
  int n_fetch_wait = 0, n_lw_wait = 0, n_disp_add = 0, n_disp_and = 0, n_disp_lw = 0;
  int n_disp_sw = 0, n_rd = 0, n_wr = 0, n_line_cpu = 0, n_line_mem = 0, n_halt = 0;
  int cpi_bad = 0, cpi_checked = 0;
  upc_t prev_upc;
  int since_start, kind;
  logic running;

  always @(posedge clk) begin
    if (running && !reset) begin
      if (upc == 5'd1 && dut.mfc == 0) n_fetch_wait++;
      if (upc == 5'd14 && dut.mfc == 0) n_lw_wait++;
      if (prev_upc == 5'd3 && upc == L_ADD) begin n_disp_add++; kind = 1; end
      if (prev_upc == 5'd3 && upc == L_AND) begin n_disp_and++; kind = 2; end
      if (prev_upc == 5'd3 && upc == L_LW)  begin n_disp_lw++;  kind = 3; end
      if (prev_upc == 5'd3 && upc == L_SW)  begin n_disp_sw++;  kind = 4; end
      if (dut.m_strobe && dut.m_rnw)  n_rd++;
      if (dut.m_strobe && !dut.m_rnw) n_wr++;
      if (dut.m_strobe && !dut.m_rnw && dut.u_line.line === dut.cpu_wdata) n_line_cpu++;
      if (dut.mfc && dut.u_proc.u_dp.rd_pending_q && dut.u_line.line === dut.mem_dread) n_line_mem++;
      // cycles per instruction: from one Start to the next
      since_start++;
      if (upc == L_START && prev_upc != L_START && kind != 0) begin
        int exp;
        exp = (kind == 1) ? CYC_ADD : (kind == 2) ? CYC_AND : (kind == 3) ? CYC_LW : CYC_SW;
        cpi_checked++;
        if (since_start != exp) begin
          cpi_bad++;
          if (cpi_bad < 5) $display("instruction kind %0d took %0d cycles, expected %0d", kind, since_start, exp);
        end
      end
      if (upc == L_START && prev_upc != L_START) begin since_start = 0; kind = 0; end
      prev_upc = upc;
    end
  end

  // ---- host port ----
  task automatic host_write(input int a, input word_t v);
    h_strobe = 1; h_rnw = 0; h_addr = word_t'(a); h_wdata = v;
    @(posedge clk); #1;
    h_strobe = 0; h_rnw = 1;
  endtask

  task automatic host_read(input int a, output word_t v);
    int w;
    h_strobe = 1; h_rnw = 1; h_addr = word_t'(a);
    @(posedge clk); #1;
    h_strobe = 0;
    w = 0;
    while (!h_mfc && w < 20) begin @(posedge clk); #1; w++; end
    v = h_rdata;
  endtask

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    image_t img, exp_mem;
    int exp_cycles, na, nn, nl, ns, cyc;
    word_t v;
    running = 0; kind = 0; since_start = -1; prev_upc = '0;
    h_strobe = 0; h_rnw = 1; h_addr = '0; h_wdata = '0;
    for (int prog = 0; prog < 5; prog++) begin
      make_program(img);
      ref_run(img, exp_mem, exp_cycles, na, nn, nl, ns);
      reset = 1;
      for (int i = 0; i < NW; i++) host_write(4 * i, img[i]);
      checks++;
      if (halt) begin failures++; $display("halt during reset"); end
      prev_upc = L_START; kind = 0; since_start = -1;
      running = 1;
      reset = 0;
      cyc = 0;
      while (!halt && cyc < 100000) begin @(posedge clk); #1; cyc++; end
      running = 0;
      checks += 2;
      if (!halt) begin failures++; $display("program %0d did not halt", prog); end
      else n_halt++;
      if (cyc != exp_cycles) begin failures++; $display("program %0d: %0d cycles, expected %0d", prog, cyc, exp_cycles); end
      checks++;
      if (upc != L_ILL) begin failures++; $display("halted in state %0d", upc); end
      for (int i = 0; i < NW; i++) begin
        host_read(4 * i, v);
        checks++;
        if (v !== exp_mem[i]) begin
          failures++;
          if (failures < 10) $display("program %0d word %0d: %h expected %h", prog, i, v, exp_mem[i]);
        end
      end
      $display("program %0d: %0d add, %0d and, %0d lw, %0d sw; %0d cycles, CPI %0.2f",
               prog, na, nn, nl, ns, cyc, real'(cyc) / real'(na + nn + nl + ns + 1));
    end
    checks++;
    if (cpi_bad != 0 || cpi_checked == 0) begin failures++; $display("%0d of %0d instructions off their cycle count", cpi_bad, cpi_checked); end
    $display("fetch waits %0d, lw waits %0d, dispatch add %0d and %0d lw %0d sw %0d",
             n_fetch_wait, n_lw_wait, n_disp_add, n_disp_and, n_disp_lw, n_disp_sw);
    $display("reads %0d, writes %0d, line driven by processor %0d, by memory %0d, halts %0d",
             n_rd, n_wr, n_line_cpu, n_line_mem, n_halt);
    checks += 11;
    if (n_fetch_wait == 0) begin failures++; $display("never waited in fetch"); end
    if (n_lw_wait == 0)    begin failures++; $display("never waited in lw"); end
    if (n_disp_add == 0)   begin failures++; $display("never dispatched add"); end
    if (n_disp_and == 0)   begin failures++; $display("never dispatched and"); end
    if (n_disp_lw == 0)    begin failures++; $display("never dispatched lw"); end
    if (n_disp_sw == 0)    begin failures++; $display("never dispatched sw"); end
    if (n_rd == 0)         begin failures++; $display("never read"); end
    if (n_wr == 0)         begin failures++; $display("never wrote"); end
    if (n_line_cpu == 0)   begin failures++; $display("processor never drove the data line"); end
    if (n_line_mem == 0)   begin failures++; $display("memory never drove the data line"); end
    if (n_halt == 0)       begin failures++; $display("never halted"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
