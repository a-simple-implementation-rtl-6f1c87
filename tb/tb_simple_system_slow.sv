// tb_simple_system_slow: the whole design with a slower memory.
// The same random programs as the end-to-end test run with READ_CYCLES = 4,
// so every read waits three more cycles in its UNTILmfc state. The final
// memory must still match the reference model, and the cycle count must
// grow by exactly three per fetch and per lw.
module tb_simple_system_slow;
  import simple_pkg::*;
  import mips_prog_pkg::*;
  localparam int unsigned RC = 4;
  logic clk = 0, reset;
  logic halt, h_strobe, h_rnw, h_mfc;
  word_t h_addr, h_wdata, h_rdata, pc, ir;
  upc_t upc;
  int checks = 0, failures = 0;

  simple_system #(.ABITS(8), .READ_CYCLES(RC)) dut (
    .clk(clk), .reset(reset), .halt(halt),
    .host_strobe(h_strobe), .host_read_not_write(h_rnw), .host_addr(h_addr),
    .host_wdata(h_wdata), .host_rdata(h_rdata), .host_mfc(h_mfc),
    .pc(pc), .ir(ir), .upc(upc));

  always #5 clk = ~clk;

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
    h_strobe = 0; h_rnw = 1; h_addr = '0; h_wdata = '0;
    for (int prog = 0; prog < 3; prog++) begin
      make_program(img);
      ref_run(img, exp_mem, exp_cycles, na, nn, nl, ns, RC - 1);
      reset = 1;
      for (int i = 0; i < NW; i++) host_write(4 * i, img[i]);
      reset = 0;
      cyc = 0;
      while (!halt && cyc < 100000) begin @(posedge clk); #1; cyc++; end
      checks += 2;
      if (!halt) begin failures++; $display("program %0d did not halt", prog); end
      if (cyc != exp_cycles) begin failures++; $display("program %0d: %0d cycles, expected %0d", prog, cyc, exp_cycles); end
      for (int i = 0; i < NW; i++) begin
        host_read(4 * i, v);
        checks++;
        if (v !== exp_mem[i]) begin
          failures++;
          if (failures < 10) $display("program %0d word %0d: %h expected %h", prog, i, v, exp_mem[i]);
        end
      end
      $display("program %0d: %0d instructions, %0d cycles, CPI %0.2f",
               prog, na + nn + nl + ns + 1, cyc, real'(cyc) / real'(na + nn + nl + ns + 1));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
