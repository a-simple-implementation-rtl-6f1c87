// tb_processor: the processor against a behavioural memory written here.
// The memory answers each read after a random 1 to 4 clock edges (1 in the
// first program, so that the cycle count can be checked exactly) and keeps
// mfc low in the strobe cycle. Random programs from mips_prog_pkg run to the
// halt; the final memory must equal the reference model's.
module tb_processor;
  import simple_pkg::*;
  import mips_prog_pkg::*;
  logic clk = 0, reset;
  logic halt, strobe, rnw, mfc;
  word_t addr, wdata, line, pc, ir;
  upc_t upc;
  int checks = 0, failures = 0;

  processor dut (.clk(clk), .reset(reset), .halt(halt), .strobe(strobe), .read_not_write(rnw),
                 .addr(addr), .wdata(wdata), .mfc(mfc), .data_line(line),
                 .pc(pc), .ir(ir), .upc(upc));

  always #5 clk = ~clk;

  // behavioural memory
  image_t mem;
  word_t  dread;
  logic   mfc_q;
  int     left, max_lat;
  assign mfc  = mfc_q & ~strobe;
  assign line = rnw ? dread : wdata;

  always @(posedge clk) begin
    if (reset) begin
      mfc_q <= 0; left <= 0;
    end else if (strobe) begin
      mfc_q <= 0;
      if (rnw) begin
        int lat;
        lat = $urandom_range(1, max_lat);
        if (lat == 1) mfc_q <= 1;
        else left <= lat - 1;
      end else mem[addr[9:2]] <= line;
      if (rnw) dread <= mem[addr[9:2]];
    end else if (left > 0) begin
      left <= left - 1;
      if (left == 1) mfc_q <= 1;
    end
  end

  initial begin
    #50000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    image_t img, exp_mem;
    int exp_cycles, na, nn, nl, ns, cyc;
    for (int prog = 0; prog < 6; prog++) begin
      max_lat = (prog == 0) ? 1 : 4;
      make_program(img);
      ref_run(img, exp_mem, exp_cycles, na, nn, nl, ns);
      mem = img;
      reset = 1;
      repeat (2) @(posedge clk);
      #1 reset = 0;
      cyc = 0;
      while (!halt && cyc < 100000) begin @(posedge clk); #1; cyc++; end
      checks++;
      if (!halt) begin failures++; $display("program %0d did not halt", prog); end
      if (prog == 0) begin
        checks++;
        if (cyc != exp_cycles) begin failures++; $display("cycles %0d expected %0d", cyc, exp_cycles); end
      end else begin
        checks++;
        if (cyc < exp_cycles) begin failures++; $display("too fast: %0d < %0d", cyc, exp_cycles); end
      end
      for (int i = 0; i < NW; i++) begin
        checks++;
        if (mem[i] !== exp_mem[i]) begin
          failures++;
          if (failures < 10) $display("prog %0d word %0d got %h expected %h", prog, i, mem[i], exp_mem[i]);
        end
      end
      $display("program %0d: %0d add, %0d and, %0d lw, %0d sw, %0d cycles", prog, na, nn, nl, ns, cyc);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
