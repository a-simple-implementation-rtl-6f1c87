// tb_regfile: random writes and reads against a 32-entry model; register 0
// stays zero; reset clears every register.
module tb_regfile;
  import simple_pkg::*;
  logic clk = 0, rst, we;
  logic [4:0] addr;
  word_t wdata, rdata;
  word_t model [32];
  int checks = 0, failures = 0;

  regfile #(.NREGS(32)) dut (.clk(clk), .rst(rst), .addr(addr), .we(we), .wdata(wdata), .rdata(rdata));

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; we = 0; addr = 0; wdata = 0;
    @(posedge clk); #1;
    rst = 0;
    for (int r = 0; r < 32; r++) model[r] = '0;
    for (int r = 0; r < 32; r++) begin
      addr = 5'(r); #1;
      checks++; if (rdata !== 0) begin failures++; $display("reset r%0d=%h", r, rdata); end
    end
    for (int i = 0; i < 1000; i++) begin
      addr  = 5'($urandom);
      we    = $urandom_range(0, 1);
      wdata = $urandom;
      #1;
      checks++;
      if (rdata !== model[addr]) begin failures++; $display("r%0d got=%h exp=%h", addr, rdata, model[addr]); end
      @(posedge clk); #1;
      if (we && addr != 0) model[addr] = wdata;
    end
    we = 0;
    for (int r = 0; r < 32; r++) begin
      addr = 5'(r); #1;
      checks++; if (rdata !== model[r]) begin failures++; $display("final r%0d", r); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
