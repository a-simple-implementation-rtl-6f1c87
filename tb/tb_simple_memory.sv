// tb_simple_memory: random writes and reads against an array model.
// A write needs strobe high and read_not_write low; strobe with
// read_not_write high, or a write without strobe, must change nothing.
module tb_simple_memory;
  localparam int unsigned AB = 4, DB = 16;
  logic clk = 0, rnw, strobe;
  logic [AB-1:0] addr;
  logic [DB-1:0] din, dout;
  logic [DB-1:0] model [1<<AB];
  int checks = 0, failures = 0;

  simple_memory #(.ABITS(AB), .DBITS(DB)) dut (
    .clk(clk), .addr(addr), .read_not_write(rnw), .strobe(strobe),
    .data_in(din), .data_out(dout));

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    strobe = 0; rnw = 0;
    // fill every word
    for (int a = 0; a < (1 << AB); a++) begin
      addr = AB'(a); din = DB'($urandom); strobe = 1; rnw = 0;
      model[a] = din;
      @(posedge clk); #1;
    end
    strobe = 0;
    for (int i = 0; i < 600; i++) begin
      addr   = AB'($urandom);
      din    = DB'($urandom);
      strobe = $urandom_range(0, 1);
      rnw    = $urandom_range(0, 1);
      #1;
      checks++;
      if (dout !== model[addr]) begin
        failures++; $display("read a=%0d got=%h exp=%h", addr, dout, model[addr]);
      end
      @(posedge clk); #1;
      if (strobe && !rnw) model[addr] = din;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
