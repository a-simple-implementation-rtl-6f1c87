// tb_memory: the strobe / read_not_write / mfc handshake.
// Writes take one cycle; a read raises mfc and presents data exactly
// READ_CYCLES edges after the strobe; mfc is low in the strobe cycle and
// after a write. Run with READ_CYCLES = 1 (the processor's setting) and 3.
module tb_memory;
  localparam int unsigned AB = 6, DB = 32;
  logic clk = 0, rst;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  // two instances with different latencies share the stimulus
  logic strobe, rnw;
  logic [AB-1:0] addr;
  logic [DB-1:0] dw, dr1, dr3;
  logic mfc1, mfc3;
  logic [DB-1:0] model [1<<AB];

  memory #(.ABITS(AB), .DBITS(DB), .READ_CYCLES(1)) dut1 (
    .clk(clk), .rst(rst), .strobe(strobe), .read_not_write(rnw),
    .addr(addr), .dwrite(dw), .dread(dr1), .mfc(mfc1));
  memory #(.ABITS(AB), .DBITS(DB), .READ_CYCLES(3)) dut3 (
    .clk(clk), .rst(rst), .strobe(strobe), .read_not_write(rnw),
    .addr(addr), .dwrite(dw), .dread(dr3), .mfc(mfc3));

  task automatic wr(input int a, input logic [DB-1:0] v);
    strobe = 1; rnw = 0; addr = AB'(a); dw = v;
    @(posedge clk); #1;
    strobe = 0; dw = $urandom; #1;
    model[a] = v;
    checks++; if (mfc1 || mfc3) begin failures++; $display("mfc high after write"); end
  endtask

  // read through both instances; count edges to mfc on each
  task automatic rd(input int a);
    int n1, n3;
    logic [DB-1:0] v1, v3;
    n1 = -1; n3 = -1;
    strobe = 1; rnw = 1; addr = AB'(a);
    #1;
    checks++; if (mfc1 || mfc3) begin failures++; $display("mfc high in strobe cycle"); end
    @(posedge clk); #1;
    strobe = 0; addr = AB'($urandom); #1;  // address may change once sampled
    for (int c = 1; c <= 6; c++) begin
      if (mfc1 && n1 < 0) begin n1 = c; v1 = dr1; end
      if (mfc3 && n3 < 0) begin n3 = c; v3 = dr3; end
      @(posedge clk); #1;
    end
    checks += 4;
    if (n1 != 1) begin failures++; $display("latency1 %0d", n1); end
    if (n3 != 3) begin failures++; $display("latency3 %0d", n3); end
    if (v1 !== model[a]) begin failures++; $display("rd1 a=%0d %h exp %h", a, v1, model[a]); end
    if (v3 !== model[a]) begin failures++; $display("rd3 a=%0d %h exp %h", a, v3, model[a]); end
    // data and mfc hold until the next request
    checks++; if (!mfc1 || dr1 !== model[a]) begin failures++; $display("mfc/data not held"); end
  endtask

  initial begin
    #500000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; strobe = 0; rnw = 1; addr = 0; dw = 0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int a = 0; a < (1 << AB); a++) wr(a, $urandom);
    for (int i = 0; i < 60; i++) begin
      if ($urandom_range(0, 2) == 0) wr($urandom_range(0, (1 << AB) - 1), $urandom);
      else rd($urandom_range(0, (1 << AB) - 1));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
