// tb_cpu_bus: with one enable on, the bus carries that source; with none it
// reads zero.
module tb_cpu_bus;
  localparam int unsigned N = 10;
  logic clk = 0, rst = 1;
  logic [N-1:0] en;
  logic [31:0] src [N];
  logic [31:0] bus;
  int checks = 0, failures = 0;

  cpu_bus #(.N(N), .W(32)) dut (.clk(clk), .rst(rst), .en(en), .src(src), .bus(bus));

  always #5 clk = ~clk;

  initial begin
    @(posedge clk); #1 rst = 0;
    for (int i = 0; i < 400; i++) begin
      int k;
      for (int j = 0; j < N; j++) src[j] = $urandom;
      k = $urandom_range(0, N);
      en = (k == N) ? '0 : N'(1) << k;
      @(posedge clk); #1;
      checks++;
      if (bus !== ((k == N) ? 32'h0 : src[k])) begin
        failures++; $display("k=%0d bus=%h", k, bus);
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
