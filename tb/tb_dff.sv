// tb_dff: checks the flip-flop register against a reference model.
// Random d, en and rst each cycle; q must equal the model after every edge.
module tb_dff;
  localparam int unsigned W = 8;
  logic clk = 0, rst, en;
  logic [W-1:0] d, q, model;
  int checks = 0, failures = 0;

  dff #(.WIDTH(W), .RESET_VAL(8'hA5)) dut (.clk(clk), .rst(rst), .en(en), .d(d), .q(q));

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; en = 0; d = '0;
    @(posedge clk); #1;
    model = 8'hA5;
    checks++; if (q !== model) begin failures++; $display("reset q=%h", q); end
    for (int i = 0; i < 500; i++) begin
      rst = ($urandom_range(0, 19) == 0);
      en  = $urandom_range(0, 1);
      d   = W'($urandom);
      @(posedge clk); #1;
      if (rst) model = 8'hA5; else if (en) model = d;
      checks++;
      if (q !== model) begin failures++; $display("cycle %0d q=%h exp=%h", i, q, model); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
