// tb_decoder: exhaustive check of the one-hot decoder, enabled and disabled.
module tb_decoder;
  localparam int unsigned A = 4;
  logic [A-1:0] sel;
  logic en;
  logic [(1<<A)-1:0] y;
  int checks = 0, failures = 0;

  decoder #(.A(A)) dut (.sel(sel), .en(en), .y(y));

  initial begin
    for (int e = 0; e < 2; e++)
      for (int s = 0; s < (1 << A); s++) begin
        en = e[0]; sel = A'(s);
        #1;
        checks++;
        if (y !== (e ? (16'(1) << s) : 16'(0))) begin
          failures++; $display("en=%0d sel=%0d y=%b", e, s, y);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
