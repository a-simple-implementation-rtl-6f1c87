// tb_rw_data_bus: the shared line carries memory data on a read and
// processor data on a write.
module tb_rw_data_bus;
  logic rnw;
  logic [31:0] c, m, line;
  int checks = 0, failures = 0;

  rw_data_bus #(.DBITS(32)) dut (.read_not_write(rnw), .cpu_out(c), .mem_out(m), .line(line));

  initial begin
    for (int i = 0; i < 200; i++) begin
      rnw = $urandom_range(0, 1); c = $urandom; m = $urandom;
      #1;
      checks++;
      if (line !== (rnw ? m : c)) begin
        failures++; $display("rnw=%0d line=%h", rnw, line);
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
