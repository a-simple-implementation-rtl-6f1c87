// decoder: binary to one-hot decoder with an enable.
//
// Output line i is high when en is high and sel equals i; all lines are low
// when en is low. It selects one word of the plain memory and one register of
// the register file. Decoders are only named, never drawn in detail, so
// this is the plain one-hot form. Purely combinational.
//
// Interface: sel (A bits), en -> y (2**A one-hot lines).
module decoder #(
  parameter int unsigned A = 5
) (
  input  logic [A-1:0]      sel,
  input  logic              en,
  output logic [(1<<A)-1:0] y
);

  always_comb begin
    y = '0;
    y[sel] = en;
  end

endmodule
