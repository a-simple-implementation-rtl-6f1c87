// dff: a D flip-flop register, WIDTH bits wide.
//
// The storage bit of the design: q takes d at the rising clock edge. Two
// additions to the bare flip-flop make it usable as a bus register: a load
// enable (a register latches the bus only in states that name its "in"
// signal), and a synchronous reset to RESET_VAL. The enable replaces the
// gated clock of the plain memory drawing (decoder output ANDed with the
// write strobe into the clock input); gating an enable instead keeps every
// flip-flop on the one clock.
//
// Interface: clk, rst (synchronous, active high), en, d -> q.
// Timing: q changes one clock edge after en is sampled high; rst wins over en.
module dff #(
  parameter int unsigned WIDTH     = 1,
  parameter logic [WIDTH-1:0] RESET_VAL = '0
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             en,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);

  always_ff @(posedge clk) begin
    if (rst)     q <= RESET_VAL;
    else if (en) q <= d;
  end

endmodule
