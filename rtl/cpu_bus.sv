// cpu_bus: the processor's single internal bus.
//
// Every unit that can put a value on the bus does so through its own
// tri-state driver, enabled by that unit's "out" control signal (PCout,
// MDRout, Zout, ...). With one enable on, the bus carries that unit's value.
// Two enables on at once would short two drivers against each other; the
// control store never does this, and an assertion checks it. With no enable
// on, the bus floats; this design reads a floating bus as zero. The drivers
// are written as an AND-OR selection rather than as tri-state nets.
//
// Interface: clk, rst (used only by the assertion); en (N enables),
// src (N words) -> bus. Combinational from en and src to bus.
module cpu_bus #(
  parameter int unsigned N = 10,
  parameter int unsigned W = 32
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [N-1:0] en,
  input  logic [W-1:0] src [N],
  output logic [W-1:0] bus
);

  always_comb begin
    bus = '0;
    for (int i = 0; i < N; i++)
      bus |= src[i] & {W{en[i]}};
  end

  // At most one driver at a time: two would short the bus.
  a_one_driver: assert property (@(posedge clk) disable iff (rst) $onehot0(en));

endmodule
