// processor: a single-bus, multi-cycle processor for a subset of MIPS.
//
// Two parts: the control state machine (control), which steps through the
// control store one state per clock, and the datapath (datapath), whose
// registers, ALU and register file share one internal bus. The processor
// executes add, and, lw and sw; any other instruction halts it. Each
// instruction takes the fetch (four states plus the wait for memory) and its
// own sequence: with memory answering two cycles after a MEMread state,
// add and and take 8 cycles, lw 11 and sw 9.
//
// Memory interface: strobe (one-cycle request pulse), read_not_write, addr
// (MAR), wdata (MDR, for the processor's driver on the data line), and, in
// the other direction, mfc and data_line (the shared data line).
// Also brought out: halt, and pc, ir and upc for observation.
// Timing: synchronous to clk; reset (synchronous, active high) starts the
// fetch at address 0, a choice of this design.
module processor
  import simple_pkg::*;
(
  input  logic  clk,
  input  logic  reset,
  output logic  halt,
  output logic  strobe,
  output logic  read_not_write,
  output word_t addr,
  output word_t wdata,
  input  logic  mfc,
  input  word_t data_line,
  output word_t pc,
  output word_t ir,
  output upc_t  upc
);

  uinstr_t u;

  control u_ctl (
    .clk(clk), .rst(reset), .ir(ir), .mfc(mfc), .u(u), .halt(halt), .upc(upc)
  );

  datapath u_dp (
    .clk(clk), .rst(reset), .u(u), .mfc(mfc), .mem_line(data_line),
    .ir(ir), .pc(pc), .mar(addr), .mdr(wdata),
    .strobe(strobe), .read_not_write(read_not_write)
  );

endmodule
