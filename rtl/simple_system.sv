// simple_system: the processor and its main memory.
//
// The processor (control plus datapath) talks to memory over five groups of
// wires: MFC from memory to processor; read/~write, strobe and the address
// from processor to memory; and one bidirectional data line (rw_data_bus)
// whose direction read/~write sets. The memory holds 2**ABITS words of 32
// bits; the processor's byte address selects word addr[ABITS+1:2], and the
// low two bits and the bits above are ignored.
//
// A host port loads the program and reads results back. It owns the memory
// interface while the processor is held in reset or has halted, and the
// processor owns it otherwise. The host port, the word addressing and the
// reset-time handover are this design's choices.
//
// Interface: clk, reset (synchronous, active high), halt; host_strobe,
// host_read_not_write, host_addr (byte address), host_wdata -> host_rdata,
// host_mfc, which follow the memory handshake (see memory); pc, ir and upc
// show the processor's state.
// Timing: one processor state per clock. Memory answers a read one edge
// after its strobe, so mfc is seen two cycles after a MEMread state.
module simple_system
  import simple_pkg::*;
#(
  parameter int unsigned ABITS       = 8,
  parameter int unsigned READ_CYCLES = 1
) (
  input  logic  clk,
  input  logic  reset,
  output logic  halt,
  input  logic  host_strobe,
  input  logic  host_read_not_write,
  input  word_t host_addr,
  input  word_t host_wdata,
  output word_t host_rdata,
  output logic  host_mfc,
  output word_t pc,
  output word_t ir,
  output upc_t  upc
);

  logic  cpu_strobe, cpu_rnw, host_owns;
  word_t cpu_addr, cpu_wdata, line, mem_dread;
  logic  m_strobe, m_rnw, mfc;
  word_t m_addr, m_out;

  processor u_proc (
    .clk(clk), .reset(reset), .halt(halt),
    .strobe(cpu_strobe), .read_not_write(cpu_rnw),
    .addr(cpu_addr), .wdata(cpu_wdata),
    .mfc(mfc), .data_line(line),
    .pc(pc), .ir(ir), .upc(upc)
  );

  // Who drives the memory interface.
  assign host_owns = reset | halt;
  assign m_strobe  = host_owns ? host_strobe         : cpu_strobe;
  assign m_rnw     = host_owns ? host_read_not_write : cpu_rnw;
  assign m_addr    = host_owns ? host_addr           : cpu_addr;
  assign m_out     = host_owns ? host_wdata          : cpu_wdata;

  rw_data_bus #(.DBITS(32)) u_line (
    .read_not_write(m_rnw), .cpu_out(m_out), .mem_out(mem_dread), .line(line)
  );

  memory #(.ABITS(ABITS), .DBITS(32), .READ_CYCLES(READ_CYCLES)) u_mem (
    .clk(clk), .rst(reset), .strobe(m_strobe), .read_not_write(m_rnw),
    .addr(m_addr[ABITS+1:2]), .dwrite(line), .dread(mem_dread), .mfc(mfc)
  );

  assign host_rdata = line;
  assign host_mfc   = mfc;

endmodule
