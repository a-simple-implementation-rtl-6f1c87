// rw_data_bus: the bidirectional data line between processor and memory.
//
// One data line joins the two sides. Each side has an output driver onto
// the line and taps the line as its input. Read/~Write picks the driver:
// high, the memory's driver is on and the processor's is off, so the line
// carries the memory's read data; low, the processor drives its write data
// and the memory's driver is off. Because the two enables are complements,
// the line always has exactly one driver. The driver arrangement follows
// the bidirectional-data drawing; writing the tri-state line as a
// selection is this design's choice.
//
// Interface: read_not_write, cpu_out (data the processor sends), mem_out
// (data the memory sends) -> line (the shared line; both sides read it).
// Purely combinational.
module rw_data_bus #(
  parameter int unsigned DBITS = 32
) (
  input  logic             read_not_write,
  input  logic [DBITS-1:0] cpu_out,
  input  logic [DBITS-1:0] mem_out,
  output logic [DBITS-1:0] line
);

  logic cpu_drive, mem_drive;

  assign mem_drive = read_not_write;
  assign cpu_drive = ~read_not_write;

  always_comb begin
    line = '0;
    if (cpu_drive) line = cpu_out;
    if (mem_drive) line = mem_out;
  end

endmodule
