// regfile: the 32 general registers, with one port on the processor bus.
//
// The register number comes from the rs, rt or rd field of the instruction
// (SELrs, SELrt, SELrd pick which, outside this module) and drives a
// decoder. With we (REGin) high, the decoded register latches wdata at the
// rising clock edge; rdata always shows the selected register, for REGout
// to put on the bus. Register 0 reads as zero and ignores writes, and all
// registers reset to zero; both are this design's choices (the first
// follows the MIPS convention).
//
// Interface: clk, rst; addr (5 bits), we, wdata -> rdata.
// Timing: write at the clock edge; read combinational.
module regfile
  import simple_pkg::*;
#(
  parameter int unsigned NREGS = 32
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic [$clog2(NREGS)-1:0] addr,
  input  logic                     we,
  input  word_t                    wdata,
  output word_t                    rdata
);

  localparam int unsigned AW = $clog2(NREGS);

  logic [NREGS-1:0] sel;
  word_t            r_q [NREGS];

  decoder #(.A(AW)) u_dec (.sel(addr), .en(we), .y(sel));

  assign r_q[0] = '0;
  for (genvar i = 1; i < NREGS; i++) begin : g_reg
    dff #(.WIDTH(32)) u_r (
      .clk(clk), .rst(rst), .en(sel[i]), .d(wdata), .q(r_q[i])
    );
  end

  assign rdata = r_q[addr];

endmodule
