// simple_memory: a plain memory array built from decoder, word registers and
// an output selector.
//
// The address goes through a decoder; each decoder line, ANDed with the
// write strobe (strobe high and read_not_write low), loads one word register
// from data_in. The word picked by the address is always presented on
// data_out: every word has an output driver enabled by its decoder line, and
// the drivers share one output line, so exactly one of them drives it. Here
// that shared line is written as a selection by address.
// The structure follows the plain-memory drawing; the word count 2**ABITS and
// width DBITS default to the values of the parametric memory model.
//
// Interface: clk; addr (ABITS), read_not_write, strobe, data_in (DBITS) ->
// data_out (DBITS).
// Timing: a write takes effect at the rising clock edge that samples strobe
// high with read_not_write low. data_out follows addr combinationally.
module simple_memory #(
  parameter int unsigned ABITS = 8,
  parameter int unsigned DBITS = 16
) (
  input  logic             clk,
  input  logic [ABITS-1:0] addr,
  input  logic             read_not_write,
  input  logic             strobe,
  input  logic [DBITS-1:0] data_in,
  output logic [DBITS-1:0] data_out
);

  localparam int unsigned NWORDS = 1 << ABITS;

  logic              wr;
  logic [NWORDS-1:0] sel;
  logic [DBITS-1:0]  word_q [NWORDS];

  assign wr = strobe & ~read_not_write;

  decoder #(.A(ABITS)) u_dec (.sel(addr), .en(1'b1), .y(sel));

  for (genvar i = 0; i < NWORDS; i++) begin : g_word
    dff #(.WIDTH(DBITS)) u_word (
      .clk(clk), .rst(1'b0), .en(sel[i] & wr), .d(data_in), .q(word_q[i])
    );
  end

  assign data_out = word_q[addr];

endmodule
