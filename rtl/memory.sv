// memory: main memory with a strobe / read-not-write / memory-fetch-complete
// handshake.
//
// A request is a one-cycle pulse on strobe, with read_not_write telling its
// kind and addr (and, for a write, dwrite) valid in that cycle. At the
// clock edge that samples the strobe, mfc drops. A write stores dwrite at
// that edge, so it takes exactly one cycle, and mfc stays low afterwards. A
// read delivers the addressed word on dread after READ_CYCLES clock edges
// and raises mfc in the same edge; dread and mfc then hold until the next
// request. mfc is also forced low in the cycle that carries a strobe, so a
// requester never mistakes the previous read's mfc for the new one.
// The storage is the plain decoder-and-word-register memory, simple_memory.
// The handshake follows the document's behavioural memory model; counting
// the delay in clock edges instead of simulated time is this design's
// choice. In the processor, which registers its requests, READ_CYCLES = 1
// gives mfc two cycles after the MEMread state, the figure the document
// assumes.
//
// Interface: clk, rst; strobe, read_not_write, addr (ABITS), dwrite
// (DBITS) -> dread (DBITS), mfc.
// Timing: see above. A new strobe must not arrive while a read is in flight.
module memory #(
  parameter int unsigned ABITS       = 8,
  parameter int unsigned DBITS       = 16,
  parameter int unsigned READ_CYCLES = 1
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             strobe,
  input  logic             read_not_write,
  input  logic [ABITS-1:0] addr,
  input  logic [DBITS-1:0] dwrite,
  output logic [DBITS-1:0] dread,
  output logic             mfc
);

  localparam int unsigned CW = (READ_CYCLES > 1) ? $clog2(READ_CYCLES) + 1 : 1;

  logic             mfc_q;
  logic             busy_q;
  logic [CW-1:0]    cnt_q;
  logic [ABITS-1:0] addr_q;
  logic [ABITS-1:0] mem_addr;
  logic [DBITS-1:0] mem_out;

  // While a read waits, the storage is addressed by the captured address.
  assign mem_addr = strobe ? addr : addr_q;

  simple_memory #(.ABITS(ABITS), .DBITS(DBITS)) u_store (
    .clk(clk), .addr(mem_addr), .read_not_write(read_not_write),
    .strobe(strobe), .data_in(dwrite), .data_out(mem_out)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      mfc_q  <= 1'b0;
      busy_q <= 1'b0;
      cnt_q  <= '0;
      addr_q <= '0;
      dread  <= '0;
    end else if (strobe) begin
      addr_q <= addr;
      mfc_q  <= 1'b0;
      if (read_not_write) begin
        if (READ_CYCLES <= 1) begin
          dread <= mem_out;
          mfc_q <= 1'b1;
        end else begin
          busy_q <= 1'b1;
          cnt_q  <= CW'(READ_CYCLES - 1);
        end
      end
    end else if (busy_q) begin
      if (cnt_q == CW'(1)) begin
        dread  <= mem_out;
        mfc_q  <= 1'b1;
        busy_q <= 1'b0;
      end
      cnt_q <= cnt_q - CW'(1);
    end
  end

  assign mfc = mfc_q & ~strobe;

  // A request may not overlap a read that is still in flight.
  a_no_overlap: assert property (@(posedge clk) disable iff (rst) !(strobe && busy_q));

endmodule
