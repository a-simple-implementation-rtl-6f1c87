// datapath: the processor's registers, ALU and register file around one bus.
//
// IR, PC, MAR, MDR, Y and Z each sit on the single internal bus (cpu_bus).
// In every clock cycle the control word u names at most one driver of the
// bus and any number of registers that latch the bus at the trailing
// (rising) clock edge. Y feeds one ALU input and the bus the other; Z keeps
// the ALU result on Zin. The instruction register also drives three fields:
//   IRaddout     {PC[31:26], IR[25:0]}              (J-format address)
//   IRimmedout   sign-extended IR[15:0]             (I-format immediate)
//   IRoffsetout  sign-extended IR[15:0] shifted by 2 (branch offset)
// SELrs / SELrt / SELrd pick IR[25:21], IR[20:16] or IR[15:11] as the
// register file number. PCinif0 loads the PC only when Z is zero.
//
// Memory side: MAR is the address and MDR the write data. A MEMread or
// MEMwrite state is registered into a one-cycle strobe in the next cycle,
// when MAR (and MDR) already hold the values latched in that state;
// read_not_write is held from the last request until the next one. After a
// read, MDR takes the data line in the cycle mfc is seen high; a state that
// names MDRin has priority. Registering the request, and these priorities,
// are this design's choices.
//
// Interface: clk, rst; u (control word), mfc, mem_line (shared data line)
// -> ir, pc, mar, mdr, strobe, read_not_write.
// Timing: all registers change at the rising edge; reset clears them all.
module datapath
  import simple_pkg::*;
(
  input  logic    clk,
  input  logic    rst,
  input  uinstr_t u,
  input  logic    mfc,
  input  word_t   mem_line,
  output word_t   ir,
  output word_t   pc,
  output word_t   mar,
  output word_t   mdr,
  output logic    strobe,
  output logic    read_not_write
);

  word_t bus, y, z, alu_z, reg_rdata, mdr_d;
  word_t src [NDRV];
  logic  [4:0] reg_addr;
  logic  pc_load, mdr_load, rd_pending_q;

  // ---- bus ----
  always_comb begin
    src[DRV_PC]       = pc;
    src[DRV_MAR]      = mar;
    src[DRV_MDR]      = mdr;
    src[DRV_Y]        = y;
    src[DRV_Z]        = z;
    src[DRV_REG]      = reg_rdata;
    src[DRV_IRADDR]   = {pc[31:26], ir[25:0]};
    src[DRV_IRIMMED]  = {{16{ir[15]}}, ir[15:0]};
    src[DRV_IROFFSET] = {{14{ir[15]}}, ir[15:0], 2'b00};
    src[DRV_CONST]    = u.const_val;
  end

  cpu_bus #(.N(NDRV), .W(32)) u_bus (
    .clk(clk), .rst(rst), .en(u.out), .src(src), .bus(bus)
  );

  // ---- registers ----
  assign pc_load = u.pc_in | (u.pc_in_if0 & (z == '0));

  dff #(.WIDTH(32)) u_ir  (.clk(clk), .rst(rst), .en(u.ir_in),  .d(bus), .q(ir));
  dff #(.WIDTH(32)) u_pc  (.clk(clk), .rst(rst), .en(pc_load),  .d(bus), .q(pc));
  dff #(.WIDTH(32)) u_mar (.clk(clk), .rst(rst), .en(u.mar_in), .d(bus), .q(mar));
  dff #(.WIDTH(32)) u_y   (.clk(clk), .rst(rst), .en(u.y_in),   .d(bus), .q(y));
  dff #(.WIDTH(32)) u_z   (.clk(clk), .rst(rst), .en(u.z_in),   .d(alu_z), .q(z));

  // MDR: from the bus on MDRin, else from memory when a read completes.
  assign mdr_load = u.mdr_in | (rd_pending_q & mfc);
  assign mdr_d    = u.mdr_in ? bus : mem_line;
  dff #(.WIDTH(32)) u_mdr (.clk(clk), .rst(rst), .en(mdr_load), .d(mdr_d), .q(mdr));

  // ---- ALU ----
  alu u_alu (.op(u.alu_op), .y(y), .b(bus), .z(alu_z));

  // ---- register file ----
  always_comb begin
    unique case (u.sel)
      SEL_RS:  reg_addr = ir[25:21];
      SEL_RT:  reg_addr = ir[20:16];
      SEL_RD:  reg_addr = ir[15:11];
      default: reg_addr = ir[25:21];
    endcase
  end

  regfile #(.NREGS(32)) u_rf (
    .clk(clk), .rst(rst), .addr(reg_addr), .we(u.reg_in),
    .wdata(bus), .rdata(reg_rdata)
  );

  // ---- memory request ----
  always_ff @(posedge clk) begin
    if (rst) begin
      strobe         <= 1'b0;
      read_not_write <= 1'b1;
      rd_pending_q   <= 1'b0;
    end else begin
      strobe <= u.mem_read | u.mem_write;
      if (u.mem_read | u.mem_write) read_not_write <= u.mem_read;
      if (u.mem_read)               rd_pending_q   <= 1'b1;
      else if (mfc)                 rd_pending_q   <= 1'b0;
    end
  end

  // A state may not ask for a read and a write at once.
  a_one_request: assert property (@(posedge clk) disable iff (rst)
                                  !(u.mem_read && u.mem_write));

endmodule
