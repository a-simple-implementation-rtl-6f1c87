// simple_pkg: types and constants shared by the single-bus processor.
//
// The processor is driven by a control store of microinstructions. Each
// microinstruction is one state of the control state machine and names the
// control signals active in that state: which unit drives the bus (the "out"
// signals), which registers latch the bus at the trailing clock edge (the "in"
// signals), the ALU operation, which instruction field selects the register
// file entry, memory requests, and how to choose the next state.
// Signal names follow the processor's control-signal list (PCout, MARin,
// ALUadd, UNTILmfc, JUMPop, ...). The field widths, the encodings and the
// microinstruction layout are this design's own choice.
package simple_pkg;

  typedef logic [31:0] word_t;

  // Bus drivers, one tri-state enable each. The bus carries the value of
  // the single enabled driver.
  typedef enum int unsigned {
    DRV_PC,        // PCout
    DRV_MAR,       // MARout
    DRV_MDR,       // MDRout
    DRV_Y,         // Yout
    DRV_Z,         // Zout
    DRV_REG,       // REGout
    DRV_IRADDR,    // IRaddout
    DRV_IRIMMED,   // IRimmedout
    DRV_IROFFSET,  // IRoffsetout
    DRV_CONST,     // CONST(value)
    DRV_COUNT
  } drv_e;

  localparam int unsigned NDRV = DRV_COUNT;

  typedef enum logic [2:0] {
    ALU_ADD, ALU_AND, ALU_XOR, ALU_OR, ALU_SL, ALU_SLT, ALU_SRL, ALU_SUB
  } alu_op_e;

  typedef enum logic [1:0] { SEL_RS, SEL_RT, SEL_RD } reg_sel_e;

  typedef enum logic [1:0] {
    NXT_SEQ,     // next state in the control store
    NXT_JUMP,    // JUMP(label)
    NXT_JUMPOP   // JUMPop: go to the label matching the instruction in IR
  } next_e;

  localparam int unsigned UPC_W = 5;
  typedef logic [UPC_W-1:0] upc_t;

  // One microinstruction (one control state).
  typedef struct packed {
    // bus drivers ("out" signals), indexed by drv_e
    logic [NDRV-1:0] out;
    word_t           const_val;   // value driven by CONST(value)
    // latch enables ("in" signals)
    logic ir_in, pc_in, pc_in_if0, mar_in, mdr_in, y_in, z_in, reg_in;
    alu_op_e  alu_op;
    reg_sel_e sel;
    logic mem_read, mem_write;
    logic until_mfc;
    logic halt;
    next_e nxt;
    upc_t  target;                // label for JUMP(label)
  } uinstr_t;

  // Control store labels.
  localparam upc_t L_START = 5'd0;   // instruction fetch, 4 states
  localparam upc_t L_ILL   = 5'd4;   // HALT on an illegal instruction
  localparam upc_t L_ADD   = 5'd5;   // 3 states
  localparam upc_t L_AND   = 5'd8;   // 3 states
  localparam upc_t L_LW    = 5'd11;  // 5 states
  localparam upc_t L_SW    = 5'd16;  // 4 states

  // Instruction decode table for JUMPop: if ((IR & mask) == match) goto label.
  // Encodings are the standard MIPS ones.
  localparam int unsigned NDEC = 4;
  localparam word_t DEC_MASK  [NDEC] = '{32'hFC00_07FF, 32'hFC00_07FF,
                                         32'hFC00_0000, 32'hFC00_0000};
  localparam word_t DEC_MATCH [NDEC] = '{32'h0000_0020, 32'h0000_0024,
                                         32'h8C00_0000, 32'hAC00_0000};
  localparam upc_t  DEC_LABEL [NDEC] = '{L_ADD, L_AND, L_LW, L_SW};

  // Helpers for writing the control store.
  function automatic logic [NDRV-1:0] drv(input drv_e d);
    logic [NDRV-1:0] v;
    v = '0;
    v[d] = 1'b1;
    return v;
  endfunction

  function automatic uinstr_t nop();
    uinstr_t u;
    u = '0;
    u.alu_op = ALU_ADD;
    u.sel    = SEL_RS;
    u.nxt    = NXT_SEQ;
    return u;
  endfunction

  // The control store. Each case is one line of the microprogram.
  function automatic uinstr_t ucode(input upc_t a);
    uinstr_t u;
    u = nop();
    unique case (a)
      // Start: PCout, MARin, MEMread, Yin
      5'd0:  begin u.out = drv(DRV_PC); u.mar_in = 1; u.mem_read = 1; u.y_in = 1; end
      // CONST(4), ALUadd, Zin, UNTILmfc
      5'd1:  begin u.out = drv(DRV_CONST); u.const_val = 32'd4; u.alu_op = ALU_ADD;
                   u.z_in = 1; u.until_mfc = 1; end
      // MDRout, IRin
      5'd2:  begin u.out = drv(DRV_MDR); u.ir_in = 1; end
      // JUMPop, Zout, PCin
      5'd3:  begin u.out = drv(DRV_Z); u.pc_in = 1; u.nxt = NXT_JUMPOP; end
      // HALT (no decode entry matched)
      5'd4:  begin u.halt = 1; u.nxt = NXT_JUMP; u.target = L_ILL; end
      // Add: SELrs, REGout, Yin
      5'd5:  begin u.sel = SEL_RS; u.out = drv(DRV_REG); u.y_in = 1; end
      // SELrt, REGout, ALUadd, Zin
      5'd6:  begin u.sel = SEL_RT; u.out = drv(DRV_REG); u.alu_op = ALU_ADD; u.z_in = 1; end
      // Zout, SELrd, REGin, JUMP(Start)
      5'd7:  begin u.out = drv(DRV_Z); u.sel = SEL_RD; u.reg_in = 1;
                   u.nxt = NXT_JUMP; u.target = L_START; end
      // And: SELrs, REGout, Yin
      5'd8:  begin u.sel = SEL_RS; u.out = drv(DRV_REG); u.y_in = 1; end
      // SELrt, REGout, ALUand, Zin
      5'd9:  begin u.sel = SEL_RT; u.out = drv(DRV_REG); u.alu_op = ALU_AND; u.z_in = 1; end
      // Zout, SELrd, REGin, JUMP(Start)
      5'd10: begin u.out = drv(DRV_Z); u.sel = SEL_RD; u.reg_in = 1;
                   u.nxt = NXT_JUMP; u.target = L_START; end
      // Lw: SELrs, REGout, Yin
      5'd11: begin u.sel = SEL_RS; u.out = drv(DRV_REG); u.y_in = 1; end
      // IRimmedout, ALUadd, Zin
      5'd12: begin u.out = drv(DRV_IRIMMED); u.alu_op = ALU_ADD; u.z_in = 1; end
      // Zout, MARin, MEMread
      5'd13: begin u.out = drv(DRV_Z); u.mar_in = 1; u.mem_read = 1; end
      // UNTILmfc
      5'd14: begin u.until_mfc = 1; end
      // MDRout, SELrt, REGin, JUMP(Start)
      5'd15: begin u.out = drv(DRV_MDR); u.sel = SEL_RT; u.reg_in = 1;
                   u.nxt = NXT_JUMP; u.target = L_START; end
      // Sw: SELrt, REGout, MDRin
      5'd16: begin u.sel = SEL_RT; u.out = drv(DRV_REG); u.mdr_in = 1; end
      // SELrs, REGout, Yin
      5'd17: begin u.sel = SEL_RS; u.out = drv(DRV_REG); u.y_in = 1; end
      // IRimmedout, ALUadd, Zin
      5'd18: begin u.out = drv(DRV_IRIMMED); u.alu_op = ALU_ADD; u.z_in = 1; end
      // Zout, MARin, MEMwrite, JUMP(Start)
      5'd19: begin u.out = drv(DRV_Z); u.mar_in = 1; u.mem_write = 1;
                   u.nxt = NXT_JUMP; u.target = L_START; end
      // unused control-store words halt the machine
      default: begin u.halt = 1; u.nxt = NXT_JUMP; u.target = L_ILL; end
    endcase
    return u;
  endfunction

endpackage
