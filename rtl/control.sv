// control: the processor's control state machine, written as a control store.
//
// Each state is one microinstruction of the control store (simple_pkg::ucode)
// and names the control signals active in it. The program is the one the
// processor is specified with: the instruction fetch (PCout, MARin, MEMread,
// Yin / CONST(4), ALUadd, Zin, UNTILmfc / MDRout, IRin / JUMPop, Zout, PCin),
// a HALT for an instruction no decode entry matches, and the sequences of
// add, and, lw and sw, each ending with JUMP(Start).
//
// Next state: UNTILmfc repeats the state while mfc is low. JUMP(label) goes
// to the label. JUMPop goes to the label of the first decode-table entry with
// (IR & mask) == match, and falls through to the next state (the HALT) when
// none matches. Otherwise the next state in the store follows. HALT stops
// the machine at the end of its state: halt rises and the control word
// becomes all-idle from then on. Reset returns to Start.
// State numbering, the decode-table order and the idle word after HALT are
// this design's choices.
//
// Interface: clk, rst; ir, mfc -> u (control word of this cycle), halt,
// upc (state number).
// Timing: one state per clock cycle; u is combinational from the state.
module control
  import simple_pkg::*;
(
  input  logic    clk,
  input  logic    rst,
  input  word_t   ir,
  input  logic    mfc,
  output uinstr_t u,
  output logic    halt,
  output upc_t    upc
);

  uinstr_t cur;
  upc_t    upc_d, dec_label;
  logic    dec_hit;

  assign cur = ucode(upc);
  assign u   = halt ? nop() : cur;

  // Instruction decode: first entry whose masked IR matches.
  always_comb begin
    dec_hit   = 1'b0;
    dec_label = '0;
    for (int i = NDEC - 1; i >= 0; i--) begin
      if ((ir & DEC_MASK[i]) == DEC_MATCH[i]) begin
        dec_hit   = 1'b1;
        dec_label = DEC_LABEL[i];
      end
    end
  end

  always_comb begin
    upc_d = upc + upc_t'(1);
    if (cur.until_mfc && !mfc) begin
      upc_d = upc;
    end else begin
      unique case (cur.nxt)
        NXT_JUMP:   upc_d = cur.target;
        NXT_JUMPOP: if (dec_hit) upc_d = dec_label;
        default:    ;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      upc  <= L_START;
      halt <= 1'b0;
    end else if (!halt) begin
      upc <= upc_d;
      if (cur.halt) halt <= 1'b1;
    end
  end

endmodule
