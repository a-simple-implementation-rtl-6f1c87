// mips_prog_pkg: test programs and a reference model for the processor
// testbenches.
//
// Memory image: 256 words (1 KiB). Words 0-127 hold the program, byte
// addresses 512-895 are data, and 896-1023 receive a dump of registers
// 1-31 at the end of every program, so one memory compare checks both
// memory and registers. make_program builds a random program: it seeds
// registers 1-8 from data, runs a few loads and stores through a base
// register with negative offsets, then NRAND random add / and / lw / sw,
// dumps the registers and ends with an illegal instruction, which halts the
// processor. ref_run executes an image instruction by instruction and
// returns the final memory, the instruction counts and the cycle count the
// processor should take when memory answers two cycles after a MEMread
// state: 8 for add and and, 11 for lw, 9 for sw and 6 for the halting
// fetch. A memory slower by extra_wait cycles adds that many cycles per read:
// one per instruction fetch and one more for lw.
package mips_prog_pkg;

  typedef logic [31:0] word_t;
  localparam int unsigned NW = 256;
  typedef word_t image_t [NW];

  localparam int unsigned NRAND = 80;
  localparam int CYC_ADD = 8, CYC_AND = 8, CYC_LW = 11, CYC_SW = 9, CYC_HALT = 6;

  function automatic word_t enc_r(int rd, int rs, int rt, int funct);
    return (word_t'(rs) << 21) | (word_t'(rt) << 16) | (word_t'(rd) << 11) | word_t'(funct);
  endfunction
  function automatic word_t enc_add(int rd, int rs, int rt); return enc_r(rd, rs, rt, 'h20); endfunction
  function automatic word_t enc_and(int rd, int rs, int rt); return enc_r(rd, rs, rt, 'h24); endfunction
  function automatic word_t enc_i(int op, int rt, int imm, int rs);
    return (word_t'(op) << 26) | (word_t'(rs) << 21) | (word_t'(rt) << 16) | word_t'(imm & 'hFFFF);
  endfunction
  function automatic word_t enc_lw(int rt, int imm, int rs); return enc_i('h23, rt, imm, rs); endfunction
  function automatic word_t enc_sw(int rt, int imm, int rs); return enc_i('h2B, rt, imm, rs); endfunction

  localparam word_t ILLEGAL = 32'hFFFF_FFFF;

  // random word address in the data area, as a byte offset from 0
  function automatic int data_addr();
    return 512 + 4 * $urandom_range(0, 95);
  endfunction

  function automatic void make_program(ref image_t m);
    int pc;
    for (int i = 0; i < NW; i++) m[i] = $urandom;
    for (int i = 0; i < 128; i++) m[i] = ILLEGAL;
    pc = 0;
    for (int r = 1; r <= 8; r++) begin m[pc] = enc_lw(r, data_addr(), 0); pc++; end
    // base register 30 = 768, then negative offsets from it
    m[600 / 4] = 32'd768;
    m[pc] = enc_lw(30, 600, 0);   pc++;
    m[pc] = enc_sw(1, -8, 30);    pc++;
    m[pc] = enc_lw(9, -8, 30);    pc++;
    m[pc] = enc_add(10, 9, 30);   pc++;
    for (int i = 0; i < NRAND; i++) begin
      int k, d, s, t;
      k = $urandom_range(0, 3);
      d = $urandom_range(0, 31);
      s = $urandom_range(0, 31);
      t = $urandom_range(0, 31);
      case (k)
        0: m[pc] = enc_add(d, s, t);
        1: m[pc] = enc_and(d, s, t);
        2: m[pc] = enc_lw(d, data_addr(), 0);
        default: m[pc] = enc_sw(t, data_addr(), 0);
      endcase
      pc++;
    end
    for (int r = 1; r <= 31; r++) begin m[pc] = enc_sw(r, 896 + 4 * r, 0); pc++; end
    m[pc] = ILLEGAL;
  endfunction

  // Instruction-level reference model.
  // extra_wait: cycles each memory read waits beyond the two-cycle answer
  function automatic void ref_run(input image_t m_in, output image_t m, output int cycles,
                                  output int n_add, output int n_and, output int n_lw,
                                  output int n_sw, input int extra_wait = 0);
    word_t r [32];
    word_t pc, ins, ea;
    int rs, rt, rd;
    m = m_in;
    for (int i = 0; i < 32; i++) r[i] = '0;
    pc = 0; cycles = 0; n_add = 0; n_and = 0; n_lw = 0; n_sw = 0;
    for (int guard = 0; guard < 10000; guard++) begin
      ins = m[pc[9:2]];
      pc  = pc + 4;
      cycles += extra_wait;                        // instruction fetch read
      rs = int'(ins[25:21]); rt = int'(ins[20:16]); rd = int'(ins[15:11]);
      ea = r[rs] + {{16{ins[15]}}, ins[15:0]};
      if (ins[31:26] == 0 && ins[10:0] == 11'h20) begin
        if (rd != 0) r[rd] = r[rs] + r[rt];
        cycles += CYC_ADD; n_add++;
      end else if (ins[31:26] == 0 && ins[10:0] == 11'h24) begin
        if (rd != 0) r[rd] = r[rs] & r[rt];
        cycles += CYC_AND; n_and++;
      end else if (ins[31:26] == 6'h23) begin
        if (rt != 0) r[rt] = m[ea[9:2]];
        cycles += CYC_LW + extra_wait; n_lw++;
      end else if (ins[31:26] == 6'h2B) begin
        m[ea[9:2]] = r[rt];
        cycles += CYC_SW; n_sw++;
      end else begin
        cycles += CYC_HALT;
        return;
      end
    end
  endfunction

endpackage
