// badc_ucode_pkg: the BADC microprogram and the helpers that assemble it.
//
// Each helper fills one group of microword fields and leaves the others
// zero, so a microinstruction is written as the OR of the operations it
// performs in one cycle, in the spirit of coding several compatible
// operations on one line: for example
//   u_alu(1, 1, FN_ADD, SRC_ZB, DST_RAMA, 1) | u_op(OP_WYMA)
// sends R1 to the memory address register and increments R1. Every word
// must contain exactly one u_alu() or u_nop() (the destination field).
//
// The program (PROM contents, function prom_word) holds:
//   0x000  reset: clear the CAMAC pointers, set Q, go idle
//   0x003  idle loop
//   0x040+F  one word per CAMAC function F, the forced-branch vectors
//   0x060  NIM trigger vector: event readout with threshold suppression and
//          quadratic correction of every channel, then LAM
//   0x090  16x16 two's complement multiply subroutine (15 add steps, one
//          subtract step, return), 17 cycles
//   0x0B0  diagnostic scan (CAMAC F27): converts the block of channels given
//          by the control table over and over, so the analog bus can be
//          watched on an oscilloscope; any CAMAC command that forces a
//          branch, or an F9 reset, ends it
// Data memory map used by the program (the map itself is this design's):
//   4*k .. 4*k+3     epsilon, delta, alpha, beta of channel k (k < 608)
//   0x980 ..         output buffer: corrected value, then channel label
//   0xFF0 / 0xFF1    mux start address / channel count (written by host)
//   0xFF2            end pointer of the output buffer (written by program)
// Correction arithmetic (16-bit two's complement, products 32-bit):
//   x = Q - delta;  t = alpha + (beta*x >> 16);  Q' = (t*x >> 12) & 0xFFFF
// which is alpha*x/4096 + beta*x^2/2^28 evaluated with two multiplications.
// The label stored with each value is the multiplexor address
// (station*32 + channel) of the channel.
package badc_ucode_pkg;
  import badc_pkg::*;

  localparam logic [8:0] A_RESET = 9'h000;
  localparam logic [8:0] A_IDLE  = 9'h003;
  localparam logic [8:0] A_VEC   = 9'h040; // CAMAC function vectors
  localparam logic [8:0] A_TRIG  = 9'h060; // NIM trigger vector
  localparam logic [8:0] A_LOOP  = 9'h068;
  localparam logic [8:0] A_SKIP  = 9'h080;
  localparam logic [8:0] A_NEXT  = 9'h081;
  localparam logic [8:0] A_DONE  = 9'h083;
  localparam logic [8:0] A_ERR   = 9'h088;
  localparam logic [8:0] A_MUL   = 9'h090;
  localparam logic [8:0] A_RDH   = 9'h0A8;
  localparam logic [8:0] A_WRH   = 9'h0AA;
  localparam logic [8:0] A_SETRP = 9'h0AC;
  localparam logic [8:0] A_SETWP = 9'h0AD;
  localparam logic [8:0] A_SCAN  = 9'h0B0;

  localparam logic [15:0] M_BUF   = 16'h0980;
  localparam logic [15:0] M_START = 16'h0FF0;
  localparam logic [15:0] M_COUNT = 16'h0FF1;
  localparam logic [15:0] M_END   = 16'h0FF2;

  function automatic uword_t u_alu(int a, int b, func_e fn, src_e sr, dest_e de, bit cin = 0);
    uword_t u = '0;
    u.a = 4'(a); u.b = 4'(b); u.func = fn; u.src = sr; u.dest = de; u.carry = cin;
    return u;
  endfunction

  function automatic uword_t u_nop();
    uword_t u = '0;
    u.dest = DST_NOP;
    return u;
  endfunction

  function automatic uword_t u_imm(logic [15:0] k);
    uword_t u = '0;
    u.konst = 1'b1; u.d = k;
    return u;
  endfunction

  function automatic uword_t u_jmp(brcond_e c, logic [8:0] addr);
    uword_t u = '0;
    u.brcond = c; u.d[15:8] = addr[7:0]; u.d[7] = addr[8];
    return u;
  endfunction

  // encoded operation; device reads also set the status (pause) request
  function automatic uword_t u_op(enc_e e);
    uword_t u = '0;
    {u.ext, u.opcode} = e;
    u.status_req = (e == OP_RMD) || (e == OP_RAD);
    return u;
  endfunction

  function automatic uword_t u_srs(srs_e s);
    uword_t u = '0;
    u.srs = s;
    return u;
  endfunction

  function automatic uword_t u_brk(int n);
    uword_t u = '0;
    u.brk1_req = (n == 1); u.brk2_req = (n == 2);
    return u;
  endfunction

  // register n -> memory address register, register n incremented
  function automatic uword_t u_post_inc_addr(int n);
    return u_alu(n, n, FN_ADD, SRC_ZB, DST_RAMA, 1) | u_op(OP_WYMA);
  endfunction

  // memory word -> register n
  function automatic uword_t u_load(int n);
    return u_alu(0, n, FN_OR, SRC_DZ, DST_RAMF) | u_op(OP_RMD);
  endfunction

  function automatic uword_t u_mstep(bit last);
    return u_alu(9, 7, last ? FN_SUBR : FN_ADD, SRC_ZB, DST_RAMQD, last)
         | u_srs(SRS_ARITH) | u_op(OP_MULT);
  endfunction

  function automatic uword_t prom_word(logic [8:0] addr);
    uword_t u;
    u = u_nop() | u_jmp(BR_UN, A_IDLE); // unused words return to idle
    case (addr)
      // reset
      9'h000: u = u_alu(0, 12, FN_AND, SRC_ZA, DST_RAMF);
      9'h001: u = u_alu(0, 13, FN_AND, SRC_ZA, DST_RAMF) | u_op(OP_RSTL);
      9'h002: u = u_nop() | u_op(OP_SETQ);
      A_IDLE: u = u_nop() | u_jmp(BR_UN, A_IDLE);
      // CAMAC vectors (others fall to the default: back to idle)
      A_VEC + 9'd0:  u = u_nop() | u_jmp(BR_UN, A_RDH);
      A_VEC + 9'd10: u = u_nop() | u_op(OP_RSTL) | u_jmp(BR_UN, A_IDLE);
      A_VEC + 9'd16: u = u_nop() | u_jmp(BR_UN, A_WRH);
      A_VEC + 9'd17: u = u_nop() | u_jmp(BR_UN, A_SETRP);
      A_VEC + 9'd18: u = u_nop() | u_jmp(BR_UN, A_SETWP);
      A_VEC + 9'd25: u = u_nop() | u_jmp(BR_UN, A_TRIG);
      A_VEC + 9'd27: u = u_nop() | u_jmp(BR_UN, A_SCAN);
      // event readout
      A_TRIG + 9'd0: u = u_alu(0, 1, FN_AND, SRC_ZA, DST_RAMF) | u_op(OP_RSTQ);
      A_TRIG + 9'd1: u = u_alu(0, 2, FN_OR, SRC_DZ, DST_RAMF) | u_imm(M_BUF);
      A_TRIG + 9'd2: u = u_alu(0, 0, FN_OR, SRC_DZ, DST_NOP) | u_imm(M_START) | u_op(OP_WYMA);
      A_TRIG + 9'd3: u = u_load(4);
      A_TRIG + 9'd4: u = u_alu(0, 0, FN_OR, SRC_DZ, DST_NOP) | u_imm(M_COUNT) | u_op(OP_WYMA);
      A_TRIG + 9'd5: u = u_load(3);
      A_TRIG + 9'd6: u = u_nop() | u_op(OP_CRATE_ON);
      A_TRIG + 9'd7: u = u_alu(4, 0, FN_OR, SRC_ZA, DST_NOP) | u_op(OP_WMSAI);
      A_LOOP + 9'd0:  u = u_alu(0, 5, FN_OR, SRC_DZ, DST_RAMF) | u_op(OP_RAD)
                        | u_brk(2) | u_jmp(BR_UN, A_ERR);
      A_LOOP + 9'd1:  u = u_post_inc_addr(1);                      // epsilon
      A_LOOP + 9'd2:  u = u_load(6);
      A_LOOP + 9'd3:  u = u_alu(6, 5, FN_SUBR, SRC_AB, DST_NOP, 1) | u_jmp(BR_N, A_SKIP);
      A_LOOP + 9'd4:  u = u_post_inc_addr(1);                      // delta
      A_LOOP + 9'd5:  u = u_load(6);
      A_LOOP + 9'd6:  u = u_alu(6, 5, FN_SUBR, SRC_AB, DST_RAMF, 1); // x
      A_LOOP + 9'd7:  u = u_post_inc_addr(1);                      // alpha
      A_LOOP + 9'd8:  u = u_load(8);
      A_LOOP + 9'd9:  u = u_post_inc_addr(1);                      // beta
      A_LOOP + 9'd10: u = u_alu(0, 0, FN_OR, SRC_DZ, DST_QREG) | u_op(OP_RMD);
      A_LOOP + 9'd11: u = u_alu(5, 9, FN_OR, SRC_ZA, DST_RAMF);
      A_LOOP + 9'd12: u = u_alu(7, 7, FN_AND, SRC_ZA, DST_RAMF) | u_op(OP_PUSH) | u_jmp(BR_UN, A_MUL);
      A_LOOP + 9'd13: u = u_alu(8, 7, FN_ADD, SRC_AB, DST_RAMF);   // t
      A_LOOP + 9'd14: u = u_alu(7, 0, FN_OR, SRC_ZA, DST_QREG);
      A_LOOP + 9'd15: u = u_alu(7, 7, FN_AND, SRC_ZA, DST_RAMF) | u_op(OP_PUSH) | u_jmp(BR_UN, A_MUL);
      A_LOOP + 9'd16,
      A_LOOP + 9'd17,
      A_LOOP + 9'd18,
      A_LOOP + 9'd19: u = u_alu(0, 7, FN_OR, SRC_ZB, DST_RAMQU) | u_srs(SRS_FILL0);
      A_LOOP + 9'd20: u = u_post_inc_addr(2);
      A_LOOP + 9'd21: u = u_alu(7, 0, FN_OR, SRC_ZA, DST_NOP) | u_op(OP_WYM);
      A_LOOP + 9'd22: u = u_post_inc_addr(2);
      A_LOOP + 9'd23: u = u_alu(4, 0, FN_OR, SRC_ZA, DST_NOP) | u_op(OP_WYM) | u_jmp(BR_UN, A_NEXT);
      A_SKIP:         u = u_alu(1, 1, FN_ADD, SRC_DA, DST_RAMF) | u_imm(16'd3);
      A_NEXT:         u = u_alu(0, 4, FN_ADD, SRC_ZB, DST_RAMF, 1);
      A_NEXT + 9'd1:  u = u_alu(0, 3, FN_SUBR, SRC_ZB, DST_RAMF, 0) | u_jmp(BR_NZ, A_LOOP);
      A_DONE + 9'd0:  u = u_alu(0, 0, FN_OR, SRC_DZ, DST_NOP) | u_imm(M_END) | u_op(OP_WYMA);
      A_DONE + 9'd1:  u = u_alu(2, 0, FN_OR, SRC_ZA, DST_NOP) | u_op(OP_WYM);
      A_DONE + 9'd2:  u = u_nop() | u_op(OP_CRATE_OFF);
      A_DONE + 9'd3:  u = u_nop() | u_op(OP_SETL);
      A_DONE + 9'd4:  u = u_nop() | u_op(OP_SETQ) | u_jmp(BR_UN, A_IDLE);
      A_ERR + 9'd0:   u = u_nop() | u_op(OP_SETBRK);
      A_ERR + 9'd1:   u = u_nop() | u_op(OP_CRATE_OFF);
      A_ERR + 9'd2:   u = u_nop() | u_op(OP_SETL);
      A_ERR + 9'd3:   u = u_nop() | u_op(OP_SETQ) | u_jmp(BR_UN, A_IDLE);
      // multiply: A = R9 multiplicand, Q multiplier, R7 = 0; product in R7:Q
      A_MUL + 9'd15:  u = u_mstep(1'b1);
      A_MUL + 9'd16:  u = u_nop() | u_op(OP_POP);
      // CAMAC handlers: read buffer word (R buffer already holds it, fetch next)
      A_RDH + 9'd0:   u = u_post_inc_addr(12);
      A_RDH + 9'd1:   u = u_nop() | u_op(OP_RMD) | u_jmp(BR_UN, A_IDLE);
      A_WRH + 9'd0:   u = u_post_inc_addr(13);
      A_WRH + 9'd1:   u = u_alu(0, 0, FN_OR, SRC_DZ, DST_NOP) | u_op(OP_WYMCWD) | u_jmp(BR_UN, A_IDLE);
      A_SETRP:        u = u_alu(0, 12, FN_OR, SRC_DZ, DST_RAMF) | u_op(OP_CWD) | u_jmp(BR_UN, A_RDH);
      A_SETWP:        u = u_alu(0, 13, FN_OR, SRC_DZ, DST_RAMF) | u_op(OP_CWD) | u_jmp(BR_UN, A_IDLE);
      // diagnostic scan: R4 start address, R3 count, R10 channels left
      A_SCAN + 9'd0:  u = u_alu(0, 0, FN_OR, SRC_DZ, DST_NOP) | u_imm(M_START) | u_op(OP_WYMA);
      A_SCAN + 9'd1:  u = u_load(4);
      A_SCAN + 9'd2:  u = u_alu(0, 0, FN_OR, SRC_DZ, DST_NOP) | u_imm(M_COUNT) | u_op(OP_WYMA);
      A_SCAN + 9'd3:  u = u_load(3);
      A_SCAN + 9'd4:  u = u_nop() | u_op(OP_CRATE_ON);
      A_SCAN + 9'd5:  u = u_alu(3, 10, FN_OR, SRC_ZA, DST_RAMF);
      A_SCAN + 9'd6:  u = u_alu(4, 0, FN_OR, SRC_ZA, DST_NOP) | u_op(OP_WMSAI);
      A_SCAN + 9'd7:  u = u_alu(0, 5, FN_OR, SRC_DZ, DST_RAMF) | u_op(OP_RAD);
      A_SCAN + 9'd8:  u = u_alu(0, 10, FN_SUBR, SRC_ZB, DST_RAMF, 0) | u_jmp(BR_NZ, A_SCAN + 9'd7);
      A_SCAN + 9'd9:  u = u_nop() | u_jmp(BR_UN, A_SCAN + 9'd5);
      default: begin
        if (addr >= A_MUL && addr < A_MUL + 9'd15) u = u_mstep(1'b0);
      end
    endcase
    return u;
  endfunction
endpackage
