// tb_badc_cpu: two parts. First, random microwords are applied and the
// CPU's decode is compared with a reference that reads the raw bit
// positions: the encoded-operation strobes, the D-bus source, the branch
// decision (flag conditions and breakpoint tests), the long-cycle and pause
// requests. Second, a short microprogram runs on the CPU with a memory
// model: a 16x16 multiply through the call/return subroutine (checked
// against a reference product, and for its 17-cycle length), a memory read,
// the CAMAC W buffer and the ADC data summed and stored, and breakpoint-1
// set, tested and cleared.
module tb_badc_cpu;
  import badc_pkg::*;
  import badc_ucode_pkg::*;
  import tb_badc_pkg::*;
  timeunit 1ns; timeprecision 1ps;
  logic clk = 1'b0;
  always #20 clk = ~clk;

  logic rst, cpu_en, force_pend, force_ack, brk2, brk1, long_cyc, pause_req, taken;
  logic [8:0] upc, force_addr;
  uword_t uw;
  logic [15:0] mem_rdata, w_buf, rad_data, d_bus, y;
  flags_t flags; ctl_t ctl;

  badc_cpu dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++; if (!ok) begin failures++; if (failures < 12) $display("FAIL: %s", what); end
  endtask

  // ---- memory model ----
  logic [15:0] mem [4096];
  logic [11:0] mar;
  logic        wrote [4096];
  assign mem_rdata = mem[mar];
  always @(posedge clk) if (cpu_en) begin
    if (ctl.wyma) mar <= y[11:0];
    if (ctl.wym) begin mem[mar] <= y; wrote[mar] <= 1'b1; end
  end

  // ---- program for part two ----
  uword_t prog [512];
  logic   run_prog;
  uword_t rnd_word;
  assign uw = run_prog ? prog[upc] : rnd_word;

  function automatic uword_t wr_imm(logic [15:0] a);
    return u_alu(0, 0, FN_OR, SRC_DZ, DST_NOP) | u_imm(a) | u_op(OP_WYMA);
  endfunction

  logic [4:0] enc;
  logic [15:0] exp_d;
  bit exp_taken, c, breq;
  int mul_cycles, cyc;
  logic [15:0] ma, mb, mm, ww, rr;

  initial begin
    rst = 1; cpu_en = 0; force_pend = 0; force_addr = 0; brk2 = 0; run_prog = 0; rnd_word = '0;
    w_buf = 0; rad_data = 0; mar = 0;
    foreach (wrote[i]) wrote[i] = 1'b0;
    foreach (mem[i]) mem[i] = 16'd0;
    repeat (2) @(posedge clk); #1 rst = 0;
    // ---- part one: decode ----
    for (int n = 0; n < 4000; n++) begin
      rnd_word = {16'($urandom), 32'($urandom)};
      w_buf = 16'($urandom); rad_data = 16'($urandom); brk2 = 1'($urandom);
      mar = 12'($urandom);
      #1;
      enc = {rnd_word[43], rnd_word[47:44]};
      check(ctl.push == (enc == 5'h01) && ctl.pop == (enc == 5'h02) && ctl.setbrk == (enc == 5'h08) &&
            ctl.clrbrk == (enc == 5'h09) && ctl.rstq == (enc == 5'h0A) && ctl.setl == (enc == 5'h0B) &&
            ctl.rstl == (enc == 5'h0C) && ctl.setq == (enc == 5'h0D) && ctl.mult == (enc == 5'h0F) &&
            ctl.rmd == (enc == 5'h11) && ctl.wym == (enc == 5'h12 || enc == 5'h15) &&
            ctl.wyma == (enc == 5'h13) && ctl.cwd == (enc == 5'h14 || enc == 5'h15) &&
            ctl.wtd == (enc == 5'h16) && ctl.wmsa == (enc == 5'h18) && ctl.wmsai == (enc == 5'h19) &&
            ctl.rad == (enc == 5'h1A) && ctl.crate_on == (enc == 5'h03) &&
            ctl.crate_off == (enc == 5'h04) && ctl.clr_host == (enc == 5'h05),
            $sformatf("decode of encoded operation %h", enc));
      exp_d = rnd_word[16] ? rnd_word[15:0] : (enc == 5'h11) ? mem[mar] : (enc == 5'h1A) ? rad_data :
              (enc == 5'h14 || enc == 5'h15) ? w_buf : 16'd0;
      check(d_bus == exp_d, "D bus source");
      case (rnd_word[19:17])
        3'd0: c = 0; 3'd1: c = 1; 3'd2: c = flags.z; 3'd3: c = !flags.z;
        3'd4: c = flags.n; 3'd5: c = !flags.n; 3'd6: c = flags.ovr; default: c = flags.c;
      endcase
      breq = rnd_word[41] || rnd_word[42];
      exp_taken = (rnd_word[19:17] != 0) && (breq ? ((rnd_word[41] && brk1) || (rnd_word[42] && brk2)) : c);
      check(taken == exp_taken, $sformatf("branch decision, cond %0d", rnd_word[19:17]));
      check(long_cyc == (breq || rnd_word[19:17] > 1), "long cycle request");
      check(pause_req == rnd_word[40], "pause request");
      check(flags.n == d_bus[15] || rnd_word[28:26] != 3'd7 || rnd_word[25:23] != 3'd3 || enc == 5'h0F,
            "D reaches the ALU");
    end
    // ---- part two: program ----
    ma = 16'($urandom); mb = 16'($urandom); mm = 16'($urandom_range(0, 1000));
    ww = 16'($urandom_range(0, 1000)); rr = 16'($urandom_range(0, 4095));
    foreach (prog[i]) prog[i] = u_nop() | u_jmp(BR_UN, 9'd23);
    prog[0]  = u_alu(0, 9, FN_OR, SRC_DZ, DST_RAMF) | u_imm(ma);
    prog[1]  = u_alu(0, 0, FN_OR, SRC_DZ, DST_QREG) | u_imm(mb);
    prog[2]  = u_alu(7, 7, FN_AND, SRC_ZA, DST_RAMF) | u_op(OP_PUSH) | u_jmp(BR_UN, 9'h090);
    prog[3]  = wr_imm(16'h200);
    prog[4]  = u_alu(7, 0, FN_OR, SRC_ZA, DST_NOP) | u_op(OP_WYM);
    prog[5]  = wr_imm(16'h201);
    prog[6]  = u_alu(0, 0, FN_OR, SRC_ZQ, DST_NOP) | u_op(OP_WYM);
    prog[7]  = wr_imm(16'h010);
    prog[8]  = u_alu(0, 4, FN_OR, SRC_DZ, DST_RAMF) | u_op(OP_RMD);
    prog[9]  = u_alu(0, 5, FN_OR, SRC_DZ, DST_RAMF) | u_op(OP_CWD);
    prog[10] = u_alu(0, 6, FN_OR, SRC_DZ, DST_RAMF) | u_op(OP_RAD) | u_brk(2) | u_jmp(BR_UN, 9'd23);
    prog[11] = u_alu(5, 4, FN_ADD, SRC_AB, DST_RAMF);
    prog[12] = u_alu(6, 4, FN_ADD, SRC_AB, DST_RAMF);
    prog[13] = wr_imm(16'h202);
    prog[14] = u_alu(4, 0, FN_OR, SRC_ZA, DST_NOP) | u_op(OP_WYM);
    prog[15] = u_nop() | u_op(OP_SETBRK);
    prog[16] = u_nop() | u_brk(1) | u_jmp(BR_UN, 9'd19);
    prog[17] = wr_imm(16'h203);
    prog[18] = u_alu(0, 0, FN_OR, SRC_DZ, DST_NOP) | u_imm(16'h0BAD) | u_op(OP_WYM);
    prog[19] = u_nop() | u_op(OP_CLRBRK);
    prog[20] = u_nop() | u_brk(1) | u_jmp(BR_UN, 9'd17);
    prog[21] = wr_imm(16'h204);
    prog[22] = u_alu(0, 0, FN_OR, SRC_DZ, DST_NOP) | u_imm(16'h600D) | u_op(OP_WYM);
    for (int k = 0; k < 15; k++) prog[9'h090 + k] = u_mstep(1'b0);
    prog[9'h09F] = u_mstep(1'b1);
    prog[9'h0A0] = u_nop() | u_op(OP_POP);
    mem[16'h010] = mm; w_buf = ww; rad_data = rr; brk2 = 0;
    rst = 1; @(posedge clk); #1 rst = 0; run_prog = 1;
    mul_cycles = 0; cyc = 0;
    while (upc != 9'd23 && cyc < 200) begin
      repeat (4) @(posedge clk);
      #1 if (upc >= 9'h090 && upc <= 9'h0A0) mul_cycles++;
      cpu_en = 1; @(posedge clk); #1 cpu_en = 0; cyc++;
    end
    check(upc == 9'd23, "program reached its end");
    check({mem[12'h200], mem[12'h201]} == smul(ma, mb),
          $sformatf("product %h*%h = %h%h, expected %h", ma, mb, mem[12'h200], mem[12'h201], smul(ma, mb)));
    check(mul_cycles == 17, $sformatf("multiply subroutine took %0d cycles", mul_cycles));
    check(mem[12'h202] == mm + ww + rr, "memory + W buffer + ADC data");
    check(!wrote[12'h203], "breakpoint-1 branch skipped the store");
    check(mem[12'h204] == 16'h600D, "cleared breakpoint falls through");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #10ms; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
