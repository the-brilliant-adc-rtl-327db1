// tb_badc_alu: checks the 16-bit ALU (four Am2901 slices plus the
// shift-rotate multiplexor) against a word-level reference model kept in
// this testbench: random sources, functions, destinations, carries and
// shift modes, with Y, the flags and the register/Q contents compared every
// cycle. A full 16x16 multiply (15 add steps and one subtract step) is run
// on random signed operands and the 32-bit product compared too.
module tb_badc_alu;
  import badc_pkg::*;
  import tb_badc_pkg::*;
  timeunit 1ns; timeprecision 1ps;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic en, carry, mult;
  logic [2:0] dest, func, src;
  logic [3:0] a_addr, b_addr;
  logic [1:0] srs;
  logic [15:0] d, y, f;
  flags_t flags;

  badc_alu dut (.*);

  int checks = 0, failures = 0;
  logic [15:0] rm[16];
  logic [15:0] qm;

  // reference: returns F, flags; applies write-back when commit
  task automatic model(output logic [15:0] ef, output logic [15:0] ey, output flags_t efl, input bit commit);
    logic [15:0] r, s, ar, br;
    logic [16:0] sum;
    logic [2:0] sr;
    logic c15, in15, in0, qin15, qin0, dbl;
    ar = rm[a_addr]; br = rm[b_addr];
    sr = mult ? {src[2], src[1] & ~qm[0], src[0]} : src;
    case (sr)
      3'd0: begin r = ar; s = qm; end
      3'd1: begin r = ar; s = br; end
      3'd2: begin r = 0;  s = qm; end
      3'd3: begin r = 0;  s = br; end
      3'd4: begin r = 0;  s = ar; end
      3'd5: begin r = d;  s = ar; end
      3'd6: begin r = d;  s = qm; end
      default: begin r = d; s = 0; end
    endcase
    efl = '0;
    case (func)
      3'd0, 3'd1, 3'd2: begin
        logic [15:0] x1, x2;
        x1 = (func == 3'd1) ? ~r : r;
        x2 = (func == 3'd2) ? ~s : s;
        sum = {1'b0, x1} + {1'b0, x2} + 17'(carry);
        ef = sum[15:0];
        c15 = (({1'b0, x1[14:0]} + {1'b0, x2[14:0]} + 16'(carry)) >> 15) != 0;
        efl.c = sum[16]; efl.ovr = sum[16] ^ c15;
      end
      3'd3: ef = r | s;
      3'd4: ef = r & s;
      3'd5: ef = ~r & s;
      3'd6: ef = r ^ s;
      default: ef = ~(r ^ s);
    endcase
    efl.z = (ef == 0); efl.n = ef[15];
    ey = (dest == 3'd2) ? ar : ef;
    dbl = (dest == 3'd4) || (dest == 3'd6);
    case (srs)
      2'd0: in15 = 0;
      2'd1: in15 = 1;
      2'd2: in15 = dbl ? qm[0] : ef[0];
      default: in15 = mult ? (ef[15] ^ efl.ovr) : ef[15];
    endcase
    qin15 = ef[0];
    case (srs)
      2'd1: begin in0 = dbl ? qm[15] : 1'b1; qin0 = 1; end
      2'd2: begin in0 = dbl ? qm[15] : ef[15]; qin0 = ef[15]; end
      default: begin in0 = dbl ? qm[15] : 1'b0; qin0 = 0; end
    endcase
    if (commit) begin
      case (dest)
        3'd0: qm = ef;
        3'd2, 3'd3: rm[b_addr] = ef;
        3'd4: begin rm[b_addr] = {in15, ef[15:1]}; qm = {qin15, qm[15:1]}; end
        3'd5: rm[b_addr] = {in15, ef[15:1]};
        3'd6: begin rm[b_addr] = {ef[14:0], in0}; qm = {qm[14:0], qin0}; end
        3'd7: rm[b_addr] = {ef[14:0], in0};
        default: ;
      endcase
    end
  endtask

  task automatic step_check(string tag);
    logic [15:0] ef, ey; flags_t efl;
    #1;
    model(ef, ey, efl, 1'b1);
    checks++;
    if (f !== ef || y !== ey || flags !== efl) begin
      failures++;
      if (failures < 10)
        $display("FAIL %s: dest=%0d func=%0d src=%0d F=%h/%h Y=%h/%h flags=%b/%b", tag, dest, func, src,
                 f, ef, y, ey, flags, efl);
    end
    en = 1'b1; @(posedge clk); #1 en = 1'b0;
  endtask

  task automatic set_reg(int n, logic [15:0] v);
    dest = 3'd3; func = 3'd3; src = 3'd7; a_addr = 0; b_addr = 4'(n); d = v;
    carry = 0; mult = 0; srs = 0;
    step_check("load");
  endtask

  task automatic set_q(logic [15:0] v);
    dest = 3'd0; func = 3'd3; src = 3'd7; d = v; carry = 0; mult = 0; srs = 0;
    step_check("loadq");
  endtask

  initial begin
    en = 0; mult = 0; carry = 0; srs = 0; dest = 1; func = 0; src = 0; a_addr = 0; b_addr = 0; d = 0;
    @(posedge clk);
    for (int k = 0; k < 16; k++) set_reg(k, 16'($urandom));
    set_q(16'($urandom));
    // random instructions
    for (int n = 0; n < 3000; n++) begin
      dest = 3'($urandom); func = 3'($urandom); src = 3'($urandom);
      a_addr = 4'($urandom); b_addr = 4'($urandom); carry = 1'($urandom);
      srs = 2'($urandom); d = 16'($urandom); mult = 1'b0;
      step_check("random");
    end
    // multiply: A=R9 multiplicand, Q multiplier, R7 cleared
    for (int n = 0; n < 200; n++) begin
      logic [15:0] ma, mb;
      logic [31:0] prod;
      ma = 16'($urandom); mb = 16'($urandom);
      if (n == 0) begin ma = 16'h8001; mb = 16'h7FFF; end
      if (n == 1) begin ma = 16'hFFFF; mb = 16'hFFFF; end
      set_reg(9, ma); set_reg(7, 0); set_q(mb);
      for (int k = 0; k < 16; k++) begin
        dest = 3'd4; func = (k == 15) ? 3'd1 : 3'd0; src = 3'd3; a_addr = 9; b_addr = 7;
        carry = (k == 15); srs = 2'd3; mult = 1'b1; d = 0;
        step_check("mult");
      end
      mult = 0;
      prod = smul(ma, mb);
      checks++;
      if ({dut.g_slice[3].u_slice.regs[7], dut.g_slice[2].u_slice.regs[7],
           dut.g_slice[1].u_slice.regs[7], dut.g_slice[0].u_slice.regs[7]} !== prod[31:16]
          || {rm[7], qm} !== prod) begin
        failures++;
        $display("FAIL mult %h*%h: got %h:%h expected %h", ma, mb, rm[7], qm, prod);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
