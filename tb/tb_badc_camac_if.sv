// tb_badc_camac_if: exercises the BADC's CAMAC station from a host model:
// R buffer loaded by memory reads and gated onto R only for read functions,
// W buffer loaded by write functions, forced-branch vectors for ordinary
// functions and the NIM input, F9 reset, F24/F26 LAM disable/enable, the
// microcode-controlled Q and L latches, X, the test-register load (F19) and
// the host-access error latch while the BADC holds the crate. A sweep over
// all 32 function codes checks R gating, W loading, X and the vectors.
module tb_badc_camac_if;
  import badc_pkg::*;
  timeunit 1ns; timeprecision 1ps;
  logic clk = 1'b0;
  always #20 clk = ~clk;

  logic rst, dw_n, dw_s1, dw_q, dw_x, dw_l, nim_trig, host_addr, cpu_en;
  logic [3:0] dw_a; logic [4:0] dw_f; logic [15:0] dw_w, dw_r, mem_rdata, w_buf;
  ctl_t ctl;
  logic force_pend, force_ack, badc_reset, test_load, crate_enable, host_err;
  logic [8:0] force_addr;

  badc_camac_if dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  int n_reset = 0, n_test = 0;
  always @(posedge clk) begin
    if (badc_reset) n_reset++;
    if (test_load) n_test++;
  end

  logic [15:0] r_seen; logic q_seen, x_seen;
  task automatic cmd(input logic [4:0] f, input logic [15:0] w);
    @(posedge clk); #1 dw_n = 1; dw_f = f; dw_w = w;
    repeat (2) @(posedge clk); #1 r_seen = dw_r; q_seen = dw_q; x_seen = dw_x;
    dw_s1 = 1; repeat (4) @(posedge clk); #1 dw_s1 = 0;
    @(posedge clk); #1 dw_n = 0;
    repeat (3) @(posedge clk); #1;
  endtask
  task automatic cpu_op(input ctl_t c, input logic [15:0] md);
    ctl = c; mem_rdata = md; cpu_en = 1; @(posedge clk); #1 cpu_en = 0; ctl = '0;
  endtask

  initial begin
    ctl_t c;
    rst = 1; dw_n = 0; dw_s1 = 0; dw_a = 0; dw_f = 0; dw_w = 0; nim_trig = 0; host_addr = 0;
    cpu_en = 0; ctl = '0; mem_rdata = 0; force_ack = 0;
    repeat (2) @(posedge clk); #1 rst = 0;
    // R buffer
    c = '0; c.rmd = 1; cpu_op(c, 16'h1234);
    cmd(5'd0, 16'h0);
    check(r_seen == 16'h1234 && x_seen, "F0 reads the R buffer, X answered");
    check(force_pend && force_addr == 9'h040, "F0 forces a branch to vector 0x40");
    force_ack = 1; @(posedge clk); #1 force_ack = 0;
    check(!force_pend, "force acknowledged");
    cmd(5'd16, 16'hCAFE);
    check(r_seen == 16'h0, "R lines idle on a write function");
    check(w_buf == 16'hCAFE, "F16 loads the W buffer");
    check(force_addr == 9'h050, "F16 vector 0x50");
    force_ack = 1; @(posedge clk); #1 force_ack = 0;
    check(dw_r == 16'h0, "R lines idle without N");
    // Q latch
    c = '0; c.setq = 1; cpu_op(c, 0);
    cmd(5'd1, 16'h0); check(q_seen, "Q after SETQ");
    check(dw_q == 1'b0, "Q only while addressed");
    c = '0; c.rstq = 1; cpu_op(c, 0);
    cmd(5'd1, 16'h0); check(!q_seen, "no Q after RSTQ");
    // LAM
    c = '0; c.setl = 1; cpu_op(c, 0);
    check(!dw_l, "LAM masked before F26");
    cmd(5'd26, 16'h0); check(dw_l, "LAM after F26");
    cmd(5'd24, 16'h0); check(!dw_l, "LAM masked by F24");
    cmd(5'd26, 16'h0);
    c = '0; c.rstl = 1; cpu_op(c, 0);
    check(!dw_l, "LAM cleared by RSTL");
    force_ack = 1; @(posedge clk); #1 force_ack = 0;
    check(!force_pend, "F24/F26 do not leave a forced branch");
    // NIM
    nim_trig = 1; repeat (3) @(posedge clk); #1 nim_trig = 0;
    check(force_pend && force_addr == 9'h060, "NIM trigger forces a branch to 0x60");
    force_ack = 1; @(posedge clk); #1 force_ack = 0;
    // test register load
    cmd(5'd19, 16'h0ABC); check(n_test == 1, "F19 loads the test register");
    force_ack = 1; @(posedge clk); #1 force_ack = 0;
    // host access while the BADC holds the crate
    host_addr = 1; @(posedge clk); #1 host_addr = 0;
    check(!host_err, "host access ignored while the crate is free");
    c = '0; c.crate_on = 1; cpu_op(c, 0);
    check(crate_enable, "crate enable");
    host_addr = 1; @(posedge clk); #1 host_addr = 0;
    check(host_err, "host access latched");
    c = '0; c.clr_host = 1; cpu_op(c, 0);
    check(!host_err, "host error cleared");
    // every function except F9: R gating, W loading, X and forced branches
    begin
      logic [15:0] wexp;
      wexp = w_buf;
      for (int f = 0; f < 32; f++) begin
        logic [15:0] rv, wv;
        if (f == 9) continue;
        rv = 16'($urandom) | 16'h1; wv = 16'($urandom);
        c = '0; c.rmd = 1; cpu_op(c, rv);
        cmd(5'(f), wv);
        if (f >= 16 && f < 24) wexp = wv;
        check(x_seen, $sformatf("X answered for F%0d", f));
        check(r_seen == ((f < 8) ? rv : 16'h0), $sformatf("R lines for F%0d = %h", f, r_seen));
        check(w_buf == wexp, $sformatf("W buffer after F%0d = %h, expected %h", f, w_buf, wexp));
        if (f == 24 || f == 26)
          check(!force_pend, $sformatf("F%0d forces no branch", f));
        else
          check(force_pend && force_addr == 9'h040 + 9'(f),
                $sformatf("F%0d vector %h", f, force_addr));
        force_ack = 1; @(posedge clk); #1 force_ack = 0;
      end
    end
    // F9
    c = '0; c.setq = 1; cpu_op(c, 0);
    cmd(5'd9, 16'h0);
    check(n_reset == 1, "F9 gives one reset pulse");
    check(!force_pend && !crate_enable, "F9 clears forced branch and crate enable");
    cmd(5'd1, 16'h0); check(!q_seen, "F9 cleared Q");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #1ms; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
