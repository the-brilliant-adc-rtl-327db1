// tb_badc_panel: front-panel logic. The reset button must give a reset of
// RESET_TICKS ticks after two synchroniser stages, a held step button one
// step pulse, and the indicators must latch the PROM address, branch code,
// flags and either the ALU input or output (display switch) only at the end
// of a CPU cycle.
module tb_badc_panel;
  import badc_pkg::*;
  timeunit 1ns; timeprecision 1ps;
  logic clk = 1'b0;
  always #20 clk = ~clk;

  logic por, cpu_en, sw_reset, sw_step, sw_run, sw_brk, sw_show_out, dw_l, dw_x, dw_q;
  logic [8:0] upc, led_addr; logic [2:0] brcond, led_brcode, led_lxq; flags_t flags;
  logic [15:0] d_bus, y, led_data; logic rst_out, step_pulse, run, brk_sw, led_clk;
  logic [3:0] led_flags;

  badc_panel dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  int n_rst, n_step;
  always @(posedge clk) begin
    if (rst_out) n_rst++;
    if (step_pulse) n_step++;
  end

  initial begin
    por = 1; cpu_en = 0; sw_reset = 0; sw_step = 0; sw_run = 1; sw_brk = 0; sw_show_out = 0;
    dw_l = 0; dw_x = 1; dw_q = 1; upc = 0; brcond = 0; flags = '0; d_bus = 0; y = 0;
    repeat (3) @(posedge clk); #1 por = 0;
    repeat (10) @(posedge clk); #1;
    check(!rst_out && run, "reset released, run switch seen");
    n_rst = 0;
    sw_reset = 1; repeat (3) @(posedge clk); #1 sw_reset = 0;
    repeat (12) @(posedge clk); #1;
    check(n_rst >= 4 && n_rst <= 6, $sformatf("reset pulse %0d ticks", n_rst));
    n_step = 0;
    sw_step = 1; repeat (20) @(posedge clk); #1 sw_step = 0; repeat (5) @(posedge clk); #1;
    check(n_step == 1, $sformatf("held step button gave %0d pulses", n_step));
    sw_brk = 1; repeat (3) @(posedge clk); #1;
    check(brk_sw, "breakpoint switch");
    for (int n = 0; n < 50; n++) begin
      logic [8:0] a; logic [15:0] dv, yv; logic [2:0] bc; logic show;
      a = 9'($urandom); dv = 16'($urandom); yv = 16'($urandom); bc = 3'($urandom); show = 1'($urandom);
      upc = a; d_bus = dv; y = yv; brcond = bc; sw_show_out = show; flags = 4'($urandom);
      @(posedge clk); #1;
      cpu_en = 1; @(posedge clk); #1 cpu_en = 0;
      upc = ~a;
      @(posedge clk); #1;
      check(led_addr == a && led_brcode == bc && led_data == (show ? yv : dv),
            $sformatf("indicators latched at cycle end (%0d)", n));
    end
    check(led_lxq == 3'b011, "L, X, Q indicators");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #1ms; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
