// tb_badc_mux_ctrl: runs the ADC-MUX board control with the sample-and-hold
// and ADC models and a simulated crate of modules. A CPU model writes a
// start address with increment and issues RAD cycles (waiting for the ack
// like a pause cycle). Checked: every result equals the ADC code of the
// channel expected at that position; the three-stage overlap (while a
// result waits, the ADC has the next channel and the modules the one after);
// the first result takes at least settle + 1 us acquisition + conversion;
// no-increment mode converts the same channel again; RAD with no scan and a
// full-scale input raise the error; the test register replaces the ADC.
module tb_badc_mux_ctrl;
  import badc_pkg::*;
  import tb_badc_pkg::*;
  timeunit 1ns; timeprecision 1ps;
  logic clk = 1'b0;
  always #20 clk = ~clk;

  logic rst, cpu_en, test_load, sh_hold, adc_start, adc_busy, ack, err, scanning, mod_f1, mod_s1;
  ctl_t ctl;
  logic [15:0] y, test_wdata, rad_data, analog_mv, sh_mv;
  logic [4:0] mod_n; logic [3:0] mod_a; logic [11:0] adc_data;
  int over_addr; int unsigned s1_count;
  localparam int SEED = 3;

  badc_mux_ctrl dut (.*);
  shm60  u_sh (.clk(clk), .vin_mv(analog_mv), .hold(sh_hold), .vout_mv(sh_mv));
  eh12b3 u_adc (.clk(clk), .vin_mv(sh_mv), .start(adc_start), .busy(adc_busy), .data(adc_data));
  tb_module_bank bank (.clk(clk), .mod_n(mod_n), .mod_f1(mod_f1), .mod_a(mod_a), .mod_s1(mod_s1),
    .seed(SEED), .over_addr(over_addr), .analog_mv(analog_mv), .s1_count(s1_count));

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++; if (!ok) begin failures++; if (failures < 12) $display("FAIL: %s", what); end
  endtask

  task automatic op(input ctl_t c, input logic [15:0] yv);
    ctl = c; y = yv; repeat (4) @(posedge clk); #1 cpu_en = 1; @(posedge clk); #1 cpu_en = 0; ctl = '0;
  endtask
  // RAD as a pause cycle; returns data, error and ticks waited
  task automatic rad(output logic [15:0] d, output logic e, output int waited, input int extra);
    ctl = '0; ctl.rad = 1; waited = 0;
    while (!ack) begin @(posedge clk); #1; waited++; end
    repeat (4) @(posedge clk); #1 d = rad_data; e = err; cpu_en = 1;
    @(posedge clk); #1 cpu_en = 0; ctl = '0;
    repeat (extra) @(posedge clk); #1;
  endtask

  logic [15:0] d; logic e; int w;
  initial begin
    ctl_t c;
    rst = 1; cpu_en = 0; ctl = '0; y = 0; test_load = 0; test_wdata = 0; over_addr = -1;
    repeat (3) @(posedge clk); #1 rst = 0;
    // RAD with no scan: immediate ack and error
    rad(d, e, w, 0);
    check(e && w == 0, "RAD without a scan gives an error");
    // increment scan from address 40
    c = '0; c.wmsai = 1; op(c, 16'd40);
    check({mod_n, mod_f1, mod_a} == 10'd40, "start address on the module lines");
    rad(d, e, w, 150);
    check(w >= 25 + 5 + 50 - 6, $sformatf("first conversion after %0d ticks", w));
    check(d == 16'(adc_code(chan_mv(40, SEED))) && !e, $sformatf("channel 40: %h", d));
    for (int k = 1; k < 40; k++) begin
      rad(d, e, w, 40 + (k % 3) * 5);
      check(d == 16'(adc_code(chan_mv(40 + k, SEED))) && !e, $sformatf("channel %0d: %h", 40 + k, d));
      // while the CPU works on channel 40+k the ADC converts the next one
      // and the modules already present the one after
      check(adc_busy && sh_hold && {mod_n, mod_f1, mod_a} == 10'(40 + k + 2),
            $sformatf("pipeline stage addresses after channel %0d", 40 + k));
    end
    // no increment: the same channel again
    c = '0; c.wmsa = 1; op(c, 16'd100);
    for (int k = 0; k < 4; k++) begin
      rad(d, e, w, 20);
      check(d == 16'(adc_code(chan_mv(100, SEED))), "no-increment scan repeats channel 100");
      check({mod_n, mod_f1, mod_a} == 10'd100, "address held in no-increment mode");
    end
    // over-range channel
    over_addr = 200;
    c = '0; c.wmsai = 1; op(c, 16'd200);
    rad(d, e, w, 0);
    check(e && d == 16'hFFF, "over-range channel reports an error");
    // test register
    @(posedge clk); #1 test_load = 1; test_wdata = 16'h0555; @(posedge clk); #1 test_load = 0;
    rad(d, e, w, 0);
    check(d == 16'h0555 && !e && w == 0, "test register replaces the ADC");
    c = '0; c.wtd = 1; op(c, 16'h0321);
    rad(d, e, w, 0);
    check(d == 16'h0321, "WTD loads the test register");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #10ms; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
