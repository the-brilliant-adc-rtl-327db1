// tb_badc_top: end-to-end test of the whole BADC at its default size.
//
// A host model loads the four correction constants of all 608 channels and
// the control table into the BADC memory over CAMAC (F18 set pointer, F16
// write), enables the LAM (F26) and fires the NIM trigger. The microprogram
// reads all 608 channels of a simulated crate through the multiplexor, drops
// those under threshold, corrects the rest and raises the LAM. The host then
// reads the buffer back (F17 set pointer, F0 read) and compares every word
// with a reference computed here. The event time is checked against the
// 3-10 ms the design is meant for. Further events provoke an ADC over-range
// error exit, a host access to the held crate provokes another, and an
// event runs from the CAMAC-loaded test register after an F9 reset.
// The diagnostic scan (F27) is then left running over a block of three
// channels and stopped with F9; the panel's single-step mode and the
// debugging RAM are exercised at the end. Each mechanism is counted and must occur at least once.
module tb_badc_top;
  import tb_badc_pkg::*;
  import badc_pkg::*;
  import badc_ucode_pkg::*;
  timeunit 1ns; timeprecision 1ps;

  localparam int NCH        = 608;
  localparam int START_ADDR = 32;    // station 1, channel 0
  localparam int BUF        = 'h980;
  localparam int SEED       = 7;

  logic clk = 1'b0;
  always #20 clk = ~clk;   // 25 MHz base clock

  logic        por, sw_reset, sw_step, sw_run, sw_brk, sw_show_out, nim_trig;
  logic [8:0]  led_addr; logic [2:0] led_brcode; logic [3:0] led_flags;
  logic [2:0]  led_lxq; logic led_clk; logic [15:0] led_data;
  logic        dw_n, dw_s1; logic [3:0] dw_a; logic [4:0] dw_f; logic [15:0] dw_w, dw_r;
  logic        dw_q, dw_x, dw_l, host_addr, crate_enable;
  logic [4:0]  mod_n; logic mod_f1; logic [3:0] mod_a; logic mod_s1;
  logic [15:0] analog_mv;
  logic        dbg_sel, dbg_we; logic [8:0] dbg_addr; logic [47:0] dbg_wdata;
  logic        brk1, cpu_en;
  int          over_addr;
  int unsigned s1_count;

  badc_top dut (.*);

  tb_module_bank bank (.clk(clk), .mod_n(mod_n), .mod_f1(mod_f1), .mod_a(mod_a),
    .mod_s1(mod_s1), .seed(SEED), .over_addr(over_addr), .analog_mv(analog_mv),
    .s1_count(s1_count));

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ---- mechanism counters ----
  int n_cycles, n_short, n_long, n_pause_mem, n_pause_adc, n_push, n_pop, n_mult;
  int n_forced, n_skip, n_err_exit, n_crate, n_test_rad, n_step_cycles;
  // module addresses strobed while the diagnostic scan runs
  bit scan_watch = 1'b0;
  int scan_hits[int];
  logic mod_s1_d = 1'b0;
  always @(posedge clk) begin
    mod_s1_d <= mod_s1;
    if (scan_watch && mod_s1 && !mod_s1_d) begin
      int a;
      a = int'({mod_n, mod_f1, mod_a});
      if (scan_hits.exists(a)) scan_hits[a]++; else scan_hits[a] = 1;
    end
  end
  always @(posedge clk) begin
    if (cpu_en) begin
      n_cycles++;
      if (dut.long_cyc) n_long++; else n_short++;
      if (dut.ctl.push) n_push++;
      if (dut.ctl.pop)  n_pop++;
      if (dut.ctl.mult) n_mult++;
      if (dut.force_ack) n_forced++;
      if (dut.upc == 9'h06B && dut.taken) n_skip++;       // threshold branch
      if (dut.upc == 9'h068 && dut.taken) n_err_exit++;   // RAD error exit
      if (dut.ctl.rad && dut.u_mux.test_mode) n_test_rad++;
    end
    if (dut.paused && dut.ctl.rmd) n_pause_mem++;
    if (dut.paused && dut.ctl.rad) n_pause_adc++;
    if (crate_enable) n_crate++;
  end

  // ---- host side ----
  task automatic camac(input logic [4:0] f, input logic [15:0] w,
                       output logic [15:0] r, output logic q);
    @(posedge clk);
    dw_n <= 1'b1; dw_f <= f; dw_w <= w; dw_a <= 4'd0;
    repeat (3) @(posedge clk);
    r = dw_r; q = dw_q;
    dw_s1 <= 1'b1;
    repeat (5) @(posedge clk);
    dw_s1 <= 1'b0;
    repeat (2) @(posedge clk);
    dw_n <= 1'b0;
    repeat (45) @(posedge clk);
  endtask

  logic [15:0] rr; logic qq;
  task automatic cwrite(input logic [4:0] f, input logic [15:0] w);
    camac(f, w, rr, qq);
  endtask

  logic [15:0] eps[NCH], dlt[NCH], alp[NCH], bet[NCH];

  task automatic load_tables(input int count);
    cwrite(5'd18, 16'h0000);
    for (int k = 0; k < NCH; k++) begin
      cwrite(5'd16, eps[k]); cwrite(5'd16, dlt[k]); cwrite(5'd16, alp[k]); cwrite(5'd16, bet[k]);
    end
    cwrite(5'd18, 16'h0FF0);
    cwrite(5'd16, 16'(START_ADDR));
    cwrite(5'd16, 16'(count));
  endtask

  task automatic trigger_and_wait(output longint t_ns);
    longint t0;
    nim_trig <= 1'b1; repeat (3) @(posedge clk); nim_trig <= 1'b0;
    t0 = longint'($time);
    while (!dw_l) @(posedge clk);
    t_ns = longint'($time) - t0;
  endtask

  // reference run: expected buffer contents for channels 0..count-1
  logic [15:0] exp_buf[$];
  task automatic make_expect(input int count, input bit test_mode, input logic [15:0] tval);
    exp_buf.delete();
    for (int k = 0; k < count; k++) begin
      logic [15:0] q;
      q = test_mode ? tval : 16'(adc_code(chan_mv(START_ADDR + k, SEED)));
      if (q >= eps[k]) begin
        exp_buf.push_back(correct(q, dlt[k], alp[k], bet[k]));
        exp_buf.push_back(16'(START_ADDR + k));
      end
    end
  endtask

  task automatic read_and_compare(string tag);
    logic [15:0] endp;
    int bad;
    camac(5'd17, 16'h0FF2, rr, qq);
    camac(5'd0, 16'h0, endp, qq);
    check(endp == 16'(BUF + exp_buf.size()), $sformatf("%s end pointer %h, expected %h",
          tag, endp, BUF + exp_buf.size()));
    camac(5'd17, 16'(BUF), rr, qq);
    bad = 0;
    for (int i = 0; i < exp_buf.size(); i++) begin
      logic [15:0] r;
      camac(5'd0, 16'h0, r, qq);
      checks++;
      if (r !== exp_buf[i]) begin
        failures++;
        if (bad++ < 10) $display("FAIL: %s word %0d = %h, expected %h", tag, i, r, exp_buf[i]);
      end
    end
  endtask

  longint t_ev;
  int cyc0, n_scan, n_host_err;

  initial begin
    por = 1'b1; sw_reset = 1'b0; sw_step = 1'b0; sw_run = 1'b1; sw_brk = 1'b0;
    sw_show_out = 1'b1; nim_trig = 1'b0; dw_n = 1'b0; dw_s1 = 1'b0; dw_a = '0;
    dw_f = '0; dw_w = '0; host_addr = 1'b0; dbg_sel = 1'b0; dbg_we = 1'b0;
    dbg_addr = '0; dbg_wdata = '0; over_addr = -1;
    for (int k = 0; k < NCH; k++) begin
      eps[k] = 16'($urandom_range(0, 1200));
      dlt[k] = 16'($urandom_range(0, 300));
      alp[k] = 16'($urandom_range(3000, 5200));
      bet[k] = 16'($urandom_range(0, 65535));
    end
    repeat (10) @(posedge clk);
    por = 1'b0;
    repeat (50) @(posedge clk);

    // ---- event 1: full crate ----
    cwrite(5'd26, 16'h0);               // LAM enable
    load_tables(NCH);
    camac(5'd1, 16'h0, rr, qq);
    check(qq == 1'b1 && dw_x == 1'b0, "Q set while idle after reset");
    check(dw_l == 1'b0, "no LAM before the event");
    make_expect(NCH, 1'b0, 16'h0);
    trigger_and_wait(t_ev);
    $display("event of %0d channels: %0d ns, %0d of them kept", NCH, t_ev, exp_buf.size() / 2);
    check(t_ev >= 3_000_000 && t_ev <= 10_000_000, $sformatf("event time %0d ns outside 3-10 ms", t_ev));
    check(crate_enable == 1'b0, "crate released after the event");
    check(brk1 == 1'b0, "no error exit in a clean event");
    read_and_compare("event1");
    check(s1_count >= NCH, "multiplexor strobed every channel");

    // ---- event 2: over-range channel -> error exit ----
    over_addr = START_ADDR + 5;
    cwrite(5'd10, 16'h0);               // clear LAM
    check(dw_l == 1'b0, "F10 cleared the LAM");
    trigger_and_wait(t_ev);
    check(brk1 == 1'b1, "ADC over-range took the error exit (breakpoint 1 set)");
    over_addr = -1;

    // ---- event 2b: the host addresses the crate while the BADC holds it ----
    cwrite(5'd9, 16'h0);
    repeat (20) @(posedge clk);
    cwrite(5'd26, 16'h0);
    check(dut.host_err == 1'b0, "host-access latch clear after F9");
    fork
      trigger_and_wait(t_ev);
      begin
        #1ms;
        check(crate_enable == 1'b1, "crate held during the event");
        host_addr <= 1'b1; repeat (3) @(posedge clk); host_addr <= 1'b0;
        @(posedge clk);
        check(dut.host_err == 1'b1, "host access during the event latched");
        n_host_err++;
      end
    join
    check(brk1 == 1'b1 && t_ev < 3_000_000, "host access took the error exit");
    check(crate_enable == 1'b0, "crate released after the error exit");

    // ---- event 3: F9 reset, then the CAMAC test register replaces the ADC ----
    cwrite(5'd9, 16'h0);
    repeat (20) @(posedge clk);
    check(brk1 == 1'b0, "F9 reset cleared breakpoint 1");
    check(dut.host_err == 1'b0, "F9 reset cleared the host-access latch");
    cwrite(5'd26, 16'h0);
    cwrite(5'd19, 16'h0800);            // test register load
    cwrite(5'd18, 16'h0FF1);
    cwrite(5'd16, 16'd4);
    make_expect(4, 1'b1, 16'h0800);
    trigger_and_wait(t_ev);
    read_and_compare("event3");

    // ---- diagnostic scan of channels START..START+2, stopped by F9 ----
    cwrite(5'd9, 16'h0);                // leaves test mode
    repeat (20) @(posedge clk);
    cwrite(5'd18, 16'h0FF1);
    cwrite(5'd16, 16'd3);
    cwrite(5'd27, 16'h0);
    repeat (200) @(posedge clk);
    scan_watch = 1'b1;
    repeat (2500) @(posedge clk);        // 100 us
    scan_watch = 1'b0;
    check(crate_enable == 1'b1, "crate held during the scan");
    check(scan_hits.exists(START_ADDR) && scan_hits[START_ADDR] >= 5,
          "scan returns to the first channel of the block again and again");
    foreach (scan_hits[a])
      check(a >= START_ADDR && a < START_ADDR + 4,
            $sformatf("scan strobed address %0d outside the block", a));
    for (int a = START_ADDR; a < START_ADDR + 3; a++)
      check(scan_hits.exists(a), $sformatf("scan reached channel %0d", a));
    n_scan = scan_hits.exists(START_ADDR) ? scan_hits[START_ADDR] : 0;
    cwrite(5'd9, 16'h0);
    repeat (40) @(posedge clk);
    check(crate_enable == 1'b0 && dut.upc == 9'h003, "F9 ended the scan, BADC idle");

    // ---- single step from the panel ----
    sw_run = 1'b0;
    repeat (40) @(posedge clk);
    cyc0 = n_cycles;
    repeat (40) @(posedge clk);
    check(n_cycles == cyc0, "clock stopped in single-step mode");
    sw_step = 1'b1; repeat (6) @(posedge clk); sw_step = 1'b0;
    repeat (40) @(posedge clk);
    n_step_cycles = n_cycles - cyc0;
    check(n_step_cycles == 1, $sformatf("one step gave %0d cycles", n_step_cycles));
    sw_run = 1'b1;

    // ---- debugging RAM replaces the PROM ----
    // word 0: set breakpoint 1; word 1: jump to itself
    dbg_we = 1'b1;
    @(posedge clk); dbg_addr = 9'd0; dbg_wdata = u_nop() | u_op(OP_SETBRK);
    @(posedge clk); dbg_addr = 9'd1; dbg_wdata = u_nop() | u_jmp(BR_UN, 9'd1);
    @(posedge clk); dbg_we = 1'b0; dbg_sel = 1'b1;
    sw_reset = 1'b1; repeat (5) @(posedge clk); sw_reset = 1'b0;
    repeat (100) @(posedge clk);
    check(brk1 == 1'b1, "program in the debugging RAM ran");
    check(dut.upc == 9'd1, "debugging RAM program loops at word 1");

    // ---- mechanisms ----
    check(n_short > 0,     "short cycles");
    check(n_long > 0,      "long cycles (conditional branches)");
    check(n_pause_mem > 0, "pause cycles waiting for memory");
    check(n_pause_adc > 0, "pause cycles waiting for the ADC");
    check(n_push > 0 && n_pop > 0, "subroutine call and return");
    check(n_mult >= 32,    "multiply steps");
    check(n_forced > 0,    "forced branches");
    check(n_skip > 0,      "channels below threshold dropped");
    check(n_err_exit > 0,  "error exit on breakpoint 2");
    check(n_crate > 0,     "crate taken over");
    check(n_test_rad > 0,  "test register read in place of the ADC");
    check(n_scan > 0,      "diagnostic scan passes");
    check(n_host_err > 0,  "host access to a held crate latched");
    $display("cycles short=%0d long=%0d pause(mem ticks)=%0d pause(adc ticks)=%0d push=%0d pop=%0d mult=%0d forced=%0d skip=%0d errexit=%0d scan=%0d",
             n_short, n_long, n_pause_mem, n_pause_adc, n_push, n_pop, n_mult, n_forced, n_skip, n_err_exit, n_scan);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200ms;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
