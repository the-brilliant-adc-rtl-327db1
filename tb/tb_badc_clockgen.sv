// tb_badc_clockgen: measures the CPU cycle lengths in base-clock ticks:
// a short cycle must take 5 ticks (200 ns at 25 MHz), a long one 9 (360 ns),
// a pause cycle 5 ticks plus the wait for the acknowledge, and a pending
// forced branch must release a pause. Single-step mode must give exactly
// one cycle per step pulse. A random mix of all three cycle kinds, with
// acknowledges that are already there or arrive late, checks every length.
module tb_badc_clockgen;
  timeunit 1ns; timeprecision 1ps;
  logic clk = 1'b0;
  always #20 clk = ~clk;

  logic rst, long_cyc, pause_req, ack, force_pend, run, step;
  logic cpu_en, cyc_start, paused;

  badc_clockgen dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // tick counter; len = ticks between the two latest cpu_en pulses
  int tick = 0, last_en = 0, len = 0, n_en = 0;
  always @(posedge clk) begin
    tick <= tick + 1;
    if (cpu_en) begin len <= tick - last_en; last_en <= tick; n_en <= n_en + 1; end
  end
  // wait for the end of the current cycle, then return the length of the next one
  task automatic measure(output int ticks);
    int n0;
    n0 = n_en;
    do begin @(posedge clk); #1; end while (n_en == n0);
    ticks = len;
  endtask
  task automatic sync();
    int n0;
    n0 = n_en;
    do begin @(posedge clk); #1; end while (n_en == n0);
  endtask

  int t, ack_delay;
  initial begin
    rst = 1; long_cyc = 0; pause_req = 0; ack = 0; force_pend = 0; run = 1; step = 0;
    repeat (2) @(posedge clk); #1 rst = 0;
    // note: ticks are counted from the tick where cyc_start is seen
    sync();
    for (int i = 0; i < 5; i++) begin
      long_cyc = 0; measure(t);
      check(t == 5, $sformatf("short cycle %0d ticks", t));
    end
    for (int i = 0; i < 5; i++) begin
      long_cyc = 1; measure(t);
      check(t == 9, $sformatf("long cycle %0d ticks", t));
    end
    long_cyc = 0;
    // pause: ack after a delay
    for (int i = 0; i < 5; i++) begin
      ack_delay = 3 + 4 * i;
      pause_req = 1; ack = 0;
      fork
        begin repeat (ack_delay) @(posedge clk); #1 ack = 1; end
        measure(t);
      join
      check(t == ack_delay + 5, $sformatf("pause cycle %0d ticks for ack after %0d", t, ack_delay));
      pause_req = 0; ack = 0;
    end
    // random mix of short, long and pause cycles, also pause plus long
    for (int i = 0; i < 300; i++) begin
      bit lc, pr, early;
      lc = 1'($urandom); pr = 1'($urandom); early = 1'($urandom);
      ack_delay = $urandom_range(1, 12);
      long_cyc = lc; pause_req = pr; ack = pr && early;
      fork
        begin if (pr && !early) begin repeat (ack_delay) @(posedge clk); #1 ack = 1; end end
        measure(t);
      join
      check(t == (lc ? 9 : 5) + ((pr && !early) ? ack_delay : 0),
            $sformatf("cycle long=%0d pause=%0d ack=%0d: %0d ticks", lc, pr,
                      early ? 0 : ack_delay, t));
      long_cyc = 0; pause_req = 0; ack = 0;
    end
    // forced branch releases a pause that never gets its ack
    pause_req = 1;
    repeat (10) @(posedge clk);
    check(paused == 1'b1, "paused without ack");
    #1 force_pend = 1;
    measure(t);
    check(t >= 15 && t <= 17, $sformatf("forced branch ended the pause after %0d ticks", t));
    #1 force_pend = 0; pause_req = 0;
    // single step
    run = 0;
    repeat (20) @(posedge clk);
    begin
      int n = 0;
      for (int k = 0; k < 30; k++) begin @(posedge clk); if (cpu_en) n++; end
      check(n == 0, "no cycles while stopped");
      #1 step = 1; @(posedge clk); #1 step = 0;
      for (int k = 0; k < 30; k++) begin @(posedge clk); if (cpu_en) n++; end
      check(n == 1, $sformatf("single step gave %0d cycles", n));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #1ms; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
