// tb_shm60: the sample-and-hold model must reach a new input only after
// 25 ticks (1 us) of stable tracking, and must keep its output while held.
module tb_shm60;
  timeunit 1ns; timeprecision 1ps;
  logic clk = 1'b0;
  always #20 clk = ~clk;
  logic [15:0] vin_mv, vout_mv; logic hold;
  shm60 dut (.*);
  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  initial begin
    int t;
    hold = 0; vin_mv = 16'd1000;
    repeat (40) @(posedge clk); #1;
    check(vout_mv == 16'd1000, "acquired initial level");
    for (int n = 0; n < 20; n++) begin
      logic [15:0] v, old;
      old = vout_mv;
      v = 16'($urandom_range(0, 5000));
      if (v == old) v = v + 1;
      vin_mv = v; t = 0;
      while (vout_mv != v && t < 100) begin @(posedge clk); #1; t++; if (t < 20) check(vout_mv == old, "no early output"); end
      check(t >= 25 && t <= 28, $sformatf("acquisition %0d took %0d ticks (%0d->%0d)", n, t, old, v));
      hold = 1; @(posedge clk); #1 vin_mv = 16'($urandom_range(0, 5000));
      repeat (60) @(posedge clk); #1;
      check(vout_mv == v, "held value kept");
      hold = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #1ms; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
