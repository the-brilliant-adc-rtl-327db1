// tb_eh12b3: the ADC model must be busy for 50 ticks (2 us) after a start
// and then present code = mV * 4096 / 5120, saturating at 4095.
module tb_eh12b3;
  timeunit 1ns; timeprecision 1ps;
  logic clk = 1'b0;
  always #20 clk = ~clk;
  logic [15:0] vin_mv; logic start, busy; logic [11:0] data;
  eh12b3 dut (.*);
  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  initial begin
    start = 0; vin_mv = 0;
    repeat (70) @(posedge clk); #1;
    for (int n = 0; n < 40; n++) begin
      int unsigned mv, expc, t;
      mv = (n == 0) ? 5120 : (n == 1) ? 6000 : (n == 2) ? 0 : $urandom_range(0, 5119);
      expc = (mv >= 5120) ? 4095 : mv * 4 / 5;
      vin_mv = 16'(mv); start = 1; @(posedge clk); #1 start = 0; vin_mv = 16'd77;
      t = 1;
      while (busy) begin @(posedge clk); #1; t++; end
      check(t == 51, $sformatf("conversion took %0d ticks", t));
      check(data == 12'(expc), $sformatf("%0d mV gave %0d, expected %0d", mv, data, expc));
      repeat (3) @(posedge clk); #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #1ms; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
