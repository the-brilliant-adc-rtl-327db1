// tb_badc_memory: drives the memory board as the CPU does (address register
// written from Y, writes at the end of a cycle, reads as pause cycles) and
// checks random write/read traffic against a shadow array, the 6-tick
// (220 ns at 40 ns) read access counted from the cycle start, and that
// addresses beyond the fitted board read 0 and ignore writes. A second
// instance, fully expanded to eight boards (32768 words), sees the same
// traffic and is checked across all boards; its 15-bit address wraps at
// 32768.
module tb_badc_memory;
  timeunit 1ns; timeprecision 1ps;
  logic clk = 1'b0;
  always #20 clk = ~clk;

  logic rst, cpu_en, cyc_start, rd, wr, mar_wr, ack;
  logic [15:0] y, rdata;

  badc_memory dut (.*);

  logic [15:0] rdata8;
  logic        ack8;
  badc_memory #(.BOARDS(8)) dut8 (.clk(clk), .rst(rst), .cpu_en(cpu_en), .cyc_start(cyc_start),
    .rd(rd), .wr(wr), .mar_wr(mar_wr), .y(y), .rdata(rdata8), .ack(ack8));
  logic [15:0] dv8;

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++; if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  // one CPU cycle of 5 ticks, or longer while a read waits for ack
  task automatic cycle(input logic r, input logic w, input logic m, input logic [15:0] yv,
                       output logic [15:0] data, output int wait_ticks);
    rd = r; wr = w; mar_wr = m; y = yv; cyc_start = 1; wait_ticks = 0;
    @(posedge clk); #1 cyc_start = 0;
    if (r) begin
      while (!ack) begin @(posedge clk); #1; wait_ticks++; end
    end
    repeat (3) @(posedge clk);
    #1 data = rdata; dv8 = rdata8; cpu_en = 1;
    @(posedge clk); #1 cpu_en = 0; rd = 0; wr = 0; mar_wr = 0;
  endtask

  logic [15:0] shadow [4096];
  logic [15:0] dv;
  int wt;
  initial begin
    rst = 1; cpu_en = 0; cyc_start = 0; rd = 0; wr = 0; mar_wr = 0; y = 0;
    repeat (2) @(posedge clk); #1 rst = 0;
    for (int a = 0; a < 4096; a++) begin
      shadow[a] = 16'($urandom);
      cycle(0, 0, 1, 16'(a), dv, wt);
      cycle(0, 1, 0, shadow[a], dv, wt);
    end
    for (int n = 0; n < 2000; n++) begin
      int a;
      a = $urandom_range(0, 4095);
      if ($urandom_range(0, 1)) begin
        cycle(0, 0, 1, 16'(a), dv, wt);
        cycle(1, 0, 0, 16'h0, dv, wt);
        check(dv == shadow[a], $sformatf("read %h = %h, expected %h", a, dv, shadow[a]));
        check(wt == 5, $sformatf("read access waited %0d ticks after the first", wt));
      end else begin
        shadow[a] = 16'($urandom);
        cycle(0, 0, 1, 16'(a), dv, wt);
        cycle(0, 1, 0, shadow[a], dv, wt);
      end
    end
    // beyond the single board
    cycle(0, 0, 1, 16'h1005, dv, wt);
    cycle(0, 1, 0, 16'hBEEF, dv, wt);
    cycle(1, 0, 0, 16'h0, dv, wt);
    check(dv == 16'h0, "unfitted board reads 0");
    cycle(0, 0, 1, 16'h0005, dv, wt);
    cycle(1, 0, 0, 16'h0, dv, wt);
    check(dv == shadow[5], "write to unfitted board did not alias");
    // eight boards: one word written on every board, then random traffic
    begin
      logic [15:0] sh8 [int];
      for (int b = 0; b < 8; b++) begin
        int a;
        a = b * 4096 + $urandom_range(0, 4095);
        sh8[a] = 16'($urandom);
        cycle(0, 0, 1, 16'(a), dv, wt);
        cycle(0, 1, 0, sh8[a], dv, wt);
      end
      for (int n = 0; n < 1000; n++) begin
        int a;
        a = $urandom_range(0, 32767);
        if (sh8.exists(a) || $urandom_range(0, 1)) begin
          cycle(0, 0, 1, 16'(a), dv, wt);
          cycle(1, 0, 0, 16'h0, dv, wt);
          check(!sh8.exists(a) || dv8 == sh8[a],
                $sformatf("8 boards: read %h = %h, expected %h", a, dv8, sh8.exists(a) ? sh8[a] : 16'h0));
        end else begin
          sh8[a] = 16'($urandom);
          cycle(0, 0, 1, 16'(a), dv, wt);
          cycle(0, 1, 0, sh8[a], dv, wt);
        end
      end
      foreach (sh8[a]) begin
        cycle(0, 0, 1, 16'(a), dv, wt);
        cycle(1, 0, 0, 16'h0, dv, wt);
        check(dv8 == sh8[a], $sformatf("8 boards: final read %h = %h, expected %h", a, dv8, sh8[a]));
      end
      cycle(0, 0, 1, 16'h8000 | 16'(3 * 4096 + 7), dv, wt);
      cycle(0, 1, 0, 16'h1234, dv, wt);
      cycle(0, 0, 1, 16'(3 * 4096 + 7), dv, wt);
      cycle(1, 0, 0, 16'h0, dv, wt);
      check(dv8 == 16'h1234, "8 boards: address bit 15 ignored");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100ms; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
