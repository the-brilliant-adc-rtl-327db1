// tb_badc_control_store: checks the control store. PROM words are decoded
// here by raw bit positions of the microword layout (not through the
// package's struct): the CAMAC vectors and the NIM vector must be
// unconditional jumps to their handlers, the multiply subroutine must be 15
// add steps, one subtract step and a return, and unused words must jump to
// the idle loop. With 256-word PROMs the page bit must be ignored. The
// debugging RAM must store random words and replace the PROM when selected.
module tb_badc_control_store;
  timeunit 1ns; timeprecision 1ps;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [8:0] addr, dbg_addr;
  logic [47:0] word, dbg_wdata;
  logic dbg_sel, dbg_we;

  badc_control_store dut (.clk(clk), .addr(addr), .word(word), .dbg_sel(dbg_sel),
    .dbg_we(dbg_we), .dbg_addr(dbg_addr), .dbg_wdata(dbg_wdata));

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic logic [8:0] jaddr(logic [47:0] w);
    return {w[7], w[15:8]};
  endfunction

  task automatic expect_jump(logic [8:0] a, logic [8:0] target, string what);
    addr = a; #1;
    check(word[19:17] == 3'd1 && word[16] == 1'b0 && jaddr(word) == target,
          $sformatf("%s: word %h at %h", what, word, a));
  endtask

  logic [47:0] shadow [512];
  initial begin
    dbg_sel = 0; dbg_we = 0; dbg_addr = 0; dbg_wdata = 0; addr = 0;
    expect_jump(9'h003, 9'h003, "idle loop");
    expect_jump(9'h040 + 9'd25, 9'h060, "F25 vector");
    expect_jump(9'h040 + 9'd16, 9'h0AA, "F16 vector");
    expect_jump(9'h040 + 9'd3,  9'h003, "unused F3 vector");
    expect_jump(9'h0F0, 9'h003, "unused word");
    for (int k = 0; k < 16; k++) begin
      addr = 9'h090 + 9'(k); #1;
      check({word[43], word[47:44]} == 5'h0F && word[22:20] == 3'd4 && word[28:26] == 3'd3 &&
            word[36:33] == 4'd9 && word[32:29] == 4'd7 && word[39:38] == 2'd3 &&
            word[25:23] == ((k == 15) ? 3'd1 : 3'd0) && word[37] == (k == 15),
            $sformatf("multiply step %0d: %h", k, word));
    end
    addr = 9'h0A0; #1;
    check({word[43], word[47:44]} == 5'h02, "multiply return pops the stack");
    // reads of device data request a pause
    addr = 9'h068; #1;
    check({word[43], word[47:44]} == 5'h1A && word[40] && word[42], "RAD with pause and breakpoint-2 test");
    // page bit ignored with 256-word PROMs
    for (int k = 0; k < 256; k++) begin
      logic [47:0] lo;
      addr = 9'(k); #1; lo = word;
      addr = 9'(k) | 9'h100; #1;
      checks++; if (word !== lo) begin failures++; $display("FAIL page alias %h", k); end
    end
    // debugging RAM
    dbg_we = 1;
    for (int k = 0; k < 512; k++) begin
      dbg_addr = 9'(k); dbg_wdata = {16'($urandom), 32'($urandom)}; shadow[k] = dbg_wdata;
      @(posedge clk); #1;
    end
    dbg_we = 0; dbg_sel = 1;
    for (int k = 0; k < 512; k++) begin
      addr = 9'(k); #1;
      checks++; if (word !== shadow[k]) begin failures++; $display("FAIL debug RAM %h", k); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #1ms; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
