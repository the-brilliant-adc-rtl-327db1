// tb_badc_sequencer: drives the microprogram sequencer with random
// sequences of branches, pushes, pops and forced branches and compares the
// address after every cycle with a reference that keeps its own 4-deep
// wrapping stack. Also checks reset to 0 and that `en` low holds the address.
module tb_badc_sequencer;
  timeunit 1ns; timeprecision 1ps;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic rst, en, force_br, taken, push, pop;
  logic [8:0] force_addr, br_addr, upc, next_addr;

  badc_sequencer dut (.*);

  int checks = 0, failures = 0;
  logic [8:0] m_pc, m_stack[4];
  int m_sp;

  initial begin
    rst = 1; en = 0; force_br = 0; taken = 0; push = 0; pop = 0; force_addr = 0; br_addr = 0;
    @(posedge clk); #1 rst = 0;
    m_pc = 0; m_sp = 0; foreach (m_stack[i]) m_stack[i] = 0;
    checks++; if (upc !== 9'd0) begin failures++; $display("FAIL reset"); end
    for (int n = 0; n < 5000; n++) begin
      logic [8:0] inc, nxt;
      en = ($urandom_range(0, 9) != 0);
      force_br = ($urandom_range(0, 19) == 0); force_addr = 9'($urandom);
      taken = 1'($urandom); br_addr = 9'($urandom);
      push = 0; pop = 0;
      case ($urandom_range(0, 3)) 0: push = 1; 1: pop = 1; default: ; endcase
      inc = m_pc + 1;
      nxt = force_br ? force_addr : pop ? m_stack[m_sp] : taken ? br_addr : inc;
      #1;
      checks++;
      if (next_addr !== nxt) begin failures++; if (failures < 10) $display("FAIL next %h exp %h", next_addr, nxt); end
      @(posedge clk); #1;
      if (en) begin
        if (!force_br && push) begin m_sp = (m_sp + 1) % 4; m_stack[m_sp] = inc; end
        else if (!force_br && pop) m_sp = (m_sp + 3) % 4;
        m_pc = nxt;
      end
      checks++;
      if (upc !== m_pc) begin failures++; if (failures < 10) $display("FAIL upc %h exp %h", upc, m_pc); end
    end
    // a call/return pair: push with branch, later pop returns to call+1
    en = 1; force_br = 0; push = 1; pop = 0; taken = 1; br_addr = 9'h090;
    m_pc = upc;
    @(posedge clk); #1 push = 0; taken = 0;
    repeat (3) @(posedge clk);
    #1 pop = 1; @(posedge clk); #1 pop = 0;
    checks++; if (upc !== m_pc + 9'd1) begin failures++; $display("FAIL return to %h, got %h", m_pc + 1, upc); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #1ms; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
