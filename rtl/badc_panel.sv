// badc_panel: the BADC front panel logic.
//
// Indicators: the PROM address, the branch code, the CPU condition flags,
// the L, X and Q lines, a clock indicator, and 16 LEDs that a switch sets to
// show either the ALU input (D bus) or the ALU output (Y bus). Controls: a
// reset push-button, a run/single-step switch with a step push-button, and
// a breakpoint switch that drives breakpoint 2. The push-buttons are
// synchronised to the base clock and turned into one-tick pulses; the reset
// pulse is stretched to RESET_TICKS ticks. Indicator values are latched at
// the end of each CPU cycle so the LEDs show a steady state in single step.
// The external-clock switch of the panel is not modelled.
module badc_panel #(
  parameter int unsigned RESET_TICKS = 4
) (
  input  logic              clk,
  input  logic              por,        // power-on reset
  input  logic              cpu_en,
  input  logic              sw_reset,
  input  logic              sw_step,
  input  logic              sw_run,
  input  logic              sw_brk,
  input  logic              sw_show_out, // 1: LEDs show ALU output
  input  logic [8:0]        upc,
  input  logic [2:0]        brcond,
  input  badc_pkg::flags_t  flags,
  input  logic [15:0]       d_bus,
  input  logic [15:0]       y,
  input  logic              dw_l,
  input  logic              dw_x,
  input  logic              dw_q,
  output logic              rst_out,
  output logic              step_pulse,
  output logic              run,
  output logic              brk_sw,
  output logic [8:0]        led_addr,
  output logic [2:0]        led_brcode,
  output logic [3:0]        led_flags,
  output logic [2:0]        led_lxq,
  output logic              led_clk,
  output logic [15:0]       led_data
);
  localparam int unsigned RW = $clog2(RESET_TICKS + 1);

  logic [1:0]    rst_sync, step_sync, run_sync, brk_sync;
  logic          step_d;
  logic [RW-1:0] rst_cnt;

  always_ff @(posedge clk) begin
    rst_sync  <= {rst_sync[0],  sw_reset};
    step_sync <= {step_sync[0], sw_step};
    run_sync  <= {run_sync[0],  sw_run};
    brk_sync  <= {brk_sync[0],  sw_brk};
    step_d    <= step_sync[1];
    if (por)              rst_cnt <= RW'(RESET_TICKS);
    else if (rst_sync[1]) rst_cnt <= RW'(RESET_TICKS);
    else if (rst_cnt != '0) rst_cnt <= rst_cnt - 1'b1;
  end

  assign rst_out    = por || (rst_cnt != '0);
  assign step_pulse = step_sync[1] && !step_d;
  assign run        = run_sync[1];
  assign brk_sw     = brk_sync[1];

  always_ff @(posedge clk) begin
    if (rst_out) begin
      led_addr <= '0; led_brcode <= '0; led_flags <= '0; led_data <= '0; led_clk <= 1'b0;
    end else if (cpu_en) begin
      led_addr   <= upc;
      led_brcode <= brcond;
      led_flags  <= {flags.z, flags.n, flags.ovr, flags.c};
      led_data   <= sw_show_out ? y : d_bus;
      led_clk    <= !led_clk;
    end
  end
  assign led_lxq = {dw_l, dw_x, dw_q};
endmodule
