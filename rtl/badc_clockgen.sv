// badc_clockgen: the BADC CPU clock, with its three cycle lengths.
//
// Runs on a base clock (25 MHz by default, 40 ns per tick) and emits one
// `cpu_en` pulse at the last tick of every CPU cycle; all CPU state changes
// on that tick. A short cycle (200 ns, SHORT_TICKS) is used by default, a
// long cycle (360 ns, LONG_TICKS) when the current microinstruction makes a
// conditional branch, and a pause cycle when it sets the status request:
// the clock then stops in phase 0 until the external device acknowledges
// (`ack`), and continues with the rest of a short or long cycle. A pending
// forced branch also releases a pause, so a CAMAC command can always take
// the CPU back. `cyc_start` marks the first tick of each cycle so devices
// can start their access. The front panel's single-step mode holds the
// clock at phase 0 until a step pulse. The cycle lengths follow the
// document; the base-clock period and the step mechanism are this design's.
module badc_clockgen #(
  parameter int unsigned SHORT_TICKS = 5,
  parameter int unsigned LONG_TICKS  = 9
) (
  input  logic clk,
  input  logic rst,
  input  logic long_cyc,   // current instruction needs a long cycle
  input  logic pause_req,  // current instruction waits for an acknowledge
  input  logic ack,
  input  logic force_pend, // forced branch waiting
  input  logic run,        // 1: free running, 0: single step
  input  logic step,       // one-tick pulse: allow one cycle in single step
  output logic cpu_en,
  output logic cyc_start,
  output logic paused      // clock held in phase 0 this tick
);
  localparam int unsigned CW = $clog2(LONG_TICKS + 1);

  logic [CW-1:0] ph;
  logic          first;    // this tick is the first of a cycle
  logic          step_ok;  // single step granted for this cycle
  logic          hold;
  logic [CW-1:0] last;

  assign last  = long_cyc ? CW'(LONG_TICKS - 1) : CW'(SHORT_TICKS - 1);
  assign hold  = (ph == '0) && ((pause_req && !ack && !force_pend) || (!run && !step_ok && !step));
  assign cpu_en    = !hold && (ph == last);
  assign cyc_start = first;
  assign paused    = hold;

  always_ff @(posedge clk) begin
    if (rst) begin
      ph <= '0; first <= 1'b1; step_ok <= 1'b0;
    end else begin
      first <= cpu_en;
      if (step) step_ok <= 1'b1;
      if (!hold) begin
        if (ph == last) begin ph <= '0; step_ok <= 1'b0; end
        else            ph <= ph + 1'b1;
      end
    end
  end
endmodule
