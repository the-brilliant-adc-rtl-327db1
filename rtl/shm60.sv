// shm60: behavioural model of the Burr-Brown SHM60 sample-and-hold
// amplifier on the ADC-MUX board (an analog part; this file is a
// simulation model, not logic to build).
//
// The analog voltage is carried as an unsigned number of millivolts. In
// track mode (hold low) the output follows the input only once the input
// has been tracked, unchanged, for ACQ_TICKS base-clock ticks: the 1 us
// acquisition time for a 10 V step, at 40 ns per tick. A shorter track
// leaves the previous output, so a controller that holds too early reads a
// stale value. In hold mode the output stays frozen. Ports: input voltage,
// hold command, output voltage, and the base clock that measures time.
module shm60 #(
  parameter int unsigned ACQ_TICKS = 25
) (
  input  logic        clk,
  input  logic [15:0] vin_mv,
  input  logic        hold,
  output logic [15:0] vout_mv
);
  localparam int unsigned CW = $clog2(ACQ_TICKS + 1);

  logic [CW-1:0] trk   = '0;
  logic [15:0]   vin_d = '0;



  always @(posedge clk) begin
    vin_d <= vin_mv;
    if (hold || vin_mv != vin_d) begin
      trk <= '0;
    end else if (trk != CW'(ACQ_TICKS)) begin
      trk <= trk + 1'b1;
    end
    if (!hold && trk == CW'(ACQ_TICKS) && vin_mv == vin_d) vout_mv <= vin_mv;
  end
endmodule
