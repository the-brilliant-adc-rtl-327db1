// eh12b3: behavioural model of the Datel EH12B3 12-bit analog-to-digital
// converter on the ADC-MUX board (an analog part; this file is a
// simulation model, not logic to build).
//
// A one-tick pulse on `start` samples the input (millivolts) and raises
// `busy` (the part's end-of-conversion status) for CONV_TICKS base-clock
// ticks, the 2 us maximum conversion time at 40 ns per tick; the 12-bit
// result is valid when busy falls and stays until the next conversion.
// The input range is taken as 0 to 5.12 V unipolar, 1.25 mV per code, so the
// 0 to +5 V module outputs fit; inputs of 5.12 V and above give code 4095.
module eh12b3 #(
  parameter int unsigned CONV_TICKS = 50,
  parameter int unsigned FS_MV      = 5120
) (
  input  logic        clk,
  input  logic [15:0] vin_mv,
  input  logic        start,
  output logic        busy,
  output logic [11:0] data
);
  localparam int unsigned CW = $clog2(CONV_TICKS + 1);

  logic [CW-1:0] cnt    = '0;
  logic [11:0]   sample = '0;

  function automatic logic [11:0] code_of(logic [15:0] mv);
    int unsigned c;
    c = (32'(mv) * 4096) / FS_MV;
    return (c > 4095) ? 12'hFFF : 12'(c);
  endfunction



  always @(posedge clk) begin
    if (start) begin
      sample <= code_of(vin_mv);
      busy   <= 1'b1;
      cnt    <= CW'(1);
    end else if (busy) begin
      if (cnt == CW'(CONV_TICKS)) begin
        busy <= 1'b0;
        data <= sample;
      end else begin
        cnt <= cnt + 1'b1;
      end
    end
  end
endmodule
