// tb_module_bank: behavioural stand-in for the crate of TAC and SHAM modules
// that the BADC reads. On the rising edge of S1 the modules latch the
// multiplexor address (station, F1, subaddress) and, SETTLE_TICKS later,
// the addressed channel drives the analog bus with its level, chan_mv().
// One address can be forced above full scale to provoke an ADC error.
module tb_module_bank #(
  parameter int unsigned SETTLE_TICKS = 3
) (
  input  logic        clk,
  input  logic [4:0]  mod_n,
  input  logic        mod_f1,
  input  logic [3:0]  mod_a,
  input  logic        mod_s1,
  input  int unsigned seed,
  input  int          over_addr,
  output logic [15:0] analog_mv,
  output int unsigned s1_count
);
  import tb_badc_pkg::*;
  logic [9:0] lat;
  logic       s1_d = 1'b0;
  int         dly = 0;

  initial begin analog_mv = 16'd0; s1_count = 0; lat = '0; end

  always @(posedge clk) begin
    s1_d <= mod_s1;
    if (mod_s1 && !s1_d) begin
      lat <= {mod_n, mod_f1, mod_a};
      dly <= SETTLE_TICKS;
      s1_count <= s1_count + 1;
    end else if (dly > 0) begin
      dly <= dly - 1;
      if (dly == 1)
        analog_mv <= (int'(lat) == over_addr) ? 16'd5600 : 16'(chan_mv(lat, seed));
    end
  end
endmodule
