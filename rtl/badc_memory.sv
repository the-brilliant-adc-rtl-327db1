// badc_memory: the BADC data memory, 4096 x 16 per board, up to eight
// boards (32768 words). It holds constants, the data buffer and control
// tables; the microprogram is never stored here.
//
// The CPU addresses it through a 15-bit memory address register loaded from
// the Y bus (`mar_wr`). A write (`wr`) stores Y at the addressed word at the
// end of the CPU cycle and needs no wait. A read (`rd`) is a pause cycle:
// starting at `cyc_start` the board counts ACCESS_TICKS base-clock ticks
// (220 ns access time, 6 ticks of 40 ns) and then raises `ack` with the
// data, both held until the cycle ends (`cpu_en`). Words on boards that are
// not fitted read as 0 and ignore writes. The address register, its width
// and the no-increment behaviour are this design's choices.
module badc_memory #(
  parameter int unsigned BOARDS          = 1,
  parameter int unsigned WORDS_PER_BOARD = 4096,
  parameter int unsigned ACCESS_TICKS    = 6
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        cpu_en,
  input  logic        cyc_start,
  input  logic        rd,
  input  logic        wr,
  input  logic        mar_wr,
  input  logic [15:0] y,
  output logic [15:0] rdata,
  output logic        ack
);
  localparam int unsigned WORDS = BOARDS * WORDS_PER_BOARD;
  localparam int unsigned AW    = $clog2(WORDS);
  localparam int unsigned CW    = $clog2(ACCESS_TICKS + 1);

  logic [15:0]   mem [WORDS];
  logic [14:0]   mar;
  logic [CW-1:0] cnt;
  logic          busy;
  logic          fitted;

  assign fitted = (32'(mar) < WORDS);

  always_ff @(posedge clk) begin
    if (rst) begin
      mar <= '0; cnt <= '0; busy <= 1'b0; ack <= 1'b0; rdata <= '0;
    end else begin
      if (cyc_start && rd) begin
        busy <= 1'b1; cnt <= CW'(1); ack <= 1'b0;
      end else if (busy) begin
        if (cnt == CW'(ACCESS_TICKS - 1)) begin
          busy  <= 1'b0;
          ack   <= 1'b1;
          rdata <= fitted ? mem[mar[AW-1:0]] : 16'd0;
        end else begin
          cnt <= cnt + 1'b1;
        end
      end
      if (cpu_en) begin
        ack <= 1'b0;
        if (mar_wr) mar <= y[14:0];
      end
    end
  end

  always_ff @(posedge clk)
    if (cpu_en && wr && fitted) mem[mar[AW-1:0]] <= y;
endmodule
