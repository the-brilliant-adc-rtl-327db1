// badc_mux_ctrl: digital control of the ADC-MUX board.
//
// It addresses the TAC/SHAM modules of the crate and runs the three-stage
// analog pipeline module -> sample-and-hold -> ADC, so that while the CPU
// works on channel i the ADC converts channel i+1 and the modules set up
// channel i+2. The 10-bit multiplexor address is station (bits 9:5),
// F1 (bit 4, the high channel bit the modules take from function line F1)
// and subaddress A (bits 3:0); S1 strobes it into the modules.
//
// WMSA / WMSAI load the start address from Y and strobe S1; WMSAI also
// selects auto-increment. After SETTLE_TICKS + ACQ_TICKS (module settling
// plus the 1 us acquisition of the sample-and-hold) the S/H is put in hold
// and the ADC started; in increment mode the address steps to the next
// channel and is strobed at the same moment. When the conversion ends the
// result is kept and the S/H returns to tracking. RAD (a pause cycle) is
// acknowledged as soon as a result is waiting; taking it starts the next
// conversion once the S/H has re-acquired. Without increment the same
// channel is converted again for every RAD (continuous scan). A RAD with
// no scan started, or a full-scale (over-range) result, raises `err`, which
// reaches the CPU as breakpoint 2. While the test register is loaded (by
// CAMAC or by WTD from Y) RAD returns it instead of the ADC, until reset.
// The timing constants follow the document's parts; the state machine,
// the error rule and the test-mode rule are this design's.
module badc_mux_ctrl #(
  parameter int unsigned ACQ_TICKS    = 25, // 1 us at 40 ns
  parameter int unsigned SETTLE_TICKS = 5,  // module output settling
  parameter int unsigned S1_TICKS     = 5   // S1 strobe width
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        cpu_en,
  input  badc_pkg::ctl_t ctl,
  input  logic [15:0] y,
  input  logic        test_load,
  input  logic [15:0] test_wdata,
  // crate addressing
  output logic [4:0]  mod_n,
  output logic        mod_f1,
  output logic [3:0]  mod_a,
  output logic        mod_s1,
  // sample-and-hold and ADC
  output logic        sh_hold,
  output logic        adc_start,
  input  logic        adc_busy,
  input  logic [11:0] adc_data,
  // CPU
  output logic [15:0] rad_data,
  output logic        ack,
  output logic        err,
  output logic        scanning
);
  typedef enum logic [1:0] {S_IDLE, S_ACQ, S_CONV, S_FULL} state_e;

  localparam int unsigned T_ACQ = ACQ_TICKS + SETTLE_TICKS;
  localparam int unsigned CW    = $clog2(T_ACQ + 2);
  localparam int unsigned SW    = $clog2(S1_TICKS + 1);

  state_e        st;
  logic [9:0]    ma;
  logic          inc_mode;
  logic [11:0]   res;
  logic          res_valid;
  logic [CW-1:0] cnt;
  logic [SW-1:0] s1_cnt;
  logic          conv_seen;  // ADC busy has been seen since the start
  logic          test_mode;
  logic [15:0]   test_reg;

  assign mod_n    = ma[9:5];
  assign mod_f1   = ma[4];
  assign mod_a    = ma[3:0];
  assign mod_s1   = (s1_cnt != '0);
  assign sh_hold  = (st == S_CONV);
  assign scanning = (st != S_IDLE);

  assign ack      = test_mode || res_valid || (st == S_IDLE);
  assign rad_data = test_mode ? test_reg : (res_valid ? {4'd0, res} : 16'd0);
  assign err      = !test_mode && ((st == S_IDLE) || (res_valid && res == 12'hFFF));

  always_ff @(posedge clk) begin
    if (rst) begin
      st <= S_IDLE; ma <= '0; inc_mode <= 1'b0; res <= '0; res_valid <= 1'b0;
      cnt <= '0; s1_cnt <= '0; conv_seen <= 1'b0; adc_start <= 1'b0;
      test_mode <= 1'b0; test_reg <= '0;
    end else begin
      adc_start <= 1'b0;
      if (s1_cnt != '0) s1_cnt <= s1_cnt - 1'b1;
      if (cnt != CW'(T_ACQ)) cnt <= cnt + 1'b1;

      unique case (st)
        S_IDLE: ;
        S_ACQ: if (cnt == CW'(T_ACQ)) begin
          st <= S_CONV; adc_start <= 1'b1; conv_seen <= 1'b0;
          if (inc_mode) begin ma <= ma + 1'b1; s1_cnt <= SW'(S1_TICKS); end
        end
        S_CONV: begin
          if (adc_busy) conv_seen <= 1'b1;
          if (conv_seen && !adc_busy) begin
            res <= adc_data; res_valid <= 1'b1; st <= S_FULL; cnt <= '0;
          end
        end
        default: ; // S_FULL: S/H re-acquires while the result waits
      endcase

      if (cpu_en) begin
        if (ctl.rad && !test_mode && res_valid) begin
          res_valid <= 1'b0;
          st <= S_ACQ;
        end
        if (ctl.wmsa || ctl.wmsai) begin
          ma <= y[9:0]; inc_mode <= ctl.wmsai; s1_cnt <= SW'(S1_TICKS);
          st <= S_ACQ; cnt <= '0; res_valid <= 1'b0;
        end
        if (ctl.wtd) begin test_reg <= y; test_mode <= 1'b1; end
      end
      if (test_load) begin test_reg <= test_wdata; test_mode <= 1'b1; end
    end
  end
endmodule
