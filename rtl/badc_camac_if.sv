// badc_camac_if: the BADC's own CAMAC station, seen by the host through the
// dataway, plus the crate-control handshake lines to the crate controller.
//
// A dataway command addressed to the BADC (N high) is acted on at the rising
// edge of strobe S1. Every function answers X = 1. Read functions (F0-F7)
// put the R buffer on the R lines while N is high; the R buffer is loaded
// with the data of every memory read the CPU makes. Write functions
// (F16-F23) load the W buffer from the W lines; the CPU moves it onto its D
// bus with the CWD operation. F9 resets the BADC, F24 disables and F26
// enables the LAM; every other function forces a branch of the microprogram
// to vector VEC_BASE + F, as does a rising edge of the front-panel NIM
// input (to NIM_VEC). A forced branch stays pending until the CPU takes it
// at the end of its current cycle (`force_ack`). F19 also loads the ADC test
// register straight from W. Q and L are latches set and cleared by
// microcode; the L line is the LAM latch gated by the LAM enable. While the
// BADC holds the crate (controller enable), a host command to the crate
// (`host_addr`) is latched as an error the microcode can see and clear.
// The vector addresses, which functions read and write, and the test
// register's function code are this design's choices.
module badc_camac_if #(
  parameter logic [8:0] VEC_BASE = 9'h040,
  parameter logic [8:0] NIM_VEC  = 9'h060
) (
  input  logic        clk,
  input  logic        rst,          // power-up / panel reset
  // dataway (BADC as a slave)
  input  logic        dw_n,
  input  logic [3:0]  dw_a,
  input  logic [4:0]  dw_f,
  input  logic        dw_s1,
  input  logic [15:0] dw_w,
  output logic [15:0] dw_r,
  output logic        dw_q,
  output logic        dw_x,
  output logic        dw_l,
  input  logic        nim_trig,
  input  logic        host_addr,    // host addressed the crate
  // CPU side
  input  logic        cpu_en,
  input  badc_pkg::ctl_t ctl,
  input  logic [15:0] mem_rdata,
  output logic [15:0] w_buf,
  output logic        force_pend,
  output logic [8:0]  force_addr,
  input  logic        force_ack,
  output logic        badc_reset,   // F9: one-tick reset pulse
  output logic        test_load,
  output logic        crate_enable, // to the crate controller
  output logic        host_err
);
  logic        s1_d, nim_d;
  logic [15:0] r_buf;
  logic        q_latch, l_latch, lam_en;
  logic        cmd;

  assign cmd       = dw_n && dw_s1 && !s1_d;
  assign dw_x      = dw_n;
  assign dw_q      = dw_n && q_latch;
  assign dw_r      = (dw_n && dw_f < 5'd8) ? r_buf : 16'd0;
  assign dw_l      = l_latch && lam_en;
  assign test_load = cmd && dw_f == 5'd19;

  always_ff @(posedge clk) begin
    if (rst) begin
      s1_d <= 1'b0; nim_d <= 1'b0; r_buf <= '0; w_buf <= '0;
      q_latch <= 1'b0; l_latch <= 1'b0; lam_en <= 1'b0;
      force_pend <= 1'b0; force_addr <= '0; badc_reset <= 1'b0;
      crate_enable <= 1'b0; host_err <= 1'b0;
    end else begin
      s1_d       <= dw_s1;
      nim_d      <= nim_trig;
      badc_reset <= 1'b0;
      if (force_ack) force_pend <= 1'b0;
      if (cpu_en) begin
        if (ctl.rmd)       r_buf   <= mem_rdata;
        if (ctl.setq)      q_latch <= 1'b1;
        if (ctl.rstq)      q_latch <= 1'b0;
        if (ctl.setl)      l_latch <= 1'b1;
        if (ctl.rstl)      l_latch <= 1'b0;
        if (ctl.crate_on)  crate_enable <= 1'b1;
        if (ctl.crate_off) crate_enable <= 1'b0;
        if (ctl.clr_host)  host_err <= 1'b0;
      end
      if (crate_enable && host_addr) host_err <= 1'b1;
      if (nim_trig && !nim_d) begin
        force_pend <= 1'b1; force_addr <= NIM_VEC;
      end
      if (cmd) begin
        if (dw_f >= 5'd16 && dw_f < 5'd24) w_buf <= dw_w;
        unique case (dw_f)
          5'd9: begin
            badc_reset <= 1'b1; force_pend <= 1'b0;
            q_latch <= 1'b0; l_latch <= 1'b0; lam_en <= 1'b0;
            crate_enable <= 1'b0; host_err <= 1'b0;
          end
          5'd24: lam_en <= 1'b0;
          5'd26: lam_en <= 1'b1;
          default: begin
            force_pend <= 1'b1; force_addr <= VEC_BASE + 9'(dw_f);
          end
        endcase
      end
    end
  end
endmodule
