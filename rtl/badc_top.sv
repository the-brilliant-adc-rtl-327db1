// badc_top: the Brilliant ADC, a CAMAC module that digitises and
// pre-processes the analog data of one crate of TAC/SHAM modules.
//
// Blocks: the microprogrammed CPU (badc_cpu: four Am2901 slices, Am2909-style
// sequencer, decoder), its clock (badc_clockgen: 200 ns short, 360 ns long and
// pause cycles), the control store (PROM plus debugging RAM), one 4096-word
// memory board, the CAMAC slave interface with R/W buffers, forced branches,
// Q, X, LAM and crate-control lines, the ADC-MUX board (multiplexor control,
// SHM60 sample-and-hold and EH12B3 ADC models) and the front panel.
// All logic runs on one base clock `clk` (25 MHz, 40 ns); the CPU advances on
// the clock generator's `cpu_en` ticks. Analog voltages are carried as
// millivolt numbers. `por` is the power-on reset (active high). The host
// reaches the BADC through the dw_* dataway signals; the BADC addresses the
// crate's modules through mod_* and asks the crate controller for the crate
// with `crate_enable`. The debugging-RAM load port stands for the separate
// debugging module that replaces the PROMs.
module badc_top (
  input  logic        clk,
  input  logic        por,
  // front panel
  input  logic        sw_reset,
  input  logic        sw_step,
  input  logic        sw_run,
  input  logic        sw_brk,
  input  logic        sw_show_out,
  input  logic        nim_trig,
  output logic [8:0]  led_addr,
  output logic [2:0]  led_brcode,
  output logic [3:0]  led_flags,
  output logic [2:0]  led_lxq,
  output logic        led_clk,
  output logic [15:0] led_data,
  // CAMAC dataway, BADC as a slave
  input  logic        dw_n,
  input  logic [3:0]  dw_a,
  input  logic [4:0]  dw_f,
  input  logic        dw_s1,
  input  logic [15:0] dw_w,
  output logic [15:0] dw_r,
  output logic        dw_q,
  output logic        dw_x,
  output logic        dw_l,
  // crate control and module addressing, BADC as the crate master
  input  logic        host_addr,
  output logic        crate_enable,
  output logic [4:0]  mod_n,
  output logic        mod_f1,
  output logic [3:0]  mod_a,
  output logic        mod_s1,
  // analog bus from the modules, millivolts
  input  logic [15:0] analog_mv,
  // debugging RAM
  input  logic        dbg_sel,
  input  logic        dbg_we,
  input  logic [8:0]  dbg_addr,
  input  logic [47:0] dbg_wdata,
  // status
  output logic        brk1,
  output logic        cpu_en
);
  import badc_pkg::*;

  logic        panel_rst, badc_reset, rst;
  logic        step_pulse, run, brk_sw;
  logic        cyc_start, paused;
  logic [8:0]  upc;
  uword_t      uw;
  logic        force_pend, force_ack;
  logic [8:0]  force_addr;
  logic [15:0] mem_rdata, w_buf, rad_data, d_bus, y;
  logic        mem_ack, mux_ack, mux_err, host_err, ack;
  flags_t      flags;
  ctl_t        ctl;
  logic        long_cyc, pause_req, taken;
  logic        test_load;
  logic        sh_hold, adc_start, adc_busy, scanning;
  logic [11:0] adc_data;
  logic [15:0] sh_out_mv;

  assign rst = panel_rst || badc_reset;
  assign ack = (ctl.rmd && mem_ack) || (ctl.rad && mux_ack) || (!ctl.rmd && !ctl.rad);

  badc_panel u_panel (
    .clk(clk), .por(por), .cpu_en(cpu_en), .sw_reset(sw_reset), .sw_step(sw_step),
    .sw_run(sw_run), .sw_brk(sw_brk), .sw_show_out(sw_show_out), .upc(upc),
    .brcond(uw.brcond), .flags(flags), .d_bus(d_bus), .y(y),
    .dw_l(dw_l), .dw_x(dw_x), .dw_q(dw_q), .rst_out(panel_rst), .step_pulse(step_pulse),
    .run(run), .brk_sw(brk_sw), .led_addr(led_addr), .led_brcode(led_brcode),
    .led_flags(led_flags), .led_lxq(led_lxq), .led_clk(led_clk), .led_data(led_data)
  );

  badc_clockgen u_clk (
    .clk(clk), .rst(rst), .long_cyc(long_cyc), .pause_req(pause_req), .ack(ack),
    .force_pend(force_pend), .run(run), .step(step_pulse),
    .cpu_en(cpu_en), .cyc_start(cyc_start), .paused(paused)
  );

  badc_control_store u_cs (
    .clk(clk), .addr(upc), .word(uw), .dbg_sel(dbg_sel), .dbg_we(dbg_we),
    .dbg_addr(dbg_addr), .dbg_wdata(dbg_wdata)
  );

  badc_cpu u_cpu (
    .clk(clk), .rst(rst), .cpu_en(cpu_en), .upc(upc), .uw(uw),
    .force_pend(force_pend), .force_addr(force_addr), .force_ack(force_ack),
    .mem_rdata(mem_rdata), .w_buf(w_buf), .rad_data(rad_data),
    .brk2(brk_sw || mux_err || host_err), .brk1(brk1), .d_bus(d_bus), .y(y),
    .flags(flags), .ctl(ctl), .long_cyc(long_cyc), .pause_req(pause_req), .taken(taken)
  );

  badc_memory u_mem (
    .clk(clk), .rst(rst), .cpu_en(cpu_en), .cyc_start(cyc_start),
    .rd(ctl.rmd), .wr(ctl.wym), .mar_wr(ctl.wyma), .y(y), .rdata(mem_rdata), .ack(mem_ack)
  );

  badc_camac_if u_camac (
    .clk(clk), .rst(panel_rst), .dw_n(dw_n), .dw_a(dw_a), .dw_f(dw_f), .dw_s1(dw_s1),
    .dw_w(dw_w), .dw_r(dw_r), .dw_q(dw_q), .dw_x(dw_x), .dw_l(dw_l),
    .nim_trig(nim_trig), .host_addr(host_addr), .cpu_en(cpu_en), .ctl(ctl),
    .mem_rdata(mem_rdata), .w_buf(w_buf), .force_pend(force_pend),
    .force_addr(force_addr), .force_ack(force_ack), .badc_reset(badc_reset),
    .test_load(test_load), .crate_enable(crate_enable), .host_err(host_err)
  );

  badc_mux_ctrl u_mux (
    .clk(clk), .rst(rst), .cpu_en(cpu_en), .ctl(ctl), .y(y),
    .test_load(test_load), .test_wdata(dw_w),
    .mod_n(mod_n), .mod_f1(mod_f1), .mod_a(mod_a), .mod_s1(mod_s1),
    .sh_hold(sh_hold), .adc_start(adc_start), .adc_busy(adc_busy), .adc_data(adc_data),
    .rad_data(rad_data), .ack(mux_ack), .err(mux_err), .scanning(scanning)
  );

  shm60 u_sh (.clk(clk), .vin_mv(analog_mv), .hold(sh_hold), .vout_mv(sh_out_mv));

  eh12b3 u_adc (.clk(clk), .vin_mv(sh_out_mv), .start(adc_start), .busy(adc_busy), .data(adc_data));
endmodule
