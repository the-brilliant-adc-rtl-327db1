// badc_cpu: the BADC's microprogrammed 16-bit processor, without its
// control store and clock.
//
// Each 48-bit microinstruction (from badc_control_store, addressed by `upc`)
// is executed in one CPU cycle, ending with `cpu_en`. The D bus into the ALU
// carries the immediate constant when the CONSTANT bit is set, otherwise the
// memory data (RMD), the ADC data (RAD), the CAMAC W buffer (CWD, WYMCWD) or
// zero. The ALU (four Am2901 slices) computes, and its Y output goes to the
// memory, the memory address register and the multiplexor board. The 5-bit
// encoded field is decoded into one strobe per operation (`ctl`); devices
// act on them at `cpu_en`. The branch condition is tested on the flags of
// the current instruction's ALU result (which is why conditional branches
// need a long cycle): none, always, zero, non-zero, negative, not negative,
// overflow, carry. When a breakpoint test bit is set the branch, if any,
// depends instead on breakpoint 1 (internal latch set/cleared by microcode)
// or breakpoint 2 (external: ADC error, host-access error or panel switch).
// `long_cyc` and `pause_req` tell the clock which cycle the instruction
// needs. Branch-condition numbering and the breakpoint-test rule are this
// design's reading of the microword description.
module badc_cpu (
  input  logic              clk,
  input  logic              rst,
  input  logic              cpu_en,
  output logic [8:0]        upc,
  input  badc_pkg::uword_t  uw,
  input  logic              force_pend,
  input  logic [8:0]        force_addr,
  output logic              force_ack,
  input  logic [15:0]       mem_rdata,
  input  logic [15:0]       w_buf,
  input  logic [15:0]       rad_data,
  input  logic              brk2,
  output logic              brk1,
  output logic [15:0]       d_bus,
  output logic [15:0]       y,
  output badc_pkg::flags_t  flags,
  output badc_pkg::ctl_t    ctl,
  output logic              long_cyc,
  output logic              pause_req,
  output logic              taken
);
  import badc_pkg::*;

  logic [15:0] f;
  logic        cond;
  logic        brk_test;

  // encoded-operation decoder
  always_comb begin
    ctl = '0;
    unique case (enc_e'(enc_of(uw)))
      OP_PUSH:      ctl.push      = 1'b1;
      OP_POP:       ctl.pop       = 1'b1;
      OP_CRATE_ON:  ctl.crate_on  = 1'b1;
      OP_CRATE_OFF: ctl.crate_off = 1'b1;
      OP_CLR_HOST:  ctl.clr_host  = 1'b1;
      OP_SETBRK:    ctl.setbrk    = 1'b1;
      OP_CLRBRK:    ctl.clrbrk    = 1'b1;
      OP_RSTQ:      ctl.rstq      = 1'b1;
      OP_SETL:      ctl.setl      = 1'b1;
      OP_RSTL:      ctl.rstl      = 1'b1;
      OP_SETQ:      ctl.setq      = 1'b1;
      OP_MULT:      ctl.mult      = 1'b1;
      OP_RMD:       ctl.rmd       = 1'b1;
      OP_WYM:       ctl.wym       = 1'b1;
      OP_WYMA:      ctl.wyma      = 1'b1;
      OP_CWD:       ctl.cwd       = 1'b1;
      OP_WYMCWD:    begin ctl.wym = 1'b1; ctl.cwd = 1'b1; end
      OP_WTD:       ctl.wtd       = 1'b1;
      OP_WMSA:      ctl.wmsa      = 1'b1;
      OP_WMSAI:     ctl.wmsai     = 1'b1;
      OP_RAD:       ctl.rad       = 1'b1;
      default:      ;
    endcase
  end

  always_comb begin
    if (uw.konst)      d_bus = uw.d;
    else if (ctl.rmd)  d_bus = mem_rdata;
    else if (ctl.rad)  d_bus = rad_data;
    else if (ctl.cwd)  d_bus = w_buf;
    else               d_bus = 16'd0;
  end

  badc_alu u_alu (
    .clk(clk), .en(cpu_en), .dest(uw.dest), .func(uw.func), .src(uw.src),
    .a_addr(uw.a), .b_addr(uw.b), .carry(uw.carry), .srs(uw.srs),
    .mult(ctl.mult), .d(d_bus), .y(y), .f(f), .flags(flags)
  );

  assign brk_test = uw.brk1_req || uw.brk2_req;

  always_comb begin
    unique case (brcond_e'(uw.brcond))
      BR_NONE: cond = 1'b0;
      BR_UN:   cond = 1'b1;
      BR_Z:    cond = flags.z;
      BR_NZ:   cond = !flags.z;
      BR_N:    cond = flags.n;
      BR_NN:   cond = !flags.n;
      BR_OVR:  cond = flags.ovr;
      default: cond = flags.c;
    endcase
  end

  assign taken = (brcond_e'(uw.brcond) != BR_NONE) &&
                 (brk_test ? ((uw.brk1_req && brk1) || (uw.brk2_req && brk2)) : cond);
  assign long_cyc  = brk_test || (uw.brcond > 3'(BR_UN));
  assign pause_req = uw.status_req;
  assign force_ack = cpu_en && force_pend;

  badc_sequencer #(.AW(9), .DEPTH(4)) u_seq (
    .clk(clk), .rst(rst), .en(cpu_en), .force_br(force_pend), .force_addr(force_addr),
    .taken(taken), .br_addr(br_addr(uw)), .push(ctl.push), .pop(ctl.pop),
    .upc(upc), .next_addr()
  );

  always_ff @(posedge clk) begin
    if (rst)                       brk1 <= 1'b0;
    else if (cpu_en && ctl.setbrk) brk1 <= 1'b1;
    else if (cpu_en && ctl.clrbrk) brk1 <= 1'b0;
  end

  // the encoded field selects one operation per instruction by construction;
  // a constant and a branch address cannot share the D field
  always_ff @(posedge clk)
    if (!rst && cpu_en)
      assert (!(uw.konst && brcond_e'(uw.brcond) != BR_NONE))
        else $error("microword at %0h uses the D field as constant and branch address", upc);
endmodule
