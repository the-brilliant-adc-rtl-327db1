// badc_alu: the BADC's 16-bit ALU, four Am2901 slices in cascade with the
// shift-rotate multiplexor at the ends.
//
// The carry ripples from slice to slice (the slices are equivalent to a
// carry-lookahead arrangement; only the settling time differs). The shift
// lines chain between neighbouring slices, and badc_shift_mux drives the
// outer ends. Flags: Z when all 16 bits of F are zero, N = F15, OVR and C
// from the top slice. During the multiply operation the source code bit I1
// is cleared when Q0 is 1, turning the 0+B source into A+B, so that one
// microinstruction performs one shift-and-conditional-add step; this follows
// the multiply routine of the BADC microcode. Register and Q writes occur on
// the clock edge when `en` is high; everything else is combinational.
module badc_alu (
  input  logic            clk,
  input  logic            en,
  input  logic [2:0]      dest,
  input  logic [2:0]      func,
  input  logic [2:0]      src,
  input  logic [3:0]      a_addr,
  input  logic [3:0]      b_addr,
  input  logic            carry,
  input  logic [1:0]      srs,
  input  logic            mult,
  input  logic [15:0]     d,
  output logic [15:0]     y,
  output logic [15:0]     f,
  output badc_pkg::flags_t flags
);
  import badc_pkg::*;

  logic [4:0] c;          // carries between slices
  logic [3:0] ovr_s;
  logic [3:0] r0o, r3o, q0o, q3o;
  logic [3:0] r0i, r3i, q0i, q3i;
  logic       ram15_in, q15_in, ram0_in, q0_in;
  logic [8:0] i_code;
  logic [2:0] src_eff;

  assign src_eff = mult ? {src[2], src[1] & ~q0o[0], src[0]} : src;
  assign i_code  = {dest, func, src_eff};
  assign c[0]    = carry;

  for (genvar k = 0; k < 4; k++) begin : g_slice
    am2901 u_slice (
      .clk(clk), .en(en), .i(i_code), .a_addr(a_addr), .b_addr(b_addr),
      .d(d[4*k +: 4]), .cn(c[k]),
      .ram0_in(r0i[k]), .ram3_in(r3i[k]), .q0_in(q0i[k]), .q3_in(q3i[k]),
      .y(y[4*k +: 4]), .f(f[4*k +: 4]), .cn4(c[k+1]), .ovr(ovr_s[k]),
      .ram0_out(r0o[k]), .ram3_out(r3o[k]), .q0_out(q0o[k]), .q3_out(q3o[k])
    );
  end

  // shift chains: down shift takes the neighbour above, up shift the one below
  assign r3i = {ram15_in, r0o[3:1]};
  assign q3i = {q15_in,   q0o[3:1]};
  assign r0i = {r3o[2:0], ram0_in};
  assign q0i = {q3o[2:0], q0_in};

  badc_shift_mux u_shift (
    .dest(dest), .srs(srs), .mult(mult),
    .f0(f[0]), .f15(f[15]), .ovr(ovr_s[3]), .q0(q0o[0]), .q15(q3o[3]),
    .ram15_in(ram15_in), .q15_in(q15_in), .ram0_in(ram0_in), .q0_in(q0_in)
  );

  assign flags.z   = (f == 16'd0);
  assign flags.n   = f[15];
  assign flags.ovr = ovr_s[3];
  assign flags.c   = c[4];
endmodule
