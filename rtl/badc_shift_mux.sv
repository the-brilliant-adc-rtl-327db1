// badc_shift_mux: the shift-rotate multiplexor at the two ends of the 16-bit
// ALU. It supplies the bit shifted into the top (on a down shift) or the
// bottom (on an up shift) of the B register and of the Q register.
//
// Control is the 2-bit SRS field together with the Am2901 destination code
// and the multiply operation, as the BADC microword describes:
//   SRS 0  shift with 0 fill       SRS 1  shift with 1 fill
//   SRS 2  rotate                  SRS 3  arithmetic shift
// Single-length destinations (RAMD, RAMU) shift the B register alone;
// double-length ones (RAMQD, RAMQU) shift B:Q as one 32-bit word, B being
// the upper half. An arithmetic down shift fills with the sign F15; during
// a multiply step it fills with F15 xor OVR, the true sign of the
// conditional sum, which is what the two's complement multiply needs.
// Which fill each mode uses at each end is this design's reading of the
// mode names. Purely combinational.
module badc_shift_mux (
  input  logic [2:0] dest,
  input  logic [1:0] srs,
  input  logic       mult,
  input  logic       f0,
  input  logic       f15,
  input  logic       ovr,
  input  logic       q0,
  input  logic       q15,
  output logic       ram15_in,
  output logic       q15_in,
  output logic       ram0_in,
  output logic       q0_in
);
  import badc_pkg::*;

  logic dbl;
  assign dbl = (dest_e'(dest) == DST_RAMQD) || (dest_e'(dest) == DST_RAMQU);

  always_comb begin
    // down shift: bit leaving B at the bottom enters Q at the top
    q15_in = f0;
    unique case (srs_e'(srs))
      SRS_FILL0: ram15_in = 1'b0;
      SRS_FILL1: ram15_in = 1'b1;
      SRS_ROT:   ram15_in = dbl ? q0 : f0;
      default:   ram15_in = mult ? (f15 ^ ovr) : f15;
    endcase
    // up shift: bit leaving Q at the top enters B at the bottom
    unique case (srs_e'(srs))
      SRS_FILL1: begin ram0_in = dbl ? q15 : 1'b1; q0_in = 1'b1; end
      SRS_ROT:   begin ram0_in = dbl ? q15 : f15;  q0_in = f15;  end
      default:   begin ram0_in = dbl ? q15 : 1'b0; q0_in = 1'b0; end
    endcase
  end
endmodule
