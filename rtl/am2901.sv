// am2901: one 4-bit bipolar microprocessor slice (register file, Q register,
// source selector, 8-function ALU and shifters), as used four at a time to
// build the BADC's 16-bit ALU.
//
// Sixteen 4-bit registers are read combinationally through the A and B
// ports; the source code I[2:0] picks the ALU operands R and S from A, B, Q,
// D and zero, the function code I[5:3] picks add, two subtracts or one of
// five logic operations, and the destination code I[8:6] decides what is
// written back (B register, Q register, shifted up or down) and whether Y
// shows F or the A operand. Writes happen on the rising clock edge when
// `en` is high (one CPU cycle). The shift lines of the part are split into
// an input and an output each, because they only ever carry one direction at
// a time; in a down shift the RAM3/Q3 inputs are used and RAM0/Q0 outputs
// drive the next lower slice, in an up shift the other way round.
// The function set and codes are those of the standard Am2901 part, which
// the BADC uses as a bought-in component. For the logic functions carry out
// and overflow are reported as 0, a simplification of the part's behaviour.
module am2901 (
  input  logic       clk,
  input  logic       en,
  input  logic [8:0] i,
  input  logic [3:0] a_addr,
  input  logic [3:0] b_addr,
  input  logic [3:0] d,
  input  logic       cn,
  input  logic       ram0_in,   // fill for bit 0 on an up shift
  input  logic       ram3_in,   // fill for bit 3 on a down shift
  input  logic       q0_in,
  input  logic       q3_in,
  output logic [3:0] y,
  output logic [3:0] f,
  output logic       cn4,
  output logic       ovr,
  output logic       ram0_out,  // F0, shifted out on a down shift
  output logic       ram3_out,  // F3, shifted out on an up shift
  output logic       q0_out,
  output logic       q3_out
);
  import badc_pkg::*;

  logic [3:0] regs [16];
  logic [3:0] q;
  logic [3:0] ra, rb, r, s;
  logic [4:0] sum;
  logic       c3;

  assign ra = regs[a_addr];
  assign rb = regs[b_addr];

  always_comb begin
    unique case (src_e'(i[2:0]))
      SRC_AQ: begin r = ra;   s = q;  end
      SRC_AB: begin r = ra;   s = rb; end
      SRC_ZQ: begin r = 4'd0; s = q;  end
      SRC_ZB: begin r = 4'd0; s = rb; end
      SRC_ZA: begin r = 4'd0; s = ra; end
      SRC_DA: begin r = d;    s = ra; end
      SRC_DQ: begin r = d;    s = q;  end
      default: begin r = d;   s = 4'd0; end // SRC_DZ
    endcase
  end

  // Arithmetic in 3+1 bit pieces so that the carry into bit 3 is visible for
  // the overflow flag.
  logic [3:0] op_r, op_s;
  logic [3:0] lo;
  always_comb begin
    op_r = r; op_s = s;
    unique case (func_e'(i[5:3]))
      FN_SUBR: op_r = ~r;   // S - R = S + ~R + Cn
      FN_SUBS: op_s = ~s;   // R - S = R + ~S + Cn
      default: ;
    endcase
    lo  = {1'b0, op_r[2:0]} + {1'b0, op_s[2:0]} + {3'b0, cn};
    c3  = lo[3];
    sum = {1'b0, op_r} + {1'b0, op_s} + {4'b0, cn};
  end

  always_comb begin
    cn4 = 1'b0; ovr = 1'b0;
    unique case (func_e'(i[5:3]))
      FN_ADD, FN_SUBR, FN_SUBS: begin
        f = sum[3:0]; cn4 = sum[4]; ovr = sum[4] ^ c3;
      end
      FN_OR:    f = r | s;
      FN_AND:   f = r & s;
      FN_NOTRS: f = ~r & s;
      FN_EXOR:  f = r ^ s;
      default:  f = ~(r ^ s); // FN_EXNOR
    endcase
  end

  assign y        = (dest_e'(i[8:6]) == DST_RAMA) ? ra : f;
  assign ram0_out = f[0];
  assign ram3_out = f[3];
  assign q0_out   = q[0];
  assign q3_out   = q[3];

  always_ff @(posedge clk) begin
    if (en) begin
      unique case (dest_e'(i[8:6]))
        DST_QREG:  q <= f;
        DST_NOP:   ;
        DST_RAMA,
        DST_RAMF:  regs[b_addr] <= f;
        DST_RAMQD: begin regs[b_addr] <= {ram3_in, f[3:1]}; q <= {q3_in, q[3:1]}; end
        DST_RAMD:  regs[b_addr] <= {ram3_in, f[3:1]};
        DST_RAMQU: begin regs[b_addr] <= {f[2:0], ram0_in}; q <= {q[2:0], q0_in}; end
        default:   regs[b_addr] <= {f[2:0], ram0_in}; // DST_RAMU
      endcase
    end
  end
endmodule
