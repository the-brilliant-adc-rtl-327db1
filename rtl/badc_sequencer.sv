// badc_sequencer: microprogram sequencer in the manner of the Am2909, 9 bits
// wide (8 PROM address bits plus the page bit).
//
// It holds the address of the microinstruction being executed (`upc`) and
// a 4-deep return stack. At the end of each CPU cycle (`en` high) the next
// address is, in priority order: the forced-branch vector (CAMAC command or
// NIM trigger; nothing is pushed, so a forced branch cannot return), the
// top of the stack when `pop` is set, the branch address when the branch is
// taken, and otherwise upc+1. `push` saves upc+1, so a push together with a
// branch is a subroutine call. The stack pointer wraps like the part's, so a
// fifth push overwrites the oldest entry. Synchronous reset to address 0.
module badc_sequencer #(
  parameter int unsigned AW    = 9,
  parameter int unsigned DEPTH = 4
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          en,
  input  logic          force_br,
  input  logic [AW-1:0] force_addr,
  input  logic          taken,
  input  logic [AW-1:0] br_addr,
  input  logic          push,
  input  logic          pop,
  output logic [AW-1:0] upc,
  output logic [AW-1:0] next_addr
);
  localparam int unsigned SPW = $clog2(DEPTH);

  logic [AW-1:0]  stack [DEPTH];
  logic [SPW-1:0] sp;         // points at the top entry
  logic [AW-1:0]  inc;

  assign inc = upc + 1'b1;

  always_comb begin
    if (force_br)      next_addr = force_addr;
    else if (pop)      next_addr = stack[sp];
    else if (taken)    next_addr = br_addr;
    else               next_addr = inc;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      upc <= '0;
      sp  <= '0;
      for (int k = 0; k < DEPTH; k++) stack[k] <= '0;
    end else if (en) begin
      upc <= next_addr;
      if (!force_br) begin
        if (push) begin
          stack[sp + 1'b1] <= inc;
          sp <= sp + 1'b1;
        end else if (pop) begin
          sp <= sp - 1'b1;
        end
      end
    end
  end
endmodule
