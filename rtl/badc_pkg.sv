// badc_pkg: types and constants shared by the BADC blocks.
//
// The 48-bit microword follows the field positions of the BADC microword
// table: D field in bits 15:0 (bits 15:8 and bit 7 double as the 9-bit
// branch address, bit 7 being the PROM page bit), CONSTANT in bit 16, the
// 3-bit branch condition in 19:17, the Am2901 destination (I8:6), function
// (I5:3) and source (I2:0) codes in 22:20, 25:23 and 28:26, the B and A
// register addresses in 32:29 and 36:33, the ALU carry in 37, the
// shift-rotate control in 39:38, the status (pause) request in 40, the two
// breakpoint test bits in 41 and 42 and the 5-bit encoded operation
// (EXT in 43, OPCODE in 47:44). Inside each field the most significant bit
// sits at the higher bit number; this ordering, the numbering of the branch
// conditions and the values of the encoded operations are this design's
// own choices.
package badc_pkg;

  localparam int unsigned W      = 16;  // data path width
  localparam int unsigned UADDR_W = 9;  // microprogram address width (page bit + 8)
  localparam int unsigned UWORD_W = 48; // microword width

  // Am2901 source operand codes (I2:0): R,S pairs
  typedef enum logic [2:0] {
    SRC_AQ = 3'd0, SRC_AB = 3'd1, SRC_ZQ = 3'd2, SRC_ZB = 3'd3,
    SRC_ZA = 3'd4, SRC_DA = 3'd5, SRC_DQ = 3'd6, SRC_DZ = 3'd7
  } src_e;

  // Am2901 function codes (I5:3)
  typedef enum logic [2:0] {
    FN_ADD = 3'd0, FN_SUBR = 3'd1, FN_SUBS = 3'd2, FN_OR = 3'd3,
    FN_AND = 3'd4, FN_NOTRS = 3'd5, FN_EXOR = 3'd6, FN_EXNOR = 3'd7
  } func_e;

  // Am2901 destination codes (I8:6)
  typedef enum logic [2:0] {
    DST_QREG = 3'd0, DST_NOP = 3'd1, DST_RAMA = 3'd2, DST_RAMF = 3'd3,
    DST_RAMQD = 3'd4, DST_RAMD = 3'd5, DST_RAMQU = 3'd6, DST_RAMU = 3'd7
  } dest_e;

  // Branch condition field
  typedef enum logic [2:0] {
    BR_NONE = 3'd0, BR_UN = 3'd1, BR_Z = 3'd2, BR_NZ = 3'd3,
    BR_N = 3'd4, BR_NN = 3'd5, BR_OVR = 3'd6, BR_C = 3'd7
  } brcond_e;

  // Shift-rotate multiplexor control
  typedef enum logic [1:0] {
    SRS_FILL0 = 2'd0, SRS_FILL1 = 2'd1, SRS_ROT = 2'd2, SRS_ARITH = 2'd3
  } srs_e;

  // Encoded operations: {EXT, OPCODE[3:0]}
  typedef enum logic [4:0] {
    OP_NONE     = 5'h00,
    OP_PUSH     = 5'h01, // push return address on the sequencer stack
    OP_POP      = 5'h02, // next address from the stack (return)
    OP_CRATE_ON = 5'h03, // take control of the crate (controller enable)
    OP_CRATE_OFF= 5'h04, // release the crate
    OP_CLR_HOST = 5'h05, // clear the host-access error latch
    OP_SETBRK   = 5'h08, // set breakpoint 1
    OP_CLRBRK   = 5'h09, // clear breakpoint 1
    OP_RSTQ     = 5'h0A, // reset CAMAC Q latch
    OP_SETL     = 5'h0B, // set LAM
    OP_RSTL     = 5'h0C, // reset LAM
    OP_SETQ     = 5'h0D, // set CAMAC Q latch
    OP_MULT     = 5'h0F, // multiply step: conditional add/subtract by Q0
    OP_RMD      = 5'h11, // read memory to D (pause until memory ack)
    OP_WYM      = 5'h12, // write Y to memory
    OP_WYMA     = 5'h13, // write Y to memory address register
    OP_CWD      = 5'h14, // CAMAC W buffer to D
    OP_WYMCWD   = 5'h15, // W buffer to D and Y to memory
    OP_WTD      = 5'h16, // write Y to the ADC test-data register
    OP_WMSA     = 5'h18, // write mux start address, no increment on RAD
    OP_WMSAI    = 5'h19, // write mux start address, increment on RAD
    OP_RAD      = 5'h1A  // read ADC to D (pause until ADC ack)
  } enc_e;

  typedef struct packed {
    logic [3:0]  opcode;     // 47:44
    logic        ext;        // 43
    logic        brk2_req;   // 42
    logic        brk1_req;   // 41
    logic        status_req; // 40
    logic [1:0]  srs;        // 39:38
    logic        carry;      // 37
    logic [3:0]  a;          // 36:33
    logic [3:0]  b;          // 32:29
    logic [2:0]  src;        // 28:26  I2:0
    logic [2:0]  func;       // 25:23  I5:3
    logic [2:0]  dest;       // 22:20  I8:6
    logic [2:0]  brcond;     // 19:17
    logic        konst;      // 16
    logic [15:0] d;          // 15:0
  } uword_t;

  // Branch address carried in the D field: page bit (bit 7) over BR7..0 (bits 15:8)
  function automatic logic [UADDR_W-1:0] br_addr(uword_t u);
    return {u.d[7], u.d[15:8]};
  endfunction

  function automatic logic [4:0] enc_of(uword_t u);
    return {u.ext, u.opcode};
  endfunction

  // Decoded encoded-operation strobes, one per mutually exclusive operation
  typedef struct packed {
    logic push, pop, crate_on, crate_off, clr_host;
    logic setbrk, clrbrk, rstq, setl, rstl, setq, mult;
    logic rmd, wym, wyma, cwd, wtd, wmsa, wmsai, rad;
  } ctl_t;

  // ALU condition flags
  typedef struct packed {
    logic z, n, ovr, c;
  } flags_t;

endpackage
