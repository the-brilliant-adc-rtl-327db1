// badc_control_store: the microprogram memory, 48-bit words.
//
// The PROM holds the BADC microprogram of badc_ucode_pkg. With the usual
// 256-word PROMs (PROM_WORDS = 256) the page bit, address bit 8, is ignored;
// with 512-word PROMs it selects the upper page. Beside the PROM sits the
// debugging RAM, a writable 512x48 store that replaces the PROM when `dbg_sel`
// is high, so a program can be loaded and run without burning PROMs. The RAM
// is written synchronously through a plain load port (dbg_we/addr/data);
// how the loading module reaches it over CAMAC is outside this design.
// Reads of both are combinational: the word for `addr` is valid in the same
// CPU cycle.
module badc_control_store #(
  parameter int unsigned PROM_WORDS = 256
) (
  input  logic                clk,
  input  logic [8:0]          addr,
  output badc_pkg::uword_t    word,
  input  logic                dbg_sel,
  input  logic                dbg_we,
  input  logic [8:0]          dbg_addr,
  input  logic [47:0]         dbg_wdata
);
  import badc_pkg::*;
  import badc_ucode_pkg::*;

  localparam int unsigned PAW = $clog2(PROM_WORDS);

  uword_t     prom_q;
  logic [8:0] prom_addr;
  logic [47:0] dbg_ram [512];

  assign prom_addr = 9'(addr[PAW-1:0]);
  assign prom_q    = prom_word(prom_addr);

  always_ff @(posedge clk)
    if (dbg_we) dbg_ram[dbg_addr] <= dbg_wdata;

  assign word = dbg_sel ? uword_t'(dbg_ram[addr]) : prom_q;
endmodule
