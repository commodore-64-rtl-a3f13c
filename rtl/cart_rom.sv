// cart_rom: game cartridge ROM with its address translation.
//
// A cartridge drives GAME and EXROM to choose its memory configuration (8 KB
// ROML only, 16 KB ROML+ROMH, or Ultimax). ROML is seen at $8000-$9FFF and
// ROMH at $A000-$BFFF (or $E000-$FFFF in Ultimax); the bank decoder already
// tells which window is being read, so the translation is
//   ROML -> word addr[12:0],  ROMH -> word BANK_BYTES + addr[12:0].
// Reads are synchronous (one clock). The cartridge image is written through
// the load port before the machine runs. The size (two 8 KB banks) is a
// choice of this design.
module cart_rom
  import c64_pkg::*;
#(
  parameter int unsigned BANK_BYTES = 8192
) (
  input  logic        clk,
  input  logic [15:0] addr,
  input  cs_e         cs,
  output logic [7:0]  q,
  input  logic        load_we,
  input  logic [$clog2(2*BANK_BYTES)-1:0] load_addr,
  input  logic [7:0]  load_data
);

  logic [7:0]  mem [2*BANK_BYTES];
  localparam int unsigned AW = $clog2(2*BANK_BYTES);
  logic [AW-1:0] idx;

  assign idx = (cs == CS_ROMH) ? AW'(BANK_BYTES) + AW'(addr & 16'(BANK_BYTES - 1))
                               : AW'(addr & 16'(BANK_BYTES - 1));

  always_ff @(posedge clk) begin
    q <= mem[idx];
    if (load_we) mem[load_addr] <= load_data;
  end

endmodule
