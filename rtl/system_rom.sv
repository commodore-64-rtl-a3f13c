// system_rom: the 20 KB system ROM (BASIC, KERNAL and character generator)
// with its address translation.
//
// The bus hands over the 16-bit bank-switched address together with the chip
// select. Each ROM has its own address space starting at 0, and the three are
// packed into one array:
//   BASIC   8 KB  $A000-$BFFF  -> words $0000-$1FFF
//   KERNAL  8 KB  $E000-$FFFF  -> words $2000-$3FFF
//   CHAR    4 KB  $D000-$DFFF  -> words $4000-$4FFF (also seen by the VIC at
//                                  $1000/$9000: only the low 12 bits are used)
// Reads are synchronous (one clock). The ROM images are not part of the
// design; they are written through the load port before the machine is
// released from reset, standing in for the configuration of an FPGA ROM.
module system_rom
  import c64_pkg::*;
#(
  parameter int unsigned BASIC_BYTES  = 8192,
  parameter int unsigned KERNAL_BYTES = 8192,
  parameter int unsigned CHAR_BYTES   = 4096
) (
  input  logic        clk,
  input  logic [15:0] addr,
  input  cs_e         cs,
  output logic [7:0]  q,
  input  logic        load_we,
  input  logic [14:0] load_addr,
  input  logic [7:0]  load_data
);

  localparam int unsigned BYTES = BASIC_BYTES + KERNAL_BYTES + CHAR_BYTES;

  logic [7:0]  mem [BYTES];
  logic [14:0] idx;

  always_comb begin
    case (cs)
      CS_KERNAL: idx = 15'(BASIC_BYTES) + 15'(addr & 16'(KERNAL_BYTES - 1));
      CS_CHAR:   idx = 15'(BASIC_BYTES + KERNAL_BYTES) + 15'(addr & 16'(CHAR_BYTES - 1));
      default:   idx = 15'(addr & 16'(BASIC_BYTES - 1));
    endcase
  end

  always_ff @(posedge clk) begin
    q <= mem[idx];
    if (load_we) mem[load_addr] <= load_data;
  end

endmodule
