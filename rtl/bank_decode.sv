// bank_decode: bank-switching logic of the C64 (the job of the original PLA).
//
// From the CPU port bits LORAM, HIRAM and CHAREN, the cartridge lines GAME
// and EXROM, the address, the direction and the bus master, it selects the
// device that answers the access. The CPU map follows the nine-column
// LHGE table of the C64:
//   $E000-$FFFF  KERNAL when HIRAM (ROMH in Ultimax), else RAM
//   $D000-$DFFF  I/O when CHAREN, else character ROM ("IO/C"); "IO/RAM" for
//                LHGE=1000; RAM when LORAM=HIRAM=0; always I/O in Ultimax
//   $A000-$BFFF  BASIC for LHGE=111x, ROMH for LHGE=x100, else RAM
//   $8000-$9FFF  ROML for LHGE=1110, 1100 and Ultimax, else RAM
//   $1000-$7FFF, $A000-$CFFF  open in Ultimax
// Writes to a ROM select go to the RAM underneath (open in Ultimax), as on
// the original machine. The VIC sees RAM except the character ROM at
// $1000-$1FFF and $9000-$9FFF (ROMH at $3000, $7000, $B000 and $F000 pages
// in Ultimax). These VIC and write rules come from the C64 rather than from
// the table. Purely combinational. Only address bits 15..8 take part; the
// port carries the full bus address so that the caller need not split it,
// and a lint tool reports the low byte as unused.
module bank_decode
  import c64_pkg::*;
(
  input  logic [15:0] addr,
  input  logic        we,
  input  logic        vic,      // 1: access by the VIC, 0: by the CPU
  input  logic        loram,
  input  logic        hiram,
  input  logic        charen,
  input  logic        game,
  input  logic        exrom,
  output cs_e         cs
);

  logic ultimax;
  cs_e  rd_cs;

  assign ultimax = !game && exrom;

  function automatic cs_e io_cs(logic [3:0] page);
    case (page)
      4'h0, 4'h1, 4'h2, 4'h3: return CS_VIC;
      4'h4, 4'h5, 4'h6, 4'h7: return CS_SID;
      4'h8, 4'h9, 4'hA, 4'hB: return CS_COLOR;
      4'hC:    return CS_CIA1;
      4'hD:    return CS_CIA2;
      4'hE:    return CS_IO1;
      default: return CS_IO2;
    endcase
  endfunction

  always_comb begin
    rd_cs = CS_RAM;
    if (vic) begin
      if (ultimax) rd_cs = (addr[13:12] == 2'b11) ? CS_ROMH : CS_RAM;
      else if (addr[14:12] == 3'b001) rd_cs = CS_CHAR;
    end else if (ultimax) begin
      case (addr[15:12])
        4'h0:             rd_cs = CS_RAM;
        4'h8, 4'h9:       rd_cs = CS_ROML;
        4'hD:             rd_cs = io_cs(addr[11:8]);
        4'hE, 4'hF:       rd_cs = CS_ROMH;
        default:          rd_cs = CS_NONE;
      endcase
    end else begin
      case (addr[15:12])
        4'h8, 4'h9: if (loram && hiram && !exrom) rd_cs = CS_ROML;
        4'hA, 4'hB:
          if (loram && hiram && game)           rd_cs = CS_BASIC;
          else if (hiram && !game && !exrom)    rd_cs = CS_ROMH;
        4'hD:
          if (loram || hiram) begin
            if (charen)                          rd_cs = io_cs(addr[11:8]);
            else if (!(loram && !hiram && !game && !exrom)) rd_cs = CS_CHAR;
          end
        4'hE, 4'hF: if (hiram) rd_cs = CS_KERNAL;
        default: ;
      endcase
    end
  end

  always_comb begin
    cs = rd_cs;
    if (we && !vic) begin
      case (rd_cs)
        CS_BASIC, CS_KERNAL, CS_CHAR, CS_ROML, CS_ROMH: cs = ultimax ? CS_NONE : CS_RAM;
        default: ;
      endcase
    end
  end

endmodule
