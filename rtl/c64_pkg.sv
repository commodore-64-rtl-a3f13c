// c64_pkg: chip selects and address constants shared by the bus, the bank
// decoder and the top level.
//
// A chip select names the device that answers one bus access. The I/O page
// split ($D000 VIC, $D400 SID, $D800 colour RAM, $DC00/$DD00 CIAs, $DE00 and
// $DF00 cartridge I/O) is the standard C64 layout.
package c64_pkg;

  typedef enum logic [3:0] {
    CS_NONE,    // open bus (unmapped in Ultimax mode)
    CS_RAM,
    CS_BASIC,   // BASIC ROM   $A000-$BFFF
    CS_KERNAL,  // KERNAL ROM  $E000-$FFFF
    CS_CHAR,    // character ROM at $D000 (CPU) or $1000/$9000 (VIC)
    CS_VIC,     // VIC-II registers $D000-$D3FF
    CS_SID,     // SID registers    $D400-$D7FF
    CS_COLOR,   // colour RAM       $D800-$DBFF
    CS_CIA1,    // $DC00
    CS_CIA2,    // $DD00
    CS_IO1,     // $DE00
    CS_IO2,     // $DF00
    CS_ROML,    // cartridge ROM low
    CS_ROMH     // cartridge ROM high
  } cs_e;

  // Bus schedule: sub-cycles (1-based) of one machine cycle.
  localparam int unsigned SUBCYCLES = 32;
  localparam int unsigned VIC_FIRST = 13;
  localparam int unsigned VIC_LAST  = 16;
  localparam int unsigned CPU_FIRST = 17;
  localparam int unsigned CPU_LAST  = 32;

endpackage
