// c64_bus: shared memory bus between the 6510 and the VIC-II.
//
// Only the CPU and the VIC start accesses. Instead of the original two-phase
// clock, each machine cycle is cut into SUBCYCLES (32) clocks of the fast
// system clock. Sub-cycles 13..16 belong to the VIC and 17..32 to the CPU;
// 1..12 are idle. Each master makes one request per cycle (a master with
// nothing to do reads a dummy address). When the VIC raises `vic_steal` it
// also takes the CPU window, so it can hold the bus for as many consecutive
// cycles as it needs (character pointer and sprite fetches); the CPU is then
// not advanced in that cycle.
//
// The bus takes separate address, write enable and write data from each
// master and puts out one set (`mem_*`) toward the memories, together with a
// chip select from the bank decoder. The read data selected by that chip
// select is broadcast on `rdata` to both masters: the CPU takes it at the
// edge where `cpu_ce` is high (last sub-cycle of its window), the VIC at the
// edges where `vic_ack` is high (last sub-cycle of its window, and of the CPU
// window when stolen; `vic_ack_b` marks the latter). Memories have one clock
// of read latency, so each window must be at least two clocks long. A CPU
// write is issued once, in the first sub-cycle of its window.
// `cycle_end` pulses on the last sub-cycle of every machine cycle and `sub`
// gives the current sub-cycle (0-based).
//
// `mem_wdata` is the CPU's write data passed straight through: the VIC never
// writes, so there is nothing to select, and a synthesis report lists these
// eight bits as wired to an input.
module c64_bus
  import c64_pkg::*;
#(
  parameter int unsigned NSUB     = SUBCYCLES,
  parameter int unsigned VIC_FROM = VIC_FIRST,
  parameter int unsigned VIC_TO   = VIC_LAST,
  parameter int unsigned CPU_FROM = CPU_FIRST,
  parameter int unsigned CPU_TO   = CPU_LAST
) (
  input  logic        clk,
  input  logic        rst_n,
  // CPU side
  input  logic [15:0] cpu_addr,
  input  logic        cpu_we,
  input  logic [7:0]  cpu_wdata,
  output logic        cpu_ce,
  // VIC side
  input  logic [15:0] vic_addr_a,   // access in the VIC window
  input  logic [15:0] vic_addr_b,   // access in the CPU window when stealing
  input  logic        vic_steal,
  output logic        vic_ack,
  output logic        vic_ack_b,
  // bank switching
  input  logic        loram,
  input  logic        hiram,
  input  logic        charen,
  input  logic        game,
  input  logic        exrom,
  // toward the memories and registers
  output logic [15:0] mem_addr,
  output logic        mem_we,
  output logic [7:0]  mem_wdata,
  output cs_e         mem_cs,
  output logic        mem_vic,      // current access is the VIC's
  // read data of every target, selected by the chip select
  input  logic [7:0]  ram_q,
  input  logic [7:0]  rom_q,
  input  logic [7:0]  cart_q,
  input  logic [7:0]  vic_q,
  input  logic [3:0]  color_q,
  input  logic [7:0]  io_q,         // SID, CIAs, cartridge I/O
  output logic [7:0]  rdata,
  // timing
  output logic [$clog2(NSUB)-1:0] sub,
  output logic        cycle_end
);

  typedef enum logic [1:0] {OWN_IDLE, OWN_VIC, OWN_CPU, OWN_VIC_B} owner_e;

  owner_e owner;
  logic   steal_r;
  logic   we_raw;

  // sub-cycle counter, 0-based
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sub     <= '0;
      steal_r <= 1'b0;
    end else begin
      sub <= (sub == $bits(sub)'(NSUB - 1)) ? '0 : sub + 1'b1;
      // the VIC's claim on the CPU window is taken at its first sub-cycle
      if (sub == $bits(sub)'(CPU_FROM - 2)) steal_r <= vic_steal;
    end
  end

  always_comb begin
    if (int'(sub) >= int'(VIC_FROM) - 1 && int'(sub) <= int'(VIC_TO) - 1) owner = OWN_VIC;
    else if (int'(sub) >= int'(CPU_FROM) - 1 && int'(sub) <= int'(CPU_TO) - 1)
      owner = steal_r ? OWN_VIC_B : OWN_CPU;
    else owner = OWN_IDLE;
  end

  always_comb begin
    case (owner)
      OWN_VIC:   mem_addr = vic_addr_a;
      OWN_VIC_B: mem_addr = vic_addr_b;
      default:   mem_addr = cpu_addr;
    endcase
    mem_vic   = (owner == OWN_VIC) || (owner == OWN_VIC_B);
    we_raw    = (owner == OWN_CPU) && cpu_we;
    mem_we    = we_raw && (sub == $bits(sub)'(CPU_FROM - 1));
    mem_wdata = cpu_wdata;
  end

  bank_decode u_dec (
    .addr(mem_addr), .we(we_raw), .vic(mem_vic),
    .loram, .hiram, .charen, .game, .exrom,
    .cs(mem_cs)
  );

  // read data of the current access
  always_comb begin
    case (mem_cs)
      CS_RAM:                         rdata = ram_q;
      CS_BASIC, CS_KERNAL, CS_CHAR:   rdata = rom_q;
      CS_ROML, CS_ROMH:               rdata = cart_q;
      CS_VIC:                         rdata = vic_q;
      CS_COLOR:                       rdata = {4'h0, color_q};
      CS_SID, CS_CIA1, CS_CIA2, CS_IO1, CS_IO2: rdata = io_q;
      default:                        rdata = 8'hFF;
    endcase
  end

  assign cycle_end = (sub == $bits(sub)'(NSUB - 1));
  assign cpu_ce    = (owner == OWN_CPU) && (sub == $bits(sub)'(CPU_TO - 1));
  assign vic_ack   = ((owner == OWN_VIC) && (sub == $bits(sub)'(VIC_TO - 1))) ||
                     ((owner == OWN_VIC_B) && (sub == $bits(sub)'(CPU_TO - 1)));
  assign vic_ack_b = (owner == OWN_VIC_B) && (sub == $bits(sub)'(CPU_TO - 1));

  // a window must leave room for the one-clock memory latency
  initial begin
    assert (VIC_TO > VIC_FROM && CPU_TO > CPU_FROM && CPU_FROM > VIC_TO && CPU_TO <= NSUB)
      else $error("c64_bus: bad sub-cycle schedule");
  end

endmodule
