// c64_top: the Commodore 64 machine around one shared bus.
//
// The 6510 CPU and the VIC-II video chip are the two bus masters. The bus
// cuts every machine cycle into 32 clocks of the system clock: the VIC owns
// clocks 13-16, the CPU 17-32, and on bad lines the VIC takes the CPU's
// window too, stalling the CPU. The bank decoder (LORAM, HIRAM, CHAREN from
// the CPU's on-chip port, GAME and EXROM from a board switch) picks the
// device of each access: the 64 KB RAM, the 20 KB system ROM (BASIC, KERNAL,
// character set), the cartridge ROM, the VIC registers, the colour RAM, or
// one of the I/O devices outside this design (SID at $D400, CIA 1 at $DC00,
// CIA 2 at $DD00, cartridge I/O at $DE00/$DF00). Read data is broadcast to
// both masters.
//
// Outside this design, and therefore brought out as ports: the SID and CIA
// chips (their selects, a shared register address/data/write bus and their
// read data), the CIA interrupt lines, the VIC bank bits that CIA 2 drives,
// and the frame buffer, which takes the latched RGB pixels and syncs. The
// PS/2 keyboard is decoded here into C64 key codes and joystick lines for the
// CIA.
//
// The ROM and cartridge images and any RAM preload are written through the
// load port (`load_sel` 0: RAM, 1: system ROM, 2: cartridge) while or before
// the machine runs; RAM words can also be read back there (`load_q`, one
// clock latency).
//
// Clocking: one clock `clk` (32 times the machine cycle rate) and an
// active-low asynchronous reset `rst_n`. After reset the CPU reads its
// reset vector from $FFFC/$FFFD (KERNAL ROM in the default configuration).
module c64_top
  import c64_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // cartridge configuration switches
  input  logic        game,
  input  logic        exrom,
  // image load / RAM inspection port
  input  logic [1:0]  load_sel,
  input  logic        load_we,
  input  logic [15:0] load_addr,
  input  logic [7:0]  load_data,
  output logic [7:0]  load_q,
  // I/O chips outside this design (SID, CIAs, cartridge I/O)
  output logic        sid_sel,
  output logic        cia1_sel,
  output logic        cia2_sel,
  output logic        io1_sel,
  output logic        io2_sel,
  output logic        io_we,
  output logic [7:0]  io_addr,
  output logic [7:0]  io_wdata,
  input  logic [7:0]  io_rdata,
  input  logic        cia_irq_n,
  input  logic        cia_nmi_n,
  input  logic [1:0]  vic_bank,
  // keyboard
  input  logic        ps2_clk,
  input  logic        ps2_data,
  output logic        key_valid,
  output logic        key_pressed,
  output logic [5:0]  key_code,
  output logic [4:0]  joy_n,
  output logic        key_error,    // pulses when a PS/2 byte fails its parity check
  // video toward the frame buffer
  output logic [7:0]  red,
  output logic [7:0]  green,
  output logic [7:0]  blue,
  output logic        hsync,
  output logic        vsync,
  output logic        new_pix,
  // status
  output logic [7:0]  cpu_port,
  output logic        cpu_sync
);

  // ---------------------------------------------------------------- CPU --
  logic [15:0] cpu_addr;
  logic        cpu_we, cpu_ce;
  logic [7:0]  cpu_dout;
  logic        vic_irq_n;
  logic [7:0]  rdata;

  cpu6510 u_cpu (
    .clk, .rst_n, .ce(cpu_ce),
    .addr(cpu_addr), .we(cpu_we), .dout(cpu_dout), .din(rdata),
    .irq_n(cia_irq_n & vic_irq_n), .nmi_n(cia_nmi_n),
    .sync(cpu_sync), .port_in(8'hFF), .port_out(cpu_port)
  );

  // ---------------------------------------------------------------- bus --
  logic [15:0] vic_addr_a, vic_addr_b, mem_addr;
  logic        vic_steal, vic_ack, vic_ack_b, mem_we, mem_vic, cycle_end;
  logic [7:0]  mem_wdata, ram_q, rom_q, cart_q, vic_q;
  logic [3:0]  color_q;
  cs_e         mem_cs;
  logic [4:0]  sub;

  c64_bus u_bus (
    .clk, .rst_n,
    .cpu_addr, .cpu_we, .cpu_wdata(cpu_dout), .cpu_ce,
    .vic_addr_a, .vic_addr_b, .vic_steal, .vic_ack, .vic_ack_b,
    .loram(cpu_port[0]), .hiram(cpu_port[1]), .charen(cpu_port[2]), .game, .exrom,
    .mem_addr, .mem_we, .mem_wdata, .mem_cs, .mem_vic,
    .ram_q, .rom_q, .cart_q, .vic_q, .color_q, .io_q(io_rdata),
    .rdata, .sub, .cycle_end
  );

  // ----------------------------------------------------------- memories --
  dp_ram #(.AW(16), .DW(8)) u_ram (
    .clk,
    .a_addr(mem_addr), .a_we(mem_we && mem_cs == CS_RAM), .a_wdata(mem_wdata), .a_q(ram_q),
    .b_addr(load_addr), .b_we(load_we && load_sel == 2'd0), .b_wdata(load_data), .b_q(load_q)
  );

  logic [9:0] color_addr;
  logic [3:0] color_vq;
  dp_ram #(.AW(10), .DW(4)) u_color (
    .clk,
    .a_addr(mem_addr[9:0]), .a_we(mem_we && mem_cs == CS_COLOR), .a_wdata(mem_wdata[3:0]), .a_q(color_q),
    .b_addr(color_addr), .b_we(1'b0), .b_wdata(4'h0), .b_q(color_vq)
  );

  system_rom u_rom (
    .clk, .addr(mem_addr), .cs(mem_cs), .q(rom_q),
    .load_we(load_we && load_sel == 2'd1), .load_addr(load_addr[14:0]), .load_data
  );

  cart_rom u_cart (
    .clk, .addr(mem_addr), .cs(mem_cs), .q(cart_q),
    .load_we(load_we && load_sel == 2'd2), .load_addr(load_addr[13:0]), .load_data
  );

  // ---------------------------------------------------------------- VIC --
  logic [3:0] pix_color;
  logic       pix_valid, vic_hsync, vic_vsync;

  vic2 u_vic (
    .clk, .rst_n, .cycle_end, .sub,
    .reg_cs(mem_cs == CS_VIC && !mem_vic), .reg_we(mem_we), .reg_addr(mem_addr[5:0]),
    .reg_wdata(mem_wdata), .reg_q(vic_q),
    .bank(vic_bank), .vic_addr_a, .vic_addr_b, .vic_steal, .vic_ack, .vic_ack_b, .rdata,
    .color_addr, .color_q(color_vq),
    .irq_n(vic_irq_n), .pix_color, .pix_valid, .hsync(vic_hsync), .vsync(vic_vsync)
  );

  video_latch u_vout (
    .clk, .rst_n, .pix_valid, .pix_color, .hsync_in(vic_hsync), .vsync_in(vic_vsync),
    .red, .green, .blue, .hsync, .vsync, .new_pix
  );

  // ---------------------------------------------------------- I/O chips --
  assign sid_sel  = (mem_cs == CS_SID);
  assign cia1_sel = (mem_cs == CS_CIA1);
  assign cia2_sel = (mem_cs == CS_CIA2);
  assign io1_sel  = (mem_cs == CS_IO1);
  assign io2_sel  = (mem_cs == CS_IO2);
  assign io_we    = mem_we;
  assign io_addr  = mem_addr[7:0];
  assign io_wdata = mem_wdata;

  // ----------------------------------------------------------- keyboard --
  logic       sc_valid;
  logic [7:0] sc;

  ps2_rx u_ps2 (
    .clk, .rst_n, .ps2_clk, .ps2_data, .ready(sc_valid), .scancode(sc), .parity_err(key_error)
  );

  keymap u_keys (
    .clk, .rst_n, .sc_valid, .sc, .key_valid, .key_pressed, .key_code, .joy_n
  );

endmodule
