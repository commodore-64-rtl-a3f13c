// vic2: video chip (MOS 6567, NTSC) with text, bitmap and sprite display.
//
// Timing: the chip advances one machine cycle at each `cycle_end` from the
// bus. A raster line has CYCLES (65) cycles and a frame LINES (263) lines,
// the NTSC 6567 figures. Eight pixels are produced per cycle, one every
// NSUB/8 clocks, each a 4-bit colour index with `pix_valid`, `hsync` and
// `vsync`.
//
// Memory: in every cycle the chip reads once in its own bus window (the
// "g-access": character bitmap or bitmap byte, or the idle address $3FFF).
// On a bad line (raster $30-$F7 whose low three bits equal YSCROLL, display
// enabled at line $30) it also raises `vic_steal` for cycles 15..54 and reads
// the 40 screen codes of the next text row in the CPU's window ("c-access"),
// reading the colour RAM at the same time through its own port. Addresses
// are 14 bits from the memory pointers of $D018 plus the bank bits given on
// `bank`.
//
// Sprites: each of the eight sprites has two fetch cycles per line, sprites
// 0..3 in the last eight cycles of the line before the one they are shown
// on, sprites 4..7 in the first eight cycles of their own line. In the first
// cycle the VIC window reads the pointer (screen base + $3F8 + n) and, if the
// sprite has a row on that line, the stolen CPU window reads data byte 0 at
// pointer*64 + row*3; in the second cycle the two windows read bytes 1 and
// 2. So a sprite in use takes the bus for two consecutive cycles, and the
// CPU loses both. The row is (line - Y - 1), halved when Y-expanded, so a
// sprite with Y = 50 starts on the first display line (51). The fetched rows
// move to the display buffers at cycle 13. On screen, X = 24 is the first
// column of the display window; a sprite is 24 pixels wide (48 X-expanded),
// hires or multicolour ($D025, sprite colour, $D026). Among overlapping
// sprites the lowest number wins; a sprite whose $D01B bit is set is drawn
// behind foreground graphics (1 bits, or 10/11 pairs in multicolour). The
// border covers sprites. Sprite-sprite and sprite-data collisions are
// collected in $D01E/$D01F inside the display window; the first collision
// after the register was read sets bit 2 or 1 of $D019, and reading the
// register clears it.
//
// Pixels: column i is fetched in cycle 16+i and shown during cycle 17+i. The
// display window is lines 51..250 and cycles 17..56 (25 rows of 40 columns);
// outside it the border colour ($D020) is shown. Standard, multicolour and
// extended-colour text and standard and multicolour bitmap modes are
// supported; the combinations with no defined picture show black.
//
// Registers: 47 registers at $D000-$D02E. The raster counter reads back in
// $D011 bit 7 and $D012; writes there set the raster compare value. A raster
// match at the start of a line sets bit 0 of $D019; writing 1s to $D019
// clears bits; `irq_n` is low while an enabled ($D01A) bit is set. The
// light-pen registers are stored and read back but nothing sets them.
//
// The register set, the bad-line and sprite mechanisms and the NTSC geometry
// are those of the 6567. Choices of this design: the exact cycles of the
// sprite fetches, the steal starting in the first stolen cycle (no
// three-cycle BA warning), the sprite row taken from the raster line instead
// of the chip's per-sprite byte counter (changing Y expansion in the middle of
// a sprite therefore behaves differently), collisions counted only inside
// the display window, no 24-row/38-column modes or fine scroll in X, and
// `hsync` high for cycles 0..3 of a line and `vsync` for lines 0..2.
// The two top bits of both addresses are the `bank` input passed through, so
// a synthesis report lists those four output bits as wired to an input.
module vic2 #(
  parameter int unsigned CYCLES = 65,
  parameter int unsigned LINES  = 263,
  parameter int unsigned NSUB   = 32
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        cycle_end,
  input  logic [$clog2(NSUB)-1:0] sub,
  // register port
  input  logic        reg_cs,
  input  logic        reg_we,
  input  logic [5:0]  reg_addr,
  input  logic [7:0]  reg_wdata,
  output logic [7:0]  reg_q,
  // memory port
  input  logic [1:0]  bank,
  output logic [15:0] vic_addr_a,
  output logic [15:0] vic_addr_b,
  output logic        vic_steal,
  input  logic        vic_ack,
  input  logic        vic_ack_b,
  input  logic [7:0]  rdata,
  output logic [9:0]  color_addr,
  input  logic [3:0]  color_q,
  // outputs
  output logic        irq_n,
  output logic [3:0]  pix_color,
  output logic        pix_valid,
  output logic        hsync,
  output logic        vsync
);

  localparam int unsigned NREGS = 47;
  localparam int unsigned PIXDIV = NSUB / 8;

  logic [7:0]  regs [NREGS];
  logic [8:0]  raster;
  logic [6:0]  cyc;
  logic [9:0]  vcbase;
  logic [2:0]  rc;
  logic        disp;          // display state (vs idle state)
  logic        den_frame;
  logic [11:0] linebuf [40];  // {colour, screen code}
  logic [3:0]  irr;

  // register fields
  logic [2:0] yscroll;
  logic       den, bmm, ecm, mcm;
  logic [3:0] vm;
  logic [2:0] cb;
  logic [8:0] raster_cmp;
  assign yscroll    = regs[6'h11][2:0];
  assign den        = regs[6'h11][4];
  assign bmm        = regs[6'h11][5];
  assign ecm        = regs[6'h11][6];
  assign raster_cmp = {regs[6'h11][7], regs[6'h12]};
  assign mcm        = regs[6'h16][4];
  assign vm         = regs[6'h18][7:4];
  assign cb         = regs[6'h18][3:1];

  // sprite fields
  logic [7:0] sp_en, sp_yexp, sp_prio, sp_mc, sp_xexp;
  assign sp_en   = regs[6'h15];
  assign sp_yexp = regs[6'h17];
  assign sp_prio = regs[6'h1B];
  assign sp_mc   = regs[6'h1C];
  assign sp_xexp = regs[6'h1D];
  logic [7:0] ss_coll, sb_coll;  // $D01E sprite-sprite, $D01F sprite-data

  logic badline;
  assign badline = (raster >= 9'h030) && (raster <= 9'h0F7) &&
                   (raster[2:0] == yscroll) && den_frame;

  // c-access: cycles 15..54 of a bad line, column cyc-15
  logic       c_cyc, g_cyc;
  logic [5:0] c_col, g_col;
  assign c_cyc = badline && (cyc >= 7'd15) && (cyc <= 7'd54);
  assign c_col = 6'(cyc - 7'd15);
  assign g_cyc = disp && (cyc >= 7'd16) && (cyc <= 7'd55);
  assign g_col = 6'(cyc - 7'd16);

  // Sprite fetches: two cycles per sprite. Sprites 0..3 use the last eight
  // cycles of the line before the one they are shown on, sprites 4..7 the
  // first eight cycles of their own line. Phase 0: pointer in the VIC
  // window, data byte 0 in the CPU window; phase 1: bytes 1 and 2.
  localparam int unsigned SP_FIRST = CYCLES - 8;
  logic       sp_slot, sp_phase, sp_early;
  logic [2:0] sp_num;
  logic [8:0] sp_line;         // raster line the fetched data is for
  logic       sp_dma;          // sprite sp_num has a row on sp_line
  logic [5:0] sp_row;
  logic [7:0] sp_ptr;
  assign sp_early = (cyc >= 7'(SP_FIRST));
  assign sp_slot  = sp_early || (cyc <= 7'd7);
  assign sp_phase = sp_early ? cyc[0] ^ SP_FIRST[0] : cyc[0];
  assign sp_num   = sp_early ? {1'b0, 2'((cyc - 7'(SP_FIRST)) >> 1)} : {1'b1, cyc[2:1]};
  assign sp_line  = !sp_early ? raster : (raster == 9'(LINES - 1)) ? 9'd0 : raster + 9'd1;

  always_comb begin
    int dy;
    dy = int'(sp_line) - int'(regs[{2'b00, sp_num, 1'b1}]) - 1;
    sp_dma = sp_slot && sp_en[sp_num] && dy >= 0 && dy < (sp_yexp[sp_num] ? 42 : 21);
    sp_row = sp_yexp[sp_num] ? 6'(dy >> 1) : 6'(dy);
  end

  assign vic_steal = c_cyc || sp_dma;

  logic [9:0]  vc_c, vc_g;
  logic [11:0] cur_c;
  assign vc_c = vcbase + 10'(c_col);
  assign vc_g = vcbase + 10'(g_col);
  assign cur_c = linebuf[g_col];

  logic [5:0] sp_off_a, sp_off_b;
  assign sp_off_a = 6'(sp_row * 6'd3 + 6'd1);
  assign sp_off_b = 6'(sp_row * 6'd3 + (sp_phase ? 6'd2 : 6'd0));
  assign vic_addr_b = sp_slot ? {bank, sp_ptr, sp_off_b} : {bank, vm, vc_c};
  assign color_addr = vc_c;

  always_comb begin
    if (sp_slot)    vic_addr_a = !sp_phase ? {bank, vm, 7'h7F, sp_num}
                               : sp_dma ? {bank, sp_ptr, sp_off_a} : {bank, 14'h3FFF};
    else if (!g_cyc) vic_addr_a = {bank, 14'h3FFF};
    else if (bmm)   vic_addr_a = {bank, cb[2], vc_g, rc};
    else if (ecm)   vic_addr_a = {bank, cb, 2'b00, cur_c[5:0], rc};
    else            vic_addr_a = {bank, cb, cur_c[7:0], rc};
  end

  // register reads
  always_comb begin
    if (reg_addr == 6'h11)      reg_q = {raster[8], regs[6'h11][6:0]};
    else if (reg_addr == 6'h12) reg_q = raster[7:0];
    else if (reg_addr == 6'h1E) reg_q = ss_coll;
    else if (reg_addr == 6'h1F) reg_q = sb_coll;
    else if (reg_addr == 6'h19) reg_q = {|(irr & regs[6'h1A][3:0]), 3'b111, irr};
    else if (reg_addr < 6'(NREGS)) reg_q = regs[reg_addr];
    else                        reg_q = 8'hFF;
  end

  assign irq_n = !(|(irr & regs[6'h1A][3:0]));

  // pixel pipeline state for the cycle being drawn
  logic [7:0]  gdata, g_lat;
  logic [23:0] sp_fbuf [8];    // fetched row, for the next display line
  logic [23:0] sp_sbuf [8];    // row being shown
  logic [7:0]  sp_fdma, sp_on;
  logic        pix_strobe;
  logic [7:0]  sp_vis;         // sprites with a non-transparent pixel here
  logic        fg;             // graphics pixel is foreground
  assign pix_strobe = (sub % $bits(sub)'(PIXDIV)) == '0;
  logic [11:0] gcode, c_lat;
  logic        win, win_lat;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(NREGS); i++) regs[i] <= 8'h00;
      for (int i = 0; i < 40; i++) linebuf[i] <= 12'h000;
      raster    <= '0;
      cyc       <= '0;
      vcbase    <= '0;
      rc        <= '0;
      disp      <= 1'b0;
      den_frame <= 1'b0;
      irr       <= '0;
      g_lat     <= '0;
      c_lat     <= '0;
      win_lat   <= 1'b0;
      gdata     <= '0;
      gcode     <= '0;
      win       <= 1'b0;
      for (int i = 0; i < 8; i++) begin sp_fbuf[i] <= '0; sp_sbuf[i] <= '0; end
      sp_fdma   <= '0;
      sp_on     <= '0;
      sp_ptr    <= '0;
      ss_coll   <= '0;
      sb_coll   <= '0;
    end else begin
      if (reg_cs && reg_we) begin
        if (reg_addr == 6'h19) irr <= irr & ~reg_wdata[3:0];
        else if (reg_addr < 6'(NREGS)) regs[reg_addr] <= reg_wdata;
      end
      // c-access: screen code and colour into the line buffer
      if (vic_ack_b && c_cyc) linebuf[c_col] <= {color_q, rdata};
      // sprite p- and s-accesses
      if (sp_slot && vic_ack) begin
        if (!sp_phase && !vic_ack_b) sp_ptr <= rdata;
        else if (!sp_phase)          sp_fbuf[sp_num][23:16] <= rdata;
        else if (!vic_ack_b)         sp_fbuf[sp_num][15:8]  <= rdata;
        else                         sp_fbuf[sp_num][7:0]   <= rdata;
      end
      if (cycle_end && sp_slot && !sp_phase) sp_fdma[sp_num] <= sp_dma;
      if (cycle_end && cyc == 7'd13) begin
        for (int i = 0; i < 8; i++) sp_sbuf[i] <= sp_fbuf[i];
        sp_on <= sp_fdma;
      end
      // collisions: the first one since the register was read raises the IRQ
      if (pix_strobe && win) begin
        if ((sp_vis & (sp_vis - 8'd1)) != 8'd0) begin
          ss_coll <= ss_coll | sp_vis;
          if (ss_coll == 8'd0) irr[2] <= 1'b1;
        end
        if (fg && sp_vis != 8'd0) begin
          sb_coll <= sb_coll | sp_vis;
          if (sb_coll == 8'd0) irr[1] <= 1'b1;
        end
      end
      if (reg_cs && !reg_we && cycle_end) begin
        if (reg_addr == 6'h1E) ss_coll <= '0;
        if (reg_addr == 6'h1F) sb_coll <= '0;
      end
      // g-access
      if (vic_ack && !vic_ack_b) begin
        g_lat   <= rdata;
        c_lat   <= g_cyc ? cur_c : 12'h000;
        win_lat <= g_cyc && (raster >= 9'd51) && (raster <= 9'd250);
      end
      if (cycle_end) begin
        // hand the fetched column to the pixel stage
        gdata <= g_lat;
        gcode <= c_lat;
        win   <= win_lat && (cyc >= 7'd16) && (cyc <= 7'd55);
        win_lat <= 1'b0;
        // sequencer
        if (cyc == 7'd14 && badline) begin rc <= '0; disp <= 1'b1; end
        if (cyc == 7'd58) begin
          if (rc == 3'd7) begin
            if (disp) vcbase <= vcbase + 10'd40;
            if (!badline) disp <= 1'b0;
          end
          if (disp) rc <= rc + 3'd1;
        end
        // counters
        if (cyc == 7'(CYCLES - 1)) begin
          cyc <= '0;
          if (raster == 9'(LINES - 1)) begin
            raster <= '0;
            vcbase <= '0;
            if (raster_cmp == 9'd0) irr[0] <= 1'b1;
          end else begin
            raster <= raster + 9'd1;
            if (raster_cmp == raster + 9'd1) irr[0] <= 1'b1;
          end
          if (raster == 9'(LINES - 1)) den_frame <= 1'b0;
        end else begin
          cyc <= cyc + 7'd1;
        end
        if (raster == 9'h030 && den) den_frame <= 1'b1;
      end
    end
  end

  // pixel output: one pixel every PIXDIV clocks
  logic [2:0] px;
  logic       bit_v;
  logic [1:0] pair;
  logic [3:0] col_v;
  assign px    = 3'(sub / $bits(sub)'(PIXDIV));
  assign bit_v = gdata[3'd7 - px];
  assign pair  = {gdata[3'd7 - {px[2:1], 1'b0}], gdata[3'd6 - {px[2:1], 1'b0}]};

  // graphics colour and whether the pixel counts as foreground (a 1 in
  // hires modes, 10 or 11 in multicolour), which sprites may be put behind
  logic [3:0] gfx_v;
  always_comb begin
    fg = bit_v;
    case ({ecm, bmm, mcm})
      3'b000: gfx_v = bit_v ? gcode[11:8] : regs[6'h21][3:0];
      3'b001:
        if (!gcode[11]) gfx_v = bit_v ? {1'b0, gcode[10:8]} : regs[6'h21][3:0];
        else begin
          fg = pair[1];
          case (pair)
          2'd0: gfx_v = regs[6'h21][3:0];
          2'd1: gfx_v = regs[6'h22][3:0];
          2'd2: gfx_v = regs[6'h23][3:0];
          default: gfx_v = {1'b0, gcode[10:8]};
          endcase
        end
      3'b010: gfx_v = bit_v ? gcode[7:4] : gcode[3:0];
      3'b011: begin
        fg = pair[1];
        case (pair)
          2'd0: gfx_v = regs[6'h21][3:0];
          2'd1: gfx_v = gcode[7:4];
          2'd2: gfx_v = gcode[3:0];
          default: gfx_v = gcode[11:8];
        endcase
      end
      3'b100: gfx_v = bit_v ? gcode[11:8] : regs[6'h21 + {4'd0, gcode[7:6]}][3:0];
      default: begin gfx_v = 4'h0; fg = 1'b0; end
    endcase
  end

  // sprite pixels: X position 24 is the first column of the display window
  logic [3:0] sp_col [8];
  always_comb begin
    int xpos, dx, b;
    logic [1:0] sp_pair;
    xpos = int'(cyc) * 8 + int'(px) - 112;
    sp_pair = 2'b00;
    for (int i = 0; i < 8; i++) begin
      dx = xpos - int'({regs[6'h10][i], regs[6'(2 * i)]});
      b  = sp_xexp[i] ? dx >>> 1 : dx;
      sp_vis[i] = 1'b0;
      sp_col[i] = regs[6'(6'h27 + i)][3:0];
      if (sp_on[i] && b >= 0 && b < 24) begin
        if (!sp_mc[i]) sp_vis[i] = sp_sbuf[i][23 - b];
        else begin
          sp_pair   = {sp_sbuf[i][23 - (b & ~1)], sp_sbuf[i][22 - (b & ~1)]};
          sp_vis[i] = sp_pair != 2'b00;
          if (sp_pair == 2'b01) sp_col[i] = regs[6'h25][3:0];
          if (sp_pair == 2'b11) sp_col[i] = regs[6'h26][3:0];
        end
      end
    end
  end

  // The border covers everything. Inside the window the lowest-numbered
  // visible sprite wins among the sprites; it is then shown unless its
  // priority bit puts it behind a foreground graphics pixel.
  always_comb begin
    logic       hit;
    logic [2:0] top;
    hit = 1'b0;
    top = '0;
    for (int i = 7; i >= 0; i--)
      if (sp_vis[i]) begin hit = 1'b1; top = 3'(i); end
    if (!win)                          col_v = regs[6'h20][3:0];
    else if (hit && !(sp_prio[top] && fg)) col_v = sp_col[top];
    else                               col_v = gfx_v;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pix_color <= '0;
      pix_valid <= 1'b0;
      hsync     <= 1'b0;
      vsync     <= 1'b0;
    end else begin
      pix_valid <= (sub % $bits(sub)'(PIXDIV)) == '0;
      if ((sub % $bits(sub)'(PIXDIV)) == '0) begin
        pix_color <= col_v;
        hsync     <= (cyc < 7'd4);
        vsync     <= (raster < 9'd3);
      end
    end
  end

endmodule
