// tb_vic2: self-checking test of the video chip.
//
// The testbench plays the bus: a 32-clock cycle, the VIC window ending at
// sub-cycle 16 and the CPU window at 32, the steal sampled at the start of
// the CPU window. A memory model holds a screen at $0400, a character set at
// $2000 and colour RAM contents, all generated by formula. The test checks
// the frame length (263 lines of 65 cycles), the number of bad lines and
// stolen cycles per frame, every pixel of the text screen in standard
// character mode and of a later frame in standard bitmap mode against a
// model computed here, the raster read-back and the raster interrupt.
// A last text frame has six sprites on (hires, multicolour, X and Y
// expansion, X above 255, behind-foreground priority, overlaps, one in the
// left border and one running into the lower border); its pixels, the
// cycles stolen for sprite data, the collision registers and the collision
// interrupts are checked against the same model.
module tb_vic2;
  logic clk = 0, rst_n = 0;
  logic [4:0] sub = 0;
  logic cycle_end, reg_cs = 0, reg_we = 0, vic_steal, vic_ack, vic_ack_b, steal_r = 0;
  logic [5:0] reg_addr = 0;
  logic [7:0] reg_wdata = 0, reg_q, rdata;
  logic [15:0] vic_addr_a, vic_addr_b;
  logic [9:0] color_addr;
  logic [3:0] color_q, pix_color;
  logic irq_n, pix_valid, hsync, vsync;
  int checks = 0, failures = 0;

  vic2 dut (.clk, .rst_n, .cycle_end, .sub, .reg_cs, .reg_we, .reg_addr, .reg_wdata, .reg_q,
            .bank(2'b00), .vic_addr_a, .vic_addr_b, .vic_steal, .vic_ack, .vic_ack_b, .rdata,
            .color_addr, .color_q, .irq_n, .pix_color, .pix_valid, .hsync, .vsync);

  always #5 clk = ~clk;

  function automatic logic [7:0] memf(logic [15:0] a);
    if (a >= 16'h0400 && a < 16'h07E8) return 8'((int'(a) - 16'h400) * 7 + 3);
    if (a >= 16'h07F8 && a < 16'h0800) return 8'h80 + 8'(a - 16'h07F8);  // sprite pointers
    if (a >= 16'h2000 && a < 16'h4000) return 8'((int'(a) * 13) ^ (int'(a) >> 3));
    return 8'hEE;
  endfunction
  function automatic logic [3:0] colf(int idx); return 4'(idx * 5); endfunction

  assign cycle_end = (sub == 5'd31);
  assign vic_ack   = (sub == 5'd15) || (sub == 5'd31 && steal_r);
  assign vic_ack_b = (sub == 5'd31 && steal_r);
  assign rdata     = memf((sub >= 5'd16) ? vic_addr_b : vic_addr_a);
  always @(posedge clk) begin
    if (rst_n) sub <= sub + 5'd1;
    if (sub == 5'd15) steal_r <= vic_steal;
    color_q <= colf(int'(color_addr));
  end

  task automatic wr(logic [5:0] a, logic [7:0] d);
    @(posedge clk iff sub == 5'd15);
    #1 reg_cs = 1; reg_we = 1; reg_addr = a; reg_wdata = d;
    @(posedge clk);
    #1 reg_cs = 0; reg_we = 0;
  endtask

  // ---- sprite settings and model
  int sx[8] = '{30, 50, 300, 0, 0, 200, 0, 40};
  int sy[8] = '{60, 64, 150, 100, 0, 240, 0, 70};
  logic [7:0] s_en = 8'hAF, s_ye = 8'h06, s_xe = 8'h82, s_mc = 8'h02, s_pr = 8'h06;
  bit sprite_mode = 0;
  logic [7:0] ss_exp = 0, sb_exp = 0;
  function automatic logic [3:0] scol(int i); return 4'(i + 1); endfunction

  // visible sprites at (line, x) and the colour of each
  task automatic sprite_at(int line, int x, output logic [7:0] vis, output logic [3:0] col [8]);
    vis = 0;
    for (int i = 0; i < 8; i++) begin
      int dy, dx, row, b;
      logic [23:0] d;
      logic [1:0] pr;
      col[i] = scol(i);
      if (!s_en[i]) continue;
      dy = line - sy[i] - 1;
      if (dy < 0 || dy >= (s_ye[i] ? 42 : 21)) continue;
      dx = x - sx[i];
      if (dx < 0 || dx >= (s_xe[i] ? 48 : 24)) continue;
      row = s_ye[i] ? dy / 2 : dy;
      b = s_xe[i] ? dx / 2 : dx;
      for (int k = 0; k < 3; k++) d[23 - 8*k -: 8] = memf(16'(16'h2000 + i * 64 + row * 3 + k));
      if (!s_mc[i]) vis[i] = d[23 - b];
      else begin
        pr = {d[23 - (b / 2) * 2], d[22 - (b / 2) * 2]};
        vis[i] = pr != 0;
        if (pr == 2'b01) col[i] = 4'h3;
        if (pr == 2'b11) col[i] = 4'h4;
      end
    end
  endtask

  // read a register in the CPU window; the end of the cycle clears $1E/$1F
  task automatic rd_clear(logic [5:0] a, output logic [7:0] d);
    @(posedge clk iff sub == 5'd30);
    #1 reg_cs = 1; reg_we = 0; reg_addr = a;
    #1 d = reg_q;
    @(posedge clk);
    #1 reg_cs = 0;
  endtask

  // ---- monitors
  int line = -1, pix = 0, frame = 0, vs_clocks = 0, frame_clocks = 0;
  int steals = 0, steal_frame = 0, badl = 0, badl_frame = 0;
  bit hs_q = 0, vs_q = 0, bmm_mode = 0, check_frame = 0;
  int pix_checked = 0;
  always @(posedge clk) if (rst_n) begin
    vs_clocks++;
    if (cycle_end && vic_steal) steals++;
    if (cycle_end && vic_steal && dut.cyc == 7'd15) badl++;
    if (pix_valid) begin
      if (vsync && !vs_q) begin
        frame++; line = -1; frame_clocks = vs_clocks; vs_clocks = 0;
        steal_frame = steals; steals = 0; badl_frame = badl; badl = 0;
      end
      if (hsync && !hs_q) begin line++; pix = 0; end
      if (check_frame && line >= 0) begin
        logic [3:0] exp;
        exp = 4'hE;      // border
        if (line >= 51 && line <= 250 && pix >= 136 && pix < 456) begin
          int row, rc, col, b, idx;
          logic [7:0] code, byt;
          row = (line - 51) / 8; rc = (line - 51) % 8;
          col = (pix - 136) / 8; b = (pix - 136) % 8;
          idx = row * 40 + col;
          code = memf(16'(16'h0400 + idx));
          if (!bmm_mode) begin
            byt = memf(16'(16'h2000 + code * 8 + rc));
            exp = byt[7 - b] ? colf(idx) : 4'h6;
            if (sprite_mode) begin
              logic [7:0] vis;
              logic [3:0] scl [8];
              int top;
              sprite_at(line, pix - 112, vis, scl);
              if ((vis & (vis - 1)) != 0) ss_exp |= vis;
              if (byt[7 - b]) sb_exp |= vis;
              top = -1;
              for (int i = 7; i >= 0; i--) if (vis[i]) top = i;
              if (top >= 0 && !(s_pr[top] && byt[7 - b])) exp = scl[top];
            end
          end else begin
            byt = memf(16'(16'h2000 + idx * 8 + rc));
            exp = byt[7 - b] ? code[7:4] : code[3:0];
          end
        end
        checks++; pix_checked++;
        if (pix_color !== exp) begin
          failures++;
          if (failures < 10) $display("FAIL pixel line %0d x %0d: %h expected %h", line, pix, pix_color, exp);
        end
      end
      if ($test$plusargs("dbg") && line == 51 && pix >= 128 && pix < 160)
        $display("pix %0d col %h gdata %h gcode %h win %b cyc %0d", pix, pix_color, dut.gdata, dut.gcode, dut.win, dut.cyc);
      pix++;
      hs_q = hsync; vs_q = vsync;
    end
  end

  initial begin
    logic [7:0] d;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    wr(6'h20, 8'h0E);           // border
    wr(6'h21, 8'h06);           // background
    wr(6'h18, 8'h18);           // screen $0400, characters $2000
    wr(6'h11, 8'h1B);           // DEN, 25 rows, YSCROLL 3
    wr(6'h12, 8'h80);           // raster compare $080
    wr(6'h1A, 8'h01);           // raster IRQ enable
    // wait for two frame starts so the next frame is complete
    wait (frame == 2);
    checks++;
    if (irq_n !== 1'b0) begin failures++; $display("FAIL raster IRQ not raised"); end
    wr(6'h19, 8'h01);
    @(posedge clk);
    checks++;
    if (irq_n !== 1'b1) begin failures++; $display("FAIL raster IRQ not cleared"); end
    check_frame = 1;
    wait (frame == 3);
    check_frame = 0;
    checks++;
    if (frame_clocks != 263 * 65 * 32) begin failures++; $display("FAIL frame length %0d", frame_clocks); end
    checks++;
    if (badl_frame != 25) begin failures++; $display("FAIL bad lines per frame %0d", badl_frame); end
    checks++;
    if (steal_frame != 25 * 40) begin failures++; $display("FAIL stolen cycles per frame %0d", steal_frame); end
    // raster read-back
    wait (dut.raster == 9'h105);
    @(posedge clk iff sub == 5'd20);
    reg_addr = 6'h12; #1;
    checks++; if (reg_q !== 8'h05) begin failures++; $display("FAIL raster low %h", reg_q); end
    reg_addr = 6'h11; #1;
    checks++; if (reg_q[7] !== 1'b1) begin failures++; $display("FAIL raster bit 8"); end
    // bitmap mode frame
    wr(6'h11, 8'h3B);
    bmm_mode = 1;
    wait (frame == 4);
    check_frame = 1;
    wait (frame == 5);
    check_frame = 0;
    // sprite frame: back to text mode, six sprites on
    wr(6'h11, 8'h1B);
    bmm_mode = 0;
    for (int i = 0; i < 8; i++) begin
      wr(6'(2 * i), 8'(sx[i]));
      wr(6'(2 * i + 1), 8'(sy[i]));
      wr(6'(6'h27 + i), 8'(scol(i)));
    end
    wr(6'h10, 8'h04);
    wr(6'h17, s_ye); wr(6'h1D, s_xe); wr(6'h1C, s_mc); wr(6'h1B, s_pr);
    wr(6'h25, 8'h03); wr(6'h26, 8'h04);
    wr(6'h15, s_en);
    wr(6'h1A, 8'h06);           // collision interrupts only
    sprite_mode = 1;
    wait (frame == 6);
    check_frame = 1;
    wait (frame == 7);
    check_frame = 0;
    checks++;
    if (steal_frame != 25 * 40 + 2 * (21 + 42 + 42 + 21 + 21 + 21)) begin
      failures++; $display("FAIL stolen cycles with sprites %0d", steal_frame);
    end
    wait (dut.raster == 9'd255);
    rd_clear(6'h1E, d);
    checks++; if (d !== ss_exp) begin failures++; $display("FAIL sprite-sprite collisions %h expected %h", d, ss_exp); end
    rd_clear(6'h1F, d);
    checks++; if (d !== sb_exp) begin failures++; $display("FAIL sprite-data collisions %h expected %h", d, sb_exp); end
    rd_clear(6'h1E, d);
    checks++; if (d !== 8'h00) begin failures++; $display("FAIL collision register not cleared by reading"); end
    rd_clear(6'h19, d);
    checks++; if (d[2:1] !== 2'b11 || irq_n !== 1'b0) begin failures++; $display("FAIL collision interrupts %h", d); end
    checks++; if (ss_exp == 0 || sb_exp == 0) begin failures++; $display("FAIL test setup makes no collisions"); end
    $display("info: collisions sprite-sprite %h sprite-data %h", ss_exp, sb_exp);
    $display("info: %0d pixels compared", pix_checked);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (9 * 263 * 65 * 32) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
