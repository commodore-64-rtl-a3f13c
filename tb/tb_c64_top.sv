// tb_c64_top: runs the whole machine end to end.
//
// A small KERNAL-ROM program (hand assembled below) initialises the CPU port,
// writes 40 screen codes and colours, sets up the VIC (border, background,
// memory pointers, display enable, raster interrupt at line $80, sprite 0 in
// the upper border where it is fetched but covered by the border), reads the
// cartridge ROM, the BASIC ROM, writes under the BASIC ROM and switches BASIC
// out to read the RAM underneath, writes a SID register, reads a CIA
// register and then waits in a loop while the raster interrupt handler counts
// frames. The testbench loads the ROM and cartridge images, plays the SID/CIA
// side, types one key on the PS/2 lines and watches the video output.
//
// Checked: the values the program stored, the SID write seen on the I/O
// port, the raster interrupt count, the key code, and every pixel of the
// first text row (character ROM bitmaps in white on black) and of the border.
// Counted, each must happen: bad-line cycles and sprite-fetch cycles stolen
// from the CPU, raster interrupts, bank switch, cartridge ROM read, I/O
// write, key event, frame.
module tb_c64_top;
  logic clk = 0, rst_n = 0;
  logic game = 1, exrom = 0;         // 8 KB cartridge
  logic [1:0] load_sel = 0;
  logic load_we = 0;
  logic [15:0] load_addr = 0;
  logic [7:0] load_data = 0, load_q;
  logic sid_sel, cia1_sel, cia2_sel, io1_sel, io2_sel, io_we;
  logic [7:0] io_addr, io_wdata, io_rdata;
  logic ps2_clk = 1, ps2_data = 1;
  logic key_valid, key_pressed;
  logic [5:0] key_code;
  logic [4:0] joy_n;
  logic key_error;
  logic [7:0] red, green, blue, cpu_port;
  logic hsync, vsync, new_pix, cpu_sync;
  int checks = 0, failures = 0;

  c64_top dut (.clk, .rst_n, .game, .exrom, .load_sel, .load_we, .load_addr, .load_data, .load_q,
               .sid_sel, .cia1_sel, .cia2_sel, .io1_sel, .io2_sel, .io_we, .io_addr, .io_wdata,
               .io_rdata, .cia_irq_n(1'b1), .cia_nmi_n(1'b1), .vic_bank(2'b00),
               .ps2_clk, .ps2_data, .key_valid, .key_pressed, .key_code, .joy_n, .key_error,
               .red, .green, .blue, .hsync, .vsync, .new_pix, .cpu_port, .cpu_sync);

  always #5 clk = ~clk;
  assign io_rdata = cia1_sel ? 8'h77 : 8'h00;

  task automatic chk(string what, int got, int exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %0h expected %0h", what, got, exp); end
  endtask

  // ---- images
  function automatic logic [7:0] basic_img(int i);  return 8'(i * 5 + 1); endfunction
  function automatic logic [7:0] char_img(int i);   return 8'((i * 29) ^ (i >> 2)); endfunction
  function automatic logic [7:0] cart_img(int i);   return 8'(i * 3 + 9); endfunction

  logic [7:0] kernal [8192];
  int kp;
  task automatic k(input logic [7:0] b []);
    foreach (b[i]) begin kernal[kp] = b[i]; kp++; end
  endtask

  task automatic load(logic [1:0] sel, int a, logic [7:0] d);
    @(posedge clk); #1 load_sel = sel; load_we = 1; load_addr = 16'(a); load_data = d;
  endtask

  task automatic peek(int a, output logic [7:0] d);
    @(posedge clk); #1 load_sel = 0; load_we = 0; load_addr = 16'(a);
    @(posedge clk); #1 d = load_q;
  endtask

  // ---- mechanism counters
  int n_steal = 0, n_sprite = 0, n_irq = 0, n_bank = 0, n_cart = 0, n_iow = 0, n_key = 0, n_frames = 0;
  bit vs_q = 0;
  always @(posedge clk) if (rst_n) begin
    if (dut.cycle_end && dut.u_bus.steal_r) n_steal++;
    if (dut.cycle_end && dut.u_bus.steal_r && dut.u_vic.sp_slot) n_sprite++;
    if (dut.cpu_ce && dut.u_cpu.st == dut.u_cpu.S_FETCH && dut.u_cpu.irq_now) n_irq++;
    if (dut.cpu_ce && dut.cpu_we && dut.cpu_addr == 16'h0001) n_bank++;
    if (dut.cpu_ce && dut.mem_cs == c64_pkg::CS_ROML) n_cart++;
    if (io_we && sid_sel) n_iow++;
    if (key_valid) n_key++;
  end

  // ---- video check: first text row and border
  int line = -1, pix = 0, pix_checked = 0, pix_bad = 0, pix_text = 0;
  bit hs_q = 0, check_video = 0;
  always @(posedge clk) if (new_pix) begin
    if (vsync && !vs_q) begin line = -1; n_frames++; end
    if (hsync && !hs_q) begin line++; pix = 0; end
    if (check_video && line >= 0) begin
      logic [23:0] exp;
      bit known;
      known = 0;
      if (line >= 51 && line <= 58 && pix >= 136 && pix < 456) begin
        int col, b, rc;
        logic [7:0] byt;
        col = (pix - 136) / 8; b = (pix - 136) % 8; rc = line - 51;
        byt = char_img((col + 1) * 8 + rc);   // screen code col+1, char set at $1000
        exp = byt[7 - b] ? 24'hFFFFFF : 24'h000000;
        known = 1;
        pix_text++;
      end else if (line >= 20 && (line < 51 || line > 250 || pix < 136 || pix >= 456)) begin
        exp = 24'h68372B;                      // red border
        known = 1;
      end
      if (known) begin
        pix_checked++;
        if ({red, green, blue} !== exp) begin
          pix_bad++;
          if (pix_bad < 6) $display("FAIL pixel line %0d x %0d: %06h expected %06h", line, pix, {red, green, blue}, exp);
        end
      end
    end
    pix++;
    hs_q = hsync; vs_q = vsync;
  end

  // ---- PS/2 keyboard
  task automatic ps2_send(logic [7:0] b);
    logic [10:0] f;
    f = {1'b1, ~^b, b, 1'b0};
    for (int i = 0; i < 11; i++) begin
      ps2_data = f[i];
      repeat (400) @(posedge clk);
      ps2_clk = 0;
      repeat (400) @(posedge clk);
      ps2_clk = 1;
    end
  endtask

  int sid_val = -1;
  always @(posedge clk) if (io_we && sid_sel && io_addr == 8'h18) sid_val = io_wdata;

  initial begin
    logic [7:0] d;
    foreach (kernal[i]) kernal[i] = 8'h00;
    kp = 0;
    k('{8'h78, 8'hA2, 8'hFF, 8'h9A});                     // SEI; LDX #$FF; TXS
    k('{8'hA9, 8'h37, 8'h85, 8'h01});                     // LDA #$37; STA $01
    k('{8'hA9, 8'h2F, 8'h85, 8'h00});                     // LDA #$2F; STA $00
    k('{8'hA2, 8'h00});                                   // LDX #0
    k('{8'h8A, 8'h18, 8'h69, 8'h01});                     // loop: TXA; CLC; ADC #1
    k('{8'h9D, 8'h00, 8'h04});                            // STA $0400,X
    k('{8'hA9, 8'h01, 8'h9D, 8'h00, 8'hD8});              // LDA #1; STA $D800,X
    k('{8'hE8, 8'hE0, 8'h28, 8'hD0, 8'hEF});              // INX; CPX #40; BNE loop
    k('{8'hA9, 8'h02, 8'h8D, 8'h20, 8'hD0});              // border red
    k('{8'hA9, 8'h00, 8'h8D, 8'h21, 8'hD0});              // background black
    k('{8'hA9, 8'h14, 8'h8D, 8'h18, 8'hD0});              // screen $0400, chars $1000
    k('{8'hA9, 8'h1B, 8'h8D, 8'h11, 8'hD0});              // DEN, YSCROLL 3
    k('{8'hA9, 8'h80, 8'h8D, 8'h12, 8'hD0});              // raster compare $80
    k('{8'hA9, 8'h01, 8'h8D, 8'h1A, 8'hD0});              // raster IRQ enable
    k('{8'hA9, 8'h0A, 8'h8D, 8'h01, 8'hD0});              // sprite 0 Y = 10 (upper border)
    k('{8'hA9, 8'h01, 8'h8D, 8'h15, 8'hD0});              // sprite 0 on
    k('{8'hAD, 8'h00, 8'h80, 8'h85, 8'h10});              // LDA $8000; STA $10
    k('{8'hAD, 8'h00, 8'hA0, 8'h85, 8'h11});              // LDA $A000; STA $11
    k('{8'hA9, 8'h5A, 8'h8D, 8'h00, 8'hA0});              // STA $A000 (RAM under ROM)
    k('{8'hA9, 8'h36, 8'h85, 8'h01});                     // BASIC out
    k('{8'hAD, 8'h00, 8'hA0, 8'h85, 8'h12});              // LDA $A000; STA $12
    k('{8'hA9, 8'h37, 8'h85, 8'h01});                     // BASIC in
    k('{8'hA9, 8'h0F, 8'h8D, 8'h18, 8'hD4});              // SID volume
    k('{8'hAD, 8'h01, 8'hDC, 8'h85, 8'h13});              // LDA $DC01; STA $13
    k('{8'h58});                                          // CLI
    k('{8'h4C, 8'h6E, 8'hE0});                            // $E06E: JMP $E06E
    if (kp != 16'h71) $display("note: handler at %04h", 16'hE000 + kp);
    k('{8'hEE, 8'h20, 8'h00});                            // $E071: INC $0020
    k('{8'hA9, 8'h01, 8'h8D, 8'h19, 8'hD0});              // ack raster IRQ
    k('{8'h40});                                          // RTI
    kernal[16'h1FFA] = 8'h79; kernal[16'h1FFB] = 8'hE0;   // NMI -> RTI
    kernal[16'h1FFC] = 8'h00; kernal[16'h1FFD] = 8'hE0;   // reset -> $E000
    kernal[16'h1FFE] = 8'h71; kernal[16'h1FFF] = 8'hE0;   // IRQ -> $E071

    for (int i = 0; i < 8192; i++) load(2'd1, i, basic_img(i));
    for (int i = 0; i < 8192; i++) load(2'd1, 8192 + i, kernal[i]);
    for (int i = 0; i < 4096; i++) load(2'd1, 16384 + i, char_img(i));
    for (int i = 0; i < 8192; i++) load(2'd2, i, cart_img(i));
    load(2'd0, 16'h0020, 8'h00);
    @(posedge clk); #1 load_we = 0;
    repeat (4) @(posedge clk);
    rst_n = 1;

    // frame 1 starts the program; check the text row in frame 3
    wait (n_frames == 2);
    check_video = 1;
    fork ps2_send(8'h1C); join_none              // key A
    wait (n_frames == 3);
    check_video = 0;

    peek(16'h0010, d); chk("cartridge ROML read", d, cart_img(0));
    peek(16'h0011, d); chk("BASIC ROM read", d, basic_img(0));
    peek(16'h0012, d); chk("RAM under BASIC", d, 8'h5A);
    peek(16'h0013, d); chk("CIA register read", d, 8'h77);
    peek(16'h0400, d); chk("screen RAM", d, 8'h01);
    peek(16'h0427, d); chk("screen RAM end", d, 8'h28);
    peek(16'h0020, d); chk("raster IRQs counted by the handler", d, n_irq);
    chk("SID write", sid_val, 8'h0F);
    chk("key code of A", n_key > 0 ? int'(key_code) : -1, 10);
    chk("PS/2 parity accepted", int'(key_error), 0);
    chk("text-row pixels compared", pix_text, 8 * 320);
    chk("pixels compared", pix_checked > 60000 ? 1 : 0, 1);
    chk("wrong pixels", pix_bad, 0);
    chk("CPU port pins ($2F & $37 | ~$2F)", int'(cpu_port), 8'hF7);
    // mechanisms that must have happened
    chk("bad-line steals happened", n_steal >= 1000 ? 1 : 0, 1);
    chk("sprite fetch steals happened", n_sprite >= 2 * 21 ? 1 : 0, 1);
    chk("raster IRQ happened", n_irq >= 1 ? 1 : 0, 1);
    chk("bank switch happened", n_bank >= 3 ? 1 : 0, 1);
    chk("cartridge read happened", n_cart >= 1 ? 1 : 0, 1);
    chk("SID write happened", n_iow >= 1 ? 1 : 0, 1);
    chk("key event happened", n_key >= 1 ? 1 : 0, 1);
    $display("info: sprite steals=%0d", n_sprite);
    $display("info: steals=%0d irqs=%0d bank=%0d cart=%0d iow=%0d keys=%0d frames=%0d pixels=%0d",
             n_steal, n_irq, n_bank, n_cart, n_iow, n_key, n_frames, pix_checked);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5 * 263 * 65 * 32) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
