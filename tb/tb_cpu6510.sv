// tb_cpu6510: self-checking test of the 6510 core.
//
// A 64 KB memory model answers the core's bus cycles; the core is enabled on
// every second clock so the clock-enable path is exercised. A hand-assembled
// program covers every addressing mode, arithmetic in binary and decimal,
// the stack, JSR/RTS, BRK/RTI, a masked then unmasked IRQ, an edge-triggered
// NMI and the on-chip I/O port. Expected memory contents are worked out by
// hand, and the number of cycles of each instruction is measured from the
// opcode-fetch (sync) cycles and compared with the 6502 cycle table.
module tb_cpu6510;
  logic clk = 0, rst_n = 0, ce = 0;
  logic [15:0] addr;
  logic we, sync, irq_n = 1, nmi_n = 1;
  logic [7:0] dout, din, port_out;
  logic [7:0] mem [0:65535];
  int checks = 0, failures = 0;
  int exp_cyc [int][$];
  int pc_a;
  int cyc_since = 0, last_op = -1, ncyc = 0;

  cpu6510 dut (.clk, .rst_n, .ce, .addr, .we, .dout, .din, .irq_n, .nmi_n,
               .sync, .port_in(8'hC0), .port_out);

  always #5 clk = ~clk;
  always @(posedge clk) if (ce && rst_n && $test$plusargs("trace")) $display("%t st=%0d a=%04h we=%b do=%02h di=%02h s=%02h p=%02h irq=%b", $time, dut.st, addr, we, dout, din, dut.r.s, dut.r.p, irq_n);
  assign din = mem[addr];

  always @(posedge clk) begin
    ce <= ~ce;
    if (ce && we) mem[addr] <= dout;
  end

  // cycle count of each instruction, measured between opcode fetches
  always @(posedge clk) if (ce && rst_n) begin
    ncyc <= ncyc + 1;
    if (sync) begin
      if (last_op >= 0 && exp_cyc.exists(last_op)) begin
        checks++;
        if (cyc_since != exp_cyc[last_op][0]) begin
          failures++;
          $display("FAIL cycles of instr at %04h: %0d expected %0d", last_op, cyc_since, exp_cyc[last_op][0]);
        end
        if (exp_cyc[last_op].size() > 1) void'(exp_cyc[last_op].pop_front());
      end
      last_op <= int'(addr);
      cyc_since <= 1;
    end else cyc_since <= cyc_since + 1;
  end

  task automatic org(int a); pc_a = a; endtask
  task automatic i1(int c, logic [7:0] b0);
    exp_cyc[pc_a] = '{c}; mem[pc_a] = b0; pc_a += 1;
  endtask
  task automatic i2(int c, logic [7:0] b0, logic [7:0] b1);
    exp_cyc[pc_a] = '{c}; mem[pc_a] = b0; mem[pc_a+1] = b1; pc_a += 2;
  endtask
  task automatic i3(int c, logic [7:0] b0, logic [7:0] b1, logic [7:0] b2);
    exp_cyc[pc_a] = '{c}; mem[pc_a] = b0; mem[pc_a+1] = b1; mem[pc_a+2] = b2; pc_a += 3;
  endtask

  task automatic chk(string what, logic [7:0] got, logic [7:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %02h expected %02h", what, got, exp);
    end
  endtask

  task automatic wait_fetch(logic [15:0] a);
    do @(posedge clk); while (!(ce && sync && addr == a));
  endtask

  initial begin
    for (int i = 0; i < 65536; i++) mem[i] = 8'h00;
    mem[16'hFFFC] = 8'h00; mem[16'hFFFD] = 8'h02;   // reset -> $0200
    mem[16'hFFFE] = 8'h00; mem[16'hFFFF] = 8'h03;   // IRQ/BRK -> $0300
    mem[16'hFFFA] = 8'h80; mem[16'hFFFB] = 8'h03;   // NMI -> $0380
    mem[16'h3005] = 8'h5A;
    mem[16'h0050] = 8'h00; mem[16'h0051] = 8'h32;   // ($30,X) with X=$20
    mem[16'h0052] = 8'h01; mem[16'h0053] = 8'h33;   // ($52),Y
    mem[16'h3400] = 8'hC3;
    mem[16'h02B0] = 8'hC0; mem[16'h02B1] = 8'h02;   // JMP ($02B0) -> $02C0

    org(16'h0200);
    i2(2, 8'hA2, 8'h05);              // LDX #$05
    i2(2, 8'hA0, 8'h10);              // LDY #$10
    i2(2, 8'hA9, 8'h37);              // LDA #$37
    i2(3, 8'h85, 8'h40);              // STA $40
    i2(4, 8'h95, 8'h40);              // STA $40,X      -> $45
    i3(4, 8'h8D, 8'h00, 8'h30);       // STA $3000
    i3(5, 8'h9D, 8'hFF, 8'h30);       // STA $30FF,X    -> $3104
    i3(5, 8'hBD, 8'hFF, 8'h30);       // LDA $30FF,X    page cross
    i3(4, 8'hBD, 8'h00, 8'h30);       // LDA $3000,X    A = $5A
    i1(2, 8'h18);                     // CLC
    i2(2, 8'h69, 8'h20);              // ADC #$20       A = $7A
    i2(3, 8'h85, 8'h4B);              // STA $4B
    i2(5, 8'hE6, 8'h40);              // INC $40        $38
    i2(5, 8'h06, 8'h40);              // ASL $40        $70
    i3(6, 8'h20, 8'hA0, 8'h02);       // JSR $02A0
    i2(3, 8'h85, 8'h41);              // STA $41        $99
    i1(2, 8'hF8);                     // SED
    i1(2, 8'h18);                     // CLC
    i2(2, 8'hA9, 8'h19);              // LDA #$19
    i2(2, 8'h69, 8'h28);              // ADC #$28       BCD 47
    i2(3, 8'h85, 8'h42);              // STA $42
    i1(2, 8'hD8);                     // CLD
    i2(2, 8'hA9, 8'h80);              // LDA #$80
    i1(3, 8'h48);                     // PHA
    i2(2, 8'hA9, 8'h00);              // LDA #$00
    i1(4, 8'h68);                     // PLA            A = $80, N = 1
    i2(3, 8'h30, 8'h02);              // BMI +2 (taken)
    i2(2, 8'hA9, 8'hFF);              // LDA #$FF (skipped)
    i2(3, 8'h85, 8'h43);              // STA $43        $80
    i2(2, 8'hA9, 8'h11);              // LDA #$11
    i2(2, 8'hA2, 8'h20);              // LDX #$20
    i2(6, 8'h81, 8'h30);              // STA ($30,X)    -> $3200
    i2(2, 8'hA0, 8'hFF);              // LDY #$FF
    i2(6, 8'hB1, 8'h52);              // LDA ($52),Y    $3301+$FF = $3400
    i2(3, 8'h85, 8'h44);              // STA $44        $C3
    i2(2, 8'hA9, 8'h2F);              // LDA #$2F
    i2(3, 8'h85, 8'h00);              // STA $00        DDR
    i2(2, 8'hA9, 8'h35);              // LDA #$35
    i2(3, 8'h85, 8'h01);              // STA $01        port
    i2(3, 8'hA5, 8'h01);              // LDA $01        $25 | ($D0 & $C0) = $E5
    i2(3, 8'h85, 8'h4A);              // STA $4A
    i2(2, 8'hA2, 8'h03);              // LDX #$03
    i1(2, 8'hCA);                     // DEX            (loop)
    i2(3, 8'hD0, 8'hFD);              // BNE -3  taken twice, then 2
    exp_cyc[pc_a-2] = '{3, 3, 2};
    i2(3, 8'h86, 8'h4C);              // STX $4C        0
    i1(2, 8'h38);                     // SEC
    i2(2, 8'hA9, 8'h10);              // LDA #$10
    i2(2, 8'h69, 8'h05);              // ADC #$05       $16 (carry in)
    i2(3, 8'h85, 8'h4D);              // STA $4D
    i1(2, 8'h38);                     // SEC
    i2(2, 8'hA9, 8'h50);              // LDA #$50
    i2(2, 8'hE9, 8'h20);              // SBC #$20       $30
    i2(3, 8'h85, 8'h4E);              // STA $4E
    i1(2, 8'h18);                     // CLC
    i2(2, 8'hA9, 8'h50);              // LDA #$50
    i2(2, 8'hE9, 8'h20);              // SBC #$20       $2F (borrow)
    i2(3, 8'h85, 8'h4F);              // STA $4F
    i2(2, 8'hA9, 8'h81);              // LDA #$81
    i1(2, 8'h4A);                     // LSR A          $40, C=1
    i1(2, 8'h6A);                     // ROR A          $A0
    i2(3, 8'h85, 8'h50);              // STA $50
    i3(5, 8'h6C, 8'hB0, 8'h02);       // JMP ($02B0)
    org(16'h02A0);
    i2(2, 8'hA9, 8'h99);              // LDA #$99
    i1(6, 8'h60);                     // RTS
    org(16'h02C0);
    i1(7, 8'h00);                     // BRK (+ signature byte)
    org(16'h02C2);
    i1(2, 8'h58);                     // CLI
    i2(2, 8'hA9, 8'h5E);              // LDA #$5E  (IRQ taken here first: 7)
    exp_cyc[pc_a-2] = '{7, 2};
    i2(3, 8'h85, 8'h47);              // STA $47
    i3(3, 8'h4C, 8'hC7, 8'h02);       // JMP $02C7 (loop)
    exp_cyc.delete(pc_a-3);           // also where the NMI is taken
    org(16'h0300);
    i2(5, 8'hE6, 8'h46);              // INC $46
    i1(6, 8'h40);                     // RTI
    org(16'h0380);
    i2(5, 8'hE6, 8'h48);              // INC $48
    i1(6, 8'h40);                     // RTI

    repeat (4) @(posedge clk);
    rst_n = 1;
    // reset: dummy cycle plus two vector reads before the first fetch
    wait_fetch(16'h0200);
    chk("cycles from reset to first fetch", 8'(ncyc), 8'd3);
    irq_n = 0;                       // held, masked by I until CLI
    wait_fetch(16'h0300);            // BRK
    chk("BRK pushed PCL", mem[16'h01FE], 8'hC2);
    chk("BRK pushed P with B set", mem[16'h01FD] & 8'h10, 8'h10);
    wait_fetch(16'h0300);            // IRQ after CLI
    irq_n = 1;
    wait_fetch(16'h02C7);
    wait_fetch(16'h02C7);
    nmi_n = 0;                       // held low: taken once
    wait_fetch(16'h0380);
    repeat (200) @(posedge clk);
    nmi_n = 1;
    repeat (100) @(posedge clk);

    chk("STA zp",          mem[16'h0040], 8'h70);
    chk("STA zp,X",        mem[16'h0045], 8'h37);
    chk("STA abs",         mem[16'h3000], 8'h37);
    chk("STA abs,X",       mem[16'h3104], 8'h37);
    chk("LDA abs,X / ADC", mem[16'h004B], 8'h7A);
    chk("JSR/RTS",         mem[16'h0041], 8'h99);
    chk("ADC decimal",     mem[16'h0042], 8'h47);
    chk("PHA/PLA/BMI",     mem[16'h0043], 8'h80);
    chk("STA (zp,X)",      mem[16'h3200], 8'h11);
    chk("LDA (zp),Y",      mem[16'h0044], 8'hC3);
    chk("port read",       mem[16'h004A], 8'hE5);
    chk("port out",        port_out,      8'hF5);
    chk("ADC with carry in", mem[16'h004D], 8'h16);
    chk("SBC no borrow",     mem[16'h004E], 8'h30);
    chk("SBC borrow",        mem[16'h004F], 8'h2F);
    chk("LSR/ROR A",         mem[16'h0050], 8'hA0);
    chk("DEX/BNE loop",    mem[16'h004C], 8'h00);
    chk("BRK+IRQ count",   mem[16'h0046], 8'h02);
    chk("after RTI",       mem[16'h0047], 8'h5E);
    chk("NMI count",       mem[16'h0048], 8'h01);
    chk("stack balanced",  dut.r.s,       8'hFF);
    chk("NMI pushed PCL",  mem[16'h01FE], 8'hC7);
    chk("NMI pushed P with B clear", mem[16'h01FD] & 8'h10, 8'h00);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
