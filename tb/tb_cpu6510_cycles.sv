// tb_cpu6510_cycles: cycle count of every opcode of the 6510 core.
//
// For each of the 256 opcodes the core is reset into a short program at
// $0300: LDX #v, LDY #v, then the opcode under test with operand bytes $10
// $02 (zero page $10, absolute $0210, branch offset +$10). A third run puts
// the program at $03EC, so that a taken branch lands on the next page
// ($03F2 + $10) and costs a second extra cycle. Zero page is
// filled with $F0, so every (zp),Y pointer is $F0F0. With v = 0 nothing
// crosses a page; with v = $FF the indexed modes abs,X, abs,Y and (zp),Y
// cross one, and the LDX/LDY set N and clear Z, which changes which
// branches are taken. The clocks from the opcode fetch of the instruction
// under test to the next opcode fetch are compared with the NMOS 6502 table
// below (written out here by hand, with the +1 for a page crossed by a read,
// the +1 for a taken branch and the +1 for a branch into another page). Opcodes without a documented meaning must
// take two cycles, the behaviour chosen for this core.
module tb_cpu6510_cycles;
  logic clk = 0, rst_n = 0;
  logic [15:0] addr;
  logic we, sync;
  logic [7:0] dout, din, port_out;
  logic [7:0] mem [0:65535];
  int checks = 0, failures = 0;

  cpu6510 dut (.clk, .rst_n, .ce(1'b1), .addr, .we, .dout, .din, .irq_n(1'b1), .nmi_n(1'b1),
               .sync, .port_in(8'hC0), .port_out);

  always #5 clk = ~clk;
  assign din = mem[addr];
  always @(posedge clk) if (rst_n && we) mem[addr] <= dout;

  // base cycle counts, one row of 16 per high nibble; 0 = no documented opcode
  localparam int BASE [256] = '{
    7,6,0,0,0,3,5,0,3,2,2,0,0,4,6,0,   2,5,0,0,0,4,6,0,2,4,0,0,0,4,7,0,
    6,6,0,0,3,3,5,0,4,2,2,0,4,4,6,0,   2,5,0,0,0,4,6,0,2,4,0,0,0,4,7,0,
    6,6,0,0,0,3,5,0,3,2,2,0,3,4,6,0,   2,5,0,0,0,4,6,0,2,4,0,0,0,4,7,0,
    6,6,0,0,0,3,5,0,4,2,2,0,5,4,6,0,   2,5,0,0,0,4,6,0,2,4,0,0,0,4,7,0,
    0,6,0,0,3,3,3,0,2,0,2,0,4,4,4,0,   2,6,0,0,4,4,4,0,2,5,2,0,0,5,0,0,
    2,6,2,0,3,3,3,0,2,2,2,0,4,4,4,0,   2,5,0,0,4,4,4,0,2,4,2,0,4,4,4,0,
    2,6,0,0,3,3,5,0,2,2,2,0,4,4,6,0,   2,5,0,0,0,4,6,0,2,4,0,0,0,4,7,0,
    2,6,0,0,3,3,5,0,2,2,2,0,4,4,6,0,   2,5,0,0,0,4,6,0,2,4,0,0,0,4,7,0
  };

  // reads whose indexed address can cross a page: (zp),Y, abs,Y, abs,X
  function automatic bit page_read(int op);
    int lo, hi;
    lo = op & 15; hi = op >> 4;
    if (BASE[op] == 0 || !hi[0]) return 0;       // only the odd rows index
    if (op == 'h91 || op == 'h99 || op == 'h9D) return 0;   // stores
    if (lo == 1 || lo == 9 || lo == 13) return 1;
    if (op == 'hBC || op == 'hBE) return 1;     // LDY abs,X, LDX abs,Y
    return 0;
  endfunction

  function automatic bit is_branch(int op); return (op & 'h1F) == 'h10; endfunction

  // N after LDX/LDY #v is v[7], Z is (v == 0); C and V are clear after reset
  function automatic bit taken(int op, bit n, bit z);
    bit f;
    case (op >> 6)
      0: f = n;
      1: f = 1'b0;      // V
      2: f = 1'b0;      // C
      default: f = z;
    endcase
    return f == op[5];
  endfunction

  task automatic run(int op, logic [7:0] v, int base);
    int exp, got, nsync;
    for (int i = 0; i < 65536; i++) mem[i] = 8'hF0;
    mem[16'hFFFC] = 8'(base); mem[16'hFFFD] = 8'(base >> 8);
    mem[base]     = 8'hA2; mem[base + 1] = v;        // LDX #v
    mem[base + 2] = 8'hA0; mem[base + 3] = v;        // LDY #v
    mem[base + 4] = 8'(op); mem[base + 5] = 8'h10; mem[base + 6] = 8'h02;
    rst_n = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    nsync = 0; got = 0;
    while (nsync < 4) begin
      @(posedge clk);
      if (nsync == 3) got++;
      if (sync) nsync++;
    end
    if (BASE[op] == 0) exp = 2;
    else begin
      exp = BASE[op];
      if (v == 8'hFF && page_read(op)) exp++;
      if (is_branch(op) && taken(op, v[7], v == 8'h00)) begin
        exp++;
        if (((base + 6) >> 8) != ((base + 6 + 16) >> 8)) exp++;
      end
    end
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL opcode %02h at %04h with X=Y=%02h: %0d cycles, expected %0d",
               op, base + 4, v, got, exp);
    end
  endtask

  initial begin
    for (int op = 0; op < 256; op++) begin
      run(op, 8'h00, 'h0300);
      run(op, 8'hFF, 'h0300);
      run(op, 8'h00, 'h03EC);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
