// tb_c64_bus: checks the sub-cycle schedule and multiplexing of the bus.
//
// A behavioural RAM (one clock read latency) and ROM answer the bus. The test
// checks that the CPU is advanced exactly once per 32-clock cycle in
// sub-cycle 32, that the VIC is served in sub-cycle 16, that a stolen cycle
// serves the VIC twice and does not advance the CPU, that a CPU write lands
// once at the right address, that reads return the selected device's data
// (RAM, BASIC ROM, open bus) and that writes under a ROM reach RAM.
module tb_c64_bus;
  import c64_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [15:0] cpu_addr = 16'h1000, vic_addr_a = 16'h2000, vic_addr_b = 16'h3000;
  logic cpu_we = 0, vic_steal = 0;
  logic [7:0] cpu_wdata = 0;
  logic cpu_ce, vic_ack, vic_ack_b, mem_we, mem_vic, cycle_end;
  logic loram = 1, hiram = 1, charen = 1, game = 1, exrom = 1;
  logic [15:0] mem_addr;
  logic [7:0] mem_wdata, ram_q, rom_q, rdata;
  cs_e mem_cs;
  logic [4:0] sub;
  logic [7:0] ram [0:65535];
  int checks = 0, failures = 0, writes = 0;

  c64_bus dut (.clk, .rst_n, .cpu_addr, .cpu_we, .cpu_wdata, .cpu_ce,
               .vic_addr_a, .vic_addr_b, .vic_steal, .vic_ack, .vic_ack_b,
               .loram, .hiram, .charen, .game, .exrom,
               .mem_addr, .mem_we, .mem_wdata, .mem_cs, .mem_vic,
               .ram_q, .rom_q, .cart_q(8'h77), .vic_q(8'h66), .color_q(4'h5), .io_q(8'h44),
               .rdata, .sub, .cycle_end);

  always #5 clk = ~clk;
  always @(posedge clk) begin
    ram_q <= ram[mem_addr];
    rom_q <= mem_addr[7:0] ^ 8'hA5;
    if (mem_we && mem_cs == CS_RAM) begin ram[mem_addr] <= mem_wdata; writes++; end
  end

  task automatic chk(string what, int got, int exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %0h expected %0h", what, got, exp); end
  endtask

  // one CPU access: returns the data seen at cpu_ce and the clocks it took
  task automatic cpu_access(input logic [15:0] a, input logic w, input logic [7:0] d,
                            output logic [7:0] q, output int clocks);
    cpu_addr = a; cpu_we = w; cpu_wdata = d;
    clocks = 0;
    do begin @(posedge clk); clocks++; end while (!cpu_ce);
    q = rdata;
    #1;
    cpu_we = 0;
  endtask

  logic [7:0] q;
  int clocks, vic_acks, vic_b_acks, vic_sub, cpu_sub;
  always @(posedge clk) if (rst_n) begin
    if (vic_ack) begin
      vic_acks++;
      if (!vic_ack_b) begin vic_sub = int'(sub); end
    end
    if (vic_ack_b) vic_b_acks++;
    if (cpu_ce) cpu_sub = int'(sub);
  end

  initial begin
    for (int i = 0; i < 65536; i++) ram[i] = 8'(i * 7);
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    cpu_access(16'h1234, 0, 0, q, clocks);
    chk("first CPU ack after 32 sub-cycles", clocks, 32);
    chk("CPU ack in sub-cycle 32", cpu_sub, 31);
    chk("RAM read", q, 8'(16'h1234 * 7));
    cpu_access(16'h1234, 1, 8'h5C, q, clocks);
    chk("next CPU cycle 32 clocks later", clocks, 32);
    chk("VIC served in sub-cycle 16", vic_sub, 15);
    cpu_access(16'h1234, 0, 0, q, clocks);
    chk("RAM write then read", q, 8'h5C);
    chk("one write per cycle", writes, 1);
    cpu_access(16'hA010, 0, 0, q, clocks);
    chk("BASIC ROM read", q, 8'h10 ^ 8'hA5);
    cpu_access(16'hA010, 1, 8'h99, q, clocks);
    cpu_access(16'hA010, 0, 0, q, clocks);
    chk("write under BASIC reaches RAM, read gives ROM", ram[16'hA010], 8'h99);
    chk("read under BASIC gives ROM", q, 8'h10 ^ 8'hA5);
    cpu_access(16'hD020, 0, 0, q, clocks);
    chk("VIC register read", q, 8'h66);
    cpu_access(16'hD800, 0, 0, q, clocks);
    chk("colour RAM read", q, 8'h05);
    {game, exrom} = 2'b01;
    cpu_access(16'h4000, 0, 0, q, clocks);
    chk("Ultimax open bus", q, 8'hFF);
    {game, exrom} = 2'b11;
    // VIC steals 3 cycles
    vic_acks = 0; vic_b_acks = 0;
    vic_steal = 1;
    fork
      begin
        repeat (3) @(posedge clk iff cycle_end);
        #1 vic_steal = 0;
      end
    join_none
    cpu_access(16'h0100, 0, 0, q, clocks);
    chk("three stolen cycles delay the CPU by 3 x 32 clocks", clocks, 4 * 32);
    chk("VIC served in the CPU window three times", vic_b_acks, 3);
    chk("VIC served in its own window every cycle", vic_acks, 4 + 3);
    chk("RAM read after steal", q, 8'(16'h0100 * 7));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
