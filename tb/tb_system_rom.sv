// tb_system_rom: loads BASIC, KERNAL and character images generated by
// formula through the load port, then reads them back through the bank
// addresses ($A000, $E000, $D000, and the VIC's $1000/$9000 view) and checks
// that each address lands in the right image at the right offset.
module tb_system_rom;
  import c64_pkg::*;
  logic clk = 0, load_we = 0;
  logic [15:0] addr = 0;
  logic [14:0] load_addr = 0;
  logic [7:0] load_data = 0, q;
  cs_e cs = CS_BASIC;
  int checks = 0, failures = 0;

  system_rom dut (.*);
  always #5 clk = ~clk;

  function automatic logic [7:0] img(int region, int off);
    return 8'((off * 3 + region * 77) ^ (off >> 8));
  endfunction

  task automatic rd(logic [15:0] a, cs_e c, int region, int off);
    addr = a; cs = c;
    @(posedge clk); #1;
    checks++;
    if (q !== img(region, off)) begin failures++; $display("FAIL %04h %s: %02h expected %02h", a, c.name(), q, img(region, off)); end
  endtask

  initial begin
    for (int i = 0; i < 20480; i++) begin
      @(posedge clk); #1;
      load_we = 1; load_addr = 15'(i);
      load_data = (i < 8192) ? img(0, i) : (i < 16384) ? img(1, i - 8192) : img(2, i - 16384);
    end
    @(posedge clk); #1 load_we = 0;
    for (int k = 0; k < 300; k++) begin
      int o;
      o = int'($urandom_range(8191));
      rd(16'(16'hA000 + o), CS_BASIC, 0, o);
      rd(16'(16'hE000 + o), CS_KERNAL, 1, o);
      o = int'($urandom_range(4095));
      rd(16'(16'hD000 + o), CS_CHAR, 2, o);
      rd(16'(16'h1000 + o), CS_CHAR, 2, o);
      rd(16'(16'h9000 + o), CS_CHAR, 2, o);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
