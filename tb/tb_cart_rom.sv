// tb_cart_rom: loads a 16 KB cartridge image generated by formula and checks
// that ROML reads ($8000-$9FFF) return the first bank and ROMH reads
// ($A000-$BFFF, and $E000-$FFFF as in Ultimax mode) the second.
module tb_cart_rom;
  import c64_pkg::*;
  logic clk = 0, load_we = 0;
  logic [15:0] addr = 0;
  logic [13:0] load_addr = 0;
  logic [7:0] load_data = 0, q;
  cs_e cs = CS_ROML;
  int checks = 0, failures = 0;

  cart_rom dut (.*);
  always #5 clk = ~clk;

  function automatic logic [7:0] img(int i); return 8'((i * 11) ^ (i >> 7)); endfunction

  task automatic rd(logic [15:0] a, cs_e c, int idx);
    addr = a; cs = c;
    @(posedge clk); #1;
    checks++;
    if (q !== img(idx)) begin failures++; $display("FAIL %04h %s", a, c.name()); end
  endtask

  initial begin
    for (int i = 0; i < 16384; i++) begin
      @(posedge clk); #1 load_we = 1; load_addr = 14'(i); load_data = img(i);
    end
    @(posedge clk); #1 load_we = 0;
    for (int k = 0; k < 300; k++) begin
      int o;
      o = int'($urandom_range(8191));
      rd(16'(16'h8000 + o), CS_ROML, o);
      rd(16'(16'hA000 + o), CS_ROMH, 8192 + o);
      rd(16'(16'hE000 + o), CS_ROMH, 8192 + o);
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
