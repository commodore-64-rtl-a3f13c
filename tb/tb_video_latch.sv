// tb_video_latch: drives a pixel strobe every 4 clocks with random colour
// indices and syncs, checks that the RGB output is the palette entry of the
// latched index and that it, and the syncs, are held between strobes.
module tb_video_latch;
  logic clk = 0, rst_n = 0, pix_valid = 0, hsync_in = 0, vsync_in = 0;
  logic [3:0] pix_color = 0;
  logic [7:0] red, green, blue;
  logic hsync, vsync, new_pix;
  int checks = 0, failures = 0;
  logic [23:0] pal [16] = '{24'h000000, 24'hFFFFFF, 24'h68372B, 24'h70A4B2, 24'h6F3D86, 24'h588D43,
                            24'h352879, 24'hB8C76F, 24'h6F4F25, 24'h433900, 24'h9A6759, 24'h444444,
                            24'h6C6C6C, 24'h9AD284, 24'h6C5EB5, 24'h959595};

  video_latch dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 200; n++) begin
      logic [3:0] c; logic h, v;
      c = 4'($urandom); h = 1'($urandom); v = 1'($urandom);
      @(posedge clk); #1 pix_valid = 1; pix_color = c; hsync_in = h; vsync_in = v;
      @(posedge clk); #1 pix_valid = 0; pix_color = ~c; hsync_in = ~h; vsync_in = ~v;
      for (int k = 0; k < 3; k++) begin
        checks++;
        if ({red, green, blue} !== pal[c] || hsync !== h || vsync !== v || new_pix !== (k == 0)) begin
          failures++;
          $display("FAIL pixel %0d clock %0d: %06h expected %06h", n, k, {red, green, blue}, pal[c]);
        end
        @(posedge clk); #1;
      end
    end
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
