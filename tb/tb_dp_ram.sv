// tb_dp_ram: random writes and reads on both ports of the 64 KB RAM and of
// a 1K x 4 colour RAM instance, checked against a reference array, with the
// one-clock read latency and cross-port visibility.
module tb_dp_ram;
  logic clk = 0;
  int checks = 0, failures = 0;

  logic [15:0] a_addr, b_addr;
  logic a_we = 0, b_we = 0;
  logic [7:0] a_wdata, b_wdata, a_q, b_q;
  logic [9:0] ca_addr, cb_addr;
  logic ca_we = 0;
  logic [3:0] ca_wdata, ca_q, cb_q;

  dp_ram #(.AW(16), .DW(8)) u_ram (.clk, .a_addr, .a_we, .a_wdata, .a_q,
                                   .b_addr, .b_we, .b_wdata, .b_q);
  dp_ram #(.AW(10), .DW(4)) u_col (.clk, .a_addr(ca_addr), .a_we(ca_we), .a_wdata(ca_wdata), .a_q(ca_q),
                                   .b_addr(cb_addr), .b_we(1'b0), .b_wdata(4'h0), .b_q(cb_q));
  always #5 clk = ~clk;

  logic [7:0] ref_m [logic [15:0]];
  logic [3:0] ref_c [logic [9:0]];

  initial begin
    // fill a window through alternating ports
    for (int i = 0; i < 512; i++) begin
      @(posedge clk); #1;
      if (i % 2) begin a_we = 1; a_addr = 16'(16'hC000 + i); a_wdata = 8'($urandom); ref_m[a_addr] = a_wdata; b_we = 0; end
      else       begin b_we = 1; b_addr = 16'(16'hC000 + i); b_wdata = 8'($urandom); ref_m[b_addr] = b_wdata; a_we = 0; end
      ca_we = 1; ca_addr = 10'(i); ca_wdata = 4'($urandom); ref_c[ca_addr] = ca_wdata;
    end
    @(posedge clk); #1 a_we = 0; b_we = 0; ca_we = 0;
    for (int i = 0; i < 512; i++) begin
      a_addr = 16'(16'hC000 + i); b_addr = 16'(16'hC000 + 511 - i); cb_addr = 10'(i);
      @(posedge clk); #1;
      checks += 3;
      if (a_q !== ref_m[a_addr]) begin failures++; $display("FAIL A %04h", a_addr); end
      if (b_q !== ref_m[b_addr]) begin failures++; $display("FAIL B %04h", b_addr); end
      if (cb_q !== ref_c[cb_addr]) begin failures++; $display("FAIL colour %03h", cb_addr); end
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
