// tb_ps2_rx: sends PS/2 frames (start, 8 data bits LSB first, odd parity,
// stop) with a slow keyboard clock and short glitches on the clock line, and
// checks that every byte with good parity comes out once with `ready`, that
// a bad parity gives `parity_err` and no byte, and that the glitches are
// filtered out.
module tb_ps2_rx;
  logic clk = 0, rst_n = 0, ps2_clk = 1, ps2_data = 1;
  logic ready, parity_err;
  logic [7:0] scancode;
  int checks = 0, failures = 0, nready = 0, nerr = 0;
  logic [7:0] last;

  ps2_rx #(.FILTER(8), .TIMEOUT(4000)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) begin
    if (ready) begin nready++; last = scancode; end
    if (parity_err) nerr++;
  end

  task automatic half(); repeat (60) @(posedge clk); endtask
  task automatic glitch();
    // a 3-clock low pulse on the clock line while it is high
    repeat (20) @(posedge clk);
    ps2_clk = 0; repeat (3) @(posedge clk); ps2_clk = 1;
    repeat (20) @(posedge clk);
  endtask

  task automatic send(logic [7:0] b, bit bad);
    logic [10:0] f;
    f = {1'b1, ~^b ^ bad, b, 1'b0};
    for (int i = 0; i < 11; i++) begin
      ps2_data = f[i];
      half();
      ps2_clk = 0;
      half();
      ps2_clk = 1;
      if (i == 4) glitch();
    end
    repeat (200) @(posedge clk);
  endtask

  task automatic expect_byte(logic [7:0] b);
    int n0;
    n0 = nready;
    send(b, 0);
    checks++;
    if (nready != n0 + 1 || last !== b) begin
      failures++; $display("FAIL byte %02h: ready %0d, got %02h", b, nready - n0, last);
    end
  endtask

  initial begin
    repeat (5) @(posedge clk);
    rst_n = 1;
    repeat (20) @(posedge clk);
    expect_byte(8'h1C);
    expect_byte(8'hF0);
    expect_byte(8'hA5);
    expect_byte(8'h00);
    expect_byte(8'hFF);
    begin
      int n0, e0;
      n0 = nready; e0 = nerr;
      send(8'h3A, 1);
      checks++;
      if (nready != n0 || nerr != e0 + 1) begin failures++; $display("FAIL bad parity not flagged"); end
    end
    expect_byte(8'h5A);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
