// tb_keymap: feeds scan-code sequences (make, break with $F0, extended with
// $E0, numeric-pad joystick keys, an unmapped key) and checks the C64 key
// codes, the make/break flag and the joystick lines against a table of
// expected values written here from the C64 keyboard matrix.
module tb_keymap;
  logic clk = 0, rst_n = 0, sc_valid = 0;
  logic [7:0] sc = 0;
  logic key_valid, key_pressed;
  logic [5:0] key_code;
  logic [4:0] joy_n;
  int checks = 0, failures = 0, nkeys = 0;
  logic [5:0] lcode; logic lpressed;

  keymap dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) if (key_valid) begin nkeys++; lcode = key_code; lpressed = key_pressed; end

  task automatic put(logic [7:0] b);
    @(posedge clk); #1 sc = b; sc_valid = 1;
    @(posedge clk); #1 sc_valid = 0;
    repeat (3) @(posedge clk);
  endtask

  task automatic key(logic [7:0] b, bit e, bit br, int code);
    int n0;
    n0 = nkeys;
    if (e) put(8'hE0);
    if (br) put(8'hF0);
    put(b);
    checks++;
    if (nkeys != n0 + 1 || lcode != 6'(code) || lpressed != !br) begin
      failures++;
      $display("FAIL scan %02h ext %0d brk %0d: n=%0d code %0d pressed %0d, expected %0d", b, e, br, nkeys - n0, lcode, lpressed, code);
    end
  endtask

  task automatic joy(logic [7:0] b, bit br, logic [4:0] exp);
    int n0;
    n0 = nkeys;
    if (br) put(8'hF0);
    put(b);
    checks++;
    if (joy_n !== exp || nkeys != n0) begin
      failures++; $display("FAIL joystick %02h brk %0d: %05b expected %05b", b, br, joy_n, exp);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    key(8'h1C, 0, 0, 10);   // A
    key(8'h1C, 0, 1, 10);   // A released
    key(8'h15, 0, 0, 62);   // Q
    key(8'h29, 0, 0, 60);   // space
    key(8'h5A, 0, 0, 1);    // return
    key(8'h45, 0, 0, 35);   // 0
    key(8'h16, 0, 0, 56);   // 1
    key(8'h12, 0, 0, 15);   // left shift
    key(8'h76, 0, 0, 63);   // run/stop
    key(8'h74, 1, 0, 2);    // cursor right (extended)
    key(8'h72, 1, 1, 7);    // cursor down released (extended)
    joy(8'h75, 0, 5'b11110); // up
    joy(8'h74, 0, 5'b10110); // right (not extended)
    joy(8'h70, 0, 5'b00110); // fire
    joy(8'h75, 1, 5'b00111); // up released
    joy(8'h70, 1, 5'b10111);
    joy(8'h74, 1, 5'b11111);
    begin
      int n0;
      n0 = nkeys;
      put(8'h01);           // F9: not mapped
      checks++;
      if (nkeys != n0) begin failures++; $display("FAIL unmapped key produced a code"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
