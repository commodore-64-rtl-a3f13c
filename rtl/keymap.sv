// keymap: turns PS/2 (set 2) scan codes into C64 key codes and emulates a
// joystick on the numeric pad.
//
// The input is the byte stream of the PS/2 receiver. A break prefix ($F0)
// marks the next code as a release and an extended prefix ($E0) marks it as
// an extended key. Each complete code goes through one large case statement:
//  * numeric-pad 8, 2, 4, 6 and 0 (or 5) are not keys but joystick up, down,
//    left, right and fire; `joy_n` holds their state, active low, in the bit
//    order of the C64 joystick port (0 up, 1 down, 2 left, 3 right, 4 fire);
//  * every other mapped key yields `key_valid` for one clock with
//    `key_pressed` (make or break) and `key_code`, the C64 keyboard-matrix
//    position row*8+column as the KERNAL numbers its keys.
// Unmapped codes are dropped. Which PS/2 key stands for which C64 key (for
// example Esc for RUN/STOP, Tab for CTRL, the left arrow on `) is a choice of
// this design.
module keymap (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       sc_valid,
  input  logic [7:0] sc,
  output logic       key_valid,
  output logic       key_pressed,
  output logic [5:0] key_code,
  output logic [4:0] joy_n
);

  logic brk, ext;

  // PS/2 code (with extended flag) -> {mapped, C64 matrix code}
  function automatic logic [6:0] c64_code(logic e, logic [7:0] c);
    if (e) begin
      case (c)
        8'h74: return {1'b1, 6'd2};   // cursor right
        8'h72: return {1'b1, 6'd7};   // cursor down
        8'h6C: return {1'b1, 6'd51};  // home
        8'h5A: return {1'b1, 6'd1};   // keypad enter = return
        8'h71: return {1'b1, 6'd0};   // delete
        default: return 7'd0;
      endcase
    end
    case (c)
      8'h66: return {1'b1, 6'd0};  // backspace -> DEL
      8'h5A: return {1'b1, 6'd1};  // return
      8'h83: return {1'b1, 6'd3};  // F7
      8'h05: return {1'b1, 6'd4};  // F1
      8'h04: return {1'b1, 6'd5};  // F3
      8'h03: return {1'b1, 6'd6};  // F5
      8'h26: return {1'b1, 6'd8};  // 3
      8'h1D: return {1'b1, 6'd9};  // W
      8'h1C: return {1'b1, 6'd10}; // A
      8'h25: return {1'b1, 6'd11}; // 4
      8'h1A: return {1'b1, 6'd12}; // Z
      8'h1B: return {1'b1, 6'd13}; // S
      8'h24: return {1'b1, 6'd14}; // E
      8'h12: return {1'b1, 6'd15}; // left shift
      8'h2E: return {1'b1, 6'd16}; // 5
      8'h2D: return {1'b1, 6'd17}; // R
      8'h23: return {1'b1, 6'd18}; // D
      8'h36: return {1'b1, 6'd19}; // 6
      8'h21: return {1'b1, 6'd20}; // C
      8'h2B: return {1'b1, 6'd21}; // F
      8'h2C: return {1'b1, 6'd22}; // T
      8'h22: return {1'b1, 6'd23}; // X
      8'h3D: return {1'b1, 6'd24}; // 7
      8'h35: return {1'b1, 6'd25}; // Y
      8'h34: return {1'b1, 6'd26}; // G
      8'h3E: return {1'b1, 6'd27}; // 8
      8'h32: return {1'b1, 6'd28}; // B
      8'h33: return {1'b1, 6'd29}; // H
      8'h3C: return {1'b1, 6'd30}; // U
      8'h2A: return {1'b1, 6'd31}; // V
      8'h46: return {1'b1, 6'd32}; // 9
      8'h43: return {1'b1, 6'd33}; // I
      8'h3B: return {1'b1, 6'd34}; // J
      8'h45: return {1'b1, 6'd35}; // 0
      8'h3A: return {1'b1, 6'd36}; // M
      8'h42: return {1'b1, 6'd37}; // K
      8'h44: return {1'b1, 6'd38}; // O
      8'h31: return {1'b1, 6'd39}; // N
      8'h79: return {1'b1, 6'd40}; // keypad + -> +
      8'h4D: return {1'b1, 6'd41}; // P
      8'h4B: return {1'b1, 6'd42}; // L
      8'h4E: return {1'b1, 6'd43}; // -
      8'h49: return {1'b1, 6'd44}; // .
      8'h4C: return {1'b1, 6'd45}; // ; -> :
      8'h54: return {1'b1, 6'd46}; // [ -> @
      8'h41: return {1'b1, 6'd47}; // ,
      8'h5D: return {1'b1, 6'd48}; // \ -> pound
      8'h7C: return {1'b1, 6'd49}; // keypad * -> *
      8'h52: return {1'b1, 6'd50}; // ' -> ;
      8'h59: return {1'b1, 6'd52}; // right shift
      8'h55: return {1'b1, 6'd53}; // =
      8'h5B: return {1'b1, 6'd54}; // ] -> up arrow
      8'h4A: return {1'b1, 6'd55}; // /
      8'h16: return {1'b1, 6'd56}; // 1
      8'h0E: return {1'b1, 6'd57}; // ` -> left arrow
      8'h0D: return {1'b1, 6'd58}; // tab -> CTRL
      8'h1E: return {1'b1, 6'd59}; // 2
      8'h29: return {1'b1, 6'd60}; // space
      8'h14: return {1'b1, 6'd61}; // left ctrl -> C=
      8'h15: return {1'b1, 6'd62}; // Q
      8'h76: return {1'b1, 6'd63}; // esc -> RUN/STOP
      default: return 7'd0;
    endcase
  endfunction

  // numeric pad -> joystick bit (one-hot), 0 if not a joystick key
  function automatic logic [4:0] joy_bit(logic e, logic [7:0] c);
    if (e) return 5'b0;
    case (c)
      8'h75:        return 5'b00001;  // keypad 8: up
      8'h72:        return 5'b00010;  // keypad 2: down
      8'h6B:        return 5'b00100;  // keypad 4: left
      8'h74:        return 5'b01000;  // keypad 6: right
      8'h70, 8'h73: return 5'b10000;  // keypad 0 or 5: fire
      default:      return 5'b0;
    endcase
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      brk <= 1'b0; ext <= 1'b0;
      key_valid <= 1'b0; key_pressed <= 1'b0; key_code <= '0;
      joy_n <= 5'h1F;
    end else begin
      key_valid <= 1'b0;
      if (sc_valid) begin
        if (sc == 8'hF0) brk <= 1'b1;
        else if (sc == 8'hE0) ext <= 1'b1;
        else begin
          logic [6:0] m;
          logic [4:0] j;
          m = c64_code(ext, sc);
          j = joy_bit(ext, sc);
          if (j != 5'b0) begin
            joy_n <= brk ? (joy_n | j) : (joy_n & ~j);
          end else if (m[6]) begin
            key_valid   <= 1'b1;
            key_pressed <= !brk;
            key_code    <= m[5:0];
          end
          brk <= 1'b0;
          ext <= 1'b0;
        end
      end
    end
  end

endmodule
