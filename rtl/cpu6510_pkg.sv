// cpu6510_pkg: types and the opcode decode table of the 6510 core.
//
// The decode is one lookup on the 8-bit opcode that yields the addressing
// mode, the operation and the kind of memory access (read, write or
// read-modify-write). The core's state machine then walks the bus cycles of
// that addressing mode. Only the documented (legal) opcodes are decoded;
// every other opcode runs as a two-cycle NOP, which is a choice of this core.
package cpu6510_pkg;

  typedef enum logic [4:0] {
    M_IMP,     // implied and accumulator
    M_IMM,     // #imm
    M_ZP,      // zp
    M_ZPX,     // zp,X
    M_ZPY,     // zp,Y
    M_ABS,     // abs
    M_ABSX,    // abs,X
    M_ABSY,    // abs,Y
    M_INDX,    // (zp,X)
    M_INDY,    // (zp),Y
    M_REL,     // branches
    M_JMPABS,  // JMP abs
    M_JMPIND,  // JMP (abs)
    M_JSR,
    M_RTS,
    M_RTI,
    M_BRK,
    M_PUSH,    // PHA, PHP
    M_PULL     // PLA, PLP
  } mode_e;

  typedef enum logic [5:0] {
    OP_NOP, OP_LDA, OP_LDX, OP_LDY, OP_STA, OP_STX, OP_STY,
    OP_ADC, OP_SBC, OP_AND, OP_ORA, OP_EOR, OP_CMP, OP_CPX, OP_CPY, OP_BIT,
    OP_ASL, OP_LSR, OP_ROL, OP_ROR, OP_INC, OP_DEC,
    OP_TAX, OP_TAY, OP_TXA, OP_TYA, OP_TSX, OP_TXS,
    OP_INX, OP_INY, OP_DEX, OP_DEY,
    OP_CLC, OP_SEC, OP_CLI, OP_SEI, OP_CLV, OP_CLD, OP_SED,
    OP_PHA, OP_PHP, OP_PLA, OP_PLP,
    OP_BR, OP_JMP, OP_JSR, OP_RTS, OP_RTI, OP_BRK
  } op_e;

  typedef enum logic [1:0] {ACC_READ, ACC_WRITE, ACC_RMW} acc_e;

  typedef struct packed {
    mode_e mode;
    op_e   op;
    acc_e  acc;
  } dec_t;

  // Status register bit positions.
  localparam int FC = 0, FZ = 1, FI = 2, FD = 3, FB = 4, FV = 6, FN = 7;
  // bit 5 has no flip-flop and reads 1; B exists only in the pushed copy of P
  localparam logic [7:0] P_U  = 8'h20;
  localparam logic [7:0] P_BU = P_U | 8'(1 << FB);

  // Reset, NMI and IRQ/BRK vectors.
  localparam logic [15:0] VEC_NMI = 16'hFFFA;
  localparam logic [15:0] VEC_RST = 16'hFFFC;
  localparam logic [15:0] VEC_IRQ = 16'hFFFE;

  function automatic acc_e acc_of(op_e op);
    case (op)
      OP_STA, OP_STX, OP_STY: return ACC_WRITE;
      OP_ASL, OP_LSR, OP_ROL, OP_ROR, OP_INC, OP_DEC: return ACC_RMW;
      default: return ACC_READ;
    endcase
  endfunction

  function automatic dec_t decode(logic [7:0] opc);
    dec_t d;
    logic [2:0] aaa, bbb;
    aaa = opc[7:5];
    bbb = opc[4:2];
    d.mode = M_IMP;
    d.op   = OP_NOP;
    case (opc[1:0])
      2'b01: begin // ORA AND EOR ADC STA LDA CMP SBC
        case (aaa)
          3'd0: d.op = OP_ORA; 3'd1: d.op = OP_AND; 3'd2: d.op = OP_EOR; 3'd3: d.op = OP_ADC;
          3'd4: d.op = OP_STA; 3'd5: d.op = OP_LDA; 3'd6: d.op = OP_CMP; default: d.op = OP_SBC;
        endcase
        case (bbb)
          3'd0: d.mode = M_INDX; 3'd1: d.mode = M_ZP;   3'd2: d.mode = M_IMM;  3'd3: d.mode = M_ABS;
          3'd4: d.mode = M_INDY; 3'd5: d.mode = M_ZPX;  3'd6: d.mode = M_ABSY; default: d.mode = M_ABSX;
        endcase
        if (opc == 8'h89) begin d.op = OP_NOP; d.mode = M_IMP; end
      end
      2'b10: begin // ASL ROL LSR ROR STX LDX DEC INC and register transfers
        case (aaa)
          3'd0: d.op = OP_ASL; 3'd1: d.op = OP_ROL; 3'd2: d.op = OP_LSR; 3'd3: d.op = OP_ROR;
          3'd4: d.op = OP_STX; 3'd5: d.op = OP_LDX; 3'd6: d.op = OP_DEC; default: d.op = OP_INC;
        endcase
        case (bbb)
          3'd0: d.mode = M_IMM;
          3'd1: d.mode = M_ZP;
          3'd2: d.mode = M_IMP;
          3'd3: d.mode = M_ABS;
          3'd5: d.mode = (aaa == 3'd4 || aaa == 3'd5) ? M_ZPY : M_ZPX;
          3'd7: d.mode = (aaa == 3'd5) ? M_ABSY : M_ABSX;
          default: d.mode = M_IMP;
        endcase
        // implied forms in this column
        case (opc)
          8'h8A: d.op = OP_TXA; 8'hAA: d.op = OP_TAX; 8'hCA: d.op = OP_DEX; 8'hEA: d.op = OP_NOP;
          8'h9A: d.op = OP_TXS; 8'hBA: d.op = OP_TSX;
          default: ;
        endcase
        // holes of this column
        if ((bbb == 3'd0 && opc != 8'hA2) || bbb == 3'd4 ||
            (bbb == 3'd6 && opc != 8'h9A && opc != 8'hBA) || opc == 8'h9E) begin
          d.op = OP_NOP; d.mode = M_IMP;
        end
      end
      2'b00: begin
        case (opc)
          8'h00: begin d.op = OP_BRK; d.mode = M_BRK; end
          8'h20: begin d.op = OP_JSR; d.mode = M_JSR; end
          8'h40: begin d.op = OP_RTI; d.mode = M_RTI; end
          8'h60: begin d.op = OP_RTS; d.mode = M_RTS; end
          8'h08: begin d.op = OP_PHP; d.mode = M_PUSH; end
          8'h48: begin d.op = OP_PHA; d.mode = M_PUSH; end
          8'h28: begin d.op = OP_PLP; d.mode = M_PULL; end
          8'h68: begin d.op = OP_PLA; d.mode = M_PULL; end
          8'h4C: begin d.op = OP_JMP; d.mode = M_JMPABS; end
          8'h6C: begin d.op = OP_JMP; d.mode = M_JMPIND; end
          8'h24: begin d.op = OP_BIT; d.mode = M_ZP; end
          8'h2C: begin d.op = OP_BIT; d.mode = M_ABS; end
          8'h84: begin d.op = OP_STY; d.mode = M_ZP; end
          8'h8C: begin d.op = OP_STY; d.mode = M_ABS; end
          8'h94: begin d.op = OP_STY; d.mode = M_ZPX; end
          8'hA0: begin d.op = OP_LDY; d.mode = M_IMM; end
          8'hA4: begin d.op = OP_LDY; d.mode = M_ZP; end
          8'hAC: begin d.op = OP_LDY; d.mode = M_ABS; end
          8'hB4: begin d.op = OP_LDY; d.mode = M_ZPX; end
          8'hBC: begin d.op = OP_LDY; d.mode = M_ABSX; end
          8'hC0: begin d.op = OP_CPY; d.mode = M_IMM; end
          8'hC4: begin d.op = OP_CPY; d.mode = M_ZP; end
          8'hCC: begin d.op = OP_CPY; d.mode = M_ABS; end
          8'hE0: begin d.op = OP_CPX; d.mode = M_IMM; end
          8'hE4: begin d.op = OP_CPX; d.mode = M_ZP; end
          8'hEC: begin d.op = OP_CPX; d.mode = M_ABS; end
          8'h88: d.op = OP_DEY; 8'hA8: d.op = OP_TAY; 8'hC8: d.op = OP_INY; 8'hE8: d.op = OP_INX;
          8'h18: d.op = OP_CLC; 8'h38: d.op = OP_SEC; 8'h58: d.op = OP_CLI; 8'h78: d.op = OP_SEI;
          8'h98: d.op = OP_TYA; 8'hB8: d.op = OP_CLV; 8'hD8: d.op = OP_CLD; 8'hF8: d.op = OP_SED;
          default:
            if (bbb == 3'd4) begin d.op = OP_BR; d.mode = M_REL; end
        endcase
      end
      default: ; // cc = 11: no legal opcodes
    endcase
    d.acc = acc_of(d.op);
    return d;
  endfunction

endpackage
