// cpu6510: 6502-compatible processor with the 6510 on-chip I/O port.
//
// The core advances one bus cycle per clock on which `ce` is high; between
// two `ce` pulses the bus is free for other masters. Every cycle is a memory
// access, as on the original chip: the address, write enable and write data
// are registered and stay on `addr`/`we`/`dout` for the whole cycle, and read
// data must be valid on `din` at the clock edge where `ce` is high.
//
// Control is a table-driven state machine. The opcode is decoded once by a
// 256-entry lookup (cpu6510_pkg::decode) into an addressing mode and an
// operation; the state machine then steps through the bus cycles of that
// mode, one state per cycle, so every instruction takes the documented 6502
// cycle count (including the extra cycle for an index that crosses a page and
// for taken branches, and the dummy reads and writes of read-modify-write).
// The register set (A, X, Y, S, P, PC), the addressing modes, IRQ (level,
// masked by I) and NMI (falling edge) follow the 6510 description; stack
// pointer $FF at reset follows the 6510 memory map.
//
// Reset is run as a pseudo JMP-absolute of three cycles: a dummy cycle, then a
// read of the low vector byte at $FFFC, then the high byte at $FFFD, after
// which fetching starts at the vector. BRK, IRQ and NMI take 7 cycles and push
// PC and P. Decimal mode of ADC and SBC follows NMOS behaviour for A and C;
// N, V and Z are taken from the binary result (design choice). Opcodes with
// no documented meaning execute as two-cycle NOPs.
//
// I/O port: $0000 is the data direction register, $0001 the output register.
// Reads of these two addresses return the internal registers; writes update
// them and also go out on the bus. A pin whose direction bit is 0 reads as
// `port_in`; the `port_out` value is the output register where the pin is an
// output and 1 (pull-up) elsewhere. Bits 0..2 are LORAM, HIRAM and CHAREN.
module cpu6510
  import cpu6510_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        ce,        // advance one bus cycle
  output logic [15:0] addr,
  output logic        we,
  output logic [7:0]  dout,
  input  logic [7:0]  din,
  input  logic        irq_n,
  input  logic        nmi_n,
  output logic        sync,      // high during an opcode fetch cycle
  input  logic [7:0]  port_in,
  output logic [7:0]  port_out
);

  typedef enum logic [4:0] {
    S_RST0, S_RSTLO, S_RSTHI,
    S_FETCH, S_T1,
    S_READ, S_STORE, S_RMW1, S_RMW2,
    S_ZPIDX, S_ABS2, S_IDXFIX,
    S_IND1, S_IND2,
    S_INDX1, S_INDX2, S_INDX3,
    S_INDY1, S_INDY2,
    S_BR1, S_BR2,
    S_JSR1, S_JSR2, S_JSR3, S_JSR4,
    S_RTS1, S_RTS2, S_RTS3, S_RTS4,
    S_RTI1, S_RTI2, S_RTI3
  } state_e;

  typedef struct packed {
    logic [7:0] a, x, y, s, p;
  } regs_t;

  state_e      st;
  regs_t       r;
  logic [15:0] pc;
  logic [7:0]  ir;
  dec_t        d;
  logic [15:0] ad;       // effective address
  logic [7:0]  bal;      // base / pointer byte
  logic [7:0]  dl;       // data latch
  logic        ixc;      // carry out of an index addition
  logic        int_brk;  // current BRK sequence is a hardware interrupt
  logic        nmi_take; // current BRK sequence uses the NMI vector
  logic        nmi_pend, nmi_q;
  logic [7:0]  ddr, por;
  logic [7:0]  rd;       // data seen by the core this cycle

  assign port_out = (ddr & por) | ~ddr;
  assign sync     = (st == S_FETCH);
  assign d        = decode(ir);

  always_comb begin
    if (!we && addr == 16'h0000)      rd = ddr;
    else if (!we && addr == 16'h0001) rd = (ddr & por) | (~ddr & port_in);
    else                              rd = din;
  end

  // ---------------------------------------------------------------- ALU ----
  function automatic logic [7:0] nz(logic [7:0] p, logic [7:0] v);
    logic [7:0] q;
    q = p;
    q[FN] = v[7];
    q[FZ] = (v == 8'h00);
    return q;
  endfunction

  function automatic regs_t do_adc(regs_t ri, logic [7:0] m);
    regs_t ro;
    logic [8:0] bin;
    logic [4:0] lo;
    logic [4:0] hi;
    ro  = ri;
    bin = {1'b0, ri.a} + {1'b0, m} + {8'd0, ri.p[FC]};
    ro.p = nz(ri.p, bin[7:0]);
    ro.p[FV] = (~(ri.a[7] ^ m[7])) & (ri.a[7] ^ bin[7]);
    if (ri.p[FD]) begin
      lo = {1'b0, ri.a[3:0]} + {1'b0, m[3:0]} + {4'd0, ri.p[FC]};
      if (lo > 5'd9) lo = lo + 5'd6;
      hi = {1'b0, ri.a[7:4]} + {1'b0, m[7:4]} + {4'd0, (lo > 5'd15)};
      if (hi > 5'd9) hi = hi + 5'd6;
      ro.a = {hi[3:0], lo[3:0]};
      ro.p[FC] = (hi > 5'd15);
    end else begin
      ro.a = bin[7:0];
      ro.p[FC] = bin[8];
    end
    return ro;
  endfunction

  function automatic regs_t do_sbc(regs_t ri, logic [7:0] m);
    regs_t ro;
    logic [8:0] bin;
    logic [5:0] lo;
    logic [5:0] hi;
    ro  = ri;
    bin = {1'b0, ri.a} + {1'b0, ~m} + {8'd0, ri.p[FC]};
    ro.p = nz(ri.p, bin[7:0]);
    ro.p[FV] = (ri.a[7] ^ m[7]) & (ri.a[7] ^ bin[7]);
    ro.p[FC] = bin[8];
    if (ri.p[FD]) begin
      lo = {2'b0, ri.a[3:0]} - {2'b0, m[3:0]} - {5'd0, ~ri.p[FC]};
      hi = {2'b0, ri.a[7:4]} - {2'b0, m[7:4]} - {5'd0, lo[5]};
      if (lo[5]) lo = lo - 6'd6;
      if (hi[5]) hi = hi - 6'd6;
      ro.a = {hi[3:0], lo[3:0]};
    end else begin
      ro.a = bin[7:0];
    end
    return ro;
  endfunction

  function automatic logic [7:0] do_cmp(logic [7:0] p, logic [7:0] reg_v, logic [7:0] m);
    logic [8:0] diff;
    logic [7:0] q;
    diff = {1'b0, reg_v} - {1'b0, m};
    q = nz(p, diff[7:0]);
    q[FC] = ~diff[8];
    return q;
  endfunction

  // operations that read memory (or an immediate) and update registers
  function automatic regs_t exec_read(regs_t ri, op_e op, logic [7:0] m);
    regs_t ro;
    ro = ri;
    case (op)
      OP_LDA: begin ro.a = m; ro.p = nz(ri.p, m); end
      OP_LDX: begin ro.x = m; ro.p = nz(ri.p, m); end
      OP_LDY: begin ro.y = m; ro.p = nz(ri.p, m); end
      OP_AND: begin ro.a = ri.a & m; ro.p = nz(ri.p, ri.a & m); end
      OP_ORA: begin ro.a = ri.a | m; ro.p = nz(ri.p, ri.a | m); end
      OP_EOR: begin ro.a = ri.a ^ m; ro.p = nz(ri.p, ri.a ^ m); end
      OP_ADC: ro = do_adc(ri, m);
      OP_SBC: ro = do_sbc(ri, m);
      OP_CMP: ro.p = do_cmp(ri.p, ri.a, m);
      OP_CPX: ro.p = do_cmp(ri.p, ri.x, m);
      OP_CPY: ro.p = do_cmp(ri.p, ri.y, m);
      OP_BIT: begin
        ro.p[FZ] = ((ri.a & m) == 8'h00);
        ro.p[FN] = m[7];
        ro.p[FV] = m[6];
      end
      default: ;
    endcase
    return ro;
  endfunction

  // shift / rotate / increment / decrement of one byte; returns {p, value}
  function automatic logic [15:0] exec_rmw(logic [7:0] p, op_e op, logic [7:0] m);
    logic [7:0] v, q;
    q = p;
    case (op)
      OP_ASL: begin v = {m[6:0], 1'b0};  q[FC] = m[7]; end
      OP_LSR: begin v = {1'b0, m[7:1]};  q[FC] = m[0]; end
      OP_ROL: begin v = {m[6:0], p[FC]}; q[FC] = m[7]; end
      OP_ROR: begin v = {p[FC], m[7:1]}; q[FC] = m[0]; end
      OP_INC: v = m + 8'd1;
      OP_DEC: v = m - 8'd1;
      default: v = m;
    endcase
    q = nz(q, v);
    return {q, v};
  endfunction

  // implied and accumulator-mode operations
  function automatic regs_t exec_imp(regs_t ri, op_e op);
    regs_t ro;
    logic [15:0] sv;
    ro = ri;
    case (op)
      OP_ASL, OP_LSR, OP_ROL, OP_ROR: begin
        sv = exec_rmw(ri.p, op, ri.a);
        ro.p = sv[15:8];
        ro.a = sv[7:0];
      end
      OP_TAX: begin ro.x = ri.a; ro.p = nz(ri.p, ri.a); end
      OP_TAY: begin ro.y = ri.a; ro.p = nz(ri.p, ri.a); end
      OP_TXA: begin ro.a = ri.x; ro.p = nz(ri.p, ri.x); end
      OP_TYA: begin ro.a = ri.y; ro.p = nz(ri.p, ri.y); end
      OP_TSX: begin ro.x = ri.s; ro.p = nz(ri.p, ri.s); end
      OP_TXS: ro.s = ri.x;
      OP_INX: begin ro.x = ri.x + 8'd1; ro.p = nz(ri.p, ri.x + 8'd1); end
      OP_INY: begin ro.y = ri.y + 8'd1; ro.p = nz(ri.p, ri.y + 8'd1); end
      OP_DEX: begin ro.x = ri.x - 8'd1; ro.p = nz(ri.p, ri.x - 8'd1); end
      OP_DEY: begin ro.y = ri.y - 8'd1; ro.p = nz(ri.p, ri.y - 8'd1); end
      OP_CLC: ro.p[FC] = 1'b0;
      OP_SEC: ro.p[FC] = 1'b1;
      OP_CLI: ro.p[FI] = 1'b0;
      OP_SEI: ro.p[FI] = 1'b1;
      OP_CLV: ro.p[FV] = 1'b0;
      OP_CLD: ro.p[FD] = 1'b0;
      OP_SED: ro.p[FD] = 1'b1;
      default: ;
    endcase
    return ro;
  endfunction

  function automatic logic [7:0] store_val(logic [7:0] a, logic [7:0] x, logic [7:0] y, op_e op);
    case (op)
      OP_STX:  return x;
      OP_STY:  return y;
      default: return a;
    endcase
  endfunction

  function automatic logic branch_taken(logic [2:0] opc, logic [7:0] p);
    logic f;
    case (opc[2:1])
      2'd0: f = p[FN];
      2'd1: f = p[FV];
      2'd2: f = p[FC];
      default: f = p[FZ];
    endcase
    return f == opc[0];
  endfunction

  // ------------------------------------------------------ state machine ----
  logic irq_now;
  assign irq_now = nmi_pend || (!irq_n && !r.p[FI]);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st       <= S_RST0;
      r        <= '{a: 8'h00, x: 8'h00, y: 8'h00, s: 8'hFF, p: 8'h24};
      pc       <= 16'h0000;
      ir       <= 8'hEA;
      ad       <= 16'h0000;
      bal      <= 8'h00;
      dl       <= 8'h00;
      ixc      <= 1'b0;
      int_brk  <= 1'b0;
      nmi_take <= 1'b0;
      nmi_pend <= 1'b0;
      nmi_q    <= 1'b1;
      ddr      <= 8'h00;
      por      <= 8'h00;
      addr     <= VEC_RST;
      we       <= 1'b0;
      dout     <= 8'h00;
    end else if (ce) begin
      logic [8:0]  sum;
      logic [15:0] t16;
      logic [15:0] sv;
      regs_t       rn;

      // NMI is edge triggered
      nmi_q <= nmi_n;
      if (nmi_q && !nmi_n) nmi_pend <= 1'b1;

      // the on-chip port sees every write to $0000 / $0001
      if (we && addr == 16'h0000) ddr <= dout;
      if (we && addr == 16'h0001) por <= dout;

      we <= 1'b0;
      case (st)
        // ---- reset: pseudo JMP abs through $FFFC/$FFFD
        S_RST0:  begin addr <= VEC_RST; st <= S_RSTLO; end
        S_RSTLO: begin bal <= rd; addr <= VEC_RST + 16'd1; st <= S_RSTHI; end
        S_RSTHI: begin pc <= {rd, bal}; addr <= {rd, bal}; st <= S_FETCH; end

        // ---- opcode fetch
        S_FETCH: begin
          if (irq_now) begin
            ir       <= 8'h00;          // forced BRK, PC not advanced
            int_brk  <= 1'b1;
            addr     <= pc;
          end else begin
            ir       <= rd;
            int_brk  <= 1'b0;
            pc       <= pc + 16'd1;
            addr     <= pc + 16'd1;
          end
          st <= S_T1;
        end

        // ---- second cycle: operand byte 1 (or dummy read) at PC
        S_T1: begin
          case (d.mode)
            M_IMP: begin
              r <= exec_imp(r, d.op);
              addr <= pc; st <= S_FETCH;
            end
            M_IMM: begin
              r <= exec_read(r, d.op, rd);
              pc <= pc + 16'd1; addr <= pc + 16'd1; st <= S_FETCH;
            end
            M_ZP: begin
              pc <= pc + 16'd1;
              ad <= {8'h00, rd};
              addr <= {8'h00, rd};
              if (d.acc == ACC_WRITE) begin
                we <= 1'b1; dout <= store_val(r.a, r.x, r.y, d.op); st <= S_STORE;
              end else st <= S_READ;
            end
            M_ZPX, M_ZPY, M_INDX: begin
              pc <= pc + 16'd1; bal <= rd;
              addr <= {8'h00, rd};
              st <= (d.mode == M_INDX) ? S_INDX1 : S_ZPIDX;
            end
            M_INDY: begin
              pc <= pc + 16'd1; bal <= rd;
              addr <= {8'h00, rd}; st <= S_INDY1;
            end
            M_ABS, M_ABSX, M_ABSY, M_JMPABS, M_JMPIND: begin
              pc <= pc + 16'd1; bal <= rd;
              addr <= pc + 16'd1; st <= S_ABS2;
            end
            M_REL: begin
              pc <= pc + 16'd1;
              if (branch_taken(ir[7:5], r.p)) begin
                dl <= rd; addr <= pc + 16'd1; st <= S_BR1;
              end else begin
                addr <= pc + 16'd1; st <= S_FETCH;
              end
            end
            M_JSR: begin
              pc <= pc + 16'd1; bal <= rd;
              addr <= {8'h01, r.s}; st <= S_JSR1;
            end
            M_RTS: begin addr <= {8'h01, r.s}; st <= S_RTS1; end
            M_RTI: begin addr <= {8'h01, r.s}; st <= S_RTI1; end
            M_PUSH: begin
              addr <= {8'h01, r.s}; we <= 1'b1;
              dout <= (d.op == OP_PHA) ? r.a : (r.p | P_BU);
              st <= S_STORE;
            end
            M_PULL: begin addr <= {8'h01, r.s}; st <= S_RTS1; end
            M_BRK: begin
              t16 = int_brk ? pc : pc + 16'd1;
              pc <= t16;
              nmi_take <= nmi_pend;
              addr <= {8'h01, r.s}; we <= 1'b1; dout <= t16[15:8];
              st <= S_JSR2;
            end
            default: begin addr <= pc; st <= S_FETCH; end
          endcase
        end

        // ---- final access of a memory operand
        S_READ: begin
          if (d.acc == ACC_RMW) begin
            dl <= rd; we <= 1'b1; dout <= rd; addr <= ad; st <= S_RMW1;
          end else begin
            r <= exec_read(r, d.op, rd);
            addr <= pc; st <= S_FETCH;
          end
        end
        S_RMW1: begin
          sv = exec_rmw(r.p, d.op, dl);
          r.p <= sv[15:8];
          we <= 1'b1; dout <= sv[7:0]; addr <= ad; st <= S_RMW2;
        end
        S_RMW2: begin addr <= pc; st <= S_FETCH; end
        S_STORE: begin
          if (d.mode == M_PUSH) r.s <= r.s - 8'd1;
          addr <= pc; st <= S_FETCH;
        end

        // ---- zero page indexed: dummy read of the base, then add index
        S_ZPIDX: begin
          t16 = {8'h00, bal + ((d.mode == M_ZPY) ? r.y : r.x)};
          ad <= t16; addr <= t16;
          if (d.acc == ACC_WRITE) begin
            we <= 1'b1; dout <= store_val(r.a, r.x, r.y, d.op); st <= S_STORE;
          end else st <= S_READ;
        end

        // ---- absolute: high byte
        S_ABS2: begin
          pc <= pc + 16'd1;
          case (d.mode)
            M_JMPABS: begin pc <= {rd, bal}; addr <= {rd, bal}; st <= S_FETCH; end
            M_JMPIND: begin ad <= {rd, bal}; addr <= {rd, bal}; st <= S_IND1; end
            M_ABS: begin
              ad <= {rd, bal}; addr <= {rd, bal};
              if (d.acc == ACC_WRITE) begin
                we <= 1'b1; dout <= store_val(r.a, r.x, r.y, d.op); st <= S_STORE;
              end else st <= S_READ;
            end
            default: begin // ABSX / ABSY
              sum = {1'b0, bal} + {1'b0, (d.mode == M_ABSY) ? r.y : r.x};
              ixc <= sum[8];
              ad <= {rd, sum[7:0]}; addr <= {rd, sum[7:0]};
              st <= S_IDXFIX;
            end
          endcase
        end

        // ---- indexed access before the high byte is corrected
        S_IDXFIX: begin
          if (d.acc == ACC_READ && !ixc) begin
            r <= exec_read(r, d.op, rd);
            addr <= pc; st <= S_FETCH;
          end else begin
            t16 = ad + {7'd0, ixc, 8'd0};
            ad <= t16; addr <= t16;
            if (d.acc == ACC_WRITE) begin
              we <= 1'b1; dout <= store_val(r.a, r.x, r.y, d.op); st <= S_STORE;
            end else st <= S_READ;
          end
        end

        // ---- JMP (abs): pointer high byte does not carry into the page
        S_IND1: begin dl <= rd; addr <= {ad[15:8], ad[7:0] + 8'd1}; st <= S_IND2; end
        S_IND2: begin pc <= {rd, dl}; addr <= {rd, dl}; st <= S_FETCH; end

        // ---- (zp,X)
        S_INDX1: begin bal <= bal + r.x; addr <= {8'h00, bal + r.x}; st <= S_INDX2; end
        S_INDX2: begin dl <= rd; addr <= {8'h00, bal + 8'd1}; st <= S_INDX3; end
        S_INDX3: begin
          ad <= {rd, dl}; addr <= {rd, dl};
          if (d.acc == ACC_WRITE) begin
            we <= 1'b1; dout <= store_val(r.a, r.x, r.y, d.op); st <= S_STORE;
          end else st <= S_READ;
        end

        // ---- (zp),Y
        S_INDY1: begin dl <= rd; addr <= {8'h00, bal + 8'd1}; st <= S_INDY2; end
        S_INDY2: begin
          sum = {1'b0, dl} + {1'b0, r.y};
          ixc <= sum[8];
          ad <= {rd, sum[7:0]}; addr <= {rd, sum[7:0]};
          st <= S_IDXFIX;
        end

        // ---- taken branch
        S_BR1: begin
          t16 = pc + {{8{dl[7]}}, dl};
          if (t16[15:8] == pc[15:8]) begin
            pc <= t16; addr <= t16; st <= S_FETCH;
          end else begin
            ad <= t16; addr <= {pc[15:8], t16[7:0]}; st <= S_BR2;
          end
        end
        S_BR2: begin pc <= ad; addr <= ad; st <= S_FETCH; end

        // ---- JSR, and the push part of BRK / IRQ / NMI
        S_JSR1: begin
          we <= 1'b1; dout <= pc[15:8]; addr <= {8'h01, r.s}; st <= S_JSR2;
        end
        S_JSR2: begin
          r.s <= r.s - 8'd1;
          we <= 1'b1; dout <= pc[7:0]; addr <= {8'h01, r.s - 8'd1}; st <= S_JSR3;
        end
        S_JSR3: begin
          r.s <= r.s - 8'd1;
          if (d.mode == M_BRK) begin
            we <= 1'b1;
            dout <= r.p | (int_brk ? P_U : P_BU);
            addr <= {8'h01, r.s - 8'd1};
            st <= S_JSR4;
          end else begin
            addr <= pc; st <= S_JSR4;
          end
        end
        S_JSR4: begin
          if (d.mode == M_BRK) begin
            r.s <= r.s - 8'd1;
            r.p[FI] <= 1'b1;
            if (nmi_take) nmi_pend <= 1'b0;
            addr <= nmi_take ? VEC_NMI : VEC_IRQ;
            st <= S_RTI3;
          end else begin
            pc <= {rd, bal}; addr <= {rd, bal}; st <= S_FETCH;
          end
        end

        // ---- RTS and PLA / PLP
        S_RTS1: begin
          r.s <= r.s + 8'd1; addr <= {8'h01, r.s + 8'd1};
          st <= (d.mode == M_PULL) ? S_RTI2 : S_RTS2;
        end
        S_RTS2: begin
          dl <= rd; r.s <= r.s + 8'd1; addr <= {8'h01, r.s + 8'd1}; st <= S_RTS3;
        end
        S_RTS3: begin
          pc <= {rd, dl}; addr <= {rd, dl};
          st <= (d.mode == M_RTI) ? S_FETCH : S_RTS4;
        end
        S_RTS4: begin pc <= pc + 16'd1; addr <= pc + 16'd1; st <= S_FETCH; end

        // ---- RTI (also last step of PLA / PLP and the vector read of BRK)
        S_RTI1: begin
          r.s <= r.s + 8'd1; addr <= {8'h01, r.s + 8'd1}; st <= S_RTI2;
        end
        S_RTI2: begin
          if (d.mode == M_PULL) begin
            rn = r;
            if (d.op == OP_PLA) begin rn.a = rd; rn.p = nz(r.p, rd); end
            else rn.p = rd & ~P_BU | (r.p & P_BU);
            r <= rn;
            addr <= pc; st <= S_FETCH;
          end else begin
            r.p <= (rd & ~P_BU) | (r.p & P_BU);
            r.s <= r.s + 8'd1; addr <= {8'h01, r.s + 8'd1};
            st <= S_RTS2;   // pull PCL, PCH
          end
        end
        S_RTI3: begin  // BRK: low vector byte read, then high byte
          if (addr[0] == 1'b0) begin
            dl <= rd; addr <= addr + 16'd1;
          end else begin
            pc <= {rd, dl}; addr <= {rd, dl}; st <= S_FETCH;
          end
        end
        default: begin addr <= pc; st <= S_FETCH; end
      endcase
    end
  end

endmodule
