// tb_bank_decode: checks the bank decoder against the nine-column LHGE
// memory-configuration table, written here as data: each LHGE value is
// matched against the column headers (X = don't care), and the column gives
// the device of every 4 KB region. All 16 LHGE values, both CHAREN values,
// reads and writes, and the VIC view are checked at several addresses.
module tb_bank_decode;
  import c64_pkg::*;
  logic [15:0] addr;
  logic we, vic, loram, hiram, charen, game, exrom;
  cs_e cs;
  int checks = 0, failures = 0;

  bank_decode dut (.*);

  // column headers, L H G E; 2 = don't care
  int hdr [9][4] = '{'{1,1,1,1}, '{1,0,1,2}, '{1,0,0,0}, '{0,1,1,2}, '{0,0,1,2},
                     '{1,1,1,0}, '{0,1,0,0}, '{1,1,0,0}, '{2,2,0,1}};
  // "00X0" is a second header of column 4 (all RAM)
  int hdr2 [4] = '{0,0,2,0};
  // region contents: 0 RAM, 1 KERNAL, 2 IO/C, 3 IO/RAM, 4 BASIC, 5 ROML, 6 ROMH, 7 open, 8 I/O
  // index: [col][region] with region 0:$E000-$FFFF 1:$D000 2:$C000 3:$A000 4:$8000 5:$1000-$7FFF 6:$0000
  int col [9][7] = '{'{1,2,0,4,0,0,0}, '{0,2,0,0,0,0,0}, '{0,3,0,0,0,0,0}, '{1,2,0,0,0,0,0},
                     '{0,0,0,0,0,0,0}, '{1,2,0,4,5,0,0}, '{1,2,0,6,0,0,0}, '{1,2,0,6,5,0,0},
                     '{6,8,7,7,5,7,0}};

  function automatic bit hmatch(int h [4], int v [4]);
    for (int i = 0; i < 4; i++) if (h[i] != 2 && h[i] != v[i]) return 0;
    return 1;
  endfunction

  function automatic int region(logic [15:0] a);
    case (a[15:12])
      4'hE, 4'hF: return 0;
      4'hD: return 1;
      4'hC: return 2;
      4'hA, 4'hB: return 3;
      4'h8, 4'h9: return 4;
      4'h0: return 6;
      default: return 5;
    endcase
  endfunction

  function automatic cs_e io_exp(logic [15:0] a);
    if (a < 16'hD400) return CS_VIC;
    if (a < 16'hD800) return CS_SID;
    if (a < 16'hDC00) return CS_COLOR;
    if (a < 16'hDD00) return CS_CIA1;
    if (a < 16'hDE00) return CS_CIA2;
    if (a < 16'hDF00) return CS_IO1;
    return CS_IO2;
  endfunction

  logic [15:0] probes [12] = '{16'h0000, 16'h0801, 16'h5000, 16'h8000, 16'h9FFF, 16'hA123,
                              16'hC000, 16'hD020, 16'hD418, 16'hD800, 16'hDC01, 16'hFFFE};

  initial begin
    for (int lhge = 0; lhge < 16; lhge++)
      for (int ch = 0; ch < 2; ch++)
        for (int p = 0; p < 12; p++)
          for (int w = 0; w < 2; w++) begin
            int v [4];
            int c, content;
            cs_e exp;
            v = '{(lhge >> 3) & 1, (lhge >> 2) & 1, (lhge >> 1) & 1, lhge & 1};
            c = -1;
            for (int k = 0; k < 9; k++) if (c < 0 && hmatch(hdr[k], v)) c = k;
            if (c < 0 && hmatch(hdr2, v)) c = 4;
            addr = probes[p];
            content = col[c][region(addr)];
            case (content)
              0: exp = CS_RAM;
              1: exp = CS_KERNAL;
              2: exp = ch ? io_exp(addr) : CS_CHAR;
              3: exp = ch ? io_exp(addr) : CS_RAM;
              4: exp = CS_BASIC;
              5: exp = CS_ROML;
              6: exp = CS_ROMH;
              7: exp = CS_NONE;
              default: exp = io_exp(addr);
            endcase
            if (w && exp inside {CS_KERNAL, CS_BASIC, CS_CHAR, CS_ROML, CS_ROMH})
              exp = (c == 8) ? CS_NONE : CS_RAM;
            {loram, hiram, game, exrom} = 4'(lhge);
            charen = 1'(ch); we = 1'(w); vic = 0;
            #1;
            checks++;
            if (cs !== exp) begin
              failures++;
              $display("FAIL LHGE=%04b C=%0d we=%0d addr=%04h: %s expected %s", 4'(lhge), ch, w, addr, cs.name(), exp.name());
            end
          end
    // VIC view
    {loram, hiram, game, exrom, charen, we, vic} = 7'b1111101;
    foreach (probes[p]) begin
      addr = probes[p]; #1; checks++;
      if (cs !== ((addr[14:12] == 3'b001) ? CS_CHAR : CS_RAM)) begin
        failures++; $display("FAIL VIC %04h", addr);
      end
    end
    addr = 16'h1400; #1; checks++; if (cs !== CS_CHAR) begin failures++; $display("FAIL VIC char 1400"); end
    addr = 16'h9C00; #1; checks++; if (cs !== CS_CHAR) begin failures++; $display("FAIL VIC char 9C00"); end
    addr = 16'hD000; #1; checks++; if (cs !== CS_RAM)  begin failures++; $display("FAIL VIC D000"); end
    {game, exrom} = 2'b01;
    addr = 16'h3800; #1; checks++; if (cs !== CS_ROMH) begin failures++; $display("FAIL VIC ultimax 3800"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
