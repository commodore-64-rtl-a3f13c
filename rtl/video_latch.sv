// video_latch: hands the VIC's pixel stream to the frame buffer.
//
// The VIC produces a new pixel only every few clocks, while the frame buffer
// takes one every clock. On each `pix_valid` strobe this block latches the
// pixel's 4-bit colour index and the horizontal and vertical syncs, and
// holds them until the next strobe. The index is turned into 8-bit R, G and
// B through the 16-entry C64 palette; the palette values are the commonly
// used measurements of the original chip, not part of the chip description.
// `new_pix` marks the first clock of each held pixel. One clock of latency.
module video_latch (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       pix_valid,
  input  logic [3:0] pix_color,
  input  logic       hsync_in,
  input  logic       vsync_in,
  output logic [7:0] red,
  output logic [7:0] green,
  output logic [7:0] blue,
  output logic       hsync,
  output logic       vsync,
  output logic       new_pix
);

  function automatic logic [23:0] palette(logic [3:0] c);
    case (c)
      4'h0: return 24'h000000;  // black
      4'h1: return 24'hFFFFFF;  // white
      4'h2: return 24'h68372B;  // red
      4'h3: return 24'h70A4B2;  // cyan
      4'h4: return 24'h6F3D86;  // purple
      4'h5: return 24'h588D43;  // green
      4'h6: return 24'h352879;  // blue
      4'h7: return 24'hB8C76F;  // yellow
      4'h8: return 24'h6F4F25;  // orange
      4'h9: return 24'h433900;  // brown
      4'hA: return 24'h9A6759;  // light red
      4'hB: return 24'h444444;  // dark grey
      4'hC: return 24'h6C6C6C;  // grey
      4'hD: return 24'h9AD284;  // light green
      4'hE: return 24'h6C5EB5;  // light blue
      default: return 24'h959595; // light grey
    endcase
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      {red, green, blue} <= '0;
      hsync <= 1'b0; vsync <= 1'b0; new_pix <= 1'b0;
    end else begin
      new_pix <= pix_valid;
      if (pix_valid) begin
        {red, green, blue} <= palette(pix_color);
        hsync <= hsync_in;
        vsync <= vsync_in;
      end
    end
  end

endmodule
