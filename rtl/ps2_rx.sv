// ps2_rx: PS/2 keyboard receiver.
//
// The keyboard drives two open-collector lines: a clock it derives itself
// (10-17 kHz) and data. Both are brought into the system clock domain by a
// two-flop synchroniser and then filtered: a line only changes state after
// FILTER consecutive equal samples, which removes glitches and jitter. On
// each falling edge of the filtered clock one data bit is taken. A frame is a
// start bit (0), eight data bits LSB first and an odd parity bit; once those
// nine bits after the start bit are in, the parity is checked and, if it is
// good, `ready` pulses for one clock with the byte on `scancode`; a bad
// parity pulses `parity_err` instead. The stop bit (1) is ignored, since only
// a 0 starts a frame. If the clock stays high for TIMEOUT clocks in the
// middle of a frame the receiver drops the frame and waits for a new start
// bit (a choice of this design).
module ps2_rx #(
  parameter int unsigned FILTER  = 8,
  parameter int unsigned TIMEOUT = 65536
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       ps2_clk,
  input  logic       ps2_data,
  output logic       ready,
  output logic [7:0] scancode,
  output logic       parity_err
);

  logic [1:0] clk_sync, dat_sync;
  logic [$clog2(FILTER+1)-1:0] clk_cnt, dat_cnt;
  logic       clk_f, dat_f, clk_f_q;
  logic       busy;
  logic [3:0] nbits;
  logic [7:0] shreg;
  logic [$clog2(TIMEOUT+1)-1:0] idle;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      clk_sync <= 2'b11; dat_sync <= 2'b11;
      clk_cnt  <= '0;    dat_cnt  <= '0;
      clk_f    <= 1'b1;  dat_f    <= 1'b1; clk_f_q <= 1'b1;
    end else begin
      clk_sync <= {clk_sync[0], ps2_clk};
      dat_sync <= {dat_sync[0], ps2_data};
      // glitch filter: follow the input only after FILTER equal samples
      if (clk_sync[1] == clk_f) clk_cnt <= '0;
      else if (clk_cnt == $bits(clk_cnt)'(FILTER - 1)) begin clk_f <= clk_sync[1]; clk_cnt <= '0; end
      else clk_cnt <= clk_cnt + 1'b1;
      if (dat_sync[1] == dat_f) dat_cnt <= '0;
      else if (dat_cnt == $bits(dat_cnt)'(FILTER - 1)) begin dat_f <= dat_sync[1]; dat_cnt <= '0; end
      else dat_cnt <= dat_cnt + 1'b1;
      clk_f_q <= clk_f;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0; nbits <= '0; shreg <= '0; idle <= '0;
      ready <= 1'b0; parity_err <= 1'b0; scancode <= '0;
    end else begin
      ready      <= 1'b0;
      parity_err <= 1'b0;
      if (clk_f_q && !clk_f) begin          // falling edge of the PS/2 clock
        idle <= '0;
        if (!busy) begin
          if (!dat_f) begin busy <= 1'b1; nbits <= '0; end   // start bit
        end else begin
          shreg <= {dat_f, shreg[7:1]};
          nbits <= nbits + 4'd1;
          if (nbits == 4'd8) begin
            busy <= 1'b0;
            if (^{dat_f, shreg}) begin ready <= 1'b1; scancode <= shreg; end
            else parity_err <= 1'b1;
          end
        end
      end else if (busy) begin
        if (idle == $bits(idle)'(TIMEOUT - 1)) begin busy <= 1'b0; idle <= '0; end
        else idle <= idle + 1'b1;
      end
    end
  end

endmodule
