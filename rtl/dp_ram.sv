// dp_ram: true dual-ported synchronous RAM, the block-RAM building block of
// the machine. Used for the 64 KB main RAM (8-bit words) and for the colour
// RAM (1K x 4 bits, i.e. 0.5 KB).
//
// Each port writes `wdata` at `addr` when `we` is high and returns the word
// stored at `addr` one clock later on `q` (read-before-write on the same
// port). Both ports share one clock. Writing the same word from both ports
// in the same cycle leaves port B's value.
module dp_ram #(
  parameter int unsigned AW = 16,
  parameter int unsigned DW = 8
) (
  input  logic          clk,
  input  logic [AW-1:0] a_addr,
  input  logic          a_we,
  input  logic [DW-1:0] a_wdata,
  output logic [DW-1:0] a_q,
  input  logic [AW-1:0] b_addr,
  input  logic          b_we,
  input  logic [DW-1:0] b_wdata,
  output logic [DW-1:0] b_q
);

  logic [DW-1:0] mem [2**AW];

  always_ff @(posedge clk) begin
    a_q <= mem[a_addr];
    b_q <= mem[b_addr];
    if (a_we) mem[a_addr] <= a_wdata;
    if (b_we) mem[b_addr] <= b_wdata;
  end

endmodule
