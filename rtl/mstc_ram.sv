// mstc_ram: single-port synchronous RAM, one memory bank.
//
// One access per clock: a write when `we` is high, otherwise a read whose
// data appears on `rdata` on the next cycle (read latency 1). Single-port
// banks are what the slice architecture is built around: the interleaver
// guarantees that the P slice processors never need two words of the same
// bank in one cycle. Contents are not reset.
module mstc_ram #(
  parameter int unsigned W     = 8,
  parameter int unsigned DEPTH = 256
) (
  input  logic                     clk,
  input  logic                     en,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] addr,
  input  logic [W-1:0]             wdata,
  output logic [W-1:0]             rdata
);
  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (en) begin
      if (we) mem[addr] <= wdata;
      else    rdata     <= mem[addr];
    end
  end
endmodule
