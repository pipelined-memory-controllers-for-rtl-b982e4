// mem_bank: one memory bank, a single-port synchronous RAM.
// A cycle with en=1 either writes wdata at addr (we=1) or reads addr (we=0);
// read data appears on rdata in the next cycle and is held until the next read.
// The document shows each bank with an address, an R/W command and a data port
// only; the one-cycle latency, the size and the reset-free array are this
// design's choices.
module mem_bank #(
  parameter int DEPTH = 4096,
  parameter int WIDTH = 16
) (
  input  logic                     clk,
  input  logic                     en,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] addr,
  input  logic [WIDTH-1:0]         wdata,
  output logic [WIDTH-1:0]         rdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (en) begin
      if (we) mem[addr] <= wdata;
      else    rdata     <= mem[addr];
    end
  end

endmodule
