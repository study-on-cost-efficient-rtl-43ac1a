// spram -- single-port synchronous RAM, the building block of the Ping
// memory, the Pong memory and the Common Bar.
//
// One access per clock: with en=1 and we=1 the word wdata is written at addr;
// with en=1 and we=0 the word at addr appears on rdata after the next rising
// edge (one cycle of read latency).  rdata holds its value while en=0.  Being
// single-ported is the point of the design: the surrounding control must never
// ask for a read and a write of the same array in one cycle.
//
// The contents are not reset (as in an SRAM macro); rdata is reset to zero.
module spram #(
  parameter int DEPTH = 7680,              // (M-P)*N words for the main geometry
  parameter int WIDTH = 16,
  parameter int AW    = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,
  input  logic             we,
  input  logic [AW-1:0]    addr,
  input  logic [WIDTH-1:0] wdata,
  output logic [WIDTH-1:0] rdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (en && we) mem[addr] <= wdata;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)          rdata <= '0;
    else if (en && !we)  rdata <= mem[addr];
  end

endmodule
