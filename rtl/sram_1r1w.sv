// sram_1r1w: word memory with one write port and one synchronous read port.
//
// Used for the output buffer and for the primary input memory of the data
// memory (the source description realises the buffer as an SRAM). A write happens at
// the clock edge where we is high. A read issued with re at one edge
// presents mem[raddr] on rdata after that edge and holds it until the next
// read. A read and a write of the same address in the same cycle return the
// old word. Contents are not reset.
module sram_1r1w #(
  parameter int unsigned WIDTH  = 16,
  parameter int unsigned DEPTH  = 1024,
  localparam int unsigned AW    = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [WIDTH-1:0] wdata,
  input  logic             re,
  input  logic [AW-1:0]    raddr,
  output logic [WIDTH-1:0] rdata
);
  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    if (re) rdata <= mem[raddr];
  end
endmodule
