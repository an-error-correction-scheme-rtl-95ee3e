// cfg_store: master copy of the array configuration.
//
// Holds one configuration word per cell. The external system writes it
// while the array is idle (we, waddr, wdata). The array controller reads it
// word by word, combinationally (raddr -> rdata in the same cycle), to
// reload every cell's configuration memory before each exec. Reloading from
// this copy is what removes an upset configuration bit between runs. The source
// description requires the reload but does not say where the reloaded data
// comes from; a store next to the array controller is this design's choice.
module cfg_store #(
  parameter int unsigned CFG_W = 84,
  parameter int unsigned NCELL = 16,
  localparam int unsigned AW   = (NCELL > 1) ? $clog2(NCELL) : 1
) (
  input  logic             clk,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [CFG_W-1:0] wdata,
  input  logic [AW-1:0]    raddr,
  output logic [CFG_W-1:0] rdata
);
  logic [CFG_W-1:0] mem [NCELL];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  assign rdata = mem[raddr];
endmodule
