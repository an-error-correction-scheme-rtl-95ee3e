// cfg_mem: configuration memory of one cell.
//
// A CFG_W-bit register (the source description realises configuration memory as a
// register file) that programs the PE and the wiring resource of the cell.
// It is written in one cycle when we is high, which the array controller
// does for every cell before every exec (configuration reload, which also
// scrubs any upset bit).
//
// seu_en / seu_bit model a single-event upset: the addressed bit is inverted
// and stays wrong until the next reload. That port exists so that the error
// handling can be exercised; tie seu_en low in a product. A write wins over
// an upset in the same cycle. Reset clears the register: all multiplexers
// then pick the local PE output or 0. The register also starts at that
// value (a power-up value, as an FPGA register has): an arbitrary power-up
// configuration can close a combinational loop through the wiring with no
// register in it, which oscillates until the asynchronous reset is applied.
module cfg_mem #(
  parameter int unsigned CFG_W = 84,
  localparam int unsigned BIT_W = (CFG_W > 1) ? $clog2(CFG_W) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             we,
  input  logic [CFG_W-1:0] wdata,
  input  logic             seu_en,
  input  logic [BIT_W-1:0] seu_bit,
  output logic [CFG_W-1:0] q
);
  logic [CFG_W-1:0] r = '0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      r <= '0;
    else if (we)     r <= wdata;
    else if (seu_en) r <= r ^ (CFG_W'(1) << seu_bit);
  end

  assign q = r;
endmodule
