// array_cell: one cell of the array: configuration memory, wiring resource and PE
// (Fig. 5).
//
// The configuration word is {i_const, pe_cfg_t, wiring selects} (layout in
// trit_pkg). The wiring resource takes the wires arriving from the four
// sides and the PE output, feeds the PE and drives the outgoing wires.
// IS_MULT selects a MULT cell (multiplier) instead of an ALU cell.
//
// Timing: configuration writes take effect the cycle after cfg_we. Paths
// from arriving wires through the multiplexers to outgoing wires are
// combinational; the PE adds the registers its configuration selects.
module array_cell
  import trit_pkg::*;
#(
  parameter int unsigned DATA_W  = 16,
  parameter int unsigned TRACK   = 1,
  parameter int unsigned MAX_HOP = 2,
  parameter bit          IS_MULT = 1'b0,
  localparam int unsigned CFG_W  = cell_cfg_w(DATA_W, TRACK),
  localparam int unsigned BIT_W  = $clog2(CFG_W)
) (
  input  logic                                           clk,
  input  logic                                           rst_n,
  input  logic                                           clr,
  input  logic                                           cfg_we,
  input  logic [CFG_W-1:0]                               cfg_wdata,
  input  logic                                           seu_en,
  input  logic [BIT_W-1:0]                               seu_bit,
  input  logic [3:0][MAX_HOP-1:0][TRACK-1:0][DATA_W-1:0] in_w,
  input  logic [3:0][MAX_HOP-1:0][TRACK-1:0]             in_f,
  output logic [3:0][TRACK-1:0][DATA_W-1:0]              out_w,
  output logic [3:0][TRACK-1:0]                          out_f
);
  localparam int unsigned WC_W = wcfg_w(TRACK);

  logic [CFG_W-1:0]  q;
  logic [WC_W-1:0]   wcfg;
  pe_cfg_t           pcfg;
  logic [DATA_W-1:0] cst;
  logic [DATA_W-1:0] pe_a, pe_b, pe_y;
  logic              pe_fa, pe_fy;

  assign {cst, pcfg, wcfg} = q;

  cfg_mem #(.CFG_W(CFG_W)) u_cfg (
    .clk, .rst_n, .we(cfg_we), .wdata(cfg_wdata),
    .seu_en, .seu_bit, .q);

  wiring #(.DATA_W(DATA_W), .TRACK(TRACK), .MAX_HOP(MAX_HOP)) u_wr (
    .cfg(wcfg), .in_w, .in_f, .pe_data(pe_y), .pe_flag(pe_fy),
    .out_w, .out_f, .pe_a, .pe_b, .pe_fa);

  pe #(.DATA_W(DATA_W), .IS_MULT(IS_MULT)) u_pe (
    .clk, .rst_n, .clr, .cfg(pcfg), .i_const(cst),
    .i_data_a(pe_a), .i_data_b(pe_b), .i_flag_a(pe_fa),
    .o_data(pe_y), .o_flag(pe_fy));
endmodule
