// trit_cgra: coarse-grained reconfigurable array with time redundancy by
// immediate termination (TRIT).
//
// A ROWS x COLS array of ALU and MULT cells processes a block of N input
// words into N output words, one per cycle. To tolerate soft errors the
// block is run more than once on the same hardware, with the configuration
// reloaded (and every PE register cleared) before each run:
//   primary exec    results go to the single output buffer;
//   comparing exec  results are compared with the buffer; the run stops at
//                   the first mismatch X;
//   verifying exec  only after a mismatch: runs up to X; if its output X
//                   equals the buffer the primary run was right and it stops
//                   there, otherwise the comparing run was right and the
//                   verifying exec overwrites the buffer from X to N-1.
// The buffer is then streamed out. Under the assumption that errors are
// rare and mostly persistent (an upset configuration bit stays wrong until
// the next reload), one comparison at X decides which run to trust.
//
// External interface:
//   cfg_we/cfg_waddr/cfg_wdata  write the master configuration of one cell
//                               (only while busy is low);
//   start, n_words, lat, out_col start one block; lat is the latency of the
//                               mapped application from array input to
//                               output, out_col the column whose north exit
//                               carries the result;
//   in_valid/in_data/in_ready   the N primary input words;
//   out_valid/out_data/out_last the N results;
//   busy, blk_done, result, x_addr, phase  status.
//   seu_en/seu_cell/seu_bit     invert one configuration bit (upset model);
//   set_en                      invert bit 0 of every array output word in
//                               this cycle (transient model).
// The last two exist to exercise the error handling; tie them low in use.
//
// Default sizes: 4x4 cells, 16-bit words, track 1, hop (1, 2), 1024-word
// buffer, the configuration the source description uses for its area comparison.
module trit_cgra
  import trit_pkg::*;
#(
  parameter int unsigned ROWS    = 4,
  parameter int unsigned COLS    = 4,
  parameter int unsigned DATA_W  = 16,
  parameter int unsigned TRACK   = 1,
  parameter int unsigned MAX_HOP = 2,
  parameter int unsigned DEPTH   = 1024,
  parameter int unsigned LAT_W   = 8,
  localparam int unsigned NCELL  = ROWS * COLS,
  localparam int unsigned KW     = (NCELL > 1) ? $clog2(NCELL) : 1,
  localparam int unsigned CFG_W  = cell_cfg_w(DATA_W, TRACK),
  localparam int unsigned BIT_W  = $clog2(CFG_W),
  localparam int unsigned AW     = (DEPTH > 1) ? $clog2(DEPTH) : 1,
  localparam int unsigned NW     = $clog2(DEPTH + 1),
  localparam int unsigned CW     = (COLS > 1) ? $clog2(COLS) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              cfg_we,
  input  logic [KW-1:0]     cfg_waddr,
  input  logic [CFG_W-1:0]  cfg_wdata,
  input  logic              start,
  input  logic [NW-1:0]     n_words,
  input  logic [LAT_W-1:0]  lat,
  input  logic [CW-1:0]     out_col,
  output logic              busy,
  output logic              blk_done,
  output result_e           result,
  output logic [AW-1:0]     x_addr,
  output phase_e            phase,
  input  logic              in_valid,
  input  logic [DATA_W-1:0] in_data,
  output logic              in_ready,
  output logic              out_valid,
  output logic [DATA_W-1:0] out_data,
  output logic              out_last,
  input  logic              seu_en,
  input  logic [KW-1:0]     seu_cell,
  input  logic [BIT_W-1:0]  seu_bit,
  input  logic              set_en
);
  logic                        mc_valid, mc_done, mc_mismatch, mc_primary_ok;
  mc_cmd_e                     mc_cmd;
  exec_mode_e                  mc_mode;
  logic [NW-1:0]               mc_n;
  logic [LAT_W-1:0]            mc_lat;
  logic [CW-1:0]               mc_col;
  logic [AW-1:0]               mc_x, mc_x_out;
  logic [KW-1:0]               rl_addr;
  logic                        rl_we, arr_clr;
  logic [CFG_W-1:0]            rl_data;
  logic [COLS-1:0][DATA_W-1:0] a_in_d, a_out_d, a_out_seen;
  logic [COLS-1:0]             a_in_f, a_out_f;

  array_ctrl #(.NCELL(NCELL), .DEPTH(DEPTH), .COLS(COLS), .LAT_W(LAT_W)) u_actrl (
    .clk, .rst_n, .start, .n_words, .lat, .out_col,
    .busy, .blk_done, .result, .x_addr, .phase,
    .mc_valid, .mc_cmd, .mc_mode, .mc_n, .mc_lat, .mc_col, .mc_x,
    .mc_done, .mc_mismatch, .mc_x_out, .mc_primary_ok,
    .cfg_addr(rl_addr), .cfg_we(rl_we), .arr_clr);

  cfg_store #(.CFG_W(CFG_W), .NCELL(NCELL)) u_cstore (
    .clk, .we(cfg_we && !busy), .waddr(cfg_waddr), .wdata(cfg_wdata),
    .raddr(rl_addr), .rdata(rl_data));

  cell_array #(.ROWS(ROWS), .COLS(COLS), .DATA_W(DATA_W), .TRACK(TRACK),
               .MAX_HOP(MAX_HOP)) u_array (
    .clk, .rst_n, .clr(arr_clr),
    .cfg_we(rl_we), .cfg_addr(rl_addr), .cfg_wdata(rl_data),
    .seu_en, .seu_cell, .seu_bit,
    .ext_in_data(a_in_d), .ext_in_flag(a_in_f),
    .ext_out_data(a_out_d), .ext_out_flag(a_out_f));

  // Transient-error model on the array outputs.
  always_comb begin
    for (int unsigned c = 0; c < COLS; c++)
      a_out_seen[c] = a_out_d[c] ^ DATA_W'(set_en);
  end

  data_memory #(.DATA_W(DATA_W), .DEPTH(DEPTH), .COLS(COLS), .LAT_W(LAT_W)) u_dmem (
    .clk, .rst_n,
    .cmd_valid(mc_valid), .cmd(mc_cmd), .mode(mc_mode), .n_words(mc_n),
    .lat(mc_lat), .out_col(mc_col), .x_in(mc_x),
    .done(mc_done), .mismatch(mc_mismatch), .x_out(mc_x_out), .primary_ok(mc_primary_ok),
    .in_valid, .in_data, .in_ready, .out_valid, .out_data, .out_last,
    .arr_in_data(a_in_d), .arr_in_flag(a_in_f), .arr_out_data(a_out_seen));
endmodule
