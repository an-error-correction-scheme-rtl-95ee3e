// data_memory: data memory of the CGRA (Fig. 5): primary input memory,
// output buffer and memory controller.
//
// The input memory holds the N primary input words of a block, loaded once
// and read again by every exec. The output buffer holds the N results. With
// the immediate-termination scheme one buffer is enough: the comparing exec
// is never stored, and the verifying exec overwrites the buffer only from
// the first mismatch onwards. Both memories are DEPTH words of DATA_W bits
// (the source description evaluates 1024 and 65536 buffer words; 1024 is the default
// here). The interface is that of mem_ctrl, which see.
module data_memory
  import trit_pkg::*;
#(
  parameter int unsigned DATA_W = 16,
  parameter int unsigned DEPTH  = 1024,
  parameter int unsigned COLS   = 4,
  parameter int unsigned LAT_W  = 8,
  localparam int unsigned AW    = (DEPTH > 1) ? $clog2(DEPTH) : 1,
  localparam int unsigned NW    = $clog2(DEPTH + 1),
  localparam int unsigned CW    = (COLS > 1) ? $clog2(COLS) : 1
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        cmd_valid,
  input  mc_cmd_e                     cmd,
  input  exec_mode_e                  mode,
  input  logic [NW-1:0]               n_words,
  input  logic [LAT_W-1:0]            lat,
  input  logic [CW-1:0]               out_col,
  input  logic [AW-1:0]               x_in,
  output logic                        done,
  output logic                        mismatch,
  output logic [AW-1:0]               x_out,
  output logic                        primary_ok,
  input  logic                        in_valid,
  input  logic [DATA_W-1:0]           in_data,
  output logic                        in_ready,
  output logic                        out_valid,
  output logic [DATA_W-1:0]           out_data,
  output logic                        out_last,
  output logic [COLS-1:0][DATA_W-1:0] arr_in_data,
  output logic [COLS-1:0]             arr_in_flag,
  input  logic [COLS-1:0][DATA_W-1:0] arr_out_data
);
  logic              im_we, im_re, bf_we, bf_re;
  logic [AW-1:0]     im_waddr, im_raddr, bf_waddr, bf_raddr;
  logic [DATA_W-1:0] im_wdata, im_rdata, bf_wdata, bf_rdata;

  mem_ctrl #(.DATA_W(DATA_W), .DEPTH(DEPTH), .COLS(COLS), .LAT_W(LAT_W)) u_ctrl (
    .clk, .rst_n, .cmd_valid, .cmd, .mode, .n_words, .lat, .out_col, .x_in,
    .done, .mismatch, .x_out, .primary_ok,
    .in_valid, .in_data, .in_ready, .out_valid, .out_data, .out_last,
    .arr_in_data, .arr_in_flag, .arr_out_data,
    .im_we, .im_waddr, .im_wdata, .im_re, .im_raddr, .im_rdata,
    .bf_we, .bf_waddr, .bf_wdata, .bf_re, .bf_raddr, .bf_rdata);

  sram_1r1w #(.WIDTH(DATA_W), .DEPTH(DEPTH)) u_imem (
    .clk, .we(im_we), .waddr(im_waddr), .wdata(im_wdata),
    .re(im_re), .raddr(im_raddr), .rdata(im_rdata));

  sram_1r1w #(.WIDTH(DATA_W), .DEPTH(DEPTH)) u_buf (
    .clk, .we(bf_we), .waddr(bf_waddr), .wdata(bf_wdata),
    .re(bf_re), .raddr(bf_raddr), .rdata(bf_rdata));
endmodule
