// cell_array: ROWS x COLS array of ALU and MULT cells (Fig. 5, Fig. 8).
//
// Cell (r, c) has index r*COLS + c. Bit k of MULT_MASK makes cell k a MULT
// cell; the default is a checkerboard with MULT cells where r + c is odd.
// The source description gives the two cell kinds but not their placement, so the
// checkerboard is this design's choice.
//
// Interconnect: the wire that cell (r, c) drives towards side n is received
// by the cells 1..MAX_HOP positions away in that direction, on the same
// track. Wires that would arrive from beyond the north edge carry the input
// stream (ext_in_data / ext_in_flag of that column); those from beyond the
// other edges are 0. The wires that row 0 drives northwards on track 0 leave
// the array as ext_out_data / ext_out_flag, one per column; the data memory
// picks its output stream among them. Attaching the data memory to the
// north edge follows the drawing of the architecture overview; which wires
// it uses is this design's choice.
//
// Configuration: cfg_we writes cfg_wdata into cell cfg_addr. seu_en inverts
// bit seu_bit of cell seu_cell (upset model, see cfg_mem). clr clears every
// PE register; the controller holds it during each reload.
//
// Routing paths are combinational, so an array configuration may close a
// loop without a register; a correct configuration does not, and the
// structural loops that lint tools report through the multiplexer mesh are
// inherent in a reconfigurable array.
module cell_array
  import trit_pkg::*;
#(
  parameter int unsigned      ROWS      = 4,
  parameter int unsigned      COLS      = 4,
  parameter int unsigned      DATA_W    = 16,
  parameter int unsigned      TRACK     = 1,
  parameter int unsigned      MAX_HOP   = 2,
  parameter logic [ROWS*COLS-1:0] MULT_MASK = (ROWS*COLS)'(checkerboard(ROWS, COLS)),
  localparam int unsigned     NCELL     = ROWS * COLS,
  localparam int unsigned     CADDR_W   = (NCELL > 1) ? $clog2(NCELL) : 1,
  localparam int unsigned     CFG_W     = cell_cfg_w(DATA_W, TRACK),
  localparam int unsigned     BIT_W     = $clog2(CFG_W)
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        clr,
  input  logic                        cfg_we,
  input  logic [CADDR_W-1:0]          cfg_addr,
  input  logic [CFG_W-1:0]            cfg_wdata,
  input  logic                        seu_en,
  input  logic [CADDR_W-1:0]          seu_cell,
  input  logic [BIT_W-1:0]            seu_bit,
  input  logic [COLS-1:0][DATA_W-1:0] ext_in_data,
  input  logic [COLS-1:0]             ext_in_flag,
  output logic [COLS-1:0][DATA_W-1:0] ext_out_data,
  output logic [COLS-1:0]             ext_out_flag
);
  typedef logic [3:0][MAX_HOP-1:0][TRACK-1:0][DATA_W-1:0] win_t;
  typedef logic [3:0][MAX_HOP-1:0][TRACK-1:0]             fin_t;
  typedef logic [3:0][TRACK-1:0][DATA_W-1:0]              wout_t;
  typedef logic [3:0][TRACK-1:0]                          fout_t;

  win_t  in_w  [ROWS][COLS];
  fin_t  in_f  [ROWS][COLS];
  wout_t out_w [ROWS][COLS];
  fout_t out_f [ROWS][COLS];

  for (genvar r = 0; r < ROWS; r++) begin : g_row
    for (genvar c = 0; c < COLS; c++) begin : g_col
      localparam int unsigned K = r*COLS + c;

      // Arriving wires. Side N: driven southwards by cell (r-h-1, c).
      for (genvar h = 0; h < MAX_HOP; h++) begin : g_hop
        for (genvar t = 0; t < TRACK; t++) begin : g_trk
          if (r - h - 1 >= 0) begin : g_n
            assign in_w[r][c][0][h][t] = out_w[r-h-1][c][2][t];
            assign in_f[r][c][0][h][t] = out_f[r-h-1][c][2][t];
          end else begin : g_n_edge
            assign in_w[r][c][0][h][t] = ext_in_data[c];
            assign in_f[r][c][0][h][t] = ext_in_flag[c];
          end
          if (c + h + 1 < COLS) begin : g_e
            assign in_w[r][c][1][h][t] = out_w[r][c+h+1][3][t];
            assign in_f[r][c][1][h][t] = out_f[r][c+h+1][3][t];
          end else begin : g_e_edge
            assign in_w[r][c][1][h][t] = '0;
            assign in_f[r][c][1][h][t] = 1'b0;
          end
          if (r + h + 1 < ROWS) begin : g_s
            assign in_w[r][c][2][h][t] = out_w[r+h+1][c][0][t];
            assign in_f[r][c][2][h][t] = out_f[r+h+1][c][0][t];
          end else begin : g_s_edge
            assign in_w[r][c][2][h][t] = '0;
            assign in_f[r][c][2][h][t] = 1'b0;
          end
          if (c - h - 1 >= 0) begin : g_w
            assign in_w[r][c][3][h][t] = out_w[r][c-h-1][1][t];
            assign in_f[r][c][3][h][t] = out_f[r][c-h-1][1][t];
          end else begin : g_w_edge
            assign in_w[r][c][3][h][t] = '0;
            assign in_f[r][c][3][h][t] = 1'b0;
          end
        end
      end

      array_cell #(.DATA_W(DATA_W), .TRACK(TRACK), .MAX_HOP(MAX_HOP), .IS_MULT(MULT_MASK[K])) u_cell (
        .clk, .rst_n, .clr,
        .cfg_we   (cfg_we && (cfg_addr == CADDR_W'(K))),
        .cfg_wdata,
        .seu_en   (seu_en && (seu_cell == CADDR_W'(K))),
        .seu_bit,
        .in_w     (in_w[r][c]),
        .in_f     (in_f[r][c]),
        .out_w    (out_w[r][c]),
        .out_f    (out_f[r][c]));

      if (r == 0) begin : g_exit
        assign ext_out_data[c] = out_w[0][c][0][0];
        assign ext_out_flag[c] = out_f[0][c][0][0];
      end
    end
  end
endmodule
