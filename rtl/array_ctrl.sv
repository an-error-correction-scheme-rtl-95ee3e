// array_ctrl: array controller. Interface to the external system and
// manager of the exec repetition (Fig. 1(a), Fig. 3).
//
// On start it runs one block of N outputs:
//   1. PH_LOAD_IN  the memory controller takes N primary input words;
//   2. PH_CFG      every cell's configuration memory is rewritten from the
//                  configuration store, one cell per cycle, while clr holds
//                  all PE registers at 0 (configuration reload = scrubbing
//                  and state reset), then PH_START issues the exec;
//   3. PH_EXEC1    primary exec, outputs stored in the buffer;
//   4. reload, PH_EXEC2  comparing exec, stopped at the first mismatch X;
//   5. only if there was a mismatch: reload, PH_EXEC3  verifying exec with X;
//   6. PH_SEND     the buffer is streamed to the external system;
// then blk_done pulses for one cycle and the controller is idle again.
// result tells how the block ended (trit_pkg::result_e) and x_addr the
// first mismatch address when there was one.
//
// n_words, lat and out_col are sampled at start. A reload takes NCELL
// cycles plus one cycle to issue the exec command.
//
// From the source description: the sequence of loads, reloads and execs and the
// decision after each exec. This design's own: the start/blk_done
// handshake, the one-cell-per-cycle reload and the phase encoding.
module array_ctrl
  import trit_pkg::*;
#(
  parameter int unsigned NCELL = 16,
  parameter int unsigned DEPTH = 1024,
  parameter int unsigned COLS  = 4,
  parameter int unsigned LAT_W = 8,
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1,
  localparam int unsigned NW   = $clog2(DEPTH + 1),
  localparam int unsigned CW   = (COLS > 1) ? $clog2(COLS) : 1,
  localparam int unsigned KW   = (NCELL > 1) ? $clog2(NCELL) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  // external system
  input  logic             start,
  input  logic [NW-1:0]    n_words,
  input  logic [LAT_W-1:0] lat,
  input  logic [CW-1:0]    out_col,
  output logic             busy,
  output logic             blk_done,
  output result_e          result,
  output logic [AW-1:0]    x_addr,
  output phase_e           phase,
  // memory controller
  output logic             mc_valid,
  output mc_cmd_e          mc_cmd,
  output exec_mode_e       mc_mode,
  output logic [NW-1:0]    mc_n,
  output logic [LAT_W-1:0] mc_lat,
  output logic [CW-1:0]    mc_col,
  output logic [AW-1:0]    mc_x,
  input  logic             mc_done,
  input  logic             mc_mismatch,
  input  logic [AW-1:0]    mc_x_out,
  input  logic             mc_primary_ok,
  // configuration reload
  output logic [KW-1:0]    cfg_addr,   // to the store (read) and the array (write)
  output logic             cfg_we,
  output logic             arr_clr
);
  phase_e           st;
  logic [1:0]       ex_no;   // exec that follows the current reload: 1..3
  logic [KW-1:0]    k;
  logic             issued;
  logic [NW-1:0]    n_r;
  logic [LAT_W-1:0] lat_r;
  logic [CW-1:0]    col_r;

  assign phase    = st;
  assign busy     = (st != PH_IDLE);
  assign cfg_addr = k;
  assign cfg_we   = (st == PH_CFG);
  assign arr_clr  = (st == PH_CFG) || (st == PH_START);
  assign mc_n     = n_r;
  assign mc_lat   = lat_r;
  assign mc_col   = col_r;
  assign mc_x     = mc_x_out;

  always_comb begin
    mc_valid = 1'b0;
    mc_cmd   = MC_EXEC;
    mc_mode  = EX_PRIMARY;
    unique case (st)
      PH_LOAD_IN: begin mc_valid = !issued; mc_cmd = MC_LOAD; end
      PH_SEND:    begin mc_valid = !issued; mc_cmd = MC_SEND; end
      PH_START: begin
        mc_valid = 1'b1;
        mc_cmd   = MC_EXEC;
        mc_mode  = (ex_no == 2'd1) ? EX_PRIMARY :
                   (ex_no == 2'd2) ? EX_COMPARE : EX_VERIFY;
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st       <= PH_IDLE;
      ex_no    <= 2'd1;
      k        <= '0;
      issued   <= 1'b0;
      n_r      <= '0;
      lat_r    <= '0;
      col_r    <= '0;
      blk_done <= 1'b0;
      result   <= RES_MATCH;
      x_addr   <= '0;
    end else begin
      blk_done <= 1'b0;
      unique case (st)
        PH_IDLE: begin
          issued <= 1'b0;
          if (start) begin
            n_r   <= n_words;
            lat_r <= lat;
            col_r <= out_col;
            st    <= PH_LOAD_IN;
          end
        end
        PH_LOAD_IN: begin
          issued <= 1'b1;
          if (mc_done) begin
            issued <= 1'b0;
            ex_no  <= 2'd1;
            k      <= '0;
            st     <= PH_CFG;
          end
        end
        PH_CFG: begin
          k <= k + KW'(1);
          if (k == KW'(NCELL - 1)) st <= PH_START;
        end
        PH_START: begin
          k  <= '0;
          st <= (ex_no == 2'd1) ? PH_EXEC1 :
                (ex_no == 2'd2) ? PH_EXEC2 : PH_EXEC3;
        end
        PH_EXEC1: if (mc_done) begin
          ex_no <= 2'd2;
          st    <= PH_CFG;
        end
        PH_EXEC2: if (mc_done) begin
          if (mc_mismatch) begin
            x_addr <= mc_x_out;
            ex_no  <= 2'd3;
            st     <= PH_CFG;
          end else begin
            result <= RES_MATCH;
            st     <= PH_SEND;
          end
        end
        PH_EXEC3: if (mc_done) begin
          result <= mc_primary_ok ? RES_PRIMARY_OK : RES_COMPARE_OK;
          st     <= PH_SEND;
        end
        PH_SEND: begin
          issued <= 1'b1;
          if (mc_done) begin
            issued   <= 1'b0;
            blk_done <= 1'b1;
            st       <= PH_IDLE;
          end
        end
        default: st <= PH_IDLE;
      endcase
    end
  end

  a_no_start_busy: assert property (@(posedge clk) disable iff (!rst_n)
    start |-> !busy);
endmodule
