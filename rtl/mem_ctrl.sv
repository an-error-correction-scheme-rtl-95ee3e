// mem_ctrl: memory controller of the data memory, with the immediate-
// termination error handling (Fig. 1(c), Fig. 3).
//
// Commands (cmd_valid with cmd, accepted only while idle):
//   MC_LOAD  accept n_words primary input words on in_valid/in_data/in_ready
//            into the input memory, address 0 upwards.
//   MC_EXEC  run one exec. Input word i is read from the input memory and
//            presented to the north edge of the array (arr_in_data, with
//            arr_in_flag = 1 while a word is valid, else data 0 and flag 0).
//            Output j is taken from column out_col of the array lat cycles
//            after input j entered it. Per mode:
//              EX_PRIMARY  write every output j to buffer[j].
//              EX_COMPARE  read buffer[j] and compare; at the first mismatch
//                          record X = j and stop at once (mismatch = 1).
//              EX_VERIFY   ignore outputs j < x_in; at j = X compare with
//                          buffer[X]: equal -> the primary run was right,
//                          stop at once (primary_ok = 1); different -> the
//                          comparing run was right, write buffer[X] and
//                          every later output up to N-1.
//   MC_SEND  stream buffer[0..N-1] on out_valid/out_data, out_last on N-1.
// done pulses for one cycle when a command has finished; mismatch, x_out
// and primary_ok hold the outcome of the last exec until the next one.
//
// Timing, counting the clock edge that accepts the command as edge 0:
// input i is at the array edge in the cycle after edge i+1, output j is
// checked in the cycle after edge j+1+lat, and done is high in the cycle
// after the edge that ends the last check needed. A full exec thus raises
// done after edge N+lat+1, an exec stopped at output X after edge X+lat+2.
// The buffer read for output j is issued one cycle ahead (synchronous
// SRAM). In EX_VERIFY only buffer[X] is read.
//
// From the source description: the exec modes, the single buffer, termination at the
// first mismatch and the decision at X. This design's own: the command
// interface, the per-exec latency register lat (the source description says only that
// the application delivers one result per cycle), and the timing above.
module mem_ctrl
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
  // command from the array controller
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
  // external input and output streams
  input  logic                        in_valid,
  input  logic [DATA_W-1:0]           in_data,
  output logic                        in_ready,
  output logic                        out_valid,
  output logic [DATA_W-1:0]           out_data,
  output logic                        out_last,
  // cell array edge
  output logic [COLS-1:0][DATA_W-1:0] arr_in_data,
  output logic [COLS-1:0]             arr_in_flag,
  input  logic [COLS-1:0][DATA_W-1:0] arr_out_data,
  // input memory
  output logic                        im_we,
  output logic [AW-1:0]               im_waddr,
  output logic [DATA_W-1:0]           im_wdata,
  output logic                        im_re,
  output logic [AW-1:0]               im_raddr,
  input  logic [DATA_W-1:0]           im_rdata,
  // output buffer
  output logic                        bf_we,
  output logic [AW-1:0]               bf_waddr,
  output logic [DATA_W-1:0]           bf_wdata,
  output logic                        bf_re,
  output logic [AW-1:0]               bf_raddr,
  input  logic [DATA_W-1:0]           bf_rdata
);
  localparam int unsigned CNT_W = NW + LAT_W + 1;

  typedef enum logic [1:0] {S_IDLE, S_LOAD, S_EXEC, S_SEND} state_e;

  state_e             state;
  exec_mode_e         md;
  logic [NW-1:0]      n_r;
  logic [LAT_W-1:0]   lat_r;
  logic [CW-1:0]      col_r;
  logic [AW-1:0]      x_r;
  logic [CNT_W-1:0]   cnt;
  logic               iv;        // input word valid at the array edge
  logic               sv, slast; // send stream stage

  // Exec bookkeeping, all combinational from cnt.
  logic [CNT_W-1:0]   n_ext, lat_ext, x_ext;
  logic [CNT_W-1:0]   j;         // output index checked this cycle
  logic [CNT_W-1:0]   p;         // buffer prefetch index
  logic               ov;        // an output is checked this cycle
  logic               pv;        // prefetch index in range
  logic               last_j;
  logic [DATA_W-1:0]  y;         // selected array output
  logic               differ;
  logic               fin;       // exec finishes at this edge

  always_comb begin
    n_ext   = CNT_W'(n_r);
    lat_ext = CNT_W'(lat_r);
    x_ext   = CNT_W'(x_r);
    j       = cnt - lat_ext - CNT_W'(1);
    p       = cnt - lat_ext;
    ov      = (state == S_EXEC) && (cnt > lat_ext) && (j < n_ext);
    pv      = (state == S_EXEC) && (cnt >= lat_ext) && (p < n_ext);
    last_j  = (j == n_ext - CNT_W'(1));
    y       = arr_out_data[col_r];
    differ  = (y != bf_rdata);
  end

  // Array edge: broadcast the input word to every column.
  always_comb begin
    for (int unsigned c = 0; c < COLS; c++) begin
      arr_in_data[c] = iv ? im_rdata : '0;
      arr_in_flag[c] = iv;
    end
  end

  // Memory ports.
  always_comb begin
    in_ready = (state == S_LOAD);
    im_we    = (state == S_LOAD) && in_valid;
    im_waddr = AW'(cnt);
    im_wdata = in_data;
    im_re    = (state == S_EXEC) && (cnt < n_ext);
    im_raddr = AW'(cnt);

    bf_we    = 1'b0;
    bf_waddr = AW'(j);
    bf_wdata = y;
    bf_re    = 1'b0;
    bf_raddr = AW'(p);
    fin      = 1'b0;

    if (state == S_EXEC) begin
      unique case (md)
        EX_PRIMARY: begin
          bf_we = ov;
          fin   = ov && last_j;
        end
        EX_COMPARE: begin
          bf_re = pv;
          fin   = ov && (differ || last_j);
        end
        default: begin // EX_VERIFY
          bf_re = pv && (p == x_ext);
          if (ov && (j == x_ext)) begin
            bf_we = differ;
            fin   = !differ || last_j;
          end else if (ov && (j > x_ext)) begin
            bf_we = 1'b1;
            fin   = last_j;
          end
        end
      endcase
    end else if (state == S_SEND) begin
      bf_re    = (cnt < n_ext);
      bf_raddr = AW'(cnt);
    end
  end

  assign out_valid = sv;
  assign out_last  = slast;
  assign out_data  = bf_rdata;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      md         <= EX_PRIMARY;
      n_r        <= '0;
      lat_r      <= '0;
      col_r      <= '0;
      x_r        <= '0;
      cnt        <= '0;
      iv         <= 1'b0;
      sv         <= 1'b0;
      slast      <= 1'b0;
      done       <= 1'b0;
      mismatch   <= 1'b0;
      x_out      <= '0;
      primary_ok <= 1'b0;
    end else begin
      done  <= 1'b0;
      iv    <= 1'b0;
      sv    <= 1'b0;
      slast <= 1'b0;
      unique case (state)
        S_IDLE: begin
          cnt <= '0;
          if (cmd_valid) begin
            md    <= mode;
            n_r   <= n_words;
            lat_r <= lat;
            col_r <= out_col;
            x_r   <= x_in;
            unique case (cmd)
              MC_LOAD: state <= S_LOAD;
              MC_SEND: state <= S_SEND;
              default: begin
                state <= S_EXEC;
                if (mode != EX_VERIFY) begin
                  mismatch   <= 1'b0;
                  x_out      <= '0;
                end
                primary_ok <= 1'b0;
              end
            endcase
          end
        end
        S_LOAD: begin
          if (in_valid) begin
            cnt <= cnt + CNT_W'(1);
            if (cnt == n_ext - CNT_W'(1)) begin
              state <= S_IDLE;
              done  <= 1'b1;
            end
          end
        end
        S_EXEC: begin
          cnt <= cnt + CNT_W'(1);
          iv  <= (cnt < n_ext);
          if (fin) begin
            state <= S_IDLE;
            done  <= 1'b1;
            iv    <= 1'b0;
            if (md == EX_COMPARE && differ) begin
              mismatch <= 1'b1;
              x_out    <= AW'(j);
            end
            if (md == EX_VERIFY && j == x_ext && !differ) primary_ok <= 1'b1;
          end
        end
        S_SEND: begin
          cnt   <= cnt + CNT_W'(1);
          sv    <= (cnt < n_ext);
          slast <= (cnt == n_ext - CNT_W'(1));
          if (slast) begin
            state <= S_IDLE;
            done  <= 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // A command is only given to an idle controller, with a size it can hold.
  a_cmd_idle: assert property (@(posedge clk) disable iff (!rst_n)
    cmd_valid |-> (state == S_IDLE));
  a_n_range: assert property (@(posedge clk) disable iff (!rst_n)
    cmd_valid |-> (n_words >= 1 && n_words <= NW'(DEPTH)));
endmodule
