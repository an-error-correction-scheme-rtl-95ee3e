// tb_trit_cgra: end-to-end test of the whole CGRA at its default size
// (4x4 cells, 16-bit words, 1024-word buffer), with blocks of N = 1024.
//
// Application mapped on the array (latency 2): y[i] = sum_{k<=i} 7*x[k]
// (mod 2^16), a multiply in cell (0,1), an accumulating adder in cell (0,0)
// and a return route through cell (1,0): a cyclic datapath, so an error in
// it persists until the next reload.
//
// Blocks run, each checked word by word against the error-free result:
//   clean                          -> RES_MATCH
//   upset of K in the primary exec -> comparing exec stops at X, verifying
//                                     exec overwrites from X (RES_COMPARE_OK)
//   upset of K in the comparing    -> verifying exec agrees at X and stops
//                                     (RES_PRIMARY_OK)
//   transient on the output in the primary / the comparing exec
//   upset of a routing select in the primary exec
//   clean block after an upset     -> the reload has scrubbed it
// X is checked against the injection time, and the length of every phase
// in cycles: reload 16, full exec N+LAT+2, exec stopped at X: X+LAT+3.
// Every mechanism (reload, full comparison, immediate termination, stop of
// the verifying exec at X, overwrite from X, upset, transient) is counted
// and must occur at least once.
module tb_trit_cgra;
  import trit_pkg::*;
  import tb_cfg_pkg::*;
  localparam int N = 1024, LAT = 2, W = 16;
  localparam logic [W-1:0] K = 16'd7;

  logic clk = 1'b0, rst_n = 1'b0;
  logic cfg_we = 1'b0; logic [3:0] cfg_waddr; logic [TCFGW-1:0] cfg_wdata;
  logic start = 1'b0; logic [10:0] n_words; logic [7:0] lat; logic [1:0] out_col;
  logic busy, blk_done; result_e result; logic [9:0] x_addr; phase_e phase;
  logic in_valid, in_ready, out_valid, out_last;
  logic [W-1:0] in_data, out_data;
  logic seu_en = 1'b0, set_en = 1'b0; logic [3:0] seu_cell; logic [6:0] seu_bit;

  trit_cgra dut (.clk, .rst_n, .cfg_we, .cfg_waddr, .cfg_wdata, .start, .n_words, .lat, .out_col,
    .busy, .blk_done, .result, .x_addr, .phase, .in_valid, .in_data, .in_ready,
    .out_valid, .out_data, .out_last, .seu_en, .seu_cell, .seu_bit, .set_en);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic chk(string what, int got, int exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %0d expected %0d", what, got, exp); end
  endtask

  logic [W-1:0] x [N], yref [N];
  int in_cnt, out_cnt, out_bad;

  // Input stream and output collection.
  always_comb begin
    in_valid = (in_cnt < N);
    in_data  = x[(in_cnt < N) ? in_cnt : 0];
  end
  always @(posedge clk) if (rst_n) begin
    if (in_valid && in_ready) in_cnt <= in_cnt + 1;
    if (out_valid) begin
      if (out_data !== yref[out_cnt]) begin
        out_bad++;
        if (out_bad < 5) $display("FAIL output %0d: %h expected %h", out_cnt, out_data, yref[out_cnt]);
      end
      if (out_last !== (out_cnt == N - 1)) out_bad++;
      out_cnt <= out_cnt + 1;
    end
  end

  // Phase-length monitor.
  phase_e prev_ph = PH_IDLE;
  int run_len = 0;
  int len_cfg, len_ex1, len_ex2, len_ex3, n_reload;
  always @(negedge clk) begin
    if (phase == prev_ph) run_len++;
    else begin
      case (prev_ph)
        PH_CFG:   begin len_cfg = run_len; n_reload++; end
        PH_EXEC1: len_ex1 = run_len;
        PH_EXEC2: len_ex2 = run_len;
        PH_EXEC3: len_ex3 = run_len;
        default: ;
      endcase
      run_len = 1;
      prev_ph = phase;
    end
  end

  // Mechanism counters.
  int m_reload, m_match, m_term, m_vstop, m_ovw, m_seu, m_set, m_cfg_ok;

  // Injection: during cycle k of the given exec phase.
  task automatic inject(phase_e ph, int k, bit upset, int cidx, int bitpos);
    while (phase != ph) @(negedge clk);
    repeat (k) @(negedge clk);
    if (upset) begin seu_en = 1'b1; seu_cell = 4'(cidx); seu_bit = 7'(bitpos); m_seu++; end
    else begin set_en = 1'b1; m_set++; end
    @(negedge clk);
    seu_en = 1'b0; set_en = 1'b0;
  endtask

  task automatic run_block(string tag, int kind, int k, result_e exp_res, int exp_x);
    int t0, cyc;
    logic [W-1:0] s;
    s = '0;
    for (int i = 0; i < N; i++) begin
      x[i] = W'($urandom) | 16'h1;
      s = W'(s + W'(32'(x[i]) * 32'(K)));
      yref[i] = s;
    end
    in_cnt = 0; out_cnt = 0; out_bad = 0; n_reload = 0;
    len_cfg = 0; len_ex1 = 0; len_ex2 = 0; len_ex3 = 0;
    @(negedge clk); start = 1'b1; @(negedge clk); start = 1'b0;
    cyc = 1;
    fork
      begin
        case (kind)
          1: inject(PH_EXEC1, k, 1'b1, 1, CONST_LSB);   // upset of K, primary
          2: inject(PH_EXEC2, k, 1'b1, 1, CONST_LSB);   // upset of K, comparing
          3: inject(PH_EXEC1, k, 1'b0, 0, 0);           // transient, primary
          4: inject(PH_EXEC2, k, 1'b0, 0, 0);           // transient, comparing
          5: inject(PH_EXEC1, k, 1'b1, 4, fld_out(1, 0, 0)*SEL_W + 1);  // north route select of cell (1,0)
          default: ;
        endcase
      end
      begin
        while (busy) begin @(negedge clk); cyc++; end
      end
    join
    @(negedge clk);
    chk({tag, " result"}, int'(result), int'(exp_res));
    chk({tag, " outputs"}, out_bad, 0);
    chk({tag, " output count"}, out_cnt, N);
    chk({tag, " reload length"}, len_cfg, 16);
    chk({tag, " primary length"}, len_ex1, N + LAT + 2);
    if (exp_res == RES_MATCH) begin
      chk({tag, " reloads"}, n_reload, 2);
      chk({tag, " comparing length"}, len_ex2, N + LAT + 2);
      m_match++;
    end else begin
      chk({tag, " reloads"}, n_reload, 3);
      if (exp_x >= 0) chk({tag, " X"}, int'(x_addr), exp_x);
      chk({tag, " comparing stopped at X"}, len_ex2, int'(x_addr) + LAT + 3);
      m_term++;
      if (exp_res == RES_PRIMARY_OK) begin
        chk({tag, " verifying stopped at X"}, len_ex3, int'(x_addr) + LAT + 3);
        m_vstop++;
      end else begin
        chk({tag, " verifying ran to N"}, len_ex3, N + LAT + 2);
        m_ovw++;
      end
    end
    m_reload += n_reload;
    $display("%s: result %0d X %0d, %0d cycles for %0d outputs (throughput %0.3f of one output per cycle in the execs)",
             tag, result, x_addr, cyc, N, real'(N) / real'(len_ex1 + len_ex2 + len_ex3));
  endtask

  initial begin
    #20000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [TCFGW-1:0] img [16];
    n_words = 11'(N); lat = 8'(LAT); out_col = 2'd0; seu_cell = '0; seu_bit = '0;
    cfg_waddr = '0; cfg_wdata = '0;
    in_cnt = N; out_cnt = 0;
    for (int c = 0; c < 16; c++) img[c] = idle_word();
    img[1] = word(K, pcfg(4'(MOP_MULL), SRC_DIRECT, SRC_CONST, 1'b0, OUT_REG, OUT_REG),
                  wcfg(SEL_OFF, SEL_OFF, SEL_OFF, SEL_PE, src(0, 1), SEL_OFF,
                       SEL_OFF, SEL_OFF, SEL_OFF, SEL_OFF, SEL_OFF));
    img[0] = word('0, pcfg(4'(OP_ADD), SRC_DIRECT, SRC_DIRECT, 1'b0, OUT_REG, OUT_REG),
                  wcfg(SEL_PE, SEL_OFF, SEL_PE, SEL_OFF, src(1, 1), src(2, 1),
                       SEL_OFF, SEL_OFF, SEL_OFF, SEL_OFF, SEL_OFF));
    img[4] = word('0, pcfg(4'(OP_PASSA), SRC_DIRECT, SRC_DIRECT, 1'b0, OUT_REG, OUT_REG),
                  wcfg(src(0, 1), SEL_OFF, SEL_OFF, SEL_OFF, SEL_OFF, SEL_OFF,
                       SEL_OFF, SEL_OFF, SEL_OFF, SEL_OFF, SEL_OFF));
    repeat (2) @(negedge clk); rst_n = 1'b1;
    for (int c = 0; c < 16; c++) begin
      @(negedge clk); cfg_we = 1'b1; cfg_waddr = 4'(c); cfg_wdata = img[c];
    end
    @(negedge clk); cfg_we = 1'b0;

    run_block("clean",                 0, 0,   RES_MATCH,      -1);
    run_block("upset in primary",      1, 500, RES_COMPARE_OK, 500);
    run_block("clean after upset",     0, 0,   RES_MATCH,      -1);
    run_block("upset in comparing",    2, 37,  RES_PRIMARY_OK, 37);
    run_block("transient in primary",  3, 803, RES_COMPARE_OK, 803 - LAT - 1);
    run_block("transient in comparing",4, 10,  RES_PRIMARY_OK, 10 - LAT - 1);
    run_block("route upset in primary",5, 0,   RES_COMPARE_OK, -1);
    run_block("clean again",           0, 0,   RES_MATCH,      -1);

    chk("mechanism: configuration reload", int'(m_reload > 0), 1);
    chk("mechanism: full comparison without mismatch", int'(m_match > 0), 1);
    chk("mechanism: immediate termination of the comparing exec", int'(m_term > 0), 1);
    chk("mechanism: verifying exec stopped at X", int'(m_vstop > 0), 1);
    chk("mechanism: buffer overwritten from X", int'(m_ovw > 0), 1);
    chk("mechanism: configuration upset", int'(m_seu > 0), 1);
    chk("mechanism: transient error", int'(m_set > 0), 1);
    $display("reloads %0d, matches %0d, terminations %0d, verify stops %0d, overwrites %0d, upsets %0d, transients %0d",
             m_reload, m_match, m_term, m_vstop, m_ovw, m_seu, m_set);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
