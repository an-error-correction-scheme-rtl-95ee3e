// tb_workloads: runs two of the evaluated stream filters on the full-size
// CGRA, each as blocks of N = 1000 outputs (the exec length of the
// reliability study) and N = 100, with and without a persistent upset.
//   color invert filter           y[i] = 255 - x[i] for 8-bit pixels,
//                                 one ALU cell (XOR with 0x00FF), output
//                                 taken combinationally: latency 0;
//   horizontal-differential filter y[i] = x[i] - x[i-1] (x[-1] = 0), one ALU
//                                 cell subtracting its registered input
//                                 from the direct one, output registered:
//                                 latency 1.
// Both use cell (0,0) and column 0. The upset inverts bit 0 of the cell's
// constant (color invert) or its operation code (differential) in the
// primary exec; the block must still deliver the error-free result.
module tb_workloads;
  import trit_pkg::*;
  import tb_cfg_pkg::*;
  localparam int W = 16;

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
  logic [W-1:0] x [1024], yref [1024];
  int n_cur, in_cnt, out_cnt, out_bad, n_blocks_ok, n_corrected;

  always_comb begin
    in_valid = (in_cnt < n_cur);
    in_data  = x[(in_cnt < n_cur) ? in_cnt : 0];
  end
  always @(posedge clk) if (rst_n) begin
    if (in_valid && in_ready) in_cnt <= in_cnt + 1;
    if (out_valid) begin
      if (out_data !== yref[out_cnt]) out_bad++;
      out_cnt <= out_cnt + 1;
    end
  end

  task automatic program_cell0(logic [TCFGW-1:0] w0);
    for (int c = 0; c < 16; c++) begin
      @(negedge clk); cfg_we = 1'b1; cfg_waddr = 4'(c); cfg_wdata = (c == 0) ? w0 : idle_word();
    end
    @(negedge clk); cfg_we = 1'b0;
  endtask

  task automatic run(string tag, int n, int l, bit upset, int ubit);
    n_cur = n; in_cnt = 0; out_cnt = 0; out_bad = 0;
    n_words = 11'(n); lat = 8'(l); out_col = 2'd0;
    @(negedge clk); start = 1'b1; @(negedge clk); start = 1'b0;
    if (upset) begin
      while (phase != PH_EXEC1) @(negedge clk);
      repeat (n / 3) @(negedge clk);
      seu_en = 1'b1; seu_cell = 4'd0; seu_bit = 7'(ubit);
      @(negedge clk); seu_en = 1'b0;
    end
    while (busy) @(negedge clk);
    @(negedge clk);
    checks++;
    if (out_bad != 0 || out_cnt != n) begin
      failures++; $display("FAIL %s: %0d wrong of %0d outputs", tag, out_bad, out_cnt);
    end else n_blocks_ok++;
    checks++;
    if (upset && result == RES_MATCH) begin failures++; $display("FAIL %s: upset not detected", tag); end
    else if (!upset && result != RES_MATCH) begin failures++; $display("FAIL %s: false mismatch", tag); end
    if (upset) n_corrected++;
    $display("%s: N=%0d result %0d X %0d", tag, n, result, x_addr);
  endtask

  initial begin
    #50000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    cfg_waddr = '0; cfg_wdata = '0; seu_cell = '0; seu_bit = '0; n_cur = 0; in_cnt = 0; out_cnt = 0;
    n_words = '0; lat = '0; out_col = '0;
    repeat (2) @(negedge clk); rst_n = 1'b1;

    // color invert filter
    program_cell0(word(16'h00FF, pcfg(4'(OP_XOR), SRC_DIRECT, SRC_CONST, 1'b0, OUT_COMB, OUT_COMB),
                       wcfg(SEL_PE, SEL_OFF, SEL_OFF, SEL_OFF, src(0, 1), SEL_OFF,
                            SEL_OFF, SEL_OFF, SEL_OFF, SEL_OFF, SEL_OFF)));
    foreach (x[i]) begin x[i] = W'($urandom_range(0, 255)); yref[i] = W'(255 - x[i]); end
    run("color invert", 1000, 0, 1'b0, 0);
    run("color invert, upset", 1000, 0, 1'b1, CONST_LSB);
    run("color invert", 100, 0, 1'b0, 0);

    // horizontal-differential filter
    program_cell0(word('0, pcfg(4'(OP_SUB), SRC_DIRECT, SRC_REG, 1'b0, OUT_REG, OUT_COMB),
                       wcfg(SEL_PE, SEL_OFF, SEL_OFF, SEL_OFF, src(0, 1), src(0, 1),
                            SEL_OFF, SEL_OFF, SEL_OFF, SEL_OFF, SEL_OFF)));
    foreach (x[i]) x[i] = W'($urandom_range(0, 255));
    foreach (x[i]) yref[i] = W'(x[i] - ((i == 0) ? 16'h0 : x[i-1]));
    run("horizontal differential", 1000, 1, 1'b0, 0);
    run("horizontal differential, upset", 1000, 1, 1'b1, $bits(pe_cfg_t) - 4 + TWCW);
    run("horizontal differential", 100, 1, 1'b0, 0);

    checks++;
    if (n_corrected != 2) begin failures++; $display("FAIL upsets not all exercised"); end
    $display("blocks correct %0d, blocks with a corrected upset %0d", n_blocks_ok, n_corrected);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
