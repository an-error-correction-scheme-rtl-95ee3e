// tb_array_ctrl: drives the array controller with a behavioural memory
// controller that answers each command after a random delay. Checks, for a
// block without mismatch and for the two outcomes of a mismatch, the
// command sequence (LOAD, PRIMARY, COMPARE, [VERIFY with X], SEND), that
// every reload writes all 16 cells in order with the PE clear held, the
// result code, x_addr, the sampled run parameters and the blk_done pulse.
module tb_array_ctrl;
  import trit_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [10:0] n_words; logic [7:0] lat; logic [1:0] out_col;
  logic busy, blk_done; result_e result; logic [9:0] x_addr; phase_e phase;
  logic mc_valid; mc_cmd_e mc_cmd; exec_mode_e mc_mode;
  logic [10:0] mc_n; logic [7:0] mc_lat; logic [1:0] mc_col; logic [9:0] mc_x;
  logic mc_done = 1'b0, mc_mismatch = 1'b0, mc_primary_ok = 1'b0;
  logic [9:0] mc_x_out = '0;
  logic [3:0] cfg_addr; logic cfg_we, arr_clr;

  array_ctrl dut (.clk, .rst_n, .start, .n_words, .lat, .out_col, .busy, .blk_done, .result,
    .x_addr, .phase, .mc_valid, .mc_cmd, .mc_mode, .mc_n, .mc_lat, .mc_col, .mc_x,
    .mc_done, .mc_mismatch, .mc_x_out, .mc_primary_ok, .cfg_addr, .cfg_we, .arr_clr);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic chk(string what, int got, int exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %0d expected %0d", what, got, exp); end
  endtask

  // Scenario knobs for the behavioural memory controller.
  int sc_mismatch = 0, sc_pok = 0, sc_x = 0;
  string log_s;
  int reload_writes, reload_bad, blk_pulses;
  int exp_addr;

  // Behavioural memory controller.
  always @(posedge clk) begin
    if (mc_valid) begin
      automatic int d = $urandom_range(1, 20);
      automatic mc_cmd_e c = mc_cmd;
      automatic exec_mode_e m = mc_mode;
      if (c == MC_LOAD) log_s = {log_s, "L"};
      else if (c == MC_SEND) log_s = {log_s, "S"};
      else if (m == EX_PRIMARY) log_s = {log_s, "P"};
      else if (m == EX_COMPARE) log_s = {log_s, "C"};
      else log_s = {log_s, $sformatf("V%0d", mc_x)};
      checks++;
      if (mc_n != n_words || mc_lat != lat || mc_col != out_col) begin
        failures++; $display("FAIL run parameters not passed on");
      end
      fork begin
        repeat (d) @(posedge clk);
        #1;
        if (c == MC_EXEC && m == EX_COMPARE) begin
          mc_mismatch = 1'(sc_mismatch); mc_x_out = 10'(sc_x);
        end
        if (c == MC_EXEC && m == EX_VERIFY) mc_primary_ok = 1'(sc_pok);
        mc_done = 1'b1;
        @(posedge clk); #1 mc_done = 1'b0;
      end join_none
    end
  end

  // Reload monitor: addresses 0..15 in order, clear held.
  always @(posedge clk) begin
    if (cfg_we) begin
      reload_writes++;
      if (int'(cfg_addr) != exp_addr || !arr_clr) reload_bad++;
      exp_addr = (exp_addr + 1) % 16;
    end
    if (blk_done) blk_pulses++;
  end

  initial begin
    #2000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    n_words = '0; lat = '0; out_col = '0;
    repeat (2) @(negedge clk); rst_n = 1'b1;
    for (int r = 0; r < 6; r++) begin
      int xx;
      xx = $urandom_range(0, 1023);
      run_block_kept(0, 0, 0, "LPCS", RES_MATCH, 2);
      run_block_kept(1, 1, xx, $sformatf("LPCV%0dS", xx), RES_PRIMARY_OK, 3);
      run_block_kept(1, 0, xx, $sformatf("LPCV%0dS", xx), RES_COMPARE_OK, 3);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Runs one block; the run parameters stay on the inputs so that the
  // behavioural memory controller can compare what it is given.
  logic [10:0] n_hold; logic [7:0] lat_hold; logic [1:0] col_hold;
  task automatic run_block_kept(int mis, int pok, int xx, string exp_log, result_e exp_res, int exp_reloads);
    sc_mismatch = mis; sc_pok = pok; sc_x = xx;
    log_s = ""; reload_writes = 0; reload_bad = 0; blk_pulses = 0; exp_addr = 0;
    n_hold = 11'($urandom_range(1, 1024)); lat_hold = 8'($urandom); col_hold = 2'($urandom);
    n_words = n_hold; lat = lat_hold; out_col = col_hold;
    @(negedge clk); start = 1'b1; @(negedge clk); start = 1'b0;
    chk("busy after start", int'(busy), 1);
    while (busy) @(negedge clk);
    @(negedge clk);
    checks++;
    if (log_s != exp_log) begin failures++; $display("FAIL sequence %s expected %s", log_s, exp_log); end
    chk("result", int'(result), int'(exp_res));
    chk("reload writes", reload_writes, 16 * exp_reloads);
    chk("reload order and clear", reload_bad, 0);
    chk("blk_done pulses", blk_pulses, 1);
    if (mis != 0) chk("x_addr", int'(x_addr), xx);
  endtask
endmodule
