// tb_mem_ctrl: runs the memory-controller sequences of the immediate-
// termination scheme against a behavioural array kept in this testbench:
// output j = 3*x[j] + 1, delivered LAT cycles after input j. Errors are
// injected into the behavioural array per exec:
//   A  no error                       -> comparing exec matches
//   B  persistent error in primary    -> mismatch at X, verifying exec
//                                        disagrees at X, buffer rewritten
//   C  persistent error in comparing  -> mismatch at X, verifying exec
//                                        agrees at X and stops there
//   D  transient error in primary     -> as B, for one output only
// After each scenario the buffer is streamed out and every word compared
// with the error-free result. Exec lengths are checked in cycles:
// N+LAT+1 edges from the command to done for a full exec, X+LAT+2 for an
// exec that stops at X.
module tb_mem_ctrl;
  import trit_pkg::*;
  localparam int W = 16, D = 1024, C = 4, LAT = 3;
  localparam int N = 300;

  logic clk = 1'b0, rst_n = 1'b0;
  logic cmd_valid = 1'b0;
  mc_cmd_e cmd; exec_mode_e mode;
  logic [10:0] n_words; logic [7:0] lat; logic [1:0] out_col; logic [9:0] x_in;
  logic done, mismatch, primary_ok;
  logic [9:0] x_out;
  logic in_valid = 1'b0, in_ready, out_valid, out_last;
  logic [W-1:0] in_data, out_data;
  logic [C-1:0][W-1:0] arr_in_data, arr_out_data;
  logic [C-1:0] arr_in_flag;

  logic im_we, im_re, bf_we, bf_re;
  logic [9:0] im_waddr, im_raddr, bf_waddr, bf_raddr;
  logic [W-1:0] im_wdata, im_rdata, bf_wdata, bf_rdata;

  mem_ctrl #(.DATA_W(W), .DEPTH(D), .COLS(C)) dut (
    .clk, .rst_n, .cmd_valid, .cmd, .mode, .n_words, .lat, .out_col, .x_in,
    .done, .mismatch, .x_out, .primary_ok, .in_valid, .in_data, .in_ready,
    .out_valid, .out_data, .out_last, .arr_in_data, .arr_in_flag, .arr_out_data,
    .im_we, .im_waddr, .im_wdata, .im_re, .im_raddr, .im_rdata,
    .bf_we, .bf_waddr, .bf_wdata, .bf_re, .bf_raddr, .bf_rdata);

  // Input memory and output buffer for the controller under test.
  sram_1r1w #(.WIDTH(W), .DEPTH(D)) u_imem (.clk, .we(im_we), .waddr(im_waddr),
    .wdata(im_wdata), .re(im_re), .raddr(im_raddr), .rdata(im_rdata));
  sram_1r1w #(.WIDTH(W), .DEPTH(D)) u_buf (.clk, .we(bf_we), .waddr(bf_waddr),
    .wdata(bf_wdata), .re(bf_re), .raddr(bf_raddr), .rdata(bf_rdata));

  always #5 clk = ~clk;

  // Behavioural array: counts valid inputs of the current exec and applies
  // the error pattern chosen for it.
  int unsigned in_idx;
  int err_from = -1, err_only = -1;   // persistent from index / single index
  logic [W-1:0] dl [LAT];
  logic [W-1:0] g;
  always_comb begin
    g = W'(arr_in_data[2] * 3 + 1);
    if (arr_in_flag[2] && ((err_from >= 0 && int'(in_idx) >= err_from) ||
                           (err_only >= 0 && int'(in_idx) == err_only)))
      g = g ^ 16'h0100;
    if (!arr_in_flag[2]) g = '0;
  end
  always_ff @(posedge clk) begin
    dl[0] <= g;
    for (int k = 1; k < LAT; k++) dl[k] <= dl[k-1];
    if (cmd_valid) in_idx <= 0;
    else if (arr_in_flag[2]) in_idx <= in_idx + 1;
  end
  always_comb begin
    arr_out_data = '0;
    arr_out_data[2] = dl[LAT-1];
    arr_out_data[1] = 16'hDEAD;   // a column that must not be used
  end

  int checks = 0, failures = 0;
  logic [W-1:0] x [N];

  task automatic chk(string what, int got, int exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %0d expected %0d", what, got, exp); end
  endtask

  task automatic issue(mc_cmd_e c, exec_mode_e m, int xi, output int edges);
    @(negedge clk);
    cmd_valid = 1'b1; cmd = c; mode = m; x_in = 10'(xi);
    @(posedge clk); #1 cmd_valid = 1'b0;
    edges = 0;
    while (!done) begin @(posedge clk); #1 edges++; end
  endtask

  task automatic load_inputs();
    int e;
    fork
      issue(MC_LOAD, EX_PRIMARY, 0, e);
      begin
        for (int i = 0; i < N; i++) begin
          @(negedge clk); in_valid = 1'b1; in_data = x[i];
          while (!in_ready) begin @(posedge clk); #1; end
          @(posedge clk); #1;
          in_valid = 1'b0;
        end
      end
    join
  endtask

  task automatic send_check(string tag);
    int e, got;
    got = 0;
    fork
      issue(MC_SEND, EX_PRIMARY, 0, e);
      begin
        while (got < N) begin
          @(posedge clk); #1;
          if (out_valid) begin
            checks++;
            if (out_data !== W'(x[got] * 3 + 1)) begin
              failures++;
              $display("FAIL %s word %0d: %h expected %h", tag, got, out_data, W'(x[got] * 3 + 1));
            end
            if (got == N - 1) chk({tag, " out_last"}, int'(out_last), 1);
            got++;
          end
        end
      end
    join
  endtask

  initial begin
    #5000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int e;
    n_words = 11'(N); lat = 8'(LAT); out_col = 2'd2; cmd = MC_LOAD; mode = EX_PRIMARY; x_in = '0;
    in_data = '0;
    repeat (2) @(negedge clk); rst_n = 1'b1;
    for (int i = 0; i < N; i++) x[i] = W'($urandom);
    load_inputs();

    // A: no error
    err_from = -1; err_only = -1;
    issue(MC_EXEC, EX_PRIMARY, 0, e); chk("A primary length", e, N + LAT + 1);
    issue(MC_EXEC, EX_COMPARE, 0, e); chk("A compare length", e, N + LAT + 1);
    chk("A mismatch", int'(mismatch), 0);
    send_check("A");

    // B: persistent error in the primary exec from 117
    err_from = 117;
    issue(MC_EXEC, EX_PRIMARY, 0, e);
    err_from = -1;
    issue(MC_EXEC, EX_COMPARE, 0, e); chk("B compare stops at X", e, 117 + LAT + 2);
    chk("B mismatch", int'(mismatch), 1); chk("B X", int'(x_out), 117);
    issue(MC_EXEC, EX_VERIFY, int'(x_out), e); chk("B verify runs to N", e, N + LAT + 1);
    chk("B primary_ok", int'(primary_ok), 0);
    send_check("B");

    // C: persistent error in the comparing exec from 40
    issue(MC_EXEC, EX_PRIMARY, 0, e);
    err_from = 40;
    issue(MC_EXEC, EX_COMPARE, 0, e); chk("C compare stops at X", e, 40 + LAT + 2);
    chk("C X", int'(x_out), 40);
    err_from = -1;
    issue(MC_EXEC, EX_VERIFY, int'(x_out), e); chk("C verify stops at X", e, 40 + LAT + 2);
    chk("C primary_ok", int'(primary_ok), 1);
    send_check("C");

    // D: transient error on output 0 and then on output N-1 of the primary exec
    for (int t = 0; t < 2; t++) begin
      err_only = (t == 0) ? 0 : N - 1;
      issue(MC_EXEC, EX_PRIMARY, 0, e);
      err_only = -1;
      issue(MC_EXEC, EX_COMPARE, 0, e);
      chk("D X", int'(x_out), (t == 0) ? 0 : N - 1);
      issue(MC_EXEC, EX_VERIFY, int'(x_out), e);
      chk("D primary_ok", int'(primary_ok), 0);
      send_check("D");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
