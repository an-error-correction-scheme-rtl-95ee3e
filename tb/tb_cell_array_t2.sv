// tb_cell_array_t2: the cell array built with the larger routing resource
// (8-bit words, TRACK = 2, hop = (1, 2, 3)), running the running-sum
// mapping y[i] = sum_{k<=i} K * x[k] (mod 2^8) on routes that only exist in
// this geometry:
//   cell (0,1) MULT: x from the north edge on track 1, times constant K,
//                    registered, sent west on track 1;
//   cell (0,0) ALU:  adds it (east, hop 1, track 1) to its registered sum
//                    coming back from the south over 3 hops on track 0; sends
//                    the sum north on track 0 (array output) and south on
//                    track 1;
//   cell (3,0):      routes the sum arriving from the north over 3 hops on
//                    track 1 back north on track 0 (a track change).
// Latency from input to output is 2 cycles. The south-going track 0 of
// cell (0,0) carries a decoy value; picking the wrong track or hop breaks
// the sum. Also checks that an upset constant bit corrupts every later
// output and that a reload with the PE registers cleared restores them.
// The configuration words are built here from the trit_pkg field
// functions, since the testbench helper package is fixed to the default
// geometry.
module tb_cell_array_t2;
  import trit_pkg::*;
  localparam int unsigned W = 8, C = 4, TRK = 2, HOP = 3;
  localparam int unsigned CW = cell_cfg_w(W, TRK);
  localparam int unsigned WCW = wcfg_w(TRK);
  localparam int unsigned CLSB = $bits(pe_cfg_t) + WCW;
  localparam logic [W-1:0] K = 8'd7;
  localparam logic [SEL_W-1:0] PE = '0;
  logic clk = 1'b0, rst_n = 1'b0, clr = 1'b0, cfg_we = 1'b0, seu_en = 1'b0;
  logic [3:0] cfg_addr, seu_cell;
  logic [CW-1:0] cfg_wdata;
  logic [$clog2(CW)-1:0] seu_bit;
  logic [C-1:0][W-1:0] ext_in_data, ext_out_data;
  logic [C-1:0] ext_in_flag, ext_out_flag;
  logic [CW-1:0] img [16];
  int checks = 0, failures = 0, wrong_after_upset = 0;

  cell_array #(.ROWS(4), .COLS(4), .DATA_W(W), .TRACK(TRK), .MAX_HOP(HOP)) dut (
    .clk, .rst_n, .clr, .cfg_we, .cfg_addr, .cfg_wdata, .seu_en, .seu_cell, .seu_bit,
    .ext_in_data, .ext_in_flag, .ext_out_data, .ext_out_flag);
  always #5 clk = ~clk;

  function automatic logic [SEL_W-1:0] src(int unsigned side, int unsigned hop, int unsigned t);
    return SEL_W'(1 + src_idx(HOP, TRK, side, hop - 1, t));
  endfunction

  // Every select off, then the PE settings.
  function automatic logic [CW-1:0] base(logic [W-1:0] cst, logic [3:0] op, src_sel_e a, src_sel_e b);
    pe_cfg_t p;
    logic [WCW-1:0] w;
    p.op = op; p.a_sel = a; p.b_sel = b; p.f_reg = 1'b0; p.y_sel = OUT_REG; p.fy_sel = OUT_REG;
    w = '1;
    return {cst, p, w};
  endfunction

  task automatic load_all();
    clr = 1'b1;
    for (int k = 0; k < 16; k++) begin
      @(negedge clk); cfg_we = 1'b1; cfg_addr = 4'(k); cfg_wdata = img[k];
    end
    @(negedge clk); cfg_we = 1'b0; clr = 1'b0;
  endtask

  initial begin
    #500000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [W-1:0] x [512];
    logic [W-1:0] acc [512];
    logic [W-1:0] s;
    for (int k = 0; k < 16; k++) img[k] = base('0, 4'(OP_PASSA), SRC_DIRECT, SRC_DIRECT);
    // cell (0,1): multiplier
    img[1] = base(K, 4'(MOP_MULL), SRC_DIRECT, SRC_CONST);
    img[1][fld_a(TRK)*SEL_W +: SEL_W] = src(0, 1, 1);
    img[1][fld_out(TRK, 3, 1)*SEL_W +: SEL_W] = PE;
    // cell (0,0): accumulator
    img[0] = base(8'h5A, 4'(OP_ADD), SRC_DIRECT, SRC_DIRECT);
    img[0][fld_a(TRK)*SEL_W +: SEL_W] = src(1, 1, 1);
    img[0][fld_b(TRK)*SEL_W +: SEL_W] = src(2, 3, 0);
    img[0][fld_out(TRK, 0, 0)*SEL_W +: SEL_W] = PE;
    img[0][fld_out(TRK, 2, 1)*SEL_W +: SEL_W] = PE;
    // decoy on the south-going track 0: the registered input x
    img[0][fld_out(TRK, 2, 0)*SEL_W +: SEL_W] = src(0, 2, 0);
    // cell (3,0): route back north with a track change
    img[12][fld_out(TRK, 0, 0)*SEL_W +: SEL_W] = src(0, 3, 1);
    ext_in_data = '0; ext_in_flag = '0; cfg_addr = '0; cfg_wdata = '0; seu_cell = 4'd1;
    seu_bit = CLSB[$clog2(CW)-1:0];
    @(negedge clk); rst_n = 1'b1;
    for (int pass = 0; pass < 2; pass++) begin
      load_all();
      s = '0;
      for (int i = 0; i < 512; i++) begin
        x[i] = W'($urandom) | 8'h1;
        s = W'(s + W'(16'(x[i]) * 16'(K)));
        acc[i] = s;
      end
      for (int t = 0; t < 512 + 2; t++) begin
        // drive x[t] during cycle t, observe y[t-2]
        ext_in_data = (t < 512) ? {C{x[t]}} : '0;
        seu_en = (pass == 0) && (t == 300);
        #1;
        if (t >= 2) begin
          checks++;
          if (pass == 0 && t - 2 >= 301) begin
            if (ext_out_data[0] !== acc[t-2]) wrong_after_upset++;
          end else if (ext_out_data[0] !== acc[t-2]) begin
            failures++;
            $display("FAIL pass %0d y[%0d] got %h exp %h", pass, t - 2, ext_out_data[0], acc[t-2]);
          end
        end
        @(negedge clk);
      end
      seu_en = 1'b0;
    end
    checks++;
    // with 8-bit sums an upset output can match by chance about 1 time in 256
    if (wrong_after_upset < 180) begin failures++; $display("FAIL upset did not persist"); end
    $display("upset outputs wrong: %0d", wrong_after_upset);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
