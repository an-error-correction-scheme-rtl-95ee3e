// tb_cell_array: maps a small cyclic application on the 4x4 array and
// checks its output stream: y[i] = sum_{k<=i} K * x[k] (mod 2^16).
//   cell (0,1) MULT: x from the north edge times constant K, registered,
//                    sent west;
//   cell (0,0) ALU:  adds it to its own registered sum, which it sends north
//                    (array output, column 0) and south;
//   cell (1,0):      routes the sum back north, closing the loop.
// Latency from input to output is 2 cycles. Also checks that an upset bit
// of K corrupts every later output (persistent error) and that rewriting
// the configuration with the PE registers cleared restores correct outputs.
module tb_cell_array;
  import trit_pkg::*;
  import tb_cfg_pkg::*;
  localparam int W = 16, C = 4;
  localparam logic [W-1:0] K = 16'd7;
  logic clk = 1'b0, rst_n = 1'b0, clr = 1'b0, cfg_we = 1'b0, seu_en = 1'b0;
  logic [3:0] cfg_addr, seu_cell;
  logic [TCFGW-1:0] cfg_wdata;
  logic [$clog2(TCFGW)-1:0] seu_bit;
  logic [C-1:0][W-1:0] ext_in_data, ext_out_data;
  logic [C-1:0] ext_in_flag, ext_out_flag;
  logic [TCFGW-1:0] img [16];
  int checks = 0, failures = 0, wrong_after_upset = 0;

  cell_array dut (.clk, .rst_n, .clr, .cfg_we, .cfg_addr, .cfg_wdata, .seu_en, .seu_cell, .seu_bit,
    .ext_in_data, .ext_in_flag, .ext_out_data, .ext_out_flag);
  always #5 clk = ~clk;

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
    for (int k = 0; k < 16; k++) img[k] = idle_word();
    img[1] = word(K, pcfg(4'(MOP_MULL), SRC_DIRECT, SRC_CONST, 1'b0, OUT_REG, OUT_REG),
                  wcfg(SEL_OFF, SEL_OFF, SEL_OFF, SEL_PE, src(0, 1), SEL_OFF,
                       SEL_OFF, SEL_OFF, SEL_OFF, SEL_OFF, SEL_OFF));
    img[0] = word('0, pcfg(4'(OP_ADD), SRC_DIRECT, SRC_DIRECT, 1'b0, OUT_REG, OUT_REG),
                  wcfg(SEL_PE, SEL_OFF, SEL_PE, SEL_OFF, src(1, 1), src(2, 1),
                       SEL_OFF, SEL_OFF, SEL_OFF, SEL_OFF, SEL_OFF));
    img[4] = word('0, pcfg(4'(OP_PASSA), SRC_DIRECT, SRC_DIRECT, 1'b0, OUT_REG, OUT_REG),
                  wcfg(src(0, 1), SEL_OFF, SEL_OFF, SEL_OFF, SEL_OFF, SEL_OFF,
                       SEL_OFF, SEL_OFF, SEL_OFF, SEL_OFF, SEL_OFF));
    ext_in_data = '0; ext_in_flag = '0; cfg_addr = '0; cfg_wdata = '0; seu_cell = 4'd1;
    seu_bit = CONST_LSB[$clog2(TCFGW)-1:0];
    @(negedge clk); rst_n = 1'b1;
    for (int pass = 0; pass < 2; pass++) begin
      load_all();
      s = '0;
      for (int i = 0; i < 512; i++) begin
        x[i] = W'($urandom) | 16'h1;
        s = W'(s + W'(32'(x[i]) * 32'(K)));
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
            if (ext_out_data[0] === acc[t-2]) failures++;
            else wrong_after_upset++;
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
    if (wrong_after_upset < 200) begin failures++; $display("FAIL upset did not persist"); end
    $display("upset outputs wrong: %0d", wrong_after_upset);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
