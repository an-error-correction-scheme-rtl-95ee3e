// tb_array_cell: programs one ALU cell through its configuration port and
// checks (a) a registered PE path north-in -> +const -> south-out with one
// cycle of latency, (b) a combinational route-through west(hop 2) -> east,
// (c) a flag route south -> north, (d) an upset constant bit that stays
// until the configuration is rewritten.
module tb_array_cell;
  import trit_pkg::*;
  import tb_cfg_pkg::*;
  localparam int W = 16, T = 1, H = 2;
  logic clk = 1'b0, rst_n = 1'b0, clr = 1'b0, cfg_we = 1'b0, seu_en = 1'b0;
  logic [TCFGW-1:0] cfg_wdata;
  logic [$clog2(TCFGW)-1:0] seu_bit;
  logic [3:0][H-1:0][T-1:0][W-1:0] in_w;
  logic [3:0][H-1:0][T-1:0] in_f;
  logic [3:0][T-1:0][W-1:0] out_w;
  logic [3:0][T-1:0] out_f;
  int checks = 0, failures = 0;
  logic [W-1:0] cst, prev_x;

  array_cell #(.DATA_W(W), .TRACK(T), .MAX_HOP(H), .IS_MULT(1'b0)) dut (
    .clk, .rst_n, .clr, .cfg_we, .cfg_wdata, .seu_en, .seu_bit, .in_w, .in_f, .out_w, .out_f);
  always #5 clk = ~clk;

  task automatic chk(string what, logic [W-1:0] got, logic [W-1:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s got %h exp %h", what, got, exp); end
  endtask

  task automatic program_cell();
    cfg_wdata = word(cst, pcfg(4'(OP_ADD), SRC_DIRECT, SRC_CONST, 1'b0, OUT_REG, OUT_COMB),
                     wcfg(SEL_OFF, src(3, 2), SEL_PE, SEL_OFF, src(0, 1), SEL_OFF,
                          src(2, 1), SEL_OFF, SEL_OFF, SEL_OFF, SEL_OFF));
    @(negedge clk); cfg_we = 1'b1; @(negedge clk); cfg_we = 1'b0;
  endtask

  initial begin
    #200000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    in_w = '0; in_f = '0; seu_bit = '0; cst = 16'h1235;
    @(negedge clk); rst_n = 1'b1;
    program_cell();
    prev_x = '0;
    for (int n = 0; n < 300; n++) begin
      @(negedge clk);
      if (n == 150) begin seu_bit = CONST_LSB[$clog2(TCFGW)-1:0]; seu_en = 1'b1; end
      else seu_en = 1'b0;
      if (n == 152) cst = cst ^ 16'h0001;  // upset visible from now on
      if (n == 250) begin cst = cst ^ 16'h0001; program_cell(); prev_x = '0; clr = 1'b1; @(negedge clk); clr = 1'b0; end
      in_w = {4*H*T{W'($urandom)}};
      in_w[0][0][0] = W'($urandom); in_w[3][1][0] = W'($urandom);
      in_f = 8'($urandom);
      #1;
      if (n > 0 && n != 250) chk("registered PE path", out_w[2][0], W'(prev_x + cst));
      chk("route west hop2 -> east", out_w[1][0], in_w[3][1][0]);
      chk("flag route south -> north", W'(out_f[0][0]), W'(in_f[2][0][0]));
      chk("unused output off", out_w[0][0], '0);
      prev_x = in_w[0][0][0];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
