// tb_cfg_mem: checks reset, whole-word writes, single-bit upsets that
// persist until the next write, and write priority over an upset.
module tb_cfg_mem;
  localparam int CW = 84;
  logic clk = 1'b0, rst_n = 1'b0, we = 1'b0, seu_en = 1'b0;
  logic [CW-1:0] wdata, q, model;
  logic [6:0] seu_bit;
  int checks = 0, failures = 0;

  cfg_mem #(.CFG_W(CW)) dut (.clk, .rst_n, .we, .wdata, .seu_en, .seu_bit, .q);
  always #5 clk = ~clk;

  task automatic chk(string what);
    checks++;
    if (q !== model) begin failures++; $display("FAIL %s: q=%h model=%h", what, q, model); end
  endtask

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    wdata = '0; seu_bit = '0; model = '0;
    @(negedge clk); @(negedge clk); chk("reset");
    rst_n = 1'b1;
    for (int n = 0; n < 500; n++) begin
      @(negedge clk);
      we = ($urandom_range(0, 3) == 0);
      seu_en = ($urandom_range(0, 2) == 0);
      wdata = {$urandom, $urandom, $urandom};
      seu_bit = 7'($urandom_range(0, CW - 1));
      @(posedge clk);
      if (we) model = wdata;
      else if (seu_en) model[seu_bit] = ~model[seu_bit];
      #1; chk(we ? "write" : seu_en ? "upset" : "hold");
    end
    @(negedge clk); we = 1'b0; seu_en = 1'b0;
    repeat (3) @(negedge clk); chk("upset persists");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
