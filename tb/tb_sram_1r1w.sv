// tb_sram_1r1w: random writes and synchronous reads against an array
// model, including read-during-write of the same address (old data) and
// read-data hold when re is low.
module tb_sram_1r1w;
  localparam int W = 16, D = 1024;
  logic clk = 1'b0, we = 1'b0, re = 1'b0;
  logic [9:0] waddr, raddr;
  logic [W-1:0] wdata, rdata, model [D], exp_q;
  int checks = 0, failures = 0;

  sram_1r1w #(.WIDTH(W), .DEPTH(D)) dut (.clk, .we, .waddr, .wdata, .re, .raddr, .rdata);
  always #5 clk = ~clk;

  initial begin
    #2000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    // fill every word once
    for (int a = 0; a < D; a++) begin
      @(negedge clk); we = 1'b1; waddr = 10'(a); wdata = W'($urandom); model[a] = wdata;
    end
    @(negedge clk); we = 1'b0;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      we = 1'($urandom); re = ($urandom_range(0, 3) != 0);
      waddr = 10'($urandom); wdata = W'($urandom);
      raddr = (n % 5 == 0) ? waddr : 10'($urandom);
      if (re) exp_q = model[raddr];
      @(posedge clk);
      if (we) model[waddr] = wdata;
      #1;
      checks++;
      if (rdata !== exp_q) begin failures++; $display("FAIL read %0d got %h exp %h", raddr, rdata, exp_q); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
