// tb_cfg_store: writes every entry, reads them back combinationally in
// random order, rewrites some entries and reads again.
module tb_cfg_store;
  localparam int CW = 84, NC = 16;
  logic clk = 1'b0, we = 1'b0;
  logic [3:0] waddr, raddr;
  logic [CW-1:0] wdata, rdata, model [NC];
  int checks = 0, failures = 0;

  cfg_store #(.CFG_W(CW), .NCELL(NC)) dut (.clk, .we, .waddr, .wdata, .raddr, .rdata);
  always #5 clk = ~clk;

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int k = 0; k < NC; k++) begin
      @(negedge clk); we = 1'b1; waddr = 4'(k); wdata = {$urandom, $urandom, $urandom}; model[k] = wdata;
    end
    @(negedge clk); we = 1'b0;
    for (int n = 0; n < 400; n++) begin
      @(negedge clk);
      if (n % 4 == 0) begin
        we = 1'b1; waddr = 4'($urandom); wdata = {$urandom, $urandom, $urandom};
      end else we = 1'b0;
      raddr = 4'($urandom);
      #1;
      checks++;
      if (rdata !== model[raddr]) begin failures++; $display("FAIL entry %0d", raddr); end
      @(posedge clk); if (we) model[waddr] = wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
