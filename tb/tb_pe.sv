// tb_pe: checks the PE of an ALU cell and of a MULT cell: operand sources
// (direct, registered, constant), output sources (combinational, output
// register, registered operand), the one-cycle register latency and the
// synchronous clear. Expected values come from a cycle model kept here.
module tb_pe;
  import trit_pkg::*;
  localparam int W = 16;
  logic clk = 1'b0, rst_n = 1'b0, clr = 1'b0;
  pe_cfg_t cfg;
  logic [W-1:0] cst, da, db, ya, ym;
  logic fa, fya, fym;
  int checks = 0, failures = 0;

  pe #(.DATA_W(W), .IS_MULT(1'b0)) dut_alu (.clk, .rst_n, .clr, .cfg, .i_const(cst),
    .i_data_a(da), .i_data_b(db), .i_flag_a(fa), .o_data(ya), .o_flag(fya));
  pe #(.DATA_W(W), .IS_MULT(1'b1)) dut_mul (.clk, .rst_n, .clr, .cfg, .i_const(cst),
    .i_data_a(da), .i_data_b(db), .i_flag_a(fa), .o_data(ym), .o_flag(fym));

  always #5 clk = ~clk;

  // Reference state: previous-cycle inputs and results.
  logic [W-1:0] pa, pb, pya, pym; logic pf, pfa, pfm;

  function automatic logic [W-1:0] op_a(src_sel_e s, logic [W-1:0] d, logic [W-1:0] r, logic [W-1:0] c);
    return (s == SRC_REG) ? r : (s == SRC_CONST) ? c : d;
  endfunction

  task automatic check(string what, logic [W-1:0] got, logic [W-1:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h (a_sel=%0d b_sel=%0d y_sel=%0d)",
               what, got, exp, cfg.a_sel, cfg.b_sel, cfg.y_sel);
    end
  endtask

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] oa, ob, ra, rm; logic of_;
    cfg = '0; cst = '0; da = '0; db = '0; fa = 1'b0;
    pa = '0; pb = '0; pya = '0; pym = '0; pf = 1'b0; pfa = 1'b0; pfm = 1'b0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 600; n++) begin
      @(negedge clk);
      // drive new inputs and a random configuration
      cfg.op     = (n % 3 == 0) ? 4'(OP_ADD) : (n % 3 == 1) ? 4'(OP_SUB) : 4'(OP_PASSA);
      cfg.a_sel  = src_sel_e'($urandom_range(0, 2));
      cfg.b_sel  = src_sel_e'($urandom_range(0, 2));
      cfg.f_reg  = 1'b0;
      cfg.y_sel  = out_sel_e'($urandom_range(0, 2));
      cfg.fy_sel = OUT_COMB;
      cst = W'($urandom); da = W'($urandom); db = W'($urandom); fa = 1'($urandom);
      // clear now and then
      clr = (n % 97 == 50);
      #1;
      oa = op_a(cfg.a_sel, da, pa, cst);
      ob = op_a(cfg.b_sel, db, pb, cst);
      ra = (cfg.op == 4'(OP_ADD)) ? W'(oa + ob) : (cfg.op == 4'(OP_SUB)) ? W'(oa - ob) : oa;
      rm = (cfg.op == 4'(OP_ADD)) ? W'(oa * ob) : (cfg.op == 4'(OP_SUB)) ? W'((32'(oa) * 32'(ob)) >> 16) : oa;
      check("alu o_data", ya, (cfg.y_sel == OUT_REG) ? pya : (cfg.y_sel == OUT_BYP) ? pa : ra);
      check("mul o_data", ym, (cfg.y_sel == OUT_REG) ? pym : (cfg.y_sel == OUT_BYP) ? pa : rm);
      @(posedge clk); #1;
      if (clr) begin
        pa = '0; pb = '0; pya = '0; pym = '0;
      end else begin
        pa = da; pb = db; pya = ra; pym = rm;
      end
    end
    // flag path: registered flag operand and flag output register
    @(negedge clk); clr = 1'b0;
    cfg = '0; cfg.op = 4'(OP_PASSA); cfg.f_reg = 1'b1; cfg.fy_sel = OUT_REG;
    fa = 1'b0; repeat (3) @(negedge clk);
    fa = 1'b1; @(negedge clk); fa = 1'b0;
    checks++; if (fya !== 1'b0) begin failures++; $display("FAIL flag came through too early"); end
    @(negedge clk);
    checks++; if (fya !== 1'b1) begin failures++; $display("FAIL flag two-register delay"); end
    @(negedge clk);
    checks++; if (fya !== 1'b0) begin failures++; $display("FAIL flag did not return"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
