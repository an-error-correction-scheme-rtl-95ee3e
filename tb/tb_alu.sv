// tb_alu: checks every ALU operation on random and corner operands against
// a reference written from the operation table in trit_pkg.
module tb_alu;
  import trit_pkg::*;
  localparam int W = 16;
  logic [3:0] op; logic [W-1:0] a, b, y; logic f, fy;
  int checks = 0, failures = 0;

  alu #(.DATA_W(W)) dut (.op, .a, .b, .f, .y, .fy);

  task automatic expect_ref();
    logic [W-1:0] ey; logic ef; int sa, sb; int unsigned ua, ub, s;
    ua = a; ub = b; sa = $signed(a); sb = $signed(b); s = b % 16;
    case (op)
      0:  begin ey = W'(ua + ub);      ef = (ua + ub) > 32'hFFFF; end
      1:  begin ey = W'(ua - ub);      ef = ua < ub; end
      2:  begin ey = a & b;            ef = ey == 0; end
      3:  begin ey = a | b;            ef = ey == 0; end
      4:  begin ey = a ^ b;            ef = ey == 0; end
      5:  begin ey = ~a;               ef = ey == 0; end
      6:  begin ey = W'(ua << s);      ef = ey == 0; end
      7:  begin ey = W'(ua >> s);      ef = ey == 0; end
      8:  begin ey = W'(sa >>> s);     ef = ey == 0; end
      9:  begin ey = (sa < sb) ? 1 : 0; ef = sa < sb; end
      10: begin ey = (ua == ub) ? 1 : 0; ef = ua == ub; end
      11: begin ey = f ? a : b;        ef = f; end
      12: begin ey = W'(ua + ub + f);  ef = (ua + ub + f) > 32'hFFFF; end
      13: begin ey = (sa >= sb) ? a : b; ef = sa >= sb; end
      14: begin ey = a;                ef = f; end
      default: begin ey = b;           ef = f; end
    endcase
    checks++;
    if (y !== ey || fy !== ef) begin
      failures++;
      $display("FAIL op=%0d a=%h b=%h f=%b -> y=%h fy=%b, expected %h %b", op, a, b, f, y, fy, ey, ef);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] corner [6];
    corner = '{16'h0000, 16'h0001, 16'h7FFF, 16'h8000, 16'hFFFF, 16'h00F3};
    for (int o = 0; o < 16; o++) begin
      for (int i = 0; i < 6; i++)
        for (int k = 0; k < 6; k++) begin
          op = 4'(o); a = corner[i]; b = corner[k]; f = 1'(i + k); #1; expect_ref();
        end
      for (int n = 0; n < 200; n++) begin
        op = 4'(o); a = W'($urandom); b = W'($urandom); f = 1'($urandom); #1; expect_ref();
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
