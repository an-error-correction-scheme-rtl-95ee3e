// tb_mult_unit: checks the multiplier operations against 64-bit integer
// products on corner and random operands.
module tb_mult_unit;
  localparam int W = 16;
  logic [3:0] op; logic [W-1:0] a, b, y; logic f, fy;
  int checks = 0, failures = 0;

  mult_unit #(.DATA_W(W)) dut (.op, .a, .b, .f, .y, .fy);

  task automatic expect_ref();
    logic [W-1:0] ey; logic ef; longint pu, ps;
    pu = longint'(a) * longint'(b);
    ps = longint'($signed(a)) * longint'($signed(b));
    case (op)
      0: begin ey = pu[15:0];  ef = ey == 0; end
      1: begin ey = pu[31:16]; ef = ey == 0; end
      2: begin ey = ps[31:16]; ef = ps < 0; end
      3: begin ey = f ? pu[15:0] : 16'h0; ef = f; end
      default: begin ey = a; ef = f; end
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
    logic [W-1:0] corner [5];
    corner = '{16'h0000, 16'h0001, 16'h7FFF, 16'h8000, 16'hFFFF};
    for (int o = 0; o < 6; o++) begin
      for (int i = 0; i < 5; i++)
        for (int k = 0; k < 5; k++) begin
          op = 4'(o); a = corner[i]; b = corner[k]; f = 1'(i ^ k); #1; expect_ref();
        end
      for (int n = 0; n < 300; n++) begin
        op = 4'(o); a = W'($urandom); b = W'($urandom); f = 1'($urandom); #1; expect_ref();
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
