// tb_wiring: drives random wires and random selects into the wiring
// resource of the default geometry and checks every multiplexer against a
// reference that decodes the select as side, hop and track.
module tb_wiring;
  import trit_pkg::*;
  localparam int W = 16, T = 1, H = 2;
  logic [wcfg_w(T)-1:0] cfg;
  logic [3:0][H-1:0][T-1:0][W-1:0] in_w;
  logic [3:0][H-1:0][T-1:0] in_f;
  logic [W-1:0] pe_data, pe_a, pe_b;
  logic pe_flag, pe_fa;
  logic [3:0][T-1:0][W-1:0] out_w;
  logic [3:0][T-1:0] out_f;
  int checks = 0, failures = 0;

  wiring #(.DATA_W(W), .TRACK(T), .MAX_HOP(H)) dut (.cfg, .in_w, .in_f, .pe_data, .pe_flag,
    .out_w, .out_f, .pe_a, .pe_b, .pe_fa);

  function automatic logic [W-1:0] ref_w(int s, logic [W-1:0] lv);
    int side, hop;
    if (s == 0) return lv;
    if (s > 4*H*T) return '0;
    side = (s - 1) / H; hop = (s - 1) % H;
    return in_w[side][hop][0];
  endfunction
  function automatic logic ref_f(int s, logic lv);
    int side, hop;
    if (s == 0) return lv;
    if (s > 4*H*T) return 1'b0;
    side = (s - 1) / H; hop = (s - 1) % H;
    return in_f[side][hop][0];
  endfunction
  function automatic int sel(int k);
    return int'(cfg[k*SEL_W +: SEL_W]);
  endfunction

  task automatic chk(string what, logic [W-1:0] got, logic [W-1:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s got %h exp %h", what, got, exp); end
  endtask

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int n = 0; n < 2000; n++) begin
      for (int k = 0; k < 11; k++) cfg[k*SEL_W +: SEL_W] = SEL_W'((n < 400) ? (n + k) % 10 : $urandom_range(0, 31));
      for (int s = 0; s < 4; s++) for (int h = 0; h < H; h++) begin
        in_w[s][h][0] = W'($urandom); in_f[s][h][0] = 1'($urandom);
      end
      pe_data = W'($urandom); pe_flag = 1'($urandom);
      #1;
      for (int d = 0; d < 4; d++) begin
        chk($sformatf("out_w[%0d]", d), out_w[d][0], ref_w(sel(3 + 4 + d), pe_data));
        chk($sformatf("out_f[%0d]", d), W'(out_f[d][0]), W'(ref_f(sel(1 + d), pe_flag)));
      end
      chk("pe_a", pe_a, ref_w(sel(6), '0));
      chk("pe_b", pe_b, ref_w(sel(5), '0));
      chk("pe_fa", W'(pe_fa), W'(ref_f(sel(0), 1'b0)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
