// pe: processing element of an ALU cell or a MULT cell (Fig. 6 structure).
//
// Inputs i_data_a, i_data_b and i_flag_a come from the wiring resource.
// Each is captured every cycle in an input register (r_data_a, r_data_b,
// r_flag_a). The two word operands are chosen by 3:1 multiplexers among the
// direct input, its register and the configured constant i_const; the flag
// operand among the direct flag and r_flag_a. The function unit is an ALU
// (IS_MULT = 0) or a multiplier (IS_MULT = 1). Its result is captured in
// r_data_y / r_flag_y, and output multiplexers choose what leaves the PE:
// the combinational result, the output register, or the registered operand
// (word: r_data_a, flag: the selected flag operand).
//
// Timing: OUT_COMB gives a path with no register, OUT_REG one cycle of
// latency; a registered operand adds one more. All registers are cleared by
// rst_n and by clr, which the array raises while the configuration is being
// reloaded, so every exec starts from the same state.
//
// From the source description: the register set, the constant operand, the ALU/MULT
// split and the presence of operand and output multiplexers. This design's
// own: the exact inputs of each multiplexer (read from the drawing), the
// select encodings, and the synchronous clear.
module pe
  import trit_pkg::*;
#(
  parameter int unsigned DATA_W  = 16,
  parameter bit          IS_MULT = 1'b0
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              clr,
  input  pe_cfg_t           cfg,
  input  logic [DATA_W-1:0] i_const,
  input  logic [DATA_W-1:0] i_data_a,
  input  logic [DATA_W-1:0] i_data_b,
  input  logic              i_flag_a,
  output logic [DATA_W-1:0] o_data,
  output logic              o_flag
);
  logic [DATA_W-1:0] r_data_a, r_data_b, r_data_y;
  logic              r_flag_a, r_flag_y;
  logic [DATA_W-1:0] opa, opb, fu_y;
  logic              opf, fu_f;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r_data_a <= '0;
      r_data_b <= '0;
      r_flag_a <= 1'b0;
      r_data_y <= '0;
      r_flag_y <= 1'b0;
    end else if (clr) begin
      r_data_a <= '0;
      r_data_b <= '0;
      r_flag_a <= 1'b0;
      r_data_y <= '0;
      r_flag_y <= 1'b0;
    end else begin
      r_data_a <= i_data_a;
      r_data_b <= i_data_b;
      r_flag_a <= i_flag_a;
      r_data_y <= fu_y;
      r_flag_y <= fu_f;
    end
  end

  always_comb begin
    unique case (cfg.a_sel)
      SRC_REG:   opa = r_data_a;
      SRC_CONST: opa = i_const;
      default:   opa = i_data_a;
    endcase
    unique case (cfg.b_sel)
      SRC_REG:   opb = r_data_b;
      SRC_CONST: opb = i_const;
      default:   opb = i_data_b;
    endcase
    opf = cfg.f_reg ? r_flag_a : i_flag_a;
  end

  if (IS_MULT) begin : g_mult
    mult_unit #(.DATA_W(DATA_W)) u_fu (
      .op(cfg.op), .a(opa), .b(opb), .f(opf), .y(fu_y), .fy(fu_f));
  end else begin : g_alu
    alu #(.DATA_W(DATA_W)) u_fu (
      .op(cfg.op), .a(opa), .b(opb), .f(opf), .y(fu_y), .fy(fu_f));
  end

  always_comb begin
    unique case (cfg.y_sel)
      OUT_REG: o_data = r_data_y;
      OUT_BYP: o_data = r_data_a;
      default: o_data = fu_y;
    endcase
    unique case (cfg.fy_sel)
      OUT_REG: o_flag = r_flag_y;
      OUT_BYP: o_flag = opf;
      default: o_flag = fu_f;
    endcase
  end
endmodule
