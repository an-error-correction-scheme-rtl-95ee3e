// mult_unit: function unit of the MULT cell.
//
// Purely combinational. The source description says only that in the MULT cell a
// multiplier replaces the ALU; the operation field is this design's own
// (trit_pkg::mult_op_e): low half of the product, high half with unsigned or
// signed operands, or a flag-gated low half; any other code passes a. The
// full 2*DATA_W product is
// formed once and the requested half is selected.
module mult_unit
  import trit_pkg::*;
#(
  parameter int unsigned DATA_W = 16
) (
  input  logic [3:0]        op,
  input  logic [DATA_W-1:0] a,
  input  logic [DATA_W-1:0] b,
  input  logic              f,
  output logic [DATA_W-1:0] y,
  output logic              fy
);
  logic [2*DATA_W-1:0] pu;
  logic [2*DATA_W-1:0] ps;

  always_comb begin
    pu = {{DATA_W{1'b0}}, a} * {{DATA_W{1'b0}}, b};
    ps = (2*DATA_W)'($signed({{DATA_W{a[DATA_W-1]}}, a}) * $signed({{DATA_W{b[DATA_W-1]}}, b}));
    y  = '0;
    fy = 1'b0;
    unique case (op)
      4'(MOP_MULL):  begin y = pu[DATA_W-1:0];        fy = (y == '0);        end
      4'(MOP_MULHU): begin y = pu[2*DATA_W-1:DATA_W]; fy = (y == '0);        end
      4'(MOP_MULHS): begin y = ps[2*DATA_W-1:DATA_W]; fy = ps[2*DATA_W-1];   end
      4'(MOP_MULLF): begin y = f ? pu[DATA_W-1:0] : '0; fy = f;              end
      default:       begin y = a;                     fy = f;                end
    endcase
  end
endmodule
