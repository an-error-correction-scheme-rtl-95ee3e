// alu: function unit of the ALU cell.
//
// Purely combinational. Takes two words (a, b) and one flag (f) and returns
// a word y and a flag fy according to the 4-bit operation code of
// trit_pkg::alu_op_e. The source description says only that the ALU executes
// arithmetic and logical operations on two data inputs and one flag input;
// the operation list and the flag meaning of each operation are this
// design's own choice.
module alu
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
  localparam int unsigned SH_W = (DATA_W > 1) ? $clog2(DATA_W) : 1;

  logic [DATA_W:0]   sum;
  logic [DATA_W:0]   dif;
  logic [DATA_W:0]   sumc;
  logic [SH_W-1:0]   sh;
  logic              lt;

  always_comb begin
    sum  = {1'b0, a} + {1'b0, b};
    dif  = {1'b0, a} - {1'b0, b};
    sumc = {1'b0, a} + {1'b0, b} + {{DATA_W{1'b0}}, f};
    sh   = b[SH_W-1:0];
    lt   = $signed(a) < $signed(b);
    y    = '0;
    fy   = 1'b0;
    unique case (alu_op_e'(op))
      OP_ADD:   begin y = sum[DATA_W-1:0];  fy = sum[DATA_W];  end
      OP_SUB:   begin y = dif[DATA_W-1:0];  fy = dif[DATA_W];  end
      OP_AND:   begin y = a & b;            fy = (y == '0);    end
      OP_OR:    begin y = a | b;            fy = (y == '0);    end
      OP_XOR:   begin y = a ^ b;            fy = (y == '0);    end
      OP_NOT:   begin y = ~a;               fy = (y == '0);    end
      OP_SLL:   begin y = a << sh;          fy = (y == '0);    end
      OP_SRL:   begin y = a >> sh;          fy = (y == '0);    end
      OP_SRA:   begin y = DATA_W'($signed(a) >>> sh); fy = (y == '0); end
      OP_LT:    begin y = DATA_W'(lt);      fy = lt;           end
      OP_EQ:    begin y = DATA_W'(a == b);  fy = (a == b);     end
      OP_SEL:   begin y = f ? a : b;        fy = f;            end
      OP_ADDC:  begin y = sumc[DATA_W-1:0]; fy = sumc[DATA_W]; end
      OP_MAX:   begin y = lt ? b : a;       fy = !lt;          end
      OP_PASSA: begin y = a;                fy = f;            end
      OP_PASSB: begin y = b;                fy = f;            end
      default:  begin y = '0;               fy = 1'b0;         end
    endcase
  end
endmodule
