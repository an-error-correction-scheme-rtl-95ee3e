// trit_pkg: types and constants shared by the time-redundant CGRA.
//
// The CGRA is a 2-D array of cells (PE + wiring resource + configuration
// memory) next to a data memory holding one output buffer. The time-
// redundancy control follows the immediate-termination scheme: a primary
// exec fills the buffer, a comparing exec stops at the first mismatch X, and
// a verifying exec decides at X which of the two runs was right.
//
// This package holds the configuration word layout of a cell, the PE and
// function-unit encodings, the exec modes and the result codes. The layout
// and all encodings are this design's own; the source description fixes only which
// multiplexers and registers exist (six word and five flag multiplexers per
// wiring resource, three operand sources per PE input).
package trit_pkg;

  // Width of every wiring multiplexer select. Five bits address up to 31
  // sources: four sides x TRACK x hops, plus the local PE output.
  localparam int unsigned SEL_W = 5;

  // Sides of a cell are numbered N = 0, E = 1, S = 2, W = 3, both for the
  // side a wire enters from and for the direction an outgoing wire travels.

  // Function-unit operation. The ALU cell uses all of them; the MULT cell
  // reads the same 4-bit field with its own meaning (see mult_op_e).
  typedef enum logic [3:0] {
    OP_ADD   = 4'd0,   // y = a + b,            flag = carry out
    OP_SUB   = 4'd1,   // y = a - b,            flag = borrow
    OP_AND   = 4'd2,   // y = a & b,            flag = (y == 0)
    OP_OR    = 4'd3,   // y = a | b,            flag = (y == 0)
    OP_XOR   = 4'd4,   // y = a ^ b,            flag = (y == 0)
    OP_NOT   = 4'd5,   // y = ~a,               flag = (y == 0)
    OP_SLL   = 4'd6,   // y = a << b[3:0],      flag = (y == 0)
    OP_SRL   = 4'd7,   // y = a >> b[3:0],      flag = (y == 0)
    OP_SRA   = 4'd8,   // y = a >>> b[3:0],     flag = (y == 0)
    OP_LT    = 4'd9,   // y = (a < b) signed,   flag = same
    OP_EQ    = 4'd10,  // y = (a == b),         flag = same
    OP_SEL   = 4'd11,  // y = f ? a : b,        flag = f
    OP_ADDC  = 4'd12,  // y = a + b + f,        flag = carry out
    OP_MAX   = 4'd13,  // y = max(a, b) signed, flag = (a >= b)
    OP_PASSA = 4'd14,  // y = a,                flag = f
    OP_PASSB = 4'd15   // y = b,                flag = f
  } alu_op_e;

  // Meaning of the operation field in a MULT cell.
  typedef enum logic [3:0] {
    MOP_MULL  = 4'd0,  // low half of a * b,               flag = (y == 0)
    MOP_MULHU = 4'd1,  // high half, unsigned operands,    flag = (y == 0)
    MOP_MULHS = 4'd2,  // high half, signed operands,      flag = product < 0
    MOP_MULLF = 4'd3   // low half, only when f, else 0,   flag = f
  } mult_op_e;

  // Operand source of a PE input (Fig. 6: direct, registered or constant).
  typedef enum logic [1:0] {
    SRC_DIRECT = 2'd0,
    SRC_REG    = 2'd1,
    SRC_CONST  = 2'd2
  } src_sel_e;

  // PE output source: function-unit result, output register, or the
  // registered operand (a pure delay through the cell).
  typedef enum logic [1:0] {
    OUT_COMB = 2'd0,
    OUT_REG  = 2'd1,
    OUT_BYP  = 2'd2
  } out_sel_e;

  typedef struct packed {
    logic [3:0] op;       // alu_op_e or mult_op_e
    src_sel_e   a_sel;
    src_sel_e   b_sel;
    logic       f_reg;    // 1: flag operand from r_flag_a, 0: direct
    out_sel_e   y_sel;    // o_data source
    out_sel_e   fy_sel;   // o_flag source
  } pe_cfg_t;

  // Wiring resource configuration. It is a flat vector because its size
  // depends on TRACK: 4*TRACK outgoing word multiplexers, two PE word input
  // multiplexers, 4*TRACK outgoing flag multiplexers and one PE flag input
  // multiplexer, each SEL_W bits wide. Field k occupies bits
  // [k*SEL_W +: SEL_W]; the field numbers are given by the functions below.
  // For TRACK = 1 that is six word and five flag multiplexers.
  //
  // Select values: 0 is the local PE output for the outgoing multiplexers
  // and a constant 0 for the PE input multiplexers; 1 + src_idx(side, hop,
  // track) is the wire that arrives from that side, driven by the cell
  // hop+1 cells away, on that track. Larger values select 0.
  function automatic int unsigned wcfg_w(int unsigned track);
    return (8*track + 3) * SEL_W;
  endfunction
  localparam int unsigned FLD_FA = 0;
  function automatic int unsigned fld_fout(int unsigned track, int unsigned side, int unsigned t);
    return 1 + side*track + t;
  endfunction
  function automatic int unsigned fld_b(int unsigned track);
    return 1 + 4*track;
  endfunction
  function automatic int unsigned fld_a(int unsigned track);
    return 2 + 4*track;
  endfunction
  function automatic int unsigned fld_out(int unsigned track, int unsigned side, int unsigned t);
    return 3 + 4*track + side*track + t;
  endfunction
  function automatic int unsigned src_idx(int unsigned max_hop, int unsigned track,
                                          int unsigned side, int unsigned hop, int unsigned t);
    return (side*max_hop + hop)*track + t;
  endfunction

  // Width of a cell configuration word: {i_const, pe_cfg_t, wiring}.
  function automatic int unsigned cell_cfg_w(int unsigned data_w, int unsigned track);
    return data_w + $bits(pe_cfg_t) + wcfg_w(track);
  endfunction

  // Default placement of MULT cells: a checkerboard, MULT where row + column
  // is odd. Bit r*cols + c stands for cell (r, c); arrays up to 256 cells.
  function automatic logic [255:0] checkerboard(int unsigned rows, int unsigned cols);
    logic [255:0] m;
    m = '0;
    for (int unsigned r = 0; r < rows; r++)
      for (int unsigned c = 0; c < cols; c++)
        if (r*cols + c < 256) m[r*cols + c] = ((r + c) % 2) == 1;
    return m;
  endfunction

  // The three runs of one exec block.
  typedef enum logic [1:0] {
    EX_PRIMARY = 2'd0,
    EX_COMPARE = 2'd1,
    EX_VERIFY  = 2'd2
  } exec_mode_e;

  // Commands from the array controller to the memory controller.
  typedef enum logic [1:0] {
    MC_LOAD = 2'd0,   // accept N primary input words from the external system
    MC_EXEC = 2'd1,   // run one exec in the given exec_mode_e
    MC_SEND = 2'd2    // stream the N buffered outputs to the external system
  } mc_cmd_e;

  // Outcome of one block of N outputs.
  typedef enum logic [1:0] {
    RES_MATCH      = 2'd0,  // comparing exec matched the buffer entirely
    RES_PRIMARY_OK = 2'd1,  // verifying exec agreed with the primary at X
    RES_COMPARE_OK = 2'd2   // verifying exec disagreed with the primary at X:
                            // the comparing exec is taken as right and the
                            // buffer is overwritten from X onwards
  } result_e;

  // Controller phase, brought out for observation.
  typedef enum logic [3:0] {
    PH_IDLE    = 4'd0,
    PH_LOAD_IN = 4'd1,
    PH_CFG     = 4'd2,
    PH_EXEC1   = 4'd3,
    PH_EXEC2   = 4'd4,
    PH_EXEC3   = 4'd5,
    PH_SEND    = 4'd6,
    PH_START   = 4'd7
  } phase_e;

endpackage
