// tb_cfg_pkg: helpers that build cell configuration words for testbenches.
//
// Written for the default array geometry (16-bit words, TRACK = 1,
// MAX_HOP = 2). A word is {i_const, pe_cfg_t, wiring selects}; the wiring
// field order is given by the trit_pkg field functions. src(side, hop)
// names the wire arriving from a side after 1 or 2 hops; SEL_PE selects the
// local PE output (outgoing multiplexers) or 0 (PE inputs); SEL_OFF selects
// 0 everywhere.
package tb_cfg_pkg;
  import trit_pkg::*;

  localparam int unsigned TDW   = 16;
  localparam int unsigned TTRK  = 1;
  localparam int unsigned THOP  = 2;
  localparam int unsigned TCFGW = cell_cfg_w(TDW, TTRK);
  localparam int unsigned TWCW  = wcfg_w(TTRK);

  localparam logic [SEL_W-1:0] SEL_PE  = '0;
  localparam logic [SEL_W-1:0] SEL_OFF = '1;

  function automatic logic [SEL_W-1:0] src(int unsigned side, int unsigned hop);
    return SEL_W'(1 + src_idx(THOP, TTRK, side, hop - 1, 0));
  endfunction

  // Wiring word from the eleven selects: outgoing N, E, S, W, PE a, PE b,
  // outgoing flags N, E, S, W, PE flag.
  function automatic logic [TWCW-1:0] wcfg(
      logic [SEL_W-1:0] on, logic [SEL_W-1:0] oe, logic [SEL_W-1:0] os, logic [SEL_W-1:0] ow,
      logic [SEL_W-1:0] a,  logic [SEL_W-1:0] b,
      logic [SEL_W-1:0] fn, logic [SEL_W-1:0] fe, logic [SEL_W-1:0] fs, logic [SEL_W-1:0] fw,
      logic [SEL_W-1:0] fa);
    logic [TWCW-1:0] w;
    w = '0;
    w[fld_out(TTRK, 0, 0)*SEL_W +: SEL_W]  = on;
    w[fld_out(TTRK, 1, 0)*SEL_W +: SEL_W]  = oe;
    w[fld_out(TTRK, 2, 0)*SEL_W +: SEL_W]  = os;
    w[fld_out(TTRK, 3, 0)*SEL_W +: SEL_W]  = ow;
    w[fld_a(TTRK)*SEL_W +: SEL_W]          = a;
    w[fld_b(TTRK)*SEL_W +: SEL_W]          = b;
    w[fld_fout(TTRK, 0, 0)*SEL_W +: SEL_W] = fn;
    w[fld_fout(TTRK, 1, 0)*SEL_W +: SEL_W] = fe;
    w[fld_fout(TTRK, 2, 0)*SEL_W +: SEL_W] = fs;
    w[fld_fout(TTRK, 3, 0)*SEL_W +: SEL_W] = fw;
    w[FLD_FA*SEL_W +: SEL_W]               = fa;
    return w;
  endfunction

  function automatic pe_cfg_t pcfg(logic [3:0] op, src_sel_e a, src_sel_e b, logic f_reg,
                                   out_sel_e y, out_sel_e fy);
    pe_cfg_t p;
    p.op = op; p.a_sel = a; p.b_sel = b; p.f_reg = f_reg; p.y_sel = y; p.fy_sel = fy;
    return p;
  endfunction

  function automatic logic [TCFGW-1:0] word(logic [TDW-1:0] cst, pe_cfg_t p, logic [TWCW-1:0] w);
    return {cst, p, w};
  endfunction

  // A cell that only forwards: every outgoing wire and PE input off.
  function automatic logic [TCFGW-1:0] idle_word();
    return word('0, pcfg(4'(OP_PASSA), SRC_DIRECT, SRC_DIRECT, 1'b0, OUT_REG, OUT_REG),
                wcfg(SEL_OFF, SEL_OFF, SEL_OFF, SEL_OFF, SEL_OFF, SEL_OFF,
                     SEL_OFF, SEL_OFF, SEL_OFF, SEL_OFF, SEL_OFF));
  endfunction

  // Bit position of bit 0 of i_const inside a configuration word.
  localparam int unsigned CONST_LSB = $bits(pe_cfg_t) + TWCW;
endpackage
