// wiring: routing multiplexers of one cell (Fig. 7).
//
// A cell receives, from each of its four sides, the wires driven by the
// cells 1..MAX_HOP positions away on that side, TRACK wires per hop (the
// hop/track model of Fig. 8). From those wires and the local PE output the
// wiring resource chooses, through configured multiplexers:
//   - the word wire and the flag wire it drives towards each side (one per
//     track), and
//   - the PE inputs i_data_a, i_data_b and i_flag_a.
// With TRACK = 1 these are the six word-width and five flag-width
// multiplexers of the source description. A wire a cell drives towards a side is seen
// by every cell 1..MAX_HOP positions away in that direction; this tapping
// of one driven wire at each hop distance is this design's reading, chosen
// because it keeps the multiplexer count of the source description. The select
// encoding is in trit_pkg. Purely combinational.
module wiring
  import trit_pkg::*;
#(
  parameter int unsigned DATA_W  = 16,
  parameter int unsigned TRACK   = 1,
  parameter int unsigned MAX_HOP = 2
) (
  input  logic [wcfg_w(TRACK)-1:0]                     cfg,
  input  logic [3:0][MAX_HOP-1:0][TRACK-1:0][DATA_W-1:0] in_w,
  input  logic [3:0][MAX_HOP-1:0][TRACK-1:0]           in_f,
  input  logic [DATA_W-1:0]                            pe_data,
  input  logic                                         pe_flag,
  output logic [3:0][TRACK-1:0][DATA_W-1:0]            out_w,
  output logic [3:0][TRACK-1:0]                        out_f,
  output logic [DATA_W-1:0]                            pe_a,
  output logic [DATA_W-1:0]                            pe_b,
  output logic                                         pe_fa
);
  localparam int unsigned NWIRE = 4 * MAX_HOP * TRACK;

  // Incoming wires as one flat list in src_idx order.
  logic [NWIRE-1:0][DATA_W-1:0] wl;
  logic [NWIRE-1:0]             fl;
  assign wl = in_w;
  assign fl = in_f;

  function automatic logic [SEL_W-1:0] sel_of(logic [wcfg_w(TRACK)-1:0] c, int unsigned k);
    return c[k*SEL_W +: SEL_W];
  endfunction

  function automatic logic [DATA_W-1:0] pick_w(logic [SEL_W-1:0] s, logic [DATA_W-1:0] local_v,
                                               logic [NWIRE-1:0][DATA_W-1:0] w);
    logic [DATA_W-1:0] v;
    v = '0;
    if (s == '0) v = local_v;
    else begin
      for (int unsigned i = 0; i < NWIRE; i++)
        if (int'(s) == int'(i) + 1) v = w[i];
    end
    return v;
  endfunction

  function automatic logic pick_f(logic [SEL_W-1:0] s, logic local_v, logic [NWIRE-1:0] w);
    logic v;
    v = 1'b0;
    if (s == '0) v = local_v;
    else begin
      for (int unsigned i = 0; i < NWIRE; i++)
        if (int'(s) == int'(i) + 1) v = w[i];
    end
    return v;
  endfunction

  always_comb begin
    for (int unsigned n = 0; n < 4; n++) begin
      for (int unsigned t = 0; t < TRACK; t++) begin
        out_w[n][t] = pick_w(sel_of(cfg, fld_out(TRACK, n, t)), pe_data, wl);
        out_f[n][t] = pick_f(sel_of(cfg, fld_fout(TRACK, n, t)), pe_flag, fl);
      end
    end
    pe_a  = pick_w(sel_of(cfg, fld_a(TRACK)), '0, wl);
    pe_b  = pick_w(sel_of(cfg, fld_b(TRACK)), '0, wl);
    pe_fa = pick_f(sel_of(cfg, FLD_FA), 1'b0, fl);
  end
endmodule
