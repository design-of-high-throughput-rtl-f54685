// dr_slg: dual-rail domino synchronizing logic gate (SLG), with optional latch
// function (SLGL).
//
// The gate has one pull-down path per input minterm, each with the same number
// of series transistors; exactly one path conducts for any valid input, so the
// gate delay does not depend on the data. A path belonging to a minterm where
// the truth table TT is 1 discharges the true node, otherwise the false node;
// the outputs 'out.t'/'out.f' are the inverted nodes. The gate only
// evaluates when every dual-rail link input is valid: 'link' are the critical
// pairs of the preceding stage(s). With NLINK=1 and the link also feeding 'x'
// this is the plain SLG of a natural critical-path link; used only as enables
// it is the SLGL, whose extra series enable transistors are driven by the
// previous stage's SLG; NLINK>1 is the first gate of a JOIN, linked to every
// incoming critical path.
//
// Phases follow (pc,ev): precharge gives the spacer (0,0), evaluate discharges
// one node when the links are valid (monotonic, held by the keepers), isolate
// holds. One tick of delay from inputs to output. The plain input values 'x'
// are the gate's data inputs, already known to be valid when the links are.
//
// From the published design: one conducting pull-down path per input
// combination, gated by the links of the SLGL and by decoupled pc/ev. Own
// choice: the gate function is a truth-table parameter, and the dynamic nodes
// are the complements of the registered rails.
module dr_slg
  import hyb_pkg::*;
#(
  parameter int unsigned      NIN   = 2,
  parameter int unsigned      NLINK = 1,
  parameter logic [2**NIN-1:0] TT   = TT_AND2
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             pc,
  input  logic             ev,
  input  dr_t  [NLINK-1:0] link,
  input  logic [NIN-1:0]   x,
  output dr_t              out,
  output logic             x_node,    // dynamic node of the true rail (active low)
  output logic             xn_node    // dynamic node of the false rail (active low)
);

  logic              links_ok;
  logic [2**NIN-1:0] path_on;
  logic              dis_t, dis_f;

  always_comb begin
    links_ok = 1'b1;
    for (int i = 0; i < int'(NLINK); i++) links_ok &= dr_valid(link[i]);
    path_on = '0;
    path_on[x] = links_ok & pc & ev;
    dis_t = |(path_on & TT);
    dis_f = |(path_on & ~TT);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)           out <= DR_SPACER;
    else if (!pc && !ev)  out <= DR_SPACER;
    else if (pc && ev)    out <= '{t: out.t | dis_t, f: out.f | dis_f};
  end

  assign x_node  = ~out.t;
  assign xn_node = ~out.f;

  // Table 3.1 property: at most one pull-down path conducts.
  a_one_path:  assert property (@(posedge clk) disable iff (!rst_n) $onehot0(path_on));
  a_no_both:   assert property (@(posedge clk) disable iff (!rst_n) !(out.t && out.f));

endmodule
