// hyb_stage: one gate-level stage of a hybrid-encoded domino pipeline.
//
// A stage is a logic block (one critical dual-rail SLG plus W single-rail
// domino gates), a completion detector and a stage controller. The critical
// SLG is linked to the critical pair(s) 'link_in' of the preceding stage(s);
// its inputs 'crit_x' and the single-rail functions 'sr_f' are computed by the
// enclosing circuit from the preceding stage's outputs. The stage cycles
// evaluate -> isolate -> precharge -> evaluate: it evaluates when its inputs
// are valid, isolates itself right after (so it holds its data while the
// previous stage precharges and brings the next item), and precharges only
// when the next stage acknowledges (T).
//
// STYLE selects the handshake:
//  * STYLE_EA (early acknowledge): the completion detector watches the
//    incoming critical pair(s) together with this stage's pc/ev and raises S
//    in the same tick the logic block evaluates. Cycle time in ticks:
//    t_ev + t_CD(N+1) + t_NAND3 + t_CD(N) + t_NAND3 = 5.
//  * STYLE_PD (post detection): a NAND2 on the critical SLG's dynamic nodes
//    raises S one tick after the block has evaluated and drops it one tick
//    after it has precharged. Cycle: t_ev + t_ev(N+1) + t_NAND2(N+1) +
//    t_NAND3 + t_pc + t_NAND2 + t_NAND3 = 7 ticks.
// Both use the same stage controller. S goes to the previous stage as its T;
// 'cr_out' and 'sr_out' are the stage's outputs; latency is one tick.
//
// From the published design: the stage structure (logic block, completion
// detector, stage controller) and where each style's detector looks. Own
// choice: the single-rail gates evaluate only once all links are valid, and
// the drive buffers on pc/ev are not modelled (they add no tick).
module hyb_stage
  import hyb_pkg::*;
#(
  parameter style_e            STYLE = STYLE_EA,
  parameter int unsigned       NJOIN = 1,
  parameter int unsigned       NIN   = 1,
  parameter logic [2**NIN-1:0] TT    = TT_BUF,
  parameter int unsigned       W     = 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  dr_t  [NJOIN-1:0] link_in,
  input  logic [NIN-1:0]   crit_x,
  input  logic [W-1:0]     sr_f,
  input  logic             t,
  output logic             s,
  output dr_t              cr_out,
  output logic [W-1:0]     sr_out,
  output logic             pc,
  output logic             ev
);

  logic inputs_valid;
  logic x_node, xn_node;
  logic t_prime;

  always_comb begin
    inputs_valid = 1'b1;
    for (int i = 0; i < int'(NJOIN); i++) inputs_valid &= dr_valid(link_in[i]);
  end

  dr_slg #(.NIN(NIN), .NLINK(NJOIN), .TT(TT)) u_slg (
    .clk, .rst_n, .pc, .ev,
    .link(link_in), .x(crit_x),
    .out(cr_out), .x_node, .xn_node
  );

  domino_sr #(.W(W)) u_sr (
    .clk, .rst_n, .pc, .ev,
    .en(inputs_valid), .f(sr_f), .out(sr_out)
  );

  if (STYLE == STYLE_EA) begin : g_ea
    cd_ea #(.NJOIN(NJOIN)) u_cd (.clk, .rst_n, .pc, .ev, .d(link_in), .s);
  end else begin : g_pd
    cd_pd u_cd (.clk, .rst_n, .x(x_node), .x_n(xn_node), .s);
  end

  stage_controller u_sc (.clk, .rst_n, .s, .t, .pc, .ev, .t_prime);

endmodule
