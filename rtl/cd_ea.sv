// cd_ea: completion detector of the early-acknowledge (EA-Hybrid) style.
//
// It sits at the input side of its stage and anticipates the stage's
// evaluation and precharge, so the acknowledge reaches the previous stage
// without waiting for the logic block. Output S goes high when every incoming
// critical dual-rail pair is valid while the own stage is ready to evaluate
// (pc=ev=1), goes low when the own stage is told to precharge (pc=ev=0), and
// holds while the stage is isolated (pc=1, ev=0). NJOIN>1 is the detector of
// a JOIN stage, which has one more series NMOS per extra incoming critical
// path. S is cleared by reset and changes one tick after its inputs.
//
// From the published design: the set/clear/hold behaviour and the extra series
// transistor per JOINed path. Own choice: the transistor network is modelled by
// that behaviour on the unit-delay tick.
module cd_ea
  import hyb_pkg::*;
#(
  parameter int unsigned NJOIN = 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             pc,
  input  logic             ev,
  input  dr_t  [NJOIN-1:0] d,
  output logic             s
);

  logic all_valid;

  always_comb begin
    all_valid = 1'b1;
    for (int i = 0; i < int'(NJOIN); i++) all_valid &= dr_valid(d[i]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                    s <= 1'b0;
    else if (pc && ev && all_valid) s <= 1'b1;
    else if (!pc && !ev)           s <= 1'b0;
  end

endmodule
