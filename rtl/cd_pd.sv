// cd_pd: completion detector of the post-detection (PD-Hybrid) style.
//
// A static 2-input NAND on the two dynamic nodes x and x_n of the stage's own
// critical SLG. Both nodes high (precharged) gives 0, meaning the stage has
// finished precharging; one node discharged gives 1, meaning the stage has
// finished evaluating. It does not look at pc/ev. The output is the gate
// delayed by one tick and is 0 during reset.
//
// From the published design: the NAND2 on the SLG's dynamic nodes. Own choice:
// the one-tick delay of the unit-delay model.
module cd_pd (
  input  logic clk,
  input  logic rst_n,
  input  logic x,
  input  logic x_n,
  output logic s
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) s <= 1'b0;
    else        s <= ~(x & x_n);
  end

endmodule
