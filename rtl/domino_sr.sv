// domino_sr: a row of single-rail domino gates of one logic block.
//
// Each gate has a precharge PMOS driven by 'pc' and a foot (evaluate) NMOS
// driven by 'ev', decoupled so the gate has three phases: precharge
// (pc,ev)=(0,0) clears the output to 0, evaluate (1,1) lets the output rise
// when the pull-down function is true, and isolate (1,0) turns both networks
// off so the output holds whatever the inputs do. The keeper makes a
// discharged node stay discharged, so in evaluate the output is monotonic
// (out |= f). The pull-down function values 'f' are computed by the enclosing
// circuit from the previous stage's outputs.
//
// 'en' is this design's stand-in for "the single-rail inputs have arrived":
// it is the validity of the critical dual-rail path feeding the stage. The
// hybrid scheme relies on the critical path being the slowest path of a
// stage, so once it is valid every single-rail input is valid as well; in the
// unit-delay model that holds by construction. Timing: the output changes one
// tick after the phase/inputs that cause it. The (0,1) control pair never
// occurs and is treated as hold.
module domino_sr #(
  parameter int unsigned W = 1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         pc,
  input  logic         ev,
  input  logic         en,
  input  logic [W-1:0] f,
  output logic [W-1:0] out
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)             out <= '0;
    else if (!pc && !ev)    out <= '0;
    else if (pc && ev && en) out <= out | f;
  end

  a_no_illegal_phase: assert property (@(posedge clk) disable iff (!rst_n) !(!pc && ev));

endmodule
