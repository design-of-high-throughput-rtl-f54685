// stage_controller: generates the decoupled controls (pc, ev) of one stage.
//
// Inputs are S, the completion detector of this stage, and T, the completion
// detector of the next stage (its acknowledge). ev is an inverter of S: a
// stage that has evaluated goes to isolate at once. pc is a 3-input NAND of S,
// T and T': the stage precharges only when it holds data (S), the next stage
// has taken it (T), and T' confirms that this T belongs to the current data.
// T' is an asymmetric C-element: reset low by S=0 (the stage has precharged)
// and set high by S=1 with T=0 (the next stage has released its previous
// acknowledge). Without T' a stage whose successor is stalled would read the
// old, still-high T as the acknowledge of its new data.
//
//   S T T' | pc ev | phase
//   0 - -  |  1  1 | evaluate
//   1 0 -  |  1  0 | isolate
//   1 1 0  |  1  0 | isolate
//   1 1 1  |  0  0 | precharge
//
// NAND3 (with its driving buffer), inverter (with its buffer) and C-element
// each take one tick. Reset gives (pc,ev)=(1,1) and T'=0, so every stage is
// ready to evaluate when reset is released.
//
// From the published design: the NAND3/inverter controller, its function
// table and the asymmetric C-element T'. Own choice: each gate is one tick.
module stage_controller (
  input  logic clk,
  input  logic rst_n,
  input  logic s,
  input  logic t,
  output logic pc,
  output logic ev,
  output logic t_prime
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pc      <= 1'b1;
      ev      <= 1'b1;
      t_prime <= 1'b0;
    end else begin
      pc <= ~(s & t & t_prime);
      ev <= ~s;
      if (!s)      t_prime <= 1'b0;
      else if (!t) t_prime <= 1'b1;
    end
  end

  // pc low without ev low would be the illegal (0,1) phase.
  a_legal_phase: assert property (@(posedge clk) disable iff (!rst_n) !(!pc && ev));

endmodule
