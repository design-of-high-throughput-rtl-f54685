// encoding_converter: single-rail to dual-rail converter with decoupled
// precharge/evaluate controls.
//
// A single dynamic node 'x' is precharged high; in evaluate a 1 on 'in'
// discharges it. The outputs are out = ~x and out_n = x, so a single-rail 0
// (no discharge) reads as a valid dual-rail 0 straight away and a 1 as a
// valid dual-rail 1 once the node falls. The converter never produces the
// (0,0) spacer: in precharge and in reset it shows a dual-rail 0.
//
//   rst_n pc ev in | out out_n
//     0    -  -  - |  0   1        reset: node precharged
//     1    1  1  0 |  0   1        evaluate
//     1    1  1  1 |  1   0
//     1    1  0  - |  held         isolate
//     1    0  0  - |  0   1        precharge
//
// The node changes one tick after its inputs; the outputs are static
// inverters of the node and follow it in the same tick.
//
// From the published design: the converter with decoupled pc/ev. Own choice:
// the single-node model (out_n is the precharged node itself).
module encoding_converter (
  input  logic clk,
  input  logic rst_n,
  input  logic pc,
  input  logic ev,
  input  logic in,
  output logic out,
  output logic out_n
);

  logic x;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                x <= 1'b1;
    else if (!pc && !ev)       x <= 1'b1;
    else if (pc && ev && in)   x <= 1'b0;
  end

  assign out   = ~x;
  assign out_n = x;

endmodule
