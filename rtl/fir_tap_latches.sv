// fir_tap_latches: input fork and tapped delay line of the direct-form FIR.
//
// The new sample x(n) goes to the first multiplier directly and the delay
// registers give x(n-1)..x(n-NTAP+1) to the others. The registers have their
// own control: they hold (isolate) while the multiplier first stages evaluate,
// so every multiplier reads stable operands, and they load (shift by one
// sample) only once every multiplier first stage has taken the current
// sample and is isolated.
//
// Handshake: the sample arrives as {x, in_cr}, in_cr being the dual-rail
// request. mul_link[k] is the request seen by multiplier k; it is forced to
// the spacer once multiplier k has taken the sample (its first-stage
// completion detector mul_s[k] rose), so no multiplier can take one sample
// twice. When all have taken it the registers shift and in_ack rises; after
// the sender returns in_cr to the spacer, in_ack falls and the next sample
// may come. Each step is one tick. The registers are edge-triggered and
// enabled for a single tick, which behaves as the published design's D-latches made
// transparent for one tick.
module fir_tap_latches
  import hyb_pkg::*;
#(
  parameter int unsigned NTAP = 8,
  parameter int unsigned XW   = 6
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  dr_t                       in_cr,
  input  logic [XW-1:0]             x,
  output logic                      in_ack,
  output logic [NTAP-1:0][XW-1:0]   tap_x,
  output dr_t  [NTAP-1:0]           mul_link,
  input  logic [NTAP-1:0]           mul_s
);

  logic [NTAP-1:1][XW-1:0] dl;          // dl[k] = x(n-k)
  logic [NTAP-1:0]         taken;
  logic [NTAP-1:0]         s_q;
  logic                    shifted;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dl      <= '0;
      taken   <= '0;
      s_q     <= '0;
      shifted <= 1'b0;
    end else begin
      s_q <= mul_s;
      if (shifted && !dr_valid(in_cr)) begin
        taken   <= '0;
        shifted <= 1'b0;
      end else if (!shifted && (&taken)) begin
        // registers transparent for one tick: every tap moves down one place
        dl[1] <= x;
        for (int k = 2; k < int'(NTAP); k++) dl[k] <= dl[k-1];
        shifted <= 1'b1;
      end else begin
        taken <= taken | (mul_s & ~s_q & {NTAP{dr_valid(in_cr)}});
      end
    end
  end

  always_comb begin
    tap_x[0] = x;
    for (int k = 1; k < int'(NTAP); k++) tap_x[k] = dl[k];
    for (int k = 0; k < int'(NTAP); k++) mul_link[k] = taken[k] ? DR_SPACER : in_cr;
  end

  assign in_ack = shifted;

endmodule
