// hyb_fifo: gate-level pipelined FIFO in hybrid encoding (4 bits, 10 stages).
//
// Each stage buffers one data item: bit 0 travels on the critical path as a
// dual-rail SLG buffer, bits 1..WIDTH-1 as single-rail domino buffers. Because
// every stage isolates itself after evaluating, neighbouring stages hold
// distinct items with no spacer between them, so a stalled FIFO holds DEPTH
// items (full buffering capacity).
//
// Interface: the input channel is {in_data, in_cr} with in_cr the dual-rail
// bit 0; in_ack is the first stage's completion detector (high once the item
// is taken, low again once that stage has precharged). The sender must return
// in_cr to the spacer after in_ack rises and may send the next item after
// in_ack falls. The output channel is {out_data, out_cr}; out_ack is the
// receiver's acknowledge (T of the last stage), raised after it has taken the
// item and dropped after it has seen the spacer. Latency is one tick per
// stage; a full pipeline moves one item per 5 ticks (EA) or 7 ticks (PD).
//
// From the published design: the 4-bit, 10-stage FIFO in both styles. Own
// choice: bit 0 is the dual-rail critical path, and the four-step boundary
// exchange with the environment.
module hyb_fifo
  import hyb_pkg::*;
#(
  parameter style_e      STYLE = STYLE_EA,
  parameter int unsigned WIDTH = 4,
  parameter int unsigned DEPTH = 10
) (
  input  logic             clk,
  input  logic             rst_n,
  input  dr_t              in_cr,
  input  logic [WIDTH-1:1] in_data,
  output logic             in_ack,
  output dr_t              out_cr,
  output logic [WIDTH-1:1] out_data,
  input  logic             out_ack
);

  dr_t              cr [DEPTH+1];
  logic [WIDTH-1:1] dat[DEPTH+1];
  logic             s  [DEPTH+1];

  assign cr[0]  = in_cr;
  assign dat[0] = in_data;
  assign s[DEPTH] = out_ack;

  for (genvar k = 0; k < int'(DEPTH); k++) begin : g_st
    hyb_stage #(.STYLE(STYLE), .NJOIN(1), .NIN(1), .TT(TT_BUF), .W(WIDTH-1)) u_st (
      .clk, .rst_n,
      .link_in(cr[k]), .crit_x(cr[k].t), .sr_f(dat[k]),
      .t(s[k+1]), .s(s[k]),
      .cr_out(cr[k+1]), .sr_out(dat[k+1]),
      .pc(), .ev()
    );
  end

  assign in_ack   = s[0];
  assign out_cr   = cr[DEPTH];
  assign out_data = dat[DEPTH];

endmodule
