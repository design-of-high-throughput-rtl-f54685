// hyb_rca: gate-level pipelined ripple-carry adder in hybrid encoding.
//
// Stage i holds one full adder, for bit i. Its carry gate is the critical
// element, built as a dual-rail SLG (majority of a_i, b_i and the carry from
// stage i-1), so the carry chain is also the critical path that the
// completion detectors watch and every carry SLG has a natural link to the
// previous one. The sum gate of bit i and the buffers that carry the operand
// bits not yet used and the sum bits already produced are single-rail domino
// gates. Sum bit i leaves stage i; the carry-out of the last stage is the
// dual-rail output 'cout'. Unused operand bits are carried along as in the
// usual gate-level pipelined RCA.
//
// The first stage is linked to NJOIN incoming critical pairs. NJOIN=1 is the
// stand-alone adder, where the caller normally sends the carry-in as the
// dual-rail request; NJOIN>1 is the adder first stage of a JOIN, whose
// completion detector and SLG wait for the critical paths of all its
// sources (the adders of the FIR filter).
//
// Handshake as in hyb_fifo: in_ack is the first stage's completion detector,
// out_ack the receiver's acknowledge of {cout, sum}. Latency is W ticks; a
// full pipeline accepts one operand pair per 5 ticks (EA) or 7 ticks (PD).
//
// From the published design: one full adder per stage with the carry as the
// critical SLG, buffer units for the other bits, and the JOIN first stage of
// the FIR adders. Own choice: the full operand word travels with every stage.
module hyb_rca
  import hyb_pkg::*;
#(
  parameter style_e      STYLE = STYLE_EA,
  parameter int unsigned W     = 16,
  parameter int unsigned NJOIN = 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  dr_t  [NJOIN-1:0] link_in,
  input  logic [W-1:0]     a,
  input  logic [W-1:0]     b,
  input  logic             cin,
  output logic             in_ack,
  output logic [W-1:0]     sum,
  output dr_t              cout,
  input  logic             out_ack
);

  typedef struct packed {
    logic [W-1:0] a;
    logic [W-1:0] b;
    logic [W-1:0] s;
  } rca_word_t;

  rca_word_t word[W+1];
  dr_t       cr  [W+1];
  logic      s   [W+1];

  assign word[0] = '{a: a, b: b, s: '0};
  assign s[W]    = out_ack;

  for (genvar i = 0; i < int'(W); i++) begin : g_st
    logic       c_in;
    rca_word_t  f;

    assign c_in = (i == 0) ? cin : cr[i].t;

    always_comb begin
      f      = word[i];
      f.s[i] = word[i].a[i] ^ word[i].b[i] ^ c_in;
    end

    if (i == 0) begin : g_first
      hyb_stage #(.STYLE(STYLE), .NJOIN(NJOIN), .NIN(3), .TT(TT_MAJ3), .W(3*W)) u_st (
        .clk, .rst_n,
        .link_in(link_in), .crit_x({word[i].a[i], word[i].b[i], c_in}), .sr_f(f),
        .t(s[i+1]), .s(s[i]), .cr_out(cr[i+1]), .sr_out(word[i+1]),
        .pc(), .ev()
      );
    end else begin : g_next
      hyb_stage #(.STYLE(STYLE), .NJOIN(1), .NIN(3), .TT(TT_MAJ3), .W(3*W)) u_st (
        .clk, .rst_n,
        .link_in(cr[i]), .crit_x({word[i].a[i], word[i].b[i], c_in}), .sr_f(f),
        .t(s[i+1]), .s(s[i]), .cr_out(cr[i+1]), .sr_out(word[i+1]),
        .pc(), .ev()
      );
    end
  end

  assign in_ack = s[0];
  assign sum    = word[W].s;
  assign cout   = cr[W];

endmodule
