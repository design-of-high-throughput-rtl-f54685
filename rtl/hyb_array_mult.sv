// hyb_array_mult: gate-level pipelined N x N unsigned array multiplier in
// hybrid encoding (8 x 8 by default).
//
// Every stage is one gate level deep:
//   stage 0          all N*N partial products, one AND gate each;
//   stages 1..N-1    one carry-save row each: row r of partial products is
//                    added to the running sum/carry vectors with one level of
//                    full adders (sum and carry gates in parallel);
//   stages N..2N-1   the final carry-propagate addition of the upper N bits,
//                    one full adder per stage, as in hyb_rca.
// After carry-save row r no carry is left at positions <= r, so product bits
// 0..N-1 are final after stage N-1 and only positions N..2N-1 need rippling.
//
// Critical elements (dual-rail SLGs, the path the completion detectors watch):
// the AND a0&b0 in stage 0; in carry-save stage r the carry gate of position
// r, which feeds the same position's carry input one stage later, so the SLGs
// form a natural chain (stage 1 has no natural link to the stage-0 AND and
// uses the link only as enables, i.e. an SLGL); in ripple stages the ripple
// carry; in the last stage the sum gate of the top bit. All other gates are
// single-rail domino gates. A downstream gate reads a critical bit from the
// dual-rail SLG; the single-rail word also keeps a copy of it.
//
// Interface: link_in is the request pair of the operand channel (the caller
// normally sends a[0] on it), in_ack the first stage's completion detector;
// the product leaves on 'p' with its top bit also on the dual-rail 'p_cr',
// acknowledged by out_ack. Latency 2N ticks; one product per 5 ticks (EA) or
// 7 ticks (PD).
//
// From the published design: an AND-array first stage with a0&b0 as the
// critical SLG, adder rows below it, every stage one gate deep. Own choice:
// the 2N-stage carry-save/ripple arrangement for any N and each stage's
// critical element (the published 3x3 example uses 5 stages).
module hyb_array_mult
  import hyb_pkg::*;
#(
  parameter style_e      STYLE = STYLE_EA,
  parameter int unsigned N     = 8
) (
  input  logic           clk,
  input  logic           rst_n,
  input  dr_t            link_in,
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic           in_ack,
  output logic [2*N-1:0] p,
  output dr_t            p_cr,
  input  logic           out_ack
);

  localparam int unsigned NST = 2 * N;

  typedef struct packed {
    logic [N-1:0][N-1:0] pp;   // pp[r][c] = a[c] & b[r]
    logic [2*N-1:0]      sv;   // running sum vector
    logic [2*N-1:0]      cv;   // running carry vector
  } mul_word_t;

  function automatic logic maj3(logic x, logic y, logic z);
    return (x & y) | (x & z) | (y & z);
  endfunction

  mul_word_t word[NST+1];
  dr_t       cr  [NST+1];
  logic      s   [NST+1];

  assign s[NST] = out_ack;

  for (genvar q = 0; q < int'(NST); q++) begin : g_st
    mul_word_t  v;      // this stage's view of its inputs
    mul_word_t  f;      // single-rail gate functions
    logic [2:0] cx;     // critical gate inputs

    if (q == 0) begin : g_pp
      always_comb begin
        v = '0;
        f = '0;
        for (int r = 0; r < int'(N); r++)
          for (int c = 0; c < int'(N); c++)
            f.pp[r][c] = a[c] & b[r];
        cx = {1'b0, a[0], b[0]};
      end
      hyb_stage #(.STYLE(STYLE), .NJOIN(1), .NIN(2), .TT(TT_AND2), .W($bits(mul_word_t))) u_st (
        .clk, .rst_n, .link_in(link_in), .crit_x(cx[1:0]), .sr_f(f),
        .t(s[q+1]), .s(s[q]), .cr_out(cr[q+1]), .sr_out(word[q+1]), .pc(), .ev()
      );
    end else if (q < int'(N)) begin : g_csa
      always_comb begin
        logic pbit;
        v = word[q];
        if (q == 1) begin
          v.pp[0][0] = cr[q].t;
          v.sv = '0;
          v.sv[N-1:0] = v.pp[0];
          v.cv = '0;
        end else begin
          v.cv[q] = cr[q].t;
        end
        f = v;
        f.cv = '0;
        for (int j = 0; j < 2*int'(N); j++) begin
          pbit = (j >= q && j < q + int'(N)) ? v.pp[q][j-q] : 1'b0;
          f.sv[j] = v.sv[j] ^ v.cv[j] ^ pbit;
          if (j + 1 < 2*int'(N)) f.cv[j+1] = maj3(v.sv[j], v.cv[j], pbit);
        end
        cx = {v.sv[q], v.cv[q], v.pp[q][0]};
      end
      hyb_stage #(.STYLE(STYLE), .NJOIN(1), .NIN(3), .TT(TT_MAJ3), .W($bits(mul_word_t))) u_st (
        .clk, .rst_n, .link_in(cr[q]), .crit_x(cx), .sr_f(f),
        .t(s[q+1]), .s(s[q]), .cr_out(cr[q+1]), .sr_out(word[q+1]), .pc(), .ev()
      );
    end else begin : g_rip
      localparam int unsigned J = q;          // bit position rippled here
      always_comb begin
        logic c;
        v = word[q];
        if (q == int'(N)) begin
          v.cv[N] = cr[q].t;
          c = 1'b0;
        end else begin
          c = cr[q].t;
        end
        f = v;
        f.sv[J] = v.sv[J] ^ v.cv[J] ^ c;
        cx = {v.sv[J], v.cv[J], c};
      end
      hyb_stage #(.STYLE(STYLE), .NJOIN(1), .NIN(3),
                  .TT((q == int'(NST) - 1) ? TT_XOR3 : TT_MAJ3), .W($bits(mul_word_t))) u_st (
        .clk, .rst_n, .link_in(cr[q]), .crit_x(cx), .sr_f(f),
        .t(s[q+1]), .s(s[q]), .cr_out(cr[q+1]), .sr_out(word[q+1]), .pc(), .ev()
      );
    end
  end

  assign in_ack = s[0];
  assign p      = {cr[NST].t, word[NST].sv[2*N-2:0]};
  assign p_cr   = cr[NST];

endmodule
