// fir_filter: asynchronous direct-form FIR filter for a PRML read channel,
// with gate-level pipelined (EA-Hybrid) multipliers and adders.
//
//   y(n) = sum_{k=0}^{NTAP-1} COEF[k] * x(n-k)
//
// 8 taps, 6-bit unsigned samples and coefficients and a 15-bit result by
// default. The input sample forks, through fir_tap_latches, to NTAP
// hyb_array_mult multipliers (multiplier k gets x(n-k) and the constant
// COEF[k]); their products are summed by a tree of hyb_rca adders. Every
// adder is a JOIN: its first stage's completion detector and SLG wait for the
// critical paths of both its sources, and its acknowledge goes back to both.
// Level-l adders are (2*XW-1+l) bits wide, so the root yields the exact
// (XW+CW+log2 NTAP)-bit sum with no rounding.
//
// Interface: the sample arrives as {in_data, in_cr} with in_cr the dual-rail
// bit 0; in_ack follows fir_tap_latches (raised once all multipliers took the
// sample, dropped after the sender returned to the spacer). The result leaves
// on 'y' with its top bit also on the dual-rail 'y_cr', acknowledged by
// out_ack as in hyb_fifo. Latency in ticks: 2*(XW) multiplier stages plus the
// adder widths of all levels, plus one tick from the input request. NTAP must
// be a power of two. The default coefficients are this design's own
// low-pass choice (sum 32, i.e. unity DC gain at the 2^5 coefficient scale).
module fir_filter
  import hyb_pkg::*;
#(
  parameter style_e                STYLE = STYLE_EA,
  parameter int unsigned           NTAP  = 8,
  parameter int unsigned           XW    = 6,
  parameter int unsigned           CW    = 6,
  parameter logic [CW-1:0]         COEF [NTAP] = '{6'd1, 6'd2, 6'd5, 6'd8, 6'd8, 6'd5, 6'd2, 6'd1},
  localparam int unsigned          LV    = $clog2(NTAP),
  localparam int unsigned          PW    = XW + CW,
  localparam int unsigned          YW    = PW + LV
) (
  input  logic           clk,
  input  logic           rst_n,
  input  dr_t            in_cr,
  input  logic [XW-1:1]  in_data,
  output logic           in_ack,
  output logic [YW-1:0]  y,
  output dr_t            y_cr,
  input  logic           out_ack
);

  // The multiplier is square; the wider of the two operands sets its size.
  localparam int unsigned MN = (XW > CW) ? XW : CW;

  logic [NTAP-1:0][XW-1:0] tap_x;
  dr_t  [NTAP-1:0]         mul_link;
  logic [NTAP-1:0]         mul_s;

  // Node (l, j) of the sum tree; level 0 are the multipliers.
  logic [YW-1:0] val [LV+1][NTAP];
  dr_t           crv [LV+1][NTAP];
  logic          ack [LV+1][NTAP];   // acknowledge returned to node (l, j)

  fir_tap_latches #(.NTAP(NTAP), .XW(XW)) u_taps (
    .clk, .rst_n,
    .in_cr, .x({in_data, in_cr.t}), .in_ack,
    .tap_x, .mul_link, .mul_s
  );

  for (genvar k = 0; k < int'(NTAP); k++) begin : g_mul
    logic [2*MN-1:0] prod;
    dr_t             prod_cr;
    hyb_array_mult #(.STYLE(STYLE), .N(MN)) u_mul (
      .clk, .rst_n,
      .link_in(mul_link[k]),
      .a(MN'(tap_x[k])), .b(MN'(COEF[k])),
      .in_ack(mul_s[k]),
      .p(prod), .p_cr(prod_cr),
      .out_ack(ack[0][k])
    );
    assign val[0][k] = YW'(prod);
    assign crv[0][k] = prod_cr;
  end

  for (genvar l = 1; l <= int'(LV); l++) begin : g_lvl
    localparam int unsigned WL = PW + l - 1;
    for (genvar j = 0; j < int'(NTAP); j++) begin : g_node
      if (j < int'(NTAP >> l)) begin : g_add
        logic [WL-1:0] sum;
        dr_t           cout;
        logic          s0;
        hyb_rca #(.STYLE(STYLE), .W(WL), .NJOIN(2)) u_add (
          .clk, .rst_n,
          .link_in({crv[l-1][2*j+1], crv[l-1][2*j]}),
          .a(val[l-1][2*j][WL-1:0]), .b(val[l-1][2*j+1][WL-1:0]), .cin(1'b0),
          .in_ack(s0),
          .sum(sum), .cout(cout),
          .out_ack(ack[l][j])
        );
        assign ack[l-1][2*j]   = s0;
        assign ack[l-1][2*j+1] = s0;
        assign val[l][j] = YW'({cout.t, sum});
        assign crv[l][j] = cout;
      end else begin : g_none
        assign val[l][j] = '0;
        assign crv[l][j] = DR_SPACER;
      end
    end
  end

  for (genvar j = 1; j < int'(NTAP); j++) begin : g_noack
    assign ack[LV][j] = 1'b0;
  end
  assign ack[LV][0] = out_ack;

  assign y    = val[LV][0];
  assign y_cr = crv[LV][0];

endmodule
