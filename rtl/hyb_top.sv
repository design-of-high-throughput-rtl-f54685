// hyb_top: the hybrid-encoded gate-level pipelined circuits side by side.
//
//   fifo_ea / fifo_pd   4-bit, 10-stage FIFO in EA-Hybrid and PD-Hybrid style
//   add_ea  / add_pd    16-bit ripple-carry adder, both styles
//   mul_ea  / mul_pd    8x8 array multiplier, both styles
//   fir                 8-tap, 6-bit FIR filter built from EA-Hybrid
//                       multipliers and JOIN adders
//   conv                single-rail to dual-rail encoding converter cell
//
// Every circuit keeps its own channels. An input channel is a dual-rail
// request pair (*_cr, which also carries one data bit: FIFO bit 0, the adder
// carry-in, multiplier a[0], FIR x[0]) plus single-rail data, answered by
// *_in_ack; an output channel is its result plus a dual-rail pair, answered
// by the receiver's *_out_ack (see hyb_fifo for the four-step exchange). All
// circuits share the unit-delay tick 'clk' and the active-low reset.
//
// From the published design: the circuits and their sizes. Own choice: they
// are independent of each other, and the converter cell is brought out alone.
module hyb_top
  import hyb_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // FIFO, EA-Hybrid
  input  dr_t         fifo_ea_in_cr,
  input  logic [3:1]  fifo_ea_in_data,
  output logic        fifo_ea_in_ack,
  output dr_t         fifo_ea_out_cr,
  output logic [3:1]  fifo_ea_out_data,
  input  logic        fifo_ea_out_ack,
  // FIFO, PD-Hybrid
  input  dr_t         fifo_pd_in_cr,
  input  logic [3:1]  fifo_pd_in_data,
  output logic        fifo_pd_in_ack,
  output dr_t         fifo_pd_out_cr,
  output logic [3:1]  fifo_pd_out_data,
  input  logic        fifo_pd_out_ack,
  // 16-bit adder, EA-Hybrid (carry-in on the request pair)
  input  dr_t         add_ea_in_cr,
  input  logic [15:0] add_ea_a,
  input  logic [15:0] add_ea_b,
  output logic        add_ea_in_ack,
  output logic [15:0] add_ea_sum,
  output dr_t         add_ea_cout,
  input  logic        add_ea_out_ack,
  // 16-bit adder, PD-Hybrid
  input  dr_t         add_pd_in_cr,
  input  logic [15:0] add_pd_a,
  input  logic [15:0] add_pd_b,
  output logic        add_pd_in_ack,
  output logic [15:0] add_pd_sum,
  output dr_t         add_pd_cout,
  input  logic        add_pd_out_ack,
  // 8x8 multiplier, EA-Hybrid (a[0] on the request pair)
  input  dr_t         mul_ea_in_cr,
  input  logic [7:1]  mul_ea_a,
  input  logic [7:0]  mul_ea_b,
  output logic        mul_ea_in_ack,
  output logic [15:0] mul_ea_p,
  output dr_t         mul_ea_p_cr,
  input  logic        mul_ea_out_ack,
  // 8x8 multiplier, PD-Hybrid
  input  dr_t         mul_pd_in_cr,
  input  logic [7:1]  mul_pd_a,
  input  logic [7:0]  mul_pd_b,
  output logic        mul_pd_in_ack,
  output logic [15:0] mul_pd_p,
  output dr_t         mul_pd_p_cr,
  input  logic        mul_pd_out_ack,
  // FIR filter (x[0] on the request pair)
  input  dr_t         fir_in_cr,
  input  logic [5:1]  fir_in_data,
  output logic        fir_in_ack,
  output logic [14:0] fir_y,
  output dr_t         fir_y_cr,
  input  logic        fir_out_ack,
  // encoding converter cell
  input  logic        conv_pc,
  input  logic        conv_ev,
  input  logic        conv_in,
  output logic        conv_out,
  output logic        conv_out_n
);

  hyb_fifo #(.STYLE(STYLE_EA)) u_fifo_ea (
    .clk, .rst_n,
    .in_cr(fifo_ea_in_cr), .in_data(fifo_ea_in_data), .in_ack(fifo_ea_in_ack),
    .out_cr(fifo_ea_out_cr), .out_data(fifo_ea_out_data), .out_ack(fifo_ea_out_ack)
  );

  hyb_fifo #(.STYLE(STYLE_PD)) u_fifo_pd (
    .clk, .rst_n,
    .in_cr(fifo_pd_in_cr), .in_data(fifo_pd_in_data), .in_ack(fifo_pd_in_ack),
    .out_cr(fifo_pd_out_cr), .out_data(fifo_pd_out_data), .out_ack(fifo_pd_out_ack)
  );

  hyb_rca #(.STYLE(STYLE_EA), .W(16)) u_add_ea (
    .clk, .rst_n,
    .link_in(add_ea_in_cr), .a(add_ea_a), .b(add_ea_b), .cin(add_ea_in_cr.t),
    .in_ack(add_ea_in_ack), .sum(add_ea_sum), .cout(add_ea_cout), .out_ack(add_ea_out_ack)
  );

  hyb_rca #(.STYLE(STYLE_PD), .W(16)) u_add_pd (
    .clk, .rst_n,
    .link_in(add_pd_in_cr), .a(add_pd_a), .b(add_pd_b), .cin(add_pd_in_cr.t),
    .in_ack(add_pd_in_ack), .sum(add_pd_sum), .cout(add_pd_cout), .out_ack(add_pd_out_ack)
  );

  hyb_array_mult #(.STYLE(STYLE_EA), .N(8)) u_mul_ea (
    .clk, .rst_n,
    .link_in(mul_ea_in_cr), .a({mul_ea_a, mul_ea_in_cr.t}), .b(mul_ea_b),
    .in_ack(mul_ea_in_ack), .p(mul_ea_p), .p_cr(mul_ea_p_cr), .out_ack(mul_ea_out_ack)
  );

  hyb_array_mult #(.STYLE(STYLE_PD), .N(8)) u_mul_pd (
    .clk, .rst_n,
    .link_in(mul_pd_in_cr), .a({mul_pd_a, mul_pd_in_cr.t}), .b(mul_pd_b),
    .in_ack(mul_pd_in_ack), .p(mul_pd_p), .p_cr(mul_pd_p_cr), .out_ack(mul_pd_out_ack)
  );

  fir_filter #(.STYLE(STYLE_EA)) u_fir (
    .clk, .rst_n,
    .in_cr(fir_in_cr), .in_data(fir_in_data), .in_ack(fir_in_ack),
    .y(fir_y), .y_cr(fir_y_cr), .out_ack(fir_out_ack)
  );

  encoding_converter u_conv (
    .clk, .rst_n, .pc(conv_pc), .ev(conv_ev), .in(conv_in),
    .out(conv_out), .out_n(conv_out_n)
  );

endmodule
