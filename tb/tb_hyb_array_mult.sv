// tb_hyb_array_mult: self-checking test of the gate-level pipelined array
// multiplier: 8x8 in EA-Hybrid and PD-Hybrid style and a 3x3 EA-Hybrid
// instance (the small example size). Random operands plus the corner cases
// 0, 1 and all-ones; products checked against a*b; latency (2N ticks) and
// full-rate interval (5 ticks EA, 7 ticks PD) checked.
//
// Cycle counts checked (5/7 ticks, 2N ticks latency) follow from the published
// cycle-time equations with one tick per gate.
module tb_hyb_array_mult;
  import hyb_pkg::*;

  localparam int unsigned N = 8;
  localparam int unsigned NITEM = 40;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic go = 1'b0;

  // item = {b, a}; a[0] travels on the request pair
  dr_t ea_cr, pd_cr, s3_cr, ea_pcr, pd_pcr, s3_pcr;
  logic [2*N-1:1] ea_d, pd_d;
  logic [5:1] s3_d;
  logic ea_iack, pd_iack, s3_iack, ea_oack, pd_oack, s3_oack;
  logic [2*N-1:0] ea_p, pd_p;
  logic [5:0] s3_p;
  int unsigned ea_sent, pd_sent, s3_sent, ea_got, pd_got, s3_got;

  tb_hyb_src #(.DW(2*N)) src_ea (.clk, .rst_n, .go, .gap(0), .ack(ea_iack), .cr(ea_cr), .data(ea_d), .sent(ea_sent));
  tb_hyb_src #(.DW(2*N)) src_pd (.clk, .rst_n, .go, .gap(0), .ack(pd_iack), .cr(pd_cr), .data(pd_d), .sent(pd_sent));
  tb_hyb_src #(.DW(6))   src_s3 (.clk, .rst_n, .go, .gap(0), .ack(s3_iack), .cr(s3_cr), .data(s3_d), .sent(s3_sent));

  hyb_array_mult #(.STYLE(STYLE_EA), .N(N)) dut_ea (.clk, .rst_n, .link_in(ea_cr),
    .a({ea_d[N-1:1], ea_cr.t}), .b(ea_d[2*N-1:N]), .in_ack(ea_iack), .p(ea_p), .p_cr(ea_pcr), .out_ack(ea_oack));
  hyb_array_mult #(.STYLE(STYLE_PD), .N(N)) dut_pd (.clk, .rst_n, .link_in(pd_cr),
    .a({pd_d[N-1:1], pd_cr.t}), .b(pd_d[2*N-1:N]), .in_ack(pd_iack), .p(pd_p), .p_cr(pd_pcr), .out_ack(pd_oack));
  hyb_array_mult #(.STYLE(STYLE_EA), .N(3)) dut_s3 (.clk, .rst_n, .link_in(s3_cr),
    .a({s3_d[2:1], s3_cr.t}), .b(s3_d[5:3]), .in_ack(s3_iack), .p(s3_p), .p_cr(s3_pcr), .out_ack(s3_oack));

  tb_hyb_sink #(.DW(2*N), .LAT(1)) snk_ea (.clk, .rst_n, .stall(1'b0), .valid(dr_valid(ea_pcr)), .value(ea_p), .ack(ea_oack), .count(ea_got));
  tb_hyb_sink #(.DW(2*N), .LAT(2)) snk_pd (.clk, .rst_n, .stall(1'b0), .valid(dr_valid(pd_pcr)), .value(pd_p), .ack(pd_oack), .count(pd_got));
  tb_hyb_sink #(.DW(6),   .LAT(1)) snk_s3 (.clk, .rst_n, .stall(1'b0), .valid(dr_valid(s3_pcr)), .value(s3_p), .ack(s3_oack), .count(s3_got));

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < int'(NITEM); i++) begin
      logic [2*N-1:0] v;
      v = (2*N)'($urandom);
      case (i)
        0: v = '1;
        1: v = '0;
        2: v = {8'd1, 8'hFF};
        3: v = {8'hFF, 8'd1};
        default: ;
      endcase
      src_ea.mem[i] = v;
      src_pd.mem[i] = v;
      src_s3.mem[i] = (i == 0) ? 6'h3F : 6'($urandom);
    end
    src_ea.n = NITEM; src_pd.n = NITEM; src_s3.n = NITEM;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    go = 1'b1;
    wait (ea_got == NITEM && pd_got == NITEM && s3_got == NITEM);
    repeat (5) @(posedge clk);
    for (int i = 0; i < int'(NITEM); i++) begin
      logic [2*N-1:0] e;
      logic [5:0]     e3;
      e  = (2*N)'(src_ea.mem[i][N-1:0]) * (2*N)'(src_ea.mem[i][2*N-1:N]);
      e3 = 6'(src_s3.mem[i][2:0]) * 6'(src_s3.mem[i][5:3]);
      check(snk_ea.got[i] == e, $sformatf("EA product %0d: got %h exp %h", i, snk_ea.got[i], e));
      check(snk_pd.got[i] == e, $sformatf("PD product %0d: got %h exp %h", i, snk_pd.got[i], e));
      check(snk_s3.got[i] == e3, $sformatf("3x3 product %0d: got %h exp %h", i, snk_s3.got[i], e3));
    end
    check(snk_ea.t_got[0] - src_ea.t_drive[0] == 2*N, $sformatf("EA latency %0d", snk_ea.t_got[0] - src_ea.t_drive[0]));
    check(snk_pd.t_got[0] - src_pd.t_drive[0] == 2*N, $sformatf("PD latency %0d", snk_pd.t_got[0] - src_pd.t_drive[0]));
    check(snk_s3.t_got[0] - src_s3.t_drive[0] == 6, $sformatf("3x3 latency %0d", snk_s3.t_got[0] - src_s3.t_drive[0]));
    for (int i = 2*int'(N); i < int'(NITEM); i++) begin
      check(snk_ea.t_got[i] - snk_ea.t_got[i-1] == 5, $sformatf("EA interval %0d", snk_ea.t_got[i] - snk_ea.t_got[i-1]));
      check(snk_pd.t_got[i] - snk_pd.t_got[i-1] == 7, $sformatf("PD interval %0d", snk_pd.t_got[i] - snk_pd.t_got[i-1]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
