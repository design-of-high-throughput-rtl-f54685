// tb_hyb_rca: self-checking test of the gate-level pipelined ripple-carry
// adder: 16-bit EA-Hybrid and PD-Hybrid adders fed with random operands
// (carry-in on the request pair), plus a 4-bit two-source JOIN adder whose
// operands come from two independent senders with random, unequal gaps.
// Checks sums and carries against a+b+cin, latency (one tick per bit) and
// the full-rate output interval (5 ticks EA, 7 ticks PD).
//
// Cycle counts checked follow from the published cycle-time equations with
// one tick per gate.
module tb_hyb_rca;
  import hyb_pkg::*;

  localparam int unsigned W = 16;
  localparam int unsigned NITEM = 40;
  localparam int unsigned DW = 2*W + 1;

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
  int unsigned gap0 = 0, gap1 = 0, gap2 = 0;

  // ---- 16-bit, both styles; item = {b, a, cin}
  dr_t ea_cr, pd_cr, ea_cout, pd_cout;
  logic [DW-1:1] ea_d, pd_d;
  logic ea_iack, pd_iack, ea_oack, pd_oack;
  logic [W-1:0] ea_sum, pd_sum;
  int unsigned ea_sent, pd_sent, ea_got, pd_got;

  tb_hyb_src #(.DW(DW)) src_ea (.clk, .rst_n, .go, .gap(gap0), .ack(ea_iack), .cr(ea_cr), .data(ea_d), .sent(ea_sent));
  tb_hyb_src #(.DW(DW)) src_pd (.clk, .rst_n, .go, .gap(gap0), .ack(pd_iack), .cr(pd_cr), .data(pd_d), .sent(pd_sent));

  hyb_rca #(.STYLE(STYLE_EA), .W(W)) dut_ea (.clk, .rst_n, .link_in(ea_cr), .a(ea_d[W:1]), .b(ea_d[2*W:W+1]),
    .cin(ea_cr.t), .in_ack(ea_iack), .sum(ea_sum), .cout(ea_cout), .out_ack(ea_oack));
  hyb_rca #(.STYLE(STYLE_PD), .W(W)) dut_pd (.clk, .rst_n, .link_in(pd_cr), .a(pd_d[W:1]), .b(pd_d[2*W:W+1]),
    .cin(pd_cr.t), .in_ack(pd_iack), .sum(pd_sum), .cout(pd_cout), .out_ack(pd_oack));

  tb_hyb_sink #(.DW(W+1), .LAT(1)) snk_ea (.clk, .rst_n, .stall(1'b0), .valid(dr_valid(ea_cout)),
    .value({ea_cout.t, ea_sum}), .ack(ea_oack), .count(ea_got));
  tb_hyb_sink #(.DW(W+1), .LAT(2)) snk_pd (.clk, .rst_n, .stall(1'b0), .valid(dr_valid(pd_cout)),
    .value({pd_cout.t, pd_sum}), .ack(pd_oack), .count(pd_got));

  // ---- 4-bit JOIN adder: two senders, item = {operand, request bit}
  dr_t j0_cr, j1_cr, j_cout;
  logic [4:1] j0_d, j1_d;
  logic j_iack, j_oack;
  logic [3:0] j_sum;
  int unsigned j0_sent, j1_sent, j_got;
  tb_hyb_src #(.DW(5)) src_j0 (.clk, .rst_n, .go, .gap(gap1), .ack(j_iack), .cr(j0_cr), .data(j0_d), .sent(j0_sent));
  tb_hyb_src #(.DW(5)) src_j1 (.clk, .rst_n, .go, .gap(gap2), .ack(j_iack), .cr(j1_cr), .data(j1_d), .sent(j1_sent));
  hyb_rca #(.STYLE(STYLE_EA), .W(4), .NJOIN(2)) dut_join (.clk, .rst_n, .link_in({j1_cr, j0_cr}),
    .a(j0_d), .b(j1_d), .cin(1'b0), .in_ack(j_iack), .sum(j_sum), .cout(j_cout), .out_ack(j_oack));
  tb_hyb_sink #(.DW(5), .LAT(1)) snk_j (.clk, .rst_n, .stall(1'b0), .valid(dr_valid(j_cout)),
    .value({j_cout.t, j_sum}), .ack(j_oack), .count(j_got));

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < int'(NITEM); i++) begin
      logic [DW-1:0] v;
      v = {16'($urandom), 16'($urandom), 1'($urandom)};
      if (i == 0) v = {16'hFFFF, 16'h0000, 1'b1};     // full carry ripple
      if (i == 1) v = {16'hFFFF, 16'hFFFF, 1'b1};
      src_ea.mem[i] = v;
      src_pd.mem[i] = v;
      src_j0.mem[i] = {4'($urandom), 1'($urandom)};
      src_j1.mem[i] = {4'($urandom), 1'($urandom)};
    end
    src_ea.n = NITEM; src_pd.n = NITEM; src_j0.n = NITEM; src_j1.n = NITEM;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    go = 1'b1;
    fork
      begin
        while (j_got < NITEM) begin
          gap1 = $urandom_range(0, 9);
          gap2 = $urandom_range(0, 9);
          @(posedge clk);
        end
      end
    join_none
    wait (ea_got == NITEM && pd_got == NITEM && j_got == NITEM);
    repeat (5) @(posedge clk);
    for (int i = 0; i < int'(NITEM); i++) begin
      logic [DW-1:0] v;
      logic [W:0]    e;
      logic [4:0]    je;
      v = src_ea.mem[i];
      e = {1'b0, v[W:1]} + {1'b0, v[2*W:W+1]} + (W+1)'(v[0]);
      check(snk_ea.got[i] == e, $sformatf("EA sum %0d: got %h exp %h", i, snk_ea.got[i], e));
      check(snk_pd.got[i] == e, $sformatf("PD sum %0d: got %h exp %h", i, snk_pd.got[i], e));
      je = {1'b0, src_j0.mem[i][4:1]} + {1'b0, src_j1.mem[i][4:1]};
      check(snk_j.got[i] == je, $sformatf("JOIN sum %0d: got %h exp %h", i, snk_j.got[i], je));
    end
    check(snk_ea.t_got[0] - src_ea.t_drive[0] == W, $sformatf("EA latency %0d", snk_ea.t_got[0] - src_ea.t_drive[0]));
    check(snk_pd.t_got[0] - src_pd.t_drive[0] == W, $sformatf("PD latency %0d", snk_pd.t_got[0] - src_pd.t_drive[0]));
    for (int i = int'(W); i < int'(NITEM); i++) begin
      check(snk_ea.t_got[i] - snk_ea.t_got[i-1] == 5, $sformatf("EA interval %0d", snk_ea.t_got[i] - snk_ea.t_got[i-1]));
      check(snk_pd.t_got[i] - snk_pd.t_got[i-1] == 7, $sformatf("PD interval %0d", snk_pd.t_got[i] - snk_pd.t_got[i-1]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
