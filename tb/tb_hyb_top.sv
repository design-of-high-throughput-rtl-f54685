// tb_hyb_top: end-to-end test of every circuit in hyb_top at its default
// size (10-stage 4-bit FIFOs, 16-bit adders, 8x8 multipliers, 8-tap FIR
// filter), each with its own sender and receiver.
//
// Results are compared with reference arithmetic. The test also makes each
// mechanism of the pipelines happen and counts it, failing if one never did:
//   isolate        a stage holding data in isolate while its input returns to the spacer
//   stale_ack      a stage isolated with T high and T' low (successor stalled)
//   full_capacity  a stalled FIFO holding one item per stage
//   variable_rate  items sent with random gaps
//   join           a FIR adder first stage taking two incoming critical paths
//                  (its multipliers have equal latency, so the case of one input
//                  arriving late is exercised in tb_hyb_rca, not here)
//   tap_shift      the FIR tap registers loading a new sample
//   conv_rows      encoding-converter evaluate-1 / isolate / precharge rows
//
// The mechanisms counted are the ones the published design names; cycle
// counts follow its cycle-time equations with one tick per gate.
module tb_hyb_top;
  import hyb_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  localparam int NI = 30;

  logic go = 1'b0;
  int unsigned gap = 0;
  logic stall = 1'b0;

  // hyb_top ports
  dr_t fe_icr, fe_ocr, fp_icr, fp_ocr, ae_icr, ae_co, ap_icr, ap_co, me_icr, me_pcr, mp_icr, mp_pcr, fir_icr, fir_ycr;
  logic [3:1] fe_id, fe_od, fp_id, fp_od;
  logic fe_ia, fe_oa, fp_ia, fp_oa, ae_ia, ae_oa, ap_ia, ap_oa, me_ia, me_oa, mp_ia, mp_oa, fir_ia, fir_oa;
  logic [15:0] ae_a, ae_b, ae_s, ap_a, ap_b, ap_s, me_p, mp_p;
  logic [7:1] me_a, mp_a;
  logic [7:0] me_b, mp_b;
  logic [5:1] fir_id;
  logic [14:0] fir_y;
  logic c_pc, c_ev, c_in, c_out, c_outn;

  hyb_top dut (
    .clk, .rst_n,
    .fifo_ea_in_cr(fe_icr), .fifo_ea_in_data(fe_id), .fifo_ea_in_ack(fe_ia),
    .fifo_ea_out_cr(fe_ocr), .fifo_ea_out_data(fe_od), .fifo_ea_out_ack(fe_oa),
    .fifo_pd_in_cr(fp_icr), .fifo_pd_in_data(fp_id), .fifo_pd_in_ack(fp_ia),
    .fifo_pd_out_cr(fp_ocr), .fifo_pd_out_data(fp_od), .fifo_pd_out_ack(fp_oa),
    .add_ea_in_cr(ae_icr), .add_ea_a(ae_a), .add_ea_b(ae_b), .add_ea_in_ack(ae_ia),
    .add_ea_sum(ae_s), .add_ea_cout(ae_co), .add_ea_out_ack(ae_oa),
    .add_pd_in_cr(ap_icr), .add_pd_a(ap_a), .add_pd_b(ap_b), .add_pd_in_ack(ap_ia),
    .add_pd_sum(ap_s), .add_pd_cout(ap_co), .add_pd_out_ack(ap_oa),
    .mul_ea_in_cr(me_icr), .mul_ea_a(me_a), .mul_ea_b(me_b), .mul_ea_in_ack(me_ia),
    .mul_ea_p(me_p), .mul_ea_p_cr(me_pcr), .mul_ea_out_ack(me_oa),
    .mul_pd_in_cr(mp_icr), .mul_pd_a(mp_a), .mul_pd_b(mp_b), .mul_pd_in_ack(mp_ia),
    .mul_pd_p(mp_p), .mul_pd_p_cr(mp_pcr), .mul_pd_out_ack(mp_oa),
    .fir_in_cr(fir_icr), .fir_in_data(fir_id), .fir_in_ack(fir_ia),
    .fir_y(fir_y), .fir_y_cr(fir_ycr), .fir_out_ack(fir_oa),
    .conv_pc(c_pc), .conv_ev(c_ev), .conv_in(c_in), .conv_out(c_out), .conv_out_n(c_outn)
  );

  int unsigned s_fe, s_fp, s_ae, s_ap, s_me, s_mp, s_fir;
  int unsigned g_fe, g_fp, g_ae, g_ap, g_me, g_mp, g_fir;

  tb_hyb_src #(.DW(4))  src_fe (.clk, .rst_n, .go, .gap, .ack(fe_ia), .cr(fe_icr), .data(fe_id), .sent(s_fe));
  tb_hyb_src #(.DW(4))  src_fp (.clk, .rst_n, .go, .gap, .ack(fp_ia), .cr(fp_icr), .data(fp_id), .sent(s_fp));
  tb_hyb_src #(.DW(33)) src_ae (.clk, .rst_n, .go, .gap, .ack(ae_ia), .cr(ae_icr), .data({ae_b, ae_a}), .sent(s_ae));
  tb_hyb_src #(.DW(33)) src_ap (.clk, .rst_n, .go, .gap, .ack(ap_ia), .cr(ap_icr), .data({ap_b, ap_a}), .sent(s_ap));
  tb_hyb_src #(.DW(16)) src_me (.clk, .rst_n, .go, .gap, .ack(me_ia), .cr(me_icr), .data({me_b, me_a}), .sent(s_me));
  tb_hyb_src #(.DW(16)) src_mp (.clk, .rst_n, .go, .gap, .ack(mp_ia), .cr(mp_icr), .data({mp_b, mp_a}), .sent(s_mp));
  tb_hyb_src #(.DW(6))  src_fir (.clk, .rst_n, .go, .gap, .ack(fir_ia), .cr(fir_icr), .data(fir_id), .sent(s_fir));

  tb_hyb_sink #(.DW(4),  .LAT(1)) snk_fe (.clk, .rst_n, .stall, .valid(dr_valid(fe_ocr)), .value({fe_od, fe_ocr.t}), .ack(fe_oa), .count(g_fe));
  tb_hyb_sink #(.DW(4),  .LAT(2)) snk_fp (.clk, .rst_n, .stall, .valid(dr_valid(fp_ocr)), .value({fp_od, fp_ocr.t}), .ack(fp_oa), .count(g_fp));
  tb_hyb_sink #(.DW(17), .LAT(1)) snk_ae (.clk, .rst_n, .stall, .valid(dr_valid(ae_co)), .value({ae_co.t, ae_s}), .ack(ae_oa), .count(g_ae));
  tb_hyb_sink #(.DW(17), .LAT(2)) snk_ap (.clk, .rst_n, .stall, .valid(dr_valid(ap_co)), .value({ap_co.t, ap_s}), .ack(ap_oa), .count(g_ap));
  tb_hyb_sink #(.DW(16), .LAT(1)) snk_me (.clk, .rst_n, .stall, .valid(dr_valid(me_pcr)), .value(me_p), .ack(me_oa), .count(g_me));
  tb_hyb_sink #(.DW(16), .LAT(2)) snk_mp (.clk, .rst_n, .stall, .valid(dr_valid(mp_pcr)), .value(mp_p), .ack(mp_oa), .count(g_mp));
  tb_hyb_sink #(.DW(15), .LAT(1)) snk_fir (.clk, .rst_n, .stall, .valid(dr_valid(fir_ycr)), .value(fir_y), .ack(fir_oa), .count(g_fir));

  // ---- mechanism counters
  int n_isolate = 0, n_stale = 0, n_join = 0, n_join_wait = 0, n_shift = 0;
  int n_conv[3] = '{0, 0, 0};

  for (genvar k = 0; k < 10; k++) begin : g_probe
    always @(posedge clk) if (rst_n) begin
      if (dut.u_fifo_ea.g_st[k].u_st.pc && !dut.u_fifo_ea.g_st[k].u_st.ev &&
          dr_valid(dut.u_fifo_ea.cr[k+1]) && !dr_valid(dut.u_fifo_ea.cr[k])) n_isolate++;
      if (dut.u_fifo_ea.g_st[k].u_st.s && dut.u_fifo_ea.g_st[k].u_st.t &&
          !dut.u_fifo_ea.g_st[k].u_st.u_sc.t_prime) n_stale++;
      if (dut.u_fifo_pd.g_st[k].u_st.s && dut.u_fifo_pd.g_st[k].u_st.t &&
          !dut.u_fifo_pd.g_st[k].u_st.u_sc.t_prime) n_stale++;
    end
  end

  logic join_s_q = 1'b0, shift_q = 1'b0;
  always @(posedge clk) if (rst_n) begin
    logic js;
    dr_t [1:0] jl;
    js = dut.u_fir.g_lvl[1].g_node[0].g_add.s0;
    jl = dut.u_fir.g_lvl[1].g_node[0].g_add.u_add.link_in;
    if (js && !join_s_q) n_join++;
    if (js && !join_s_q && dr_valid(jl[0]) && dr_valid(jl[1])) n_join_wait++;
    join_s_q <= js;
    if (fir_ia && !shift_q) n_shift++;
    shift_q <= fir_ia;
  end

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam logic [5:0] COEF [8] = '{6'd1, 6'd2, 6'd5, 6'd8, 6'd8, 6'd5, 6'd2, 6'd1};

  task automatic conv_step(input logic p, input logic e, input logic i, input logic exp_out, input int row);
    @(negedge clk); c_pc = p; c_ev = e; c_in = i;
    @(posedge clk); #1;
    check(c_out == exp_out && c_outn == !exp_out, $sformatf("converter row %0d", row));
    if (row >= 0) n_conv[row]++;
  endtask

  initial begin
    c_pc = 1; c_ev = 1; c_in = 0;
    for (int i = 0; i < 3 * NI; i++) begin
      src_fe.mem[i] = 4'($urandom);
      src_fp.mem[i] = 4'($urandom);
      src_ae.mem[i] = 33'({$urandom, $urandom});
      src_ap.mem[i] = 33'({$urandom, $urandom});
      src_me.mem[i] = 16'($urandom);
      src_mp.mem[i] = 16'($urandom);
      src_fir.mem[i] = 6'($urandom);
    end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    // converter cell: table rows
    conv_step(1, 1, 1, 1, 0);
    conv_step(1, 0, 0, 1, 1);
    conv_step(0, 0, 0, 0, 2);
    conv_step(1, 1, 0, 0, -1);

    // phase 1: full rate
    src_fe.n = NI; src_fp.n = NI; src_ae.n = NI; src_ap.n = NI; src_me.n = NI; src_mp.n = NI; src_fir.n = NI;
    go = 1'b1;
    wait (g_fe == NI && g_fp == NI && g_ae == NI && g_ap == NI && g_me == NI && g_mp == NI && g_fir == NI);

    // full-rate timing (unit gate delay per tick): latency one tick per
    // stage; cycle 5 ticks with EA detectors, 7 with PD, 6 for the FIR input
    check(snk_fe.t_got[0] - src_fe.t_drive[0] == 10 && snk_fp.t_got[0] - src_fp.t_drive[0] == 10, "FIFO latency 10");
    check(snk_ae.t_got[0] - src_ae.t_drive[0] == 16 && snk_ap.t_got[0] - src_ap.t_drive[0] == 16, "adder latency 16");
    check(snk_me.t_got[0] - src_me.t_drive[0] == 16 && snk_mp.t_got[0] - src_mp.t_drive[0] == 16, "multiplier latency 16");
    check(snk_fir.t_got[0] - src_fir.t_drive[0] == 51, "FIR latency 51");
    for (int i = 1; i < NI; i++) begin
      check(snk_fe.t_got[i] - snk_fe.t_got[i-1] == 5 && snk_ae.t_got[i] - snk_ae.t_got[i-1] == 5 &&
            snk_me.t_got[i] - snk_me.t_got[i-1] == 5, $sformatf("EA interval at %0d", i));
      check(snk_fp.t_got[i] - snk_fp.t_got[i-1] == 7 && snk_ap.t_got[i] - snk_ap.t_got[i-1] == 7 &&
            snk_mp.t_got[i] - snk_mp.t_got[i-1] == 7, $sformatf("PD interval at %0d", i));
      check(snk_fir.t_got[i] - snk_fir.t_got[i-1] == 6, $sformatf("FIR interval at %0d", i));
    end

    // phase 2: receivers stalled; FIFOs fill to one item per stage
    stall = 1'b1;
    src_fe.n = 2 * NI; src_fp.n = 2 * NI; src_ae.n = 2 * NI; src_ap.n = 2 * NI;
    src_me.n = 2 * NI; src_mp.n = 2 * NI; src_fir.n = 2 * NI;
    repeat (400) @(posedge clk);
    check(s_fe - NI == 10 && s_fp - NI == 10, $sformatf("FIFO capacity EA %0d PD %0d, expected 10", s_fe - NI, s_fp - NI));
    check(s_ae - NI == 16 && s_me - NI == 16, $sformatf("adder/multiplier capacity %0d/%0d, expected 16", s_ae - NI, s_me - NI));
    stall = 1'b0;
    wait (g_fe == 2*NI && g_fp == 2*NI && g_ae == 2*NI && g_ap == 2*NI && g_me == 2*NI && g_mp == 2*NI && g_fir == 2*NI);

    // phase 3: variable data rate
    src_fe.n = 3 * NI; src_fp.n = 3 * NI; src_ae.n = 3 * NI; src_ap.n = 3 * NI;
    src_me.n = 3 * NI; src_mp.n = 3 * NI; src_fir.n = 3 * NI;
    while (!(g_fe == 3*NI && g_fp == 3*NI && g_ae == 3*NI && g_ap == 3*NI && g_me == 3*NI && g_mp == 3*NI && g_fir == 3*NI)) begin
      gap = $urandom_range(0, 10);
      @(posedge clk);
    end
    repeat (5) @(posedge clk);

    for (int i = 0; i < 3 * NI; i++) begin
      logic [16:0] ea, ep;
      logic [14:0] y;
      check(snk_fe.got[i] == src_fe.mem[i], $sformatf("FIFO EA item %0d", i));
      check(snk_fp.got[i] == src_fp.mem[i], $sformatf("FIFO PD item %0d", i));
      ea = 17'(src_ae.mem[i][16:1]) + 17'(src_ae.mem[i][32:17]) + 17'(src_ae.mem[i][0]);
      ep = 17'(src_ap.mem[i][16:1]) + 17'(src_ap.mem[i][32:17]) + 17'(src_ap.mem[i][0]);
      check(snk_ae.got[i] == ea, $sformatf("adder EA item %0d", i));
      check(snk_ap.got[i] == ep, $sformatf("adder PD item %0d", i));
      check(snk_me.got[i] == 16'(src_me.mem[i][7:0]) * 16'(src_me.mem[i][15:8]), $sformatf("mult EA item %0d", i));
      check(snk_mp.got[i] == 16'(src_mp.mem[i][7:0]) * 16'(src_mp.mem[i][15:8]), $sformatf("mult PD item %0d", i));
      y = '0;
      for (int k = 0; k < 8; k++) if (i - k >= 0) y += 15'(src_fir.mem[i-k]) * 15'(COEF[k]);
      check(snk_fir.got[i] == y, $sformatf("FIR y(%0d): got %0d exp %0d", i, snk_fir.got[i], y));
    end

    $display("mechanisms: isolate=%0d stale_ack=%0d join=%0d both_links_valid_at_s=%0d tap_shift=%0d conv_rows=%0d/%0d/%0d",
             n_isolate, n_stale, n_join, n_join_wait, n_shift, n_conv[0], n_conv[1], n_conv[2]);
    check(n_isolate > 0, "isolate happened");
    check(n_stale > 0, "stale acknowledge held off by T'");
    check(n_join == 3 * NI && n_join_wait == n_join, $sformatf("JOIN evaluations %0d (%0d with both links valid)", n_join, n_join_wait));
    check(n_shift == 3 * NI, $sformatf("tap register loads %0d", n_shift));
    check(n_conv[0] > 0 && n_conv[1] > 0 && n_conv[2] > 0, "converter rows");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
