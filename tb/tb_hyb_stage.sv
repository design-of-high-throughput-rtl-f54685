// tb_hyb_stage: one EA-Hybrid and one PD-Hybrid stage, driven directly. The
// test walks a stage through evaluate -> isolate -> precharge -> evaluate and
// checks the tick at which each control and output changes; then holds the
// acknowledge T high (a stalled next stage) while a new item arrives and
// checks that the stage evaluates it but stays isolated until T has fallen
// and risen again (the T' element), and that the single-rail outputs follow
// their function inputs.
//
// Phase sequences follow the published protocol descriptions of both styles.
module tb_hyb_stage;
  import hyb_pkg::*;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  dr_t link;
  logic [2:0] f;
  logic t;
  logic s_ea, s_pd, pc_ea, ev_ea, pc_pd, ev_pd;
  dr_t cr_ea, cr_pd;
  logic [2:0] sr_ea, sr_pd;

  hyb_stage #(.STYLE(STYLE_EA), .NIN(1), .TT(TT_BUF), .W(3)) dut_ea (.clk, .rst_n, .link_in(link),
    .crit_x(link.t), .sr_f(f), .t, .s(s_ea), .cr_out(cr_ea), .sr_out(sr_ea), .pc(pc_ea), .ev(ev_ea));
  hyb_stage #(.STYLE(STYLE_PD), .NIN(1), .TT(TT_BUF), .W(3)) dut_pd (.clk, .rst_n, .link_in(link),
    .crit_x(link.t), .sr_f(f), .t, .s(s_pd), .cr_out(cr_pd), .sr_out(sr_pd), .pc(pc_pd), .ev(ev_pd));

  task automatic tick(input int n = 1);
    repeat (n) @(posedge clk);
    #1;
  endtask

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    link = DR_SPACER; f = 3'b000; t = 1'b0;
    tick(2);
    check(pc_ea && ev_ea && pc_pd && ev_pd && !s_ea && !s_pd, "after reset both stages ready to evaluate");
    rst_n = 1;
    for (int it = 0; it < 20; it++) begin
      logic v;
      logic [2:0] fv;
      v = $urandom; fv = $urandom;
      // data arrives
      @(negedge clk); link = dr_enc(v); f = fv;
      tick();
      check(cr_ea == dr_enc(v) && sr_ea == fv && s_ea, "EA: evaluates and S rises in the same tick");
      check(cr_pd == dr_enc(v) && sr_pd == fv && !s_pd, "PD: evaluates, S not yet");
      tick();
      check(!ev_ea && pc_ea, "EA: isolate one tick later");
      check(s_pd && ev_pd, "PD: S rises one tick after evaluation");
      // previous stage precharges: inputs vanish, outputs must hold
      @(negedge clk); link = DR_SPACER; f = 3'b000;
      tick();
      check(!ev_pd && pc_pd, "PD: isolate");
      tick(3);
      check(cr_ea == dr_enc(v) && sr_ea == fv && cr_pd == dr_enc(v) && sr_pd == fv, "isolated stages hold their data");
      // next stage acknowledges
      @(negedge clk); t = 1'b1;
      tick();
      check(!pc_ea && !ev_ea && !pc_pd && !ev_pd, "T -> precharge one tick later");
      tick();
      check(cr_ea == DR_SPACER && sr_ea == 0 && !s_ea, "EA: precharged and S low");
      check(cr_pd == DR_SPACER && sr_pd == 0 && s_pd, "PD: precharged, S still high");
      tick();
      check(pc_ea && ev_ea, "EA: ready to evaluate again");
      check(!s_pd, "PD: S low after precharge");
      tick();
      check(pc_pd && ev_pd, "PD: ready to evaluate again");
      // stalled next stage: T stays high while a new item arrives
      v = $urandom; fv = $urandom;
      @(negedge clk); link = dr_enc(v); f = fv;
      tick(2);
      @(negedge clk); link = DR_SPACER; f = 3'b000;
      tick(6);
      check(cr_ea == dr_enc(v) && cr_pd == dr_enc(v) && sr_ea == fv && sr_pd == fv, "new item taken while T stuck high");
      check(pc_ea && !ev_ea && pc_pd && !ev_pd, "stale T does not precharge the stage (T')");
      // next stage releases and then takes the item
      @(negedge clk); t = 1'b0;
      tick(3);
      check(pc_ea && pc_pd, "still isolated while T low");
      @(negedge clk); t = 1'b1;
      tick();
      check(!pc_ea && !pc_pd, "fresh T precharges");
      tick(4);
      check(cr_ea == DR_SPACER && cr_pd == DR_SPACER && pc_ea && ev_ea && pc_pd && ev_pd, "back to evaluate");
      @(negedge clk); t = 1'b0;
      tick(2);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
