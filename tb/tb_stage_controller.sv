// tb_stage_controller: drives random S/T sequences into the stage controller
// and compares pc, ev and T' every tick with a model written from the
// controller's function table (pc = NAND3(S,T,T'), ev = not S, T' reset by
// S=0 and set by S=1 with T=0, one tick each). Also checks reset values and
// that each table row (evaluate, isolate, precharge, isolate with stale T)
// is visited.
//
// Expected values follow the published stage-controller function table.
module tb_stage_controller;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic s, t, pc, ev, tp;
  logic pc_m, ev_m, tp_m;
  int rows[4];

  stage_controller dut (.clk, .rst_n, .s, .t, .pc, .ev, .t_prime(tp));

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    s = 0; t = 0;
    rows = '{0, 0, 0, 0};
    @(posedge clk); #1;
    check(pc == 1 && ev == 1 && tp == 0, "reset state is evaluate with T'=0");
    pc_m = 1; ev_m = 1; tp_m = 0;
    @(negedge clk); rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      // slow-changing random inputs so every row is reached
      if ($urandom_range(0, 2) == 0) s = $urandom;
      if ($urandom_range(0, 2) == 0) t = $urandom;
      @(posedge clk);
      // model update from the inputs sampled at this edge
      pc_m = ~(s & t & tp_m);
      ev_m = ~s;
      tp_m = !s ? 1'b0 : (!t ? 1'b1 : tp_m);
      #1;
      check(pc == pc_m && ev == ev_m && tp == tp_m,
            $sformatf("tick %0d: s=%b t=%b got pc=%b ev=%b tp=%b exp %b %b %b", i, s, t, pc, ev, tp, pc_m, ev_m, tp_m));
      if (pc && ev) rows[0]++;
      if (pc && !ev && tp) rows[1]++;
      if (!pc && !ev) rows[2]++;
      if (pc && !ev && !tp && t) rows[3]++;
    end
    foreach (rows[r]) check(rows[r] > 0, $sformatf("table row %0d visited", r));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
