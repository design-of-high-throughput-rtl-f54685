// tb_cd_pd: the PD-Hybrid completion detector is a NAND2 of the SLG's
// dynamic nodes with one tick of delay. All four node combinations are
// driven in random order and the output is compared one tick later.
//
// Expected values follow the published NAND2 detector.
module tb_cd_pd;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic x, x_n, s;
  int seen[4];
  cd_pd dut (.clk, .rst_n, .x, .x_n, .s);

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    x = 0; x_n = 0;
    seen = '{0, 0, 0, 0};
    @(posedge clk); #1 check(s == 0, "reset clears S");
    @(negedge clk); rst_n = 1;
    for (int i = 0; i < 400; i++) begin
      logic xs, xns;
      @(negedge clk);
      x = $urandom; x_n = $urandom;
      xs = x; xns = x_n;
      seen[{xs, xns}]++;
      @(posedge clk); #1;
      check(s == !(xs && xns), $sformatf("nodes %b%b: got %b", xs, xns, s));
    end
    foreach (seen[k]) check(seen[k] > 0, $sformatf("node pair %0d driven", k));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
