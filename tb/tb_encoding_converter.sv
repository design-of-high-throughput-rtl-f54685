// tb_encoding_converter: walks the converter's function table (reset,
// evaluate with in=0 and in=1, isolate, precharge) and then random sequences,
// comparing out/out_n each tick with a model of the precharged node.
//
// Expected values follow the published converter behaviour.
module tb_encoding_converter;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic pc, ev, in, out, out_n, xm;
  encoding_converter dut (.clk, .rst_n, .pc, .ev, .in, .out, .out_n);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step(input logic p, input logic e, input logic i, input logic exp_out, input string what);
    @(negedge clk); pc = p; ev = e; in = i;
    @(posedge clk); #1;
    check(out == exp_out && out_n == !exp_out, what);
  endtask

  initial begin
    pc = 1; ev = 1; in = 0;
    @(posedge clk); #1 check(out == 0 && out_n == 1, "reset: (0,1)");
    @(negedge clk); rst_n = 1;
    step(1, 1, 0, 0, "evaluate in=0 gives (0,1)");
    step(1, 1, 1, 1, "evaluate in=1 gives (1,0)");
    step(1, 0, 0, 1, "isolate holds 1");
    step(0, 0, 1, 0, "precharge gives (0,1), no spacer");
    step(1, 0, 1, 0, "isolate holds 0");
    step(1, 1, 0, 0, "evaluate in=0");
    xm = 1;  // node
    for (int i = 0; i < 1000; i++) begin
      @(negedge clk);
      case ($urandom_range(0, 2))
        0: {pc, ev} = 2'b00;
        1: {pc, ev} = 2'b10;
        default: {pc, ev} = 2'b11;
      endcase
      in = $urandom;
      @(posedge clk);
      if (!pc && !ev) xm = 1; else if (pc && ev && in) xm = 0;
      #1 check(out == !xm && out_n == xm, $sformatf("random tick %0d", i));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
