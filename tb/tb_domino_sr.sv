// tb_domino_sr: random phases, enables and function values into a 4-gate
// single-rail domino row; the outputs are compared every tick with a model:
// cleared in precharge, OR-ed with f in evaluate when enabled (a discharged
// node stays discharged), held in isolate.
//
// Expected values follow the published precharge/evaluate/isolate rules.
module tb_domino_sr;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic pc, ev, en;
  logic [3:0] f, out, m;
  int held_ones = 0;
  domino_sr #(.W(4)) dut (.clk, .rst_n, .pc, .ev, .en, .f, .out);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    pc = 1; ev = 1; en = 0; f = 0; m = 0;
    @(posedge clk); #1 check(out == 0, "reset clears outputs");
    @(negedge clk); rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      case ($urandom_range(0, 3))
        0: {pc, ev} = 2'b00;
        1: {pc, ev} = 2'b10;
        default: {pc, ev} = 2'b11;
      endcase
      en = $urandom; f = $urandom;
      @(posedge clk);
      if (!pc && !ev) m = 0;
      else if (pc && ev && en) m = m | f;
      if (pc && !ev && |m) held_ones++;
      #1 check(out == m, $sformatf("tick %0d: got %h exp %h", i, out, m));
    end
    check(held_ones > 0, "isolate held evaluated outputs");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
