// tb_cd_ea: random legal (pc,ev) phases and random dual-rail inputs (valid
// values and spacers) into a single-input and a two-input (JOIN) EA-Hybrid
// completion detector; S is compared every tick with a model: set when all
// inputs are valid in evaluate, cleared in precharge, held in isolate.
//
// The expected behaviour follows the published detector description; the
// random stimulus is this bench's own.
module tb_cd_ea;
  import hyb_pkg::*;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic pc, ev;
  dr_t [1:0] d;
  logic s1, s2, m1, m2;
  int sets = 0, holds = 0;

  cd_ea #(.NJOIN(1)) dut1 (.clk, .rst_n, .pc, .ev, .d(d[0]), .s(s1));
  cd_ea #(.NJOIN(2)) dut2 (.clk, .rst_n, .pc, .ev, .d(d), .s(s2));

  function automatic dr_t rnd_dr();
    case ($urandom_range(0, 2))
      0: return DR_SPACER;
      1: return dr_enc(1'b0);
      default: return dr_enc(1'b1);
    endcase
  endfunction

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    pc = 1; ev = 1; d = '0; m1 = 0; m2 = 0;
    @(posedge clk); #1 check(s1 == 0 && s2 == 0, "reset clears S");
    @(negedge clk); rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      case ($urandom_range(0, 2))
        0: {pc, ev} = 2'b00;
        1: {pc, ev} = 2'b10;
        default: {pc, ev} = 2'b11;
      endcase
      d[0] = rnd_dr();
      d[1] = rnd_dr();
      @(posedge clk);
      if (pc && ev && dr_valid(d[0])) m1 = 1; else if (!pc && !ev) m1 = 0;
      if (pc && ev && dr_valid(d[0]) && dr_valid(d[1])) m2 = 1; else if (!pc && !ev) m2 = 0;
      if (pc && ev && dr_valid(d[0]) && !dr_valid(d[1])) sets++;
      if (pc && !ev) holds++;
      #1;
      check(s1 == m1, $sformatf("tick %0d single: got %b exp %b", i, s1, m1));
      check(s2 == m2, $sformatf("tick %0d join: got %b exp %b", i, s2, m2));
    end
    check(sets > 0 && holds > 0, "join waited for its second input and isolate held");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
