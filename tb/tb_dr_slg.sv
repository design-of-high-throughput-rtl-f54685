// tb_dr_slg: tests the dual-rail synchronizing gate as a 2-input AND with one
// link (SLG) and as a full-adder carry (majority) gate whose two links act
// only as enables (SLGL / JOIN form). Random phases, link pairs (valid or
// spacer) and data; outputs compared each tick with a model: spacer in
// precharge, the one-hot dual-rail result in evaluate once every link is
// valid, hold in isolate. Every input combination of the AND is covered.
//
// Expected values follow the published SLG behaviour; gate functions tested
// are this bench's choice.
module tb_dr_slg;
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
  dr_t [1:0] lk;
  logic [1:0] xa;
  logic [2:0] xm;
  dr_t oa, om, ma, mm;
  logic xa_n, xan_n, xm_n, xmn_n;
  int combo[4];

  dr_slg #(.NIN(2), .NLINK(1), .TT(TT_AND2)) dut_and (.clk, .rst_n, .pc, .ev, .link(lk[0]), .x(xa),
    .out(oa), .x_node(xa_n), .xn_node(xan_n));
  dr_slg #(.NIN(3), .NLINK(2), .TT(TT_MAJ3)) dut_maj (.clk, .rst_n, .pc, .ev, .link(lk), .x(xm),
    .out(om), .x_node(xm_n), .xn_node(xmn_n));

  function automatic dr_t rnd_dr();
    case ($urandom_range(0, 3))
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
    pc = 1; ev = 1; lk = '0; xa = 0; xm = 0; ma = DR_SPACER; mm = DR_SPACER;
    combo = '{0, 0, 0, 0};
    @(posedge clk); #1 check(oa == DR_SPACER && om == DR_SPACER, "reset gives spacer");
    @(negedge clk); rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      // a gate evaluates once per precharge, with inputs stable meanwhile
      case ($urandom_range(0, 3))
        0: {pc, ev} = 2'b00;
        1: {pc, ev} = 2'b10;
        default: {pc, ev} = 2'b11;
      endcase
      if (!pc) begin
        lk[0] = rnd_dr(); lk[1] = rnd_dr();
        xa = {$urandom, lk[0].t}; xm = $urandom;
      end else if (!dr_valid(lk[0]) && $urandom_range(0, 1)) begin
        lk[0] = dr_enc(xa[0]);
      end else if (!dr_valid(lk[1]) && $urandom_range(0, 1)) begin
        lk[1] = rnd_dr();
      end
      @(posedge clk);
      if (!pc && !ev) begin
        ma = DR_SPACER; mm = DR_SPACER;
      end else if (pc && ev) begin
        if (dr_valid(lk[0])) begin
          ma.t |= TT_AND2[xa]; ma.f |= ~TT_AND2[xa];
          combo[xa]++;
        end
        if (dr_valid(lk[0]) && dr_valid(lk[1])) begin
          mm.t |= TT_MAJ3[xm]; mm.f |= ~TT_MAJ3[xm];
        end
      end
      #1;
      check(oa == ma, $sformatf("AND tick %0d: got %b exp %b", i, oa, ma));
      check(om == mm, $sformatf("MAJ tick %0d: got %b exp %b", i, om, mm));
      check(xa_n == ~oa.t && xan_n == ~oa.f, "AND dynamic nodes are the inverted outputs");
    end
    foreach (combo[k]) check(combo[k] > 0, $sformatf("AND input combination %0d evaluated", k));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
