// tb_fir_tap_latches: the tap registers with eight modelled multiplier first
// stages. Each model raises its completion signal a random 1-4 ticks after
// its request becomes valid and drops it a random 2-6 ticks later. Checks:
// at every capture, tap k shows x(n-k) (0 before the first sample); each
// multiplier captures every sample exactly once (its request is withdrawn
// after the capture); in_ack rises only after all eight have captured.
//
// The register control rule checked follows the published description; the
// per-multiplier gating is this design's own.
module tb_fir_tap_latches;
  import hyb_pkg::*;
  localparam int unsigned NTAP = 8;
  localparam int unsigned XW = 6;
  localparam int unsigned NS = 60;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  dr_t in_cr;
  logic [XW-1:0] x;
  logic in_ack;
  logic [NTAP-1:0][XW-1:0] tap_x;
  dr_t [NTAP-1:0] mul_link;
  logic [NTAP-1:0] mul_s;

  logic [XW-1:0] hist [NS];
  int n_cur;
  int caps [NTAP];

  fir_tap_latches #(.NTAP(NTAP), .XW(XW)) dut (.clk, .rst_n, .in_cr, .x, .in_ack, .tap_x, .mul_link, .mul_s);

  for (genvar k = 0; k < int'(NTAP); k++) begin : g_m
    int cnt;
    logic hi;
    always @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        mul_s[k] <= 1'b0; cnt <= 0; hi <= 1'b0;
      end else if (!hi) begin
        if (dr_valid(mul_link[k])) begin
          if (cnt == 0) cnt <= $urandom_range(1, 4);
          else if (cnt == 1) begin
            logic [XW-1:0] e;
            e = (n_cur - k >= 0) ? hist[n_cur - k] : '0;
            check(tap_x[k] == e, $sformatf("sample %0d tap %0d: got %0d exp %0d", n_cur, k, tap_x[k], e));
            caps[k]++;
            mul_s[k] <= 1'b1; hi <= 1'b1; cnt <= $urandom_range(2, 6);
          end else cnt <= cnt - 1;
        end
      end else begin
        if (cnt <= 1) begin mul_s[k] <= 1'b0; hi <= 1'b0; cnt <= 0; end
        else cnt <= cnt - 1;
      end
    end
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_cr = DR_SPACER; x = '0; n_cur = -1;
    foreach (caps[k]) caps[k] = 0;
    for (int i = 0; i < int'(NS); i++) hist[i] = XW'($urandom);
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < int'(NS); i++) begin
      @(negedge clk);
      n_cur = i;
      x = hist[i];
      in_cr = dr_enc(hist[i][0]);
      while (!in_ack) @(negedge clk);
      foreach (caps[k]) check(caps[k] == i + 1, $sformatf("sample %0d: multiplier %0d captured %0d times", i, k, caps[k] - i));
      in_cr = DR_SPACER;
      while (in_ack) @(negedge clk);
      repeat ($urandom_range(0, 3)) @(negedge clk);
    end
    repeat (20) @(negedge clk);
    foreach (caps[k]) check(caps[k] == NS, $sformatf("multiplier %0d total captures %0d", k, caps[k]));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
