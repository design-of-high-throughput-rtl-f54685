// tb_fir_filter: self-checking test of the 8-tap, 6-bit FIR filter with its
// default coefficients. Random samples (with runs of 0 and 63) are sent at
// full rate and then with random gaps (the read channel's varying data
// rate); every output is compared with y(n) = sum COEF[k]*x(n-k), taking
// x(n) = 0 before the first sample. Also checks the latency (12 multiplier
// stages + 12 + 13 + 14 adder stages = 51 ticks) and the full-rate output
// interval of 6 ticks, which the four-step input exchange sets (the
// internal EA-Hybrid stages alone would allow 5).
//
// The 51-tick latency and 6-tick interval checked are properties of this
// implementation's unit-delay model; the published filter gives times in ns.
module tb_fir_filter;
  import hyb_pkg::*;

  localparam int unsigned NTAP  = 8;
  localparam int unsigned XW    = 6;
  localparam int unsigned YW    = 15;
  localparam int unsigned NITEM = 80;
  localparam logic [5:0] COEF [NTAP] = '{6'd1, 6'd2, 6'd5, 6'd8, 6'd8, 6'd5, 6'd2, 6'd1};

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
  int unsigned gap = 0;
  dr_t in_cr, y_cr;
  logic [XW-1:1] in_data;
  logic in_ack, out_ack;
  logic [YW-1:0] y;
  int unsigned sent, got;

  tb_hyb_src #(.DW(XW)) src (.clk, .rst_n, .go, .gap, .ack(in_ack), .cr(in_cr), .data(in_data), .sent(sent));
  fir_filter dut (.clk, .rst_n, .in_cr, .in_data, .in_ack, .y, .y_cr, .out_ack);
  tb_hyb_sink #(.DW(YW), .LAT(1)) snk (.clk, .rst_n, .stall(1'b0), .valid(dr_valid(y_cr)), .value(y), .ack(out_ack), .count(got));

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < int'(NITEM); i++)
      src.mem[i] = (i >= 10 && i < 20) ? 6'd63 : (i >= 20 && i < 24) ? 6'd0 : 6'($urandom);
    src.n = NITEM;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    go = 1'b1;
    wait (sent >= 40);
    while (got < NITEM) begin
      gap = $urandom_range(0, 15);
      @(posedge clk);
    end
    repeat (5) @(posedge clk);
    for (int n = 0; n < int'(NITEM); n++) begin
      logic [YW-1:0] e;
      e = '0;
      for (int k = 0; k < int'(NTAP); k++)
        if (n - k >= 0) e += YW'(src.mem[n-k]) * YW'(COEF[k]);
      check(snk.got[n] == e, $sformatf("y(%0d): got %0d exp %0d", n, snk.got[n], e));
    end
    check(snk.t_got[0] - src.t_drive[0] == 51, $sformatf("latency %0d ticks, expected 51", snk.t_got[0] - src.t_drive[0]));
    for (int n = 12; n < 30; n++)
      check(snk.t_got[n] - snk.t_got[n-1] == 6, $sformatf("interval at %0d: %0d ticks", n, snk.t_got[n] - snk.t_got[n-1]));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
