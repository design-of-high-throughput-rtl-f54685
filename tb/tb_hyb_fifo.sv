// tb_hyb_fifo: self-checking test of the 4-bit, 10-stage FIFO in both styles.
//
// Each style gets its own source and receiver. Checks: every item comes out
// in order and unchanged; latency is one tick per stage; at full rate the
// output interval is 5 ticks (EA-Hybrid: t_ev + 2 t_CD + 2 t_NAND3) or 7
// ticks (PD-Hybrid: t_ev + t_ev* + 2 t_NAND2 + 2 t_NAND3 + t_pc*); with the
// receiver stalled the FIFO takes exactly DEPTH items (full capacity, no
// spacers between items); and random gaps at the input (variable data rate)
// lose nothing.
//
// Cycle counts checked (5 ticks EA, 7 ticks PD, one tick per stage, 100%
// capacity) follow from the published cycle-time equations and capacity claim
// with one tick per gate.
module tb_hyb_fifo;
  import hyb_pkg::*;

  localparam int unsigned WIDTH = 4;
  localparam int unsigned DEPTH = 10;
  localparam int unsigned NITEM = 60;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  logic        go;
  int unsigned gap;
  logic        stall_ea, stall_pd;

  // EA-Hybrid
  dr_t ea_in_cr, ea_out_cr;
  logic [WIDTH-1:1] ea_in_data, ea_out_data;
  logic ea_in_ack, ea_out_ack;
  int unsigned ea_sent, ea_got;
  tb_hyb_src  #(.DW(WIDTH)) src_ea (.clk, .rst_n, .go, .gap, .ack(ea_in_ack), .cr(ea_in_cr), .data(ea_in_data), .sent(ea_sent));
  hyb_fifo    #(.STYLE(STYLE_EA), .WIDTH(WIDTH), .DEPTH(DEPTH)) dut_ea (
    .clk, .rst_n, .in_cr(ea_in_cr), .in_data(ea_in_data), .in_ack(ea_in_ack),
    .out_cr(ea_out_cr), .out_data(ea_out_data), .out_ack(ea_out_ack));
  tb_hyb_sink #(.DW(WIDTH), .LAT(1)) snk_ea (.clk, .rst_n, .stall(stall_ea), .valid(dr_valid(ea_out_cr)),
    .value({ea_out_data, ea_out_cr.t}), .ack(ea_out_ack), .count(ea_got));

  // PD-Hybrid
  dr_t pd_in_cr, pd_out_cr;
  logic [WIDTH-1:1] pd_in_data, pd_out_data;
  logic pd_in_ack, pd_out_ack;
  int unsigned pd_sent, pd_got;
  tb_hyb_src  #(.DW(WIDTH)) src_pd (.clk, .rst_n, .go, .gap, .ack(pd_in_ack), .cr(pd_in_cr), .data(pd_in_data), .sent(pd_sent));
  hyb_fifo    #(.STYLE(STYLE_PD), .WIDTH(WIDTH), .DEPTH(DEPTH)) dut_pd (
    .clk, .rst_n, .in_cr(pd_in_cr), .in_data(pd_in_data), .in_ack(pd_in_ack),
    .out_cr(pd_out_cr), .out_data(pd_out_data), .out_ack(pd_out_ack));
  tb_hyb_sink #(.DW(WIDTH), .LAT(2)) snk_pd (.clk, .rst_n, .stall(stall_pd), .valid(dr_valid(pd_out_cr)),
    .value({pd_out_data, pd_out_cr.t}), .ack(pd_out_ack), .count(pd_got));

  // watchdog
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_phase(input int unsigned first, input int unsigned cnt, input bit stall_first,
                           input bit random_gap);
    // load both sources, optionally stall the receivers to fill the FIFOs
    for (int i = 0; i < int'(cnt); i++) begin
      logic [WIDTH-1:0] v;
      v = WIDTH'($urandom);
      src_ea.mem[first+i] = v;
      src_pd.mem[first+i] = v;
    end
    src_ea.n = first + cnt;
    src_pd.n = first + cnt;
  endtask

  initial begin
    go = 1'b0; gap = 0; stall_ea = 1'b0; stall_pd = 1'b0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);

    // ---- phase 1: full-rate stream
    run_phase(0, 30, 1'b0, 1'b0);
    go = 1'b1;
    wait (ea_got == 30 && pd_got == 30);
    repeat (5) @(posedge clk);
    for (int i = 0; i < 30; i++) begin
      check(snk_ea.got[i] == src_ea.mem[i], $sformatf("EA item %0d: got %h exp %h", i, snk_ea.got[i], src_ea.mem[i]));
      check(snk_pd.got[i] == src_pd.mem[i], $sformatf("PD item %0d: got %h exp %h", i, snk_pd.got[i], src_pd.mem[i]));
    end
    check(snk_ea.t_got[0] - src_ea.t_drive[0] == DEPTH,
          $sformatf("EA latency %0d ticks, expected %0d", snk_ea.t_got[0] - src_ea.t_drive[0], DEPTH));
    check(snk_pd.t_got[0] - src_pd.t_drive[0] == DEPTH,
          $sformatf("PD latency %0d ticks, expected %0d", snk_pd.t_got[0] - src_pd.t_drive[0], DEPTH));
    for (int i = 10; i < 30; i++) begin
      check(snk_ea.t_got[i] - snk_ea.t_got[i-1] == 5,
            $sformatf("EA interval at %0d: %0d ticks, expected 5", i, snk_ea.t_got[i] - snk_ea.t_got[i-1]));
      check(snk_pd.t_got[i] - snk_pd.t_got[i-1] == 7,
            $sformatf("PD interval at %0d: %0d ticks, expected 7", i, snk_pd.t_got[i] - snk_pd.t_got[i-1]));
    end

    // ---- phase 2: receivers stalled, FIFOs must hold exactly DEPTH items
    stall_ea = 1'b1; stall_pd = 1'b1;
    run_phase(30, 15, 1'b1, 1'b0);
    repeat (300) @(posedge clk);
    check(ea_sent - 30 == DEPTH, $sformatf("EA capacity %0d items, expected %0d", ea_sent - 30, DEPTH));
    check(pd_sent - 30 == DEPTH, $sformatf("PD capacity %0d items, expected %0d", pd_sent - 30, DEPTH));
    check(ea_got == 30 && pd_got == 30, "nothing delivered while stalled");
    stall_ea = 1'b0; stall_pd = 1'b0;
    wait (ea_got == 45 && pd_got == 45);

    // ---- phase 3: random gaps at the input (variable data rate)
    run_phase(45, 15, 1'b0, 1'b1);
    for (int i = 0; i < 15; i++) begin
      gap = $urandom_range(0, 12);
      wait (ea_sent > 45 + i || ea_sent == 60);
      @(posedge clk);
    end
    wait (ea_got == 60 && pd_got == 60);
    repeat (5) @(posedge clk);
    for (int i = 30; i < 60; i++) begin
      check(snk_ea.got[i] == src_ea.mem[i], $sformatf("EA item %0d: got %h exp %h", i, snk_ea.got[i], src_ea.mem[i]));
      check(snk_pd.got[i] == src_pd.mem[i], $sformatf("PD item %0d: got %h exp %h", i, snk_pd.got[i], src_pd.mem[i]));
    end
    check(ea_got == 60 && pd_got == 60, "no extra items");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
