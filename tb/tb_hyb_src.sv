// tb_hyb_src: test source for a hybrid-encoded input channel.
//
// Sends the items mem[0..n-1] in order. Bit 0 of an item goes on the dual-rail
// request pair 'cr', the other bits on the single-rail 'data'. For each item:
// drive it, wait for ack to rise, return 'cr' to the spacer, wait for ack to
// fall, then wait 'gap' extra ticks. Behaves as a stage whose gates take one
// tick. 'sent' counts acknowledged items; 't_drive[i]' is the tick at which
// item i was put on the channel.
//
// The boundary protocol is this design's own choice.
module tb_hyb_src
  import hyb_pkg::*;
#(
  parameter int unsigned DW   = 4,
  parameter int unsigned MAXN = 512
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          go,
  input  int unsigned   gap,
  input  logic          ack,
  output dr_t           cr,
  output logic [DW-1:1] data,
  output int unsigned   sent
);

  logic [DW-1:0] mem     [MAXN];
  int unsigned   t_drive [MAXN];
  int unsigned   n;
  int unsigned   tick;
  int unsigned   wait_cnt;
  typedef enum logic [1:0] {S_IDLE, S_DRIVE, S_SPACER} st_e;
  st_e st;

  initial begin
    n = 0;
    for (int i = 0; i < int'(MAXN); i++) begin
      mem[i] = '0;
      t_drive[i] = 0;
    end
  end

  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st       <= S_IDLE;
      cr       <= DR_SPACER;
      data     <= '0;
      sent     <= 0;
      tick     <= 0;
      wait_cnt <= 0;
    end else begin
      tick <= tick + 1;
      case (st)
        S_IDLE:
          if (wait_cnt != 0) wait_cnt <= wait_cnt - 1;
          else if (go && sent < n && !ack) begin
            cr   <= dr_enc(mem[sent][0]);
            data <= mem[sent][DW-1:1];
            t_drive[sent] <= tick + 1;
            st   <= S_DRIVE;
          end
        S_DRIVE:
          if (ack) begin
            cr   <= DR_SPACER;
            sent <= sent + 1;
            st   <= S_SPACER;
          end
        S_SPACER:
          if (!ack) begin
            if (gap == 0 && go && sent < n) begin
              cr   <= dr_enc(mem[sent][0]);
              data <= mem[sent][DW-1:1];
              t_drive[sent] <= tick + 1;
              st   <= S_DRIVE;
            end else begin
              wait_cnt <= gap;
              st <= S_IDLE;
            end
          end
        default: st <= S_IDLE;
      endcase
    end
  end

endmodule
