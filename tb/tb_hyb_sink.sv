// tb_hyb_sink: test receiver for a hybrid-encoded output channel.
//
// Acts as the next stage: when 'valid' (the channel's dual-rail pair is not
// the spacer) and not 'stall', it records 'value' and raises 'ack' LAT ticks
// after the data appeared (1 = an EA-Hybrid completion detector, 2 = a
// PD-Hybrid one, which detects after its own evaluation); it drops 'ack' one
// tick after seeing the spacer. got[i] and t_got[i] are the i-th result and
// the tick at which it appeared on the channel.
//
// The boundary protocol is this design's own choice.
module tb_hyb_sink #(
  parameter int unsigned DW   = 4,
  parameter int unsigned LAT  = 1,
  parameter int unsigned MAXN = 512
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          stall,
  input  logic          valid,
  input  logic [DW-1:0] value,
  output logic          ack,
  output int unsigned   count
);

  logic [DW-1:0] got   [MAXN];
  int unsigned   t_got [MAXN];
  int unsigned   tick;
  typedef enum logic [1:0] {K_WAIT, K_PRE, K_ACK} st_e;
  st_e st;

  initial for (int i = 0; i < int'(MAXN); i++) begin
    got[i] = '0;
    t_got[i] = 0;
  end

  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st    <= K_WAIT;
      ack   <= 1'b0;
      count <= 0;
      tick  <= 0;
    end else begin
      tick <= tick + 1;
      case (st)
        K_WAIT:
          if (valid && !stall) begin
            if (count < MAXN) begin
              got[count]   <= value;
              t_got[count] <= tick;
            end
            count <= count + 1;
            if (LAT <= 1) begin
              ack <= 1'b1;
              st  <= K_ACK;
            end else begin
              st  <= K_PRE;
            end
          end
        K_PRE: begin
          ack <= 1'b1;
          st  <= K_ACK;
        end
        K_ACK:
          if (!valid) begin
            ack <= 1'b0;
            st  <= K_WAIT;
          end
        default: st <= K_WAIT;
      endcase
    end
  end

endmodule
