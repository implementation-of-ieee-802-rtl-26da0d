// backoff: EDCA channel access for one access category. After the medium
// has been idle for the AC's AIFS, the backoff counter drops by one at the
// end of every further idle slot (SLOT_US); a busy medium freezes it and the
// AIFS wait starts again. ready asks the Tx coordinator for the medium when
// a frame is pending, AIFS has passed and the counter is zero.
// A frame that arrives while no backoff is drawn is sent after AIFS alone
// if the medium is idle; if the medium is busy a backoff is drawn. After a
// successful exchange the contention window returns to cwmin and a new
// backoff is drawn. After a failure (or an internal collision, which the
// coordinator reports the same way) the retry count rises and the window
// becomes 2*CW+1, capped at cwmax; retry_last tells the coordinator that
// this failure reaches the retry limit, after which the frame is dropped and
// the window and count reset. With nothing pending and no backoff drawn the
// window follows cwmin. Backoff values come from a 16-bit LFSR
// masked with CW (CW is always 2^k-1). Slot time and LFSR are this design's.
module backoff #(
  parameter int SLOT_US = 9,
  parameter logic [15:0] SEED = 16'hACE1
) (
  input  logic clk,
  input  logic rst_n,
  input  logic us_tick,
  input  logic idle,
  input  logic [15:0] idle_us,
  input  logic pending,
  input  logic [7:0] aifs_us,
  input  logic [9:0] cwmin,
  input  logic [9:0] cwmax,
  input  logic [3:0] retry_limit,
  input  logic tx_success,
  input  logic tx_fail,
  output logic ready,
  output logic retry_last,
  output logic [9:0] cw,
  output logic [9:0] bo_cnt,
  output logic [3:0] retry_cnt
);
  logic [15:0] lfsr;
  logic [3:0]  slot_us;
  logic        drawn;
  logic        aifs_ok;
  logic [9:0]  cw_next;

  assign aifs_ok    = idle && (idle_us >= {8'd0, aifs_us});
  assign ready      = pending && aifs_ok && bo_cnt == 0;
  assign retry_last = (retry_cnt + 4'd1) >= retry_limit;
  assign cw_next    = ({cw, 1'b1} > {1'b0, cwmax}) ? cwmax : {cw[8:0], 1'b1};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lfsr <= SEED; slot_us <= '0; drawn <= 1'b0;
      cw <= 10'd31; bo_cnt <= '0; retry_cnt <= '0;
    end else begin
      lfsr <= {lfsr[14:0], lfsr[15] ^ lfsr[13] ^ lfsr[12] ^ lfsr[10]};
      if (tx_success) begin
        cw <= cwmin; retry_cnt <= '0;
        bo_cnt <= lfsr[9:0] & cwmin; drawn <= 1'b1; slot_us <= '0;
      end else if (tx_fail) begin
        if (retry_last) begin
          cw <= cwmin; retry_cnt <= '0;
          bo_cnt <= lfsr[9:0] & cwmin;
        end else begin
          cw <= cw_next; retry_cnt <= retry_cnt + 1'b1;
          bo_cnt <= lfsr[9:0] & cw_next;
        end
        drawn <= 1'b1; slot_us <= '0;
      end else begin
        if (pending && !idle && !drawn) begin
          bo_cnt <= lfsr[9:0] & cw; drawn <= 1'b1;
        end
        if (!aifs_ok) begin
          slot_us <= '0;
        end else if (us_tick) begin
          if (slot_us == 4'(SLOT_US - 1)) begin
            slot_us <= '0;
            if (bo_cnt != 0) bo_cnt <= bo_cnt - 1'b1;
          end else begin
            slot_us <= slot_us + 1'b1;
          end
        end
        if (bo_cnt == 0 && !pending) drawn <= 1'b0;
        if (!pending && !drawn) cw <= cwmin;
      end
    end
  end
endmodule
