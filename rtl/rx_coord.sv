// rx_coord: receive coordinator of the protocol controller. For every
// error-free MPDU from the receive path it decides what the hardware must
// do. A frame for another station sets the NAV from its Duration field. An
// ACK or BlockAck for this MAC is passed to the Tx coordinator (ack_rx), so
// is a CTS (cts_rx). An RTS for this MAC is answered with a CTS, a data or
// management frame for this MAC with an ACK: the response frame is built
// here (frame control, duration, receiver address = the sender; the Datapump
// appends the FCS) and requested from the Tx coordinator T_SIFS_US after the
// end of the received frame, so it goes out a short IFS after the reception.
// The CTS Duration is the RTS Duration less SIFS and CTS_US; ACK Duration
// is 0 (individually addressed, no fragments follow). resp_* is a frame
// source port of the same shape as a frame buffer's.
module rx_coord
  import mac_pkg::*;
#(
  parameter int T_SIFS_US = 16,
  parameter int CTS_US  = 44
) (
  input  logic clk,
  input  logic rst_n,
  input  logic us_tick,
  input  logic rx_done,
  input  logic rx_for_us,
  input  rx_hdr_t rx_hdr,
  output logic ack_rx,
  output logic cts_rx,
  output logic nav_set,
  output logic [15:0] nav_us,
  output logic resp_req,
  input  logic resp_done,
  output logic ev_resp,
  // response frame source
  input  logic resp_open,
  input  logic resp_ready,
  output logic resp_valid,
  output logic [7:0] resp_data,
  output logic resp_last,
  output logic [15:0] resp_len,
  output logic [4:0] resp_avail
);
  typedef enum logic [1:0] {R_IDLE, R_SIFS, R_REQ} st_e;
  st_e st;
  logic [7:0]  fc0;
  logic [15:0] dur;
  logic [47:0] ra;
  logic [5:0]  t;
  logic [3:0]  idx;

  logic unicast_us, is_ctrl;
  assign unicast_us = rx_for_us && !rx_hdr.addr1[0];
  assign is_ctrl    = rx_hdr.ftype == FT_CTRL;

  logic need_resp;
  assign need_resp = rx_done && unicast_us && st == R_IDLE &&
                     ((is_ctrl && rx_hdr.subtype == ST_RTS) || rx_hdr.ftype == FT_DATA || rx_hdr.ftype == FT_MGMT);

  assign ack_rx  = rx_done && unicast_us && is_ctrl && (rx_hdr.subtype == ST_ACK || rx_hdr.subtype == ST_BA);
  assign cts_rx  = rx_done && unicast_us && is_ctrl && rx_hdr.subtype == ST_CTS;
  assign nav_set = rx_done && !rx_for_us && !rx_hdr.duration[15];
  assign nav_us  = rx_hdr.duration;
  assign resp_req = st == R_REQ;
  assign ev_resp  = need_resp;

  localparam logic [15:0] CTS_SUB = 16'(T_SIFS_US + CTS_US);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= R_IDLE; fc0 <= '0; dur <= '0; ra <= '0; t <= '0;
    end else begin
      unique case (st)
        R_IDLE: if (need_resp) begin
          ra <= rx_hdr.addr2;
          t  <= '0;
          st <= R_SIFS;
          if (is_ctrl) begin
            fc0 <= {ST_CTS, FT_CTRL, 2'b00};
            dur <= (rx_hdr.duration > CTS_SUB && !rx_hdr.duration[15]) ? rx_hdr.duration - CTS_SUB : 16'd0;
          end else begin
            fc0 <= {ST_ACK, FT_CTRL, 2'b00};
            dur <= 16'd0;
          end
        end
        R_SIFS: if (us_tick) begin
          t <= t + 1'b1;
          if (t == 6'(T_SIFS_US - 1)) st <= R_REQ;
        end
        R_REQ: if (resp_done) st <= R_IDLE;
        default: st <= R_IDLE;
      endcase
    end
  end

  // response frame: FC(2) Duration(2) RA(6)
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)                               idx <= 4'd10;
    else if (resp_open)                       idx <= 4'd0;
    else if (resp_valid && resp_ready)        idx <= idx + 1'b1;

  assign resp_valid = idx < 4'd10;
  assign resp_last  = idx == 4'd9;
  assign resp_len   = 16'd10;
  assign resp_avail = (st == R_REQ) ? 5'd1 : 5'd0;
  always_comb begin
    unique case (idx)
      4'd0: resp_data = fc0;
      4'd1: resp_data = 8'h00;
      4'd2: resp_data = dur[7:0];
      4'd3: resp_data = dur[15:8];
      4'd4, 4'd5, 4'd6, 4'd7, 4'd8, 4'd9: resp_data = ra[8*(idx-4'd4) +: 8];
      default: resp_data = 8'h00;
    endcase
  end
endmodule
