// transmission: the transmit block of the MAC hardware. N_USER Datapumps
// work in parallel, one per downlink MU-MIMO user, each with its own CRC-32
// (FCS) and CRC-8 (delimiter) unit, so up to four users receive their PSDUs
// at the same time. In AP mode (ap_mode = 1) every Datapump takes requests;
// in station mode only user 0 does, and requests to the others are ignored.
// Per user: tx_req starts a transmission of n_mpdu frames from that user's
// frame source, done pulses when the last byte has left, and the PSDU leaves
// as a byte stream with valid/ready and a last marker.
module transmission #(
  parameter int N_USER = 4
) (
  input  logic clk,
  input  logic rst_n,
  input  logic ap_mode,
  input  logic [N_USER-1:0]       tx_req,
  input  logic [N_USER-1:0][3:0]  n_mpdu,
  input  logic [N_USER-1:0]       ampdu,
  output logic [N_USER-1:0]       busy,
  output logic [N_USER-1:0]       done,
  output logic [N_USER-1:0][3:0]  n_sent,
  output logic [N_USER-1:0]       src_open,
  output logic [N_USER-1:0]       src_next,
  output logic [N_USER-1:0]       src_ready,
  input  logic [N_USER-1:0]       src_valid,
  input  logic [N_USER-1:0][7:0]  src_data,
  input  logic [N_USER-1:0]       src_last,
  input  logic [N_USER-1:0][15:0] src_len,
  input  logic [N_USER-1:0][4:0]  src_avail,
  output logic [N_USER-1:0]       tx_valid,
  output logic [N_USER-1:0][7:0]  tx_data,
  output logic [N_USER-1:0]       tx_last,
  input  logic [N_USER-1:0]       tx_ready
);
  for (genvar u = 0; u < N_USER; u++) begin : g_user
    logic        crc_init, crc_en;
    logic [7:0]  crc_din, dl_crc;
    logic [31:0] crc_reg, crc_fcs;
    logic [15:0] dl_bits;
    logic        enable;
    assign enable = (u == 0) || ap_mode;

    datapump u_dp (
      .clk, .rst_n,
      .start(tx_req[u] && enable), .n_mpdu(n_mpdu[u]), .ampdu(ampdu[u]),
      .busy(busy[u]), .done(done[u]), .n_sent(n_sent[u]),
      .src_open(src_open[u]), .src_next(src_next[u]), .src_ready(src_ready[u]),
      .src_valid(src_valid[u]), .src_data(src_data[u]), .src_last(src_last[u]),
      .src_len(src_len[u]), .src_avail(src_avail[u]),
      .crc_init, .crc_en, .crc_din, .crc_fcs, .dl_bits, .dl_crc,
      .tx_valid(tx_valid[u]), .tx_data(tx_data[u]), .tx_last(tx_last[u]), .tx_ready(tx_ready[u])
    );
    crc32 u_crc32 (.clk, .rst_n, .init(crc_init), .en(crc_en), .din(crc_din), .crc(crc_reg), .fcs(crc_fcs));
    crc8  u_crc8  (.din(dl_bits), .crc(dl_crc));
  end
endmodule
