// mac_hw_top: IEEE 802.11ac access-point MAC hardware with downlink
// MU-MIMO and TXOP sharing. The MAC software on the host processor writes
// frames and parameters over the APB bus; this hardware does everything
// that is bound to protocol time or touches every octet:
//  - EDCA channel access: channel state monitor, one backoff per access
//    category, virtual collision handling (tx_coord);
//  - frame exchanges: RTS/CTS, MU transmission of up to N_USER users in one
//    TXOP (primary AC plus secondary ACs), A-MPDU aggregation, response
//    timeouts, TXOP continuation and fragment bursts, beacons at TBTT;
//  - transmit data path: N_USER Datapumps with CRC-32 FCS and CRC-8
//    delimiters, one PSDU byte stream per user towards the PHY;
//  - receive path: de-aggregation, FCS check, duplicate filter, Rx buffer;
//  - responses (ACK, CTS) SIFS after a reception, NAV, TSF, beacon timer,
//    RF power control.
// One clock domain (CLK_MHZ, 320 by default: one octet per clock per user
// gives 2.56 Gbps per Datapump). The structure follows the published block
// diagram; buffer sizes, the register map and the details listed in each
// module's header are this design's choices.
module mac_hw_top
  import mac_pkg::*;
#(
  parameter int CLK_MHZ = 320,
  parameter int N_USER  = 4
) (
  input  logic clk,
  input  logic rst_n,
  // host bus (AMBA APB)
  input  logic        psel,
  input  logic        penable,
  input  logic        pwrite,
  input  logic [7:0]  paddr,
  input  logic [31:0] pwdata,
  output logic [31:0] prdata,
  output logic        pready,
  output logic        pslverr,
  output logic        mac_int,
  // PHY transmit, one PSDU stream per user
  output logic [N_USER-1:0]      tx_valid,
  output logic [N_USER-1:0][7:0] tx_data,
  output logic [N_USER-1:0]      tx_last,
  input  logic [N_USER-1:0]      tx_ready,
  // PHY receive
  input  logic       rx_valid,
  input  logic [7:0] rx_data,
  input  logic       rx_last,
  input  logic       rx_ampdu,
  input  logic       cca_busy,
  // RF
  output logic       rf_on
);
  // ---------------- host interface and MIB ----------------
  logic [7:0]  bus_addr;
  logic        bus_wr, bus_rd;
  logic [31:0] bus_wdata, bus_rdata;
  mac_cfg_t    cfg;

  amba_if u_amba (
    .pclk(clk), .presetn(rst_n), .psel, .penable, .pwrite, .paddr, .pwdata,
    .prdata, .pready, .pslverr, .bus_addr, .bus_wr, .bus_rd, .bus_wdata, .bus_rdata
  );

  logic [2:0] buf_sel;
  logic buf_wr, buf_commit, buf_flag;
  logic [7:0] buf_data;
  logic [N_BUF-1:0][4:0]  buf_count;
  logic [N_BUF-1:0][12:0] buf_free;
  logic [N_BUF-1:0]       buf_ovf, head_flag, pop;
  logic rxb_open, rxb_ready, rxb_pop, rxb_valid, rxb_last;
  logic [7:0] rxb_data;
  logic [15:0] rxb_len;
  logic [4:0] rxb_count;
  logic [63:0] tsf;
  logic [4:0] int_src;

  mib_regs u_mib (
    .clk, .rst_n, .bus_addr, .bus_wr, .bus_rd, .bus_wdata, .bus_rdata, .cfg,
    .buf_sel, .buf_wr, .buf_data, .buf_commit, .buf_flag, .buf_count, .buf_free,
    .rx_open(rxb_open), .rx_ready(rxb_ready), .rx_pop(rxb_pop), .rx_valid(rxb_valid),
    .rx_data(rxb_data), .rx_last(rxb_last), .rx_len(rxb_len), .rx_count(rxb_count),
    .tsf, .int_src, .mac_int
  );

  // ---------------- timer and channel state ----------------
  logic us_tick, tbtt, nav_busy, nav_set;
  logic [15:0] nav_us, nav_left, idle_us;
  logic idle, tx_active, rx_active;

  mac_timer #(.CLK_MHZ(CLK_MHZ)) u_timer (
    .clk, .rst_n, .beacon_int_tu(cfg.beacon_int_tu), .nav_set, .nav_us,
    .us_tick, .tsf, .tbtt, .nav_busy, .nav_left
  );

  chan_monitor u_csm (
    .clk, .rst_n, .us_tick, .cca_busy, .nav_busy, .tx_busy(tx_active),
    .rx_busy(rx_active), .idle, .idle_us
  );

  // ---------------- backoffs ----------------
  logic [3:0] bo_ready, bo_retry_last, ac_pending, bo_success, bo_fail;
  for (genvar a = 0; a < 4; a++) begin : g_bo
    logic [9:0] cw, cnt;
    logic [3:0] rc;
    backoff #(.SLOT_US(SLOT_US), .SEED(16'hACE1 + 16'(a * 4099))) u_bo (
      .clk, .rst_n, .us_tick, .idle, .idle_us,
      .pending(ac_pending[a] && cfg.mac_en), .aifs_us(cfg.aifs_us[a]),
      .cwmin(cfg.cwmin), .cwmax(cfg.cwmax), .retry_limit(cfg.retry_limit),
      .tx_success(bo_success[a]), .tx_fail(bo_fail[a]),
      .ready(bo_ready[a]), .retry_last(bo_retry_last[a]), .cw, .bo_cnt(cnt), .retry_cnt(rc)
    );
  end

  // ---------------- coordinators ----------------
  buf_e [N_USER-1:0] src_sel;
  logic [N_USER-1:0] dp_req, dp_ampdu, dp_busy, dp_done;
  logic [N_USER-1:0][3:0] dp_n, dp_n_sent;
  logic resp_req, resp_done, ack_rx, cts_rx, beacon_sent, ps_release;
  logic ev_txop, ev_collision, ev_shared, ev_cont, ev_rts, ev_timeout, ev_drop;

  tx_coord #(.N_USER(N_USER)) u_txc (
    .clk, .rst_n, .cfg, .us_tick, .idle, .idle_us, .rx_busy(rx_active),
    .bo_ready, .bo_retry_last, .ac_pending, .bo_success, .bo_fail,
    .count(buf_count), .head_flag, .ps_release, .pop, .src_sel,
    .dp_req, .dp_n, .dp_ampdu, .dp_done, .dp_n_sent,
    .tbtt, .resp_req, .resp_done, .ack_rx, .cts_rx, .beacon_sent, .tx_active,
    .ev_txop, .ev_collision, .ev_shared, .ev_cont, .ev_rts, .ev_timeout, .ev_drop
  );

  logic rx_done, rx_for_us, ev_resp;
  rx_hdr_t rx_hdr;
  logic resp_open, resp_ready, resp_valid, resp_last;
  logic [7:0] resp_data;
  logic [15:0] resp_len;
  logic [4:0] resp_avail;

  rx_coord u_rxc (
    .clk, .rst_n, .us_tick, .rx_done, .rx_for_us, .rx_hdr, .ack_rx, .cts_rx,
    .nav_set, .nav_us, .resp_req, .resp_done, .ev_resp,
    .resp_open, .resp_ready, .resp_valid, .resp_data, .resp_last, .resp_len, .resp_avail
  );

  // ---------------- MpduGen buffers and Transmission ----------------
  logic [N_USER-1:0] src_open, src_next, src_ready, src_valid, src_last, src_flag;
  logic [N_USER-1:0][7:0]  src_data;
  logic [N_USER-1:0][15:0] src_len;
  logic [N_USER-1:0][4:0]  src_avail;

  mpdu_gen #(.N_USER(N_USER)) u_mpdu (
    .clk, .rst_n, .host_sel(buf_sel), .host_wr(buf_wr), .host_data(buf_data),
    .host_commit(buf_commit), .host_flag(buf_flag), .host_overflow(buf_ovf),
    .free_bytes(buf_free), .pop, .count(buf_count), .head_flag, .src_sel,
    .src_open, .src_next, .src_ready, .src_valid, .src_data, .src_last,
    .src_len, .src_avail, .src_flag,
    .resp_open, .resp_ready, .resp_valid, .resp_data, .resp_last, .resp_len, .resp_avail
  );

  transmission #(.N_USER(N_USER)) u_tx (
    .clk, .rst_n, .ap_mode(cfg.ap_mode), .tx_req(dp_req), .n_mpdu(dp_n), .ampdu(dp_ampdu),
    .busy(dp_busy), .done(dp_done), .n_sent(dp_n_sent),
    .src_open, .src_next, .src_ready, .src_valid, .src_data, .src_last, .src_len, .src_avail,
    .tx_valid, .tx_data, .tx_last, .tx_ready
  );

  // ---------------- Reception ----------------
  logic ev_stored, ev_dup, ev_fcs_err, ev_delim_err, ev_rx_ovf;
  reception u_rx (
    .clk, .rst_n, .mac_addr(cfg.mac_addr), .rx_valid, .rx_data, .rx_last, .rx_ampdu,
    .rx_active, .rx_done, .rx_for_us, .rx_hdr,
    .ev_stored, .ev_dup, .ev_fcs_err, .ev_delim_err, .ev_overflow(ev_rx_ovf),
    .rd_open(rxb_open), .rd_ready(rxb_ready), .rd_pop(rxb_pop), .rd_valid(rxb_valid),
    .rd_data(rxb_data), .rd_last(rxb_last), .rd_len(rxb_len), .rx_count(rxb_count)
  );

  // ---------------- power management ----------------
  logic [7:0] dtim_cnt;
  power_mgmt u_pm (
    .clk, .rst_n, .doze_en(cfg.pm_doze), .dtim_period(cfg.dtim_period), .tbtt,
    .beacon_sent, .busy(tx_active || rx_active || cca_busy || (dp_busy != 0)),
    .pending(ac_pending != 0), .ps_empty(buf_count[BUF_PS] == 0),
    .rf_on, .ps_release, .dtim_cnt
  );

  assign int_src = {(buf_ovf != 0) || ev_rx_ovf, tbtt, ev_stored, ev_drop, bo_success != 0};
endmodule
