// reception: hardware receive path. The PSDU from the PHY runs through the
// de-aggregator (delimiter search, CRC-8), the MPDU validator (CRC-32 FCS,
// header fields, address filter) and the duplicate filter; octets are
// written into the Rx buffer as they arrive and the frame is committed only
// when it is error-free, addressed to this MAC, not a duplicate, and a data
// or management frame. Everything else is discarded, so the host bus only
// carries frames the software needs. Control frames (ACK, CTS, RTS, ...) go
// to the Rx coordinator only, through rx_done and the header fields.
// Host side: rd_* is the read port of the Rx buffer (open, byte handshake,
// pop). Results appear one clock after an MPDU's last octet.
module reception
  import mac_pkg::*;
#(
  parameter int RXBUF_DEPTH = 8192,
  parameter int NDESC       = 16
) (
  input  logic clk,
  input  logic rst_n,
  input  logic [47:0] mac_addr,
  input  logic rx_valid,
  input  logic [7:0] rx_data,
  input  logic rx_last,
  input  logic rx_ampdu,
  output logic rx_active,
  // to the Rx coordinator
  output logic rx_done,        // error-free MPDU received
  output logic rx_for_us,
  output rx_hdr_t rx_hdr,
  // events
  output logic ev_stored,
  output logic ev_dup,
  output logic ev_fcs_err,
  output logic ev_delim_err,
  output logic ev_overflow,
  // host read port of the Rx buffer
  input  logic rd_open,
  input  logic rd_ready,
  input  logic rd_pop,
  output logic rd_valid,
  output logic [7:0] rd_data,
  output logic rd_last,
  output logic [15:0] rd_len,
  output logic [4:0] rx_count
);
  logic m_valid, m_sop, m_eop, m_trunc, delim_ok;
  logic [7:0] m_data;
  logic v_done, fcs_ok, for_us, dup, keep;
  rx_hdr_t hdr;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)        rx_active <= 1'b0;
    else if (rx_valid) rx_active <= !rx_last;

  deagg u_deagg (
    .clk, .rst_n, .rx_valid, .rx_data, .rx_last, .rx_ampdu,
    .m_valid, .m_data, .m_sop, .m_eop, .m_trunc, .delim_ok, .delim_err(ev_delim_err)
  );

  mpdu_validate u_val (
    .clk, .rst_n, .mac_addr, .m_valid, .m_data, .m_sop, .m_eop, .m_trunc,
    .v_done, .fcs_ok, .for_us, .hdr
  );

  logic to_store;
  assign to_store = fcs_ok && for_us && !hdr.addr1[0] && hdr.ftype != FT_CTRL;
  assign keep     = to_store && !dup;

  dup_filter u_dup (
    .clk, .rst_n, .ta(hdr.addr2), .sc(hdr.seq_ctrl), .retry(hdr.retry),
    .dup, .update(v_done && keep)
  );

  logic [$clog2(RXBUF_DEPTH):0] fb;
  logic [$clog2(NDESC):0] cnt, av;
  logic rflag;
  frame_buffer #(.DEPTH(RXBUF_DEPTH), .NDESC(NDESC)) u_rxbuf (
    .clk, .rst_n,
    .wr_en(m_valid), .wr_data(m_data),
    .wr_commit(v_done && keep), .wr_flag(1'b0), .wr_abort(v_done && !keep),
    .overflow(ev_overflow), .free_bytes(fb),
    .rd_open, .rd_next(1'b0), .rd_pop, .rd_ready,
    .rd_valid, .rd_data, .rd_last, .rd_len, .rd_flag(rflag), .rd_avail(av), .count(cnt)
  );
  assign rx_count = 5'(cnt);

  assign rx_done    = v_done && fcs_ok;
  assign rx_for_us  = for_us;
  assign rx_hdr     = hdr;
  assign ev_stored  = v_done && keep;
  assign ev_dup     = v_done && to_store && dup;
  assign ev_fcs_err = v_done && !fcs_ok;
endmodule
