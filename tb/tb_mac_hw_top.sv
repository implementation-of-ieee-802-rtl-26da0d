// tb_mac_hw_top: end-to-end test of the AP MAC hardware at its default
// parameters (320 MHz, four users). The host side is an APB master that
// configures the MAC and writes frames byte by byte; the PHY side is a
// model of four stations that collect each user's PSDU, split A-MPDUs,
// check every delimiter CRC and FCS, and answer with ACK or CTS frames
// SIFS after the end of the MU PPDU, one station after another.
// Phases: (1) VO and VI with equal AIFS and CW 0 collide inside the AP,
// VO wins and the MU TXOP carries VO, VI, BE and BK together as A-MPDUs;
// BE's station stays silent once, so BE times out and is retried later; VI
// continues its own TXOP within its TXOP limit. (2) RTS/CTS before data,
// then a two-fragment burst in one TXOP.
// (3) A station sends data: the AP answers with an ACK after SIFS, the
// host reads the frame from the Rx buffer, a retransmission is filtered as
// duplicate, a frame for another station sets the NAV. (4) A beacon at
// TBTT releases a power-save frame. (5) Station mode uses one Datapump.
// (6) A frame larger than the control buffer overflows it and raises the
// overflow interrupt. (7) A received A-MPDU with a damaged delimiter and a
// damaged FCS leaves only its intact subframe in the Rx buffer. During
// phase 1 the PHY of user 1 stalls the byte stream at random.
// Each mechanism is counted and must have happened at least once.
module tb_mac_hw_top;
  import mac_pkg::*;
  import tb_ref_pkg::*;
  localparam int N = 4;
  localparam int CLK_MHZ = 320;
  logic clk = 0, rst_n = 0;
  logic psel = 0, penable = 0, pwrite = 0, pready, pslverr, mac_int;
  logic [7:0] paddr = 0;
  logic [31:0] pwdata = 0, prdata;
  logic [N-1:0] tx_valid, tx_last, tx_ready = '1;
  logic [N-1:0][7:0] tx_data;
  logic rx_valid = 0, rx_last = 0, rx_ampdu = 0, cca_busy = 0, rf_on;
  logic [7:0] rx_data = 0;
  int checks = 0, failures = 0;

  mac_hw_top dut (.*);
  always #1.5625ns clk = ~clk;

  initial begin
    repeat (40_000_000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  task automatic chk(bit c, string s);
    checks++; if (!c) begin failures++; $display("FAIL %s at %0t", s, $time); end
  endtask

  // ---------------- host (APB master) ----------------
  task automatic apb_wr(logic [7:0] a, logic [31:0] d);
    @(negedge clk) psel = 1; penable = 0; pwrite = 1; paddr = a; pwdata = d;
    @(negedge clk) penable = 1;
    @(negedge clk) psel = 0; penable = 0;
  endtask
  task automatic apb_rd(logic [7:0] a, output logic [31:0] d);
    @(negedge clk) psel = 1; penable = 0; pwrite = 0; paddr = a;
    @(negedge clk) penable = 1; #0.1ns d = prdata;
    @(negedge clk) psel = 0; penable = 0;
  endtask
  // every frame written to a transmit buffer, with its FCS, per buffer
  bq_t written [8][$];
  task automatic put_frame(int b, bq_t f, bit more_frag = 0);
    written[b].push_back(add_fcs(f));
    apb_wr(8'h30, 32'(b));
    foreach (f[i]) apb_wr(8'h34, 32'(f[i]));
    apb_wr(8'h38, 32'(more_frag));
  endtask

  localparam logic [47:0] AP = 48'h000000000002;
  function automatic logic [47:0] sta(int k); return {40'h00AABBCC00, 8'(8'h10 + 2 * k)}; endfunction

  // ---------------- station models ----------------
  bq_t psdu [N];
  bit  inflight [N];
  bit  ppdu_users [N];
  int  n_mpdu_rx [6];
  int  n_ampdu = 0, n_rts = 0, n_bcn = 0, n_ack_from_ap = 0, n_cts_sent = 0, n_ps_rx = 0;
  int  n_multi_user_ppdu = 0, max_users = 0, n_ppdu = 0, n_users_in_sta_mode = 0;
  bit  silent_ac [6];
  int  n_match = 0;
  function automatic bit was_written(bq_t m);
    foreach (written[b]) foreach (written[b][i]) if (written[b][i] == m) return 1;
    return 0;
  endfunction
  bit  sta_mode_phase = 0;
  event ppdu_end;

  always @(negedge clk) if (rst_n) begin
    for (int u = 0; u < N; u++) if (tx_valid[u] && tx_ready[u]) begin
      if (!inflight[u]) begin psdu[u] = {}; inflight[u] = 1; ppdu_users[u] = 1; end
      psdu[u].push_back(tx_data[u]);
      if (tx_last[u]) inflight[u] = 0;
    end
    if (tx_valid != 0 && tx_last != 0) begin
      bit any;
      any = 0;
      for (int u = 0; u < N; u++) any |= inflight[u];
      if (!any) begin -> ppdu_end; end
    end
  end

  // split a PSDU into MPDUs (checking delimiters and FCS)
  function automatic void split(bq_t p, output bq_t m[$], output bit agg);
    logic [15:0] b;
    int i = 0, len;
    m = {};
    agg = p.size() >= 4 && p[3] == 8'h4E && crc8_ref({p[1], p[0]}) == p[2];
    if (!agg) begin m.push_back(p); return; end
    while (i + 4 <= p.size()) begin
      b = {p[i + 1], p[i]};
      if (p[i + 3] != 8'h4E || crc8_ref(b) != p[i + 2]) begin i += 4; continue; end
      len = {b[3:2], b[15:4]};
      begin bq_t one; one = {}; for (int k = 0; k < len; k++) one.push_back(p[i + 4 + k]); m.push_back(one); end
      i += 4 + len;
      while (i % 4 != 0) i++;
    end
  endfunction

  task automatic phy_send(bq_t f, bit agg = 0);
    foreach (f[i]) begin @(negedge clk) rx_valid = 1; rx_data = f[i]; rx_last = (i == f.size() - 1); rx_ampdu = agg; end
    @(negedge clk) rx_valid = 0; rx_last = 0; rx_ampdu = 0;
  endtask
  task automatic wait_us(int us); repeat (us * CLK_MHZ) @(posedge clk); endtask

  initial begin : stations
    forever begin
      bq_t m[$];
      bit agg, any_resp;
      int order[$];
      @ppdu_end;
      n_ppdu++;
      order = {};
      for (int u = 0; u < N; u++) if (ppdu_users[u]) order.push_back(u);
      if (order.size() > 1) n_multi_user_ppdu++;
      if (order.size() > max_users) max_users = order.size();
      if (sta_mode_phase) n_users_in_sta_mode += order.size();
      any_resp = 0;
      foreach (order[j]) begin
        int u;
        u = order[j];
        split(psdu[u], m, agg);
        ppdu_users[u] = 0;
        if (agg) n_ampdu++;
        foreach (m[k]) begin
          bq_t body;
          body = m[k];
          repeat (4) void'(body.pop_back());
          chk(add_fcs(body) == m[k], $sformatf("FCS of user %0d MPDU %0d", u, k));
          if (m[k][0] != 8'hD4 && m[k][0] != 8'hC4) begin
            chk(was_written(m[k]), $sformatf("user %0d MPDU %0d is a frame the host wrote", u, k));
            n_match++;
          end
        end
        if (m.size() == 0) continue;
        case (m[0][0])
          8'h80: n_bcn++;
          8'hD4: n_ack_from_ap++;
          8'hB4: begin
            n_rts++;
            wait_us(SIFS_US);
            phy_send(add_fcs(mk_frame(FT_CTRL, ST_CTS, 0, 16'd100, AP, 0, 0, 0)));
            n_cts_sent++;
          end
          default: begin
            int ac;
            ac = (int'(m[0][4]) - 8'h10) / 2;
            if (ac >= 0 && ac < 6) begin
              n_mpdu_rx[ac] += m.size();
              if (ac == 5) n_ps_rx++;
              if (silent_ac[ac]) begin
                // stay silent: the AP waits for its response timeout
                silent_ac[ac] = 0;
                wait_us(55);
              end else begin
                wait_us(j == 0 ? SIFS_US : 4);
                phy_send(add_fcs(mk_frame(FT_CTRL, ST_BA, 0, 16'd0, AP, sta(ac), 0, 0)));
              end
            end
          end
        endcase
      end
    end
  end

  // PHY back-pressure on user 1 while stall_on is set
  bit stall_on = 0;
  int n_stall = 0;
  always @(posedge clk) begin
    tx_ready[1] <= !(stall_on && ($urandom_range(0, 3) == 0));
    if (rst_n && tx_valid[1] && !tx_ready[1]) n_stall++;
  end

  // ---------------- mechanism counters ----------------
  int n_ovf = 0, n_delim_err = 0, n_fcs_err = 0, n_coll = 0, n_shared = 0, n_timeout = 0, n_cont = 0, n_txop = 0, n_dup = 0, n_nav = 0, n_int = 0, n_ps_rel = 0;
  always @(posedge clk) if (rst_n) begin
    n_coll += dut.ev_collision; n_shared += dut.ev_shared; n_timeout += dut.ev_timeout;
    n_cont += dut.ev_cont; n_txop += dut.ev_txop; n_dup += dut.ev_dup; n_nav += dut.nav_set;
    n_int += mac_int; n_ovf += (dut.buf_ovf != 0); n_delim_err += dut.ev_delim_err; n_fcs_err += dut.ev_fcs_err; n_ps_rel += (dut.ps_release && !$past(dut.ps_release));
  end

  task automatic wait_empty(int b, int max_us);
    logic [31:0] d;
    int t = 0;
    apb_wr(8'h30, 32'(b));
    do begin wait_us(20); t += 20; apb_rd(8'h3C, d); end while (d[4:0] != 0 && t < max_us);
    chk(d[4:0] == 0, $sformatf("buffer %0d emptied", b));
  endtask

  initial begin : host
    logic [31:0] d;
    bq_t f, got;
    repeat (10) @(negedge clk); rst_n = 1;
    // configuration: CW 0, VO and VI share AIFS 34 us, VI aggregates 2,
    // beacon every 3 TU, all interrupts enabled
    apb_wr(8'h0C, {6'd0, 10'd1023, 6'd0, 10'd0});
    apb_wr(8'h14, {8'd34, 8'd34, 8'd61, 8'd79});
    apb_wr(8'h24, {4'd4, 4'd2, 4'd4, 4'd4});
    apb_wr(8'h20, {8'd0, 8'd1, 16'd3});
    apb_wr(8'h2C, 32'h1F);
    apb_rd(8'h14, d); chk(d == {8'd34, 8'd34, 8'd61, 8'd79}, "AIFS register");

    // phase 1: load all ACs while the medium is busy
    cca_busy = 1;
    for (int ac = 0; ac < 4; ac++) begin
      int nf;
      nf = (ac == AC_VI) ? 6 : 2;
      for (int k = 0; k < nf; k++)
        put_frame(4 + ac, mk_frame(FT_DATA, 4'h8, 0, 16'd60, sta(ac), AP, 16'(k << 4), 24 + ac * 3 + k));
    end
    silent_ac[AC_BE] = 1;
    stall_on = 1;
    wait_us(5);
    cca_busy = 0;
    for (int ac = 3; ac >= 0; ac--) wait_empty(4 + ac, 20000);
    chk(n_mpdu_rx[AC_VO] == 2 && n_mpdu_rx[AC_BK] == 2 && n_mpdu_rx[AC_VI] == 6, "all frames delivered once");
    chk(n_mpdu_rx[AC_BE] == 4, "BE sent twice (first unacknowledged)");
    stall_on = 0;

    // phase 2: RTS/CTS
    apb_wr(8'h00, 32'h1F);
    put_frame(3, mk_frame(FT_CTRL, ST_RTS, 0, 16'd300, sta(AC_BK), AP, 0, 0));
    put_frame(4 + AC_BK, mk_frame(FT_DATA, 4'h8, 0, 16'd60, sta(AC_BK), AP, 16'h0100, 40));
    wait_empty(4 + AC_BK, 20000);
    chk(n_rts == 1 && n_cts_sent == 1 && n_mpdu_rx[AC_BK] == 3, "RTS, CTS, then data");
    apb_wr(8'h00, 32'h17);

    // phase 2b: a fragment burst on AC_BK (TXOP limit 0): the second
    // fragment follows SIFS after the first one's acknowledgement
    begin
      int c0, p0;
      c0 = n_cont; p0 = n_ppdu;
      put_frame(4 + AC_BK, mk_frame(FT_DATA, 4'h8, 0, 16'd60, sta(AC_BK), AP, 16'h0300, 36), 1);
      put_frame(4 + AC_BK, mk_frame(FT_DATA, 4'h8, 0, 16'd60, sta(AC_BK), AP, 16'h0301, 20));
      wait_empty(4 + AC_BK, 20000);
      chk(n_cont == c0 + 1 && n_ppdu == p0 + 2 && n_mpdu_rx[AC_BK] == 5, "fragment burst: two PPDUs in one TXOP");
    end

    // phase 3: reception, response, Rx buffer, duplicate, NAV
    f = mk_frame(FT_DATA, 4'h8, 0, 16'd44, AP, sta(1), 16'h0420, 33);
    phy_send(add_fcs(f));
    wait_us(60);
    chk(n_ack_from_ap == 1, "AP acknowledged the data frame");
    apb_rd(8'h44, d); chk(d[4:0] == 1 && d[31:16] == 16'(f.size() + 4), "frame in Rx buffer");
    apb_wr(8'h44, 32'h1);
    got = {};
    for (int i = 0; i < f.size() + 4; i++) begin apb_rd(8'h40, d); got.push_back(d[7:0]); end
    chk(got == add_fcs(f), "host reads the received frame");
    apb_wr(8'h44, 32'h2);
    f[1] = f[1] | 8'h08;
    phy_send(add_fcs(f));
    wait_us(60);
    apb_rd(8'h44, d); chk(d[4:0] == 0 && n_dup == 1 && n_ack_from_ap == 2, "duplicate acknowledged, not stored");
    phy_send(add_fcs(mk_frame(FT_DATA, 4'h8, 0, 16'd200, sta(3), sta(2), 16'h0010, 20)));
    @(negedge clk) chk(n_nav == 1 && dut.nav_busy, "NAV set by a foreign frame");

    // phase 4: beacon at TBTT releases the power-save frame
    put_frame(2, mk_frame(FT_DATA, 4'h8, 0, 16'd60, sta(5), AP, 16'h0000, 20));
    put_frame(0, mk_frame(FT_MGMT, 4'h8, 0, 16'd0, 48'hFFFFFFFFFFFF, AP, 16'h0000, 30));
    wait_empty(2, 10000);
    chk(n_bcn >= 1 && n_ps_rel >= 1 && n_ps_rx == 1, "beacon then power-save frame");

    // phase 5: station mode, one Datapump only
    apb_wr(8'h00, 32'h15);
    sta_mode_phase = 1;
    put_frame(4 + AC_VO, mk_frame(FT_DATA, 4'h8, 0, 16'd60, sta(AC_VO), AP, 16'h0200, 30));
    put_frame(4 + AC_BE, mk_frame(FT_DATA, 4'h8, 0, 16'd60, sta(AC_BE), AP, 16'h0200, 30));
    wait_empty(4 + AC_VO, 20000); wait_empty(4 + AC_BE, 20000);
    chk(n_users_in_sta_mode == 2, "station mode: one user per PPDU");

    // phase 6: host overflow of the 256-byte control buffer
    apb_wr(8'h28, 32'h1F);
    put_frame(3, mk_frame(FT_DATA, 4'h8, 0, 16'd0, sta(0), AP, 0, 300));
    apb_rd(8'h3C, d); chk(d[4:0] == 0, "overflowing frame dropped");
    apb_rd(8'h28, d); chk(d[4] == 1'b1, "overflow interrupt status");
    apb_wr(8'h28, 32'h1F);

    // phase 7: received A-MPDU with a damaged delimiter and a damaged FCS
    begin
      bq_t fr[$], a;
      int o[3];
      fr = {};
      for (int k = 0; k < 3; k++) fr.push_back(mk_frame(FT_DATA, 4'h8, 0, 16'd44, AP, sta(2), 16'(16'h0800 + (k << 4)), 20 + k));
      a = tb_ref_pkg::ampdu(fr);
      o[0] = 0;
      for (int k = 1; k < 3; k++) begin
        o[k] = o[k - 1] + 4 + fr[k - 1].size() + 4;
        while (o[k] % 4) o[k]++;
      end
      a[o[1] + 2] = a[o[1] + 2] ^ 8'hFF;   // delimiter CRC of subframe 1
      a[o[2] + 14] = a[o[2] + 14] ^ 8'h01; // body of subframe 2 (FCS fails)
      phy_send(a, 1);
      wait_us(60);
      apb_wr(8'h44, 32'h1);
      apb_rd(8'h44, d); chk(d[4:0] == 1 && d[31:16] == 16'(fr[0].size() + 4), "only the intact subframe stored");
      apb_wr(8'h44, 32'h2);
    end

    // mechanisms
    $display("txops=%0d collisions=%0d shared=%0d max_users=%0d ampdu=%0d timeouts=%0d continuations=%0d rts=%0d beacons=%0d acks_by_ap=%0d dup=%0d nav=%0d ps_release=%0d int=%0d stall=%0d ovf=%0d delim_err=%0d fcs_err=%0d",
             n_txop, n_coll, n_shared, max_users, n_ampdu, n_timeout, n_cont, n_rts, n_bcn, n_ack_from_ap, n_dup, n_nav, n_ps_rel, n_int, n_stall, n_ovf, n_delim_err, n_fcs_err);
    chk(n_coll >= 1, "internal collision happened");
    chk(n_shared >= 1 && max_users == 4, "TXOP sharing with four users");
    chk(n_ampdu >= 1, "A-MPDU sent");
    chk(n_timeout >= 1, "response timeout happened");
    chk(n_cont >= 1, "TXOP continuation happened");
    chk(n_int >= 1, "interrupt raised");
    chk(n_match >= 20, "transmitted MPDUs compared with the host's frames");
    chk(n_stall >= 1, "PHY stall seen");
    chk(n_ovf >= 1, "buffer overflow seen");
    chk(n_delim_err >= 1 && n_fcs_err >= 1, "delimiter and FCS errors seen");
    chk(n_rts >= 1 && n_bcn >= 1 && n_dup >= 1 && n_nav >= 1 && n_ps_rel >= 1, "RTS, beacon, duplicate, NAV, power save");
    chk(n_users_in_sta_mode >= 1, "mode switch to station mode");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
