// tb_tx_coord: the Tx coordinator against a model of the frame buffers
// (counts that pops decrease) and of the Datapumps (done 20 clocks after a
// request, sending min(requested, queued) frames). Scenarios: internal
// collision between VO and BE, an MU TXOP with TXOP sharing where one user
// misses its acknowledgement, TXOP continuation within the VI limit,
// RTS/CTS with and without a CTS, a beacon at TBTT, a response frame, and
// station mode with a single user.
module tb_tx_coord;
  import mac_pkg::*;
  localparam int N = 4;
  logic clk = 0, rst_n = 0, us_tick = 0, idle = 1, rx_busy = 0;
  logic [15:0] idle_us = 16'd200;
  mac_cfg_t cfg;
  logic [3:0] bo_ready = 0, bo_retry_last = 0, ac_pending, bo_success, bo_fail;
  logic [N_BUF-1:0][4:0] count;
  logic [N_BUF-1:0] head_flag = 0, pop;
  logic ps_release = 0;
  buf_e [N-1:0] src_sel;
  logic [N-1:0] dp_req, dp_ampdu, dp_done;
  logic [N-1:0][3:0] dp_n, dp_n_sent;
  logic tbtt = 0, resp_req = 0, resp_done, ack_rx = 0, cts_rx = 0, beacon_sent, tx_active;
  logic ev_txop, ev_collision, ev_shared, ev_cont, ev_rts, ev_timeout, ev_drop;
  int checks = 0, failures = 0;
  int pops [N_BUF], succ [4], fails [4], n_cont = 0, n_coll = 0, n_share = 0, n_bcn = 0, n_resp = 0;
  buf_e last_sel [N];
  logic [N-1:0] last_req;

  tx_coord #(.N_USER(N)) dut (.*);
  always #5 clk = ~clk;
  initial begin #50000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  always @(posedge clk) us_tick <= !us_tick;

  // buffer and Datapump models
  int cnt_m [N_BUF];
  always_comb for (int b = 0; b < N_BUF; b++) count[b] = 5'(cnt_m[b]);
  int dly [N];
  always @(posedge clk) begin
    dp_done <= '0;
    for (int u = 0; u < N; u++) begin
      if (dp_req[u]) begin
        dly[u] = 20; last_req[u] = 1'b1; last_sel[u] = src_sel[u];
        dp_n_sent[u] <= 4'((int'(dp_n[u]) < cnt_m[src_sel[u][2:0]] || src_sel[u] == BUF_RESP) ? int'(dp_n[u]) : cnt_m[src_sel[u][2:0]]);
      end else if (dly[u] > 0) begin
        dly[u]--;
        if (dly[u] == 0) dp_done[u] <= 1'b1;
      end
    end
    if (rst_n) for (int b = 0; b < N_BUF; b++) if (pop[b]) begin cnt_m[b]--; pops[b]++; end
    if (rst_n) for (int a = 0; a < 4; a++) begin if (bo_success[a]) succ[a]++; if (bo_fail[a]) fails[a]++; end
    if (rst_n) begin
      n_cont += ev_cont; n_coll += ev_collision; n_share += ev_shared;
      n_bcn += beacon_sent; n_resp += resp_done;
    end
  end

  task automatic chk(bit c, string s);
    checks++; if (!c) begin failures++; $display("FAIL %s at %0t", s, $time); end
  endtask
  task automatic clear();
    for (int b = 0; b < N_BUF; b++) pops[b] = 0;
    for (int a = 0; a < 4; a++) begin succ[a] = 0; fails[a] = 0; end
    last_req = '0;
  endtask
  task automatic wait_acks(logic [N-1:0] give);
    // answer each active user in order: ack or let it time out
    for (int u = 0; u < N; u++) if (last_req[u]) begin
      repeat (30) @(negedge clk);
      if (give[u]) begin ack_rx = 1; @(negedge clk) ack_rx = 0; end
      else begin
        int t = 0;
        while (!ev_timeout && t < 1000) begin @(negedge clk); t++; end
      end
    end
  endtask
  task automatic wait_idle(); repeat (5) @(negedge clk); while (dut.st != 0) @(negedge clk); repeat (2) @(negedge clk); endtask

  initial begin
    cfg = '0;
    cfg.ap_mode = 1; cfg.txop_share_en = 1; cfg.ampdu_en = 1; cfg.mac_en = 1;
    cfg.agg_num = {4'd4, 4'd4, 4'd4, 4'd4}; cfg.resp_timeout_us = 10'd30;
    cfg.txop_us = {16'd1504, 16'd3008, 16'd0, 16'd0};
    for (int b = 0; b < N_BUF; b++) cnt_m[b] = 0;
    for (int u = 0; u < N; u++) dly[u] = 0;
    repeat (2) @(negedge clk); rst_n = 1;

    // A: VO and BE finish together; MU TXOP with sharing, user 2 (BE) unacknowledged
    cnt_m[BUF_AC_VO] = 2; cnt_m[BUF_AC_BE] = 3; cnt_m[BUF_AC_VI] = 1; cnt_m[BUF_AC_BK] = 6;
    clear();
    @(negedge clk) chk(ac_pending == 4'b1111, "all ACs pending");
    bo_ready = 4'b1010;
    @(negedge clk) bo_ready = 0;
    repeat (3) @(negedge clk);
    chk(n_coll == 1 && fails[AC_BE] == 1, "virtual collision: BE told to back off");
    chk(last_req == 4'b1111, "four users requested");
    chk(last_sel[0] == BUF_AC_VO && last_sel[1] == BUF_AC_VI && last_sel[2] == BUF_AC_BE && last_sel[3] == BUF_AC_BK,
        "primary VO then VI, BE, BK in priority order");
    chk(dp_n[0] == 4 && dp_ampdu[0], "A-MPDU of agg_num");
    wait_acks(4'b1011);
    wait_idle();
    chk(pops[BUF_AC_VO] == 2 && pops[BUF_AC_VI] == 1 && pops[BUF_AC_BK] == 4 && pops[BUF_AC_BE] == 0,
        "acknowledged users freed, BE kept");
    chk(succ[AC_VO] == 1, "primary success");
    chk(n_share == 1, "TXOP sharing used");

    // B: continuation within the VI TXOP limit, single MPDUs
    cfg.ampdu_en = 0; cfg.txop_share_en = 0;
    cnt_m[BUF_AC_BK] = 0; cnt_m[BUF_AC_BE] = 0; cnt_m[BUF_AC_VI] = 3;
    clear();
    @(negedge clk) bo_ready = 4'b0100; @(negedge clk) bo_ready = 0;
    for (int i = 0; i < 3; i++) begin
      while (!dp_done[0]) @(negedge clk);
      repeat (20) @(negedge clk); ack_rx = 1; @(negedge clk) ack_rx = 0;
    end
    wait_idle();
    chk(pops[BUF_AC_VI] == 3 && n_cont == 2, $sformatf("TXOP continuation: %0d pops, %0d continuations", pops[BUF_AC_VI], n_cont));

    // C: RTS/CTS; first attempt without CTS fails, second succeeds
    cfg.rts_en = 1; cnt_m[BUF_CTRL] = 1; cnt_m[BUF_AC_BK] = 1;
    clear();
    @(negedge clk) bo_ready = 4'b0001; @(negedge clk) bo_ready = 0;
    repeat (3) @(negedge clk);
    chk(last_sel[0] == BUF_CTRL, "RTS from the control buffer");
    wait_idle();
    chk(fails[AC_BK] == 1 && cnt_m[BUF_CTRL] == 1, $sformatf("no CTS: failure, RTS kept %0d %0d", fails[AC_BK], cnt_m[BUF_CTRL]));
    @(negedge clk) bo_ready = 4'b0001; @(negedge clk) bo_ready = 0;
    while (!dp_done[0]) @(negedge clk);
    repeat (10) @(negedge clk); cts_rx = 1; @(negedge clk) cts_rx = 0;
    while (!dp_req[0]) @(negedge clk);
    @(negedge clk) chk(last_sel[0] == BUF_AC_BK, "data after CTS");
    while (!dp_done[0]) @(negedge clk);
    repeat (10) @(negedge clk); ack_rx = 1; @(negedge clk) ack_rx = 0;
    wait_idle();
    chk(succ[AC_BK] == 1 && cnt_m[BUF_CTRL] == 0 && cnt_m[BUF_AC_BK] == 0, "RTS/CTS exchange done");
    cfg.rts_en = 0;

    // D: beacon at TBTT
    cnt_m[BUF_BCN] = 1;
    @(negedge clk) tbtt = 1; @(negedge clk) tbtt = 0;
    repeat (3) @(negedge clk); chk(last_sel[0] == BUF_BCN, "beacon sent");
    wait_idle(); chk(n_bcn == 1 && cnt_m[BUF_BCN] == 0, $sformatf("beacon freed %0d %0d", n_bcn, cnt_m[BUF_BCN]));

    // E: response frame
    @(negedge clk) resp_req = 1;
    repeat (3) @(negedge clk); chk(last_sel[0] == BUF_RESP, "response source");
    while (!resp_done) @(negedge clk); resp_req = 0; @(negedge clk);
    chk(n_resp == 1, "response done");

    // F: station mode, one user only; retry limit drops the frame
    cfg.ap_mode = 0; cfg.txop_share_en = 1;
    cnt_m[BUF_AC_VO] = 1; cnt_m[BUF_AC_BE] = 1;
    clear();
    @(negedge clk) bo_ready = 4'b1000; bo_retry_last = 4'b1000; @(negedge clk) bo_ready = 0;
    repeat (3) @(negedge clk);
    chk(last_req == 4'b0001, "station mode: one user");
    wait_idle(); bo_retry_last = 0;
    chk(fails[AC_VO] == 1 && cnt_m[BUF_AC_VO] == 0, "dropped at retry limit");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
