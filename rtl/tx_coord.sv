// tx_coord: transmit coordinator of the protocol controller. In priority
// order it (1) sends a response frame the Rx coordinator asked for, (2)
// sends the beacon once the medium has been idle for PIFS after TBTT, and
// (3) grants the medium to an access category whose backoff has finished.
// When several backoffs finish in the same cycle the virtual collision
// handler grants the highest priority AC (VO > VI > BE > BK) and reports a
// failure to the others, which then back off with a doubled window.
//
// A TXOP: optionally an RTS from the control buffer and a CTS within the
// response timeout; then, SIFS later, an MU transmission: user 0 carries the
// granted (primary) AC and, with TXOP sharing in AP mode, users 1..3 carry
// the other ACs that hold frames, in descending priority. Each user sends an
// A-MPDU of agg_num frames (ampdu_en) or one MPDU. The coordinator then
// waits for one acknowledgement per user, in user order, each within the
// response timeout (the timer stops while a reception is in progress).
// Frames of acknowledged users are freed; unacknowledged ones stay for a
// later retry. The primary AC's backoff learns success or failure; at its
// retry limit the primary frames are dropped. After success the TXOP goes
// on, SIFS later, while the first frame carried "more fragments" (such a
// frame is never aggregated with others) or while
// the primary AC has frames and the elapsed time is under its TXOP limit.
// The Tx buffer contends as AC_VO and the power-save buffer as AC_BE once
// released. Response ordering, per-user polling and beacon timing are this
// design's choices.
module tx_coord
  import mac_pkg::*;
#(
  parameter int N_USER = 4
) (
  input  logic clk,
  input  logic rst_n,
  input  mac_cfg_t cfg,
  input  logic us_tick,
  input  logic idle,
  input  logic [15:0] idle_us,
  input  logic rx_busy,
  // backoffs
  input  logic [3:0] bo_ready,
  input  logic [3:0] bo_retry_last,
  output logic [3:0] ac_pending,
  output logic [3:0] bo_success,
  output logic [3:0] bo_fail,
  // buffers
  input  logic [N_BUF-1:0][4:0] count,
  input  logic [N_BUF-1:0] head_flag,
  input  logic ps_release,
  output logic [N_BUF-1:0] pop,
  output buf_e [N_USER-1:0] src_sel,
  // Datapumps
  output logic [N_USER-1:0] dp_req,
  output logic [N_USER-1:0][3:0] dp_n,
  output logic [N_USER-1:0] dp_ampdu,
  input  logic [N_USER-1:0] dp_done,
  input  logic [N_USER-1:0][3:0] dp_n_sent,
  // timer / Rx coordinator
  input  logic tbtt,
  input  logic resp_req,
  output logic resp_done,
  input  logic ack_rx,
  input  logic cts_rx,
  output logic beacon_sent,
  output logic tx_active,
  // events
  output logic ev_txop,
  output logic ev_collision,
  output logic ev_shared,
  output logic ev_cont,
  output logic ev_rts,
  output logic ev_timeout,
  output logic ev_drop
);
  typedef enum logic [3:0] {
    S_IDLE, S_RESP, S_BCN, S_RTS, S_WAIT_CTS, S_SIFS, S_DATA, S_DATA_WAIT,
    S_WAIT_ACK, S_POP
  } st_e;

  st_e st;
  ac_e prim;
  logic bcn_pend;
  logic [N_USER-1:0] active, doneseen, ok;
  logic [N_USER-1:0][3:0] sent, pop_left;
  logic [$clog2(N_USER)-1:0] k;
  logic [15:0] timer, elapsed;
  logic more_frag;

  function automatic buf_e ac_buf(input ac_e a);
    return buf_e'(4'd4 + {2'd0, a});
  endfunction

  // primary source of each AC
  buf_e psrc [4];
  always_comb begin
    for (int a = 0; a < 4; a++) begin
      psrc[a] = ac_buf(ac_e'(a));
      if (a == int'(AC_VO) && count[BUF_TX] != 0) psrc[a] = BUF_TX;
      if (a == int'(AC_BE) && ps_release && count[BUF_PS] != 0) psrc[a] = BUF_PS;
      ac_pending[a] = count[psrc[a]] != 0;
    end
  end

  // virtual collision handler
  ac_e win;
  always_comb begin
    win = AC_BK;
    for (int a = 0; a < 4; a++) if (bo_ready[a]) win = ac_e'(a);
  end

  // user assignment for an MU transmission
  buf_e sel_n [N_USER];
  logic [N_USER-1:0] act_n;
  always_comb begin
    int u;
    for (int i = 0; i < N_USER; i++) begin sel_n[i] = BUF_BCN; act_n[i] = 1'b0; end
    sel_n[0] = psrc[prim];
    act_n[0] = 1'b1;
    u = 1;
    if (cfg.ap_mode && cfg.txop_share_en)
      for (int a = 3; a >= 0; a--)
        if (a != int'(prim) && count[ac_buf(ac_e'(a))] != 0 && u < N_USER) begin
          sel_n[u] = ac_buf(ac_e'(a)); act_n[u] = 1'b1; u++;
        end
  end

  logic [3:0] agg_of [N_USER];
  always_comb
    for (int i = 0; i < N_USER; i++) begin
      agg_of[i] = 4'd1;
      if (cfg.ampdu_en && sel_n[i] >= BUF_AC_BK && sel_n[i] <= BUF_AC_VO)
        agg_of[i] = cfg.agg_num[sel_n[i][1:0]];
      else if (cfg.ampdu_en && i == 0)
        agg_of[i] = cfg.agg_num[prim];
      if (head_flag[sel_n[i][2:0]]) agg_of[i] = 4'd1;  // a fragment goes alone
    end

  logic all_done, timeout, last_user;
  assign all_done  = (doneseen | dp_done) == active;
  assign timeout   = timer >= {6'd0, cfg.resp_timeout_us};
  assign last_user = (int'(k) == N_USER - 1) || !active[k + 1'b1];
  assign tx_active = st == S_RESP || st == S_BCN || st == S_RTS || st == S_DATA || st == S_DATA_WAIT;

  st_e after_sifs;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE; prim <= AC_BK; bcn_pend <= 1'b0; active <= '0; doneseen <= '0;
      ok <= '0; sent <= '0; pop_left <= '0; k <= '0; timer <= '0; elapsed <= '0;
      more_frag <= 1'b0; after_sifs <= S_IDLE;
      for (int i = 0; i < N_USER; i++) src_sel[i] <= BUF_BCN;
      dp_req <= '0; dp_n <= '0; dp_ampdu <= '0; pop <= '0;
      bo_success <= '0; bo_fail <= '0; resp_done <= 1'b0; beacon_sent <= 1'b0;
      {ev_txop, ev_collision, ev_shared, ev_cont, ev_rts, ev_timeout, ev_drop} <= '0;
    end else begin
      dp_req <= '0; pop <= '0; bo_success <= '0; bo_fail <= '0;
      resp_done <= 1'b0; beacon_sent <= 1'b0;
      {ev_txop, ev_collision, ev_shared, ev_cont, ev_rts, ev_timeout, ev_drop} <= '0;
      if (tbtt) bcn_pend <= 1'b1;
      if (us_tick) begin
        elapsed <= elapsed + 1'b1;
        if (!rx_busy) timer <= timer + 1'b1;
      end
      unique case (st)
        S_IDLE: begin
          if (resp_req) begin
            src_sel[0] <= BUF_RESP; dp_req[0] <= 1'b1; dp_n[0] <= 4'd1; dp_ampdu[0] <= 1'b0;
            st <= S_RESP;
          end else if (bcn_pend && count[BUF_BCN] == 0) begin
            bcn_pend <= 1'b0;
          end else if (bcn_pend && idle && idle_us >= 16'(PIFS_US)) begin
            src_sel[0] <= BUF_BCN; dp_req[0] <= 1'b1; dp_n[0] <= 4'd1; dp_ampdu[0] <= 1'b0;
            st <= S_BCN;
          end else if (bo_ready != 0) begin
            prim    <= win;
            elapsed <= '0;
            ev_txop <= 1'b1;
            for (int a = 0; a < 4; a++)
              if (bo_ready[a] && a != int'(win)) begin
                bo_fail[a]   <= 1'b1;
                ev_collision <= 1'b1;
                if (bo_retry_last[a]) begin pop[psrc[a][2:0]] <= 1'b1; ev_drop <= 1'b1; end
              end
            if (cfg.rts_en && count[BUF_CTRL] != 0) begin
              src_sel[0] <= BUF_CTRL; dp_req[0] <= 1'b1; dp_n[0] <= 4'd1; dp_ampdu[0] <= 1'b0;
              st <= S_RTS; ev_rts <= 1'b1;
            end else begin
              st <= S_DATA;
            end
          end
        end
        S_RESP: if (dp_done[0]) begin resp_done <= 1'b1; st <= S_IDLE; end
        S_BCN: if (dp_done[0]) begin
          pop[3'(BUF_BCN)] <= 1'b1; beacon_sent <= 1'b1; bcn_pend <= 1'b0; st <= S_IDLE;
        end
        S_RTS: if (dp_done[0]) begin timer <= '0; st <= S_WAIT_CTS; end
        S_WAIT_CTS: begin
          if (cts_rx) begin
            pop[3'(BUF_CTRL)] <= 1'b1; timer <= '0; after_sifs <= S_DATA; st <= S_SIFS;
          end else if (timeout) begin
            ev_timeout <= 1'b1;
            bo_fail[prim] <= 1'b1;
            if (bo_retry_last[prim]) begin pop[3'(BUF_CTRL)] <= 1'b1; ev_drop <= 1'b1; end
            st <= S_IDLE;
          end
        end
        S_SIFS: if (timer >= 16'(SIFS_US)) st <= after_sifs;
        S_DATA: begin
          for (int i = 0; i < N_USER; i++) begin
            src_sel[i]  <= sel_n[i];
            dp_req[i]   <= act_n[i];
            dp_n[i]     <= agg_of[i];
            dp_ampdu[i] <= cfg.ampdu_en;
          end
          active    <= act_n;
          doneseen  <= '0;
          more_frag <= head_flag[sel_n[0][2:0]];
          ev_shared <= act_n[N_USER-1:1] != 0;
          st        <= S_DATA_WAIT;
        end
        S_DATA_WAIT: begin
          for (int i = 0; i < N_USER; i++)
            if (dp_done[i]) begin doneseen[i] <= 1'b1; sent[i] <= dp_n_sent[i]; end
          if (all_done) begin k <= '0; timer <= '0; ok <= '0; st <= S_WAIT_ACK; end
        end
        S_WAIT_ACK: begin
          if (ack_rx || timeout) begin
            ok[k] <= ack_rx;
            if (!ack_rx) ev_timeout <= 1'b1;
            timer <= '0;
            if (last_user) begin
              st <= S_POP;
              for (int i = 0; i < N_USER; i++)
                pop_left[i] <= ((i == int'(k)) ? ack_rx : ok[i]) ? sent[i] : 4'd0;
              if ((k == 0) ? ack_rx : ok[0]) bo_success[prim] <= 1'b1;
              else begin
                bo_fail[prim] <= 1'b1;
                if (bo_retry_last[prim]) begin pop_left[0] <= sent[0]; ev_drop <= 1'b1; end
              end
            end else begin
              k <= k + 1'b1;
            end
          end
        end
        S_POP: begin
          for (int i = 0; i < N_USER; i++)
            if (pop_left[i] != 0) begin
              pop[src_sel[i][2:0]] <= 1'b1;
              pop_left[i] <= pop_left[i] - 1'b1;
            end
          if (pop_left == '0 && pop == '0) begin
            if (ok[0] && ac_pending[prim] &&
                (more_frag || (cfg.txop_us[prim] != 0 && elapsed < cfg.txop_us[prim]))) begin
              timer <= '0; after_sifs <= S_DATA; st <= S_SIFS; ev_cont <= 1'b1;
            end else begin
              st <= S_IDLE;
            end
          end
        end
        default: st <= S_IDLE;
      endcase
    end
  end
endmodule
