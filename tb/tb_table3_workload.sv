// tb_table3_workload: the single-user best-effort workload of the evaluated
// network, run on the MAC at its default parameters (320 MHz, EDCA reset
// values: AIFS 61 us, CWmin 31 for AC_BE, TXOP limit 0, A-MPDUs of up to
// four MPDUs). The host keeps the AC_BE buffer filled with 1500-byte MSDUs
// in data MPDUs of 1538 octets with FCS, as space allows (two fit the
// 4096-byte buffer, so each A-MPDU carries two); the PHY of user 0
// accepts octets at the 780 Mbit/s PHY rate of one user (ready in 780 of
// every 2560 clocks on average); one station answers every PPDU with a
// BlockAck SIFS after it ends. The test counts delivered MSDU octets over
// the run and reports the MAC throughput. Checks: every MPDU's delimiter and
// FCS, every frame delivered once in order, and a throughput above zero and
// below the PHY rate. PHY preambles are not modelled, so the figure is the
// MAC's share of the air time only.
module tb_table3_workload;
  import mac_pkg::*;
  import tb_ref_pkg::*;
  localparam int N = 4;
  localparam int CLK_MHZ = 320;
  localparam int N_FRAMES = 40;
  localparam int BODY = 1500;
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
    repeat (20_000_000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  task automatic chk(bit c, string s);
    checks++; if (!c) begin failures++; $display("FAIL %s at %0t", s, $time); end
  endtask

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

  localparam logic [47:0] AP  = 48'h000000000002;
  localparam logic [47:0] STA = 48'h00AABBCC0012;
  function automatic bq_t frame(int k);
    return mk_frame(FT_DATA, 4'h8, 0, 16'd60, STA, AP, 16'(k << 4), BODY);
  endfunction

  // PHY rate limit on user 0: 780 Mbit/s against 2560 Mbit/s of the path
  int acc = 0;
  always @(posedge clk) begin
    acc = acc + 780;
    tx_ready[0] <= acc >= 2560;
    if (acc >= 2560) acc -= 2560;
  end

  // station: collects user 0's PSDU, checks it, answers with a BlockAck
  bq_t psdu;
  bit got_last = 0;
  always @(negedge clk) if (rst_n && tx_valid[0] && tx_ready[0]) begin
    psdu.push_back(tx_data[0]);
    if (tx_last[0]) got_last = 1;
  end

  int next_k = 0, n_ppdu = 0;
  longint bytes = 0;
  longint cyc = 0, c_first = 0, c_last = 0;
  always @(posedge clk) cyc++;
  initial begin : station
    forever begin
      bq_t p, one;
      int i, len;
      logic [15:0] b;
      wait (got_last);
      p = psdu; psdu = {}; got_last = 0;
      if (c_first == 0) c_first = cyc;
      n_ppdu++;
      i = 0;
      while (i + 4 <= p.size()) begin
        b = {p[i + 1], p[i]};
        chk(p[i + 3] == 8'h4E && crc8_ref(b) == p[i + 2], "delimiter");
        len = int'({b[3:2], b[15:4]});
        one = {};
        for (int j = 0; j < len; j++) one.push_back(p[i + 4 + j]);
        chk(one == add_fcs(frame(next_k)), $sformatf("frame %0d delivered in order", next_k));
        next_k++;
        bytes += longint'(BODY);
        i += 4 + len;
        while (i % 4 != 0) i++;
      end
      c_last = cyc;
      repeat (SIFS_US * CLK_MHZ) @(posedge clk);
      begin
        bq_t a;
        a = add_fcs(mk_frame(FT_CTRL, ST_BA, 0, 16'd0, AP, STA, 0, 0));
        foreach (a[j]) begin @(negedge clk) rx_valid = 1; rx_data = a[j]; rx_last = (j == a.size() - 1); end
        @(negedge clk) rx_valid = 0; rx_last = 0;
      end
    end
  end

  initial begin : host
    logic [31:0] d;
    bq_t f;
    real mbps;
    repeat (10) @(negedge clk); rst_n = 1;
    apb_wr(8'h30, 32'(4 + AC_BE));
    for (int k = 0; k < N_FRAMES; k++) begin
      f = frame(k);
      do apb_rd(8'h3C, d); while (d[28:16] < 13'(f.size() + 4) || d[4:0] >= 5'd15);
      foreach (f[i]) apb_wr(8'h34, 32'(f[i]));
      apb_wr(8'h38, 0);
    end
    do apb_rd(8'h3C, d); while (d[4:0] != 0);
    repeat (100) @(posedge clk);
    chk(next_k == N_FRAMES, "all frames delivered");
    bytes -= longint'(2 * BODY);  // the first PPDU's MSDUs ended before the clock started
    mbps = real'(bytes) * 8.0 / (real'(c_last - c_first) / real'(CLK_MHZ));  // bits per us = Mbit/s
    $display("%0d MSDUs of %0d octets in %0d PPDUs; %0.1f Mbit/s between the first and last PPDU end", next_k, BODY, n_ppdu, mbps);
    chk(mbps > 0.0 && mbps < 780.0, "throughput below the PHY rate");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
