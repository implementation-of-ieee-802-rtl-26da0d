// tb_deagg: A-MPDUs built by the reference (random MPDU lengths, so all
// padding cases occur) must come out as the original MPDUs; a corrupted
// delimiter is skipped four octets at a time and the search recovers at the
// next valid delimiter; a PSDU that is not an A-MPDU passes whole; a PSDU
// cut short ends its MPDU with the truncation mark.
module tb_deagg;
  import tb_ref_pkg::*;
  logic clk = 0, rst_n = 0, rx_valid = 0, rx_last = 0, rx_ampdu = 0;
  logic [7:0] rx_data = 0;
  logic m_valid, m_sop, m_eop, m_trunc, delim_ok, delim_err;
  logic [7:0] m_data;
  int checks = 0, failures = 0, n_err = 0, n_trunc = 0;
  deagg dut (.*);
  always #5 clk = ~clk;
  initial begin #20000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  task automatic chk(bit c, string s);
    checks++; if (!c) begin failures++; $display("FAIL %s at %0t", s, $time); end
  endtask

  bq_t outq[$];
  bq_t cur;
  always @(posedge clk) if (rst_n) begin
    if (delim_err) n_err++;
    if (m_valid) begin
      if (m_sop) cur = {};
      cur.push_back(m_data);
      if (m_eop) begin outq.push_back(cur); if (m_trunc) n_trunc++; end
    end
  end
  task automatic send(bq_t p, bit agg, int gaps);
    foreach (p[i]) begin
      @(negedge clk) rx_valid = 1; rx_data = p[i]; rx_last = (i == p.size() - 1); rx_ampdu = agg;
      if (gaps && ($urandom % 4 == 0)) begin @(negedge clk) rx_valid = 0; end
    end
    @(negedge clk) rx_valid = 0; rx_last = 0;
    repeat (3) @(negedge clk);
  endtask

  initial begin
    bq_t fr[$], p, f;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int t = 0; t < 8; t++) begin
      fr = {};
      for (int k = 0; k < 1 + t % 4; k++) begin
        f = {}; repeat ($urandom_range(10, 40)) f.push_back(8'($urandom)); fr.push_back(f);
      end
      outq = {};
      send(tb_ref_pkg::ampdu(fr), 1, t % 2);
      chk(outq.size() == fr.size(), "MPDU count");
      foreach (fr[k]) chk(outq.size() > k && outq[k] == add_fcs(fr[k]), $sformatf("MPDU %0d of A-MPDU %0d", k, t));
    end
    // corrupt the second delimiter's signature
    fr = {};
    for (int k = 0; k < 3; k++) begin f = {}; repeat (16 + 4 * k) f.push_back(8'(k + 1)); fr.push_back(f); end
    p = tb_ref_pkg::ampdu(fr);
    p[4 + 20 + 3] = 8'h00;
    outq = {}; n_err = 0;
    send(p, 1, 0);
    chk(outq.size() == 2 && outq[0] == add_fcs(fr[0]) && outq[1] == add_fcs(fr[2]), "skip bad delimiter");
    chk(n_err >= 1, "delimiter error counted");
    // not an A-MPDU
    outq = {};
    f = add_fcs(fr[1]); send(f, 0, 0);
    chk(outq.size() == 1 && outq[0] == f, "single MPDU passes whole");
    // truncated
    outq = {}; n_trunc = 0;
    p = tb_ref_pkg::ampdu(fr[0:0]); p = p[0:p.size() - 6];
    send(p, 1, 0);
    chk(outq.size() == 1 && n_trunc == 1, "truncated MPDU marked");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
