// tb_mpdu_validate: MPDUs with correct and corrupted FCS, addressed to this
// MAC, to a group and to another station; checks fcs_ok, for_us and every
// parsed header field.
module tb_mpdu_validate;
  import mac_pkg::*;
  import tb_ref_pkg::*;
  logic clk = 0, rst_n = 0, m_valid = 0, m_sop = 0, m_eop = 0, m_trunc = 0;
  logic [7:0] m_data = 0;
  logic [47:0] mac_addr = 48'h665544332202;
  logic v_done, fcs_ok, for_us;
  rx_hdr_t hdr;
  int checks = 0, failures = 0;
  logic ok_s, us_s;
  mpdu_validate dut (.*);
  always #5 clk = ~clk;
  initial begin #2000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  task automatic chk(bit c, string s);
    checks++; if (!c) begin failures++; $display("FAIL %s at %0t", s, $time); end
  endtask
  task automatic send(bq_t f);
    foreach (f[i]) begin
      @(negedge clk) m_valid = 1; m_data = f[i]; m_sop = (i == 0); m_eop = (i == f.size() - 1);
    end
    @(negedge clk) m_valid = 0; m_sop = 0; m_eop = 0;
    chk(v_done, "result one clock after the end");
    ok_s = fcs_ok; us_s = for_us;
    repeat (4) @(negedge clk);
  endtask
  initial begin
    bq_t f;
    logic [47:0] ta;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int t = 0; t < 12; t++) begin
      logic [47:0] a1;
      logic [15:0] sc, dur;
      bit bad, rt;
      a1  = (t % 3 == 0) ? mac_addr : (t % 3 == 1) ? 48'hFFFFFFFFFFFF : 48'h0A0B0C0D0E10;
      ta  = {16'h1234, 32'($urandom)} & ~48'h1;
      sc  = 16'($urandom); dur = 16'($urandom_range(0, 3000));
      rt  = t[0];
      bad = (t % 4 == 3);
      f = add_fcs(mk_frame(FT_DATA, 4'h8, rt, dur, a1, ta, sc, 8 + t));
      if (bad) f[5] = f[5] ^ 8'h40;
      send(f);
      chk(ok_s == !bad, "FCS check");
      if (!bad) begin
        chk(us_s == (t % 3 != 2), "address filter");
        chk(hdr.ftype == FT_DATA && hdr.subtype == 4'h8 && hdr.retry == rt, "frame control");
        chk(hdr.duration == dur && hdr.addr1 == a1 && hdr.addr2 == ta && hdr.seq_ctrl == sc, "header fields");
        chk(hdr.length == 14'(f.size()), "length");
      end
    end
    // an ACK (14 octets)
    f = add_fcs(mk_frame(FT_CTRL, ST_ACK, 0, 0, mac_addr, 0, 0, 0));
    send(f);
    chk(ok_s && us_s && hdr.ftype == FT_CTRL && hdr.subtype == ST_ACK && hdr.length == 14, "ACK parsed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
