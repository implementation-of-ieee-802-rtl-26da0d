// tb_reception: the whole receive path. An A-MPDU of four data MPDUs for
// this MAC, one with a broken FCS, leaves three frames in the Rx buffer;
// a retransmission of one of them is filtered as a duplicate; an ACK and a
// frame for another station are reported but not stored; a frame larger
// than the free space is dropped with an overflow. Stored frames are read
// back through the host port and compared.
module tb_reception;
  import mac_pkg::*;
  import tb_ref_pkg::*;
  logic clk = 0, rst_n = 0, rx_valid = 0, rx_last = 0, rx_ampdu = 0;
  logic [7:0] rx_data = 0, rd_data;
  logic [47:0] mac_addr = 48'h665544332202;
  logic rx_active, rx_done, rx_for_us, ev_stored, ev_dup, ev_fcs_err, ev_delim_err, ev_overflow;
  rx_hdr_t rx_hdr;
  logic rd_open = 0, rd_ready = 0, rd_pop = 0, rd_valid, rd_last;
  logic [15:0] rd_len;
  logic [4:0] rx_count;
  int checks = 0, failures = 0, n_done = 0, n_stored = 0, n_dup = 0, n_fcs = 0, n_ovf = 0, n_ack = 0;
  reception #(.RXBUF_DEPTH(256), .NDESC(8)) dut (.*);
  always #5 clk = ~clk;
  initial begin #20000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  always @(posedge clk) if (rst_n) begin
    n_done += rx_done; n_stored += ev_stored; n_dup += ev_dup; n_fcs += ev_fcs_err; n_ovf += ev_overflow;
    if (rx_done && rx_hdr.ftype == FT_CTRL && rx_hdr.subtype == ST_ACK && rx_for_us) n_ack++;
  end
  task automatic chk(bit c, string s);
    checks++; if (!c) begin failures++; $display("FAIL %s at %0t", s, $time); end
  endtask
  task automatic send(bq_t p, bit agg);
    foreach (p[i]) begin @(negedge clk) rx_valid = 1; rx_data = p[i]; rx_last = (i == p.size() - 1); rx_ampdu = agg; end
    @(negedge clk) rx_valid = 0; rx_last = 0;
    repeat (4) @(negedge clk);
  endtask
  task automatic read_frame(output bq_t got);
    got = {};
    @(negedge clk) rd_open = 1; @(negedge clk) rd_open = 0; rd_ready = 1;
    while (rd_valid) begin got.push_back(rd_data); @(negedge clk); end
    rd_ready = 0;
    @(negedge clk) rd_pop = 1; @(negedge clk) rd_pop = 0;
  endtask
  initial begin
    bq_t fr[$], p, got, exp[$];
    logic [47:0] sta = 48'h0000AABBCC10;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int k = 0; k < 4; k++) fr.push_back(mk_frame(FT_DATA, 4'h8, 0, 16'd44, mac_addr, sta, 16'(k << 4), 10 + k));
    p = tb_ref_pkg::ampdu(fr);
    // break the FCS of the third MPDU: find its start by rebuilding the prefix
    begin
      bq_t pre; int off;
      pre = tb_ref_pkg::ampdu(fr[0:1]);
      off = pre.size() + ((4 - add_fcs(fr[1]).size() % 4) % 4) + 4 + 12;
      p[off] = p[off] ^ 8'h01;
    end
    send(p, 1);
    chk(n_done == 3 && n_fcs == 1 && n_stored == 3 && rx_count == 3, "A-MPDU: three stored, one FCS error");
    // retransmission of MPDU 1 (retry bit set) is a duplicate
    fr[1][1] = fr[1][1] | 8'h08;
    send(add_fcs(fr[1]), 0);
    chk(n_dup == 1 && rx_count == 3, $sformatf("duplicate filtered %0d %0d %0d", n_dup, rx_count, n_stored));
    // ACK for this MAC and a frame for another station: not stored
    send(add_fcs(mk_frame(FT_CTRL, ST_ACK, 0, 0, mac_addr, 0, 0, 0)), 0);
    send(add_fcs(mk_frame(FT_DATA, 4'h8, 0, 16'd100, 48'h0A0B0C0D0E10, sta, 16'h0100, 20)), 0);
    chk(n_ack == 1 && rx_count == 3 && n_done == 6, "control and foreign frames not stored");
    exp = {add_fcs(fr[0]), add_fcs(mk_frame(FT_DATA, 4'h8, 0, 16'd44, mac_addr, sta, 16'h0010, 11)), add_fcs(fr[3])};
    for (int k = 0; k < 3; k++) begin read_frame(got); chk(got == exp[k], $sformatf("stored frame %0d", k)); end
    chk(rx_count == 0, "buffer empty after reading");
    // overflow: two frames of 150 octets into 256
    send(add_fcs(mk_frame(FT_DATA, 4'h8, 0, 0, mac_addr, sta, 16'h0200, 126)), 0);
    send(add_fcs(mk_frame(FT_DATA, 4'h8, 0, 0, mac_addr, sta, 16'h0210, 126)), 0);
    chk(rx_count == 1 && n_ovf == 1, "overflow drops the second frame");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
