// tb_datapump: a Datapump reading from a frame buffer, with its CRC-32 and
// CRC-8 units. Checks single MPDUs and A-MPDUs (delimiters, FCS, padding,
// last marker, number sent) against the reference builder, with and
// without PHY back-pressure, the clipping to the frames available, and the
// rate: one octet per clock plus one bubble per MPDU.
module tb_datapump;
  import tb_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  logic wr_en = 0, wr_commit = 0, rd_pop = 0;
  logic [7:0] wr_data = 0;
  logic start = 0, ampdu = 0, tx_ready = 1;
  logic [3:0] n_mpdu = 1, n_sent;
  logic busy, done, src_open, src_next, src_ready, src_valid, src_last, crc_init, crc_en;
  logic [7:0] src_data, crc_din, dl_crc, tx_data;
  logic [15:0] src_len, dl_bits;
  logic [4:0] src_avail, count;
  logic [31:0] crc_reg, crc_fcs;
  logic tx_valid, tx_last;
  int checks = 0, failures = 0;

  frame_buffer #(.DEPTH(1024), .NDESC(16)) u_fb (
    .clk, .rst_n, .wr_en, .wr_data, .wr_commit, .wr_flag(1'b0), .wr_abort(1'b0),
    .overflow(), .free_bytes(), .rd_open(src_open), .rd_next(src_next), .rd_pop,
    .rd_ready(src_ready), .rd_valid(src_valid), .rd_data(src_data), .rd_last(src_last),
    .rd_len(src_len), .rd_flag(), .rd_avail(src_avail), .count);
  crc32 u_c32 (.clk, .rst_n, .init(crc_init), .en(crc_en), .din(crc_din), .crc(crc_reg), .fcs(crc_fcs));
  crc8  u_c8  (.din(dl_bits), .crc(dl_crc));
  datapump dut (.*);

  always #5 clk = ~clk;
  initial begin #5000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  task automatic chk(bit c, string s);
    checks++; if (!c) begin failures++; $display("FAIL %s at %0t", s, $time); end
  endtask
  task automatic put(bq_t f);
    foreach (f[i]) begin @(negedge clk) wr_en = 1; wr_data = f[i]; wr_commit = (i == f.size()-1); end
    @(negedge clk) wr_en = 0; wr_commit = 0;
  endtask
  task automatic send(int n, bit agg, bit bp, output bq_t got, output int cyc);
    int lastseen = 0;
    got = {}; cyc = 0;
    @(negedge clk) start = 1; n_mpdu = 4'(n); ampdu = agg;
    @(negedge clk) start = 0;
    while (!done) begin
      tx_ready = bp ? 1'($urandom) : 1'b1;
      @(posedge clk); cyc++;
      if (tx_valid && tx_ready) begin
        got.push_back(tx_data);
        if (tx_last) lastseen++;
      end
      @(negedge clk);
    end
    tx_ready = 1;
    chk(lastseen == 1, "one last marker");
  endtask

  initial begin
    bq_t fr[$], got, exp;
    int cyc;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int k = 0; k < 3; k++) begin
      bq_t f = {};
      repeat (20 + 3 * k) f.push_back(8'($urandom));
      fr.push_back(f); put(f);
    end
    // single MPDU
    send(1, 0, 0, got, cyc);
    chk(got == add_fcs(fr[0]), "single MPDU"); chk(n_sent == 1, "n_sent single");
    chk(cyc <= 20 + 4 + 3, "single MPDU rate");
    // A-MPDU of three, no back-pressure: 1 octet/clock
    send(3, 1, 0, got, cyc);
    exp = tb_ref_pkg::ampdu(fr);
    chk(got == exp, "A-MPDU of 3"); chk(n_sent == 3, "n_sent 3");
    chk(cyc <= exp.size() + 3 + 3, "A-MPDU rate");
    // with back-pressure
    send(3, 1, 1, got, cyc);
    chk(got == exp, "A-MPDU with back-pressure");
    // ask for more than available: clipped to 3
    send(8, 1, 0, got, cyc);
    chk(got == exp && n_sent == 3, "clipped to available");
    // free the first frame: A-MPDU of the remaining two
    @(negedge clk) rd_pop = 1; @(negedge clk) rd_pop = 0;
    send(2, 1, 0, got, cyc);
    chk(got == tb_ref_pkg::ampdu(fr[1:2]), "after pop");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
