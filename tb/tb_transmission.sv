// tb_transmission: four users, each fed by its own frame buffer. In AP
// mode all four Datapumps send their A-MPDUs at the same time (checked
// octet by octet against the reference, and for overlap in time); in
// station mode only user 0 answers a request.
module tb_transmission;
  import tb_ref_pkg::*;
  localparam int N = 4;
  logic clk = 0, rst_n = 0, ap_mode = 1;
  logic [N-1:0] wr_en = 0, wr_commit = 0;
  logic [7:0] wr_data = 0;
  logic [N-1:0] tx_req = 0, ampdu = 0, busy, done;
  logic [N-1:0][3:0] n_mpdu = 0, n_sent;
  logic [N-1:0] src_open, src_next, src_ready, src_valid, src_last;
  logic [N-1:0][7:0] src_data;
  logic [N-1:0][15:0] src_len;
  logic [N-1:0][4:0] src_avail;
  logic [N-1:0] tx_valid, tx_last, tx_ready = '1;
  logic [N-1:0][7:0] tx_data;
  int checks = 0, failures = 0;

  for (genvar u = 0; u < N; u++) begin : g
    frame_buffer #(.DEPTH(512), .NDESC(16)) u_fb (
      .clk, .rst_n, .wr_en(wr_en[u]), .wr_data, .wr_commit(wr_commit[u]), .wr_flag(1'b0),
      .wr_abort(1'b0), .overflow(), .free_bytes(), .rd_open(src_open[u]), .rd_next(src_next[u]),
      .rd_pop(1'b0), .rd_ready(src_ready[u]), .rd_valid(src_valid[u]), .rd_data(src_data[u]),
      .rd_last(src_last[u]), .rd_len(src_len[u]), .rd_flag(), .rd_avail(src_avail[u]), .count());
  end
  transmission #(.N_USER(N)) dut (.*);
  always #5 clk = ~clk;
  initial begin #5000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  task automatic chk(bit c, string s);
    checks++; if (!c) begin failures++; $display("FAIL %s at %0t", s, $time); end
  endtask
  task automatic put(int u, bq_t f);
    foreach (f[i]) begin @(negedge clk) wr_en[u] = 1; wr_data = f[i]; wr_commit[u] = (i == f.size()-1); end
    @(negedge clk) wr_en = 0; wr_commit = 0;
  endtask

  bq_t got [N];
  int  first_cyc [N], cyc = 0;
  always @(negedge clk) begin
    cyc++;
    for (int u = 0; u < N; u++)
      if (tx_valid[u] && tx_ready[u]) begin
        if (got[u].size() == 0) first_cyc[u] = cyc;
        got[u].push_back(tx_data[u]);
      end
  end

  initial begin
    bq_t fr [N][$];
    repeat (2) @(negedge clk); rst_n = 1;
    for (int u = 0; u < N; u++)
      for (int k = 0; k <= u; k++) begin
        bq_t f; f = {};
        repeat (16 + 5 * u + k) f.push_back(8'($urandom));
        fr[u].push_back(f); put(u, f);
      end
    // AP mode: all four users in parallel
    @(negedge clk) tx_req = '1; ampdu = '1; for (int u = 0; u < N; u++) n_mpdu[u] = 4'(u + 1);
    @(negedge clk) tx_req = '0;
    chk(busy == '1, "all four busy");
    wait (busy == '0); @(negedge clk);
    for (int u = 0; u < N; u++) begin
      chk(got[u] == tb_ref_pkg::ampdu(fr[u]), $sformatf("user %0d PSDU %0d vs %0d", u, got[u].size(), tb_ref_pkg::ampdu(fr[u]).size()));
      chk(n_sent[u] == 4'(u + 1), "n_sent");
      chk(first_cyc[u] == first_cyc[0], "users start together");
      got[u] = {};
    end
    // STA mode: only user 0
    ap_mode = 0;
    @(negedge clk) tx_req = '1; ampdu = '0; n_mpdu = '0;
    @(negedge clk) tx_req = '0;
    chk(busy == 4'b0001, "STA mode: one Datapump");
    wait (busy == '0); repeat (3) @(negedge clk);
    chk(got[0] == add_fcs(fr[0][0]), "STA mode user 0 PSDU");
    for (int u = 1; u < N; u++) chk(got[u].size() == 0, "STA mode: others silent");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
