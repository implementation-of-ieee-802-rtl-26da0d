// tb_mpdu_gen: the host fills several transmit buffers; users select
// buffers through src_sel and read the frames; user 0 also reads the
// response generator port; pops free frames and counts follow; a frame too
// large for the control buffer is reported as an overflow.
module tb_mpdu_gen;
  import mac_pkg::*;
  import tb_ref_pkg::*;
  localparam int N = 4;
  logic clk = 0, rst_n = 0;
  logic [2:0] host_sel = 0;
  logic host_wr = 0, host_commit = 0, host_flag = 0;
  logic [7:0] host_data = 0;
  logic [N_BUF-1:0] host_overflow, pop = 0, head_flag;
  logic [N_BUF-1:0][12:0] free_bytes;
  logic [N_BUF-1:0][4:0] count;
  buf_e [N-1:0] src_sel;
  logic [N-1:0] src_open = 0, src_next = 0, src_ready = 0, src_valid, src_last, src_flag;
  logic [N-1:0][7:0] src_data;
  logic [N-1:0][15:0] src_len;
  logic [N-1:0][4:0] src_avail;
  logic resp_open, resp_ready, resp_valid = 1, resp_last = 0;
  logic [7:0] resp_data = 8'hC4;
  logic [15:0] resp_len = 16'd10;
  logic [4:0] resp_avail = 5'd1;
  int checks = 0, failures = 0, ovf = 0;
  mpdu_gen #(.N_USER(N)) dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) if (rst_n && host_overflow != 0) ovf++;
  initial begin #5000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  task automatic chk(bit c, string s);
    checks++; if (!c) begin failures++; $display("FAIL %s at %0t", s, $time); end
  endtask
  task automatic put(int b, bq_t f, bit flag);
    @(negedge clk) host_sel = 3'(b);
    foreach (f[i]) begin @(negedge clk) host_wr = 1; host_data = f[i]; end
    @(negedge clk) host_wr = 0; host_commit = 1; host_flag = flag;
    @(negedge clk) host_commit = 0; host_flag = 0;
  endtask
  task automatic read(int u, output bq_t got);
    got = {};
    @(negedge clk) src_open[u] = 1; @(negedge clk) src_open[u] = 0;
    src_ready[u] = 1;
    while (src_valid[u]) begin got.push_back(src_data[u]); @(negedge clk); end
    src_ready[u] = 0;
  endtask

  initial begin
    bq_t f [N_BUF], got;
    for (int i = 0; i < N; i++) src_sel[i] = BUF_BCN;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int b = 0; b < N_BUF; b++) begin
      f[b] = {};
      repeat (10 + b) f[b].push_back(8'($urandom));
      put(b, f[b], b == 6);
    end
    for (int b = 0; b < N_BUF; b++) chk(count[b] == 1, "one frame per buffer");
    chk(head_flag[6] && !head_flag[5], "more-fragments flag");
    // users 0..3 read AC_VO, AC_VI, AC_BE, AC_BK
    for (int u = 0; u < N; u++) src_sel[u] = buf_e'(7 - u);
    for (int u = 0; u < N; u++) begin
      read(u, got); chk(got == f[7 - u], $sformatf("user %0d reads buffer %0d", u, 7 - u));
      chk(src_len[u] == 16'(17 - u), "length seen by user");
    end
    // user 2 reads the Tx buffer, user 0 the beacon buffer
    src_sel[2] = BUF_TX; read(2, got); chk(got == f[1], "user 2 reads Tx buffer");
    src_sel[0] = BUF_BCN; read(0, got); chk(got == f[0], "user 0 reads beacon buffer");
    // response generator on user 0
    src_sel[0] = BUF_RESP;
    @(negedge clk) src_open[0] = 1; #1; chk(resp_open, "response open routed");
    chk(src_avail[0] == 1 && src_data[0] == 8'hC4 && src_len[0] == 10, "response data routed");
    @(negedge clk) src_open[0] = 0;
    // pops
    @(negedge clk) pop = 8'b1000_0010; @(negedge clk) pop = 0;
    chk(count[7] == 0 && count[1] == 0 && count[6] == 1, "pops free frames");
    chk(free_bytes[7] == 13'(4096), "space returned");
    // overflow of the 256-octet control buffer
    begin bq_t big; big = {}; repeat (300) big.push_back(8'h11); put(3, big, 0); end
    @(negedge clk);
    chk(ovf == 1 && count[3] == 1, $sformatf("control buffer overflow %0d %0d", ovf, count[3]));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
