// tb_mib_regs: reset values (the EDCA parameter set), register write and
// read back, the transmit buffer window strobes, the Rx buffer window
// (read advances, open and pop), interrupt status set/clear and masking.
module tb_mib_regs;
  import mac_pkg::*;
  logic clk = 0, rst_n = 0, bus_wr = 0, bus_rd = 0;
  logic [7:0] bus_addr = 0;
  logic [31:0] bus_wdata = 0, bus_rdata;
  mac_cfg_t cfg;
  logic [2:0] buf_sel;
  logic buf_wr, buf_commit, buf_flag, rx_open, rx_ready, rx_pop, mac_int;
  logic [7:0] buf_data;
  logic [N_BUF-1:0][4:0] buf_count;
  logic [N_BUF-1:0][12:0] buf_free;
  logic rx_valid = 1, rx_last = 0;
  logic [7:0] rx_data = 8'h5C;
  logic [15:0] rx_len = 16'd77;
  logic [4:0] rx_count = 5'd2, int_src = 0;
  logic [63:0] tsf = 64'h0000_0001_2345_6789;
  int checks = 0, failures = 0, n_bw = 0, n_bc = 0, n_rr = 0, n_open = 0, n_pop = 0;
  mib_regs dut (.*);
  always #5 clk = ~clk;
  always_comb for (int b = 0; b < N_BUF; b++) begin buf_count[b] = 5'(b + 1); buf_free[b] = 13'(100 * b); end
  always @(posedge clk) begin n_bw += buf_wr; n_bc += buf_commit; n_rr += rx_ready; n_open += rx_open; n_pop += rx_pop; end
  initial begin #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  task automatic chk(bit c, string s);
    checks++; if (!c) begin failures++; $display("FAIL %s at %0t", s, $time); end
  endtask
  task automatic wr(logic [7:0] a, logic [31:0] d);
    @(negedge clk) bus_addr = a; bus_wdata = d; bus_wr = 1; @(negedge clk) bus_wr = 0;
  endtask
  task automatic rd(logic [7:0] a, output logic [31:0] d);
    @(negedge clk) bus_addr = a; bus_rd = 1; #1 d = bus_rdata; @(negedge clk) bus_rd = 0;
  endtask
  initial begin
    logic [31:0] d;
    repeat (2) @(negedge clk); rst_n = 1;
    chk(cfg.aifs_us[AC_BK] == 79 && cfg.aifs_us[AC_BE] == 61 && cfg.aifs_us[AC_VI] == 43 && cfg.aifs_us[AC_VO] == 34, "AIFS reset values");
    chk(cfg.txop_us[AC_VI] == 3008 && cfg.txop_us[AC_VO] == 1504 && cfg.txop_us[AC_BE] == 0, "TXOP reset values");
    chk(cfg.cwmin == 31 && cfg.cwmax == 1023 && cfg.retry_limit == 7, "CW and retry reset values");
    wr(8'h00, 32'h2B); chk(cfg.rts_en && cfg.pm_doze && !cfg.ampdu_en, "CTRL write");
    rd(8'h00, d); chk(d == 32'h2B, "CTRL read");
    wr(8'h04, 32'hDDCCBBAA); wr(8'h08, 32'h0000FFEE); chk(cfg.mac_addr == 48'hFFEEDDCCBBAA, "address");
    wr(8'h0C, {6'd0, 10'd511, 6'd0, 10'd15}); chk(cfg.cwmin == 15 && cfg.cwmax == 511, "CW write");
    wr(8'h24, 32'h0000_8421); chk(cfg.agg_num[AC_BK] == 1 && cfg.agg_num[AC_VO] == 8, "aggregation");
    rd(8'h48, d); chk(d == 32'h23456789, "TSF low"); rd(8'h4C, d); chk(d == 1, "TSF high");
    // buffer window
    wr(8'h30, 32'd6); chk(buf_sel == 6, "buffer select");
    wr(8'h34, 32'h99); wr(8'h34, 32'h98); wr(8'h38, 32'h1);
    chk(n_bw == 2 && n_bc == 1, "buffer write and commit strobes");
    rd(8'h3C, d); chk(d[4:0] == 7 && d[28:16] == 600, "buffer status of selected buffer");
    // Rx window
    wr(8'h44, 32'h1); rd(8'h40, d); chk(d[7:0] == 8'h5C && d[8] && n_rr == 1 && n_open == 1, "Rx octet read advances");
    rd(8'h44, d); chk(d[4:0] == 2 && d[31:16] == 77, "Rx status");
    wr(8'h44, 32'h2); chk(n_pop == 1, "Rx pop");
    // interrupts
    @(negedge clk) int_src = 5'b00100; @(negedge clk) int_src = 0;
    chk(!mac_int, "masked interrupt");
    wr(8'h2C, 32'h4); chk(mac_int, "unmasked interrupt");
    rd(8'h28, d); chk(d == 4, "status read");
    wr(8'h28, 32'h4); chk(!mac_int, "write one to clear");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
