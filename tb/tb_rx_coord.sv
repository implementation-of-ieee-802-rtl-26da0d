// tb_rx_coord: a data frame for this MAC is answered with an ACK and an RTS
// with a CTS, each requested SIFS (16 us) after the reception and built
// with the right frame control, duration and receiver address; ACK/BlockAck
// and CTS for this MAC raise ack_rx/cts_rx; a frame for another station
// sets the NAV.
module tb_rx_coord;
  import mac_pkg::*;
  logic clk = 0, rst_n = 0, us_tick = 0, rx_done = 0, rx_for_us = 0, resp_done = 0;
  rx_hdr_t rx_hdr = '0;
  logic ack_rx, cts_rx, nav_set, resp_req, ev_resp;
  logic [15:0] nav_us, resp_len;
  logic resp_open = 0, resp_ready = 0, resp_valid, resp_last;
  logic [7:0] resp_data;
  logic [4:0] resp_avail;
  int checks = 0, failures = 0, us = 0;
  rx_coord dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) begin us_tick <= !us_tick; if (us_tick) us++; end
  initial begin #20000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  task automatic chk(bit c, string s);
    checks++; if (!c) begin failures++; $display("FAIL %s at %0t", s, $time); end
  endtask
  task automatic rx(logic [1:0] ft, logic [3:0] st, logic [47:0] a1, logic [47:0] a2, logic [15:0] dur, bit us_);
    @(negedge clk) rx_done = 1; rx_for_us = us_; rx_hdr.ftype = ft; rx_hdr.subtype = st;
    rx_hdr.addr1 = a1; rx_hdr.addr2 = a2; rx_hdr.duration = dur;
    #1;
  endtask
  task automatic get_resp(output logic [7:0] b[10], output int waited);
    int t0 = us;
    @(negedge clk) rx_done = 0;
    while (!resp_req) @(negedge clk);
    waited = us - t0;
    chk(resp_avail == 1, "response available");
    @(negedge clk) resp_open = 1; @(negedge clk) resp_open = 0; resp_ready = 1;
    for (int i = 0; i < 10; i++) begin
      b[i] = resp_data;
      if (i == 9) chk(resp_last, "last octet marked");
      @(negedge clk);
    end
    chk(!resp_valid, "ten octets");
    resp_ready = 0; resp_done = 1; @(negedge clk) resp_done = 0;
    @(negedge clk) chk(!resp_req, "request withdrawn");
  endtask
  initial begin
    logic [7:0] b[10];
    int w;
    logic [47:0] me = 48'h665544332202, sta = 48'h0000AABBCC10;
    repeat (2) @(negedge clk); rst_n = 1;
    // data frame -> ACK
    rx(FT_DATA, 4'h8, me, sta, 16'd44, 1);
    chk(ev_resp && !ack_rx && !nav_set, "data for us needs a response");
    get_resp(b, w);
    chk(w >= 15 && w <= 17, $sformatf("ACK after SIFS, waited %0d us", w));
    chk(b[0] == 8'hD4 && b[1] == 0 && b[2] == 0 && b[3] == 0, "ACK frame control and duration");
    for (int i = 0; i < 6; i++) chk(b[4 + i] == sta[8*i +: 8], "ACK receiver address");
    // RTS -> CTS with duration reduced by SIFS + CTS time
    rx(FT_CTRL, ST_RTS, me, sta, 16'd500, 1);
    get_resp(b, w);
    chk(b[0] == 8'hC4 && {b[3], b[2]} == 16'd440, "CTS frame control and duration");
    // ACK, BlockAck and CTS for us
    rx(FT_CTRL, ST_ACK, me, 0, 0, 1); chk(ack_rx && !ev_resp, "ACK reported");
    rx(FT_CTRL, ST_BA, me, sta, 0, 1); chk(ack_rx, "BlockAck reported");
    rx(FT_CTRL, ST_CTS, me, 0, 0, 1); chk(cts_rx && !ack_rx, "CTS reported");
    // frame for another station: NAV
    rx(FT_DATA, 4'h8, 48'h0A0B0C0D0E10, sta, 16'd300, 0);
    chk(nav_set && nav_us == 300 && !ev_resp, "NAV from foreign frame");
    @(negedge clk) rx_done = 0;
    // group-addressed data frame: no response
    rx(FT_DATA, 4'h8, 48'hFFFFFFFFFFFF, sta, 16'd0, 1);
    chk(!ev_resp, "no response to group frame");
    @(negedge clk) rx_done = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
