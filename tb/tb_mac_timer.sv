// tb_mac_timer: with 4 clocks per microsecond, checks the tick period, the
// TSF count, TBTT every beacon interval (1 TU = 1024 us) and the NAV
// (load, keep the longer value, count down, busy flag).
module tb_mac_timer;
  localparam int CLK_MHZ = 4;
  logic clk = 0, rst_n = 0, nav_set = 0;
  logic [15:0] beacon_int_tu = 16'd1, nav_us = 0, nav_left;
  logic us_tick, tbtt, nav_busy;
  logic [63:0] tsf;
  int checks = 0, failures = 0, cyc = 0, ticks = 0, last_tick = -1, tbtts = 0, last_tbtt = -1;
  mac_timer #(.CLK_MHZ(CLK_MHZ)) dut (.*);
  always #5 clk = ~clk;
  initial begin #50000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  task automatic chk(bit c, string s);
    checks++; if (!c) begin failures++; $display("FAIL %s at %0t", s, $time); end
  endtask
  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (us_tick) begin
      if (last_tick >= 0) chk(cyc - last_tick == CLK_MHZ, "tick period");
      last_tick = cyc; ticks++;
    end
    if (tbtt) begin
      if (last_tbtt >= 0) chk(cyc - last_tbtt == 1024 * CLK_MHZ, "TBTT period");
      last_tbtt = cyc; tbtts++;
    end
  end
  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    repeat (100 * CLK_MHZ) @(negedge clk);
    chk(tsf == 64'(ticks) && ticks >= 99, "TSF counts microseconds");
    @(negedge clk) nav_set = 1; nav_us = 16'd50;
    @(negedge clk) nav_us = 16'd20;
    @(negedge clk) nav_set = 0;
    chk(nav_busy && nav_left >= 16'd49, "NAV keeps the longer value");
    repeat (45 * CLK_MHZ) @(negedge clk);
    chk(nav_busy, "NAV still running");
    repeat (10 * CLK_MHZ) @(negedge clk);
    chk(!nav_busy, "NAV expired");
    repeat (3000 * CLK_MHZ) @(negedge clk);
    chk(tbtts >= 2, "TBTT seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
