// tb_chan_monitor: each busy source makes the medium busy and resets the
// idle time; idle time then counts microsecond ticks.
module tb_chan_monitor;
  logic clk = 0, rst_n = 0, us_tick = 0, cca_busy = 0, nav_busy = 0, tx_busy = 0, rx_busy = 0, idle;
  logic [15:0] idle_us;
  int checks = 0, failures = 0;
  chan_monitor dut (.*);
  always #5 clk = ~clk;
  initial begin #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  task automatic chk(bit c, string s);
    checks++; if (!c) begin failures++; $display("FAIL %s at %0t", s, $time); end
  endtask
  task automatic ticks(int n); repeat (n) begin @(negedge clk) us_tick = 1; @(negedge clk) us_tick = 0; end endtask
  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    ticks(7); chk(idle && idle_us == 7, "counts idle microseconds");
    for (int s = 0; s < 4; s++) begin
      @(negedge clk) {cca_busy, nav_busy, tx_busy, rx_busy} = 4'b1000 >> s;
      #1 chk(!idle, "busy source");
      ticks(3); chk(idle_us == 0, "no count while busy");
      @(negedge clk) {cca_busy, nav_busy, tx_busy, rx_busy} = 0;
      ticks(s + 2); chk(idle_us == 16'(s + 2), "restarts after busy");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
