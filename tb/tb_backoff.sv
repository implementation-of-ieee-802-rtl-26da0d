// tb_backoff: EDCA backoff of one access category with the AC_BE AIFS of
// 61 us. Checks: a frame on an idle medium is allowed after AIFS without
// backoff; after a failure CW doubles (31, 63, ... capped at 1023) and the
// wait is AIFS plus the drawn number of 9 us slots; a busy medium freezes
// the count; the retry limit resets CW; success returns CW to CWmin.
module tb_backoff;
  logic clk = 0, rst_n = 0, us_tick = 0, idle = 1, pending = 0, tx_success = 0, tx_fail = 0;
  logic [15:0] idle_us = 0;
  logic [7:0] aifs_us = 8'd61;
  logic [9:0] cwmin = 10'd31, cwmax = 10'd1023, cw, bo_cnt;
  logic [3:0] retry_limit = 4'd7, retry_cnt;
  logic ready, retry_last;
  int checks = 0, failures = 0, us = 0;
  backoff dut (.*);
  always #5 clk = ~clk;
  initial begin #400000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  // tick every 2 clocks; idle time as a channel monitor would count it
  always @(posedge clk) begin
    us_tick <= !us_tick;
    if (!idle) idle_us <= 0; else if (us_tick && idle_us != 16'hFFFF) idle_us <= idle_us + 1;
  end
  always @(posedge clk) if (us_tick) us++;
  task automatic chk(bit c, string s);
    checks++; if (!c) begin failures++; $display("FAIL %s at %0t", s, $time); end
  endtask
  task automatic wait_ready(output int waited);
    int t0 = us;
    while (!ready) @(negedge clk);
    waited = us - t0;
  endtask
  task automatic busy_then_idle(int n);
    @(negedge clk) idle = 0; repeat (n) @(negedge clk); idle = 1;
  endtask
  task automatic pulse_fail(); @(negedge clk) tx_fail = 1; @(negedge clk) tx_fail = 0; endtask

  initial begin
    int w, exp_cw, bo;
    repeat (2) @(negedge clk); rst_n = 1;
    busy_then_idle(4);
    @(negedge clk) pending = 1;
    wait_ready(w); chk(w >= 60 && w <= 62, $sformatf("AIFS only, waited %0d", w));
    chk(bo_cnt == 0 && cw == 31, "no backoff drawn");
    exp_cw = 31;
    for (int r = 0; r < 6; r++) begin
      chk(!retry_last, "not yet at retry limit");
      pulse_fail();
      exp_cw = (exp_cw * 2 + 1 > 1023) ? 1023 : exp_cw * 2 + 1;
      chk(cw == 10'(exp_cw), $sformatf("CW after failure %0d = %0d", r + 1, cw));
      chk(bo_cnt <= cw && retry_cnt == 4'(r + 1), "backoff within CW");
      bo = int'(bo_cnt);
      busy_then_idle(6);
      if (r == 1 && bo > 2) begin
        // freeze: busy in the middle of the countdown
        wait (bo_cnt == 10'(bo - 2)); @(negedge clk);
        busy_then_idle(40);
        chk(bo_cnt == 10'(bo - 2), "count frozen while busy");
        wait_ready(w);
        chk(w >= 61 + 9 * (bo - 2) - 1 && w <= 61 + 9 * (bo - 2) + 2, "resume after AIFS");
      end else begin
        wait_ready(w);
        chk(w >= 61 + 9 * bo - 1 && w <= 61 + 9 * bo + 2, $sformatf("AIFS + %0d slots, waited %0d", bo, w));
      end
    end
    chk(retry_last, "retry limit reached");
    pulse_fail();
    chk(cw == cwmin && retry_cnt == 0, "reset after retry limit");
    pulse_fail(); chk(cw == 63, "doubling again");
    @(negedge clk) tx_success = 1; @(negedge clk) tx_success = 0;
    chk(cw == cwmin && retry_cnt == 0 && bo_cnt <= 31, "success resets CW");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
