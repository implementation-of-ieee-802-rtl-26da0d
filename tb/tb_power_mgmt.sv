// tb_power_mgmt: RF stays on without doze; with doze it is on only while
// busy, while frames wait, or from TBTT to the beacon; power-save frames
// are released after every DTIM beacon (DTIM period 3) until the
// power-save buffer runs empty.
module tb_power_mgmt;
  logic clk = 0, rst_n = 0, doze_en = 0, tbtt = 0, beacon_sent = 0, busy = 0, pending = 0, ps_empty = 0;
  logic [7:0] dtim_period = 8'd3, dtim_cnt;
  logic rf_on, ps_release;
  int checks = 0, failures = 0;
  power_mgmt dut (.*);
  always #5 clk = ~clk;
  initial begin #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  task automatic chk(bit c, string s);
    checks++; if (!c) begin failures++; $display("FAIL %s at %0t", s, $time); end
  endtask
  task automatic pulse(ref logic s); @(negedge clk) s = 1; @(negedge clk) s = 0; endtask
  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    @(negedge clk) chk(rf_on, "RF on without doze");
    doze_en = 1; #1 chk(!rf_on, "RF off when dozing and idle");
    busy = 1; #1 chk(rf_on, "RF on while busy"); busy = 0;
    pending = 1; #1 chk(rf_on, "RF on while frames wait"); pending = 0;
    pulse(tbtt); chk(rf_on, "RF on from TBTT");
    pulse(beacon_sent); chk(!rf_on, "RF off after beacon");
    chk(ps_release && dtim_cnt == 2, "first beacon is a DTIM beacon");
    @(negedge clk) ps_empty = 1; @(negedge clk) ps_empty = 0;
    chk(!ps_release, "release ends when PS buffer empty");
    pulse(beacon_sent); chk(!ps_release && dtim_cnt == 1, "beacon 2");
    pulse(beacon_sent); chk(!ps_release && dtim_cnt == 0, "beacon 3");
    pulse(beacon_sent); chk(ps_release && dtim_cnt == 2, "DTIM beacon again");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
