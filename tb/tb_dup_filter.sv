// tb_dup_filter: a retried MPDU with a cached (transmitter, sequence
// control) pair is a duplicate; a first transmission, a new sequence number
// or an unknown transmitter is not; more transmitters than entries evict
// the oldest in round-robin order.
module tb_dup_filter;
  logic clk = 0, rst_n = 0, retry = 0, update = 0, dup;
  logic [47:0] ta = 0;
  logic [15:0] sc = 0;
  int checks = 0, failures = 0;
  dup_filter #(.ENTRIES(4)) dut (.*);
  always #5 clk = ~clk;
  initial begin #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  task automatic chk(bit c, string s);
    checks++; if (!c) begin failures++; $display("FAIL %s at %0t", s, $time); end
  endtask
  task automatic rx(logic [47:0] t, logic [15:0] s, bit r, bit exp);
    @(negedge clk) ta = t; sc = s; retry = r;
    #1 chk(dup == exp, $sformatf("ta %h sc %h retry %0d", t, s, r));
    if (!dup) begin update = 1; @(negedge clk) update = 0; end
  endtask
  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    rx(48'hA1, 16'h0010, 0, 0);
    rx(48'hA1, 16'h0010, 1, 1);   // retry of the same MPDU
    rx(48'hA1, 16'h0010, 0, 0);   // same numbers without retry bit: accepted
    rx(48'hA1, 16'h0020, 1, 0);   // new sequence number
    rx(48'hA1, 16'h0020, 1, 1);
    rx(48'hA2, 16'h0020, 1, 0);   // other transmitter
    rx(48'hA2, 16'h0020, 1, 1);
    rx(48'hA3, 16'h0001, 0, 0);
    rx(48'hA4, 16'h0001, 0, 0);
    rx(48'hA1, 16'h0020, 1, 1);   // still cached (4 entries)
    rx(48'hA5, 16'h0001, 0, 0);   // evicts A1
    rx(48'hA1, 16'h0020, 1, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
