// tb_crc8: every delimiter bit pattern of a sample of lengths and random
// 16-bit inputs against the long-division reference.
module tb_crc8;
  import tb_ref_pkg::*;
  logic [15:0] din;
  logic [7:0] crc;
  int checks = 0, failures = 0;
  crc8 dut (.*);
  initial begin #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    for (int i = 0; i < 600; i++) begin
      din = (i < 100) ? 16'(i) : 16'($urandom);
      #1;
      checks++;
      if (crc !== crc8_ref(din)) begin failures++; $display("FAIL %h: %h vs %h", din, crc, crc8_ref(din)); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
