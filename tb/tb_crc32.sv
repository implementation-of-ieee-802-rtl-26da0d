// tb_crc32: known CRC-32 check values ("123456789", "a", "abc"), random
// messages against the table-driven reference, and the residue after a
// message followed by its own FCS.
module tb_crc32;
  import tb_ref_pkg::*;
  logic clk = 0, rst_n = 0, init = 0, en = 0;
  logic [7:0] din = 0;
  logic [31:0] crc, fcs;
  int checks = 0, failures = 0;
  crc32 dut (.*);
  always #5 clk = ~clk;
  initial begin #200000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  task automatic run(bq_t d);
    @(negedge clk) init = 1; en = 0;
    @(negedge clk) init = 0;
    foreach (d[i]) begin en = 1; din = d[i]; @(negedge clk); end
    en = 0;
  endtask
  task automatic chk(logic [31:0] got, logic [31:0] exp, string what);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %h exp %h", what, got, exp); end
  endtask

  initial begin
    bq_t d;
    repeat (2) @(negedge clk); rst_n = 1;
    d = {"1","2","3","4","5","6","7","8","9"}; run(d); chk(fcs, 32'hCBF43926, "123456789");
    d = {"a"}; run(d); chk(fcs, 32'hE8B7BE43, "a");
    d = {"a","b","c"}; run(d); chk(fcs, 32'h352441C2, "abc");
    d = {}; run(d); chk(fcs, 32'h0, "empty");
    for (int t = 0; t < 20; t++) begin
      d = {};
      repeat ($urandom_range(1, 60)) d.push_back(8'($urandom));
      run(d); chk(fcs, crc32_ref(d), "random");
      run(add_fcs(d)); chk(crc, 32'hDEBB20E3, "residue");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
