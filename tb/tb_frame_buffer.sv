// tb_frame_buffer: writes frames, commits and aborts, reads them back
// through the cursor (open/next), frees them, wraps the ring many times
// against a queue model, and forces an overflow.
module tb_frame_buffer;
  import tb_ref_pkg::*;
  localparam int DEPTH = 64, NDESC = 4;
  logic clk = 0, rst_n = 0;
  logic wr_en = 0, wr_commit = 0, wr_flag = 0, wr_abort = 0;
  logic [7:0] wr_data = 0;
  logic overflow;
  logic [$clog2(DEPTH):0] free_bytes;
  logic rd_open = 0, rd_next = 0, rd_pop = 0, rd_ready = 0;
  logic rd_valid, rd_last, rd_flag;
  logic [7:0] rd_data;
  logic [15:0] rd_len;
  logic [$clog2(NDESC):0] rd_avail, count;
  int checks = 0, failures = 0, ovf_seen = 0;
  frame_buffer #(.DEPTH(DEPTH), .NDESC(NDESC)) dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) if (rst_n && overflow) ovf_seen++;
  initial begin #2000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  bq_t model[$];
  task automatic chk(bit c, string s);
    checks++; if (!c) begin failures++; $display("FAIL %s at %0t", s, $time); end
  endtask
  task automatic put(bq_t f, bit flag, bit abort);
    foreach (f[i]) begin @(negedge clk) wr_en = 1; wr_data = f[i]; wr_commit = (i == f.size()-1) && !abort; wr_flag = flag; end
    @(negedge clk) wr_en = 0; wr_commit = 0;
    if (abort) begin wr_abort = 1; @(negedge clk) wr_abort = 0; end
  endtask
  task automatic read_cur(bq_t exp);
    bq_t got;
    chk(rd_len == 16'(exp.size()), "length");
    rd_ready = 1;
    while (rd_valid) begin
      got.push_back(rd_data);
      if (rd_last) chk(got.size() == exp.size(), "last flag");
      @(negedge clk);
    end
    rd_ready = 0;
    chk(got == exp, "contents");
  endtask
  task automatic pulse(ref logic s); @(negedge clk) s = 1; @(negedge clk) s = 0; endtask

  initial begin
    bq_t f;
    repeat (2) @(negedge clk); rst_n = 1;
    // two frames, one aborted in between
    f = {1,2,3,4,5}; put(f, 1, 0); model.push_back(f);
    f = {9,9,9}; put(f, 0, 1);
    f = {10,11,12,13,14,15,16}; put(f, 0, 0); model.push_back(f);
    chk(count == 2, "count after abort");
    pulse(rd_open); chk(rd_avail == 2, "avail"); chk(rd_flag == 1, "flag"); read_cur(model[0]);
    pulse(rd_next); chk(rd_avail == 1, "avail next"); read_cur(model[1]);
    // re-read the first frame (retry) then free both
    pulse(rd_open); read_cur(model[0]);
    pulse(rd_pop); void'(model.pop_front());
    chk(rd_flag == 0, "flag follows the oldest frame");
    pulse(rd_pop); void'(model.pop_front());
    chk(count == 0 && free_bytes == DEPTH, "empty");
    // wrap the ring with random frames
    for (int t = 0; t < 40; t++) begin
      f = {};
      repeat ($urandom_range(1, 20)) f.push_back(8'($urandom));
      put(f, 0, 0); model.push_back(f);
      pulse(rd_open); read_cur(model[0]);
      pulse(rd_pop); void'(model.pop_front());
    end
    chk(count == 0, "empty after wrap");
    // overflow: a frame larger than the ring is dropped, the next fits
    f = {}; repeat (DEPTH + 3) f.push_back(8'h5A); put(f, 0, 0); @(negedge clk);
    chk(ovf_seen == 1, "overflow reported"); chk(count == 0, "oversize dropped");
    f = {7,7}; put(f, 0, 0); chk(count == 1, "after overflow");
    pulse(rd_open); read_cur(f);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
