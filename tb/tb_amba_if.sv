// tb_amba_if: APB writes and reads through the bridge to a small register
// array; each access gives exactly one bus strobe, in the access phase,
// and no strobe in the setup phase; read data returns with pready.
module tb_amba_if;
  logic pclk = 0, presetn = 0, psel = 0, penable = 0, pwrite = 0, pready, pslverr, bus_wr, bus_rd;
  logic [7:0] paddr = 0, bus_addr;
  logic [31:0] pwdata = 0, prdata, bus_wdata, bus_rdata;
  logic [31:0] regs [64];
  int checks = 0, failures = 0, n_wr = 0, n_rd = 0;
  amba_if dut (.*);
  always #5 pclk = ~pclk;
  assign bus_rdata = regs[bus_addr[7:2]];
  always @(posedge pclk) begin
    if (bus_wr) begin regs[bus_addr[7:2]] <= bus_wdata; n_wr++; end
    if (bus_rd) n_rd++;
  end
  initial begin #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  task automatic chk(bit c, string s);
    checks++; if (!c) begin failures++; $display("FAIL %s at %0t", s, $time); end
  endtask
  task automatic apb_wr(logic [7:0] a, logic [31:0] d);
    @(negedge pclk) psel = 1; penable = 0; pwrite = 1; paddr = a; pwdata = d;
    #1 chk(!bus_wr && !bus_rd, "no strobe in setup phase");
    @(negedge pclk) penable = 1; #1 chk(bus_wr && pready, "write strobe in access phase");
    @(negedge pclk) psel = 0; penable = 0;
  endtask
  task automatic apb_rd(logic [7:0] a, output logic [31:0] d);
    @(negedge pclk) psel = 1; penable = 0; pwrite = 0; paddr = a;
    @(negedge pclk) penable = 1; #1 chk(bus_rd && pready, "read strobe"); d = prdata;
    @(negedge pclk) psel = 0; penable = 0;
  endtask
  initial begin
    logic [31:0] d;
    logic [31:0] ref_m [16];
    repeat (2) @(negedge pclk); presetn = 1;
    for (int i = 0; i < 16; i++) begin ref_m[i] = $urandom; apb_wr(8'(i * 4), ref_m[i]); end
    for (int i = 0; i < 16; i++) begin apb_rd(8'(i * 4), d); chk(d == ref_m[i], "read back"); end
    chk(n_wr == 16 && n_rd == 16, "one strobe per access");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
