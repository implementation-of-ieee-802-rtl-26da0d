// amba_if: bridge from the processor's AMBA APB bus to the register bus of
// the MAC hardware. An APB access (setup phase with psel, access phase with
// psel and penable) becomes a one-clock bus_wr or bus_rd strobe in the
// access phase; reads return bus_rdata in that same cycle, so the bridge
// never inserts wait states (pready is always 1) and a read with side
// effects happens exactly once. The choice of APB is this design's.
module amba_if (
  input  logic        pclk,
  input  logic        presetn,
  input  logic        psel,
  input  logic        penable,
  input  logic        pwrite,
  input  logic [7:0]  paddr,
  input  logic [31:0] pwdata,
  output logic [31:0] prdata,
  output logic        pready,
  output logic        pslverr,
  output logic [7:0]  bus_addr,
  output logic        bus_wr,
  output logic        bus_rd,
  output logic [31:0] bus_wdata,
  input  logic [31:0] bus_rdata
);
  logic access;
  assign access    = psel && penable;
  assign bus_addr  = paddr;
  assign bus_wdata = pwdata;
  assign bus_wr    = access && pwrite;
  assign bus_rd    = access && !pwrite;
  assign prdata    = bus_rd ? bus_rdata : 32'd0;
  assign pready    = 1'b1;
  assign pslverr   = 1'b0;

  // APB rule: an access phase follows a setup phase with the same psel.
  logic setup_seen;
  always_ff @(posedge pclk or negedge presetn)
    if (!presetn) setup_seen <= 1'b0;
    else          setup_seen <= psel && !penable;
  a_apb_setup: assert property (@(posedge pclk) disable iff (!presetn)
                                (psel && penable) |-> setup_seen);
endmodule
