// mac_timer: protocol time base of the MAC hardware. It divides the clock
// into a one-microsecond tick (CLK_MHZ clocks), runs the 64-bit time
// synchronisation function (TSF) counter, raises tbtt once per beacon
// interval (beacon_int_tu x 1024 us; the first one beacon_int after reset)
// and keeps the network allocation vector: nav_set loads a duration in us
// if it is longer than what is left, and nav_busy holds until it has run
// out. Slot, IFS and timeout counters live in the blocks that use them and
// count this tick.
module mac_timer #(
  parameter int CLK_MHZ = 320
) (
  input  logic clk,
  input  logic rst_n,
  input  logic [15:0] beacon_int_tu,
  input  logic nav_set,
  input  logic [15:0] nav_us,
  output logic us_tick,
  output logic [63:0] tsf,
  output logic tbtt,
  output logic nav_busy,
  output logic [15:0] nav_left
);
  localparam int DW = (CLK_MHZ > 1) ? $clog2(CLK_MHZ) : 1;
  logic [DW-1:0] div;
  logic [25:0]   bcn_left;   // microseconds to the next TBTT

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      div <= '0; us_tick <= 1'b0; tsf <= '0; tbtt <= 1'b0;
      bcn_left <= '0; nav_left <= '0;
    end else begin
      us_tick <= 1'b0;
      tbtt    <= 1'b0;
      if (div == DW'(CLK_MHZ - 1)) begin
        div <= '0; us_tick <= 1'b1;
      end else begin
        div <= div + 1'b1;
      end
      if (us_tick) begin
        tsf <= tsf + 1'b1;
        if (bcn_left <= 26'd1) begin
          bcn_left <= {beacon_int_tu, 10'd0};
          tbtt     <= bcn_left == 26'd1;
        end else begin
          bcn_left <= bcn_left - 1'b1;
        end
      end
      if (nav_set && nav_us > nav_left)  nav_left <= nav_us;
      else if (us_tick && nav_left != 0) nav_left <= nav_left - 1'b1;
    end
  end
  assign nav_busy = nav_left != 0;
endmodule
