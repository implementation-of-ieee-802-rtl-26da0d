// chan_monitor: channel state monitor of the protocol controller. The medium
// is busy while the PHY reports energy (cca_busy), the NAV runs, this MAC
// transmits or a reception is in progress. idle_us counts the microseconds
// since the medium last became idle (saturating), which the backoff units
// compare with their AIFS and slot times. Which signals make the medium busy
// is this design's choice.
module chan_monitor (
  input  logic clk,
  input  logic rst_n,
  input  logic us_tick,
  input  logic cca_busy,
  input  logic nav_busy,
  input  logic tx_busy,
  input  logic rx_busy,
  output logic idle,
  output logic [15:0] idle_us
);
  assign idle = !(cca_busy || nav_busy || tx_busy || rx_busy);
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)                           idle_us <= '0;
    else if (!idle)                       idle_us <= '0;
    else if (us_tick && idle_us != '1)    idle_us <= idle_us + 1'b1;
endmodule
