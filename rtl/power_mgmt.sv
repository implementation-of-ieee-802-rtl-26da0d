// power_mgmt: power management unit of the MLME hardware. It keeps the RF
// on (rf_on) unless dozing is allowed and nothing needs the radio: the
// radio stays on while the MAC transmits or receives, while frames are
// queued, and from TBTT until the beacon has gone out. It also counts
// beacons towards the DTIM: after a DTIM beacon (counter 0) frames held for
// power-saving stations are released (ps_release) until the power-save
// buffer is empty. The rules are this design's reading of the unit's role.
module power_mgmt (
  input  logic clk,
  input  logic rst_n,
  input  logic doze_en,
  input  logic [7:0] dtim_period,
  input  logic tbtt,
  input  logic beacon_sent,
  input  logic busy,
  input  logic pending,
  input  logic ps_empty,
  output logic rf_on,
  output logic ps_release,
  output logic [7:0] dtim_cnt
);
  logic awake;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      awake <= 1'b0; ps_release <= 1'b0; dtim_cnt <= '0;
    end else begin
      if (tbtt) awake <= 1'b1;
      if (beacon_sent) begin
        awake <= 1'b0;
        if (dtim_cnt == 0) begin
          ps_release <= 1'b1;
          dtim_cnt   <= (dtim_period == 0) ? 8'd0 : dtim_period - 1'b1;
        end else begin
          dtim_cnt <= dtim_cnt - 1'b1;
        end
      end else if (ps_empty) begin
        ps_release <= 1'b0;
      end
    end
  end
  assign rf_on = !doze_en || busy || pending || awake;
endmodule
