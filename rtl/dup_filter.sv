// dup_filter: duplicate detection for received MPDUs. A small cache holds
// the (transmitter address, sequence control) pairs of the MPDUs accepted
// most recently. A check (ta, sc, retry) answers combinationally: dup is set
// when the MPDU is a retransmission (retry bit) and its pair is cached.
// update stores the pair of an accepted MPDU in the next entry in
// round-robin order, unless it is cached already. ENTRIES and the
// replacement rule are this design's choice.
module dup_filter #(
  parameter int ENTRIES = 16
) (
  input  logic clk,
  input  logic rst_n,
  input  logic [47:0] ta,
  input  logic [15:0] sc,
  input  logic retry,
  output logic dup,
  input  logic update
);
  logic [ENTRIES-1:0]         vld;
  logic [47:0]                e_ta [ENTRIES];
  logic [15:0]                e_sc [ENTRIES];
  logic [$clog2(ENTRIES)-1:0] rr;
  logic                       hit;

  always_comb begin
    hit = 1'b0;
    for (int i = 0; i < ENTRIES; i++)
      if (vld[i] && e_ta[i] == ta && e_sc[i] == sc) hit = 1'b1;
  end
  assign dup = retry && hit;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      vld <= '0; rr <= '0;
    end else if (update && !hit) begin
      vld[rr] <= 1'b1; rr <= rr + 1'b1;
    end
  end
  always_ff @(posedge clk)
    if (update && !hit) begin e_ta[rr] <= ta; e_sc[rr] <= sc; end
endmodule
