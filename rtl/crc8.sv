// crc8: CRC-8 of an A-MPDU delimiter (x^8 + x^2 + x + 1), combinational.
// The 16 bits B0..B15 of the delimiter enter B0 first into a register preset
// to all ones; the result is complemented and placed so that its highest
// remainder bit is delimiter bit B16, as in IEEE 802.11. The same unit serves
// the Datapump (making delimiters) and the de-aggregator (checking them).
module crc8 (
  input  logic [15:0] din,
  output logic [7:0]  crc
);
  logic [7:0] r, c;
  always_comb begin
    r = 8'hFF;
    for (int i = 0; i < 16; i++)
      r = (r[7] ^ din[i]) ? ({r[6:0], 1'b0} ^ 8'h07) : {r[6:0], 1'b0};
    c = ~r;
    for (int i = 0; i < 8; i++) crc[i] = c[7-i];
  end
endmodule
