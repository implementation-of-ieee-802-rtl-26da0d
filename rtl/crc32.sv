// crc32: byte-serial IEEE 802 CRC-32, used as the MPDU frame check sequence.
// One byte per clock, which is what one Datapump needs at 320 MHz for a
// 2.34 Gbps PHY rate. Reflected form (polynomial 0xEDB88320), preset to all
// ones; the FCS is the complement of the register, sent low byte first.
// Running the register over an MPDU including its FCS leaves CRC32_RESIDUE.
// Interface: init restarts the register (takes priority), en absorbs din.
// crc shows the register, fcs its complement; both update one clock after en.
module crc32 (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        init,
  input  logic        en,
  input  logic [7:0]  din,
  output logic [31:0] crc,
  output logic [31:0] fcs
);
  function automatic logic [31:0] step(input logic [31:0] c, input logic [7:0] d);
    logic [31:0] r;
    r = c;
    for (int i = 0; i < 8; i++)
      r = (r[0] ^ d[i]) ? ((r >> 1) ^ 32'hEDB88320) : (r >> 1);
    return r;
  endfunction

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)    crc <= '1;
    else if (init) crc <= '1;
    else if (en)   crc <= step(crc, din);

  assign fcs = ~crc;
endmodule
