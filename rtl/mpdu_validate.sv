// mpdu_validate: checks each MPDU from the de-aggregator. The CRC-32 unit
// runs over every octet including the FCS; the MPDU is error-free when the
// register ends at the CRC-32 residue. Meanwhile the MAC header is picked
// apart by octet position: frame control (type, subtype, retry bit),
// duration, address 1 (receiver), address 2 (transmitter) and sequence
// control. Addresses keep their first octet in bits [7:0]. The result comes
// with v_done one clock after the MPDU's last octet: fcs_ok, for_us
// (address 1 is this MAC or a group address, this design's filter rule) and
// the header. A truncated MPDU is reported with fcs_ok low.
module mpdu_validate
  import mac_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic [47:0] mac_addr,
  input  logic m_valid,
  input  logic [7:0] m_data,
  input  logic m_sop,
  input  logic m_eop,
  input  logic m_trunc,
  output logic v_done,
  output logic fcs_ok,
  output logic for_us,
  output rx_hdr_t hdr
);
  logic [31:0] crc, fcs;
  logic [13:0] idx;
  logic        trunc_d;
  rx_hdr_t     h;

  crc32 u_crc32 (.clk, .rst_n, .init(v_done), .en(m_valid),
                 .din(m_data), .crc(crc), .fcs(fcs));

  // The CRC register must start from all ones at each MPDU: it is restarted
  // by the end of the previous MPDU (and by reset).
  logic [13:0] pos;
  assign pos = m_sop ? 14'd0 : idx;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      idx <= '0; v_done <= 1'b0; trunc_d <= 1'b0; h <= '0;
    end else begin
      v_done <= 1'b0;
      if (m_valid) begin
        idx <= pos + 1'b1;
        unique case (pos)
          14'd0: begin h.ftype <= m_data[3:2]; h.subtype <= m_data[7:4]; end
          14'd1: h.retry <= m_data[3];
          14'd2: h.duration[7:0]  <= m_data;
          14'd3: h.duration[15:8] <= m_data;
          14'd4, 14'd5, 14'd6, 14'd7, 14'd8, 14'd9:
                 h.addr1[8*(pos-14'd4) +: 8] <= m_data;
          14'd10, 14'd11, 14'd12, 14'd13, 14'd14, 14'd15:
                 h.addr2[8*(pos-14'd10) +: 8] <= m_data;
          14'd22: h.seq_ctrl[7:0]  <= m_data;
          14'd23: h.seq_ctrl[15:8] <= m_data;
          default: ;
        endcase
        if (m_sop) begin
          h.addr2 <= '0; h.seq_ctrl <= '0; h.retry <= 1'b0;
        end
        if (m_eop) begin
          v_done  <= 1'b1;
          trunc_d <= m_trunc;
          h.length <= pos + 1'b1;
        end
      end
    end
  end

  assign hdr    = h;
  assign fcs_ok = crc == CRC32_RESIDUE && !trunc_d && h.length >= 14'd14;
  assign for_us = h.addr1 == mac_addr || h.addr1[0];
endmodule
