// deagg: A-MPDU de-aggregation at the front of the receive path. A PSDU
// marked as an A-MPDU (rx_ampdu) is read four octets at a time while
// looking for a delimiter: the CRC-8 over its first 16 bits must match its
// third octet and its fourth octet must be the signature 0x4E. A valid
// delimiter with a non-zero length releases that many MPDU octets; the pad
// octets that align the next subframe to 4 octets are skipped. An invalid
// delimiter is counted (delim_err) and the search goes on four octets
// later. A PSDU that is not an A-MPDU is passed on as one MPDU.
// Output: one byte per accepted input byte, with start (m_sop) and end
// (m_eop) marks; m_trunc marks an end forced by the PSDU ending early. The
// byte for a delimiter's fourth octet is checked in the cycle it arrives.
module deagg
  import mac_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic rx_valid,
  input  logic [7:0] rx_data,
  input  logic rx_last,
  input  logic rx_ampdu,
  output logic m_valid,
  output logic [7:0] m_data,
  output logic m_sop,
  output logic m_eop,
  output logic m_trunc,
  output logic delim_ok,
  output logic delim_err
);
  typedef enum logic [1:0] {S_DELIM, S_MPDU, S_PAD, S_SINGLE} st_e;
  st_e st;
  logic        first;        // next byte is the first of a PSDU
  logic [1:0]  bidx;
  logic [23:0] dsh;          // first three delimiter octets
  logic [13:0] rem;
  logic        msop;

  logic [15:0] dbits;
  logic [7:0]  dcrc;
  logic [13:0] dlen;
  logic        dvalid;
  assign dbits  = dsh[15:0];
  assign dlen   = {dbits[3:2], dbits[15:4]};
  assign dvalid = dcrc == dsh[23:16] && rx_data == DELIM_SIG;
  crc8 u_crc8 (.din(dbits), .crc(dcrc));

  st_e cur;
  assign cur = first ? (rx_ampdu ? S_DELIM : S_SINGLE) : st;

  always_comb begin
    m_valid = 1'b0; m_sop = 1'b0; m_eop = 1'b0; m_trunc = 1'b0; m_data = rx_data;
    delim_ok = 1'b0; delim_err = 1'b0;
    if (rx_valid) begin
      unique case (cur)
        S_SINGLE: begin
          m_valid = 1'b1; m_sop = first; m_eop = rx_last;
        end
        S_MPDU: begin
          m_valid = 1'b1; m_sop = msop;
          m_eop   = rem == 14'd1 || rx_last;
          m_trunc = rx_last && rem != 14'd1;
        end
        S_DELIM: if (!first && bidx == 2'd3) begin
          delim_ok  = dvalid && dlen != 0;
          delim_err = !dvalid;
        end
        default: ;
      endcase
    end
  end

  // pad octets after the current MPDU: (4 - len mod 4) mod 4
  logic [13:0] cur_len;
  logic [1:0]  dlen_pad;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) cur_len <= '0;
    else if (rx_valid && cur == S_DELIM && !first && bidx == 2'd3) cur_len <= dlen;
  assign dlen_pad = 2'(3'd4 - {1'b0, cur_len[1:0]});

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_DELIM; first <= 1'b1; bidx <= '0; dsh <= '0; rem <= '0; msop <= 1'b0;
    end else if (rx_valid) begin
      first <= rx_last;
      unique case (cur)
        S_SINGLE: st <= S_SINGLE;
        S_DELIM: begin
          dsh  <= {rx_data, dsh[23:8]};
          bidx <= first ? 2'd1 : bidx + 1'b1;
          st   <= S_DELIM;
          if (!first && bidx == 2'd3 && dvalid && dlen != 0) begin
            st <= S_MPDU; rem <= dlen; msop <= 1'b1;
          end
        end
        S_MPDU: begin
          msop <= 1'b0;
          rem  <= rem - 1'b1;
          if (rem == 14'd1) begin
            bidx <= dlen_pad;
            st   <= (dlen_pad == 2'd0) ? S_DELIM : S_PAD;
          end
        end
        S_PAD: begin
          bidx <= bidx - 1'b1;
          if (bidx == 2'd1) begin st <= S_DELIM; bidx <= 2'd0; end
        end
        default: st <= S_DELIM;
      endcase
      if (rx_last) begin st <= S_DELIM; bidx <= '0; end
    end
  end

endmodule
