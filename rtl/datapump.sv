// datapump: one user's transmit data path. On start it reads up to n_mpdu
// frames from the selected frame buffer and sends them to the PHY as a byte
// stream: a single MPDU (frame + FCS) or, with ampdu set, an A-MPDU in which
// every MPDU is preceded by a 4-octet delimiter and all but the last are
// padded to a multiple of 4 octets. The delimiter carries the MPDU length
// (B2..B15, two high bits first as in 802.11ac), a CRC-8 over B0..B15 and
// the signature 0x4E. The CRC units are outside, as in the transmit block
// diagram: crc_* drives the CRC-32 unit, dl_* the CRC-8 unit.
// Frames are read, not freed: the Tx coordinator frees them after the
// exchange succeeded. Throughput is one byte per clock while tx_ready holds.
// n_sent reports how many MPDUs went out; done pulses one clock after the
// last byte. At most 15 MPDUs per A-MPDU (width of n_mpdu).
module datapump (
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  input  logic [3:0] n_mpdu,
  input  logic ampdu,
  output logic busy,
  output logic done,
  output logic [3:0] n_sent,
  // frame source (frame_buffer read port)
  output logic src_open,
  output logic src_next,
  output logic src_ready,
  input  logic src_valid,
  input  logic [7:0] src_data,
  input  logic src_last,
  input  logic [15:0] src_len,
  input  logic [4:0] src_avail,
  // CRC units
  output logic crc_init,
  output logic crc_en,
  output logic [7:0] crc_din,
  input  logic [31:0] crc_fcs,
  output logic [15:0] dl_bits,
  input  logic [7:0] dl_crc,
  // PSDU to the PHY
  output logic tx_valid,
  output logic [7:0] tx_data,
  output logic tx_last,
  input  logic tx_ready
);
  localparam logic [7:0] DELIM_SIG_C = 8'h4E;
  typedef enum logic [2:0] {S_IDLE, S_LOAD, S_DELIM, S_DATA, S_FCS, S_PAD, S_NEXT} st_e;
  st_e st;
  logic [3:0]  total, cnt;
  logic [1:0]  bidx;
  logic        agg;
  logic [13:0] mlen;
  logic        lastsub;

  assign mlen    = 14'(src_len + 16'd4);
  assign lastsub = (cnt + 4'd1) == total;
  assign dl_bits = {mlen[11:0], mlen[13:12], 1'b0, 1'b0};
  assign busy    = st != S_IDLE;
  assign n_sent  = cnt;

  logic [1:0] padn;
  assign padn = 2'(3'd4 - {1'b0, mlen[1:0]});

  always_comb begin
    tx_valid = 1'b0; tx_data = '0; tx_last = 1'b0; src_ready = 1'b0;
    crc_en = 1'b0; crc_din = src_data;
    unique case (st)
      S_DELIM: begin
        tx_valid = 1'b1;
        unique case (bidx)
          2'd0: tx_data = dl_bits[7:0];
          2'd1: tx_data = dl_bits[15:8];
          2'd2: tx_data = dl_crc;
          default: tx_data = DELIM_SIG_C;
        endcase
      end
      S_DATA: begin
        tx_valid  = src_valid;
        tx_data   = src_data;
        src_ready = tx_ready;
        crc_en    = src_valid && tx_ready;
      end
      S_FCS: begin
        tx_valid = 1'b1;
        tx_data  = crc_fcs[8*bidx +: 8];
        tx_last  = bidx == 2'd3 && lastsub;
      end
      S_PAD: begin
        tx_valid = 1'b1;
        tx_data  = 8'h00;
      end
      default: ;
    endcase
  end

  assign src_open = start && st == S_IDLE;
  assign src_next = st == S_NEXT;
  assign crc_init = st == S_LOAD || st == S_NEXT;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE; total <= '0; cnt <= '0; bidx <= '0; agg <= 1'b0; done <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (st)
        S_IDLE: if (start) begin
          st    <= S_LOAD;
          cnt   <= '0;
          agg   <= ampdu;
          total <= (!ampdu || n_mpdu == 0) ? 4'd1 : n_mpdu;
        end
        S_LOAD: begin
          if ({1'b0, total} > src_avail) total <= src_avail[3:0];
          if (src_avail == 0) begin st <= S_IDLE; done <= 1'b1; end
          else begin st <= agg ? S_DELIM : S_DATA; bidx <= '0; end
        end
        S_DELIM: if (tx_ready) begin
          bidx <= bidx + 1'b1;
          if (bidx == 2'd3) st <= S_DATA;
        end
        S_DATA: if (src_valid && tx_ready && src_last) begin
          st <= S_FCS; bidx <= '0;
        end
        S_FCS: if (tx_ready) begin
          bidx <= bidx + 1'b1;
          if (bidx == 2'd3) begin
            if (lastsub) begin
              st <= S_IDLE; done <= 1'b1; cnt <= cnt + 1'b1;
            end else if (agg && mlen[1:0] != 2'd0) begin
              st <= S_PAD; bidx <= padn - 2'd1;
            end else begin
              st <= S_NEXT; cnt <= cnt + 1'b1;
            end
          end
        end
        S_PAD: if (tx_ready) begin
          bidx <= bidx - 1'b1;
          if (bidx == 2'd0) begin st <= S_NEXT; cnt <= cnt + 1'b1; end
        end
        S_NEXT: begin
          st <= agg ? S_DELIM : S_DATA; bidx <= '0;
        end
        default: st <= S_IDLE;
      endcase
    end
  end
endmodule
