// mac_pkg: types and constants shared by the 802.11ac AP MAC hardware.
// Access categories are numbered by priority (BK lowest, VO highest). Frame
// buffers are numbered as the MpduGen hardware holds them. Timing constants
// are in microseconds: SIFS 16 us is the standard value; the 9 us slot
// follows from the AIFS values 79/61/43/34 us = SIFS + AIFSN x slot.
package mac_pkg;

  typedef enum logic [1:0] {AC_BK = 2'd0, AC_BE = 2'd1, AC_VI = 2'd2, AC_VO = 2'd3} ac_e;

  // Frame buffers of the MpduGen hardware. BUF_RESP is not a buffer: it is the
  // response frame generator of the Rx coordinator, selectable for user 0.
  typedef enum logic [3:0] {
    BUF_BCN = 4'd0, BUF_TX = 4'd1, BUF_PS = 4'd2, BUF_CTRL = 4'd3,
    BUF_AC_BK = 4'd4, BUF_AC_BE = 4'd5, BUF_AC_VI = 4'd6, BUF_AC_VO = 4'd7,
    BUF_RESP = 4'd8
  } buf_e;

  localparam int N_BUF      = 8;
  localparam int SIFS_US    = 16;
  localparam int SLOT_US    = 9;
  localparam int PIFS_US    = SIFS_US + SLOT_US;
  localparam logic [7:0] DELIM_SIG = 8'h4E;
  localparam logic [31:0] CRC32_RESIDUE = 32'hDEBB20E3;

  // Configuration held in the MIB registers.
  typedef struct packed {
    logic        mac_en;
    logic        ap_mode;
    logic        txop_share_en;
    logic        rts_en;
    logic        ampdu_en;
    logic        pm_doze;
    logic [47:0] mac_addr;
    logic [9:0]  cwmin;
    logic [9:0]  cwmax;
    logic [3:0]  retry_limit;
    logic [3:0][7:0]  aifs_us;     // indexed by ac_e
    logic [3:0][15:0] txop_us;     // indexed by ac_e, 0 = one exchange
    logic [3:0][3:0]  agg_num;     // MPDUs per A-MPDU, indexed by ac_e
    logic [15:0] beacon_int_tu;
    logic [7:0]  dtim_period;
    logic [9:0]  resp_timeout_us;
  } mac_cfg_t;

  // Header fields of a received MPDU, valid with its end.
  typedef struct packed {
    logic [1:0]  ftype;
    logic [3:0]  subtype;
    logic        retry;
    logic [15:0] duration;
    logic [47:0] addr1;
    logic [47:0] addr2;
    logic [15:0] seq_ctrl;
    logic [13:0] length;
  } rx_hdr_t;

  // 802.11 frame types
  localparam logic [1:0] FT_MGMT = 2'd0, FT_CTRL = 2'd1, FT_DATA = 2'd2;
  localparam logic [3:0] ST_RTS = 4'hB, ST_CTS = 4'hC, ST_ACK = 4'hD, ST_BA = 4'h9;

endpackage
