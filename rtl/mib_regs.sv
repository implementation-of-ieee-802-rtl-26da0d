// mib_regs: MIB register file of the MLME hardware, on the register bus
// from the AMBA bridge. It holds the MAC configuration (modes, own address,
// EDCA parameters per access category, TXOP limits, aggregation sizes,
// beacon and DTIM period, response timeout), the interrupt status/mask
// pair behind the MAC interrupt line, the window through which the software
// writes frames into the transmit buffers byte by byte, and the window
// through which it reads received frames out of the Rx buffer.
// Reset values are the EDCA parameters of the evaluated network: AIFS
// 79/61/43/34 us and TXOP limits 0/0/3008/1504 us for BK/BE/VI/VO, CWmin 31,
// CWmax 1023, retry limit 7. The register map is this design's.
//   0x00 CTRL      [0] mac_en [1] ap_mode [2] txop_share_en [3] rts_en
//                  [4] ampdu_en [5] pm_doze
//   0x04 ADDR_LO   own address octets 0..3   0x08 ADDR_HI octets 4..5
//   0x0C CW        [9:0] cwmin [25:16] cwmax
//   0x10 RETRY     [3:0] retry limit [25:16] response timeout (us)
//   0x14 AIFS      one octet per AC, BK in [7:0] .. VO in [31:24] (us)
//   0x18 TXOP_BKBE [15:0] BK [31:16] BE     0x1C TXOP_VIVO [15:0] VI [31:16] VO
//   0x20 BEACON    [15:0] beacon interval (TU) [23:16] DTIM period
//   0x24 AGG       four bits per AC, MPDUs per A-MPDU
//   0x28 INT_STAT  write 1 to clear: [0] tx success [1] frame dropped
//                  [2] frame received [3] TBTT [4] buffer overflow
//   0x2C INT_MASK
//   0x30 BUF_SEL   transmit buffer number (0 beacon, 1 Tx, 2 PS, 3 control,
//                  4..7 AC_BK..AC_VO)
//   0x34 BUF_DATA  write: one octet into the selected buffer
//   0x38 BUF_COMMIT write: close the frame, [0] more fragments
//   0x3C BUF_STAT  read: [4:0] frames queued [28:16] free octets
//   0x40 RX_DATA   read: [7:0] octet [8] valid [9] last, then advances
//   0x44 RX_CTRL   read: [4:0] frames, [31:16] length of the frame under the
//                  read cursor (write open first); write [0] open [1] pop
//   0x48 TSF_LO    0x4C TSF_HI
module mib_regs
  import mac_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic [7:0]  bus_addr,
  input  logic        bus_wr,
  input  logic        bus_rd,
  input  logic [31:0] bus_wdata,
  output logic [31:0] bus_rdata,
  output mac_cfg_t    cfg,
  // transmit buffers
  output logic [2:0]  buf_sel,
  output logic        buf_wr,
  output logic [7:0]  buf_data,
  output logic        buf_commit,
  output logic        buf_flag,
  input  logic [N_BUF-1:0][4:0]  buf_count,
  input  logic [N_BUF-1:0][12:0] buf_free,
  // Rx buffer
  output logic        rx_open,
  output logic        rx_ready,
  output logic        rx_pop,
  input  logic        rx_valid,
  input  logic [7:0]  rx_data,
  input  logic        rx_last,
  input  logic [15:0] rx_len,
  input  logic [4:0]  rx_count,
  // status
  input  logic [63:0] tsf,
  input  logic [4:0]  int_src,
  output logic        mac_int
);
  logic [4:0] int_stat, int_mask;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cfg.mac_en <= 1'b1; cfg.ap_mode <= 1'b1; cfg.txop_share_en <= 1'b1;
      cfg.rts_en <= 1'b0; cfg.ampdu_en <= 1'b1; cfg.pm_doze <= 1'b0;
      cfg.mac_addr <= 48'h00_00_00_00_00_02;
      cfg.cwmin <= 10'd31; cfg.cwmax <= 10'd1023; cfg.retry_limit <= 4'd7;
      cfg.resp_timeout_us <= 10'd50;
      cfg.aifs_us <= {8'd34, 8'd43, 8'd61, 8'd79};
      cfg.txop_us <= {16'd1504, 16'd3008, 16'd0, 16'd0};
      cfg.agg_num <= {4'd4, 4'd4, 4'd4, 4'd4};
      cfg.beacon_int_tu <= 16'd100; cfg.dtim_period <= 8'd1;
      int_stat <= '0; int_mask <= '0; buf_sel <= '0;
    end else begin
      int_stat <= int_stat | int_src;
      if (bus_wr) begin
        unique case (bus_addr)
          8'h00: {cfg.pm_doze, cfg.ampdu_en, cfg.rts_en, cfg.txop_share_en, cfg.ap_mode, cfg.mac_en} <= bus_wdata[5:0];
          8'h04: cfg.mac_addr[31:0]  <= bus_wdata;
          8'h08: cfg.mac_addr[47:32] <= bus_wdata[15:0];
          8'h0C: begin cfg.cwmin <= bus_wdata[9:0]; cfg.cwmax <= bus_wdata[25:16]; end
          8'h10: begin cfg.retry_limit <= bus_wdata[3:0]; cfg.resp_timeout_us <= bus_wdata[25:16]; end
          8'h14: cfg.aifs_us <= bus_wdata;
          8'h18: begin cfg.txop_us[0] <= bus_wdata[15:0]; cfg.txop_us[1] <= bus_wdata[31:16]; end
          8'h1C: begin cfg.txop_us[2] <= bus_wdata[15:0]; cfg.txop_us[3] <= bus_wdata[31:16]; end
          8'h20: begin cfg.beacon_int_tu <= bus_wdata[15:0]; cfg.dtim_period <= bus_wdata[23:16]; end
          8'h24: cfg.agg_num <= bus_wdata[15:0];
          8'h28: int_stat <= (int_stat & ~bus_wdata[4:0]) | int_src;
          8'h2C: int_mask <= bus_wdata[4:0];
          8'h30: buf_sel <= bus_wdata[2:0];
          default: ;
        endcase
      end
    end
  end

  assign buf_wr     = bus_wr && bus_addr == 8'h34;
  assign buf_data   = bus_wdata[7:0];
  assign buf_commit = bus_wr && bus_addr == 8'h38;
  assign buf_flag   = bus_wdata[0];
  assign rx_open    = bus_wr && bus_addr == 8'h44 && bus_wdata[0];
  assign rx_pop     = bus_wr && bus_addr == 8'h44 && bus_wdata[1];
  assign rx_ready   = bus_rd && bus_addr == 8'h40;
  assign mac_int    = |(int_stat & int_mask);

  always_comb begin
    unique case (bus_addr)
      8'h00: bus_rdata = {26'd0, cfg.pm_doze, cfg.ampdu_en, cfg.rts_en, cfg.txop_share_en, cfg.ap_mode, cfg.mac_en};
      8'h04: bus_rdata = cfg.mac_addr[31:0];
      8'h08: bus_rdata = {16'd0, cfg.mac_addr[47:32]};
      8'h0C: bus_rdata = {6'd0, cfg.cwmax, 6'd0, cfg.cwmin};
      8'h10: bus_rdata = {6'd0, cfg.resp_timeout_us, 12'd0, cfg.retry_limit};
      8'h14: bus_rdata = cfg.aifs_us;
      8'h18: bus_rdata = {cfg.txop_us[1], cfg.txop_us[0]};
      8'h1C: bus_rdata = {cfg.txop_us[3], cfg.txop_us[2]};
      8'h20: bus_rdata = {8'd0, cfg.dtim_period, cfg.beacon_int_tu};
      8'h24: bus_rdata = {16'd0, cfg.agg_num};
      8'h28: bus_rdata = {27'd0, int_stat};
      8'h2C: bus_rdata = {27'd0, int_mask};
      8'h30: bus_rdata = {29'd0, buf_sel};
      8'h3C: bus_rdata = {3'd0, buf_free[buf_sel], 11'd0, buf_count[buf_sel]};
      8'h40: bus_rdata = {22'd0, rx_last, rx_valid, rx_data};
      8'h44: bus_rdata = {rx_len, 11'd0, rx_count};
      8'h48: bus_rdata = tsf[31:0];
      8'h4C: bus_rdata = tsf[63:32];
      default: bus_rdata = 32'd0;
    endcase
  end
endmodule
