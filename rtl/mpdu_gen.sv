// mpdu_gen: hardware part of MPDU generation. It holds the frame buffers the
// MAC software fills (beacon, Tx, power-save, control, and one per access
// category), each a circular frame queue, and the multiplexer that connects
// a buffer to each Datapump. The host writes one byte at a time into the
// buffer chosen by host_sel and closes the frame with host_commit (host_flag
// marks "more fragments"). For user u, src_sel[u] names the buffer whose read
// port the Datapump drives; the Tx coordinator never gives one buffer to two
// users. User 0 may also select BUF_RESP, the response frame generator of
// the Rx coordinator (resp_* ports). pop[b] frees the oldest frame of buffer
// b; count[b] and head_flag[b] tell the coordinator what is queued.
// Buffer sizes are this design's choice within the 33.5 KB of the MAC.
module mpdu_gen
  import mac_pkg::*;
#(
  parameter int N_USER     = 4,
  parameter int AC_DEPTH   = 4096,
  parameter int TX_DEPTH   = 4096,
  parameter int PS_DEPTH   = 4096,
  parameter int BCN_DEPTH  = 1024,
  parameter int CTRL_DEPTH = 256,
  parameter int NDESC      = 16
) (
  input  logic clk,
  input  logic rst_n,
  // host side
  input  logic [2:0] host_sel,
  input  logic       host_wr,
  input  logic [7:0] host_data,
  input  logic       host_commit,
  input  logic       host_flag,
  output logic [N_BUF-1:0] host_overflow,
  output logic [N_BUF-1:0][12:0] free_bytes,
  // coordinator side
  input  logic [N_BUF-1:0] pop,
  output logic [N_BUF-1:0][4:0] count,
  output logic [N_BUF-1:0] head_flag,
  input  buf_e [N_USER-1:0] src_sel,
  // Datapump side
  input  logic [N_USER-1:0]       src_open,
  input  logic [N_USER-1:0]       src_next,
  input  logic [N_USER-1:0]       src_ready,
  output logic [N_USER-1:0]       src_valid,
  output logic [N_USER-1:0][7:0]  src_data,
  output logic [N_USER-1:0]       src_last,
  output logic [N_USER-1:0][15:0] src_len,
  output logic [N_USER-1:0][4:0]  src_avail,
  output logic [N_USER-1:0]       src_flag,
  // response generator (read port of the same shape)
  output logic       resp_open,
  output logic       resp_ready,
  input  logic       resp_valid,
  input  logic [7:0] resp_data,
  input  logic       resp_last,
  input  logic [15:0] resp_len,
  input  logic [4:0] resp_avail
);
  function automatic int depth_of(int b);
    case (b)
      0: return BCN_DEPTH;
      1: return TX_DEPTH;
      2: return PS_DEPTH;
      3: return CTRL_DEPTH;
      default: return AC_DEPTH;
    endcase
  endfunction

  logic [N_BUF-1:0]       b_open, b_next, b_ready, b_valid, b_last, b_flag;
  logic [N_BUF-1:0][7:0]  b_data;
  logic [N_BUF-1:0][15:0] b_len;
  logic [N_BUF-1:0][4:0]  b_avail;

  for (genvar b = 0; b < N_BUF; b++) begin : g_buf
    localparam int D = depth_of(b);
    logic [$clog2(D):0] fb;
    logic [$clog2(NDESC):0] cnt, av;
    frame_buffer #(.DEPTH(D), .NDESC(NDESC)) u_fb (
      .clk, .rst_n,
      .wr_en(host_wr && host_sel == 3'(b)), .wr_data(host_data),
      .wr_commit(host_commit && host_sel == 3'(b)), .wr_flag(host_flag), .wr_abort(1'b0),
      .overflow(host_overflow[b]), .free_bytes(fb),
      .rd_open(b_open[b]), .rd_next(b_next[b]), .rd_pop(pop[b]), .rd_ready(b_ready[b]),
      .rd_valid(b_valid[b]), .rd_data(b_data[b]), .rd_last(b_last[b]),
      .rd_len(b_len[b]), .rd_flag(b_flag[b]), .rd_avail(av), .count(cnt)
    );
    assign free_bytes[b] = 13'(fb);
    assign count[b]      = 5'(cnt);
    assign b_avail[b]    = 5'(av);
    assign head_flag[b]  = b_flag[b];
  end

  // request side: buffer b follows the user that selected it
  always_comb begin
    b_open = '0; b_next = '0; b_ready = '0;
    resp_open = 1'b0; resp_ready = 1'b0;
    for (int u = 0; u < N_USER; u++) begin
      if (src_sel[u] == BUF_RESP) begin
        if (u == 0) begin
          resp_open  = src_open[u];
          resp_ready = src_ready[u];
        end
      end else begin
        b_open[src_sel[u][2:0]]  = b_open[src_sel[u][2:0]]  | src_open[u];
        b_next[src_sel[u][2:0]]  = b_next[src_sel[u][2:0]]  | src_next[u];
        b_ready[src_sel[u][2:0]] = b_ready[src_sel[u][2:0]] | src_ready[u];
      end
    end
  end

  // response side
  always_comb begin
    for (int u = 0; u < N_USER; u++) begin
      if (src_sel[u] == BUF_RESP) begin
        src_valid[u] = (u == 0) && resp_valid;
        src_data[u]  = resp_data;
        src_last[u]  = resp_last;
        src_len[u]   = resp_len;
        src_avail[u] = (u == 0) ? resp_avail : 5'd0;
        src_flag[u]  = 1'b0;
      end else begin
        src_valid[u] = b_valid[src_sel[u][2:0]];
        src_data[u]  = b_data[src_sel[u][2:0]];
        src_last[u]  = b_last[src_sel[u][2:0]];
        src_len[u]   = b_len[src_sel[u][2:0]];
        src_avail[u] = b_avail[src_sel[u][2:0]];
        src_flag[u]  = b_flag[src_sel[u][2:0]];
      end
    end
  end
endmodule
