// frame_buffer: circular queue of whole frames, used for every MpduGen frame
// buffer (beacon, Tx, PS, control, one per access category) and for the Rx
// buffer. Bytes go into a DEPTH-byte ring; a descriptor ring of NDESC
// entries records where each committed frame starts, its length and one flag
// bit (the "more fragments" mark for transmit buffers).
//
// Writer: wr_en writes one byte at the tentative tail. wr_commit closes the
// frame (the byte written in the same cycle is included), wr_abort throws the
// tentative bytes away. A byte written while the ring or the descriptor ring
// is full is lost and the frame is then dropped at commit (overflow pulse).
//
// Reader: a cursor walks the committed frames without freeing them, so an
// A-MPDU can read several frames and a failed exchange can read them again.
// rd_open puts the cursor on the oldest frame, rd_next moves it one frame on;
// the frame under the cursor then streams out byte by byte (rd_valid,
// rd_data, rd_last, handshake rd_ready, combinational read). rd_pop frees the
// oldest frame. rd_avail counts the frames from the cursor on; rd_flag is
// the flag of the oldest frame, which is the one sent next.
// Depth and ring sizes are this design's choice; only the total memory of
// the MAC is published.
module frame_buffer #(
  parameter int DEPTH = 4096,  // bytes, power of two
  parameter int NDESC = 16     // frames, power of two
) (
  input  logic clk,
  input  logic rst_n,
  // writer
  input  logic       wr_en,
  input  logic [7:0] wr_data,
  input  logic       wr_commit,
  input  logic       wr_flag,
  input  logic       wr_abort,
  output logic       overflow,      // pulse: a committed frame was dropped
  output logic [$clog2(DEPTH):0] free_bytes,
  // reader
  input  logic       rd_open,
  input  logic       rd_next,
  input  logic       rd_pop,
  input  logic       rd_ready,
  output logic       rd_valid,
  output logic [7:0] rd_data,
  output logic       rd_last,
  output logic [15:0] rd_len,       // length of the frame under the cursor
  output logic       rd_flag,      // flag of the oldest frame
  output logic [$clog2(NDESC):0] rd_avail,
  output logic [$clog2(NDESC):0] count
);
  localparam int AW = $clog2(DEPTH);
  localparam int DW = $clog2(NDESC);

  typedef struct packed {
    logic [AW-1:0] start;
    logic [15:0]   len;
    logic          flag;
  } desc_t;

  logic [7:0] mem [DEPTH];
  desc_t      desc [NDESC];

  logic [AW:0]   head_ptr, tail_ptr, wr_ptr;   // byte pointers with wrap bit
  logic [DW:0]   dhead, dtail, cursor;         // descriptor pointers
  logic [15:0]   wlen;
  logic          wovf;
  logic [AW-1:0] rptr;
  logic [15:0]   rrem;

  logic [AW:0] used_w;
  logic        byte_full, desc_full, wr_ok;
  assign used_w    = wr_ptr - head_ptr;
  assign byte_full = used_w == (AW+1)'(DEPTH);
  assign desc_full = (dtail - dhead) == (DW+1)'(NDESC);
  assign wr_ok     = wr_en && !byte_full && !wovf;
  assign free_bytes = (AW+1)'(DEPTH) - (tail_ptr - head_ptr);
  assign count     = dtail - dhead;
  assign rd_avail  = dtail - cursor;

  assign rd_len  = desc[cursor[DW-1:0]].len;
  assign rd_flag = desc[dhead[DW-1:0]].flag;

  assign rd_valid = rrem != 0;
  assign rd_data  = mem[rptr];
  assign rd_last  = rrem == 16'd1;

  logic        commit_ok;
  logic [15:0] flen;
  assign flen      = wlen + 16'(wr_ok);
  assign commit_ok = wr_commit && !(wovf || (wr_en && !wr_ok)) && !desc_full && flen != 0;

  always_ff @(posedge clk) begin
    if (wr_ok) mem[wr_ptr[AW-1:0]] <= wr_data;
    if (!wr_abort && commit_ok)
      desc[dtail[DW-1:0]] <= '{start: tail_ptr[AW-1:0], len: flen, flag: wr_flag};
  end

  // writer side

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr <= '0; tail_ptr <= '0; wlen <= '0; wovf <= 1'b0;
      dtail <= '0; overflow <= 1'b0;
    end else begin
      overflow <= 1'b0;
      if (wr_abort) begin
        wr_ptr <= tail_ptr; wlen <= '0; wovf <= 1'b0;
      end else if (wr_commit) begin
        if (commit_ok) begin
          dtail    <= dtail + 1'b1;
          tail_ptr <= wr_ptr + (AW+1)'(wr_ok);
          wr_ptr   <= wr_ptr + (AW+1)'(wr_ok);
        end else begin
          wr_ptr   <= tail_ptr;
          overflow <= 1'b1;
        end
        wlen <= '0; wovf <= 1'b0;
      end else begin
        if (wr_ok) begin
          wr_ptr <= wr_ptr + 1'b1;
          wlen   <= wlen + 1'b1;
        end else if (wr_en) begin
          wovf <= 1'b1;
        end
      end
    end
  end

  // reader side
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dhead <= '0; head_ptr <= '0; cursor <= '0; rptr <= '0; rrem <= '0;
    end else begin
      if (rd_pop && count != 0) begin
        dhead    <= dhead + 1'b1;
        head_ptr <= head_ptr + (AW+1)'(desc[dhead[DW-1:0]].len);
      end
      if (rd_open) begin
        cursor <= dhead;
        rptr   <= desc[dhead[DW-1:0]].start;
        rrem   <= (dtail != dhead) ? desc[dhead[DW-1:0]].len : 16'd0;
      end else if (rd_next) begin
        cursor <= cursor + 1'b1;
        rptr   <= desc[DW'(cursor + 1'b1)].start;
        rrem   <= (dtail != cursor + 1'b1) ? desc[DW'(cursor + 1'b1)].len : 16'd0;
      end else if (rd_valid && rd_ready) begin
        rptr <= rptr + 1'b1;
        rrem <= rrem - 1'b1;
      end
    end
  end

  a_pop_nonempty: assert property (@(posedge clk) disable iff (!rst_n) rd_pop |-> count != 0);
endmodule
