// buffer_block: the electrical buffer a ToR keeps for one destination rack.
//
// Frames for one rack are kept here until the switch controller acknowledges the
// optical packet that carried them (optical flow control). The block is split into
// NSUB sub-buffers of similar frame length, chosen by size_filter, so that the
// aggregator can pick frames of suitable length (document, Fig. 2(b)). Each sub-buffer
// is a word RAM plus a frame-length queue, each with three pointers:
//   write  - where the next frame is written,
//   read   - how far the aggregator has copied frames into packets,
//   commit - the oldest frame not yet acknowledged.
// release_i (ACK) moves commit up to read, freeing the space; rewind_i (NACK) moves read
// back to commit, so the same frames are sent again. A frame is admitted only if the
// block's byte total stays within BLOCK_BYTES (the document's buffer size); otherwise
// the whole frame is discarded, as in the document ("newly arrived frames will be
// discarded"). occ_bytes counts bytes of complete, unreleased frames: it is the
// occupancy the aggregator compares between blocks.
// Interface: frame stream in (always ready, one word per cycle); for each class the
// head frame's presence and length; rd_en/rd_cls read one word combinationally from the
// read pointer and advance it; pop advances past a head frame's length entry. The
// physical size of every sub-buffer is the whole block (any class may take it all);
// these sizes and the combinational read port are this design's choices.
module buffer_block
  import ofc_pkg::*;
#(
  parameter int unsigned NSUB        = 4,
  parameter int unsigned BLOCK_BYTES = 8192,
  parameter int unsigned MIN_FRAME   = 64,
  localparam int unsigned CW  = $clog2(NSUB),
  localparam int unsigned SUB_WORDS = BLOCK_BYTES / 4,
  localparam int unsigned LEN_DEPTH = BLOCK_BYTES / MIN_FRAME,
  localparam int unsigned AW  = $clog2(SUB_WORDS),
  localparam int unsigned LW  = $clog2(LEN_DEPTH)
) (
  input  logic              clk,
  input  logic              rst_n,
  // frame stream from the Ethernet switch
  input  logic              in_valid,
  output logic              in_ready,
  input  frame_beat_t       in_beat,
  // occupancy and head frames
  output logic [31:0]       occ_bytes,
  output logic [NSUB-1:0]   head_valid,
  output logic [15:0]       head_len [NSUB],
  // read side (aggregator)
  input  logic              pop,        // take the head frame of rd_cls
  input  logic              rd_en,      // take one word of rd_cls
  input  logic [CW-1:0]     rd_cls,
  output logic [W-1:0]      rd_data,
  input  logic              release_i,  // ACK: free everything read
  input  logic              rewind_i,   // NACK: read again from commit
  output logic [31:0]       drop_frames
);
  // One RAM per kind of data, addressed by {class, pointer}.
  logic [W-1:0]  mem     [NSUB*SUB_WORDS];
  logic [15:0]   len_mem [NSUB*LEN_DEPTH];

  logic [AW:0]   wr_p [NSUB], rd_p [NSUB], cm_p [NSUB];
  logic [LW:0]   lwr_p[NSUB], lrd_p[NSUB], lcm_p[NSUB];

  logic [31:0]   used_bytes;     // admitted, unreleased (includes frame being written)
  logic [31:0]   inflight_bytes; // read but not yet acknowledged

  // write-side state
  logic          wr_busy, wr_keep;
  logic [CW-1:0] wr_cls, new_cls;

  size_filter #(.NSUB(NSUB)) u_filter (.len_bytes(in_beat.len), .cls(new_cls));

  assign in_ready = 1'b1;

  logic first_beat, admit;
  always_comb begin
    first_beat = in_valid && !wr_busy;
    admit = (used_bytes + 32'(in_beat.len) <= BLOCK_BYTES) &&
            ((AW+1)'(SUB_WORDS) - (wr_p[new_cls] - cm_p[new_cls]) >= (AW+1)'(words_of(in_beat.len))) &&
            ((LW+1)'(LEN_DEPTH) - (lwr_p[new_cls] - lcm_p[new_cls]) != '0) &&
            (in_beat.len != 16'd0);
  end

  // write side
  logic [CW-1:0] cur_cls;
  logic          cur_keep;
  always_comb begin
    cur_cls  = first_beat ? new_cls : wr_cls;
    cur_keep = first_beat ? admit   : wr_keep;
  end

  always_ff @(posedge clk) begin
    if (in_valid && cur_keep) begin
      mem[{cur_cls, wr_p[cur_cls][AW-1:0]}] <= in_beat.data;
      if (in_beat.last) len_mem[{cur_cls, lwr_p[cur_cls][LW-1:0]}] <= in_beat.len;
    end
  end

  // head frames and read data
  always_comb begin
    for (int c = 0; c < int'(NSUB); c++) begin
      head_valid[c] = (lrd_p[c] != lwr_p[c]);
      head_len[c]   = len_mem[{CW'(c), lrd_p[c][LW-1:0]}];
    end
  end

  assign rd_data = mem[{rd_cls, rd_p[rd_cls][AW-1:0]}];

  logic [31:0] popped_len, done_len;
  always_comb begin
    popped_len = (pop && head_valid[rd_cls]) ? 32'(head_len[rd_cls]) : 32'd0;
    done_len   = (in_valid && cur_keep && in_beat.last) ? 32'(in_beat.len) : 32'd0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int c = 0; c < int'(NSUB); c++) begin
        wr_p[c] <= '0; rd_p[c] <= '0; cm_p[c] <= '0;
        lwr_p[c] <= '0; lrd_p[c] <= '0; lcm_p[c] <= '0;
      end
      used_bytes     <= '0;
      occ_bytes      <= '0;
      inflight_bytes <= '0;
      wr_busy        <= 1'b0;
      wr_keep        <= 1'b0;
      wr_cls         <= '0;
      drop_frames    <= '0;
    end else begin
      // ---- write ----
      if (in_valid) begin
        if (first_beat) begin
          wr_cls  <= new_cls;
          wr_keep <= admit;
          if (!admit) drop_frames <= drop_frames + 1;
        end
        wr_busy <= !in_beat.last;
        if (cur_keep) begin
          wr_p[cur_cls] <= wr_p[cur_cls] + 1'b1;
          if (in_beat.last) lwr_p[cur_cls] <= lwr_p[cur_cls] + 1'b1;
        end
      end
      // ---- read ----
      if (rd_en) rd_p[rd_cls] <= rd_p[rd_cls] + 1'b1;
      if (pop && head_valid[rd_cls]) lrd_p[rd_cls] <= lrd_p[rd_cls] + 1'b1;
      // ---- ACK / NACK ----
      if (release_i) begin
        for (int c = 0; c < int'(NSUB); c++) begin
          cm_p[c]  <= rd_p[c];
          lcm_p[c] <= lrd_p[c];
        end
        inflight_bytes <= '0;
      end else if (rewind_i) begin
        for (int c = 0; c < int'(NSUB); c++) begin
          rd_p[c]  <= cm_p[c];
          lrd_p[c] <= lcm_p[c];
        end
        inflight_bytes <= '0;
      end else begin
        inflight_bytes <= inflight_bytes + popped_len;
      end
      // ---- byte accounting ----
      used_bytes <= used_bytes
                    + ((first_beat && admit) ? 32'(in_beat.len) : 32'd0)
                    - (release_i ? inflight_bytes : 32'd0);
      occ_bytes  <= occ_bytes + done_len - (release_i ? inflight_bytes : 32'd0);
    end
  end

  // The aggregator must not read and release/rewind in the same cycle.
  assert property (@(posedge clk) disable iff (!rst_n) !((release_i || rewind_i) && (rd_en || pop)));
  assert property (@(posedge clk) disable iff (!rst_n) !(release_i && rewind_i));
endmodule
