// packet_receiver: the ToR's data packet receiver and dis-aggregator.
//
// The data channel never stops toggling (idle pattern between and inside packets) and
// every node runs on the clock distributed by the switch controller, so the receiver
// does not recover frequency; it only looks for the start word (3 preamble bytes and the
// start packet delimiter, one 32-bit word) and locks onto a packet in that one cycle.
// It then takes the address word and PKT_WORDS-3 payload words, keeps the frame header
// and frame words (idle filler is skipped) in a circular Rx buffer, and checks the CRC
// word. If the CRC is right and the destination rack is MY_RACK, the packet's words are
// committed; otherwise they are discarded. A packet that lost contention and was sent to
// this rack only to keep its receiver busy is discarded this way (counted as misrouted).
// The read side empties the buffer while the next packet is written, so one 2600-byte
// packet after another fits a 4096-byte buffer; if the buffer still fills up (the
// Ethernet switch holding the read side back) the packet is dropped (overflow).
// The read side splits committed words back into Ethernet frames (valid/ready stream,
// len on every beat, last on the final beat) for the ToR's Ethernet switch.
// Start-word detection, address check and CRC follow the document; the commit/discard
// Rx buffer and the frame header format are this design's choices. The Rx buffer size
// follows the document's 4096 bytes; the read port is combinational.
module packet_receiver
  import ofc_pkg::*;
#(
  parameter int unsigned MY_RACK     = 0,
  parameter int unsigned PKT_BYTES   = 2600,
  parameter int unsigned RXBUF_BYTES = 4096,
  localparam int unsigned PKT_WORDS = PKT_BYTES / 4,
  localparam int unsigned PAY_WORDS = PKT_WORDS - 3,
  localparam int unsigned DEPTH = RXBUF_BYTES / 4,
  localparam int unsigned AW = $clog2(DEPTH)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] data_in,
  output logic         out_valid,
  input  logic         out_ready,
  output frame_beat_t  out_beat,
  output logic [31:0]  good_pkts,
  output logic [31:0]  misrouted_pkts,
  output logic [31:0]  crc_errors,
  output logic [31:0]  overflow_pkts,
  output logic [31:0]  frames_out
);
  typedef enum logic [1:0] {R_HUNT, R_ADDR, R_PAY, R_CRC} rstate_e;
  rstate_e state;

  logic [W-1:0] mem [DEPTH];
  logic [AW:0]  wr_t, wr_c, rd;     // tentative write, committed write, read
  logic [15:0]  cnt, fl;
  logic         pad, ovf;
  logic [15:0]  dst;
  logic [31:0]  crc;

  logic is_hdr, do_write, full;
  always_comb begin
    is_hdr   = (fl == 0) && !pad && (data_in[31:24] == FRAME_TAG);
    full     = (wr_t - rd) == (AW+1)'(DEPTH);
    do_write = (state == R_PAY) && !ovf && !full && !pad && ((fl != 0) || is_hdr);
  end

  always_ff @(posedge clk) begin
    if (do_write) mem[wr_t[AW-1:0]] <= data_in;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= R_HUNT; wr_t <= '0; wr_c <= '0; cnt <= '0; fl <= '0; pad <= 1'b0;
      ovf <= 1'b0; dst <= '0; crc <= '1;
      good_pkts <= '0; misrouted_pkts <= '0; crc_errors <= '0; overflow_pkts <= '0;
    end else begin
      unique case (state)
        R_HUNT: if (data_in == START_WORD) state <= R_ADDR;
        R_ADDR: begin
          dst   <= data_in[15:0];
          crc   <= crc32_word(32'hFFFF_FFFF, data_in);
          cnt   <= 16'(PAY_WORDS);
          fl    <= '0;
          pad   <= 1'b0;
          ovf   <= 1'b0;
          state <= R_PAY;
        end
        R_PAY: begin
          crc <= crc32_word(crc, data_in);
          cnt <= cnt - 1'b1;
          if (do_write) wr_t <= wr_t + 1'b1;
          if (full && ((fl != 0) || is_hdr) && !pad) ovf <= 1'b1;
          if (fl != 0) fl <= fl - 1'b1;
          else if (is_hdr) fl <= words_of(data_in[15:0]);
          else pad <= 1'b1;
          if (cnt == 16'd1) state <= R_CRC;
        end
        R_CRC: begin
          state <= R_HUNT;
          if (data_in != ~crc) begin
            crc_errors <= crc_errors + 1'b1;
            wr_t <= wr_c;
          end else if (dst != 16'(MY_RACK)) begin
            misrouted_pkts <= misrouted_pkts + 1'b1;
            wr_t <= wr_c;
          end else if (ovf) begin
            overflow_pkts <= overflow_pkts + 1'b1;
            wr_t <= wr_c;
          end else begin
            good_pkts <= good_pkts + 1'b1;
            wr_c <= wr_t;
          end
        end
        default: state <= R_HUNT;
      endcase
    end
  end

  // ---- dis-aggregation: committed words back to frames ----
  logic [15:0] rfl, rlen;
  logic [W-1:0] rword;
  assign rword = mem[rd[AW-1:0]];
  always_comb begin
    out_valid     = (rfl != 0);
    out_beat.data = rword;
    out_beat.len  = rlen;
    out_beat.last = (rfl == 16'd1);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd <= '0; rfl <= '0; rlen <= '0; frames_out <= '0;
    end else if (rfl == 0) begin
      if (rd != wr_c) begin
        rlen <= rword[15:0];
        rfl  <= words_of(rword[15:0]);
        rd   <= rd + 1'b1;
      end
    end else if (out_ready) begin
      rd  <= rd + 1'b1;
      rfl <= rfl - 1'b1;
      if (rfl == 16'd1) frames_out <= frames_out + 1'b1;
    end
  end
endmodule
