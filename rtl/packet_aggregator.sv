// packet_aggregator: the ToR's data packet aggregator and generator, with the ToR side
// of optical flow control.
//
// Once per time slot (slot_start, from the label unit) it chooses the buffer block with
// the most occupied bytes, requests that block's destination from the switch controller
// with a label request {destination rack, priority}, and then sends one fixed-length
// optical packet of PKT_WORDS 32-bit words, IPG cycles after the slot start:
//   word 0    3 preamble bytes + start packet delimiter (START_WORD)
//   word 1    {source rack, destination rack} (16 bits each)
//   payload   frames, each a header word {FRAME_TAG, 8'h0, length} then its words,
//             filled greedily from the longest-frame class to the shortest; the rest
//             of the payload is the idle pattern 1010...
//   last word CRC-32 over words 1 .. last payload word (inverted)
// The frames are only copied: the buffer block keeps them. The controller's label
// response names the output the packet reached; equal to the request it is an ACK and
// the frames are released, otherwise (or if none came) a NACK: the read pointers are
// rewound and the next slot sends the same frames to the same rack again, until an ACK.
// With nothing buffered the slot carries only the idle pattern, so the line never stops
// toggling. Packet format, slot structure, most-occupied choice and ACK/NACK handling
// follow the document; the frame header word, greedy order and retransmission of an
// identical packet (per-class frame counts are replayed) are this design's choices.
// Timing: the label request is valid the cycle after slot_start; the start word leaves
// data_out IPG+1 cycles after slot_start; the CRC word PKT_WORDS-1 cycles later. The
// slot must be at least IPG + PKT_WORDS cycles long.
module packet_aggregator
  import ofc_pkg::*;
#(
  parameter int unsigned N_TOR     = 4,
  parameter int unsigned MY_RACK   = 0,
  parameter int unsigned NSUB      = 4,
  parameter int unsigned PKT_BYTES = 2600,
  parameter int unsigned IPG       = 14,
  localparam int unsigned NB = N_TOR - 1,
  localparam int unsigned CW = $clog2(NSUB),
  localparam int unsigned PKT_WORDS = PKT_BYTES / 4,
  localparam int unsigned PAY_WORDS = PKT_WORDS - 3
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             slot_start,
  input  logic [3:0]       priority_i,
  // buffer blocks
  input  logic [31:0]      occ      [NB],
  input  logic [NSUB-1:0]  head_valid [NB],
  input  logic [15:0]      head_len [NB][NSUB],
  input  logic [W-1:0]     rd_data  [NB],
  output logic [NB-1:0]    pop_o,
  output logic [NB-1:0]    rd_en_o,
  output logic [CW-1:0]    rd_cls_o,
  output logic [NB-1:0]    release_o,
  output logic [NB-1:0]    rewind_o,
  // label channel
  output logic             req_valid,
  output logic [3:0]       req_dest,
  output logic [3:0]       req_prio,
  input  logic             resp_valid,
  input  logic [3:0]       resp_port,
  // data channel
  output logic [W-1:0]     data_out,
  // statistics
  output logic [31:0]      pkts_sent,
  output logic [31:0]      acks,
  output logic [31:0]      nacks
);
  typedef enum logic [2:0] {S_IDLE, S_GAP, S_START, S_ADDR, S_PAY, S_CRC} state_e;
  state_e state;

  localparam int unsigned BW = (NB > 1) ? $clog2(NB) : 1;

  logic [BW-1:0]   blk;          // block of the current packet
  logic [3:0]      dest;
  logic            retx;         // next packet repeats the last one
  logic [15:0]     off;          // cycles since slot_start
  logic [15:0]     rem;          // payload words left
  logic [15:0]     fw;           // words left of the current frame
  logic [CW-1:0]   ci;           // current class
  logic [15:0]     cnt [NSUB];   // frames taken per class
  logic [15:0]     lim [NSUB];   // frame limit per class (replay on retransmission)
  logic [31:0]     crc;
  logic            got_ack, got_resp;
  logic            pad;          // payload filling has ended: idle words only

  function automatic logic [3:0] rack_of(input logic [BW-1:0] b);
    return (32'(b) < MY_RACK) ? 4'(b) : 4'(32'(b) + 1);
  endfunction

  // most-occupied block
  logic [BW-1:0] best;
  logic          any_occ;
  always_comb begin
    best = '0;
    any_occ = 1'b0;
    for (int b = 0; b < int'(NB); b++)
      if (occ[b] != 0 && (!any_occ || occ[b] > occ[best])) begin
        best = BW'(b);
        any_occ = 1'b1;
      end
  end

  // payload choice for this cycle
  logic          take_frame;
  logic [CW-1:0] take_cls;
  always_comb begin
    take_frame = 1'b0;
    take_cls   = ci;
    for (int c = 0; c < int'(NSUB); c++)
      if (!take_frame && !pad && c <= int'(ci) && head_valid[blk][CW'(int'(ci) - c)] &&
          cnt[CW'(int'(ci) - c)] < lim[CW'(int'(ci) - c)] &&
          words_of(head_len[blk][CW'(int'(ci) - c)]) + 16'd1 <= rem) begin
        take_frame = 1'b1;
        take_cls   = CW'(int'(ci) - c);
      end
  end

  logic pay_frame_word, pay_header;
  assign rd_cls_o = ((state == S_PAY) && (fw == 0) && take_frame) ? take_cls : ci;

  logic [W-1:0] word;
  logic ack_now;
  always_comb begin
    pay_frame_word = (state == S_PAY) && (fw != 0);
    pay_header     = (state == S_PAY) && (fw == 0) && take_frame;
    pop_o     = '0;
    rd_en_o   = '0;
    release_o = '0;
    rewind_o  = '0;
    if (pay_header)     pop_o[blk]   = 1'b1;
    if (pay_frame_word) rd_en_o[blk] = 1'b1;
    ack_now = got_ack || (resp_valid && got_resp == 1'b0 && resp_port == dest);
    if (state == S_CRC) begin
      if (ack_now) release_o[blk] = 1'b1;
      else         rewind_o[blk]  = 1'b1;
    end
    unique case (state)
      S_START: word = START_WORD;
      S_ADDR:  word = {16'(MY_RACK), 12'h0, dest};
      S_PAY:   word = pay_frame_word ? rd_data[blk]
                    : pay_header ? {FRAME_TAG, 8'h00, head_len[blk][take_cls]}
                    : IDLE_WORD;
      S_CRC:   word = ~crc;
      default: word = IDLE_WORD;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; blk <= '0; dest <= '0; retx <= 1'b0; off <= '0; rem <= '0;
      fw <= '0; ci <= '0; crc <= '1; pad <= 1'b0; got_ack <= 1'b0; got_resp <= 1'b0;
      for (int c = 0; c < int'(NSUB); c++) begin cnt[c] <= '0; lim[c] <= '0; end
      req_valid <= 1'b0; req_dest <= '0; req_prio <= '0;
      data_out <= IDLE_WORD; pkts_sent <= '0; acks <= '0; nacks <= '0;
    end else begin
      data_out  <= word;
      req_valid <= 1'b0;
      off <= off + 1'b1;
      if (resp_valid && state != S_IDLE && !got_resp) begin
        got_resp <= 1'b1;
        got_ack  <= (resp_port == dest);
      end
      unique case (state)
        S_IDLE, S_GAP: begin
          if (state == S_GAP && off == 16'(IPG - 2)) state <= S_START;
        end
        S_START: state <= S_ADDR;
        S_ADDR: begin
          state <= S_PAY;
          rem <= 16'(PAY_WORDS);
          fw <= '0;
          pad <= 1'b0;
          ci <= CW'(NSUB - 1);
          crc <= crc32_word(32'hFFFF_FFFF, word);
        end
        S_PAY: begin
          crc <= crc32_word(crc, word);
          rem <= rem - 1'b1;
          if (pay_frame_word) fw <= fw - 1'b1;
          else if (pay_header) begin
            fw <= words_of(head_len[blk][take_cls]);
            ci <= take_cls;
            cnt[take_cls] <= cnt[take_cls] + 1'b1;
          end else pad <= 1'b1;
          if (rem == 16'd1) state <= S_CRC;
        end
        S_CRC: begin
          state <= S_IDLE;
          pkts_sent <= pkts_sent + 1'b1;
          if (ack_now) begin
            acks <= acks + 1'b1;
            retx <= 1'b0;
          end else begin
            nacks <= nacks + 1'b1;
            retx <= 1'b1;
            for (int c = 0; c < int'(NSUB); c++) lim[c] <= cnt[c];
          end
        end
        default: state <= S_IDLE;
      endcase
      // a new slot: choose what to send (takes priority over S_IDLE only)
      if (slot_start && state == S_IDLE) begin
        off <= '0;
        got_ack <= 1'b0;
        got_resp <= 1'b0;
        for (int c = 0; c < int'(NSUB); c++) cnt[c] <= '0;
        if (retx || any_occ) begin
          state <= S_GAP;
          blk   <= retx ? blk : best;
          dest  <= retx ? dest : rack_of(best);
          if (!retx)
            for (int c = 0; c < int'(NSUB); c++) lim[c] <= 16'hFFFF;
          req_valid <= 1'b1;
          req_dest  <= retx ? dest : rack_of(best);
          req_prio  <= priority_i;
        end
      end
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) slot_start |-> state == S_IDLE);
endmodule
