// tb_packet_aggregator: drives the aggregator with three real buffer blocks (ToR of rack
// 1, so blocks hold racks 0, 2, 3) and checks, with its own CRC and packet parser:
//   - the label request names the most-occupied block's rack, one cycle after slot_start;
//   - the start word leaves IPG+1 cycles after slot_start and the packet is 650 words:
//     start word, address {1, dest}, frames (header + words, longest class first),
//     idle filler, CRC-32;
//   - every frame in the packet is one that was written, with the right contents;
//   - after a NACK the next slot repeats the identical packet to the same rack;
//   - after an ACK the frames are released and the next block is chosen;
//   - with nothing buffered the slot carries only the idle word and no request.
module tb_packet_aggregator;
  import ofc_pkg::*;
  localparam int NB = 3, NSUB = 4, PKT_WORDS = 650, IPG = 14;

  logic clk = 0, rst_n = 0;
  always #1 clk = ~clk;

  logic        bin_valid [NB], bin_ready [NB];
  frame_beat_t bin_beat [NB];
  logic [31:0] occ [NB], drops [NB];
  logic [NSUB-1:0] head_valid [NB];
  logic [15:0] head_len [NB][NSUB];
  logic [31:0] rd_data [NB];
  logic [NB-1:0] pop, rd_en, rel, rew;
  logic [1:0]  rd_cls;
  logic        slot_start, req_valid, resp_valid;
  logic [3:0]  req_dest, req_prio, resp_port;
  logic [31:0] data_out, pkts_sent, acks, nacks;

  for (genvar b = 0; b < NB; b++) begin : g_b
    buffer_block u_b (.clk, .rst_n, .in_valid(bin_valid[b]), .in_ready(bin_ready[b]),
      .in_beat(bin_beat[b]), .occ_bytes(occ[b]), .head_valid(head_valid[b]),
      .head_len(head_len[b]), .pop(pop[b]), .rd_en(rd_en[b]), .rd_cls, .rd_data(rd_data[b]),
      .release_i(rel[b]), .rewind_i(rew[b]), .drop_frames(drops[b]));
  end

  packet_aggregator #(.N_TOR(4), .MY_RACK(1)) dut (
    .clk, .rst_n, .slot_start, .priority_i(4'd5), .occ, .head_valid, .head_len, .rd_data,
    .pop_o(pop), .rd_en_o(rd_en), .rd_cls_o(rd_cls), .release_o(rel), .rewind_o(rew),
    .req_valid, .req_dest, .req_prio, .resp_valid, .resp_port, .data_out,
    .pkts_sent, .acks, .nacks);

  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string m);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", m); end
  endtask

  function automatic logic [31:0] pat(input int id, input int k);
    return {id[15:0], k[15:0]} ^ 32'h3C3C_0000;
  endfunction
  function automatic logic [31:0] crc_ref(input logic [31:0] c, input logic [31:0] d);
    for (int i = 31; i >= 0; i--) begin
      logic fb;
      fb = c[31] ^ d[i];
      c = c << 1;
      if (fb) c = c ^ 32'h04C1_1DB7;
    end
    return c;
  endfunction

  int flen [int];
  task automatic write_frame(input int b, input int id, input int len);
    int nw;
    flen[id] = len;
    nw = (len + 3) / 4;
    for (int k = 0; k < nw; k++) begin
      bin_valid[b] = 1;
      bin_beat[b].data = (k == 0) ? id : pat(id, k);
      bin_beat[b].len = 16'(len);
      bin_beat[b].last = (k == nw - 1);
      @(negedge clk);
    end
    bin_valid[b] = 0;
  endtask

  logic [31:0] pkt [PKT_WORDS];
  int start_delay;
  bit got_req;
  logic [3:0] got_dest;

  // one slot: pulse slot_start, capture request and packet, answer with resp
  task automatic run_slot(input bit answer, input logic [3:0] port, output bit sent);
    int c;
    sent = 0; got_req = 0; start_delay = -1;
    slot_start = 1; @(negedge clk); slot_start = 0;
    c = 1;
    if (req_valid) begin got_req = 1; got_dest = req_dest; chk(req_prio == 4'd5, "priority"); end
    while (c < PKT_WORDS + IPG + 1) begin
      if (c == 30 && answer && got_req) begin resp_valid = 1; resp_port = port; end
      else resp_valid = 0;
      if (start_delay < 0 && data_out == START_WORD) begin start_delay = c; sent = 1; end
      if (start_delay >= 0 && c - start_delay < PKT_WORDS) pkt[c - start_delay] = data_out;
      else if (start_delay < 0) chk(data_out == IDLE_WORD, "idle before packet");
      @(negedge clk);
      c++;
    end
    resp_valid = 0;
    if (sent) chk(start_delay == IPG + 1, $sformatf("start word after %0d cycles", start_delay));
  endtask

  // parse pkt: check address, frames, CRC; return list of frame ids
  task automatic parse(input logic [3:0] dest, output int ids [$], output int bytes);
    logic [31:0] c;
    int w;
    bit padding;
    ids = {}; bytes = 0; padding = 0;
    chk(pkt[1] == {16'd1, 16'(dest)}, "address word");
    c = 32'hFFFF_FFFF;
    for (int i = 1; i < PKT_WORDS - 1; i++) c = crc_ref(c, pkt[i]);
    chk(pkt[PKT_WORDS-1] == ~c, "CRC word");
    w = 2;
    while (w < PKT_WORDS - 1) begin
      if (!padding && pkt[w][31:24] == 8'hFD) begin
        int len, nw, id;
        len = pkt[w][15:0];
        nw = (len + 3) / 4;
        id = pkt[w+1];
        chk(flen.exists(id) && flen[id] == len, $sformatf("frame %0d length", id));
        for (int k = 1; k < nw; k++) chk(pkt[w+1+k] == pat(id, k), "frame word");
        ids.push_back(id);
        bytes += len;
        w += nw + 1;
      end else begin
        padding = 1;
        chk(pkt[w] == IDLE_WORD, "filler");
        w++;
      end
    end
  endtask

  initial begin
    bit sent;
    int ids1 [$], ids2 [$], ids3 [$];
    int bytes1, bytes2, bytes3;
    logic [31:0] first [PKT_WORDS];
    for (int b = 0; b < NB; b++) begin bin_valid[b] = 0; bin_beat[b] = '0; end
    slot_start = 0; resp_valid = 0; resp_port = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    // empty slot
    run_slot(0, 0, sent);
    chk(!sent && !got_req, "empty slot: no packet, no request");
    // block 0 (rack 0): 1200 bytes; block 2 (rack 3): 1400+200+500+500+148+64 bytes
    write_frame(0, 1, 600); write_frame(0, 2, 600);
    write_frame(2, 10, 1400); write_frame(2, 11, 200); write_frame(2, 12, 500);
    write_frame(2, 13, 500); write_frame(2, 14, 148); write_frame(2, 15, 64);
    write_frame(2, 16, 1100);
    @(negedge clk);
    // slot 1: rack 3, NACK
    run_slot(1, 4'd1, sent);
    chk(sent && got_req && got_dest == 4'd3, "request for rack 3 (most occupied)");
    parse(4'd3, ids1, bytes1);
    chk(ids1.size() == 3 && ids1[2] == 15 && ids1[0] == 10 && ids1[1] == 16, "longest class first");
    $display("packet 1 frames %p", ids1);
    first = pkt;
    chk(nacks == 1, "NACK counted");
    // slot 2: retransmission, identical, ACK
    run_slot(1, 4'd3, sent);
    chk(sent && got_dest == 4'd3, "retransmission to rack 3");
    for (int i = 0; i < PKT_WORDS; i++) chk(pkt[i] == first[i], "identical retransmission");
    chk(acks == 1, "ACK counted");
    @(negedge clk);
    chk(occ[2] == 32'(3912 - bytes1), $sformatf("released bytes: occ %0d", occ[2]));
    // slot 3: now rack 0 (1200) vs rack 3 (rest)
    run_slot(1, 4'd0, sent);
    chk(got_dest == ((3912 - bytes1 > 1200) ? 4'd3 : 4'd0), "next most-occupied block");
    parse(got_dest, ids3, bytes3);
    chk(pkts_sent == 3, "three packets sent");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
