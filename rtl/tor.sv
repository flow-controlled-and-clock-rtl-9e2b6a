// tor: one FPGA-based top-of-rack node of the optical cluster.
//
// Frames from the H servers enter the Ethernet switch; intra-rack frames go straight
// back to a server, inter-rack frames into the buffer block of their destination rack.
// Every time slot the packet aggregator copies frames from the most-occupied block into
// one optical data packet and asks the switch controller, through the label unit, for
// the block's destination. The ACK or NACK that comes back releases the frames or makes
// the aggregator send them again. The label unit first measures the label channel's
// delay and takes the controller's time, so that this ToR's slots line up with every
// other ToR's at the switch. Packets arriving on the data channel are checked and split
// back into frames by the packet receiver and handed to the Ethernet switch.
// Ports: server streams in both directions (valid/ready beats), the label channel
// (one word per cycle each way), the data channel (one word per cycle each way, idle
// pattern when nothing is sent), and counters. Structure after the document's Fig. 2.
module tor
  import ofc_pkg::*;
#(
  parameter int unsigned N_TOR       = 4,
  parameter int unsigned H           = 2,
  parameter int unsigned MY_RACK     = 0,
  parameter int unsigned PRIORITY    = 0,     // label priority, lower wins
  parameter int unsigned NSUB        = 4,
  parameter int unsigned BLOCK_BYTES = 8192,
  parameter int unsigned PKT_BYTES   = 2600,
  parameter int unsigned RXBUF_BYTES = 4096,
  parameter int unsigned IPG         = 14,
  parameter int unsigned SLOT        = 664,
  localparam int unsigned NB = N_TOR - 1,
  localparam int unsigned CW = $clog2(NSUB)
) (
  input  logic         clk,
  input  logic         rst_n,
  // servers
  input  logic         srv_tx_valid [H],
  output logic         srv_tx_ready [H],
  input  frame_beat_t  srv_tx_beat  [H],
  output logic         srv_rx_valid [H],
  input  logic         srv_rx_ready [H],
  output frame_beat_t  srv_rx_beat  [H],
  // label channel
  input  label_word_t  label_rx,
  output label_word_t  label_tx,
  // data channel
  output logic [W-1:0] data_tx,
  input  logic [W-1:0] data_rx,
  // status
  output logic         synced,
  output logic [15:0]  delay_cycles,
  output logic [31:0]  pkts_sent,
  output logic [31:0]  acks,
  output logic [31:0]  nacks,
  output logic [31:0]  rx_good,
  output logic [31:0]  rx_misrouted,
  output logic [31:0]  rx_crc_err,
  output logic [31:0]  rx_overflow,
  output logic [31:0]  rx_frames,
  output logic [31:0]  buf_drops,
  output logic [31:0]  occ_bytes [NB]
);
  // ---------------- Ethernet switch ----------------
  logic        sw_in_valid [H+1], sw_in_ready [H+1];
  frame_beat_t sw_in_beat  [H+1];
  logic        sw_out_valid [H+NB], sw_out_ready [H+NB];
  frame_beat_t sw_out_beat  [H+NB];
  logic [31:0] sw_dropped;

  logic        rx_valid, rx_ready;
  frame_beat_t rx_beat;

  always_comb begin
    for (int s = 0; s < int'(H); s++) begin
      sw_in_valid[s]  = srv_tx_valid[s];
      sw_in_beat[s]   = srv_tx_beat[s];
      srv_tx_ready[s] = sw_in_ready[s];
      srv_rx_valid[s] = sw_out_valid[s];
      srv_rx_beat[s]  = sw_out_beat[s];
      sw_out_ready[s] = srv_rx_ready[s];
    end
    sw_in_valid[H] = rx_valid;
    sw_in_beat[H]  = rx_beat;
    rx_ready       = sw_in_ready[H];
  end

  eth_switch #(.H(H), .N_TOR(N_TOR), .MY_RACK(MY_RACK)) u_eth_switch (
    .clk, .rst_n,
    .in_valid(sw_in_valid), .in_ready(sw_in_ready), .in_beat(sw_in_beat),
    .out_valid(sw_out_valid), .out_ready(sw_out_ready), .out_beat(sw_out_beat),
    .dropped(sw_dropped));

  // ---------------- buffer blocks ----------------
  logic [NSUB-1:0] head_valid [NB];
  logic [15:0]     head_len   [NB][NSUB];
  logic [W-1:0]    rd_data    [NB];
  logic [NB-1:0]   pop, rd_en, rel, rew;
  logic [CW-1:0]   rd_cls;
  logic [31:0]     blk_drops  [NB];

  for (genvar b = 0; b < NB; b++) begin : g_blk
    buffer_block #(.NSUB(NSUB), .BLOCK_BYTES(BLOCK_BYTES)) u_block (
      .clk, .rst_n,
      .in_valid(sw_out_valid[H+b]), .in_ready(sw_out_ready[H+b]), .in_beat(sw_out_beat[H+b]),
      .occ_bytes(occ_bytes[b]), .head_valid(head_valid[b]), .head_len(head_len[b]),
      .pop(pop[b]), .rd_en(rd_en[b]), .rd_cls(rd_cls), .rd_data(rd_data[b]),
      .release_i(rel[b]), .rewind_i(rew[b]), .drop_frames(blk_drops[b]));
  end

  always_comb begin
    buf_drops = sw_dropped;
    for (int b = 0; b < int'(NB); b++) buf_drops += blk_drops[b];
  end

  // ---------------- aggregator and label unit ----------------
  logic       slot_start, req_valid, resp_valid;
  logic [3:0] req_dest, req_prio, resp_port;
  logic [SLOT_W-1:0] slot_idx;
  logic [OFF_W-1:0]  slot_off;

  packet_aggregator #(.N_TOR(N_TOR), .MY_RACK(MY_RACK), .NSUB(NSUB),
                      .PKT_BYTES(PKT_BYTES), .IPG(IPG)) u_aggregator (
    .clk, .rst_n, .slot_start, .priority_i(4'(PRIORITY)),
    .occ(occ_bytes), .head_valid, .head_len, .rd_data,
    .pop_o(pop), .rd_en_o(rd_en), .rd_cls_o(rd_cls), .release_o(rel), .rewind_o(rew),
    .req_valid, .req_dest, .req_prio, .resp_valid, .resp_port,
    .data_out(data_tx), .pkts_sent, .acks, .nacks);

  tor_label_unit #(.SLOT(SLOT)) u_label (
    .clk, .rst_n, .label_rx, .label_tx,
    .req_valid, .req_dest, .req_prio, .resp_valid, .resp_port,
    .slot_start, .synced, .delay_cycles, .slot_idx, .slot_off);

  // ---------------- receiver ----------------
  packet_receiver #(.MY_RACK(MY_RACK), .PKT_BYTES(PKT_BYTES), .RXBUF_BYTES(RXBUF_BYTES)) u_receiver (
    .clk, .rst_n, .data_in(data_rx),
    .out_valid(rx_valid), .out_ready(rx_ready), .out_beat(rx_beat),
    .good_pkts(rx_good), .misrouted_pkts(rx_misrouted), .crc_errors(rx_crc_err),
    .overflow_pkts(rx_overflow), .frames_out(rx_frames));
endmodule
