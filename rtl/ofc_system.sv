// ofc_system: a cluster of N_TOR racks joined by one optical switch, with label control,
// optical flow control and clock distribution.
//
// Each ToR sends one optical data packet per time slot to the N x N optical switch and,
// on a separate label channel, tells the switch controller where that packet should go.
// The controller resolves contention by priority, sets the switch, sends losing packets
// to idle outputs instead of dropping them, and answers every ToR with ACK or NACK; a
// NACKed ToR sends the same frames again in the next slot, so contention loses no
// frames even though the switch has no buffer. The label channels also carry the
// controller's time (so all ToRs' slots meet at the switch despite unequal fibers) and,
// in the real system, its clock: here one clock input stands for that distributed
// clock, which is what lets a receiver lock onto a packet within one word.
// Channels: every ToR has a label fiber and a data fiber to the switch site and back,
// modelled by fiber_link with per-ToR delay FIBER_DELAY[t] (cycles of 3.1 ns); data and
// label fibers of one ToR are taken to be equally long. Server ports are flattened:
// server s of rack t is index t*H + s. ToR t has label priority t (ToR 0 highest), as in
// the document's experiment.
module ofc_system
  import ofc_pkg::*;
#(
  parameter int unsigned N_TOR       = 4,
  parameter int unsigned H           = 2,
  parameter int unsigned NSUB        = 4,
  parameter int unsigned BLOCK_BYTES = 8192,
  parameter int unsigned PKT_BYTES   = 2600,
  parameter int unsigned RXBUF_BYTES = 4096,
  parameter int unsigned IPG         = 14,
  parameter int unsigned FIBER_DELAY [N_TOR] = '{103, 110, 118, 125},
  localparam int unsigned SLOT = IPG + PKT_BYTES / 4,
  localparam int unsigned NS = N_TOR * H
) (
  input  logic         clk,        // the controller's clock, distributed to all nodes
  input  logic         rst_n,
  input  logic         srv_tx_valid [NS],
  output logic         srv_tx_ready [NS],
  input  frame_beat_t  srv_tx_beat  [NS],
  output logic         srv_rx_valid [NS],
  input  logic         srv_rx_ready [NS],
  output frame_beat_t  srv_rx_beat  [NS],
  output logic         synced       [N_TOR],
  output logic [15:0]  delay_cycles [N_TOR],
  output logic [31:0]  pkts_sent    [N_TOR],
  output logic [31:0]  acks         [N_TOR],
  output logic [31:0]  nacks        [N_TOR],
  output logic [31:0]  rx_good      [N_TOR],
  output logic [31:0]  rx_misrouted [N_TOR],
  output logic [31:0]  rx_crc_err   [N_TOR],
  output logic [31:0]  buf_drops    [N_TOR],
  output logic [31:0]  rx_overflow  [N_TOR],  // packets lost to a full receive buffer
  output logic [N_TOR-1:0] gate     [N_TOR],
  output logic         collision,
  output logic [31:0]  decisions,
  output logic [31:0]  contentions
);
  label_word_t  lab_up_tor [N_TOR], lab_up_sw [N_TOR];
  label_word_t  lab_dn_sw  [N_TOR], lab_dn_tor [N_TOR];
  logic [W-1:0] dat_up_tor [N_TOR], dat_up_sw [N_TOR];
  logic [W-1:0] dat_dn_sw  [N_TOR], dat_dn_tor [N_TOR];
  logic [SLOT_W-1:0] c_slot;
  logic [OFF_W-1:0]  c_off;

  for (genvar t = 0; t < N_TOR; t++) begin : g_tor
    logic        tx_v [H], tx_r [H], rx_v [H], rx_r [H];
    frame_beat_t tx_b [H], rx_b [H];
    logic [31:0] frames;
    logic [31:0] occ [N_TOR-1];

    for (genvar s = 0; s < H; s++) begin : g_srv
      assign tx_v[s] = srv_tx_valid[t*H+s];
      assign tx_b[s] = srv_tx_beat[t*H+s];
      assign srv_tx_ready[t*H+s] = tx_r[s];
      assign srv_rx_valid[t*H+s] = rx_v[s];
      assign srv_rx_beat[t*H+s]  = rx_b[s];
      assign rx_r[s] = srv_rx_ready[t*H+s];
    end

    tor #(.N_TOR(N_TOR), .H(H), .MY_RACK(t), .PRIORITY(t), .NSUB(NSUB),
          .BLOCK_BYTES(BLOCK_BYTES), .PKT_BYTES(PKT_BYTES), .RXBUF_BYTES(RXBUF_BYTES),
          .IPG(IPG), .SLOT(SLOT)) u_tor (
      .clk, .rst_n,
      .srv_tx_valid(tx_v), .srv_tx_ready(tx_r), .srv_tx_beat(tx_b),
      .srv_rx_valid(rx_v), .srv_rx_ready(rx_r), .srv_rx_beat(rx_b),
      .label_rx(lab_dn_tor[t]), .label_tx(lab_up_tor[t]),
      .data_tx(dat_up_tor[t]), .data_rx(dat_dn_tor[t]),
      .synced(synced[t]), .delay_cycles(delay_cycles[t]),
      .pkts_sent(pkts_sent[t]), .acks(acks[t]), .nacks(nacks[t]),
      .rx_good(rx_good[t]), .rx_misrouted(rx_misrouted[t]), .rx_crc_err(rx_crc_err[t]),
      .rx_overflow(rx_overflow[t]), .rx_frames(frames), .buf_drops(buf_drops[t]), .occ_bytes(occ));

    fiber_link #(.WIDTH(W), .DELAY(FIBER_DELAY[t]), .RESET_WORD(label_idle())) u_lab_up (
      .clk, .rst_n, .din(lab_up_tor[t]), .dout(lab_up_sw[t]));
    fiber_link #(.WIDTH(W), .DELAY(FIBER_DELAY[t]), .RESET_WORD(label_idle())) u_lab_dn (
      .clk, .rst_n, .din(lab_dn_sw[t]), .dout(lab_dn_tor[t]));
    fiber_link #(.WIDTH(W), .DELAY(FIBER_DELAY[t]), .RESET_WORD(IDLE_WORD)) u_dat_up (
      .clk, .rst_n, .din(dat_up_tor[t]), .dout(dat_up_sw[t]));
    fiber_link #(.WIDTH(W), .DELAY(FIBER_DELAY[t]), .RESET_WORD(IDLE_WORD)) u_dat_dn (
      .clk, .rst_n, .din(dat_dn_sw[t]), .dout(dat_dn_tor[t]));
  end

  switch_controller #(.N(N_TOR), .SLOT(SLOT), .TIME_OFF(SLOT / 2)) u_controller (
    .clk, .rst_n, .label_rx(lab_up_sw), .label_tx(lab_dn_sw), .gate,
    .slot_idx(c_slot), .slot_off(c_off), .decisions, .contentions);

  optical_switch_model #(.N(N_TOR), .WIDTH(W)) u_switch (
    .din(dat_up_sw), .gate, .dout(dat_dn_sw), .collision);
endmodule
