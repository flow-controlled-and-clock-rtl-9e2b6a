// tb_ofc_system: end-to-end test of the optical cluster at its default parameters
// (4 racks, 2 servers each, 8192-byte buffer blocks, 2600-byte packets, 664-cycle slots).
//
// Eight server models send Ethernet frames of random length (64..1518 bytes). Each frame
// carries its id in word 1 and a pattern derived from the id in every later word, so a
// receiving server can check length, content and destination of every frame it gets.
// Phase A: light random traffic, half intra-rack and half inter-rack.
// Phase B: every server sends to rack 3 at once, forcing contention, NACKs,
//          retransmissions and buffer-block overflow.
// At the end every frame sent must have been received intact exactly once or counted as
// discarded by a full buffer block. The test also checks the measured channel delays,
// that no output ever took two inputs, that no CRC error occurred, and counts each
// mechanism of the design (sync, contention, retransmission, misrouted-packet discard,
// multicast fill, idle-stream fill, intra-rack forwarding, buffer overflow); each must
// happen at least once.
module tb_ofc_system;
  import ofc_pkg::*;

  localparam int unsigned N_TOR = 4, H = 2, NS = N_TOR * H;
  localparam int unsigned FD [N_TOR] = '{103, 110, 118, 125};

  logic clk = 1'b0, rst_n = 1'b0;
  always #1 clk = ~clk;

  logic         srv_tx_valid [NS], srv_tx_ready [NS], srv_rx_valid [NS], srv_rx_ready [NS];
  frame_beat_t  srv_tx_beat [NS], srv_rx_beat [NS];
  logic         synced [N_TOR];
  logic [15:0]  delay_cycles [N_TOR];
  logic [31:0]  pkts_sent [N_TOR], acks [N_TOR], nacks [N_TOR], rx_good [N_TOR];
  logic [31:0]  rx_misrouted [N_TOR], rx_crc_err [N_TOR], buf_drops [N_TOR], rx_overflow [N_TOR];
  logic [N_TOR-1:0] gate [N_TOR];
  logic         collision;
  logic [31:0]  decisions, contentions;

  ofc_system dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  // ---------------- frames ----------------
  int unsigned next_id = 1;
  int unsigned exp_len [int unsigned];
  int unsigned exp_dst [int unsigned];
  int unsigned sent_frames = 0, recv_frames = 0, intra_frames = 0;

  function automatic logic [31:0] pat(input int unsigned id, input int unsigned k);
    return (id * 32'h9E37_79B9) ^ (k * 32'h85EB_CA6B) ^ 32'h1234_5678;
  endfunction

  int unsigned q [NS][$];
  int unsigned wk [NS];

  task automatic new_frame(input int unsigned src, input int unsigned dst_srv);
    int unsigned id;
    id = next_id++;
    exp_len[id] = 64 + ($urandom % 1455);
    exp_dst[id] = dst_srv;
    q[src].push_back(id);
    if (src / H == dst_srv / H) intra_frames++;
  endtask

  for (genvar s = 0; s < NS; s++) begin : g_drv
    always_comb begin
      srv_tx_valid[s] = (q[s].size() != 0);
      srv_tx_beat[s]  = '0;
      if (q[s].size() != 0) begin
        int unsigned id, nw;
        id = q[s][0];
        nw = (exp_len[id] + 3) / 4;
        srv_tx_beat[s].len  = 16'(exp_len[id]);
        srv_tx_beat[s].last = (wk[s] == nw - 1);
        srv_tx_beat[s].data = (wk[s] == 0) ? {16'h0200, 8'(exp_dst[id] / H), 8'(exp_dst[id] % H)}
                            : (wk[s] == 1) ? id : pat(id, wk[s]);
      end
    end
    always @(posedge clk) begin
      if (rst_n && srv_tx_valid[s] && srv_tx_ready[s]) begin
        if (srv_tx_beat[s].last) begin
          wk[s] <= 0;
          void'(q[s].pop_front());
          sent_frames++;
        end else wk[s] <= wk[s] + 1;
      end
    end

    // receiving server
    assign srv_rx_ready[s] = 1'b1;
    int unsigned rk = 0, rid = 0;
    bit rok = 1;
    always @(posedge clk) begin
      if (rst_n && srv_rx_valid[s]) begin
        logic [31:0] d;
        d = srv_rx_beat[s].data;
        if (rk == 0) rok = (d[15:8] == 8'(s / H)) && (d[7:0] == 8'(s % H));
        else if (rk == 1) begin
          rid = d;
          rok = rok && exp_len.exists(rid) && exp_dst[rid] == s &&
                32'(srv_rx_beat[s].len) == exp_len[rid];
        end else rok = rok && (d == pat(rid, rk));
        if (srv_rx_beat[s].last) begin
          rok = rok && exp_len.exists(rid) && rk + 1 == (exp_len[rid] + 3) / 4;
          check(rok, $sformatf("frame %0d at server %0d", rid, s));
          if (exp_len.exists(rid)) begin
            exp_len.delete(rid);
            exp_dst.delete(rid);
          end
          recv_frames++;
          rk = 0;
        end else rk++;
      end
    end
  end

  // ---------------- mechanism monitors ----------------
  int unsigned n_multicast = 0, n_idle_fill = 0, n_retx_ack = 0, n_decide = 0;
  bit had_nack [N_TOR];
  always @(posedge clk) begin
    if (rst_n) begin
      if (collision) check(1'b0, "two inputs on one output");
      if (dut.u_controller.decide) begin
        n_decide++;
        for (int i = 0; i < N_TOR; i++) begin
          int unsigned fan;
          fan = 0;
          for (int j = 0; j < N_TOR; j++)
            if (dut.u_controller.sel_v[j] && dut.u_controller.sel[j] == 4'(i)) fan++;
          if (fan > 1) n_multicast++;
          if (fan > 0 && !dut.u_controller.req_v[i]) n_idle_fill++;
        end
      end
    end
  end
  for (genvar t = 0; t < N_TOR; t++) begin : g_mon
    logic [31:0] last_acks = 0, last_nacks = 0;
    always @(posedge clk) begin
      if (nacks[t] != last_nacks) had_nack[t] = 1;
      if (acks[t] != last_acks && had_nack[t]) begin n_retx_ack++; had_nack[t] = 0; end
      last_acks <= acks[t];
      last_nacks <= nacks[t];
    end
  end

  // ---------------- stimulus ----------------
  int unsigned slot_cycles;
  initial begin
    int unsigned tot_mis, tot_crc, tot_drop, tot_nack, tot_good, tot_sent;
    slot_cycles = 14 + 2600 / 4;
    repeat (5) @(posedge clk);
    rst_n = 1'b1;
    // synchronisation
    repeat (3 * slot_cycles) @(posedge clk);
    for (int t = 0; t < N_TOR; t++) begin
      check(synced[t], $sformatf("ToR %0d synced", t));
      check(delay_cycles[t] == 16'(FD[t]), $sformatf("ToR %0d delay %0d, expected %0d",
            t, delay_cycles[t], FD[t]));
    end
    // phase A: light random traffic, 50 % intra-rack
    for (int k = 0; k < 120; k++) begin
      int unsigned src, dst;
      src = $urandom % NS;
      if ($urandom % 2) dst = (src / H) * H + ($urandom % H);
      else begin
        dst = $urandom % NS;
        while (dst / H == src / H) dst = $urandom % NS;
      end
      new_frame(src, dst);
      repeat (150) @(posedge clk);
    end
    // phase B: everyone to rack 3 at once
    for (int k = 0; k < 14; k++)
      for (int s = 0; s < NS; s++)
        if (s / H != 3) new_frame(s, 3 * H + (k % H));
    // drain
    repeat (80 * slot_cycles) @(posedge clk);

    tot_mis = 0; tot_crc = 0; tot_drop = 0; tot_nack = 0; tot_good = 0; tot_sent = 0;
    for (int t = 0; t < N_TOR; t++) begin
      tot_mis  += rx_misrouted[t];
      tot_crc  += rx_crc_err[t];
      tot_drop += buf_drops[t];
      tot_nack += nacks[t];
      tot_good += rx_good[t];
      tot_sent += pkts_sent[t];
      check(acks[t] + nacks[t] == pkts_sent[t], $sformatf("ToR %0d: every packet answered", t));
    end
    $display("frames sent %0d received %0d dropped %0d intra %0d; packets %0d good %0d",
             sent_frames, recv_frames, tot_drop, intra_frames, tot_sent, tot_good);
    $display("nacks %0d misrouted %0d multicast %0d idle-fill %0d retx-acked %0d decisions %0d",
             tot_nack, tot_mis, n_multicast, n_idle_fill, n_retx_ack, decisions);
    for (int t = 0; t < N_TOR; t++)
      $display("ToR %0d: sent %0d ack %0d nack %0d good %0d mis %0d", t, pkts_sent[t], acks[t], nacks[t], rx_good[t], rx_misrouted[t]);
    check(tot_crc == 0, "no CRC errors");
    check(sent_frames == recv_frames + tot_drop, "every frame delivered or counted as dropped");
    check(exp_len.size() == tot_drop, "undelivered frames equal dropped frames");
    check(tot_good == tot_sent - tot_nack, "every ACKed packet received, no NACKed one");
    // mechanisms
    check(tot_nack > 0,      "contention (NACK) happened");
    check(n_retx_ack > 0,    "retransmission ended in ACK");
    check(tot_mis > 0,       "losing packet sent to an un-destined rack and discarded");
    check(n_multicast > 0,   "multicast fill happened");
    check(n_idle_fill > 0,   "idle stream fill happened");
    check(intra_frames > 0,  "intra-rack forwarding happened");
    check(tot_drop > 0,      "buffer-block overflow happened");
    check(contentions > 0,   "controller saw contention");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
