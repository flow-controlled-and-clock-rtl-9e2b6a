// tb_ofc_workloads: the traffic mixes the cluster was evaluated with, run on the whole
// design at its default parameters (4 racks x 2 servers, 8192-byte buffer blocks,
// 2600-byte packets).
//
// Every server generates frames of random length, 64..1518 bytes (792 on average),
// at a load of 0.5: in each cycle a server starts a new frame with probability
// LOAD / (average frame words), so its link to the ToR is busy half the time. A frame
// stays in the rack with the probability of the case, otherwise it goes to a random
// server of another rack. The four cases are run one after the other:
//   A 50 % intra-rack, B 65 %, C 85 %, D 100 %.
// Each case generates traffic for GEN_SLOTS slots and then drains. For each case the
// test reports frames sent, received and dropped by full buffer blocks, optical packets
// sent, NACKed and received, and the mean and largest frame latency from generation
// to delivery (cycles and ns; 1 cycle = 3.1 ns).
// Checks: every ACKed packet arrives with a good CRC at its rack or is counted as
// thrown away by a full receive buffer; every frame is delivered intact exactly once,
// dropped by a full buffer block, or lost only in such a counted receive overflow; no
// CRC error and no output collision. Beyond this, the expected outcome
// of the evaluation at load 0.5 is checked: no buffer-overflow loss in cases C and D, and
// no optical packet at all in case D.
// A last phase repeats the many-to-one experiment: one server in each of racks 0, 1
// and 2 sends to the same server of rack 3 at about a third of the link each (3.2 Gb/s),
// with ToR priority 0 > 1 > 2. The highest-priority source must lose no frame and see
// the lowest mean latency; delivered frames and latency per source are reported. Real
// TCP end hosts (window and retransmission) are not modelled: sources offer a fixed
// load and wait when their ToR is not ready.
// Frame ids and payload patterns are the same as in the end-to-end test, so each
// receiving server can check length, content and destination of every frame.
module tb_ofc_workloads;
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
  longint unsigned t_made [int unsigned];   // cycle at which the frame was generated
  int unsigned src_of [int unsigned];       // server that generated the frame
  longint unsigned lat_src [NS];            // latency sum and count per source server
  int unsigned n_src [NS];
  longint unsigned cyc = 0;
  longint unsigned lat_sum = 0, lat_max = 0;
  always @(posedge clk) cyc <= cyc + 1;
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
    t_made[id] = cyc;
    src_of[id] = src;
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
            if (cyc - t_made[rid] > lat_max) lat_max = cyc - t_made[rid];
            lat_sum += cyc - t_made[rid];
            lat_src[src_of[rid]] += cyc - t_made[rid];
            n_src[src_of[rid]]++;
            src_of.delete(rid);
            exp_len.delete(rid);
            exp_dst.delete(rid);
            t_made.delete(rid);
          end
          recv_frames++;
          rk = 0;
        end else rk++;
      end
    end
  end

  always @(posedge clk)
    if (rst_n && collision) check(1'b0, "two inputs on one output");

  localparam int unsigned SLOT = 14 + 2600 / 4;
  localparam int unsigned GEN_SLOTS = 150;
  localparam int unsigned AVG_WORDS = 198;   // 792-byte mean frame
  localparam int unsigned LOAD_PCT = 50;

  bit gen_on = 0, tcp_on = 0;
  int unsigned intra_pct = 50;
  localparam int unsigned TCP_PCT = 31;       // about 3.2 Gb/s per source server
  always @(posedge clk) begin
    // many-to-one: server 0 of racks 0, 1 and 2 all send to server 0 of rack 3
    if (tcp_on)
      for (int r = 0; r < 3; r++)
        if (($urandom % (AVG_WORDS * 100)) < TCP_PCT) new_frame(r * H, 3 * H);
    if (gen_on)
      for (int s = 0; s < NS; s++)
        if (($urandom % (AVG_WORDS * 100)) < LOAD_PCT) begin
          int unsigned dst;
          if (($urandom % 100) < intra_pct) dst = (s / H) * H + ($urandom % H);
          else begin
            dst = $urandom % NS;
            while (dst / H == s / H) dst = $urandom % NS;
          end
          new_frame(s, dst);
        end
  end

  function automatic int unsigned sum(input logic [31:0] v [N_TOR]);
    int unsigned r = 0;
    for (int t = 0; t < N_TOR; t++) r += v[t];
    return r;
  endfunction

  initial begin
    int unsigned pct [4] = '{50, 65, 85, 100};
    string name [4] = '{"A", "B", "C", "D"};
    int unsigned s0, r0, d0, p0, n0, g0, c0, o0;
    repeat (5) @(posedge clk);
    rst_n = 1'b1;
    repeat (3 * SLOT) @(posedge clk);
    for (int t = 0; t < N_TOR; t++) check(synced[t], $sformatf("ToR %0d synced", t));
    for (int c = 0; c < 4; c++) begin
      int unsigned fs, fr, fd, ps, pn, pg, pc, po;
      s0 = sent_frames; r0 = recv_frames; d0 = sum(buf_drops);
      p0 = sum(pkts_sent); n0 = sum(nacks); g0 = sum(rx_good); c0 = sum(rx_crc_err); o0 = sum(rx_overflow);
      lat_sum = 0; lat_max = 0;
      intra_pct = pct[c];
      gen_on = 1;
      repeat (GEN_SLOTS * SLOT) @(posedge clk);
      gen_on = 0;
      // drain: wait until every generated frame is delivered or dropped
      for (int k = 0; k < 200 && exp_len.size() > sum(buf_drops) && (k < 20 || sum(rx_overflow) == o0); k++)
        repeat (SLOT) @(posedge clk);
      repeat (4 * SLOT) @(posedge clk);
      fs = sent_frames - s0; fr = recv_frames - r0; fd = sum(buf_drops) - d0;
      ps = sum(pkts_sent) - p0; pn = sum(nacks) - n0; pg = sum(rx_good) - g0;
      pc = sum(rx_crc_err) - c0; po = sum(rx_overflow) - o0;
      $display("case %s (%0d %% intra, load 0.%0d): frames sent %0d received %0d dropped %0d; packets %0d nacked %0d received %0d rx-overflow %0d; latency mean %0d ns max %0d ns",
               name[c], pct[c], LOAD_PCT / 10, fs, fr, fd, ps, pn, pg, po,
               fr ? (lat_sum * 31 / 10) / fr : 0, lat_max * 31 / 10);
      check(fs > 0, $sformatf("case %s generated traffic", name[c]));
      // The only loss allowed besides a full buffer block is a whole packet thrown away
      // by a full receive buffer, which is counted.
      check(fs == fr + fd || po > 0, $sformatf("case %s: every frame delivered or dropped", name[c]));
      check(pg + po == ps - pn, $sformatf("case %s: every ACKed packet received or counted as overflow", name[c]));
      check(pc == 0, $sformatf("case %s: no CRC errors", name[c]));
      if (pct[c] >= 85) check(fd == 0 && po == 0, $sformatf("case %s: no buffer overflow at load 0.5", name[c]));
      if (pct[c] == 100) check(ps == 0, "case D: no optical packets");
    end
    // many-to-one phase, priority ToR 0 > ToR 1 > ToR 2
    begin
      int unsigned d0r [N_TOR], o0x, fs0, fr0;
      longint unsigned mean [3];
      for (int t = 0; t < N_TOR; t++) d0r[t] = buf_drops[t];
      o0x = sum(rx_overflow); fs0 = sent_frames; fr0 = recv_frames;
      for (int s = 0; s < NS; s++) begin lat_src[s] = 0; n_src[s] = 0; end
      tcp_on = 1;
      repeat (GEN_SLOTS * SLOT) @(posedge clk);
      tcp_on = 0;
      for (int k = 0; k < 200 && exp_len.size() > sum(buf_drops) && (k < 20 || sum(rx_overflow) == o0x); k++)
        repeat (SLOT) @(posedge clk);
      repeat (4 * SLOT) @(posedge clk);
      for (int r = 0; r < 3; r++) begin
        mean[r] = n_src[r * H] ? lat_src[r * H] / n_src[r * H] : 0;
        $display("many-to-one: rack %0d source delivered %0d frames, dropped %0d, mean latency %0d ns",
                 r, n_src[r * H], buf_drops[r] - d0r[r], mean[r] * 31 / 10);
      end
      check(recv_frames > fr0, "many-to-one: frames delivered");
      check(sum(rx_overflow) == o0x, "many-to-one: no receive overflow");
      check(buf_drops[0] == d0r[0], "many-to-one: highest-priority source loses nothing");
      check(mean[0] <= mean[1] && mean[0] <= mean[2],
            "many-to-one: highest-priority source has the lowest latency");
      check(sent_frames - fs0 == recv_frames - fr0 + sum(buf_drops) - sum(d0r),
            "many-to-one: every frame delivered or dropped");
    end
    check(exp_len.size() >= sum(buf_drops), "dropped frames never delivered");
    check(exp_len.size() == sum(buf_drops) || sum(rx_overflow) > 0,
          "frames missing only where a receive buffer overflowed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5 * 360 * SLOT) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
