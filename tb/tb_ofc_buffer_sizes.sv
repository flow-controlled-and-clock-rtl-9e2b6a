// tb_ofc_buffer_sizes: the cluster with each buffer block size it was evaluated with
// (2048, 4096, 8192 and 16384 bytes per block), under the same traffic.
//
// Four copies of the whole design run side by side; they differ only in BLOCK_BYTES.
// Each copy has its own eight server models: frames of random length 64..1518 bytes,
// half of them to another rack, offered at a load of LOAD_PCT % of a server link for
// GEN_SLOTS slots, then a drain. Frame ids and payload patterns let every receiving
// server check length, content and destination of each frame it gets, and the time of
// generation gives each frame's latency. For every size the test reports frames sent,
// delivered and dropped by full buffer blocks, packets lost to a full receive buffer,
// and mean and largest latency (1 cycle = 3.1 ns).
// Checks per size: every frame delivered intact exactly once, dropped by a full buffer
// block, or missing only where a receive-buffer overflow was counted; every ACKed packet
// received or counted as overflow; no CRC error; no output collision. Across sizes the
// evaluation's trend is checked: the smallest blocks drop at least as many frames as the
// largest, and the largest blocks do not give a lower mean latency than the smallest.
module tb_ofc_buffer_sizes;
  import ofc_pkg::*;

  localparam int unsigned N_TOR = 4, H = 2, NS = N_TOR * H;
  localparam int unsigned NSZ = 4;
  localparam int unsigned SIZES [NSZ] = '{2048, 4096, 8192, 16384};
  localparam int unsigned SLOT = 14 + 2600 / 4;
  localparam int unsigned GEN_SLOTS = 150;
  localparam int unsigned AVG_WORDS = 198;   // 792-byte mean frame
  localparam int unsigned LOAD_PCT = 60;

  logic clk = 1'b0, rst_n = 1'b0;
  always #1 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  function automatic int unsigned sum(input logic [31:0] v [N_TOR]);
    int unsigned r = 0;
    for (int t = 0; t < N_TOR; t++) r += v[t];
    return r;
  endfunction

  bit gen_on = 0;
  int unsigned drops_of [NSZ], lat_of [NSZ];
  bit done_of [NSZ];

  for (genvar g = 0; g < NSZ; g++) begin : g_sz
    logic         srv_tx_valid [NS], srv_tx_ready [NS], srv_rx_valid [NS], srv_rx_ready [NS];
    frame_beat_t  srv_tx_beat [NS], srv_rx_beat [NS];
    logic         synced [N_TOR];
    logic [15:0]  delay_cycles [N_TOR];
    logic [31:0]  pkts_sent [N_TOR], acks [N_TOR], nacks [N_TOR], rx_good [N_TOR];
    logic [31:0]  rx_misrouted [N_TOR], rx_crc_err [N_TOR], buf_drops [N_TOR], rx_overflow [N_TOR];
    logic [N_TOR-1:0] gate [N_TOR];
    logic         collision;
    logic [31:0]  decisions, contentions;

    ofc_system #(.BLOCK_BYTES(SIZES[g])) dut (.*);

    // ---------------- frames ----------------
    int unsigned next_id = 1;
    int unsigned exp_len [int unsigned];
    int unsigned exp_dst [int unsigned];
    longint unsigned t_made [int unsigned];   // cycle at which the frame was generated
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

    always @(posedge clk) begin
      if (gen_on)
        for (int s = 0; s < NS; s++)
          if (($urandom % (AVG_WORDS * 100)) < LOAD_PCT) begin
            int unsigned dst;
            if ($urandom % 2) dst = (s / H) * H + ($urandom % H);
            else begin
              dst = $urandom % NS;
              while (dst / H == s / H) dst = $urandom % NS;
            end
            new_frame(s, dst);
          end
    end

    // after generation: drain, then report and check this size
    initial begin
      int unsigned fs, fr, fd, ps, pn, pg, po;
      @(negedge gen_on);
      for (int k = 0; k < 300 && exp_len.size() > sum(buf_drops) && (k < 20 || sum(rx_overflow) == 0); k++)
        repeat (SLOT) @(posedge clk);
      repeat (4 * SLOT) @(posedge clk);
      fs = sent_frames; fr = recv_frames; fd = sum(buf_drops);
      ps = sum(pkts_sent); pn = sum(nacks); pg = sum(rx_good); po = sum(rx_overflow);
      $display("block %0d bytes: frames sent %0d received %0d dropped %0d; packets %0d nacked %0d received %0d rx-overflow %0d; latency mean %0d ns max %0d ns",
               SIZES[g], fs, fr, fd, ps, pn, pg, po,
               fr ? (lat_sum * 31 / 10) / fr : 0, lat_max * 31 / 10);
      check(fs > 0, $sformatf("size %0d: traffic generated", SIZES[g]));
      for (int t = 0; t < N_TOR; t++) check(synced[t], $sformatf("size %0d: ToR %0d synced", SIZES[g], t));
      check(fs == fr + fd || po > 0, $sformatf("size %0d: every frame delivered or dropped", SIZES[g]));
      check(exp_len.size() >= fd, $sformatf("size %0d: dropped frames never delivered", SIZES[g]));
      check(pg + po == ps - pn, $sformatf("size %0d: every ACKed packet received or counted", SIZES[g]));
      check(sum(rx_crc_err) == 0, $sformatf("size %0d: no CRC errors", SIZES[g]));
      drops_of[g] = fd;
      lat_of[g] = fr ? int'(lat_sum / fr) : 0;
      done_of[g] = 1;
    end
  end

  initial begin
    repeat (5) @(posedge clk);
    rst_n = 1'b1;
    repeat (3 * SLOT) @(posedge clk);
    gen_on = 1;
    repeat (GEN_SLOTS * SLOT) @(posedge clk);
    gen_on = 0;
    wait (done_of[0] && done_of[1] && done_of[2] && done_of[3]);
    check(drops_of[0] >= drops_of[NSZ-1], "smallest blocks drop at least as many frames as the largest");
    check(lat_of[NSZ-1] >= lat_of[0], "largest blocks give no lower mean latency than the smallest");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat ((GEN_SLOTS + 320) * SLOT) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
