// tb_tor: one ToR (rack 0, 2 servers) with a controller model on its label channel
// (10-cycle fiber each way; timestamp echo, time words, and a response per request
// that NACKs the first request and ACKs the rest) and a packet source on its data input.
// Checks: the ToR synchronises; server frames for rack 2 leave in optical packets for
// rack 2 whose frames and CRC are right; the NACKed packet is sent again unchanged;
// every frame is sent and ACKed exactly once in the end; intra-rack frames go straight
// from server 0 to server 1; frames in a packet arriving for rack 0 reach their server.
module tb_tor;
  import ofc_pkg::*;
  localparam int H = 2, SLOT = 664, PKT_WORDS = 650, D = 10;
  logic clk = 0, rst_n = 0;
  always #1 clk = ~clk;

  logic        srv_tx_valid [H], srv_tx_ready [H], srv_rx_valid [H], srv_rx_ready [H];
  frame_beat_t srv_tx_beat [H], srv_rx_beat [H];
  label_word_t label_rx, label_tx, up, dn;
  logic [31:0] data_tx, data_rx;
  logic        synced;
  logic [15:0] delay_cycles;
  logic [31:0] pkts_sent, acks, nacks, rx_good, rx_misrouted, rx_crc_err, rx_overflow,
               rx_frames, buf_drops;
  logic [31:0] occ_bytes [3];

  tor #(.MY_RACK(0)) dut (.*);
  fiber_link #(.WIDTH(32), .DELAY(D), .RESET_WORD(32'hAAAA_AAAA)) u_up (.clk, .rst_n, .din(label_tx), .dout(up));
  fiber_link #(.WIDTH(32), .DELAY(D), .RESET_WORD(32'hAAAA_AAAA)) u_dn (.clk, .rst_n, .din(dn), .dout(label_rx));

  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string m);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", m); end
  endtask
  function automatic logic [31:0] pat(input int id, input int k);
    return {id[15:0], k[15:0]} ^ 32'h7700_0000;
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

  // ---------------- controller model ----------------
  int c_off = 0, c_slot = 0, n_req = 0;
  label_word_t rxq;
  bit resp_due = 0;
  always @(posedge clk) begin
    if (!rst_n) begin rxq <= label_idle(); dn <= label_idle(); end
    else begin
      if (c_off == SLOT - 1) begin c_off <= 0; c_slot <= c_slot + 1; end else c_off <= c_off + 1;
      rxq <= up;
      dn <= label_idle();
      if (resp_due) begin dn <= label_resp((n_req == 1) ? 4'd1 : 4'd2); resp_due = 0; end
      else if (rxq.typ == L_TS_REQ) begin dn <= rxq; dn.typ <= L_TS_ECHO; end
      else if (c_off == SLOT / 2) begin dn.typ <= L_TIME; dn.payload <= 28'({16'(c_slot), 10'(c_off)}); end
      if (up.typ == L_REQ) begin
        n_req++;
        chk(up.payload[27:24] == 4'd2, "request for rack 2");
        resp_due = 1;
      end
    end
  end

  // ---------------- servers ----------------
  int fq [H][$];
  int f_len [int], f_dst [int];   // dst = rack*H + server
  int sent_inter [$];
  int next_id = 1;
  for (genvar s = 0; s < H; s++) begin : g_s
    int k = 0;
    always_comb begin
      srv_tx_valid[s] = fq[s].size() != 0;
      srv_tx_beat[s] = '0;
      if (fq[s].size() != 0) begin
        int id;
        id = fq[s][0];
        srv_tx_beat[s].len = 16'(f_len[id]);
        srv_tx_beat[s].last = (k == (f_len[id] + 3) / 4 - 1);
        srv_tx_beat[s].data = (k == 0) ? {16'h0200, 8'(f_dst[id] / H), 8'(f_dst[id] % H)}
                            : (k == 1) ? id : pat(id, k);
      end
    end
    always @(posedge clk) if (rst_n && srv_tx_valid[s] && srv_tx_ready[s]) begin
      if (srv_tx_beat[s].last) begin k <= 0; void'(fq[s].pop_front()); end else k <= k + 1;
    end
    assign srv_rx_ready[s] = 1'b1;
    int rk = 0, rid = 0;
    always @(posedge clk) if (rst_n && srv_rx_valid[s]) begin
      if (rk == 1) begin
        rid = srv_rx_beat[s].data;
        chk(f_dst.exists(rid) && f_dst[rid] == s, $sformatf("frame %0d at server %0d", rid, s));
      end else if (rk > 1) chk(srv_rx_beat[s].data == pat(rid, rk), "received word");
      if (srv_rx_beat[s].last) begin
        chk(f_len.exists(rid) && rk + 1 == (f_len[rid] + 3) / 4, "received length");
        f_dst.delete(rid);
        rk = 0;
      end else rk++;
    end
  end

  // ---------------- data channel monitor ----------------
  logic [31:0] pkt [PKT_WORDS], prev [PKT_WORDS];
  int pw = -1, n_pkt = 0, n_same = 0;
  int acked [int];
  always @(posedge clk) if (rst_n) begin
    if (pw < 0 && data_tx == START_WORD) pw = 0;
    if (pw >= 0) begin
      pkt[pw] = data_tx;
      pw++;
      if (pw == PKT_WORDS) begin
        logic [31:0] c;
        int w;
        pw = -1;
        n_pkt++;
        chk(pkt[1] == {16'd0, 16'd2}, "address word");
        c = 32'hFFFF_FFFF;
        for (int i = 1; i < PKT_WORDS - 1; i++) c = crc_ref(c, pkt[i]);
        chk(pkt[PKT_WORDS-1] == ~c, "CRC");
        if (n_pkt == 2) begin
          bit same;
          same = 1;
          for (int i = 0; i < PKT_WORDS; i++) if (pkt[i] != prev[i]) same = 0;
          chk(same, "NACKed packet repeated unchanged");
        end
        w = 2;
        if (n_pkt >= 2)
          while (w < PKT_WORDS - 1 && pkt[w][31:24] == 8'hFD) begin
            int id;
            id = pkt[w+2];
            chk(!acked.exists(id), "frame ACKed once");
            acked[id] = 1;
            w += (pkt[w][15:0] + 3) / 4 + 1;
          end
        prev = pkt;
      end
    end
  end

  task automatic send_rx_packet(input int ids [$]);
    logic [31:0] p [PKT_WORDS];
    logic [31:0] c;
    int w;
    p[0] = START_WORD; p[1] = {16'd3, 16'd0}; w = 2;
    foreach (ids[f]) begin
      p[w++] = {8'hFD, 8'h00, 16'(f_len[ids[f]])};
      p[w++] = {16'h0200, 8'd0, 8'(f_dst[ids[f]] % H)};
      p[w++] = ids[f];
      for (int k = 2; k < (f_len[ids[f]] + 3) / 4; k++) p[w++] = pat(ids[f], k);
    end
    while (w < PKT_WORDS - 1) p[w++] = IDLE_WORD;
    c = 32'hFFFF_FFFF;
    for (int i = 1; i < PKT_WORDS - 1; i++) c = crc_ref(c, p[i]);
    p[PKT_WORDS-1] = ~c;
    for (int i = 0; i < PKT_WORDS; i++) begin data_rx = p[i]; @(negedge clk); end
    data_rx = IDLE_WORD;
  endtask

  initial begin
    int rxids [$];
    data_rx = IDLE_WORD;
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (3 * SLOT) @(negedge clk);
    chk(synced && delay_cycles == 16'(D), "synchronised, delay measured");
    // inter-rack frames to rack 2, intra-rack frames server 0 -> server 1
    for (int n = 0; n < 10; n++) begin
      int id;
      id = next_id++;
      f_len[id] = 100 + 150 * n; f_dst[id] = 2 * H + (n % H);
      fq[n % H].push_back(id);
      sent_inter.push_back(id);
    end
    for (int n = 0; n < 3; n++) begin
      int id;
      id = next_id++;
      f_len[id] = 300; f_dst[id] = 1;
      fq[0].push_back(id);
    end
    // a packet from rack 3 with frames for servers 0 and 1
    for (int n = 0; n < 3; n++) begin
      int id;
      id = next_id++;
      f_len[id] = 200 + 100 * n; f_dst[id] = n % H;
      rxids.push_back(id);
    end
    repeat (50) @(negedge clk);
    send_rx_packet(rxids);
    repeat (12 * SLOT) @(negedge clk);
    chk(nacks == 1 && acks == pkts_sent - 1, $sformatf("one NACK, rest ACK (%0d/%0d/%0d)", pkts_sent, acks, nacks));
    chk(acked.size() == 10, $sformatf("all inter-rack frames ACKed (%0d)", acked.size()));
    foreach (sent_inter[i]) chk(acked.exists(sent_inter[i]), "frame carried");
    chk(occ_bytes[1] == 0, "block for rack 2 empty");
    chk(rx_good == 1, "packet for rack 0 accepted");
    // only inter-rack frames may remain in f_dst: intra and received ones were delivered
    begin
      int left;
      left = 0;
      foreach (f_dst[id]) if (f_dst[id] < H) left++;
      chk(left == 0, $sformatf("local frames delivered (%0d left)", left));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
