// tb_packet_receiver: builds optical data packets itself (start word, address, frames,
// idle filler, CRC-32 computed here) and sends them, with idle words between, to the
// receiver of rack 2. Checks: frames of a good packet come out intact and in order;
// a packet with a corrupted word is discarded and counted as a CRC error; a packet for
// another rack is discarded and counted as misrouted; back-to-back packets with only a
// 14-word gap all arrive (the 4096-byte buffer drains while it fills); a packet is
// recognised from its single start word.
module tb_packet_receiver;
  import ofc_pkg::*;
  localparam int PKT_WORDS = 650;
  logic clk = 0, rst_n = 0;
  always #1 clk = ~clk;

  logic [31:0] data_in;
  logic        out_valid, out_ready;
  frame_beat_t out_beat;
  logic [31:0] good_pkts, misrouted_pkts, crc_errors, overflow_pkts, frames_out;

  packet_receiver #(.MY_RACK(2)) dut (.*);

  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string m);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", m); end
  endtask

  function automatic logic [31:0] pat(input int id, input int k);
    return {id[15:0], k[15:0]} ^ 32'h0F0F_0000;
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

  // expected frames at the output
  int exp_id [$], exp_len [$];
  int next_id = 1;

  task automatic send_packet(input int dst, input int nfr, input bit corrupt, input bit expect_ok);
    logic [31:0] p [PKT_WORDS];
    logic [31:0] c;
    int w;
    p[0] = START_WORD;
    p[1] = {16'd0, 16'(dst)};
    w = 2;
    for (int f = 0; f < nfr; f++) begin
      int len, nw, id;
      len = 64 + ($urandom % 500);
      nw = (len + 3) / 4;
      id = next_id++;
      p[w++] = {8'hFD, 8'h00, 16'(len)};
      p[w++] = id;
      for (int k = 1; k < nw; k++) p[w++] = pat(id, k);
      if (expect_ok) begin exp_id.push_back(id); exp_len.push_back(len); end
    end
    while (w < PKT_WORDS - 1) p[w++] = IDLE_WORD;
    c = 32'hFFFF_FFFF;
    for (int i = 1; i < PKT_WORDS - 1; i++) c = crc_ref(c, p[i]);
    p[PKT_WORDS-1] = ~c;
    if (corrupt) p[5] = p[5] ^ 32'h0000_0100;
    for (int i = 0; i < PKT_WORDS; i++) begin data_in = p[i]; @(negedge clk); end
    data_in = IDLE_WORD;
  endtask

  // output monitor
  int rk = 0, rid = 0, got = 0;
  always @(posedge clk) begin
    if (rst_n && out_valid && out_ready) begin
      if (rk == 0) begin
        rid = out_beat.data;
        chk(exp_id.size() != 0 && rid == exp_id[0], $sformatf("frame id %0d", rid));
        chk(exp_len.size() != 0 && 32'(out_beat.len) == exp_len[0], "frame length");
      end else chk(out_beat.data == pat(rid, rk), "frame word");
      if (out_beat.last) begin
        chk(rk + 1 == (exp_len[0] + 3) / 4, "frame ends on its last word");
        void'(exp_id.pop_front()); void'(exp_len.pop_front());
        rk = 0; got++;
      end else rk++;
    end
  end

  initial begin
    data_in = IDLE_WORD; out_ready = 1;
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (20) @(negedge clk);
    send_packet(2, 4, 0, 1);
    repeat (14) @(negedge clk);
    send_packet(2, 5, 1, 0);             // corrupted
    repeat (14) @(negedge clk);
    send_packet(1, 4, 0, 0);             // for rack 1
    repeat (14) @(negedge clk);
    for (int i = 0; i < 4; i++) begin    // back to back
      send_packet(2, 3 + i, 0, 1);
      repeat (14) @(negedge clk);
    end
    repeat (1000) @(negedge clk);
    chk(good_pkts == 5, $sformatf("good %0d", good_pkts));
    chk(crc_errors == 1, "one CRC error");
    chk(misrouted_pkts == 1, "one misrouted");
    chk(overflow_pkts == 0, "no overflow");
    chk(exp_id.size() == 0 && got == 4 + 3 + 4 + 5 + 6, $sformatf("all frames out: %0d", got));
    chk(frames_out == 32'(got), "frame counter");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
