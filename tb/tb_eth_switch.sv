// tb_eth_switch: the Ethernet switch of rack 1 (2 servers, racks 0..3). Three inputs
// (two servers and the packet receiver) send random frames at once, to random servers
// of this rack, to other racks, and a few to a server that does not exist; outputs
// apply random back-pressure. Checks: each frame appears whole, uninterleaved, on the
// right output (server port, or the buffer block of its rack), frames from one input to
// one output keep their order, frames from the receiver always go to a server, and
// unknown servers are counted as dropped.
module tb_eth_switch;
  import ofc_pkg::*;
  localparam int H = 2, NIN = 3, NOUT = 5, MY = 1;
  logic clk = 0, rst_n = 0;
  always #1 clk = ~clk;

  logic in_valid [NIN], in_ready [NIN], out_valid [NOUT], out_ready [NOUT];
  frame_beat_t in_beat [NIN], out_beat [NOUT];
  logic [31:0] dropped;

  eth_switch #(.H(H), .N_TOR(4), .MY_RACK(MY)) dut (.*);

  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string m);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", m); end
  endtask

  function automatic int out_of(input int rack, input int srv);
    if (rack == MY) return srv;
    return H + ((rack < MY) ? rack : rack - 1);
  endfunction

  int fq [NIN][$];          // frame ids queued per input
  int f_len [int], f_rack [int], f_srv [int], f_src [int];
  int exp_q [NIN][NOUT][$]; // expected order per input/output
  int n_bad = 0, next_id = 1;

  for (genvar i = 0; i < NIN; i++) begin : g_in
    int k = 0;
    always_comb begin
      in_valid[i] = fq[i].size() != 0;
      in_beat[i] = '0;
      if (fq[i].size() != 0) begin
        int id;
        id = fq[i][0];
        in_beat[i].len = 16'(f_len[id]);
        in_beat[i].last = (k == (f_len[id] + 3) / 4 - 1);
        in_beat[i].data = (k == 0) ? {16'h0200, 8'(f_rack[id]), 8'(f_srv[id])}
                        : (k == 1) ? id : (id * 7 + k);
      end
    end
    always @(posedge clk) if (rst_n && in_valid[i] && in_ready[i]) begin
      if (in_beat[i].last) begin k <= 0; void'(fq[i].pop_front()); end
      else k <= k + 1;
    end
  end

  int n_rx = 0;
  for (genvar o = 0; o < NOUT; o++) begin : g_out
    int k = 0, id = 0;
    always @(posedge clk) out_ready[o] <= ($urandom % 4) != 0;
    always @(posedge clk) if (rst_n && out_valid[o] && out_ready[o]) begin
      if (k == 1) begin
        id = out_beat[o].data;
        chk(f_len.exists(id), "known frame");
        chk(out_of(f_rack[id], f_srv[id]) == o, $sformatf("frame %0d on output %0d", id, o));
        chk(exp_q[f_src[id]][o].size() != 0 && exp_q[f_src[id]][o][0] == id, "order kept");
        if (exp_q[f_src[id]][o].size() != 0) void'(exp_q[f_src[id]][o].pop_front());
      end else if (k > 1) chk(out_beat[o].data == id * 7 + k, "frame word, no interleaving");
      if (out_beat[o].last) begin
        chk(k + 1 == (f_len[id] + 3) / 4, "frame length");
        k = 0; n_rx++;
      end else k++;
    end
  end

  initial begin
    int n_tot;
    n_tot = 0;
    for (int i = 0; i < NOUT; i++) out_ready[i] = 1;
    for (int n = 0; n < 300; n++) begin
      int i, id, r, s;
      i = $urandom % NIN;
      id = next_id++;
      if (i == H) r = MY; else r = $urandom % 4;
      s = (($urandom % 20) == 0) ? 5 : $urandom % H;
      f_len[id] = 64 + ($urandom % 400); f_rack[id] = r; f_srv[id] = s; f_src[id] = i;
      fq[i].push_back(id);
      if (s >= H && (r == MY || i == H)) n_bad++;
      else begin
        exp_q[i][out_of((i == H) ? MY : r, s)].push_back(id);
        n_tot++;
      end
      if (i == H) f_rack[id] = MY;
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (60000) @(negedge clk);
    chk(n_rx == n_tot, $sformatf("frames out %0d of %0d", n_rx, n_tot));
    chk(dropped == 32'(n_bad), $sformatf("dropped %0d of %0d", dropped, n_bad));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (80000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
