// tb_tor_label_unit: two ToR label units on label channels of different length (20 and
// 57 cycles each way) talk to a small controller model written here (timestamp echo
// two cycles after arrival, time word once per slot, one response per request).
// Checks: both measure their own channel delay exactly; both then agree with the
// controller's slot time; slot_start comes once per slot; the label requests of both
// reach the controller in the same cycle of the slot (offset SLOT-1, decided at the
// next slot); responses come out as resp_valid/resp_port.
module tb_tor_label_unit;
  import ofc_pkg::*;
  localparam int SLOT = 664;
  localparam int D [2] = '{20, 57};

  logic clk = 0, rst_n = 0;
  always #1 clk = ~clk;

  label_word_t up_tor [2], up_ctl [2], dn_ctl [2], dn_tor [2];
  logic req_valid [2], resp_valid [2], slot_start [2], synced [2];
  logic [3:0] resp_port [2];
  logic [15:0] delay_cycles [2];
  logic [SLOT_W-1:0] slot_idx [2];
  logic [OFF_W-1:0] slot_off [2];

  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string m);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", m); end
  endtask

  // controller model time
  int c_off = 0, c_slot = 0;
  always @(posedge clk) if (rst_n) begin
    if (c_off == SLOT - 1) begin c_off <= 0; c_slot <= c_slot + 1; end
    else c_off <= c_off + 1;
  end

  for (genvar t = 0; t < 2; t++) begin : g_t
    tor_label_unit dut (.clk, .rst_n, .label_rx(dn_tor[t]), .label_tx(up_tor[t]),
      .req_valid(req_valid[t]), .req_dest(4'(t + 2)), .req_prio(4'(t)),
      .resp_valid(resp_valid[t]), .resp_port(resp_port[t]),
      .slot_start(slot_start[t]), .synced(synced[t]), .delay_cycles(delay_cycles[t]),
      .slot_idx(slot_idx[t]), .slot_off(slot_off[t]));
    fiber_link #(.WIDTH(32), .DELAY(D[t]), .RESET_WORD(32'hAAAA_AAAA)) u_up (
      .clk, .rst_n, .din(up_tor[t]), .dout(up_ctl[t]));
    fiber_link #(.WIDTH(32), .DELAY(D[t]), .RESET_WORD(32'hAAAA_AAAA)) u_dn (
      .clk, .rst_n, .din(dn_ctl[t]), .dout(dn_tor[t]));

    // aggregator model: request one cycle after slot_start
    always @(posedge clk) req_valid[t] <= rst_n && slot_start[t];

    // controller model
    label_word_t rxq;
    int req_off [$];
    bit resp_due = 0;
    always @(posedge clk) begin
      if (!rst_n) begin rxq <= label_idle(); dn_ctl[t] <= label_idle(); end
      else begin
        rxq <= up_ctl[t];
        dn_ctl[t] <= label_idle();
        if (resp_due) begin
          dn_ctl[t] <= label_resp(4'(t + 2));
          resp_due = 0;
        end else if (rxq.typ == L_TS_REQ) dn_ctl[t] <= rxq;
        else if (c_off == SLOT / 2) begin
          dn_ctl[t].typ <= L_TIME;
          dn_ctl[t].payload <= 28'({16'(c_slot), 10'(c_off)});
        end
        if (rxq.typ == L_TS_REQ) dn_ctl[t].typ <= L_TS_ECHO;
        if (up_ctl[t].typ == L_REQ) begin
          req_off.push_back(c_off);
          chk(up_ctl[t].payload[27:24] == 4'(t + 2), "request destination");
          resp_due = 1;
        end
      end
    end

    int n_resp = 0, n_start = 0;
    always @(posedge clk) if (rst_n) begin
      if (resp_valid[t]) begin
        n_resp++;
        chk(resp_port[t] == 4'(t + 2), "response port");
      end
      if (slot_start[t]) n_start++;
    end
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (4 * SLOT) @(negedge clk);
    for (int t = 0; t < 2; t++) begin
      chk(synced[t], "synced");
      chk(delay_cycles[t] == 16'(D[t]), $sformatf("delay %0d vs %0d", delay_cycles[t], D[t]));
    end
    // local time equals controller time (sampled in the same cycle)
    @(posedge clk); #0;
    for (int t = 0; t < 2; t++)
      chk(int'(slot_off[t]) == c_off && int'(slot_idx[t]) == c_slot,
          $sformatf("ToR %0d time %0d/%0d vs %0d/%0d", t, slot_idx[t], slot_off[t], c_slot, c_off));
    @(negedge clk);
    begin
      int s0, s1, r0, r1;
      s0 = g_t[0].n_start; s1 = g_t[1].n_start;
      r0 = g_t[0].n_resp;  r1 = g_t[1].n_resp;
      repeat (5 * SLOT) @(negedge clk);
      chk(g_t[0].n_start - s0 == 5 && g_t[1].n_start - s1 == 5, "slot_start once per slot");
      chk(g_t[0].n_resp - r0 >= 4 && g_t[1].n_resp - r1 >= 4, "responses delivered");
    end
    chk(g_t[0].req_off.size() >= 5 && g_t[1].req_off.size() >= 5, "requests arrived");
    foreach (g_t[0].req_off[i])
      chk(g_t[0].req_off[i] == SLOT - 1, $sformatf("ToR 0 request at offset %0d", g_t[0].req_off[i]));
    foreach (g_t[1].req_off[i])
      chk(g_t[1].req_off[i] == SLOT - 1, $sformatf("ToR 1 request at offset %0d", g_t[1].req_off[i]));
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
