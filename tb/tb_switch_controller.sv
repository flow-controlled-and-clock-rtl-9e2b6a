// tb_switch_controller: drives the four label inputs of the controller directly.
// Checks: a timestamp is echoed unchanged exactly two cycles after it arrives; a time
// word {slot, offset} goes out on every port at offset 332 of every slot and carries
// the controller's time; requests arriving at the end of a slot are decided at offset 2:
// the document's example (ToR0 and ToR1 both to rack 2, ToR0 first) sets the gates so
// ToR0 reaches output 2 and ToR1 loops back to output 1, and the responses are ACK
// (response = request) for ToR0, ToR2, ToR3 and NACK for ToR1; the gates then stay
// until the next decision; a slot without requests gives no response and fills every
// output from the idle streams.
module tb_switch_controller;
  import ofc_pkg::*;
  localparam int N = 4, SLOT = 664;
  logic clk = 0, rst_n = 0;
  always #1 clk = ~clk;

  label_word_t label_rx [N], label_tx [N];
  logic [N-1:0] gate [N];
  logic [SLOT_W-1:0] slot_idx;
  logic [OFF_W-1:0] slot_off;
  logic [31:0] decisions, contentions;

  switch_controller dut (.*);

  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string m);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", m); end
  endtask

  // monitor: every time word and its offset
  int n_time = 0, cyc = 0;
  always @(posedge clk) if (rst_n) begin
    cyc++;
    for (int i = 0; i < N; i++)
      if (label_tx[i].typ == L_TIME) begin
        n_time++;
        // the word was loaded one cycle earlier, so now is offset+1 of that slot
        chk(32'(label_tx[i].payload[9:0]) + 1 == 32'(slot_off) &&
            label_tx[i].payload[25:10] == slot_idx, "time word carries controller time");
      end
  end

  task automatic wait_off(input int off);
    while (int'(slot_off) != off) @(negedge clk);
  endtask

  initial begin
    for (int i = 0; i < N; i++) label_rx[i] = label_idle();
    repeat (3) @(negedge clk);
    rst_n = 1;
    // timestamp echo on port 1
    wait_off(100);
    label_rx[1].typ = L_TS_REQ; label_rx[1].payload = 28'h123_4567;
    @(negedge clk); label_rx[1] = label_idle();
    chk(label_tx[1].typ != L_TS_ECHO, "echo not early");
    @(negedge clk);
    chk(label_tx[1].typ == L_TS_ECHO && label_tx[1].payload == 28'h123_4567, "echo after two cycles");
    // requests at the end of the slot
    wait_off(SLOT - 1);
    label_rx[0] = label_req(4'd2, 4'd0);
    label_rx[1] = label_req(4'd2, 4'd1);
    label_rx[2] = label_req(4'd3, 4'd2);
    label_rx[3] = label_req(4'd0, 4'd3);
    @(negedge clk);
    for (int i = 0; i < N; i++) label_rx[i] = label_idle();
    wait_off(2);
    chk(gate[0] == 4'b0001 && gate[1] == 4'b0010, "gates unchanged before the decision");
    @(negedge clk);
    // requests arrived at offset SLOT-1: gates change at offset 3, 4 cycles = 12.4 ns later
    chk(gate[0] == 4'b0100 && gate[1] == 4'b0010 && gate[2] == 4'b1000 && gate[3] == 4'b0001,
        "gates: 0->2, 1->1, 2->3, 3->0");
    @(negedge clk);
    chk(label_tx[0].typ == L_RESP && label_tx[0].payload[27:24] == 4'd2, "ToR0 ACK");
    chk(label_tx[1].typ == L_RESP && label_tx[1].payload[27:24] == 4'd1, "ToR1 NACK (sent to 1)");
    chk(label_tx[2].typ == L_RESP && label_tx[2].payload[27:24] == 4'd3, "ToR2 ACK");
    chk(label_tx[3].typ == L_RESP && label_tx[3].payload[27:24] == 4'd0, "ToR3 ACK");
    chk(contentions == 1, "contention counted");
    wait_off(SLOT - 2);
    chk(gate[0] == 4'b0100 && gate[1] == 4'b0010, "gates held through the slot");
    // empty slot
    wait_off(4);
    chk(gate[0] == 4'b0001 && gate[1] == 4'b0010 && gate[2] == 4'b0100 && gate[3] == 4'b1000,
        "idle slot: every output fed by its own idle stream");
    for (int k = 0; k < 10; k++) begin
      @(negedge clk);
      for (int i = 0; i < N; i++) chk(label_tx[i].typ != L_RESP, "no response without request");
    end
    repeat (2 * SLOT) @(negedge clk);
    chk(n_time >= 4 * 3, $sformatf("time words sent: %0d", n_time));
    chk(decisions >= 3, "a decision every slot");
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
