// tb_contention_resolver: the document's slot N example (ToR1 and ToR2 both request
// ToR3, ToR1 has priority: ToR1 is ACKed, ToR2's packet goes to ToR2 and it gets a
// NACK) and then random request patterns checked against an independent model of the
// rules: winner per output has the best priority, every output is fed while any input
// can feed it, no output takes two inputs, and every response names the output the
// packet really reached.
module tb_contention_resolver;
  import ofc_pkg::*;
  localparam int N = 4;
  logic       req_valid [N];
  logic [3:0] req_dest [N], req_prio [N];
  logic       sel_valid [N];
  logic [3:0] sel [N], fwd_port [N];
  int checks = 0, failures = 0;

  contention_resolver #(.N(N)) dut (.*);

  task automatic chk(input bit ok, input string m);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", m); end
  endtask

  initial begin
    // document example, ToRs numbered from 0: ToR0, ToR1 -> 2; ToR2 -> 3; ToR3 -> 0
    req_valid = '{1, 1, 1, 1};
    req_dest  = '{4'd2, 4'd2, 4'd3, 4'd0};
    req_prio  = '{4'd0, 4'd1, 4'd2, 4'd3};
    #1;
    chk(fwd_port[0] == 4'd2, "ToR0 wins output 2 (ACK)");
    chk(fwd_port[1] == 4'd1, "ToR1 loses and goes to its own output (NACK)");
    chk(fwd_port[2] == 4'd3 && fwd_port[3] == 4'd0, "uncontended requests ACKed");
    chk(sel_valid[1] && sel[1] == 4'd1, "output 1 fed by loser ToR1");

    for (int it = 0; it < 3000; it++) begin
      int best [N];
      for (int i = 0; i < N; i++) begin
        req_valid[i] = ($urandom % 4) != 0;
        do req_dest[i] = 4'($urandom % N); while (req_dest[i] == 4'(i));
        req_prio[i] = 4'(i);
      end
      #1;
      // independent winner model: lowest index among requesters = best priority
      for (int j = 0; j < N; j++) begin
        best[j] = -1;
        for (int i = N - 1; i >= 0; i--) if (req_valid[i] && req_dest[i] == 4'(j)) best[j] = i;
      end
      for (int i = 0; i < N; i++) begin
        if (req_valid[i]) begin
          bit winner;
          winner = (best[req_dest[i]] == i);
          chk(winner == (fwd_port[i] == req_dest[i]), $sformatf("it %0d ack of %0d", it, i));
          if (fwd_port[i] != PORT_NONE)
            chk(sel_valid[fwd_port[i]] && sel[fwd_port[i]] == 4'(i), "response names real output");
        end else chk(fwd_port[i] == PORT_NONE, "no response without request");
      end
      for (int j = 0; j < N; j++) begin
        if (best[j] >= 0) chk(sel_valid[j] && sel[j] == 4'(best[j]), "winner connected");
        else chk(sel_valid[j], "free output filled");   // some input can always feed it
        if (sel_valid[j] && best[j] < 0) chk(!(req_valid[sel[j]] && best[req_dest[sel[j]]] == int'(sel[j])), "fill never uses a winner");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
