// contention_resolver: the switch controller's contention resolution and switch
// configuration for one time slot.
//
// Input: one label request per ToR port (valid, destination port, priority; a lower
// priority number wins, as in the document's order 1 > 2 > 3 > 4). For every output
// the highest-priority request for it wins (ties: lowest port). Winners are connected to
// their destination. Following the document, packets that lost are not dropped at the
// switch but sent to outputs that no winner uses, so that every receiver sees traffic in
// every slot: a loser goes to its own port's output when that output is free (the
// document's example sends ToR2's losing packet back to ToR2); any other free output is
// fed by the lowest-numbered loser (one packet multicast to several outputs), and, when
// there is no loser at all, by a ToR that made no request (its idle stream) so the line
// stays active. Those fill rules beyond the self-return are this design's choice.
// Output: sel_valid/sel per output (which input it takes) and fwd_port per input (the
// output its packet went to, or PORT_NONE), which becomes the label response: equal to
// the request means ACK, different means NACK.
// Purely combinational; the switch controller registers its outputs.
module contention_resolver
  import ofc_pkg::*;
#(
  parameter int unsigned N = 4
) (
  input  logic       req_valid [N],
  input  logic [3:0] req_dest  [N],
  input  logic [3:0] req_prio  [N],
  output logic       sel_valid [N],   // per output
  output logic [3:0] sel       [N],   // per output: input port feeding it
  output logic [3:0] fwd_port  [N]    // per input: output its packet reached
);
  // port numbers are 4 bits on the label channel; arrays here are indexed by PW bits
  localparam int unsigned PW = (N > 1) ? $clog2(N) : 1;
  logic       won    [N];
  logic       loser  [N];
  logic       any_loser, any_idle;
  logic [3:0] first_loser, first_idle;

  always_comb begin
    for (int i = 0; i < int'(N); i++) begin
      won[i] = 1'b0;
      fwd_port[i] = PORT_NONE;
    end
    // 1) winners per output
    for (int j = 0; j < int'(N); j++) begin
      sel_valid[j] = 1'b0;
      sel[j] = '0;
      for (int i = 0; i < int'(N); i++)
        if (req_valid[i] && req_dest[i] == 4'(j) &&
            (!sel_valid[j] || req_prio[i] < req_prio[PW'(sel[j])])) begin
          sel_valid[j] = 1'b1;
          sel[j] = 4'(i);
        end
      if (sel_valid[j]) begin
        won[PW'(sel[j])] = 1'b1;
        fwd_port[PW'(sel[j])] = 4'(j);
      end
    end
    // 2) losers and idle inputs
    any_loser = 1'b0; first_loser = '0;
    any_idle  = 1'b0; first_idle  = '0;
    for (int i = N - 1; i >= 0; i--) begin
      loser[i] = req_valid[i] && !won[i];
      if (loser[i])      begin any_loser = 1'b1; first_loser = 4'(i); end
      if (!req_valid[i]) begin any_idle  = 1'b1; first_idle  = 4'(i); end
    end
    // 3) fill every output no winner uses
    for (int j = 0; j < int'(N); j++) begin
      if (!sel_valid[j]) begin
        if (loser[j]) begin
          sel_valid[j] = 1'b1; sel[j] = 4'(j);
        end else if (any_loser) begin
          sel_valid[j] = 1'b1; sel[j] = first_loser;
        end else if (!req_valid[j]) begin
          sel_valid[j] = 1'b1; sel[j] = 4'(j);
        end else if (any_idle) begin
          sel_valid[j] = 1'b1; sel[j] = first_idle;
        end
        if (sel_valid[j] && loser[PW'(sel[j])] && fwd_port[PW'(sel[j])] == PORT_NONE)
          fwd_port[PW'(sel[j])] = 4'(j);
      end
    end
  end
endmodule
