// eth_switch: the ToR's Ethernet switch.
//
// Inputs 0..H-1 are the rack's servers, input H is the data packet receiver (frames
// that arrived from other racks). Outputs 0..H-1 go to the servers; outputs H ..
// H+N_TOR-2 go to the buffer blocks, one per other rack (block b holds rack b, or b+1
// for racks above MY_RACK). The route is read from the destination MAC in the first
// word of a frame (rack in bits [15:8], server in bits [7:0]; this address convention
// is this design's choice): a frame for a server of this rack goes to that server
// (intra-rack traffic), a frame for another rack to that rack's buffer block (inter-rack
// traffic), and frames from the receiver always to their server. A frame with an
// unknown server is consumed and counted as dropped. Each output serves one frame at a
// time and stays with that input until the frame's last beat. The packet receiver
// has priority: the optical packets it unpacks cannot be held back at their source,
// so its frames must not wait behind intra-rack traffic. The servers share the rest
// round-robin. Streams are valid/ready; a beat moves when both are high.
// The document gives the switch's function only; arbitration is this design's choice.
module eth_switch
  import ofc_pkg::*;
#(
  parameter int unsigned H       = 2,
  parameter int unsigned N_TOR   = 4,
  parameter int unsigned MY_RACK = 0,
  localparam int unsigned NIN  = H + 1,
  localparam int unsigned NOUT = H + N_TOR - 1,
  localparam int unsigned OW   = $clog2(NOUT + 1),   // one more code: drop
  localparam int unsigned IW   = $clog2(NIN)
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid  [NIN],
  output logic        in_ready  [NIN],
  input  frame_beat_t in_beat   [NIN],
  output logic        out_valid [NOUT],
  input  logic        out_ready [NOUT],
  output frame_beat_t out_beat  [NOUT],
  output logic [31:0] dropped
);
  localparam logic [OW-1:0] DROP = OW'(NOUT);

  logic          busy  [NIN];
  logic [OW-1:0] dst_q [NIN];
  logic [OW-1:0] tgt   [NIN];
  logic          locked[NOUT];
  logic [IW-1:0] owner [NOUT];
  logic [IW-1:0] rr    [NOUT];
  logic          gv    [NOUT];
  logic [IW-1:0] gi    [NOUT];

  function automatic logic [OW-1:0] route(input int unsigned i, input logic [W-1:0] w0);
    logic [7:0] rack, srv;
    rack = mac_rack(w0);
    srv  = mac_server(w0);
    if (i == H || 32'(rack) == MY_RACK)
      return (32'(srv) < H) ? OW'(srv) : DROP;
    if (32'(rack) >= N_TOR) return DROP;
    return (32'(rack) < MY_RACK) ? OW'(H + 32'(rack)) : OW'(H + 32'(rack) - 1);
  endfunction

  function automatic logic [IW-1:0] rot(input logic [IW-1:0] base, input int k);
    return IW'((32'(base) + 32'(k)) % NIN);
  endfunction

  always_comb begin
    for (int i = 0; i < int'(NIN); i++)
      tgt[i] = busy[i] ? dst_q[i] : route(i, in_beat[i].data);
    for (int o = 0; o < int'(NOUT); o++) begin
      gv[o] = locked[o];
      gi[o] = owner[o];
      // The packet receiver cannot be paused from the far end, so it goes first.
      if (!locked[o] && in_valid[NIN-1] && !busy[NIN-1] && tgt[NIN-1] == OW'(o)) begin
        gv[o] = 1'b1;
        gi[o] = IW'(NIN-1);
      end
      if (!locked[o])
        for (int k = 0; k < int'(NIN); k++)
          if (!gv[o] && in_valid[rot(rr[o], k)] && !busy[rot(rr[o], k)] &&
              tgt[rot(rr[o], k)] == OW'(o)) begin
            gv[o] = 1'b1;
            gi[o] = rot(rr[o], k);
          end
      out_valid[o] = gv[o] && in_valid[gi[o]];
      out_beat[o]  = in_beat[gi[o]];
    end
    for (int i = 0; i < int'(NIN); i++) begin
      in_ready[i] = (tgt[i] == DROP);
      for (int o = 0; o < int'(NOUT); o++)
        if (tgt[i] == OW'(o) && gv[o] && gi[o] == IW'(i)) in_ready[i] = out_ready[o];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(NIN); i++) begin busy[i] <= 1'b0; dst_q[i] <= '0; end
      for (int o = 0; o < int'(NOUT); o++) begin locked[o] <= 1'b0; owner[o] <= '0; rr[o] <= '0; end
      dropped <= '0;
    end else begin
      for (int i = 0; i < int'(NIN); i++)
        if (in_valid[i] && in_ready[i]) begin
          busy[i]  <= !in_beat[i].last;
          dst_q[i] <= tgt[i];
          if (!busy[i] && tgt[i] == DROP) dropped <= dropped + 1;
        end
      for (int o = 0; o < int'(NOUT); o++)
        if (out_valid[o] && out_ready[o]) begin
          locked[o] <= !out_beat[o].last;
          owner[o]  <= gi[o];
          if (!locked[o]) rr[o] <= IW'((32'(gi[o]) + 1) % NIN);
        end
    end
  end
endmodule
