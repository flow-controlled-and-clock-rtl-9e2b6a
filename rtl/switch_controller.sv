// switch_controller: the FPGA controller of the optical switch.
//
// It is the master of time and clock for the cluster. It keeps the slot time
// {slot, offset} (SLOT cycles per slot); its clock is the one every ToR recovers from
// the continuous label streams sent here. Per ToR port it:
//   - registers the incoming label word (1 cycle);
//   - echoes a timestamp word back at once (fixed CTRL_ECHO_LAT = 2 cycles in total),
//     so the ToR can measure its channel delay;
//   - sends its slot time once per slot at offset TIME_OFF (skipped when an echo is due
//     in the same cycle), so the ToRs can align to it;
//   - latches the ToR's label request for the next decision.
// At offset DECIDE_OFF the contention resolver looks at all latched requests; one cycle
// later its result drives the SOA gates (held until the next decision) and a label
// response goes to every requesting ToR, naming the output its packet reached
// (= request: ACK; otherwise NACK). The gates change while the data channels carry the
// inter-packet gap, so no packet is cut. Request latching, echo and time distribution
// follow the document's mechanisms; offsets and word formats are this design's choices.
module switch_controller
  import ofc_pkg::*;
#(
  parameter int unsigned N          = 4,
  parameter int unsigned SLOT       = 664,
  parameter int unsigned DECIDE_OFF = 2,
  parameter int unsigned TIME_OFF   = 332
) (
  input  logic              clk,
  input  logic              rst_n,
  input  label_word_t       label_rx [N],
  output label_word_t       label_tx [N],
  output logic [N-1:0]      gate     [N],     // gate[input][output] to the SOA drivers
  output logic [SLOT_W-1:0] slot_idx,
  output logic [OFF_W-1:0]  slot_off,
  output logic [31:0]       decisions,
  output logic [31:0]       contentions      // slots with at least one NACK
);
  label_word_t rx_q [N];
  logic        req_v [N];
  logic [3:0]  req_d [N], req_p [N];
  logic        sel_v [N];
  logic [3:0]  sel [N], fwd [N];
  logic        resp_due [N];
  logic [3:0]  resp_val [N];

  contention_resolver #(.N(N)) u_resolver (
    .req_valid(req_v), .req_dest(req_d), .req_prio(req_p),
    .sel_valid(sel_v), .sel(sel), .fwd_port(fwd));

  logic decide;
  assign decide = (32'(slot_off) == DECIDE_OFF);

  logic any_nack;
  always_comb begin
    any_nack = 1'b0;
    for (int i = 0; i < int'(N); i++)
      if (req_v[i] && fwd[i] != req_d[i]) any_nack = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      slot_idx <= '0; slot_off <= '0; decisions <= '0; contentions <= '0;
      for (int i = 0; i < int'(N); i++) begin
        rx_q[i] <= label_idle(); label_tx[i] <= label_idle();
        req_v[i] <= 1'b0; req_d[i] <= '0; req_p[i] <= '0;
        resp_due[i] <= 1'b0; resp_val[i] <= '0; gate[i] <= '0;
      end
    end else begin
      if (32'(slot_off) == SLOT - 1) begin
        slot_off <= '0;
        slot_idx <= slot_idx + 1'b1;
      end else slot_off <= slot_off + 1'b1;

      for (int i = 0; i < int'(N); i++) begin
        rx_q[i] <= label_rx[i];
        // label transmit: response > echo > time > idle
        label_tx[i] <= label_idle();
        if (resp_due[i]) begin
          label_tx[i]  <= label_resp(resp_val[i]);
          resp_due[i]  <= 1'b0;
        end else if (rx_q[i].typ == L_TS_REQ) begin
          label_tx[i].typ     <= L_TS_ECHO;
          label_tx[i].payload <= rx_q[i].payload;
        end else if (32'(slot_off) == TIME_OFF) begin
          label_tx[i].typ     <= L_TIME;
          label_tx[i].payload <= 28'({slot_idx, slot_off});
        end
        if (rx_q[i].typ == L_REQ) begin
          req_v[i] <= 1'b1;
          req_d[i] <= rx_q[i].payload[27:24];
          req_p[i] <= rx_q[i].payload[23:20];
        end
      end

      if (decide) begin
        decisions <= decisions + 1'b1;
        if (any_nack) contentions <= contentions + 1'b1;
        for (int i = 0; i < int'(N); i++) begin
          req_v[i] <= (rx_q[i].typ == L_REQ);   // a request arriving now waits a slot
          if (req_v[i]) begin
            resp_due[i] <= 1'b1;
            resp_val[i] <= fwd[i];
          end
        end
        for (int j = 0; j < int'(N); j++)
          for (int i = 0; i < int'(N); i++)
            gate[i][j] <= sel_v[j] && (sel[j] == 4'(i));
      end
    end
  end

  // a ToR's response must have left before its next request can be answered
  for (genvar i = 0; i < N; i++) begin : g_chk
    assert property (@(posedge clk) disable iff (!rst_n) decide |-> !resp_due[i]);
  end
endmodule
