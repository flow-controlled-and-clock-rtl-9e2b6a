// tor_label_unit: the ToR end of the label channel, including the ToR's Time and Latency
// Management Center.
//
// The label channel is a continuous word stream in both directions: requests and
// timestamps go up, label responses (ACK/NACK), echoed timestamps and the controller's
// time come down, and idle words fill every other cycle so the ToR's CDR can keep
// recovering the distributed clock from it.
// Synchronisation (document, Sec. II-A):
//   1. MEASURE: send a timestamp T_tx (free-running cycle count) every TS_RETRY cycles
//      until the controller echoes it. At arrival time T_rx the one-way channel delay is
//      d = (T_rx - T_tx - TOR_TX_LAT - CTRL_ECHO_LAT) / 2, the two processing delays
//      being known constants and both directions assumed equally long.
//   2. WAIT_TIME: on the controller's time word {slot, offset}, set the local slot time
//      to that value plus d plus the controller's send latency, so local and controller
//      time agree.
//   3. SYNCED: raise slot_start REQ_LAT+1+d cycles before each controller slot boundary,
//      so label requests from every ToR reach the controller at the same offset 0 of
//      the slot whatever its fiber length. Later time words re-align the clock.
// Interface: req_valid/req_dest/req_prio from the aggregator become a request word;
// response words become resp_valid/resp_port. label_tx is registered. Message formats,
// the halving of the round trip and the launch rule are this design's choices.
module tor_label_unit
  import ofc_pkg::*;
#(
  parameter int unsigned SLOT          = 664,
  parameter int unsigned TOR_TX_LAT    = 1,   // label_tx register
  parameter int unsigned CTRL_ECHO_LAT = 2,   // controller: rx register + tx register
  parameter int unsigned CTRL_TX_LAT   = 1,   // controller: tx register
  parameter int unsigned REQ_LAT       = 1,   // slot_start to req_valid in the aggregator
  parameter int unsigned TS_RETRY      = 4096
) (
  input  logic              clk,
  input  logic              rst_n,
  input  label_word_t       label_rx,
  output label_word_t       label_tx,
  input  logic              req_valid,
  input  logic [3:0]        req_dest,
  input  logic [3:0]        req_prio,
  output logic              resp_valid,
  output logic [3:0]        resp_port,
  output logic              slot_start,
  output logic              synced,
  output logic [15:0]       delay_cycles,   // measured one-way label channel delay
  output logic [SLOT_W-1:0] slot_idx,
  output logic [OFF_W-1:0]  slot_off
);
  typedef enum logic [1:0] {T_MEASURE, T_WAIT_TIME, T_SYNCED} tstate_e;
  tstate_e state;

  logic [27:0] t_lin;
  logic [15:0] retry;
  logic        have_delay;
  logic [OFF_W-1:0] launch_off;

  // next slot time = current + k cycles (k < SLOT)
  function automatic logic [SLOT_W+OFF_W-1:0] time_add(input logic [SLOT_W-1:0] s,
                                                       input logic [OFF_W-1:0] o,
                                                       input logic [15:0] k);
    logic [31:0] sum;
    sum = 32'(o) + 32'(k);
    if (sum >= SLOT) return {s + 1'b1, OFF_W'(sum - SLOT)};
    return {s, OFF_W'(sum)};
  endfunction

  logic [27:0] rtt;
  assign rtt = t_lin - label_rx.payload;

  always_comb begin
    resp_valid = (label_rx.typ == L_RESP) && synced;
    resp_port  = label_rx.payload[27:24];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= T_MEASURE; t_lin <= '0; retry <= '0; have_delay <= 1'b0;
      delay_cycles <= '0; slot_idx <= '0; slot_off <= '0; launch_off <= '0;
      label_tx <= label_idle(); slot_start <= 1'b0; synced <= 1'b0;
    end else begin
      t_lin <= t_lin + 1'b1;
      // local slot clock
      if (32'(slot_off) == SLOT - 1) begin
        slot_off <= '0;
        slot_idx <= slot_idx + 1'b1;
      end else slot_off <= slot_off + 1'b1;

      label_tx <= label_idle();
      unique case (state)
        T_MEASURE: begin
          retry <= (retry == 0) ? 16'(TS_RETRY - 1) : retry - 1'b1;
          if (retry == 0) begin
            label_tx.typ     <= L_TS_REQ;
            label_tx.payload <= t_lin;
          end
          if (label_rx.typ == L_TS_ECHO) begin
            delay_cycles <= 16'((rtt - 28'(TOR_TX_LAT + CTRL_ECHO_LAT)) >> 1);
            have_delay <= 1'b1;
            state <= T_WAIT_TIME;
          end
        end
        default: begin
          if (state == T_SYNCED && req_valid) label_tx <= label_req(req_dest, req_prio);
        end
      endcase

      // time distribution from the controller
      if (label_rx.typ == L_TIME && have_delay) begin
        {slot_idx, slot_off} <= time_add(label_rx.payload[OFF_W+SLOT_W-1:OFF_W],
                                         label_rx.payload[OFF_W-1:0],
                                         delay_cycles + 16'(CTRL_TX_LAT + 1));
        launch_off <= OFF_W'((2 * SLOT - 1 - REQ_LAT - TOR_TX_LAT - 32'(delay_cycles)) % SLOT);
        state  <= T_SYNCED;
        synced <= 1'b1;
      end

      slot_start <= (state == T_SYNCED) && (slot_off == launch_off - 1'b1 ||
                    (launch_off == 0 && 32'(slot_off) == SLOT - 1));
    end
  end
endmodule
