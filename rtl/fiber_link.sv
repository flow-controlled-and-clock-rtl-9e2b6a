// fiber_link: behavioural model of one direction of an optical channel (fiber plus the
// serializer/deserializer latency of the transceivers at both ends).
//
// This is not logic of the design: it stands for glass and for vendor transceiver IP,
// so that the system model can give every ToR a different channel delay, as in the
// document's set-up where fiber lengths differ. Since the clock is distributed to every
// node, a channel is modelled as a word-wide delay line of DELAY cycles (DELAY >= 1);
// at reset it holds RESET_WORD (the idle pattern), so the line never goes dark.
module fiber_link #(
  parameter int unsigned WIDTH = 32,
  parameter int unsigned DELAY = 8,
  parameter logic [WIDTH-1:0] RESET_WORD = '0
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [WIDTH-1:0] din,
  output logic [WIDTH-1:0] dout
);
  // Delay line kept as one packed vector; the newest word sits in the
  // low bits and the oldest in the high bits.
  logic [DELAY*WIDTH-1:0] line;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) line <= {DELAY{RESET_WORD}};
    else        line <= (line << WIDTH) | (DELAY*WIDTH)'(din);
  end

  assign dout = line[DELAY*WIDTH-1 -: WIDTH];
endmodule
