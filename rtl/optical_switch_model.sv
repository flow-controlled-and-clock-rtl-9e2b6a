// optical_switch_model: behavioural model of the N x N SOA-based broadcast-and-select
// optical switch.
//
// Every input is split to all outputs; an SOA gate per (input, output) pair passes or
// blocks the light. gate[i][j] = 1 turns on the gate from input i to output j. An
// output with no gate on is dark (all-zero word). More than one gate on towards one
// output would mix two signals in the real device; the model ORs them and raises
// `collision` so a test can catch it. One input may feed several outputs at once
// (multicast), which the controller uses to keep every receiver supplied. The optical
// path is transparent: the model adds no delay (driver delay and SOA rise/fall time are
// analog effects hidden inside the inter-packet gap). Not synthesizable hardware in the
// real system; written as plain combinational logic only to model it.
module optical_switch_model #(
  parameter int unsigned N = 4,
  parameter int unsigned WIDTH = 32
) (
  input  logic [WIDTH-1:0] din  [N],
  input  logic [N-1:0]     gate [N],   // gate[input][output]
  output logic [WIDTH-1:0] dout [N],
  output logic             collision
);
  always_comb begin
    collision = 1'b0;
    for (int j = 0; j < int'(N); j++) begin
      int unsigned on;
      on = 0;
      dout[j] = '0;
      for (int i = 0; i < int'(N); i++)
        if (gate[i][j]) begin
          dout[j] |= din[i];
          on++;
        end
      if (on > 1) collision = 1'b1;
    end
  end
endmodule
