// tb_optical_switch_model: random gate settings with at most one input per output, plus
// multicast and dark outputs; each output must carry exactly its gated input (or zero
// when dark), and collision must rise only when two gates feed one output.
module tb_optical_switch_model;
  localparam int N = 4;
  logic [31:0] din [N], dout [N];
  logic [N-1:0] gate [N];
  logic collision;
  int checks = 0, failures = 0;

  optical_switch_model #(.N(N), .WIDTH(32)) dut (.*);

  initial begin
    for (int it = 0; it < 500; it++) begin
      int src [N];
      for (int i = 0; i < N; i++) begin din[i] = $urandom; gate[i] = '0; end
      for (int j = 0; j < N; j++) begin
        src[j] = int'($urandom % (N + 1)) - 1;   // -1: dark
        if (src[j] >= 0) gate[src[j]][j] = 1'b1;
      end
      #1;
      for (int j = 0; j < N; j++) begin
        checks++;
        if (dout[j] != ((src[j] >= 0) ? din[src[j]] : 32'h0)) failures++;
      end
      checks++; if (collision) failures++;
    end
    for (int i = 0; i < N; i++) gate[i] = '0;
    gate[0][2] = 1; gate[1][2] = 1; #1;
    checks++; if (!collision) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
