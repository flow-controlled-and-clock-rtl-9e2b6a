// tb_fiber_link: sends a random word every cycle into a 7-cycle link and checks that
// each word leaves exactly 7 cycles later, and that the line holds the idle word after
// reset.
module tb_fiber_link;
  logic clk = 0, rst_n = 0;
  always #1 clk = ~clk;
  logic [31:0] din, dout;
  int checks = 0, failures = 0;
  logic [31:0] hist [$];

  fiber_link #(.WIDTH(32), .DELAY(7), .RESET_WORD(32'hAAAA_AAAA)) dut (.*);

  initial begin
    din = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    checks++; if (dout != 32'hAAAA_AAAA) failures++;
    for (int c = 0; c < 200; c++) begin
      din = $urandom;
      hist.push_back(din);
      @(posedge clk);
      @(negedge clk);
      if (hist.size() == 7) begin
        checks++;
        if (dout != hist[0]) begin failures++; $display("FAIL cycle %0d", c); end
        void'(hist.pop_front());
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
