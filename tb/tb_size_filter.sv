// tb_size_filter: sweeps every Ethernet frame length from 0 to 2000 bytes and compares
// the class chosen with the bounds S1 < 100 <= S2 <= 200 < S3 <= 1000 < S4, including
// the document's example (148 bytes -> S2).
module tb_size_filter;
  logic [15:0] len;
  logic [1:0]  cls;
  int checks = 0, failures = 0;

  size_filter dut (.len_bytes(len), .cls);

  function automatic int ref_cls(input int l);
    if (l < 100) return 0;
    if (l <= 200) return 1;
    if (l <= 1000) return 2;
    return 3;
  endfunction

  initial begin
    for (int l = 0; l <= 2000; l++) begin
      len = 16'(l);
      #1;
      checks++;
      if (int'(cls) != ref_cls(l)) begin
        failures++;
        if (failures < 10) $display("FAIL len %0d cls %0d", l, cls);
      end
    end
    len = 16'd148; #1;
    checks++; if (cls != 2'd1) failures++;
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
