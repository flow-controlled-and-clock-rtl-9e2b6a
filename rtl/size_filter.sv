// size_filter: picks the sub-buffer of a buffer block for an Ethernet frame from its
// length.
//
// Each buffer block holds frames of similar length together so that the aggregator can
// choose frames that fill an optical packet well. The document gives the 100-200 byte
// class (S2) as its example; the other bounds (S1 below 100 bytes, S3 201-1000 bytes,
// S4 above 1000 bytes) are this design's choice, made so that the document's example
// packet (one 1400-byte, one 200-byte and two 500-byte frames) spans three classes.
// Purely combinational: cls follows len_bytes in the same cycle. Class 0 is S1.
module size_filter #(
  parameter int unsigned NSUB = 4,
  // inclusive upper bound, in bytes, of each class but the last
  parameter int unsigned UPPER [NSUB-1] = '{99, 200, 1000}
) (
  input  logic [15:0]             len_bytes,
  output logic [$clog2(NSUB)-1:0] cls
);
  always_comb begin
    cls = $clog2(NSUB)'(NSUB - 1);
    for (int c = NSUB - 2; c >= 0; c--)
      if (32'(len_bytes) <= UPPER[c]) cls = $clog2(NSUB)'(c);
  end
endmodule
