// tb_buffer_block: writes frames of random length into one buffer block and checks,
// against a queue model per size class: occupancy in bytes, head frame and length per
// class, frame contents read back, a NACK rewind (the same frames read again), an ACK
// release (occupancy falls by exactly the bytes read) and the discard of a frame that
// would exceed the block's 8192 bytes.
module tb_buffer_block;
  import ofc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #1 clk = ~clk;

  logic        in_valid, in_ready;
  frame_beat_t in_beat;
  logic [31:0] occ_bytes, drop_frames;
  logic [3:0]  head_valid;
  logic [15:0] head_len [4];
  logic        pop, rd_en, release_i, rewind_i;
  logic [1:0]  rd_cls;
  logic [31:0] rd_data;

  buffer_block dut (.*);

  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string m);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", m); end
  endtask

  function automatic int cls_of(input int l);
    return (l < 100) ? 0 : (l <= 200) ? 1 : (l <= 1000) ? 2 : 3;
  endfunction
  function automatic logic [31:0] pat(input int id, input int k);
    return (id << 16) ^ k ^ 32'h5A5A_0000;
  endfunction

  int mq_len [4][$];
  int mq_id  [4][$];
  int model_occ = 0;

  task automatic write_frame(input int id, input int len);
    int nw;
    nw = (len + 3) / 4;
    for (int k = 0; k < nw; k++) begin
      in_valid = 1;
      in_beat.data = pat(id, k);
      in_beat.len = 16'(len);
      in_beat.last = (k == nw - 1);
      @(negedge clk);
    end
    in_valid = 0;
  endtask

  // read one frame of class c, compare with id
  task automatic read_frame(input int c, input int id, input int len);
    int nw;
    rd_cls = 2'(c);
    chk(head_valid[c] && head_len[c] == 16'(len), $sformatf("head of class %0d", c));
    pop = 1; @(negedge clk); pop = 0;
    nw = (len + 3) / 4;
    for (int k = 0; k < nw; k++) begin
      rd_en = 1;
      chk(rd_data == pat(id, k), $sformatf("word %0d of frame %0d", k, id));
      @(negedge clk);
    end
    rd_en = 0;
  endtask

  initial begin
    int lens [12];
    int ids_taken [$], lens_taken [$], cls_taken [$];
    int bytes_taken;
    in_valid = 0; in_beat = '0; pop = 0; rd_en = 0; release_i = 0; rewind_i = 0; rd_cls = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    lens = '{64, 148, 1400, 500, 99, 200, 201, 1000, 1001, 77, 650, 1518};
    for (int i = 0; i < 12; i++) begin
      write_frame(i, lens[i]);
      mq_len[cls_of(lens[i])].push_back(lens[i]);
      mq_id[cls_of(lens[i])].push_back(i);
      model_occ += lens[i];
    end
    @(negedge clk);
    chk(occ_bytes == 32'(model_occ), $sformatf("occupancy %0d vs %0d", occ_bytes, model_occ));
    // read two frames of every class
    bytes_taken = 0;
    for (int c = 3; c >= 0; c--)
      for (int k = 0; k < 2 && k < mq_len[c].size(); k++) begin
        read_frame(c, mq_id[c][k], mq_len[c][k]);
        bytes_taken += mq_len[c][k];
      end
    // NACK: rewind, the same frames come again
    rewind_i = 1; @(negedge clk); rewind_i = 0;
    chk(occ_bytes == 32'(model_occ), "occupancy unchanged by NACK");
    for (int c = 3; c >= 0; c--)
      for (int k = 0; k < 2 && k < mq_len[c].size(); k++)
        read_frame(c, mq_id[c][k], mq_len[c][k]);
    // ACK: release
    release_i = 1; @(negedge clk); release_i = 0;
    @(negedge clk);
    model_occ -= bytes_taken;
    chk(occ_bytes == 32'(model_occ), $sformatf("occupancy after ACK %0d vs %0d", occ_bytes, model_occ));
    for (int c = 0; c < 4; c++) begin
      int k;
      k = (mq_len[c].size() < 2) ? mq_len[c].size() : 2;
      repeat (k) begin void'(mq_len[c].pop_front()); void'(mq_id[c].pop_front()); end
      chk(head_valid[c] == (mq_len[c].size() != 0), $sformatf("class %0d head after ACK", c));
      if (mq_len[c].size() != 0) chk(head_len[c] == 16'(mq_len[c][0]), "next head length");
    end
    // overflow: fill with 1518-byte frames until the block refuses
    begin
      int accepted;
      accepted = 0;
      for (int i = 0; i < 8; i++) begin
        if (model_occ + 1518 <= 8192) begin model_occ += 1518; accepted++; end
        write_frame(100 + i, 1518);
      end
      @(negedge clk);
      chk(occ_bytes == 32'(model_occ), $sformatf("occupancy at full %0d vs %0d", occ_bytes, model_occ));
      chk(drop_frames == 32'(8 - accepted), $sformatf("dropped %0d", drop_frames));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
