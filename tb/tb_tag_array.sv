// tb_tag_array: after reset every entry reads invalid; random tag writes are
// read back one cycle later against a reference array; a read and a write of
// the same index in one cycle must return the old entry.
module tb_tag_array;
  localparam int LINES = 64, TAG_W = 18;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic rd_en = 0, wr_en = 0;
  logic [5:0] rd_idx = 0, wr_idx = 0;
  logic [TAG_W-1:0] wr_tag = 0, rd_tag;
  logic rd_valid;
  logic [TAG_W-1:0] ref_tag [LINES];
  bit ref_valid [LINES];

  always #5 clk = ~clk;

  tag_array #(.LINES(LINES), .TAG_W(TAG_W)) dut (
    .clk_i(clk), .rst_ni(rst_n), .rd_en_i(rd_en), .rd_index_i(rd_idx),
    .rd_tag_o(rd_tag), .rd_valid_o(rd_valid), .wr_en_i(wr_en),
    .wr_index_i(wr_idx), .wr_tag_i(wr_tag));

  task automatic read_check(input int idx);
    rd_en = 1; rd_idx = 6'(idx); wr_en = 0;
    @(posedge clk); #1;
    rd_en = 0;
    checks++;
    if (rd_valid !== ref_valid[idx] || (ref_valid[idx] && rd_tag !== ref_tag[idx])) begin
      failures++;
      $display("FAIL read idx=%0d valid=%b tag=%h exp valid=%b tag=%h", idx, rd_valid, rd_tag, ref_valid[idx], ref_tag[idx]);
    end
  endtask

  initial begin
    for (int i = 0; i < LINES; i++) ref_valid[i] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    for (int i = 0; i < LINES; i++) read_check(i);
    for (int n = 0; n < 400; n++) begin
      if ($urandom_range(1, 0) == 1) begin
        automatic int idx = $urandom_range(LINES-1, 0);
        wr_en = 1; wr_idx = 6'(idx); wr_tag = TAG_W'($urandom);
        @(posedge clk); #1;
        wr_en = 0;
        ref_tag[idx] = wr_tag; ref_valid[idx] = 1;
      end else begin
        read_check($urandom_range(LINES-1, 0));
      end
    end
    // read-first on a simultaneous read and write
    begin
      automatic int idx = 5;
      automatic logic [TAG_W-1:0] old_tag = ref_tag[idx];
      automatic bit old_valid = ref_valid[idx];
      rd_en = 1; rd_idx = 6'(idx); wr_en = 1; wr_idx = 6'(idx); wr_tag = ~old_tag;
      @(posedge clk); #1;
      rd_en = 0; wr_en = 0;
      checks++;
      if (rd_valid !== old_valid || (old_valid && rd_tag !== old_tag)) begin
        failures++; $display("FAIL read-first");
      end
      ref_tag[idx] = ~old_tag; ref_valid[idx] = 1;
      read_check(idx);
    end
    // reset clears the valid bits
    rst_n = 0; @(posedge clk); #1; rst_n = 1;
    for (int i = 0; i < LINES; i++) ref_valid[i] = 0;
    for (int i = 0; i < LINES; i += 7) read_check(i);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
