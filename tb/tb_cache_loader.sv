// tb_cache_loader: the loader against a model of the data array whose every
// write takes a random 1 to 6 cycles (busy, then a one-cycle ready). Checks
// that each buffered word is written once, in order, to the right line with
// the right data, that no request is made while the array is busy, and that
// done_o pulses exactly once, in the cycle the last write is reported ready.
module tb_cache_loader;
  localparam int LINES = 32, WORDS = 16;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic line_ready = 0;
  logic [4:0] index = 0;
  logic [3:0] buf_idx, arr_word;
  logic [31:0] buf_data, arr_wdata;
  logic [31:0] bufm [WORDS];
  logic arr_req, arr_busy, arr_ready, active, done;
  logic [4:0] arr_index;

  assign buf_data = bufm[buf_idx];

  cache_loader #(.LINES(LINES), .WORDS(WORDS)) dut (.clk_i(clk), .rst_ni(rst_n),
    .line_ready_i(line_ready), .index_i(index), .buf_idx_o(buf_idx), .buf_data_i(buf_data),
    .arr_req_o(arr_req), .arr_index_o(arr_index), .arr_word_o(arr_word), .arr_wdata_o(arr_wdata),
    .arr_busy_i(arr_busy), .arr_ready_i(arr_ready), .active_o(active), .done_o(done));

  // data array model: accepts when not busy, ready after lat cycles
  int remain = 0;
  logic pend = 0;
  int exp_word = 0, n_done = 0, n_writes = 0;
  assign arr_busy = (remain > 1);
  always @(posedge clk) begin
    arr_ready <= 1'b0;
    if (remain > 1) remain <= remain - 1;
    else if (remain == 1) begin remain <= 0; arr_ready <= 1'b1; end
    if (arr_req && !arr_busy && remain <= 1) begin
      checks++;
      if (int'(arr_word) != exp_word || arr_index != index || arr_wdata != bufm[arr_word]) begin
        failures++;
        $display("FAIL write word=%0d exp=%0d idx=%0d data=%h", arr_word, exp_word, arr_index, arr_wdata);
      end
      exp_word++;
      n_writes++;
      remain <= $urandom_range(6, 1);
      if (remain == 1) arr_ready <= 1'b1;
    end
    if (done) begin
      n_done++;
      checks++;
      if (exp_word != WORDS || !arr_ready) begin failures++; $display("FAIL done early after %0d words", exp_word); end
    end
  end

  initial begin
    arr_ready = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 40; n++) begin
      @(posedge clk); #1;
      for (int w = 0; w < WORDS; w++) bufm[w] = $urandom;
      index = 5'($urandom);
      exp_word = 0;
      n_done = 0;
      line_ready = 1;
      while (!done) begin @(posedge clk); #1; end
      @(posedge clk); #1;
      line_ready = 0;
      checks++;
      if (n_done != 1 || active) begin failures++; $display("FAIL done count %0d active %b", n_done, active); end
      repeat ($urandom_range(4, 1)) @(posedge clk);
    end
    checks++;
    if (n_writes != 40 * WORDS) begin failures++; $display("FAIL total writes %0d", n_writes); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
