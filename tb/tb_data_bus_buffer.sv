// tb_data_bus_buffer: sends 16-beat bursts with random gaps between beats,
// checks that line_ready_o rises only after the last beat, that r_ready_o is
// low while a full line waits (extra beats offered then are ignored), that
// every word reads back in place, and that release_i frees the buffer for the
// next burst.
module tb_data_bus_buffer;
  localparam int WORDS = 16;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic r_valid = 0, r_last = 0, r_ready, line_ready, receiving, release_l = 0;
  logic [31:0] r_data = 0, rd_data;
  logic [3:0] rd_idx = 0;
  logic [31:0] line [WORDS];

  data_bus_buffer #(.WORDS(WORDS)) dut (.clk_i(clk), .rst_ni(rst_n), .r_valid_i(r_valid),
    .r_data_i(r_data), .r_last_i(r_last), .r_ready_o(r_ready), .line_ready_o(line_ready),
    .receiving_o(receiving), .rd_idx_i(rd_idx), .rd_data_o(rd_data), .release_i(release_l));

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    for (int n = 0; n < 50; n++) begin
      for (int b = 0; b < WORDS; b++) begin
        repeat ($urandom_range(2, 0)) begin @(posedge clk); #1; chk(!line_ready, "early line_ready (gap)"); end
        line[b] = $urandom;
        r_valid = 1; r_data = line[b]; r_last = (b == WORDS-1);
        chk(r_ready, "r_ready while filling");
        @(posedge clk); #1;
        r_valid = 0; r_last = 0;
        chk(line_ready == (b == WORDS-1), "line_ready timing");
      end
      // a beat offered now must not be taken
      r_valid = 1; r_data = ~line[0]; r_last = 0;
      #1 chk(!r_ready, "r_ready low while full");
      @(posedge clk); #1;
      r_valid = 0;
      for (int b = WORDS-1; b >= 0; b--) begin
        rd_idx = 4'(b); #1;
        chk(rd_data == line[b], "word content");
      end
      repeat ($urandom_range(3, 0)) begin @(posedge clk); #1; chk(line_ready, "line held"); end
      release_l = 1;
      @(posedge clk); #1;
      release_l = 0;
      chk(!line_ready && r_ready, "released");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
