// tb_halt_manager: walks the halt manager through its cases and compares
// halt_ex_o / halt_wb_o / refilling_o with the expected stall each cycle:
// no request; a hit that finishes after a random wait (halt from the
// request cycle, released in the done cycle); a miss with a refill of
// random length followed by the replayed access; back-to-back requests.
module tb_halt_manager;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic req = 0, done = 0, refill = 0, refill_done = 0;
  logic halt_ex, halt_wb, refilling;

  halt_manager dut (.clk_i(clk), .rst_ni(rst_n), .req_i(req), .access_done_i(done),
    .refill_i(refill), .refill_done_i(refill_done), .halt_ex_o(halt_ex), .halt_wb_o(halt_wb),
    .refilling_o(refilling));

  task automatic expect_halt(input bit h, input bit r, input string what);
    #0;
    checks++;
    if (halt_ex !== h || halt_wb !== h || refilling !== r) begin
      failures++;
      $display("FAIL %s: halt_ex=%b halt_wb=%b refilling=%b exp halt=%b refilling=%b", what, halt_ex, halt_wb, refilling, h, r);
    end
  endtask

  // one access: wait cycles before done, optional refill of rl cycles
  task automatic access(input int wait_c, input bit miss, input int rl);
    req = 1;
    expect_halt(1, 0, "request cycle");
    @(posedge clk); #1;
    if (miss) begin
      refill = 1;
      expect_halt(1, 0, "miss cycle");
      @(posedge clk); #1; refill = 0;
      for (int i = 0; i < rl; i++) begin expect_halt(1, 1, "refill"); @(posedge clk); #1; end
      refill_done = 1;
      expect_halt(1, 1, "refill done");
      @(posedge clk); #1; refill_done = 0;
    end
    for (int i = 0; i < wait_c; i++) begin expect_halt(1, 0, "waiting"); @(posedge clk); #1; end
    done = 1;
    expect_halt(0, 0, "done cycle");
    @(posedge clk); #1; done = 0;
  endtask

  initial begin
    repeat (2) @(posedge clk); #1;
    rst_n = 1;
    @(posedge clk); #1;
    for (int i = 0; i < 5; i++) begin expect_halt(0, 0, "no request"); @(posedge clk); #1; end
    for (int n = 0; n < 200; n++) begin
      access($urandom_range(6, 0), $urandom_range(1, 0), $urandom_range(20, 0));
      if ($urandom_range(1, 0)) begin
        req = 0;
        repeat ($urandom_range(3, 1)) begin expect_halt(0, 0, "gap"); @(posedge clk); #1; end
      end
    end
    req = 0;
    expect_halt(0, 0, "end");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk); #1;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
