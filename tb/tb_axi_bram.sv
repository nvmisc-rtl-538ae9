// tb_axi_bram: a 4 KiB memory driven through both ports against a reference
// array. The host port writes and reads single words with byte enables; the
// AXI port runs random INCR write bursts (with byte strobes and random W
// gaps) and read bursts (with random R back-pressure). Read bursts are also
// timed: the first beat must come one cycle after the address is accepted
// and beats must follow one per cycle while r_ready is high.
module tb_axi_bram;
  import nvmisc_pkg::*;
  localparam int BYTES = 4096, WORDS = BYTES / 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  axi_req_t req;
  axi_rsp_t rsp;
  logic ps_en = 0, ps_we = 0;
  logic [3:0] ps_be = 0;
  logic [31:0] ps_addr = 0, ps_wdata = 0, ps_rdata;
  logic [31:0] refm [WORDS];

  axi_bram #(.BYTES(BYTES)) dut (.clk_i(clk), .rst_ni(rst_n), .axi_req_i(req), .axi_rsp_o(rsp),
    .ps_en_i(ps_en), .ps_we_i(ps_we), .ps_be_i(ps_be), .ps_addr_i(ps_addr), .ps_wdata_i(ps_wdata),
    .ps_rdata_o(ps_rdata));

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic ps_write(input int w, input logic [31:0] d, input logic [3:0] b);
    ps_en = 1; ps_we = 1; ps_addr = 32'(w * 4); ps_wdata = d; ps_be = b;
    @(posedge clk); #1;
    ps_en = 0; ps_we = 0;
    for (int i = 0; i < 4; i++) if (b[i]) refm[w][8*i +: 8] = d[8*i +: 8];
  endtask

  task automatic ps_read(input int w);
    ps_en = 1; ps_we = 0; ps_addr = 32'(w * 4) | 32'h1234_0000;
    @(posedge clk); #1;
    ps_en = 0;
    chk(ps_rdata == refm[w], "host read");
  endtask

  task automatic axi_write(input int w0, input int len);
    req.aw_valid = 1; req.aw_addr = 32'(w0 * 4); req.aw_len = 8'(len - 1);
    while (1) begin #0; if (rsp.aw_ready) break; @(posedge clk); #1; end
    @(posedge clk); #1;
    req.aw_valid = 0;
    for (int b = 0; b < len; b++) begin
      logic [31:0] d = $urandom;
      logic [3:0] s = 4'($urandom_range(15, 1));
      repeat ($urandom_range(2, 0)) @(posedge clk);
      #1;
      req.w_valid = 1; req.w_data = d; req.w_strb = s; req.w_last = (b == len - 1);
      while (1) begin #0; if (rsp.w_ready) break; @(posedge clk); #1; end
      @(posedge clk); #1;
      req.w_valid = 0; req.w_last = 0;
      for (int i = 0; i < 4; i++) if (s[i]) refm[(w0 + b) % WORDS][8*i +: 8] = d[8*i +: 8];
    end
    req.b_ready = 1;
    while (1) begin #0; if (rsp.b_valid) break; @(posedge clk); #1; end
    @(posedge clk); #1;
    req.b_ready = 0;
    chk(1, "write response");
  endtask

  task automatic axi_read(input int w0, input int len, input bit stall);
    int cyc = 0;
    req.ar_valid = 1; req.ar_addr = 32'(w0 * 4); req.ar_len = 8'(len - 1);
    req.r_ready = 1;
    #0;
    chk(rsp.ar_ready, "ar_ready when idle");
    @(posedge clk); #1;
    req.ar_valid = 0;
    for (int b = 0; b < len; b++) begin
      if (stall) begin
        req.r_ready = 0;
        repeat ($urandom_range(2, 0)) @(posedge clk);
        #1 req.r_ready = 1;
      end
      #0;
      if (!stall) chk(rsp.r_valid, "beat every cycle");
      while (!rsp.r_valid) begin @(posedge clk); #1; end
      chk(rsp.r_data == refm[(w0 + b) % WORDS], $sformatf("read data beat %0d", b));
      chk(rsp.r_last == (b == len - 1), "r_last");
      @(posedge clk); #1;
    end
    req.r_ready = 0;
  endtask

  initial begin
    req = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    for (int w = 0; w < WORDS; w++) ps_write(w, $urandom, 4'hF);
    for (int n = 0; n < 300; n++) begin
      case ($urandom_range(4, 0))
        0: ps_write($urandom_range(WORDS-1, 0), $urandom, 4'($urandom_range(15, 1)));
        1: ps_read($urandom_range(WORDS-1, 0));
        2: axi_write($urandom_range(WORDS-1, 0), $urandom_range(16, 1));
        default: axi_read($urandom_range(WORDS-1, 0), $urandom_range(16, 1), $urandom_range(1, 0));
      endcase
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
