// tb_addr_crop: checks the tag / index / word / line-address split of
// addr_crop against arithmetic on random addresses (division and modulo by
// the line size and the number of lines), for the 16 KiB, 64-byte-line
// default and for a 128 KiB cache.
module tb_addr_crop;
  int checks = 0, failures = 0;
  logic [31:0] a;
  logic [17:0] tag16;  logic [7:0]  idx16; logic [3:0] w16; logic [31:0] la16;
  logic [14:0] tag128; logic [10:0] idx128; logic [3:0] w128; logic [31:0] la128;

  addr_crop #(.CACHE_BYTES(16*1024))  u16  (.addr_i(a), .tag_o(tag16),  .index_o(idx16),  .word_o(w16),  .line_addr_o(la16));
  addr_crop #(.CACHE_BYTES(128*1024)) u128 (.addr_i(a), .tag_o(tag128), .index_o(idx128), .word_o(w128), .line_addr_o(la128));

  task automatic check(input logic [31:0] got, input logic [31:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s addr=%h got=%h exp=%h", what, a, got, exp);
    end
  endtask

  initial begin
    for (int i = 0; i < 500; i++) begin
      a = (i < 4) ? (i == 0 ? 32'h0 : i == 1 ? 32'hFFFF_FFFF : i == 2 ? 32'h0000_3FC0 : 32'h8000_0044) : $urandom;
      #1;
      check(32'(tag16),  a / (16*1024),        "tag16");
      check(32'(idx16),  (a / 64) % 256,       "idx16");
      check(32'(w16),    (a % 64) / 4,         "word16");
      check(la16,        a - (a % 64),         "line16");
      check(32'(tag128), a / (128*1024),       "tag128");
      check(32'(idx128), (a / 64) % 2048,      "idx128");
      check(32'(w128),   (a % 64) / 4,         "word128");
      check(la128,       a - (a % 64),         "line128");
    end
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
