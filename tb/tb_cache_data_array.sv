// tb_cache_data_array: random byte-enabled writes and reads on an RTM data
// array (ring track, 4 ports, so latencies of 1 to 3 cycles, the 1-cycle case
// using the request inputs directly) and on an STT-RAM array (read 3, write 5).
// Each access is checked against a reference memory and against the expected
// request-to-ready latency, computed from a separate model of the track
// positions.
module tb_cache_data_array;
  import nvmisc_pkg::*;
  localparam int LINES = 16, WORDS = 16;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        req [2];
  logic        we [2];
  logic [3:0]  be [2];
  logic [3:0]  idx [2];
  logic [3:0]  wd [2];
  logic [31:0] wdata [2];
  logic        busy [2], ready [2];
  logic [31:0] rdata [2];
  logic [15:0] lat [2];
  logic [1:0]  sh0;
  logic [4:0]  sh1;

  cache_data_array #(.TECH(TECH_RTM), .LINES(LINES), .WORDS(WORDS), .ACCESS_PORTS(4), .RING(1'b1)) u_rtm (
    .clk_i(clk), .rst_ni(rst_n), .req_i(req[0]), .we_i(we[0]), .be_i(be[0]), .index_i(idx[0]),
    .word_i(wd[0]), .wdata_i(wdata[0]), .busy_o(busy[0]), .ready_o(ready[0]), .rdata_o(rdata[0]),
    .latency_o(lat[0]), .shifts_o(sh0));
  cache_data_array #(.TECH(TECH_STTRAM), .LINES(LINES), .WORDS(WORDS), .READ_LATENCY(3), .WRITE_LATENCY(5)) u_stt (
    .clk_i(clk), .rst_ni(rst_n), .req_i(req[1]), .we_i(we[1]), .be_i(be[1]), .index_i(idx[1]),
    .word_i(wd[1]), .wdata_i(wdata[1]), .busy_o(busy[1]), .ready_o(ready[1]), .rdata_o(rdata[1]),
    .latency_o(lat[1]), .shifts_o(sh1));

  logic [31:0] refm [2][LINES*WORDS];
  int pos [LINES];
  int seen_lat1 = 0;

  task automatic access(input int k, input bit w, input int l, input int wo, input logic [3:0] b, input logic [31:0] d);
    int exp_l, cyc, rel, dd;
    logic [31:0] e;
    if (k == 0) begin
      rel = wo % 4;
      dd = (rel > pos[l]) ? rel - pos[l] : pos[l] - rel;
      if (dd > 2) dd = 4 - dd;
      exp_l = 1 + dd;
      pos[l] = rel;
      if (exp_l == 1) seen_lat1++;
    end else exp_l = w ? 5 : 3;
    req[k] = 1; we[k] = w; idx[k] = 4'(l); wd[k] = 4'(wo); be[k] = b; wdata[k] = d;
    cyc = 0;
    @(posedge clk); #1;
    req[k] = 0; we[k] = 0; wdata[k] = $urandom; idx[k] = 4'($urandom); wd[k] = 4'($urandom);
    cyc = 1;
    while (!ready[k] && cyc < 50) begin @(posedge clk); #1; cyc++; end
    checks++;
    if (cyc != exp_l) begin failures++; $display("FAIL k=%0d latency %0d exp %0d", k, cyc, exp_l); end
    e = refm[k][l*WORDS+wo];
    if (w) begin
      for (int i = 0; i < 4; i++) if (b[i]) e[8*i +: 8] = d[8*i +: 8];
      refm[k][l*WORDS+wo] = e;
    end else begin
      checks++;
      if (rdata[k] !== e) begin failures++; $display("FAIL k=%0d read l=%0d w=%0d got %h exp %h", k, l, wo, rdata[k], e); end
    end
  endtask

  initial begin
    for (int k = 0; k < 2; k++) begin req[k] = 0; we[k] = 0; be[k] = 0; idx[k] = 0; wd[k] = 0; wdata[k] = 0; end
    for (int i = 0; i < LINES; i++) pos[i] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    for (int k = 0; k < 2; k++) begin
      // fill everything with full-word writes first
      for (int a = 0; a < LINES*WORDS; a++) begin
        automatic logic [31:0] d = $urandom;
        refm[k][a] = 0;
        access(k, 1, a / WORDS, a % WORDS, 4'hF, d);
      end
      for (int n = 0; n < 600; n++)
        access(k, $urandom_range(1, 0), $urandom_range(LINES-1, 0), $urandom_range(WORDS-1, 0),
               4'($urandom_range(15, 1)), $urandom);
    end
    checks++;
    if (seen_lat1 == 0) begin failures++; $display("FAIL no single-cycle RTM access seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
