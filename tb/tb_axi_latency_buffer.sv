// tb_axi_latency_buffer: checks the request delay of the memory latency
// buffer for LATENCY = 5 and LATENCY = 1. For each random read and write
// address it measures the cycles from acceptance on the crossbar side to the
// request appearing on the memory side (must equal LATENCY), checks that
// address and length arrive unchanged, that the channel refuses a second
// request while one is held, and that W, R and B fields pass through.
module tb_axi_latency_buffer;
  import nvmisc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  axi_req_t s_req [2], m_req [2];
  axi_rsp_t s_rsp [2], m_rsp [2];

  axi_latency_buffer #(.LATENCY(5)) u5 (.clk_i(clk), .rst_ni(rst_n), .s_req_i(s_req[0]), .s_rsp_o(s_rsp[0]), .m_req_o(m_req[0]), .m_rsp_i(m_rsp[0]));
  axi_latency_buffer #(.LATENCY(1)) u1 (.clk_i(clk), .rst_ni(rst_n), .s_req_i(s_req[1]), .s_rsp_o(s_rsp[1]), .m_req_o(m_req[1]), .m_rsp_i(m_rsp[1]));

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic one(input int k, input int lat, input bit wr);
    logic [31:0] a = $urandom;
    logic [7:0] l = 8'($urandom);
    int cyc = 0;
    if (wr) begin s_req[k].aw_valid = 1; s_req[k].aw_addr = a; s_req[k].aw_len = l; end
    else    begin s_req[k].ar_valid = 1; s_req[k].ar_addr = a; s_req[k].ar_len = l; end
    #0;
    chk(wr ? s_rsp[k].aw_ready : s_rsp[k].ar_ready, "ready when empty");
    @(posedge clk); #1;
    s_req[k].aw_valid = 0; s_req[k].ar_valid = 0;
    cyc = 1;
    while (!(wr ? m_req[k].aw_valid : m_req[k].ar_valid) && cyc < 40) begin
      chk(!(wr ? s_rsp[k].aw_ready : s_rsp[k].ar_ready), "not ready while held");
      @(posedge clk); #1; cyc++;
    end
    chk(cyc == lat, $sformatf("delay %0d exp %0d", cyc, lat));
    chk(wr ? (m_req[k].aw_addr == a && m_req[k].aw_len == l) : (m_req[k].ar_addr == a && m_req[k].ar_len == l), "addr/len");
    // memory stalls a random time
    repeat ($urandom_range(3, 0)) begin
      @(posedge clk); #1;
      chk(wr ? m_req[k].aw_valid : m_req[k].ar_valid, "valid held");
    end
    if (wr) m_rsp[k].aw_ready = 1; else m_rsp[k].ar_ready = 1;
    @(posedge clk); #1;
    m_rsp[k].aw_ready = 0; m_rsp[k].ar_ready = 0;
    chk(!(wr ? m_req[k].aw_valid : m_req[k].ar_valid), "valid dropped");
  endtask

  initial begin
    for (int k = 0; k < 2; k++) begin s_req[k] = '0; m_rsp[k] = '0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    for (int n = 0; n < 100; n++) begin
      one(0, 5, $urandom_range(1, 0));
      one(1, 1, $urandom_range(1, 0));
      // pass-through of the data channels
      s_req[0].w_valid = 1; s_req[0].w_data = $urandom; s_req[0].w_strb = 4'($urandom);
      s_req[0].w_last = 1; s_req[0].r_ready = 1; s_req[0].b_ready = 1;
      m_rsp[0].r_valid = 1; m_rsp[0].r_data = $urandom; m_rsp[0].r_last = 1; m_rsp[0].b_valid = 1; m_rsp[0].w_ready = 1;
      #1;
      chk(m_req[0].w_valid && m_req[0].w_data == s_req[0].w_data && m_req[0].w_strb == s_req[0].w_strb
          && m_req[0].w_last && m_req[0].r_ready && m_req[0].b_ready, "request pass-through");
      chk(s_rsp[0].r_valid && s_rsp[0].r_data == m_rsp[0].r_data && s_rsp[0].r_last
          && s_rsp[0].b_valid && s_rsp[0].w_ready, "response pass-through");
      s_req[0] = '0; m_rsp[0] = '0;
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
