// tb_axi_xbar: two masters issue random single reads, burst reads and single
// writes to both slaves of the 2x2 crossbar at the same time. Each master
// writes only its own half of each slave's words, so every read has a known
// answer; the slaves start with different contents, so a misrouted request
// shows as wrong data. Also checked: transaction counts per slave, and that
// both masters did compete for the same slave.
module tb_axi_xbar;
  import nvmisc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  axi_req_t m_req [2], s_req [2];
  axi_rsp_t m_rsp [2], s_rsp [2];
  int nr [2], nw [2];
  int exp_r [2], exp_w [2];
  logic [31:0] refm [2][256];
  bit fin [2];
  int contention = 0;

  axi_xbar #(.NM(2), .NS(2), .SEL_LSB(31)) dut (.clk_i(clk), .rst_ni(rst_n),
    .m_req_i(m_req), .m_rsp_o(m_rsp), .s_req_o(s_req), .s_rsp_i(s_rsp));
  axi_slave_model #(.ID(16'hA000)) s0 (.clk, .rst_n, .req(s_req[0]), .rsp(s_rsp[0]), .n_reads(nr[0]), .n_writes(nw[0]));
  axi_slave_model #(.ID(16'hB000)) s1 (.clk, .rst_n, .req(s_req[1]), .rsp(s_rsp[1]), .n_reads(nr[1]), .n_writes(nw[1]));

  always @(posedge clk)
    if ((m_req[0].ar_valid && m_req[1].ar_valid && m_req[0].ar_addr[31] == m_req[1].ar_addr[31])
     || (m_req[0].aw_valid && m_req[1].aw_valid && m_req[0].aw_addr[31] == m_req[1].aw_addr[31]))
      contention++;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic master(input int m);
    for (int n = 0; n < 150; n++) begin
      int s = $urandom_range(1, 0);
      int w = (($urandom_range(127, 0)) & ~1) | m;   // own words: lowest bit = master
      bit wr = $urandom_range(2, 0) == 0;
      logic [31:0] a = {s[0], 21'h0, 8'(w), 2'b00};
      if (wr) begin
        logic [31:0] d = $urandom;
        m_req[m].aw_valid = 1; m_req[m].aw_addr = a; m_req[m].aw_len = 0;
        do @(posedge clk); while (!m_rsp[m].aw_ready);
        #1 m_req[m].aw_valid = 0;
        m_req[m].w_valid = 1; m_req[m].w_data = d; m_req[m].w_strb = 4'hF; m_req[m].w_last = 1;
        do @(posedge clk); while (!m_rsp[m].w_ready);
        #1 m_req[m].w_valid = 0;
        m_req[m].b_ready = 1;
        do @(posedge clk); while (!m_rsp[m].b_valid);
        #1 m_req[m].b_ready = 0;
        refm[s][w] = d;
        exp_w[s]++;
      end else begin
        int len = ($urandom_range(1, 0) == 1) ? 1 : 4;
        if (len == 4) w = w & ~3;
        m_req[m].ar_valid = 1; m_req[m].ar_addr = {s[0], 21'h0, 8'(w), 2'b00}; m_req[m].ar_len = 8'(len - 1);
        do @(posedge clk); while (!m_rsp[m].ar_ready);
        #1 m_req[m].ar_valid = 0;
        m_req[m].r_ready = 1;
        for (int b = 0; b < len; b++) begin
          do @(posedge clk); while (!m_rsp[m].r_valid);
          // words of the other master are only checked when not written
          if (((w + b) & 1) == m || refm[s][w + b] == {(s == 0) ? 16'hA000 : 16'hB000, 16'(w + b)})
            chk(m_rsp[m].r_data == refm[s][w + b], $sformatf("m%0d read s%0d w%0d got %h exp %h len %0d", m, s, w + b, m_rsp[m].r_data, refm[s][w + b], len));
          chk(m_rsp[m].r_last == (b == len - 1), "r_last");
        end
        #1 m_req[m].r_ready = 0;
        exp_r[s]++;
      end
      repeat ($urandom_range(2, 0)) @(posedge clk);
      #1;
    end
    fin[m] = 1;
  endtask

  initial begin
    for (int s = 0; s < 2; s++) for (int i = 0; i < 256; i++) refm[s][i] = {(s == 0) ? 16'hA000 : 16'hB000, 16'(i)};
    m_req[0] = '0; m_req[1] = '0;
    exp_r = '{0, 0}; exp_w = '{0, 0}; fin = '{0, 0};
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    @(posedge clk); #1;
    fork
      master(0);
      master(1);
    join
    repeat (5) @(posedge clk);
    for (int s = 0; s < 2; s++) begin
      chk(nr[s] == exp_r[s], $sformatf("reads at slave %0d: %0d exp %0d", s, nr[s], exp_r[s]));
      chk(nw[s] == exp_w[s], $sformatf("writes at slave %0d: %0d exp %0d", s, nw[s], exp_w[s]));
    end
    chk(contention > 0, "masters competed for a slave");
    $display("contention cycles: %0d", contention);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
