// axi_slave_model: behavioural AXI4 slave for testbenches. Serves one burst
// at a time from a word array of 256 entries (initialised to {ID, index}),
// with random delays on every handshake. Counts accepted transactions.
module axi_slave_model
  import nvmisc_pkg::*;
#(
  parameter logic [15:0] ID = 16'h0
) (
  input  logic     clk,
  input  logic     rst_n,
  input  axi_req_t req,
  output axi_rsp_t rsp,
  output int       n_reads,
  output int       n_writes
);
  logic [31:0] mem [256];
  initial begin
    for (int i = 0; i < 256; i++) mem[i] = {ID, 16'(i)};
    rsp = '0; n_reads = 0; n_writes = 0;
  end

  int a, len;

  initial begin
    @(posedge rst_n);
    forever begin
      @(posedge clk); #2;
      if (req.ar_valid) begin
        repeat ($urandom_range(2, 0)) begin @(posedge clk); #2; end
        rsp.ar_ready = 1;
        do @(posedge clk); while (!req.ar_valid);
        a = int'(req.ar_addr[9:2]);
        len = int'(req.ar_len) + 1;
        #2;
        rsp.ar_ready = 0;
        n_reads++;
        for (int b = 0; b < len; b++) begin
          repeat ($urandom_range(1, 0)) begin @(posedge clk); #2; end
          rsp.r_valid = 1; rsp.r_data = mem[(a + b) % 256]; rsp.r_last = (b == len - 1);
          do begin @(posedge clk); end while (!req.r_ready);
          #2;
          rsp.r_valid = 0; rsp.r_last = 0;
        end
      end else if (req.aw_valid) begin
        rsp.aw_ready = 1;
        do @(posedge clk); while (!req.aw_valid);
        a = int'(req.aw_addr[9:2]);
        #2;
        rsp.aw_ready = 0;
        n_writes++;
        while (1) begin
          rsp.w_ready = 1;
          do begin @(posedge clk); end while (!req.w_valid);
          for (int i = 0; i < 4; i++) if (req.w_strb[i]) mem[a % 256][8*i +: 8] = req.w_data[8*i +: 8];
          a++;
          #2;
          rsp.w_ready = 0;
          if (req.w_last) break;
        end
        rsp.b_valid = 1;
        do begin @(posedge clk); end while (!req.b_ready);
        #2;
        rsp.b_valid = 0;
      end
    end
  end
endmodule
