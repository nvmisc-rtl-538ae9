// axi_latency_buffer: holds memory requests back to emulate DRAM latency.
//
// The platform keeps its main memory in on-chip block RAM, which answers far
// faster than the DRAM of a real system. This buffer sits between the
// crossbar and a memory and stores each read and write address request for
// LATENCY cycles before it is passed on: a request accepted from the
// crossbar in cycle t is offered to the memory in cycle t+LATENCY. Each of
// the AR and AW channels holds one request; the channel does not accept the
// next one until the held request has gone to the memory. Write data, read
// data and write responses pass straight through (the memory accepts write
// data only after it has the write address).
//
// Placing a buffer between the memory bus and the crossbar follows the
// platform; the depth of one, the fixed delay and its default of 16 cycles
// are this design's choices.
module axi_latency_buffer
  import nvmisc_pkg::*;
#(
  parameter int unsigned LATENCY = 16,
  localparam int unsigned CNT_W  = $clog2(LATENCY + 1)
) (
  input  logic     clk_i,
  input  logic     rst_ni,
  input  axi_req_t s_req_i,
  output axi_rsp_t s_rsp_o,
  output axi_req_t m_req_o,
  input  axi_rsp_t m_rsp_i
);

  logic              ar_full_q, aw_full_q;
  logic [CNT_W-1:0]  ar_cnt_q, aw_cnt_q;
  logic [ADDR_W-1:0] ar_addr_q, aw_addr_q;
  logic [7:0]        ar_len_q, aw_len_q;

  always_comb begin
    m_req_o          = s_req_i;
    m_req_o.ar_valid = ar_full_q && (ar_cnt_q == '0);
    m_req_o.ar_addr  = ar_addr_q;
    m_req_o.ar_len   = ar_len_q;
    m_req_o.aw_valid = aw_full_q && (aw_cnt_q == '0);
    m_req_o.aw_addr  = aw_addr_q;
    m_req_o.aw_len   = aw_len_q;

    s_rsp_o          = m_rsp_i;
    s_rsp_o.ar_ready = !ar_full_q;
    s_rsp_o.aw_ready = !aw_full_q;
  end

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      ar_full_q <= 1'b0;
      aw_full_q <= 1'b0;
      ar_cnt_q  <= '0;
      aw_cnt_q  <= '0;
      ar_addr_q <= '0;
      aw_addr_q <= '0;
      ar_len_q  <= '0;
      aw_len_q  <= '0;
    end else begin
      if (!ar_full_q) begin
        if (s_req_i.ar_valid) begin
          ar_full_q <= 1'b1;
          ar_cnt_q  <= CNT_W'(LATENCY - 1);
          ar_addr_q <= s_req_i.ar_addr;
          ar_len_q  <= s_req_i.ar_len;
        end
      end else if (ar_cnt_q != '0) begin
        ar_cnt_q <= ar_cnt_q - CNT_W'(1);
      end else if (m_rsp_i.ar_ready) begin
        ar_full_q <= 1'b0;
      end

      if (!aw_full_q) begin
        if (s_req_i.aw_valid) begin
          aw_full_q <= 1'b1;
          aw_cnt_q  <= CNT_W'(LATENCY - 1);
          aw_addr_q <= s_req_i.aw_addr;
          aw_len_q  <= s_req_i.aw_len;
        end
      end else if (aw_cnt_q != '0) begin
        aw_cnt_q <= aw_cnt_q - CNT_W'(1);
      end else if (m_rsp_i.aw_ready) begin
        aw_full_q <= 1'b0;
      end
    end
  end

  initial assert (LATENCY >= 1) else $error("axi_latency_buffer: LATENCY must be at least 1");

endmodule
