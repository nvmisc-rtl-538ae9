// axi_bram: block-RAM main memory with an AXI4 slave port and a host port.
//
// Used twice on the platform: as the 64 KiB instruction memory and as the
// 512 KiB data memory. Port A is an AXI4 slave for the RISC-V side. It
// serves one burst at a time, reads before writes when both are waiting, and
// streams INCR read bursts at one beat per cycle from the cycle after the
// address is accepted. Write bursts are accepted one beat per cycle after the
// address, then a single write response is given. Port B is a plain
// synchronous word port for the host processor (load the program and data,
// poll the completion word): ps_rdata_o holds the word at ps_addr_i one cycle
// after ps_en_i. Both ports address the array with the low bits of a byte
// address, so the memory repeats across the address window the crossbar
// gives it. If both ports write the same word in one cycle, port B wins.
//
// Sizes and the host access follow the platform; the port protocols and the
// arbitration are this design's choices.
module axi_bram
  import nvmisc_pkg::*;
#(
  parameter int unsigned BYTES = 512 * 1024,
  localparam int unsigned WORDS  = BYTES / 4,
  localparam int unsigned WADR_W = $clog2(WORDS)
) (
  input  logic               clk_i,
  input  logic               rst_ni,
  input  axi_req_t           axi_req_i,
  output axi_rsp_t           axi_rsp_o,
  input  logic               ps_en_i,
  input  logic               ps_we_i,
  input  logic [STRB_W-1:0]  ps_be_i,
  input  logic [ADDR_W-1:0]  ps_addr_i,
  input  logic [DATA_W-1:0]  ps_wdata_i,
  output logic [DATA_W-1:0]  ps_rdata_o
);

  typedef enum logic [1:0] {M_IDLE, M_READ, M_WRITE, M_RESP} mem_state_e;

  logic [DATA_W-1:0] mem [WORDS];

  mem_state_e        state_q;
  logic [WADR_W-1:0] cur_q, rd_a;
  logic [7:0]        left_q;
  logic [DATA_W-1:0] q;
  logic              ar_hs, aw_hs, r_hs, w_hs;
  logic [WADR_W-1:0] ps_a;

  assign ps_a = ps_addr_i[2 +: WADR_W];

  always_comb begin
    axi_rsp_o          = '0;
    axi_rsp_o.ar_ready = (state_q == M_IDLE);
    axi_rsp_o.aw_ready = (state_q == M_IDLE) && !axi_req_i.ar_valid;
    axi_rsp_o.r_valid  = (state_q == M_READ);
    axi_rsp_o.r_data   = q;
    axi_rsp_o.r_last   = (state_q == M_READ) && (left_q == 8'd0);
    axi_rsp_o.w_ready  = (state_q == M_WRITE);
    axi_rsp_o.b_valid  = (state_q == M_RESP);

    ar_hs = axi_req_i.ar_valid && axi_rsp_o.ar_ready;
    aw_hs = axi_req_i.aw_valid && axi_rsp_o.aw_ready;
    r_hs  = axi_rsp_o.r_valid && axi_req_i.r_ready;
    w_hs  = axi_req_i.w_valid && axi_rsp_o.w_ready;

    if (ar_hs)     rd_a = axi_req_i.ar_addr[2 +: WADR_W];
    else if (r_hs) rd_a = cur_q + WADR_W'(1);
    else           rd_a = cur_q;
  end

  // Both ports of the RAM in one process, as a true dual-port block RAM.
  always_ff @(posedge clk_i) begin
    q <= mem[rd_a];
    if (w_hs) begin
      for (int b = 0; b < STRB_W; b++)
        if (axi_req_i.w_strb[b]) mem[cur_q][8*b +: 8] <= axi_req_i.w_data[8*b +: 8];
    end
    if (ps_en_i) begin
      ps_rdata_o <= mem[ps_a];
      if (ps_we_i) begin
        for (int b = 0; b < STRB_W; b++)
          if (ps_be_i[b]) mem[ps_a][8*b +: 8] <= ps_wdata_i[8*b +: 8];
      end
    end
  end

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      state_q <= M_IDLE;
      cur_q   <= '0;
      left_q  <= '0;
    end else begin
      unique case (state_q)
        M_IDLE: begin
          if (ar_hs) begin
            cur_q   <= axi_req_i.ar_addr[2 +: WADR_W];
            left_q  <= axi_req_i.ar_len;
            state_q <= M_READ;
          end else if (aw_hs) begin
            cur_q   <= axi_req_i.aw_addr[2 +: WADR_W];
            left_q  <= axi_req_i.aw_len;
            state_q <= M_WRITE;
          end
        end
        M_READ: if (r_hs) begin
          cur_q  <= cur_q + WADR_W'(1);
          left_q <= left_q - 8'd1;
          if (left_q == 8'd0) state_q <= M_IDLE;
        end
        M_WRITE: if (w_hs) begin
          cur_q  <= cur_q + WADR_W'(1);
          left_q <= left_q - 8'd1;
          if (axi_req_i.w_last) state_q <= M_RESP;
        end
        default: if (axi_req_i.b_ready) state_q <= M_IDLE;
      endcase
    end
  end

  // The last write beat is flagged exactly where the burst length says.
  assert property (@(posedge clk_i) disable iff (!rst_ni)
                   w_hs |-> (axi_req_i.w_last == (left_q == 8'd0)));

endmodule
