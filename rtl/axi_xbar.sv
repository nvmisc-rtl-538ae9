// axi_xbar: the crossbar that connects the RISC-V buses to the memories.
//
// NM masters (instruction bus and data bus) reach NS slaves (instruction and
// data memory). The slave is chosen by address bits [SEL_LSB +: log2(NS)];
// with the defaults, addresses below 0x8000_0000 go to the instruction
// memory and the rest to the data memory. Reads and writes are routed
// independently. A slave's read side is granted to one master per burst:
// the AR beat is passed through in the cycle of the grant, the slave stays
// locked to that master until its last R beat is taken, and the R beats go
// back only to that master. The write side is locked the same way from the
// AW beat to the B response, and only the owner's W beats reach the slave.
// When two masters want the same idle slave, a round-robin pointer per slave
// and direction chooses; the master that was not chosen waits. A grant the
// slave has not yet accepted is held, so the address beat stays stable.
//
// Each master must keep at most one read and one write outstanding (true of
// the D-cache and of a blocking instruction cache). The platform only names
// the crossbar; address map, arbitration and locking are this design's.
module axi_xbar
  import nvmisc_pkg::*;
#(
  parameter int unsigned NM      = 2,
  parameter int unsigned NS      = 2,
  parameter int unsigned SEL_LSB = 31,
  localparam int unsigned MI_W   = (NM > 1) ? $clog2(NM) : 1,
  localparam int unsigned SI_W   = (NS > 1) ? $clog2(NS) : 1
) (
  input  logic     clk_i,
  input  logic     rst_ni,
  input  axi_req_t m_req_i [NM],
  output axi_rsp_t m_rsp_o [NM],
  output axi_req_t s_req_o [NS],
  input  axi_rsp_t s_rsp_i [NS]
);

  logic [SI_W-1:0] ar_sel [NM];
  logic [SI_W-1:0] aw_sel [NM];

  logic [NS-1:0]   rd_busy_q, wr_busy_q;
  logic [MI_W-1:0] rd_owner_q [NS];
  logic [MI_W-1:0] wr_owner_q [NS];
  logic [MI_W-1:0] rd_prio_q  [NS];
  logic [MI_W-1:0] wr_prio_q  [NS];
  // a grant offered to a slave that did not take it yet is held, so that
  // the address beat stays stable until the handshake
  logic [NS-1:0]   rd_hold_q, wr_hold_q;
  logic [MI_W-1:0] rd_hold_m_q [NS];
  logic [MI_W-1:0] wr_hold_m_q [NS];

  logic [NS-1:0]   rd_gnt_v, wr_gnt_v;
  logic [MI_W-1:0] rd_gnt [NS];
  logic [MI_W-1:0] wr_gnt [NS];

  always_comb begin
    for (int m = 0; m < NM; m++) begin
      ar_sel[m] = (NS > 1) ? SI_W'(m_req_i[m].ar_addr >> SEL_LSB) : '0;
      aw_sel[m] = (NS > 1) ? SI_W'(m_req_i[m].aw_addr >> SEL_LSB) : '0;
    end

    // grants for idle slaves, round robin starting at the priority pointer
    for (int s = 0; s < NS; s++) begin
      rd_gnt_v[s] = 1'b0;
      rd_gnt[s]   = '0;
      wr_gnt_v[s] = 1'b0;
      wr_gnt[s]   = '0;
      if (rd_hold_q[s]) begin
        rd_gnt_v[s] = 1'b1;
        rd_gnt[s]   = rd_hold_m_q[s];
      end
      if (wr_hold_q[s]) begin
        wr_gnt_v[s] = 1'b1;
        wr_gnt[s]   = wr_hold_m_q[s];
      end
      for (int k = 0; k < NM; k++) begin
        int unsigned m;
        m = (32'(rd_prio_q[s]) + k) % NM;
        if (!rd_busy_q[s] && !rd_gnt_v[s] && m_req_i[m].ar_valid && ar_sel[m] == SI_W'(s)) begin
          rd_gnt_v[s] = 1'b1;
          rd_gnt[s]   = MI_W'(m);
        end
        m = (32'(wr_prio_q[s]) + k) % NM;
        if (!wr_busy_q[s] && !wr_gnt_v[s] && m_req_i[m].aw_valid && aw_sel[m] == SI_W'(s)) begin
          wr_gnt_v[s] = 1'b1;
          wr_gnt[s]   = MI_W'(m);
        end
      end
    end

    for (int m = 0; m < NM; m++) m_rsp_o[m] = '0;

    for (int s = 0; s < NS; s++) begin
      s_req_o[s] = '0;
      // address channels: only in the grant cycle
      if (rd_gnt_v[s]) begin
        s_req_o[s].ar_valid = 1'b1;
        s_req_o[s].ar_addr  = m_req_i[rd_gnt[s]].ar_addr;
        s_req_o[s].ar_len   = m_req_i[rd_gnt[s]].ar_len;
        m_rsp_o[rd_gnt[s]].ar_ready = s_rsp_i[s].ar_ready;
      end
      if (wr_gnt_v[s]) begin
        s_req_o[s].aw_valid = 1'b1;
        s_req_o[s].aw_addr  = m_req_i[wr_gnt[s]].aw_addr;
        s_req_o[s].aw_len   = m_req_i[wr_gnt[s]].aw_len;
        m_rsp_o[wr_gnt[s]].aw_ready = s_rsp_i[s].aw_ready;
      end
      // data channels: to and from the owner
      if (rd_busy_q[s]) begin
        s_req_o[s].r_ready = m_req_i[rd_owner_q[s]].r_ready;
        m_rsp_o[rd_owner_q[s]].r_valid = s_rsp_i[s].r_valid;
        m_rsp_o[rd_owner_q[s]].r_data  = s_rsp_i[s].r_data;
        m_rsp_o[rd_owner_q[s]].r_last  = s_rsp_i[s].r_last;
      end
      if (wr_busy_q[s]) begin
        s_req_o[s].w_valid = m_req_i[wr_owner_q[s]].w_valid;
        s_req_o[s].w_data  = m_req_i[wr_owner_q[s]].w_data;
        s_req_o[s].w_strb  = m_req_i[wr_owner_q[s]].w_strb;
        s_req_o[s].w_last  = m_req_i[wr_owner_q[s]].w_last;
        s_req_o[s].b_ready = m_req_i[wr_owner_q[s]].b_ready;
        m_rsp_o[wr_owner_q[s]].w_ready = s_rsp_i[s].w_ready;
        m_rsp_o[wr_owner_q[s]].b_valid = s_rsp_i[s].b_valid;
      end
    end
  end

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      rd_busy_q <= '0;
      wr_busy_q <= '0;
      rd_hold_q <= '0;
      wr_hold_q <= '0;
      for (int s = 0; s < NS; s++) begin
        rd_hold_m_q[s] <= '0;
        wr_hold_m_q[s] <= '0;
        rd_owner_q[s] <= '0;
        wr_owner_q[s] <= '0;
        rd_prio_q[s]  <= '0;
        wr_prio_q[s]  <= '0;
      end
    end else begin
      for (int s = 0; s < NS; s++) begin
        rd_hold_q[s]   <= rd_gnt_v[s] && !s_rsp_i[s].ar_ready;
        rd_hold_m_q[s] <= rd_gnt[s];
        wr_hold_q[s]   <= wr_gnt_v[s] && !s_rsp_i[s].aw_ready;
        wr_hold_m_q[s] <= wr_gnt[s];
        if (rd_gnt_v[s] && s_rsp_i[s].ar_ready) begin
          rd_busy_q[s]  <= 1'b1;
          rd_owner_q[s] <= rd_gnt[s];
          rd_prio_q[s]  <= MI_W'((32'(rd_gnt[s]) + 1) % NM);
        end else if (rd_busy_q[s] && s_rsp_i[s].r_valid && s_rsp_i[s].r_last
                     && m_req_i[rd_owner_q[s]].r_ready) begin
          rd_busy_q[s] <= 1'b0;
        end
        if (wr_gnt_v[s] && s_rsp_i[s].aw_ready) begin
          wr_busy_q[s]  <= 1'b1;
          wr_owner_q[s] <= wr_gnt[s];
          wr_prio_q[s]  <= MI_W'((32'(wr_gnt[s]) + 1) % NM);
        end else if (wr_busy_q[s] && s_rsp_i[s].b_valid && m_req_i[wr_owner_q[s]].b_ready) begin
          wr_busy_q[s] <= 1'b0;
        end
      end
    end
  end

endmodule
