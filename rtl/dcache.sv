// dcache: direct-mapped L1 data cache that emulates SRAM, STT-RAM or
// racetrack-memory (RTM) timing.
//
// The cache answers loads and stores of the pipeline. The address is cut
// into tag / index / word (addr_crop); the tag array (synchronous SRAM) is
// read in the request cycle and compared in the next one. All data-array
// accesses, from the pipeline and from the loader alike, go through
// cache_data_array, whose latency emulation makes each access last as long
// as the selected technology would. The halt manager keeps the Execute and
// Writeback stages stalled for the whole time.
//
//   load hit   : one data-array read.
//   load miss  : an AXI4 INCR burst of the whole line is read into the data
//                bus buffer; the loader writes the line word by word into the
//                data array (each write with the technology's write latency);
//                the tag is written and the load is replayed as a hit.
//   store      : write-through without write-allocate. A store that hits
//                writes the data array and, in parallel, sends one AXI4 write
//                beat to memory; a store that misses only goes to memory. The
//                store finishes when both are done (B response received).
//
// Pipeline interface: cpu_req_i is high while a load/store is in Execute;
// cpu_we_i, cpu_be_i, cpu_addr_i, cpu_wdata_i must stay stable while halt_ex_o
// is high. In the cycle halt_ex_o drops, a load's data is on cpu_rdata_o. The
// earliest completion is cycle t+2+L for a request in cycle t (one cycle tag
// lookup, one to issue, L the data-array latency).
//
// Direct mapping, the latency knobs and the refill path (bus buffer, loader,
// halt manager) follow the platform. The write policy (write-through, no
// allocate), the 64-byte line and the replay of a missed load are this
// design's choices.
module dcache
  import nvmisc_pkg::*;
#(
  parameter tech_e       TECH             = TECH_RTM,
  parameter int unsigned CACHE_BYTES      = 16 * 1024,
  parameter int unsigned LINE_BYTES       = 64,
  parameter int unsigned ACCESS_LATENCY   = 2,
  parameter int unsigned READ_LATENCY     = 2,
  parameter int unsigned WRITE_LATENCY    = 6,
  parameter int unsigned TRACK_LENGTH     = 16,
  parameter int unsigned ACCESS_PORTS     = 1,
  parameter bit          RING             = 1'b0,
  parameter int unsigned SHIFT_PER_CYCLE  = 1,
  parameter int unsigned RTM_PORT_LATENCY = 1,
  localparam int unsigned LINES   = CACHE_BYTES / LINE_BYTES,
  localparam int unsigned WORDS   = LINE_BYTES / 4,
  localparam int unsigned INDEX_W = $clog2(LINES),
  localparam int unsigned WORD_W  = $clog2(WORDS),
  localparam int unsigned TAG_W   = ADDR_W - INDEX_W - $clog2(LINE_BYTES),
  localparam int unsigned L_MAX   = TRACK_LENGTH / (ACCESS_PORTS * (RING ? 2 : 1)),
  localparam int unsigned SHIFT_W = $clog2(L_MAX + 1)
) (
  input  logic               clk_i,
  input  logic               rst_ni,
  // pipeline side
  input  logic               cpu_req_i,
  input  logic               cpu_we_i,
  input  logic [STRB_W-1:0]  cpu_be_i,
  input  logic [ADDR_W-1:0]  cpu_addr_i,
  input  logic [DATA_W-1:0]  cpu_wdata_i,
  output logic [DATA_W-1:0]  cpu_rdata_o,
  output logic               halt_ex_o,
  output logic               halt_wb_o,
  // memory side (AXI4 master)
  output axi_req_t           axi_req_o,
  input  axi_rsp_t           axi_rsp_i,
  // observation
  output logic               ev_hit_o,
  output logic               ev_miss_o,
  output logic               ev_refill_done_o,
  output logic               ev_arr_start_o,
  output logic [15:0]        arr_latency_o,
  output logic [SHIFT_W-1:0] arr_shifts_o
);

  typedef enum logic [2:0] {
    C_IDLE, C_LOOKUP, C_AR, C_FILL, C_ARR_REQ, C_ARR_WAIT, C_WRITE
  } ctrl_state_e;

  ctrl_state_e state_q;

  // captured request
  logic               we_q;
  logic [STRB_W-1:0]  be_q;
  logic [ADDR_W-1:0]  addr_q;
  logic [DATA_W-1:0]  wdata_q;

  // address fields
  logic [TAG_W-1:0]   in_tag, req_tag;
  logic [INDEX_W-1:0] in_index, req_index;
  logic [WORD_W-1:0]  in_word, req_word;
  logic [ADDR_W-1:0]  in_line_addr, req_line_addr;

  addr_crop #(.ADDR_W(ADDR_W), .CACHE_BYTES(CACHE_BYTES), .LINE_BYTES(LINE_BYTES)) u_crop_in (
    .addr_i(cpu_addr_i), .tag_o(in_tag), .index_o(in_index), .word_o(in_word),
    .line_addr_o(in_line_addr));
  addr_crop #(.ADDR_W(ADDR_W), .CACHE_BYTES(CACHE_BYTES), .LINE_BYTES(LINE_BYTES)) u_crop_req (
    .addr_i(addr_q), .tag_o(req_tag), .index_o(req_index), .word_o(req_word),
    .line_addr_o(req_line_addr));

  // tag array
  logic             tag_rd_en;
  logic [TAG_W-1:0] tag_rd;
  logic             tag_valid;
  logic             tag_wr_en;
  logic             hit;

  assign tag_rd_en = (state_q == C_IDLE) && cpu_req_i;
  assign hit       = tag_valid && (tag_rd == req_tag);

  tag_array #(.LINES(LINES), .TAG_W(TAG_W)) u_tags (
    .clk_i, .rst_ni,
    .rd_en_i(tag_rd_en), .rd_index_i(in_index), .rd_tag_o(tag_rd), .rd_valid_o(tag_valid),
    .wr_en_i(tag_wr_en), .wr_index_i(req_index), .wr_tag_i(req_tag));

  // data array, shared by the controller and the loader
  logic               arr_req, arr_we, arr_busy, arr_ready;
  logic [STRB_W-1:0]  arr_be;
  logic [INDEX_W-1:0] arr_index;
  logic [WORD_W-1:0]  arr_word;
  logic [DATA_W-1:0]  arr_wdata, arr_rdata;

  logic               ld_active, ld_req, ld_done;
  logic [INDEX_W-1:0] ld_index;
  logic [WORD_W-1:0]  ld_word, buf_idx;
  logic [DATA_W-1:0]  ld_wdata, buf_data;
  logic               ctl_arr_req;

  cache_data_array #(
    .TECH(TECH), .LINES(LINES), .WORDS(WORDS),
    .ACCESS_LATENCY(ACCESS_LATENCY), .READ_LATENCY(READ_LATENCY),
    .WRITE_LATENCY(WRITE_LATENCY), .TRACK_LENGTH(TRACK_LENGTH),
    .ACCESS_PORTS(ACCESS_PORTS), .RING(RING),
    .SHIFT_PER_CYCLE(SHIFT_PER_CYCLE), .RTM_PORT_LATENCY(RTM_PORT_LATENCY)
  ) u_array (
    .clk_i, .rst_ni,
    .req_i(arr_req), .we_i(arr_we), .be_i(arr_be), .index_i(arr_index),
    .word_i(arr_word), .wdata_i(arr_wdata),
    .busy_o(arr_busy), .ready_o(arr_ready), .rdata_o(arr_rdata),
    .latency_o(arr_latency_o), .shifts_o(arr_shifts_o));

  always_comb begin
    if (ld_active) begin
      arr_req   = ld_req;
      arr_we    = 1'b1;
      arr_be    = '1;
      arr_index = ld_index;
      arr_word  = ld_word;
      arr_wdata = ld_wdata;
    end else begin
      arr_req   = ctl_arr_req;
      arr_we    = we_q;
      arr_be    = be_q;
      arr_index = req_index;
      arr_word  = req_word;
      arr_wdata = wdata_q;
    end
  end

  assign ev_arr_start_o = arr_req && !arr_busy;

  // refill path
  logic buf_line_ready, buf_receiving;

  data_bus_buffer #(.WORDS(WORDS)) u_buffer (
    .clk_i, .rst_ni,
    .r_valid_i(axi_rsp_i.r_valid), .r_data_i(axi_rsp_i.r_data), .r_last_i(axi_rsp_i.r_last),
    .r_ready_o(axi_req_o.r_ready),
    .line_ready_o(buf_line_ready), .receiving_o(buf_receiving),
    .rd_idx_i(buf_idx), .rd_data_o(buf_data), .release_i(ld_done));

  cache_loader #(.LINES(LINES), .WORDS(WORDS)) u_loader (
    .clk_i, .rst_ni,
    .line_ready_i(buf_line_ready), .index_i(req_index),
    .buf_idx_o(buf_idx), .buf_data_i(buf_data),
    .arr_req_o(ld_req), .arr_index_o(ld_index), .arr_word_o(ld_word), .arr_wdata_o(ld_wdata),
    .arr_busy_i(arr_busy), .arr_ready_i(arr_ready),
    .active_o(ld_active), .done_o(ld_done));

  // halt manager
  logic access_done, refill_start, hm_refilling;

  halt_manager u_halt (
    .clk_i, .rst_ni,
    .req_i(cpu_req_i), .access_done_i(access_done),
    .refill_i(refill_start), .refill_done_i(ld_done),
    .halt_ex_o, .halt_wb_o, .refilling_o(hm_refilling));

  // write-through bookkeeping
  logic aw_done_q, w_done_q, b_done_q, arr_wr_pending_q, arr_wr_done_q;
  logic write_hit_q;
  logic aw_hs, w_hs, b_hs, all_written;

  assign aw_hs = axi_req_o.aw_valid && axi_rsp_i.aw_ready;
  assign w_hs  = axi_req_o.w_valid  && axi_rsp_i.w_ready;
  assign b_hs  = axi_req_o.b_ready  && axi_rsp_i.b_valid;
  assign all_written = (b_done_q || b_hs)
                    && (!write_hit_q || arr_wr_done_q || (!arr_wr_pending_q && arr_ready));

  always_comb begin
    axi_req_o.ar_valid = (state_q == C_AR);
    axi_req_o.ar_addr  = req_line_addr;
    axi_req_o.ar_len   = 8'(WORDS - 1);
    axi_req_o.aw_valid = (state_q == C_WRITE) && !aw_done_q;
    axi_req_o.aw_addr  = {addr_q[ADDR_W-1:2], 2'b00};
    axi_req_o.aw_len   = 8'd0;
    axi_req_o.w_valid  = (state_q == C_WRITE) && !w_done_q;
    axi_req_o.w_data   = wdata_q;
    axi_req_o.w_strb   = be_q;
    axi_req_o.w_last   = 1'b1;
    axi_req_o.b_ready  = (state_q == C_WRITE) && !b_done_q;

    ctl_arr_req  = (state_q == C_ARR_REQ) || ((state_q == C_WRITE) && arr_wr_pending_q);
    refill_start = (state_q == C_LOOKUP) && !we_q && !hit;
    access_done  = ((state_q == C_ARR_WAIT) && arr_ready)
                || ((state_q == C_WRITE) && all_written);
    tag_wr_en    = (state_q == C_FILL) && ld_done;
    ev_hit_o     = (state_q == C_LOOKUP) && hit;
    ev_miss_o    = (state_q == C_LOOKUP) && !hit;
    ev_refill_done_o = ld_done;
  end

  assign cpu_rdata_o = arr_rdata;

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      state_q          <= C_IDLE;
      we_q             <= 1'b0;
      be_q             <= '0;
      addr_q           <= '0;
      wdata_q          <= '0;
      aw_done_q        <= 1'b0;
      w_done_q         <= 1'b0;
      b_done_q         <= 1'b0;
      arr_wr_pending_q <= 1'b0;
      arr_wr_done_q    <= 1'b0;
      write_hit_q      <= 1'b0;
    end else begin
      unique case (state_q)
        C_IDLE: if (cpu_req_i) begin
          we_q    <= cpu_we_i;
          be_q    <= cpu_be_i;
          addr_q  <= cpu_addr_i;
          wdata_q <= cpu_wdata_i;
          state_q <= C_LOOKUP;
        end
        C_LOOKUP: begin
          if (we_q) begin
            write_hit_q      <= hit;
            arr_wr_pending_q <= hit;
            arr_wr_done_q    <= 1'b0;
            aw_done_q        <= 1'b0;
            w_done_q         <= 1'b0;
            b_done_q         <= 1'b0;
            state_q          <= C_WRITE;
          end else if (hit) begin
            state_q <= C_ARR_REQ;
          end else begin
            state_q <= C_AR;
          end
        end
        C_AR:       if (axi_rsp_i.ar_ready) state_q <= C_FILL;
        C_FILL:     if (ld_done) state_q <= C_ARR_REQ;
        C_ARR_REQ:  if (!arr_busy) state_q <= C_ARR_WAIT;
        C_ARR_WAIT: if (arr_ready) state_q <= C_IDLE;
        C_WRITE: begin
          if (aw_hs) aw_done_q <= 1'b1;
          if (w_hs)  w_done_q  <= 1'b1;
          if (b_hs)  b_done_q  <= 1'b1;
          if (arr_wr_pending_q && !arr_busy) arr_wr_pending_q <= 1'b0;
          if (!arr_wr_pending_q && arr_ready) arr_wr_done_q <= 1'b1;
          if (all_written) state_q <= C_IDLE;
        end
        default: state_q <= C_IDLE;
      endcase
    end
  end

  // The loader only runs while the halt manager is in its refill state.
  assert property (@(posedge clk_i) disable iff (!rst_ni) ld_active |-> hm_refilling);

  // The pipeline keeps its request stable while it is halted.
  assert property (@(posedge clk_i) disable iff (!rst_ni)
                   (halt_ex_o && state_q != C_IDLE) |=> cpu_req_i);

endmodule
