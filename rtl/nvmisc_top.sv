// nvmisc_top: programmable-logic part of the NVM emulation platform.
//
// A RISC-V pipeline (outside this design) uses an L1 data cache whose data
// array emulates SRAM, STT-RAM or racetrack-memory timing. The cache and the
// pipeline's instruction bus reach the instruction and data memories through
// a 2x2 AXI4 crossbar; a latency buffer in front of each memory stretches the
// on-chip RAM response to that of a DRAM. The host processor can read and
// write both memories through their second ports, to load a benchmark and to
// poll the word the benchmark writes when it ends.
//
//   pipeline --cpu_*--> dcache --AXI--> xbar M1 --+--> S0: latency buffer -> instruction memory
//   ibus_* (I-cache) ----------------> xbar M0 --+--> S1: latency buffer -> data memory
//                                          host ps_imem_* / ps_dmem_* ports
//
// Ports: cpu_* and halt_* are the pipeline's view of the D-cache (see
// dcache); ibus_req_i / ibus_rsp_o carry the instruction-cache refills;
// ps_imem_* / ps_dmem_* are the host ports of the memories; ev_* and
// arr_* expose cache events and per-access latency for measurement. rst_ni
// is the host-driven reset that restarts the core. The parameter defaults are
// the racetrack configuration with a 16-bit track, one port and one shift per
// cycle, a 16 KiB D-cache, 64 KiB instruction and 512 KiB data memory.
// Memory sizes, cache technologies and their knobs follow the platform; the
// address map (instruction memory below 0x8000_0000) and the 16-cycle memory
// latency are this design's choices.
module nvmisc_top
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
  parameter int unsigned IMEM_BYTES       = 64 * 1024,
  parameter int unsigned DMEM_BYTES       = 512 * 1024,
  parameter int unsigned MEM_LATENCY      = 16,
  localparam int unsigned L_MAX   = TRACK_LENGTH / (ACCESS_PORTS * (RING ? 2 : 1)),
  localparam int unsigned SHIFT_W = $clog2(L_MAX + 1)
) (
  input  logic               clk_i,
  input  logic               rst_ni,
  // pipeline <-> D-cache
  input  logic               cpu_req_i,
  input  logic               cpu_we_i,
  input  logic [STRB_W-1:0]  cpu_be_i,
  input  logic [ADDR_W-1:0]  cpu_addr_i,
  input  logic [DATA_W-1:0]  cpu_wdata_i,
  output logic [DATA_W-1:0]  cpu_rdata_o,
  output logic               halt_ex_o,
  output logic               halt_wb_o,
  // instruction bus (from the instruction cache)
  input  axi_req_t           ibus_req_i,
  output axi_rsp_t           ibus_rsp_o,
  // host ports
  input  logic               ps_imem_en_i,
  input  logic               ps_imem_we_i,
  input  logic [STRB_W-1:0]  ps_imem_be_i,
  input  logic [ADDR_W-1:0]  ps_imem_addr_i,
  input  logic [DATA_W-1:0]  ps_imem_wdata_i,
  output logic [DATA_W-1:0]  ps_imem_rdata_o,
  input  logic               ps_dmem_en_i,
  input  logic               ps_dmem_we_i,
  input  logic [STRB_W-1:0]  ps_dmem_be_i,
  input  logic [ADDR_W-1:0]  ps_dmem_addr_i,
  input  logic [DATA_W-1:0]  ps_dmem_wdata_i,
  output logic [DATA_W-1:0]  ps_dmem_rdata_o,
  // measurement
  output logic               ev_hit_o,
  output logic               ev_miss_o,
  output logic               ev_refill_done_o,
  output logic               ev_arr_start_o,
  output logic [15:0]        arr_latency_o,
  output logic [SHIFT_W-1:0] arr_shifts_o
);

  axi_req_t m_req [2];
  axi_rsp_t m_rsp [2];
  axi_req_t s_req [2];
  axi_rsp_t s_rsp [2];
  axi_req_t mem_req [2];
  axi_rsp_t mem_rsp [2];

  dcache #(
    .TECH(TECH), .CACHE_BYTES(CACHE_BYTES), .LINE_BYTES(LINE_BYTES),
    .ACCESS_LATENCY(ACCESS_LATENCY), .READ_LATENCY(READ_LATENCY),
    .WRITE_LATENCY(WRITE_LATENCY), .TRACK_LENGTH(TRACK_LENGTH),
    .ACCESS_PORTS(ACCESS_PORTS), .RING(RING),
    .SHIFT_PER_CYCLE(SHIFT_PER_CYCLE), .RTM_PORT_LATENCY(RTM_PORT_LATENCY)
  ) u_dcache (
    .clk_i, .rst_ni,
    .cpu_req_i, .cpu_we_i, .cpu_be_i, .cpu_addr_i, .cpu_wdata_i, .cpu_rdata_o,
    .halt_ex_o, .halt_wb_o,
    .axi_req_o(m_req[1]), .axi_rsp_i(m_rsp[1]),
    .ev_hit_o, .ev_miss_o, .ev_refill_done_o, .ev_arr_start_o,
    .arr_latency_o, .arr_shifts_o);

  assign m_req[0]   = ibus_req_i;
  assign ibus_rsp_o = m_rsp[0];

  axi_xbar #(.NM(2), .NS(2), .SEL_LSB(31)) u_xbar (
    .clk_i, .rst_ni,
    .m_req_i(m_req), .m_rsp_o(m_rsp), .s_req_o(s_req), .s_rsp_i(s_rsp));

  for (genvar s = 0; s < 2; s++) begin : g_membuf
    axi_latency_buffer #(.LATENCY(MEM_LATENCY)) u_buf (
      .clk_i, .rst_ni,
      .s_req_i(s_req[s]), .s_rsp_o(s_rsp[s]),
      .m_req_o(mem_req[s]), .m_rsp_i(mem_rsp[s]));
  end

  axi_bram #(.BYTES(IMEM_BYTES)) u_imem (
    .clk_i, .rst_ni,
    .axi_req_i(mem_req[0]), .axi_rsp_o(mem_rsp[0]),
    .ps_en_i(ps_imem_en_i), .ps_we_i(ps_imem_we_i), .ps_be_i(ps_imem_be_i),
    .ps_addr_i(ps_imem_addr_i), .ps_wdata_i(ps_imem_wdata_i), .ps_rdata_o(ps_imem_rdata_o));

  axi_bram #(.BYTES(DMEM_BYTES)) u_dmem (
    .clk_i, .rst_ni,
    .axi_req_i(mem_req[1]), .axi_rsp_o(mem_rsp[1]),
    .ps_en_i(ps_dmem_en_i), .ps_we_i(ps_dmem_we_i), .ps_be_i(ps_dmem_be_i),
    .ps_addr_i(ps_dmem_addr_i), .ps_wdata_i(ps_dmem_wdata_i), .ps_rdata_o(ps_dmem_rdata_o));

endmodule
