// nvmisc_pkg: types and constants shared by the emulation platform.
//
// tech_e selects the memory technology that the D-cache data array emulates:
// SRAM (fixed access latency), STT-RAM (separate read and write latency) or
// racetrack memory (latency set by the shifts needed to bring the addressed
// domain under an access port). The three technologies and their knobs are
// the platform's; the encodings are this design's own.
//
// axi_req_t / axi_rsp_t bundle the subset of AXI4 used between the D-cache,
// the crossbar, the latency buffers and the memories: 32-bit address and
// data, INCR bursts only, no IDs (one transaction per master and direction is
// outstanding at a time) and always-OKAY responses, so RRESP/BRESP, size,
// cache and prot fields are left out.
package nvmisc_pkg;

  typedef enum logic [1:0] {
    TECH_SRAM   = 2'd0,
    TECH_STTRAM = 2'd1,
    TECH_RTM    = 2'd2
  } tech_e;

  localparam int unsigned ADDR_W = 32;
  localparam int unsigned DATA_W = 32;
  localparam int unsigned STRB_W = DATA_W / 8;

  typedef struct packed {
    logic                ar_valid;
    logic [ADDR_W-1:0]   ar_addr;
    logic [7:0]          ar_len;    // beats - 1
    logic                aw_valid;
    logic [ADDR_W-1:0]   aw_addr;
    logic [7:0]          aw_len;    // beats - 1
    logic                w_valid;
    logic [DATA_W-1:0]   w_data;
    logic [STRB_W-1:0]   w_strb;
    logic                w_last;
    logic                r_ready;
    logic                b_ready;
  } axi_req_t;

  typedef struct packed {
    logic                ar_ready;
    logic                aw_ready;
    logic                w_ready;
    logic                r_valid;
    logic [DATA_W-1:0]   r_data;
    logic                r_last;
    logic                b_valid;
  } axi_rsp_t;

  // Integer ceiling division, used for shifts per cycle.
  function automatic int unsigned ceil_div(int unsigned a, int unsigned b);
    return (a + b - 1) / b;
  endfunction

endpackage
