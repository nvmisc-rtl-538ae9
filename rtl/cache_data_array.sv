// cache_data_array: the D-cache data array with its ADDR_REG and DIN_REG.
//
// An access is requested with req_i while busy_o is low. The line index, word
// offset, write data and byte enables are captured into ADDR_REG / DIN_REG,
// and the latency emulation decides in which cycle the array is really
// touched. The array is a byte-enabled RAM with a registered read port, so a
// read's data appears in rdata_o in the cycle ready_o pulses. With a latency
// of L cycles, req_i in cycle t gives ready_o in cycle t+L; the array is
// accessed at the end of cycle t+L-1 (from the request inputs directly when
// L = 1, from the registers otherwise). latency_o / shifts_o report the
// latency and RTM shift count of the access being requested.
//
// Registers, latency gating and array follow the platform's cache emulation
// architecture; the byte enables and the request/ready handshake are this
// design's choices.
module cache_data_array
  import nvmisc_pkg::*;
#(
  parameter tech_e       TECH             = TECH_RTM,
  parameter int unsigned LINES            = 256,
  parameter int unsigned WORDS            = 16,
  parameter int unsigned ACCESS_LATENCY   = 2,
  parameter int unsigned READ_LATENCY     = 2,
  parameter int unsigned WRITE_LATENCY    = 6,
  parameter int unsigned TRACK_LENGTH     = 16,
  parameter int unsigned ACCESS_PORTS     = 1,
  parameter bit          RING             = 1'b0,
  parameter int unsigned SHIFT_PER_CYCLE  = 1,
  parameter int unsigned RTM_PORT_LATENCY = 1,
  localparam int unsigned INDEX_W = $clog2(LINES),
  localparam int unsigned WORD_W  = $clog2(WORDS),
  localparam int unsigned L_MAX   = TRACK_LENGTH / (ACCESS_PORTS * (RING ? 2 : 1)),
  localparam int unsigned SHIFT_W = $clog2(L_MAX + 1)
) (
  input  logic               clk_i,
  input  logic               rst_ni,
  input  logic               req_i,
  input  logic               we_i,
  input  logic [STRB_W-1:0]  be_i,
  input  logic [INDEX_W-1:0] index_i,
  input  logic [WORD_W-1:0]  word_i,
  input  logic [DATA_W-1:0]  wdata_i,
  output logic               busy_o,
  output logic               ready_o,
  output logic [DATA_W-1:0]  rdata_o,
  output logic [15:0]        latency_o,
  output logic [SHIFT_W-1:0] shifts_o
);

  logic [DATA_W-1:0] mem [LINES*WORDS];

  // ADDR_REG and DIN_REG
  logic [INDEX_W-1:0] addr_index_q;
  logic [WORD_W-1:0]  addr_word_q;
  logic               we_q;
  logic [DATA_W-1:0]  din_q;
  logic [STRB_W-1:0]  be_q;

  logic               start;
  logic               fire;
  logic               lat_busy;
  logic [INDEX_W+WORD_W-1:0] acc_addr;
  logic               acc_we;
  logic [DATA_W-1:0]  acc_din;
  logic [STRB_W-1:0]  acc_be;

  assign start  = req_i && !lat_busy;
  assign busy_o = lat_busy;

  latency_emu #(
    .TECH(TECH), .LINES(LINES), .WORD_W(WORD_W),
    .ACCESS_LATENCY(ACCESS_LATENCY), .READ_LATENCY(READ_LATENCY),
    .WRITE_LATENCY(WRITE_LATENCY), .TRACK_LENGTH(TRACK_LENGTH),
    .ACCESS_PORTS(ACCESS_PORTS), .RING(RING),
    .SHIFT_PER_CYCLE(SHIFT_PER_CYCLE), .RTM_PORT_LATENCY(RTM_PORT_LATENCY)
  ) u_latency (
    .clk_i, .rst_ni,
    .start_i  (start),
    .we_i,
    .line_i   (index_i),
    .word_i,
    .busy_o   (lat_busy),
    .fire_o   (fire),
    .done_o   (ready_o),
    .latency_o,
    .shifts_o
  );

  always_comb begin
    if (start) begin
      acc_addr = {index_i, word_i};
      acc_we   = we_i;
      acc_din  = wdata_i;
      acc_be   = be_i;
    end else begin
      acc_addr = {addr_index_q, addr_word_q};
      acc_we   = we_q;
      acc_din  = din_q;
      acc_be   = be_q;
    end
  end

  always_ff @(posedge clk_i) begin
    if (start) begin
      addr_index_q <= index_i;
      addr_word_q  <= word_i;
      we_q         <= we_i;
      din_q        <= wdata_i;
      be_q         <= be_i;
    end
    if (fire) begin
      if (acc_we) begin
        for (int b = 0; b < STRB_W; b++)
          if (acc_be[b]) mem[acc_addr][8*b +: 8] <= acc_din[8*b +: 8];
      end else begin
        rdata_o <= mem[acc_addr];
      end
    end
  end

endmodule
