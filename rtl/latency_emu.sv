// latency_emu: the "Latency Emulation" block of the D-cache data array.
//
// Every data-array access is held back until a technology-dependent number of
// cycles has passed. The latency L of an access is
//   SRAM    : ACCESS_LATENCY
//   STT-RAM : READ_LATENCY or WRITE_LATENCY, by the access direction
//   RTM     : RTM_PORT_LATENCY + ceil(shifts / SHIFT_PER_CYCLE)
// For racetrack memory every cache line is one bundle of tracks that shifts
// as a unit; the word offset selects the domain on the tracks. With
// ACCESS_PORTS ports spread evenly along a TRACK_LENGTH-domain track, each
// port serves a segment of SEG = TRACK_LENGTH/ACCESS_PORTS domains, and the
// shifts needed are the distance between the segment position of this access
// and that of the previous access to the same line (kept in a register per
// line). A ring-shaped track may shift either way, so the distance is
// min(d, SEG-d). The largest shift count is therefore
// TRACK_LENGTH/(ACCESS_PORTS*k_ring) with k_ring = 2 for a ring, 1 otherwise.
// The latency formula and the counter follow the platform; the per-line
// position register, the domain mapping and RTM_PORT_LATENCY are this
// design's reading of it.
//
// Timing: start_i in cycle t (only while busy_o is low) with the access
// described by we_i/line_i/word_i. fire_o is high in cycle t+L-1, the cycle in
// which the array performs the access (for L = 1 this is cycle t itself, so
// fire_o then depends combinationally on start_i). done_o is high in cycle
// t+L. latency_o and shifts_o describe the access being started (valid with
// start_i). All latencies must be at least 1.
module latency_emu
  import nvmisc_pkg::*;
#(
  parameter tech_e       TECH             = TECH_RTM,
  parameter int unsigned LINES            = 256,
  parameter int unsigned WORD_W           = 4,
  parameter int unsigned ACCESS_LATENCY   = 2,
  parameter int unsigned READ_LATENCY     = 2,
  parameter int unsigned WRITE_LATENCY    = 6,
  parameter int unsigned TRACK_LENGTH     = 16,
  parameter int unsigned ACCESS_PORTS     = 1,
  parameter bit          RING             = 1'b0,
  parameter int unsigned SHIFT_PER_CYCLE  = 1,
  parameter int unsigned RTM_PORT_LATENCY = 1,
  localparam int unsigned INDEX_W = $clog2(LINES),
  localparam int unsigned SEG     = TRACK_LENGTH / ACCESS_PORTS,
  localparam int unsigned SEG_W   = (SEG > 1) ? $clog2(SEG) : 1,
  localparam int unsigned L_MAX   = TRACK_LENGTH / (ACCESS_PORTS * (RING ? 2 : 1)),
  localparam int unsigned SHIFT_W = $clog2(L_MAX + 1),
  localparam int unsigned CNT_W   = 16
) (
  input  logic               clk_i,
  input  logic               rst_ni,
  input  logic               start_i,
  input  logic               we_i,
  input  logic [INDEX_W-1:0] line_i,
  input  logic [WORD_W-1:0]  word_i,
  output logic               busy_o,
  output logic               fire_o,
  output logic               done_o,
  output logic [CNT_W-1:0]   latency_o,
  output logic [SHIFT_W-1:0] shifts_o
);

  // Position of each line's track bundle: the segment offset that sits under
  // the access ports.
  logic [SEG_W-1:0] pos_q [LINES];
  logic [SEG_W-1:0] rel;
  logic [SEG_W:0]   sdist;
  logic             busy_q;
  logic [CNT_W-1:0] remain_q;

  always_comb begin
    rel  = (SEG > 1) ? SEG_W'(32'(word_i) % SEG) : '0;
    sdist = (rel >= pos_q[line_i]) ? (SEG_W+1)'(rel - pos_q[line_i])
                                  : (SEG_W+1)'(pos_q[line_i] - rel);
    if (RING && (32'(sdist) > SEG / 2)) sdist = (SEG_W+1)'(SEG - 32'(sdist));
    shifts_o = (TECH == TECH_RTM) ? SHIFT_W'(sdist) : '0;
    unique case (TECH)
      TECH_SRAM:   latency_o = CNT_W'(ACCESS_LATENCY);
      TECH_STTRAM: latency_o = we_i ? CNT_W'(WRITE_LATENCY) : CNT_W'(READ_LATENCY);
      default:     latency_o = CNT_W'(RTM_PORT_LATENCY)
                             + CNT_W'((32'(shifts_o) + SHIFT_PER_CYCLE - 1) / SHIFT_PER_CYCLE);
    endcase
  end

  assign busy_o = busy_q;
  assign fire_o = (start_i && !busy_q && latency_o == CNT_W'(1))
               || (busy_q && remain_q == CNT_W'(1));

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      busy_q   <= 1'b0;
      remain_q <= '0;
      done_o   <= 1'b0;
      for (int i = 0; i < LINES; i++) pos_q[i] <= '0;
    end else begin
      done_o <= fire_o;
      if (busy_q) begin
        remain_q <= remain_q - CNT_W'(1);
        if (remain_q == CNT_W'(1)) busy_q <= 1'b0;
      end else if (start_i) begin
        if (latency_o > CNT_W'(1)) begin
          busy_q   <= 1'b1;
          remain_q <= latency_o - CNT_W'(1);
        end
        if (TECH == TECH_RTM) pos_q[line_i] <= rel;
      end
    end
  end

  initial begin
    assert (ACCESS_LATENCY >= 1 && READ_LATENCY >= 1 && WRITE_LATENCY >= 1
            && RTM_PORT_LATENCY >= 1 && SHIFT_PER_CYCLE >= 1)
      else $error("latency_emu: every latency and SHIFT_PER_CYCLE must be at least 1");
    assert (TRACK_LENGTH % ACCESS_PORTS == 0)
      else $error("latency_emu: ACCESS_PORTS must divide TRACK_LENGTH");
  end

endmodule
