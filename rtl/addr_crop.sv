// addr_crop: the "ADDR Cropping" stage of the D-cache.
//
// Cuts a CPU byte address into the three fields a direct-mapped cache needs:
// the tag (compared with the tag array), the line index (selects the tag
// entry and the data-array line) and the word offset inside the line (selects
// the word, and for racetrack memory the domain on the track). It also gives
// the word-aligned base address of the line, which is the start address of
// the refill burst. Purely combinational.
//
// The cache is direct-mapped as in the platform's specification; the line
// size (64 bytes, 16 words, so that one word maps to one domain of a 16-bit
// track) is this design's choice.
module addr_crop #(
  parameter int unsigned ADDR_W      = 32,
  parameter int unsigned CACHE_BYTES = 16 * 1024,
  parameter int unsigned LINE_BYTES  = 64,
  localparam int unsigned OFF_W   = $clog2(LINE_BYTES),
  localparam int unsigned WORD_W  = OFF_W - 2,
  localparam int unsigned LINES   = CACHE_BYTES / LINE_BYTES,
  localparam int unsigned INDEX_W = $clog2(LINES),
  localparam int unsigned TAG_W   = ADDR_W - INDEX_W - OFF_W
) (
  input  logic [ADDR_W-1:0]  addr_i,
  output logic [TAG_W-1:0]   tag_o,
  output logic [INDEX_W-1:0] index_o,
  output logic [WORD_W-1:0]  word_o,
  output logic [ADDR_W-1:0]  line_addr_o
);

  always_comb begin
    tag_o       = addr_i[ADDR_W-1 -: TAG_W];
    index_o     = addr_i[OFF_W +: INDEX_W];
    word_o      = addr_i[2 +: WORD_W];
    line_addr_o = {addr_i[ADDR_W-1:OFF_W], {OFF_W{1'b0}}};
  end

endmodule
