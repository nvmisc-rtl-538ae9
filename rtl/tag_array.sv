// tag_array: tag store of the direct-mapped D-cache ("Tag Array (SRAM)").
//
// One entry per cache line holds the line's tag; a separate vector of valid
// bits, cleared by reset, marks which entries hold data. The read is
// synchronous like a block RAM: the index presented with rd_en_i in one cycle
// gives rd_tag_o / rd_valid_o in the next. A write (after a line refill)
// stores the tag and sets the valid bit; a write and a read of the same index
// in one cycle return the old entry (read-first).
//
// The platform only names the block and states that it is SRAM; the ports,
// the read timing and the reset behaviour are this design's choices.
module tag_array #(
  parameter int unsigned LINES = 256,
  parameter int unsigned TAG_W = 18,
  localparam int unsigned INDEX_W = $clog2(LINES)
) (
  input  logic               clk_i,
  input  logic               rst_ni,
  input  logic               rd_en_i,
  input  logic [INDEX_W-1:0] rd_index_i,
  output logic [TAG_W-1:0]   rd_tag_o,
  output logic               rd_valid_o,
  input  logic               wr_en_i,
  input  logic [INDEX_W-1:0] wr_index_i,
  input  logic [TAG_W-1:0]   wr_tag_i
);

  logic [TAG_W-1:0] tags [LINES];
  logic [LINES-1:0] valid_q;

  always_ff @(posedge clk_i) begin
    if (rd_en_i) rd_tag_o <= tags[rd_index_i];
    if (wr_en_i) tags[wr_index_i] <= wr_tag_i;
  end

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      valid_q    <= '0;
      rd_valid_o <= 1'b0;
    end else begin
      if (rd_en_i) rd_valid_o <= valid_q[rd_index_i];
      if (wr_en_i) valid_q[wr_index_i] <= 1'b1;
    end
  end

endmodule
