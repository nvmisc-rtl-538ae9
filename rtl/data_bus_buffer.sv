// data_bus_buffer: holds one refill burst between the AXI4 bus and the loader.
//
// The memory bus delivers a cache line as a burst of one word per cycle,
// faster than a slow (non-volatile) data array can absorb it. The buffer
// accepts the R beats as soon as a burst arrives, one register per word, and
// raises line_ready_o once the beat marked r_last has been stored. The loader
// then reads the words in any order through rd_idx_i / rd_data_o
// (combinational read) and frees the buffer with release_i; r_ready_o stays
// low while a full line is waiting, so a new burst cannot overwrite it.
//
// Function and notification follow the platform; the register organisation
// and the handshake are this design's choices.
module data_bus_buffer
  import nvmisc_pkg::*;
#(
  parameter int unsigned WORDS = 16,
  localparam int unsigned WORD_W = $clog2(WORDS)
) (
  input  logic              clk_i,
  input  logic              rst_ni,
  input  logic              r_valid_i,
  input  logic [DATA_W-1:0] r_data_i,
  input  logic              r_last_i,
  output logic              r_ready_o,
  output logic              line_ready_o,
  output logic              receiving_o,
  input  logic [WORD_W-1:0] rd_idx_i,
  output logic [DATA_W-1:0] rd_data_o,
  input  logic              release_i
);

  logic [DATA_W-1:0] words_q [WORDS];
  logic [WORD_W-1:0] wr_idx_q;
  logic              full_q;

  assign r_ready_o    = !full_q;
  assign line_ready_o = full_q;
  assign receiving_o  = (wr_idx_q != '0);
  assign rd_data_o    = words_q[rd_idx_i];

  always_ff @(posedge clk_i) begin
    if (r_valid_i && !full_q) words_q[wr_idx_q] <= r_data_i;
  end

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      wr_idx_q <= '0;
      full_q   <= 1'b0;
    end else if (full_q) begin
      if (release_i) full_q <= 1'b0;
    end else if (r_valid_i) begin
      if (r_last_i) begin
        full_q   <= 1'b1;
        wr_idx_q <= '0;
      end else begin
        wr_idx_q <= wr_idx_q + WORD_W'(1);
      end
    end
  end

  // The burst must be exactly one line long.
  assert property (@(posedge clk_i) disable iff (!rst_ni)
                   (r_valid_i && r_ready_o) |-> (r_last_i == (wr_idx_q == WORD_W'(WORDS-1))));

endmodule
