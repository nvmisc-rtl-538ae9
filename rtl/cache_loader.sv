// cache_loader: writes a buffered line into the data array after a miss.
//
// When the data bus buffer reports a complete line (line_ready_i), the loader
// writes its words, from word 0 upwards, into the data array line index_i.
// Each write is a normal data-array request, so it takes the write latency of
// the emulated technology (STT-RAM write latency, RTM shifts). The next word
// is requested in the same cycle the array reports the previous write done.
// After the last write it pulses done_o, which frees the buffer and tells the
// halt manager the refill is over.
//
// Role and ordering of duties follow the platform; the word order and the
// back-to-back issue are this design's choices.
module cache_loader
  import nvmisc_pkg::*;
#(
  parameter int unsigned LINES = 256,
  parameter int unsigned WORDS = 16,
  localparam int unsigned INDEX_W = $clog2(LINES),
  localparam int unsigned WORD_W  = $clog2(WORDS)
) (
  input  logic               clk_i,
  input  logic               rst_ni,
  input  logic               line_ready_i,
  input  logic [INDEX_W-1:0] index_i,
  output logic [WORD_W-1:0]  buf_idx_o,
  input  logic [DATA_W-1:0]  buf_data_i,
  output logic               arr_req_o,
  output logic [INDEX_W-1:0] arr_index_o,
  output logic [WORD_W-1:0]  arr_word_o,
  output logic [DATA_W-1:0]  arr_wdata_o,
  input  logic               arr_busy_i,
  input  logic               arr_ready_i,
  output logic               active_o,
  output logic               done_o
);

  logic              active_q;
  logic              pending_q;
  logic [WORD_W-1:0] word_q;
  logic              last;

  assign last     = (word_q == WORD_W'(WORDS-1));
  assign active_o = active_q;

  always_comb begin
    arr_req_o  = 1'b0;
    arr_word_o = word_q;
    done_o     = 1'b0;
    if (active_q) begin
      if (pending_q) begin
        arr_req_o = 1'b1;
      end else if (arr_ready_i) begin
        if (last) begin
          done_o = 1'b1;
        end else begin
          arr_req_o  = 1'b1;
          arr_word_o = word_q + WORD_W'(1);
        end
      end
    end
    buf_idx_o   = arr_word_o;
    arr_wdata_o = buf_data_i;
    arr_index_o = index_i;
  end

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      active_q  <= 1'b0;
      pending_q <= 1'b0;
      word_q    <= '0;
    end else if (!active_q) begin
      if (line_ready_i) begin
        active_q  <= 1'b1;
        pending_q <= 1'b1;
        word_q    <= '0;
      end
    end else begin
      if (pending_q) begin
        if (!arr_busy_i) pending_q <= 1'b0;
      end else if (arr_ready_i) begin
        if (last) active_q <= 1'b0;
        else begin
          word_q <= word_q + WORD_W'(1);
          if (arr_busy_i) pending_q <= 1'b1;
        end
      end
    end
  end

endmodule
