// halt_manager: stalls the Execute and Writeback stages around cache work.
//
// The pipeline reports through req_i that a load or store in Execute needs
// the D-cache. From that cycle on the stages are halted until the cache
// reports the access finished (access_done_i); in the cycle access_done_i is
// high the halt is already released, so the pipeline takes the load data and
// moves on at the next clock edge. If the access misses, the cache raises
// refill_i and the halt is held through the whole line refill until the
// loader reports refill_done_i; the access is then replayed and the manager
// waits for access_done_i again.
//
// States: IDLE (no access), ACCESS (waiting for the data array or the memory
// write), REFILL (line refill in progress). The stall rule follows the
// platform; the state encoding and the one-cycle release are this design's.
module halt_manager (
  input  logic clk_i,
  input  logic rst_ni,
  input  logic req_i,
  input  logic access_done_i,
  input  logic refill_i,
  input  logic refill_done_i,
  output logic halt_ex_o,
  output logic halt_wb_o,
  output logic refilling_o
);

  typedef enum logic [1:0] {HM_IDLE, HM_ACCESS, HM_REFILL} hm_state_e;
  hm_state_e state_q, state_d;
  logic      halt;

  always_comb begin
    state_d = state_q;
    halt    = 1'b0;
    unique case (state_q)
      HM_IDLE: begin
        halt = req_i;
        if (req_i) state_d = HM_ACCESS;
      end
      HM_ACCESS: begin
        if (refill_i) begin
          halt    = 1'b1;
          state_d = HM_REFILL;
        end else if (access_done_i) begin
          state_d = HM_IDLE;
        end else begin
          halt = 1'b1;
        end
      end
      default: begin
        halt = 1'b1;
        if (refill_done_i) state_d = HM_ACCESS;
      end
    endcase
  end

  assign halt_ex_o   = halt;
  assign halt_wb_o   = halt;
  assign refilling_o = (state_q == HM_REFILL);

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) state_q <= HM_IDLE;
    else         state_q <= state_d;
  end

  // A finished access or refill is only reported while one is pending.
  assert property (@(posedge clk_i) disable iff (!rst_ni)
                   access_done_i |-> state_q == HM_ACCESS);
  assert property (@(posedge clk_i) disable iff (!rst_ni)
                   refill_done_i |-> state_q == HM_REFILL);

endmodule
