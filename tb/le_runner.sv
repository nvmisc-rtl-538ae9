// le_runner: drives one latency_emu configuration with random accesses and
// checks, against its own model of the track positions, the shift count,
// the latency, the cycle of fire_o (t+L-1) and of done_o (t+L).
module le_runner
  import nvmisc_pkg::*;
#(
  parameter tech_e       TECH            = TECH_RTM,
  parameter int unsigned TRACK_LENGTH    = 16,
  parameter int unsigned ACCESS_PORTS    = 1,
  parameter bit          RING            = 1'b0,
  parameter int unsigned SHIFT_PER_CYCLE = 1,
  parameter int unsigned N               = 300
) (
  input  logic clk,
  input  logic rst_n,
  output int   checks,
  output int   failures,
  output bit   finished,
  output int   max_shifts
);
  localparam int LINES = 8, WORD_W = 4;
  localparam int SEG = TRACK_LENGTH / ACCESS_PORTS;
  logic start = 0, we = 0, busy, fire, done;
  logic [2:0] line = 0;
  logic [WORD_W-1:0] word = 0;
  logic [15:0] latency;
  logic [$clog2(TRACK_LENGTH/(ACCESS_PORTS*(RING?2:1))+1)-1:0] shifts;
  int pos [LINES];

  latency_emu #(
    .TECH(TECH), .LINES(LINES), .WORD_W(WORD_W), .ACCESS_LATENCY(2),
    .READ_LATENCY(3), .WRITE_LATENCY(7), .TRACK_LENGTH(TRACK_LENGTH),
    .ACCESS_PORTS(ACCESS_PORTS), .RING(RING), .SHIFT_PER_CYCLE(SHIFT_PER_CYCLE),
    .RTM_PORT_LATENCY(1)
  ) dut (
    .clk_i(clk), .rst_ni(rst_n), .start_i(start), .we_i(we), .line_i(line), .word_i(word),
    .busy_o(busy), .fire_o(fire), .done_o(done), .latency_o(latency), .shifts_o(shifts));

  task automatic chk(input bit ok, input string what, input int got, input int exp);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL [tech=%0d ports=%0d ring=%0d spc=%0d] %s got=%0d exp=%0d",
               TECH, ACCESS_PORTS, RING, SHIFT_PER_CYCLE, what, got, exp);
    end
  endtask

  initial begin
    checks = 0; failures = 0; finished = 0; max_shifts = 0;
    for (int i = 0; i < LINES; i++) pos[i] = 0;
    @(posedge rst_n);
    @(posedge clk); #1;
    for (int n = 0; n < N; n++) begin
      int exp_sh, exp_l, d, rel, fire_at, done_at, cyc;
      line = 3'($urandom_range(LINES-1, 0));
      word = WORD_W'($urandom);
      we   = $urandom_range(1, 0);
      rel  = (int'(word) % TRACK_LENGTH) % SEG;
      d    = (rel > pos[line]) ? rel - pos[line] : pos[line] - rel;
      if (RING && d > SEG / 2) d = SEG - d;
      exp_sh = (TECH == TECH_RTM) ? d : 0;
      case (TECH)
        TECH_SRAM:   exp_l = 2;
        TECH_STTRAM: exp_l = we ? 7 : 3;
        default:     exp_l = 1 + (exp_sh + SHIFT_PER_CYCLE - 1) / SHIFT_PER_CYCLE;
      endcase
      if (exp_sh > max_shifts) max_shifts = exp_sh;
      if (TECH == TECH_RTM) pos[line] = rel;
      start = 1;
      #0;
      chk(int'(shifts) == exp_sh, "shifts", int'(shifts), exp_sh);
      chk(int'(latency) == exp_l, "latency", int'(latency), exp_l);
      fire_at = -1; done_at = -1; cyc = 0;
      while (done_at < 0 && cyc < 100) begin
        #1;
        if (fire && fire_at < 0) fire_at = cyc;
        @(posedge clk); #1;
        start = 0;
        cyc++;
        if (done) done_at = cyc;
      end
      chk(fire_at == exp_l - 1, "fire cycle", fire_at, exp_l - 1);
      chk(done_at == exp_l, "done cycle", done_at, exp_l);
      chk(!busy, "idle after done", int'(busy), 0);
    end
    finished = 1;
  end
endmodule
